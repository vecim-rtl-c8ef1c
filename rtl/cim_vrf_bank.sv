// cim_vrf_bank: one bank of the compute-in-memory vector register file.
//
// Storage is a 1R1W register-file SRAM of WORDS x 64 bits (4 kb by default)
// with decoupled read and write ports. Attached to it are four 16-bit CIM
// slots (cim_slot_mul + nm_accum), a near-memory integer unit (nm_int_unit)
// and four near-memory floating-point units (nm_fp_unit), so that a whole bank
// word is multiplied in place.
//
// A CIM operation runs as a fixed sequence of steps; step 0 is the cycle after
// the one in which cim_valid_i is seen:
//   MAC ops (INT8 vmacc, INT8 dot, BF16 vfmacc), 8 steps:
//     0 COPY  read vs2, inverted copy into the CIM bits
//     1 KEEP  read vs1, latch at the knode
//     2-5 MUL 4 double-rate multiply cycles
//     6 ADD   read op3 (vd), near-memory add, result register
//     7 WB    write vd
//   FP16 vfmul, 9 steps: COPY, KEEP, MUL x5 (10-bit ring), ADJUST, WB
//   BF16/FP16 vfadd, 4 steps: read vs2, read vs1, ADD, WB
// The read port is used by the bank only in COPY, KEEP and ADD (MAC) steps and
// the write port only in WB; in the other cycles the ports are free for the
// load/store unit and the lane's arithmetic units (ext_*). The step sequences
// follow the described pipelines; the exact cycle of each port use is this
// implementation's reading of them. The sequencer guarantees that the
// external ports never collide with the bank's own use (checked by assertions).
//
// The next operation may be issued in the WB cycle of the previous one, so
// back-to-back MACs start every 8 cycles (the document's "Need 8 cycles").
//
// Reads are asynchronous (data in the cycle of the address), writes happen at
// the clock edge. Reset clears the control state, not the array.
module cim_vrf_bank
  import vecim_pkg::*;
#(
  parameter int unsigned WORDS = 64
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // CIM operation
  input  logic                      cim_valid_i,
  input  cim_op_e                   cim_op_i,
  input  logic [$clog2(WORDS)-1:0]  cim_vd_i,
  input  logic [$clog2(WORDS)-1:0]  cim_vs1_i,
  input  logic [$clog2(WORDS)-1:0]  cim_vs2_i,
  output logic                      cim_busy_o,    // low when a new op may start
  output logic                      cim_done_o,    // pulses in the WB cycle
  // external read port
  input  logic                      ext_re_i,
  input  logic [$clog2(WORDS)-1:0]  ext_raddr_i,
  output logic [WORD_W-1:0]         ext_rdata_o,
  // external write port
  input  logic                      ext_we_i,
  input  logic [$clog2(WORDS)-1:0]  ext_waddr_i,
  input  logic [WORD_W-1:0]         ext_wdata_i
);

  localparam int unsigned AW = $clog2(WORDS);

  typedef enum logic [2:0] {S_IDLE, S_COPY, S_KEEP, S_MUL, S_ADD, S_WB} step_e;

  logic [WORD_W-1:0] mem [WORDS];

  cim_op_e          op_q;
  logic [AW-1:0]    vd_q, vs1_q, vs2_q;
  step_e            st;
  logic [3:0]       cnt;            // cycles left in S_MUL
  logic [WORD_W-1:0] a_q, b_q, res_q;
  ring_mode_e       rmode;
  logic             is_add;

  assign is_add = (op_q == CIM_VFADD_BF) || (op_q == CIM_VFADD_HF);

  always_comb begin
    case (op_q)
      CIM_VFMACC_BF: rmode = RING_BF16;
      CIM_VFMUL_HF:  rmode = RING_FP16;
      default:       rmode = RING_INT8;
    endcase
  end

  // ---------------- read port ----------------
  logic              cim_rd;
  logic [AW-1:0]     raddr;
  logic [WORD_W-1:0] rdata;

  always_comb begin
    cim_rd = 1'b0;
    raddr  = ext_raddr_i;
    case (st)
      S_COPY: begin cim_rd = 1'b1; raddr = vs2_q; end
      S_KEEP: begin cim_rd = 1'b1; raddr = vs1_q; end
      S_ADD:  if (op_q != CIM_VFMUL_HF && !is_add) begin cim_rd = 1'b1; raddr = vd_q; end
      default: ;
    endcase
  end
  assign rdata       = mem[raddr];
  assign ext_rdata_o = rdata;

  // ---------------- CIM slots ----------------
  logic [NSLOT-1:0][SLOT_W-1:0] and0, and1, ra, rb, fpres;
  logic [NSLOT-1:0][19:0]       plo;
  logic [NSLOT-1:0][15:0]       phi;
  logic [7:0][15:0]             uprod;
  logic [WORD_W-1:0]            int_res;
  fp_mode_e                     fmode;

  always_comb begin
    case (op_q)
      CIM_VFMACC_BF: fmode = FP_MAC_BF;
      CIM_VFMUL_HF:  fmode = FP_MUL_HF;
      CIM_VFADD_BF:  fmode = FP_ADD_BF;
      default:       fmode = FP_ADD_HF;
    endcase
  end

  for (genvar s = 0; s < NSLOT; s++) begin : g_slot
    cim_slot_mul u_mul (
      .clk, .rst_n,
      .mode_i  (rmode),
      .copy_i  (st == S_COPY),
      .keep_i  (st == S_KEEP),
      .shift_i (st == S_MUL),
      .a_i     (rdata[SLOT_W*s +: SLOT_W]),
      .b_i     (rdata[SLOT_W*s +: SLOT_W]),
      .and0_o  (and0[s]),
      .and1_o  (and1[s]),
      .a_o     (ra[s]),
      .b_o     (rb[s])
    );
    nm_accum u_acc (
      .clk, .rst_n,
      .mode_i    (rmode),
      .clear_i   (st == S_COPY),
      .acc_en_i  (st == S_MUL),
      .and0_i    (and0[s]),
      .and1_i    (and1[s]),
      .prod_lo_o (plo[s]),
      .prod_hi_o (phi[s])
    );
    nm_fp_unit u_fp (
      .mode_i  (fmode),
      .a_i     (a_q[SLOT_W*s +: SLOT_W]),
      .b_i     (b_q[SLOT_W*s +: SLOT_W]),
      .c_i     (rdata[SLOT_W*s +: SLOT_W]),
      .mprod_i (plo[s]),
      .res_o   (fpres[s])
    );
    assign uprod[2*s]   = plo[s][15:0];
    assign uprod[2*s+1] = phi[s];
  end

  nm_int_unit u_int (
    .op_i    (op_q),
    .a_i     (ra),
    .b_i     (rb),
    .c_i     (rdata),
    .uprod_i (uprod),
    .res_o   (int_res)
  );

  // ---------------- control ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st    <= S_IDLE;
      op_q  <= CIM_NONE;
      vd_q  <= '0;
      vs1_q <= '0;
      vs2_q <= '0;
      cnt   <= '0;
      a_q   <= '0;
      b_q   <= '0;
      res_q <= '0;
    end else begin
      case (st)
        S_IDLE: if (cim_valid_i && cim_op_i != CIM_NONE) begin
          op_q  <= cim_op_i;
          vd_q  <= cim_vd_i;
          vs1_q <= cim_vs1_i;
          vs2_q <= cim_vs2_i;
          st    <= S_COPY;
        end
        S_COPY: begin
          a_q <= rdata;
          st  <= S_KEEP;
        end
        S_KEEP: begin
          b_q <= rdata;
          cnt <= (op_q == CIM_VFMUL_HF) ? 4'(MUL_CYC_10) : 4'(MUL_CYC_8);
          st  <= is_add ? S_ADD : S_MUL;
        end
        S_MUL: begin
          cnt <= cnt - 4'd1;
          if (cnt == 4'd1) st <= S_ADD;
        end
        S_ADD: begin
          if (op_q == CIM_VMACC_I8 || op_q == CIM_VDOT_I8) res_q <= int_res;
          else                                             res_q <= fpres;
          st <= S_WB;
        end
        // a new operation may start in the write-back cycle, so operations
        // follow each other every cim_steps cycles
        S_WB: if (cim_valid_i && cim_op_i != CIM_NONE) begin
          op_q  <= cim_op_i;
          vd_q  <= cim_vd_i;
          vs1_q <= cim_vs1_i;
          vs2_q <= cim_vs2_i;
          st    <= S_COPY;
        end else begin
          st <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // ---------------- write port ----------------
  always_ff @(posedge clk) begin
    if (st == S_WB)    mem[vd_q]        <= res_q;
    else if (ext_we_i) mem[ext_waddr_i] <= ext_wdata_i;
  end

  assign cim_busy_o = (st != S_IDLE) && (st != S_WB);   // cannot accept an operation
  assign cim_done_o = (st == S_WB);

  // The sequencer schedules around the bank's own port use.
  a_rd_conflict: assert property (@(posedge clk) disable iff (!rst_n) !(cim_rd && ext_re_i))
    else $error("external read collides with a CIM read");
  a_wr_conflict: assert property (@(posedge clk) disable iff (!rst_n) !((st == S_WB) && ext_we_i))
    else $error("external write collides with a CIM write-back");
  a_busy_accept: assert property (@(posedge clk) disable iff (!rst_n) !(cim_valid_i && cim_busy_o))
    else $error("CIM operation issued to a busy bank");

endmodule

// vecim_top: RISC-V vector co-processor whose vector register file computes.
//
// The scalar CPU sends decoded vector instructions (vinstr_t) with a
// valid/ready handshake and gets an acknowledge per issued instruction. The
// vector sequencer queues them by class and issues them out of order:
//   CIM   operations go to all LANES x NBANK VRF banks at once and are executed
//         inside the banks (in-memory multiply, near-memory add),
//   MEM   loads/stores go to the load-store unit (64 bits per lane per cycle
//         to memory, fixed latency MEM_LAT),
//   ARITH instructions go out on the arith_* ports to the lane ALU/FPU and
//         slide unit, which are outside this design: the VRF rows vs2 and vs1
//         are presented on arith_rdata_o one and two cycles after issue, and
//         the result on arith_wdata_i is written into vd ARITH_LAT cycles after
//         the second read.
// Those external units, the scalar CPU and memory connect through the ports.
// Default size: 4 lanes x 8 banks x 64 words x 64 bits (4 x 8 x 4 kb).
module vecim_top
  import vecim_pkg::*;
#(
  parameter int unsigned LANES       = 4,
  parameter int unsigned NBANK       = 8,
  parameter int unsigned WORDS       = 64,
  parameter int unsigned MEM_LAT     = 4,
  parameter int unsigned ARITH_LAT   = 2,
  parameter int unsigned IFIFO_DEPTH = 4,
  parameter int unsigned QDEPTH      = 4
) (
  input  logic                                     clk,
  input  logic                                     rst_n,
  // scalar CPU
  input  logic                                     instr_valid_i,
  output logic                                     instr_ready_o,
  input  vinstr_t                                  instr_i,
  output logic [NQ-1:0]                            ack_valid_o,
  output logic [NQ-1:0][ID_W-1:0]                  ack_id_o,
  // memory
  output logic                                     mem_req_o,
  output logic                                     mem_we_o,
  output logic [31:0]                              mem_addr_o,
  output logic [LANES-1:0][WORD_W-1:0]             mem_wdata_o,
  input  logic                                     mem_rvalid_i,
  input  logic [LANES-1:0][WORD_W-1:0]             mem_rdata_i,
  // lane ALU/FPU and slide unit
  output logic                                     arith_issue_o,
  output vinstr_t                                  arith_instr_o,
  input  logic                                     arith_ready_i,
  output logic [LANES-1:0][NBANK-1:0][WORD_W-1:0]  arith_rdata_o,
  input  logic [LANES-1:0][NBANK-1:0][WORD_W-1:0]  arith_wdata_i,
  // mechanism events
  output logic                                     ev_port_stall_o,
  output logic                                     ev_dep_stall_o,
  output logic                                     ev_ooo_o,
  output logic                                     ev_multi_o,
  output logic                                     cim_done_o
);

  localparam int unsigned AW = $clog2(WORDS);
  localparam int unsigned AP = 3 + ARITH_LAT;   // ARITH pipeline stages

  logic    cim_issue, mem_issue, vlsu_busy;
  vinstr_t cim_instr, mem_instr;

  vec_sequencer #(
    .NBANK(NBANK), .IFIFO_DEPTH(IFIFO_DEPTH), .QDEPTH(QDEPTH),
    .MEM_LAT(MEM_LAT), .ARITH_LAT(ARITH_LAT)
  ) u_seq (
    .clk, .rst_n,
    .instr_valid_i, .instr_ready_o, .instr_i,
    .ack_valid_o, .ack_id_o,
    .cim_issue_o   (cim_issue),
    .cim_instr_o   (cim_instr),
    .mem_issue_o   (mem_issue),
    .mem_instr_o   (mem_instr),
    .arith_issue_o,
    .arith_instr_o,
    .arith_ready_i,
    .ev_port_stall_o, .ev_dep_stall_o, .ev_ooo_o, .ev_multi_o
  );

  // ---------------- load-store unit ----------------
  logic [NBANK-1:0]                        ls_we, ls_re;
  logic [ROW_AW-1:0]                       ls_waddr, ls_raddr;
  logic [LANES-1:0][WORD_W-1:0]            ls_wdata;
  logic [LANES-1:0][NBANK-1:0][WORD_W-1:0] rdata;

  vlsu #(.LANES(LANES), .NBANK(NBANK), .MEM_LAT(MEM_LAT)) u_vlsu (
    .clk, .rst_n,
    .issue_i      (mem_issue),
    .instr_i      (mem_instr),
    .busy_o       (vlsu_busy),
    .mem_req_o, .mem_we_o, .mem_addr_o, .mem_wdata_o, .mem_rvalid_i, .mem_rdata_i,
    .vrf_we_o     (ls_we),
    .vrf_waddr_o  (ls_waddr),
    .vrf_wdata_o  (ls_wdata),
    .vrf_re_o     (ls_re),
    .vrf_raddr_o  (ls_raddr),
    .vrf_rdata_i  (rdata)
  );

  // ---------------- ARITH port timing ----------------
  // stage 1: read vs2, stage 2: read vs1, stage 2+ARITH_LAT: write vd
  logic              ap_v  [AP];
  logic [ROW_AW-1:0] ap_vd [AP];
  logic [ROW_AW-1:0] ap_s1 [AP];
  logic [ROW_AW-1:0] ap_s2 [AP];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < AP; i++) begin
        ap_v[i] <= 1'b0; ap_vd[i] <= '0; ap_s1[i] <= '0; ap_s2[i] <= '0;
      end
    end else begin
      ap_v[1]  <= arith_issue_o;
      ap_vd[1] <= arith_instr_o.vd;
      ap_s1[1] <= arith_instr_o.vs1;
      ap_s2[1] <= arith_instr_o.vs2;
      for (int i = 2; i < AP; i++) begin
        ap_v[i] <= ap_v[i-1]; ap_vd[i] <= ap_vd[i-1];
        ap_s1[i] <= ap_s1[i-1]; ap_s2[i] <= ap_s2[i-1];
      end
      ap_v[0] <= 1'b0; ap_vd[0] <= '0; ap_s1[0] <= '0; ap_s2[0] <= '0;
    end
  end

  logic              ar_re, ar_we;
  logic [ROW_AW-1:0] ar_raddr;
  assign ar_re    = ap_v[1] || ap_v[2];
  assign ar_raddr = ap_v[1] ? ap_s2[1] : ap_s1[2];
  assign ar_we    = ap_v[AP-1];
  assign arith_rdata_o = rdata;

  // ---------------- lanes ----------------
  logic [LANES-1:0] lane_busy, lane_done;

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    logic [NBANK-1:0]               re, we;
    logic [AW-1:0]                  raddr, waddr;
    logic [NBANK-1:0][WORD_W-1:0]   wdata;

    always_comb begin
      re    = ls_re | {NBANK{ar_re}};
      raddr = AW'(ar_re ? ar_raddr : ls_raddr);
      we    = ls_we | {NBANK{ar_we}};
      waddr = AW'(ar_we ? ap_vd[AP-1] : ls_waddr);
      for (int b = 0; b < NBANK; b++) wdata[b] = ar_we ? arith_wdata_i[l][b] : ls_wdata[l];
    end

    vecim_lane #(.NBANK(NBANK), .WORDS(WORDS)) u_lane (
      .clk, .rst_n,
      .cim_valid_i (cim_issue),
      .cim_op_i    (cim_op_of(cim_instr.op)),
      .cim_vd_i    (AW'(cim_instr.vd)),
      .cim_vs1_i   (AW'(cim_instr.vs1)),
      .cim_vs2_i   (AW'(cim_instr.vs2)),
      .cim_busy_o  (lane_busy[l]),
      .cim_done_o  (lane_done[l]),
      .ext_re_i    (re),
      .ext_raddr_i (raddr),
      .ext_rdata_o (rdata[l]),
      .ext_we_i    (we),
      .ext_waddr_i (waddr),
      .ext_wdata_i (wdata)
    );
  end

  assign cim_done_o = &lane_done;

  a_lanes_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
                                     (lane_busy == '0) || (lane_busy == '1))
    else $error("lanes out of lock step");
  a_ls_ar_read: assert property (@(posedge clk) disable iff (!rst_n) !(ar_re && ls_re != '0))
    else $error("ARITH read collides with a store read");
  a_ls_ar_write: assert property (@(posedge clk) disable iff (!rst_n) !(ar_we && ls_we != '0))
    else $error("ARITH write collides with a load write");
  a_vlsu_free: assert property (@(posedge clk) disable iff (!rst_n) mem_issue |-> !vlsu_busy)
    else $error("load/store issued to a busy load-store unit");

endmodule

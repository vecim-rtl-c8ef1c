// vecim_lane: one vector lane of the co-processor, holding NBANK CIM VRF
// banks (8 x 4 kb by default). All banks receive the same CIM operation and
// run it in lock step on their own word of the addressed row, so a lane
// multiplies NBANK x 64 bits per operation. Each bank's free read/write port
// cycles are exposed per bank for the load-store unit and the ARITH units;
// the row address is shared by all banks of a port. Timing is that of
// cim_vrf_bank: asynchronous reads, writes at the clock edge.
module vecim_lane
  import vecim_pkg::*;
#(
  parameter int unsigned NBANK = 8,
  parameter int unsigned WORDS = 64
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              cim_valid_i,
  input  cim_op_e                           cim_op_i,
  input  logic [$clog2(WORDS)-1:0]          cim_vd_i,
  input  logic [$clog2(WORDS)-1:0]          cim_vs1_i,
  input  logic [$clog2(WORDS)-1:0]          cim_vs2_i,
  output logic                              cim_busy_o,
  output logic                              cim_done_o,
  input  logic [NBANK-1:0]                  ext_re_i,
  input  logic [$clog2(WORDS)-1:0]          ext_raddr_i,
  output logic [NBANK-1:0][WORD_W-1:0]      ext_rdata_o,
  input  logic [NBANK-1:0]                  ext_we_i,
  input  logic [$clog2(WORDS)-1:0]          ext_waddr_i,
  input  logic [NBANK-1:0][WORD_W-1:0]      ext_wdata_i
);

  logic [NBANK-1:0] busy, done;

  for (genvar b = 0; b < NBANK; b++) begin : g_bank
    cim_vrf_bank #(.WORDS(WORDS)) u_bank (
      .clk, .rst_n,
      .cim_valid_i (cim_valid_i),
      .cim_op_i    (cim_op_i),
      .cim_vd_i    (cim_vd_i),
      .cim_vs1_i   (cim_vs1_i),
      .cim_vs2_i   (cim_vs2_i),
      .cim_busy_o  (busy[b]),
      .cim_done_o  (done[b]),
      .ext_re_i    (ext_re_i[b]),
      .ext_raddr_i (ext_raddr_i),
      .ext_rdata_o (ext_rdata_o[b]),
      .ext_we_i    (ext_we_i[b]),
      .ext_waddr_i (ext_waddr_i),
      .ext_wdata_i (ext_wdata_i[b])
    );
  end

  assign cim_busy_o = |busy;
  assign cim_done_o = &done;

endmodule

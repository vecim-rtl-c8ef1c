// vlsu: vector load-store unit moving one VRF row between memory and the VRF.
//
// A row is NBANK words of 64 bits in each of LANES lanes. Memory is reached
// through one 64-bit port per lane, so a row takes NBANK beats: in beat b
// (cycle t+1+b after the issue cycle t) every lane transfers the word of bank
// b at memory beat address scalar+b.
//   Load : beat b sends a read request; the data returns MEM_LAT cycles later
//          (mem_rvalid_i) and is written into bank b of every lane that cycle.
//   Store: beat b reads bank b (asynchronous VRF read) and sends the word with
//          a write request in the same cycle.
// The unit is busy for the NBANK beat cycles (a new row may be issued in the
// last beat, so rows stream without a gap); returning load data is tracked
// by a MEM_LAT-deep pipeline so a new row can start while data is returning.
// The 64 bit/lane/cycle bandwidth follows the described design; the beat
// order, the fixed-latency memory interface and the address mapping are this
// implementation's choices.
module vlsu
  import vecim_pkg::*;
#(
  parameter int unsigned LANES   = 4,
  parameter int unsigned NBANK   = 8,
  parameter int unsigned MEM_LAT = 4
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic                                   issue_i,
  input  vinstr_t                                instr_i,
  output logic                                   busy_o,
  // memory port (one 64-bit word per lane per beat)
  output logic                                   mem_req_o,
  output logic                                   mem_we_o,
  output logic [31:0]                            mem_addr_o,
  output logic [LANES-1:0][WORD_W-1:0]           mem_wdata_o,
  input  logic                                   mem_rvalid_i,
  input  logic [LANES-1:0][WORD_W-1:0]           mem_rdata_i,
  // VRF write (loads)
  output logic [NBANK-1:0]                       vrf_we_o,
  output logic [ROW_AW-1:0]                      vrf_waddr_o,
  output logic [LANES-1:0][WORD_W-1:0]           vrf_wdata_o,
  // VRF read (stores)
  output logic [NBANK-1:0]                       vrf_re_o,
  output logic [ROW_AW-1:0]                      vrf_raddr_o,
  input  logic [LANES-1:0][NBANK-1:0][WORD_W-1:0] vrf_rdata_i
);

  localparam int unsigned BW = $clog2(NBANK);

  logic               active, is_load;
  logic [BW-1:0]      beat;
  logic [ROW_AW-1:0]  row;
  logic [31:0]        base;

  // return pipeline: which bank/row the read issued MEM_LAT cycles ago targets
  logic               rp_v   [MEM_LAT];
  logic [BW-1:0]      rp_b   [MEM_LAT];
  logic [ROW_AW-1:0]  rp_row [MEM_LAT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active  <= 1'b0;
      is_load <= 1'b0;
      beat    <= '0;
      row     <= '0;
      base    <= '0;
      for (int i = 0; i < MEM_LAT; i++) begin
        rp_v[i]   <= 1'b0;
        rp_b[i]   <= '0;
        rp_row[i] <= '0;
      end
    end else begin
      if (issue_i && !busy_o) begin
        active  <= 1'b1;
        is_load <= (instr_i.op == V_VLE);
        beat    <= '0;
        row     <= (instr_i.op == V_VLE) ? instr_i.vd : instr_i.vs2;
        base    <= instr_i.scalar;
      end else if (active) begin
        beat <= beat + 1'b1;
        if (beat == BW'(NBANK - 1)) active <= 1'b0;
      end
      rp_v[0]   <= active && is_load;
      rp_b[0]   <= beat;
      rp_row[0] <= row;
      for (int i = 1; i < MEM_LAT; i++) begin
        rp_v[i]   <= rp_v[i-1];
        rp_b[i]   <= rp_b[i-1];
        rp_row[i] <= rp_row[i-1];
      end
    end
  end

  assign busy_o     = active && (beat != BW'(NBANK - 1));   // last beat accepts the next row
  assign mem_req_o  = active;
  assign mem_we_o   = active && !is_load;
  assign mem_addr_o = base + 32'(beat);

  always_comb begin
    vrf_re_o    = '0;
    vrf_raddr_o = row;
    if (active && !is_load) vrf_re_o[beat] = 1'b1;
    for (int l = 0; l < LANES; l++) mem_wdata_o[l] = vrf_rdata_i[l][beat];
  end

  // The last pipeline stage was requested MEM_LAT-1 cycles before it is read
  // here, i.e. MEM_LAT cycles before this cycle's data return.
  always_comb begin
    vrf_we_o    = '0;
    vrf_waddr_o = rp_row[MEM_LAT-1];
    vrf_wdata_o = mem_rdata_i;
    if (rp_v[MEM_LAT-1] && mem_rvalid_i) vrf_we_o[rp_b[MEM_LAT-1]] = 1'b1;
  end

  a_return: assert property (@(posedge clk) disable iff (!rst_n) rp_v[MEM_LAT-1] |-> mem_rvalid_i)
    else $error("load data did not return after MEM_LAT cycles");
  a_issue_idle: assert property (@(posedge clk) disable iff (!rst_n) issue_i |-> !busy_o)
    else $error("load/store issued while the unit is busy");

endmodule

// sync_fifo: synchronous FIFO with valid/ready handshakes on both sides.
// Used as the sequencer's instruction FIFO between the scalar CPU and the
// issue queues. DEPTH entries of type T; a push and a pop may happen in the
// same cycle. in_ready_o is high when not full, out_valid_o when not empty;
// the head is presented combinationally on out_data_o. Reset empties it.
module sync_fifo #(
  parameter type         T     = logic [7:0],
  parameter int unsigned DEPTH = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid_i,
  output logic in_ready_o,
  input  T     in_data_i,
  output logic out_valid_o,
  input  logic out_ready_i,
  output T     out_data_o
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  T                mem [DEPTH];
  logic [PW-1:0]   rp, wp;
  logic [PW:0]     cnt;
  logic            push, pop;

  assign in_ready_o  = (cnt != (PW+1)'(DEPTH));
  assign out_valid_o = (cnt != '0);
  assign push        = in_valid_i && in_ready_o;
  assign pop         = out_valid_o && out_ready_i;
  assign out_data_o  = mem[rp];

  function automatic logic [PW-1:0] inc(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rp  <= '0;
      wp  <= '0;
      cnt <= '0;
    end else begin
      if (push) wp <= inc(wp);
      if (pop)  rp <= inc(rp);
      cnt <= cnt + (PW+1)'(push) - (PW+1)'(pop);
    end
  end

  always_ff @(posedge clk) if (push) mem[wp] <= in_data_i;

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) cnt <= (PW+1)'(DEPTH))
    else $error("FIFO count out of range");

endmodule

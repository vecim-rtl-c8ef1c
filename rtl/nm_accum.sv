// nm_accum: near-memory accumulator that turns the bitline AND results of
// cim_slot_mul into products.
//
// Bitline j of an N-bit ring at rotation r carries B[j] AND A[(j-r) mod N],
// a partial-product bit of weight 2^(j + ((j-r) mod N)). Each cycle the two
// AND vectors of the current rotation pair (2k, 2k+1) are spread to their
// weights (fixed wiring selected by k) and added to the product register; a
// rotation counter inside follows the rings. After N/2 accumulate cycles the
// registers hold the unsigned products:
//   RING_INT8: prod_lo_o[15:0] = A[7:0]*B[7:0], prod_hi_o = A[15:8]*B[15:8]
//   RING_BF16: prod_lo_o[15:0] = {1,A[6:0]}*{1,B[6:0]}
//   RING_FP16: prod_lo_o[19:0] = A[9:0]*B[9:0]
// The described design accumulates two consecutive results per cycle with a
// narrower adder (13 bits) and 16/14-bit registers; this implementation uses
// one full-width adder per product (20 and 16 bits), which gives the same
// products with a simpler bit mapping.
//
// Timing: clear_i zeroes the products and the rotation counter; acc_en_i adds
// the current pair at the clock edge. Outputs are registers.
module nm_accum
  import vecim_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  ring_mode_e        mode_i,
  input  logic              clear_i,
  input  logic              acc_en_i,
  input  logic [SLOT_W-1:0] and0_i,
  input  logic [SLOT_W-1:0] and1_i,
  output logic [19:0]       prod_lo_o,
  output logic [15:0]       prod_hi_o
);

  logic [3:0]  rot;          // rotation of ring 0 in this cycle
  logic [19:0] add_lo;
  logic [15:0] add_hi;

  // Weighted sum of one N-bit AND vector (bits [OFF+N-1:OFF]) at rotation r.
  function automatic logic [19:0] spread(input logic [SLOT_W-1:0] v,
                                         input int unsigned off,
                                         input int unsigned n,
                                         input int unsigned r);
    logic [19:0] s;
    int unsigned w;
    s = '0;
    for (int unsigned j = 0; j < n; j++) begin
      w = j + ((j + n - (r % n)) % n);
      if (v[off+j]) s = s + (20'd1 << w);
    end
    return s;
  endfunction

  always_comb begin
    add_lo = '0;
    add_hi = '0;
    case (mode_i)
      RING_FP16: add_lo = spread(and0_i, 0, 10, int'(rot)) + spread(and1_i, 0, 10, int'(rot) + 1);
      RING_BF16: add_lo = spread(and0_i, 0, 8, int'(rot)) + spread(and1_i, 0, 8, int'(rot) + 1);
      default: begin
        add_lo = spread(and0_i, 0, 8, int'(rot)) + spread(and1_i, 0, 8, int'(rot) + 1);
        add_hi = 16'(spread(and0_i, 8, 8, int'(rot)) + spread(and1_i, 8, 8, int'(rot) + 1));
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rot       <= '0;
      prod_lo_o <= '0;
      prod_hi_o <= '0;
    end else if (clear_i) begin
      rot       <= '0;
      prod_lo_o <= '0;
      prod_hi_o <= '0;
    end else if (acc_en_i) begin
      rot       <= rot + 4'd2;
      prod_lo_o <= prod_lo_o + add_lo;
      prod_hi_o <= prod_hi_o + add_hi;
    end
  end

endmodule

// nm_int_unit: near-memory integer adder of one VRF bank word (64 bits).
//
// It finishes the INT8 operations whose multiplications were done in memory:
//   CIM_VMACC_I8: vd[i] = vd[i] + vs1[i]*vs2[i] for the 8 INT8 elements,
//                 keeping the low 8 bits (RISC-V vmacc at SEW=8).
//   CIM_VDOT_I8 : the 8b x 8b -> 32b extension. The word is two 32-bit
//                 accumulators; vd32[k] = vd32[k] + sum_{i=4k..4k+3} vs1[i]*vs2[i].
// The in-memory multiplier produces unsigned 8x8 products U. Elements are
// signed, so the signed product is formed here as
//   U - 256*(a7*B + b7*A)  (mod 2^16)
// where a7/b7 are the sign bits and A/B the raw bytes. The signed correction is
// this implementation's choice; the document gives only "near memory INT add".
//
// Purely combinational; the bank registers the result.
module nm_int_unit
  import vecim_pkg::*;
(
  input  cim_op_e            op_i,
  input  logic [WORD_W-1:0]  a_i,          // vs2 bytes (copied operand)
  input  logic [WORD_W-1:0]  b_i,          // vs1 bytes (kept operand)
  input  logic [WORD_W-1:0]  c_i,          // op3 (old vd)
  input  logic [7:0][15:0]   uprod_i,      // unsigned products per INT8 element
  output logic [WORD_W-1:0]  res_o
);

  logic [7:0][15:0] sprod;
  logic [31:0]      dsum;

  always_comb begin
    for (int e = 0; e < 8; e++) begin
      sprod[e] = uprod_i[e]
               - ({8'h00, (a_i[8*e+7] ? b_i[8*e +: 8] : 8'h00)} << 8)
               - ({8'h00, (b_i[8*e+7] ? a_i[8*e +: 8] : 8'h00)} << 8);
    end
  end

  always_comb begin
    res_o = '0;
    dsum  = '0;
    if (op_i == CIM_VDOT_I8) begin
      for (int k = 0; k < 2; k++) begin
        dsum = c_i[32*k +: 32];
        for (int e = 4*k; e < 4*k + 4; e++) dsum = dsum + {{16{sprod[e][15]}}, sprod[e]};
        res_o[32*k +: 32] = dsum;
      end
    end else begin
      for (int e = 0; e < 8; e++) res_o[8*e +: 8] = c_i[8*e +: 8] + sprod[e][7:0];
    end
  end

endmodule

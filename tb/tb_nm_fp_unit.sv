// tb_nm_fp_unit: checks the near-memory BF16/FP16 logic against real-number
// arithmetic. The in-memory mantissa product is supplied here (8x8 with
// hidden ones for BF16, 10x10 of the stored bits for FP16); exponents are kept
// within a range where double precision holds a*b+c exactly.
module tb_nm_fp_unit;
  import vecim_pkg::*;
  import tb_fp_ref_pkg::*;

  fp_mode_e mode;
  logic [15:0] a, b, c, res;
  logic [19:0] mp;
  int checks = 0, failures = 0;

  nm_fp_unit dut (.mode_i(mode), .a_i(a), .b_i(b), .c_i(c), .mprod_i(mp), .res_o(res));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 4000; t++) begin
      logic [15:0] exp;
      bit bf;
      real ra, rb, rc;
      mode = fp_mode_e'(t % 4);
      bf = (mode == FP_MAC_BF) || (mode == FP_ADD_BF);
      a = rand_fp(bf, bf ? 12 : 6);
      b = rand_fp(bf, bf ? 12 : 6);
      c = rand_fp(bf, bf ? 12 : 6);
      if (t % 50 == 7) b = {~a[15], a[14:0]};   // exact cancellation in adds
      mp = bf ? 20'({1'b1, a[6:0]} * {1'b1, b[6:0]}) : 20'(a[9:0] * b[9:0]);
      ra = fp_to_real(a, bf); rb = fp_to_real(b, bf); rc = fp_to_real(c, bf);
      case (mode)
        FP_MAC_BF: exp = real_to_fp(ra * rb + rc, 1);
        FP_MUL_HF: exp = real_to_fp(ra * rb, 0);
        default:   exp = real_to_fp(ra + rb, bf);
      endcase
      #1;
      checks++;
      if (res !== exp) begin
        failures++;
        if (failures < 20)
          $display("FAIL mode %0d a %h b %h c %h: got %h exp %h", mode, a, b, c, res, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

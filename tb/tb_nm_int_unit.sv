// tb_nm_int_unit: checks the near-memory INT8 adder. Unsigned byte products
// are supplied as the in-memory multiplier would give them; the expected
// results are computed here with signed integer arithmetic.
module tb_nm_int_unit;
  import vecim_pkg::*;

  cim_op_e op;
  logic [63:0] a, b, c, res;
  logic [7:0][15:0] up;
  int checks = 0, failures = 0;

  nm_int_unit dut (.op_i(op), .a_i(a), .b_i(b), .c_i(c), .uprod_i(up), .res_o(res));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      logic [63:0] exp;
      op = (t % 2) ? CIM_VDOT_I8 : CIM_VMACC_I8;
      a = {$urandom, $urandom}; b = {$urandom, $urandom}; c = {$urandom, $urandom};
      if (t < 4) begin a = {8{8'h80}}; b = {8{8'h80}}; end
      for (int e = 0; e < 8; e++) up[e] = 16'(a[8*e +: 8] * b[8*e +: 8]);
      exp = '0;
      if (op == CIM_VMACC_I8) begin
        for (int e = 0; e < 8; e++)
          exp[8*e +: 8] = 8'(int'($signed(c[8*e +: 8])) +
                             int'($signed(a[8*e +: 8])) * int'($signed(b[8*e +: 8])));
      end else begin
        for (int k = 0; k < 2; k++) begin
          int s;
          s = int'($signed(c[32*k +: 32]));
          for (int e = 4*k; e < 4*k + 4; e++)
            s += int'($signed(a[8*e +: 8])) * int'($signed(b[8*e +: 8]));
          exp[32*k +: 32] = 32'(s);
        end
      end
      #1;
      checks++;
      if (res !== exp) begin
        failures++;
        $display("FAIL op %0d a %h b %h c %h: got %h exp %h", op, a, b, c, res, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

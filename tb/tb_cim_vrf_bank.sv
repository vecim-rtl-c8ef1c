// tb_cim_vrf_bank: end-to-end test of one CIM VRF bank. Before each operation
// the testbench writes fresh operands of the right type through the external
// write port, issues a random CIM operation, checks that it completes in the
// expected number of cycles (8 for MAC ops, 9 for FP16 multiply, 4 for FP
// adds), reads the external port during the multiply cycles (when the bank
// leaves it free) and finally compares the destination word with results
// computed here (signed integers, real-number floating point).
module tb_cim_vrf_bank;
  import vecim_pkg::*;
  import tb_fp_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic cim_valid, cim_busy, cim_done;
  cim_op_e cim_op;
  logic [5:0] vd, vs1, vs2, raddr, waddr;
  logic ext_re, ext_we;
  logic [63:0] rdata, wdata;
  logic [63:0] model [64];
  int checks = 0, failures = 0;
  int nops [7];

  cim_vrf_bank #(.WORDS(64)) dut (
    .clk, .rst_n, .cim_valid_i(cim_valid), .cim_op_i(cim_op), .cim_vd_i(vd),
    .cim_vs1_i(vs1), .cim_vs2_i(vs2), .cim_busy_o(cim_busy), .cim_done_o(cim_done),
    .ext_re_i(ext_re), .ext_raddr_i(raddr), .ext_rdata_o(rdata),
    .ext_we_i(ext_we), .ext_waddr_i(waddr), .ext_wdata_i(wdata));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [63:0] got, input logic [63:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  task automatic wr(input logic [5:0] a, input logic [63:0] d);
    @(negedge clk);
    ext_we = 1; waddr = a; wdata = d;
    @(negedge clk);
    ext_we = 0;
    model[a] = d;
  endtask

  function automatic logic [63:0] rand_word(input cim_op_e op);
    logic [63:0] w;
    w = {$urandom, $urandom};
    if (op == CIM_VFMACC_BF || op == CIM_VFADD_BF)
      for (int s = 0; s < 4; s++) w[16*s +: 16] = rand_fp(1, 12);
    if (op == CIM_VFMUL_HF || op == CIM_VFADD_HF)
      for (int s = 0; s < 4; s++) w[16*s +: 16] = rand_fp(0, 6);
    return w;
  endfunction

  function automatic logic [63:0] ref_result(input cim_op_e op, input logic [63:0] a,
                                             input logic [63:0] b, input logic [63:0] c);
    logic [63:0] r;
    bit bf;
    r = '0;
    bf = (op == CIM_VFMACC_BF || op == CIM_VFADD_BF);
    case (op)
      CIM_VMACC_I8:
        for (int e = 0; e < 8; e++)
          r[8*e +: 8] = 8'(int'($signed(c[8*e +: 8])) +
                           int'($signed(a[8*e +: 8])) * int'($signed(b[8*e +: 8])));
      CIM_VDOT_I8:
        for (int k = 0; k < 2; k++) begin
          int s;
          s = int'($signed(c[32*k +: 32]));
          for (int e = 4*k; e < 4*k + 4; e++)
            s += int'($signed(a[8*e +: 8])) * int'($signed(b[8*e +: 8]));
          r[32*k +: 32] = 32'(s);
        end
      CIM_VFMACC_BF:
        for (int s = 0; s < 4; s++)
          r[16*s +: 16] = real_to_fp(fp_to_real(a[16*s +: 16], 1) * fp_to_real(b[16*s +: 16], 1)
                                     + fp_to_real(c[16*s +: 16], 1), 1);
      CIM_VFMUL_HF:
        for (int s = 0; s < 4; s++)
          r[16*s +: 16] = real_to_fp(fp_to_real(a[16*s +: 16], 0) * fp_to_real(b[16*s +: 16], 0), 0);
      default:
        for (int s = 0; s < 4; s++)
          r[16*s +: 16] = real_to_fp(fp_to_real(a[16*s +: 16], bf) + fp_to_real(b[16*s +: 16], bf), bf);
    endcase
    return r;
  endfunction

  initial begin
    cim_valid = 0; cim_op = CIM_NONE; vd = 0; vs1 = 0; vs2 = 0;
    ext_re = 0; ext_we = 0; raddr = 0; waddr = 0; wdata = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < 64; a++) wr(6'(a), {$urandom, $urandom});
    for (int t = 0; t < 240; t++) begin
      cim_op_e op;
      logic [63:0] exp;
      int lat, steps;
      logic [5:0] pr;
      op = cim_op_e'(1 + (t % 6));
      vs1 = 6'($urandom); vs2 = 6'($urandom); vd = 6'($urandom);
      if (t % 10 == 3) vd = vs1;
      wr(vs2, rand_word(op));
      wr(vs1, rand_word(op));
      if (vd != vs1 && vd != vs2) wr(vd, rand_word(op));
      exp = ref_result(op, model[vs2], model[vs1], model[vd]);
      steps = int'(cim_steps(op));
      @(negedge clk);
      cim_op = op; cim_valid = 1;
      @(negedge clk);
      cim_valid = 0;
      lat = 1;
      while (!cim_done) begin
        // port is free to others during the multiply cycles (steps 2..5)
        if (lat == 4 && op != CIM_VFADD_BF && op != CIM_VFADD_HF) begin
          pr = 6'($urandom);
          ext_re = 1; raddr = pr;
          #1 check(rdata, model[pr], "external read during multiply");
        end else ext_re = 0;
        @(negedge clk);
        ext_re = 0;
        lat++;
        if (lat > 20) break;
      end
      checks++;
      if (lat != steps) begin
        failures++;
        $display("FAIL latency op %0d: %0d cycles, expected %0d", op, lat, steps);
      end
      @(negedge clk);
      model[vd] = exp;
      ext_re = 1; raddr = vd;
      #1 check(rdata, exp, $sformatf("op %0d result", op));
      nops[op]++;
      ext_re = 0;
    end
    $display("ops per type: vmacc %0d vdot %0d bf16mac %0d fp16mul %0d bf16add %0d fp16add %0d",
             nops[1], nops[2], nops[3], nops[4], nops[5], nops[6]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_cim_slot_mul: checks the CIM-bit ring multiplier of one slot. For random
// operands in each ring configuration it loads A and B, then for every
// double-rate cycle k compares both bitline AND vectors with the partial
// products B[j] & A[(j-r) mod N] for r = 2k and 2k+1, computed here from the
// operands, and checks that the ring is back at A after N/2 cycles.
module tb_cim_slot_mul;
  import vecim_pkg::*;

  logic clk = 0, rst_n = 0;
  ring_mode_e mode;
  logic copy, keep, shift;
  logic [15:0] a, b, and0, and1, ao, bo;
  int checks = 0, failures = 0;

  cim_slot_mul dut (.clk, .rst_n, .mode_i(mode), .copy_i(copy), .keep_i(keep),
                    .shift_i(shift), .a_i(a), .b_i(b), .and0_o(and0), .and1_o(and1),
                    .a_o(ao), .b_o(bo));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected AND vector for operands in the given mode at rotation r
  function automatic logic [15:0] exp_and(input logic [15:0] av, input logic [15:0] bv,
                                          input ring_mode_e m, input int r);
    logic [15:0] e, va, vb;
    int n;
    e = '0;
    va = av; vb = bv;
    if (m == RING_BF16) begin va = {8'h0, 1'b1, av[6:0]}; vb = {8'h0, 1'b1, bv[6:0]}; end
    if (m == RING_FP16) begin va = {6'h0, av[9:0]}; vb = {6'h0, bv[9:0]}; end
    n = (m == RING_FP16) ? 10 : 8;
    for (int j = 0; j < n; j++) e[j] = vb[j] & va[(j - r + 2*n) % n];
    if (m == RING_INT8)
      for (int j = 0; j < 8; j++) e[8+j] = vb[8+j] & va[8 + (j - r + 16) % 8];
    return e;
  endfunction

  task automatic check(input logic [15:0] got, input logic [15:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h (mode %0d a %h b %h)", what, got, exp, mode, a, b);
    end
  endtask

  initial begin
    copy = 0; keep = 0; shift = 0; mode = RING_INT8; a = 0; b = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      logic [15:0] av, bv;
      int n;
      mode = ring_mode_e'(t % 3);
      n = (mode == RING_FP16) ? 10 : 8;
      av = 16'($urandom); bv = 16'($urandom);
      @(negedge clk); a = av; copy = 1;
      @(negedge clk); copy = 0; b = bv; keep = 1;
      @(negedge clk); keep = 0; a = 16'($urandom); b = 16'($urandom);
      for (int k = 0; k < n / 2; k++) begin
        shift = 1;
        #1;
        check(and0, exp_and(av, bv, mode, 2*k), "and0");
        check(and1, exp_and(av, bv, mode, 2*k + 1), "and1");
        @(negedge clk);
      end
      shift = 0;
      #1;
      check(and0, exp_and(av, bv, mode, 0), "ring restored");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

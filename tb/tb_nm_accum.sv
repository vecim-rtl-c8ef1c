// tb_nm_accum: feeds the near-memory accumulator with bitline AND vectors
// formed here from random operands (as the CIM rings would present them) and
// checks the finished products against A*B after N/2 accumulate cycles.
module tb_nm_accum;
  import vecim_pkg::*;

  logic clk = 0, rst_n = 0;
  ring_mode_e mode;
  logic clear, acc_en;
  logic [15:0] and0, and1, phi;
  logic [19:0] plo;
  int checks = 0, failures = 0;

  nm_accum dut (.clk, .rst_n, .mode_i(mode), .clear_i(clear), .acc_en_i(acc_en),
                .and0_i(and0), .and1_i(and1), .prod_lo_o(plo), .prod_hi_o(phi));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] andvec(input logic [15:0] va, input logic [15:0] vb,
                                         input int n, input int r, input bit two);
    logic [15:0] e;
    e = '0;
    for (int j = 0; j < n; j++) e[j] = vb[j] & va[(j - r + 2*n) % n];
    if (two) for (int j = 0; j < 8; j++) e[8+j] = vb[8+j] & va[8 + (j - r + 16) % 8];
    return e;
  endfunction

  task automatic check(input logic [19:0] got, input logic [19:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    clear = 0; acc_en = 0; and0 = 0; and1 = 0; mode = RING_INT8;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      logic [15:0] va, vb;
      int n;
      mode = ring_mode_e'(t % 3);
      va = 16'($urandom); vb = 16'($urandom);
      if (t < 3) begin va = 16'hFFFF; vb = 16'hFFFF; end
      if (mode == RING_BF16) begin va = {8'h0, 1'b1, va[6:0]}; vb = {8'h0, 1'b1, vb[6:0]}; end
      if (mode == RING_FP16) begin va = {6'h0, va[9:0]}; vb = {6'h0, vb[9:0]}; end
      n = (mode == RING_FP16) ? 10 : 8;
      @(negedge clk); clear = 1;
      @(negedge clk); clear = 0;
      for (int k = 0; k < n / 2; k++) begin
        acc_en = 1;
        and0 = andvec(va, vb, n, 2*k, mode == RING_INT8);
        and1 = andvec(va, vb, n, 2*k + 1, mode == RING_INT8);
        @(negedge clk);
      end
      acc_en = 0; and0 = '0; and1 = '0;
      if (mode == RING_INT8) begin
        check(plo, 20'(va[7:0] * vb[7:0]), "int8 lo");
        check({4'h0, phi}, 20'(va[15:8] * vb[15:8]), "int8 hi");
      end else begin
        check(plo, 20'(va * vb), mode == RING_FP16 ? "fp16 10x10" : "bf16 8x8");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

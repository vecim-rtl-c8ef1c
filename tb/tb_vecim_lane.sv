// tb_vecim_lane: one lane of 8 CIM banks. Rows are filled through the
// per-bank external write ports with operands suited to each operation, a
// CIM operation is broadcast, and every bank's destination word is compared
// with the reference result; the lane's done flag must come after the
// operation's step count, with all banks in lock step. During the multiply
// cycles a different row is written through the free write port and must not
// disturb the operation.
module tb_vecim_lane;
  import vecim_pkg::*;
  import tb_fp_ref_pkg::*;

  localparam int NBANK = 8;

  logic clk = 0, rst_n = 0;
  logic cim_valid, busy, done;
  cim_op_e op;
  logic [5:0] vd, vs1, vs2, raddr, waddr;
  logic [NBANK-1:0] re, we;
  logic [NBANK-1:0][63:0] rdata, wdata;
  logic [63:0] model [NBANK][64];
  int checks = 0, failures = 0;

  vecim_lane #(.NBANK(NBANK), .WORDS(64)) dut (
    .clk, .rst_n, .cim_valid_i(cim_valid), .cim_op_i(op), .cim_vd_i(vd), .cim_vs1_i(vs1),
    .cim_vs2_i(vs2), .cim_busy_o(busy), .cim_done_o(done),
    .ext_re_i(re), .ext_raddr_i(raddr), .ext_rdata_o(rdata),
    .ext_we_i(we), .ext_waddr_i(waddr), .ext_wdata_i(wdata));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  task automatic wr_row(input logic [5:0] r, input cim_op_e o);
    @(negedge clk);
    we = '1; waddr = r;
    for (int b = 0; b < NBANK; b++) begin
      wdata[b] = rand_word(o);
      model[b][r] = wdata[b];
    end
    @(negedge clk);
    we = '0;
  endtask

  initial begin
    cim_valid = 0; op = CIM_NONE; vd = 0; vs1 = 0; vs2 = 0; re = 0; we = 0;
    raddr = 0; waddr = 0; wdata = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      logic [63:0] exp [NBANK];
      int lat;
      logic [5:0] other;
      op = cim_op_e'(1 + (t % 6));
      vs1 = 6'($urandom); vs2 = 6'($urandom); vd = 6'($urandom);
      wr_row(vs2, op); wr_row(vs1, op);
      if (vd != vs1 && vd != vs2) wr_row(vd, op);
      for (int b = 0; b < NBANK; b++) exp[b] = cim_ref_word(op, model[b][vs2], model[b][vs1], model[b][vd]);
      other = vd ^ 6'h20;
      if (other == vs1 || other == vs2) other = 6'h3F ^ vd;
      @(negedge clk); cim_valid = 1;
      @(negedge clk); cim_valid = 0;
      lat = 1;
      while (!done && lat < 20) begin
        if (lat == 3 && other != vs1 && other != vs2 && other != vd) begin
          we = '1; waddr = other;
          for (int b = 0; b < NBANK; b++) begin wdata[b] = {$urandom, $urandom}; model[b][other] = wdata[b]; end
        end else we = '0;
        @(negedge clk);
        lat++;
      end
      we = '0;
      check(lat == int'(cim_steps(op)), $sformatf("op %0d done after %0d cycles", op, lat));
      @(negedge clk);
      check(!busy, "idle after write-back");
      re = '1; raddr = vd;
      #1;
      for (int b = 0; b < NBANK; b++) begin
        check(rdata[b] == exp[b], $sformatf("op %0d bank %0d: %h vs %h", op, b, rdata[b], exp[b]));
        model[b][vd] = exp[b];
      end
      if (other != vs1 && other != vs2 && other != vd) begin
        raddr = other;
        #1;
        for (int b = 0; b < NBANK; b++) check(rdata[b] == model[b][other], "write during multiply kept");
      end
      re = '0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_vlsu: the load-store unit between a fixed-latency memory model and a
// VRF model, both in this testbench. Random rows are loaded and stored;
// afterwards the VRF rows must equal the memory words they were loaded from
// and the memory must hold the stored rows. Also checked: the unit refuses a
// new row for exactly NBANK-1 cycles after an issue (it accepts the next row
// in its last beat) and a load's last VRF write lands
// MEM_LAT + NBANK cycles after its issue.
module tb_vlsu;
  import vecim_pkg::*;

  localparam int LANES = 4, NBANK = 8, MEM_LAT = 4, MWORDS = 256;

  logic clk = 0, rst_n = 0;
  logic issue, busy, mem_req, mem_we, mem_rvalid;
  vinstr_t instr;
  logic [31:0] mem_addr;
  logic [LANES-1:0][63:0] mem_wdata, mem_rdata, vrf_wdata;
  logic [NBANK-1:0] vrf_we, vrf_re;
  logic [5:0] vrf_waddr, vrf_raddr;
  logic [LANES-1:0][NBANK-1:0][63:0] vrf_rdata;
  int checks = 0, failures = 0, cyc = 0, last_we_cyc = 0;

  logic [63:0] mem [LANES][MWORDS];
  logic [63:0] vrf [LANES][NBANK][64];
  logic        rv_pipe [MEM_LAT];
  logic [31:0] ra_pipe [MEM_LAT];

  vlsu #(.LANES(LANES), .NBANK(NBANK), .MEM_LAT(MEM_LAT)) dut (
    .clk, .rst_n, .issue_i(issue), .instr_i(instr), .busy_o(busy),
    .mem_req_o(mem_req), .mem_we_o(mem_we), .mem_addr_o(mem_addr), .mem_wdata_o(mem_wdata),
    .mem_rvalid_i(mem_rvalid), .mem_rdata_i(mem_rdata),
    .vrf_we_o(vrf_we), .vrf_waddr_o(vrf_waddr), .vrf_wdata_o(vrf_wdata),
    .vrf_re_o(vrf_re), .vrf_raddr_o(vrf_raddr), .vrf_rdata_i(vrf_rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // memory: read data returns MEM_LAT cycles after the request
  always_comb begin
    mem_rvalid = rv_pipe[MEM_LAT-1];
    for (int l = 0; l < LANES; l++) mem_rdata[l] = mem[l][ra_pipe[MEM_LAT-1] % MWORDS];
    for (int l = 0; l < LANES; l++)
      for (int b = 0; b < NBANK; b++) vrf_rdata[l][b] = vrf[l][b][vrf_raddr];
  end

  always @(posedge clk) begin
    cyc++;
    rv_pipe[0] <= mem_req && !mem_we;
    ra_pipe[0] <= mem_addr;
    for (int i = 1; i < MEM_LAT; i++) begin rv_pipe[i] <= rv_pipe[i-1]; ra_pipe[i] <= ra_pipe[i-1]; end
    if (mem_req && mem_we) for (int l = 0; l < LANES; l++) mem[l][mem_addr % MWORDS] <= mem_wdata[l];
    for (int b = 0; b < NBANK; b++) if (vrf_we[b]) begin
      for (int l = 0; l < LANES; l++) vrf[l][b][vrf_waddr] <= vrf_wdata[l];
      last_we_cyc = cyc;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  task automatic do_op(input vop_e op, input int row, input int addr);
    int t0, nb;
    @(negedge clk);
    instr = '0; instr.op = op; instr.vd = 6'(row); instr.vs2 = 6'(row); instr.scalar = 32'(addr);
    issue = 1;
    @(negedge clk);
    issue = 0;
    t0 = cyc;
    nb = 0;
    while (busy) begin nb++; @(negedge clk); end
    check(nb == NBANK - 1, $sformatf("busy for %0d cycles", nb));
    repeat (MEM_LAT + 2) @(negedge clk);
    if (op == V_VLE)
      check(last_we_cyc - t0 == MEM_LAT + NBANK,
            $sformatf("last load write %0d cycles after the beat start", last_we_cyc - t0));
  endtask

  initial begin
    issue = 0; instr = '0;
    for (int i = 0; i < MEM_LAT; i++) begin rv_pipe[i] = 0; ra_pipe[i] = 0; end
    for (int l = 0; l < LANES; l++) begin
      for (int a = 0; a < MWORDS; a++) mem[l][a] = {$urandom, $urandom};
      for (int b = 0; b < NBANK; b++) for (int r = 0; r < 64; r++) vrf[l][b][r] = '0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // load 16 rows from addresses 8*r, then check
    for (int r = 0; r < 16; r++) do_op(V_VLE, r, 8 * r);
    for (int r = 0; r < 16; r++)
      for (int l = 0; l < LANES; l++)
        for (int b = 0; b < NBANK; b++)
          check(vrf[l][b][r] == mem[l][8*r + b], $sformatf("load row %0d lane %0d bank %0d", r, l, b));
    // modify the VRF, store rows 0..15 to addresses 128+8*r, check
    for (int l = 0; l < LANES; l++)
      for (int b = 0; b < NBANK; b++) for (int r = 0; r < 16; r++) vrf[l][b][r] = {$urandom, $urandom};
    for (int r = 0; r < 16; r++) do_op(V_VSE, r, 128 + 8 * r);
    for (int r = 0; r < 16; r++)
      for (int l = 0; l < LANES; l++)
        for (int b = 0; b < NBANK; b++)
          check(mem[l][128 + 8*r + b] == vrf[l][b][r], $sformatf("store row %0d lane %0d bank %0d", r, l, b));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

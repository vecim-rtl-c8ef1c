// tb_vecim_top: end-to-end test of the vector co-processor at its default
// size (4 lanes x 8 banks x 64 words, no parameter overrides).
//
// The testbench plays the scalar CPU, the memory and the lane ALU/FPU:
//   - memory answers each read request exactly MEM_LAT cycles later and
//     performs writes at once; it is split into regions holding BF16, FP16 and
//     integer data and a region that receives stores,
//   - the ALU model answers an ARITH instruction by sampling arith_rdata_o one
//     and two cycles after issue (vs2, vs1) and driving vd = vs2 + vs1 (per
//     64-bit word, fn=0) or vs2 ^ vs1 (fn=1) in cycle issue+2+ARITH_LAT.
// A random program of loads, all six CIM operations, ARITH instructions and
// stores over 16 rows, followed by a run of back-to-back MACs, is sent; operand types are tracked so that
// floating-point operations only see well-scaled numbers. At the end every row
// is stored, and the memory is compared word by word with an in-order
// reference model, which shows that out-of-order issue kept program order for
// every register and memory word. Every instruction must be acknowledged
// once. Mechanism counters (port stalls, dependency stalls, out-of-order
// issue, multi-issue, back-to-back CIM operations, each operation type,
// acknowledges) must all be non-zero, otherwise a failure is counted.
module tb_vecim_top;
  import vecim_pkg::*;
  import tb_fp_ref_pkg::*;

  localparam int LANES = 4, NBANK = 8, MEM_LAT = 4, ARITH_LAT = 2;
  localparam int MWORDS = 1024;             // memory beats (LANES x 64 bits each)
  localparam int NROW = 16, NPROG = 600;

  typedef enum {T_INT, T_BF, T_BFACC, T_HF, T_OTHER} rtype_e;

  logic clk = 0, rst_n = 0;
  logic instr_valid, instr_ready;
  vinstr_t instr;
  logic [NQ-1:0] ack_valid;
  logic [NQ-1:0][ID_W-1:0] ack_id;
  logic mem_req, mem_we, mem_rvalid;
  logic [31:0] mem_addr;
  logic [LANES-1:0][63:0] mem_wdata, mem_rdata;
  logic arith_issue, arith_ready;
  vinstr_t arith_instr;
  logic [LANES-1:0][NBANK-1:0][63:0] arith_rdata, arith_wdata;
  logic ev_port, ev_dep, ev_ooo, ev_multi, cim_done;

  vecim_top dut (
    .clk, .rst_n,
    .instr_valid_i(instr_valid), .instr_ready_o(instr_ready), .instr_i(instr),
    .ack_valid_o(ack_valid), .ack_id_o(ack_id),
    .mem_req_o(mem_req), .mem_we_o(mem_we), .mem_addr_o(mem_addr), .mem_wdata_o(mem_wdata),
    .mem_rvalid_i(mem_rvalid), .mem_rdata_i(mem_rdata),
    .arith_issue_o(arith_issue), .arith_instr_o(arith_instr), .arith_ready_i(arith_ready),
    .arith_rdata_o(arith_rdata), .arith_wdata_i(arith_wdata),
    .ev_port_stall_o(ev_port), .ev_dep_stall_o(ev_dep), .ev_ooo_o(ev_ooo), .ev_multi_o(ev_multi),
    .cim_done_o(cim_done));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- memory ----------------
  logic [63:0] mem [LANES][MWORDS];
  logic        rv_pipe [MEM_LAT];
  logic [31:0] ra_pipe [MEM_LAT];

  always_comb begin
    mem_rvalid = rv_pipe[MEM_LAT-1];
    for (int l = 0; l < LANES; l++) mem_rdata[l] = mem[l][ra_pipe[MEM_LAT-1] % MWORDS];
  end

  always @(posedge clk) begin
    for (int i = MEM_LAT - 1; i > 0; i--) begin rv_pipe[i] <= rv_pipe[i-1]; ra_pipe[i] <= ra_pipe[i-1]; end
    rv_pipe[0] <= mem_req && !mem_we;
    ra_pipe[0] <= mem_addr;
    if (mem_req && mem_we) for (int l = 0; l < LANES; l++) mem[l][mem_addr % MWORDS] <= mem_wdata[l];
  end

  // ---------------- lane ALU model ----------------
  typedef struct {
    int age;
    logic [3:0] fn;
    logic [LANES-1:0][NBANK-1:0][63:0] a, b;
  } aop_t;
  aop_t aq [$];

  always @(posedge clk) begin
    aop_t n;
    for (int i = 0; i < aq.size(); i++) begin
      aq[i].age++;
      if (aq[i].age == 1) aq[i].a = arith_rdata;
      if (aq[i].age == 2) aq[i].b = arith_rdata;
      if (aq[i].age == 1 + ARITH_LAT)
        for (int l = 0; l < LANES; l++)
          for (int b = 0; b < NBANK; b++)
            arith_wdata[l][b] <= (aq[i].fn == 0) ? aq[i].a[l][b] + aq[i].b[l][b]
                                                 : aq[i].a[l][b] ^ aq[i].b[l][b];
    end
    while (aq.size() > 0 && aq[0].age >= 2 + ARITH_LAT) void'(aq.pop_front());
    if (arith_issue) begin
      n.age = 0; n.fn = arith_instr.fn; n.a = '0; n.b = '0;
      aq.push_back(n);
    end
    arith_ready <= ($urandom % 10) != 0;
  end

  // ---------------- reference model ----------------
  logic [63:0] rvrf [LANES][NBANK][64];
  logic [63:0] rmem [LANES][MWORDS];

  task automatic ref_exec(input vinstr_t x);
    logic [63:0] nv [LANES][NBANK];
    for (int l = 0; l < LANES; l++)
      for (int b = 0; b < NBANK; b++) begin
        case (x.op)
          V_VLE:   nv[l][b] = rmem[l][(x.scalar + b) % MWORDS];
          V_VSE:   rmem[l][(x.scalar + b) % MWORDS] = rvrf[l][b][x.vs2];
          V_ARITH: nv[l][b] = (x.fn == 0) ? rvrf[l][b][x.vs2] + rvrf[l][b][x.vs1]
                                          : rvrf[l][b][x.vs2] ^ rvrf[l][b][x.vs1];
          default: nv[l][b] = cim_ref_word(cim_op_of(x.op), rvrf[l][b][x.vs2],
                                           rvrf[l][b][x.vs1], rvrf[l][b][x.vd]);
        endcase
      end
    if (x.op != V_VSE)
      for (int l = 0; l < LANES; l++)
        for (int b = 0; b < NBANK; b++) rvrf[l][b][x.vd] = nv[l][b];
  endtask

  // ---------------- program ----------------
  vinstr_t prog [$];
  rtype_e  rt [NROW];

  // memory regions (beat addresses): 0-255 BF16, 256-511 FP16, 512-767 integer,
  // 768-1023 store target
  function automatic int pick_row(input rtype_e t1, input rtype_e t2, input bit any);
    int r, tries;
    for (tries = 0; tries < 200; tries++) begin
      r = $urandom % NROW;
      if (any || rt[r] == t1 || rt[r] == t2) return r;
    end
    return -1;
  endfunction

  function automatic void gen_program();
    vinstr_t x;
    int k, s1, s2, d;
    for (int r = 0; r < NROW; r++) rt[r] = T_OTHER;
    // load every row first
    for (int r = 0; r < NROW; r++) begin
      x = '0; x.op = V_VLE; x.vd = ROW_AW'(r);
      k = r % 3;
      x.scalar = 32'(256 * k + 8 * ($urandom % 32));
      rt[r] = (k == 0) ? T_BF : (k == 1) ? T_HF : T_INT;
      prog.push_back(x);
    end
    while (prog.size() < NPROG) begin
      x = '0;
      k = $urandom % 12;
      d = $urandom % NROW;
      x.vd = ROW_AW'(d);
      case (k)
        0, 1: begin
          x.op = V_VLE;
          k = $urandom % 3;
          x.scalar = 32'(256 * k + 8 * ($urandom % 32));
          rt[d] = (k == 0) ? T_BF : (k == 1) ? T_HF : T_INT;
        end
        2: begin
          x.op = V_VSE; x.vs2 = ROW_AW'($urandom % NROW);
          x.scalar = 32'(768 + 8 * ($urandom % 32));
        end
        3, 4: begin
          x.op = (($urandom % 2) == 1) ? V_VMACC_I8 : V_VDOT_I8;
          x.vs1 = ROW_AW'($urandom % NROW); x.vs2 = ROW_AW'($urandom % NROW);
          rt[d] = T_INT;
        end
        5, 6: begin
          s1 = pick_row(T_BF, T_BF, 0); s2 = pick_row(T_BF, T_BF, 0);
          d  = pick_row(T_BF, T_BFACC, 0);
          if (s1 < 0 || s2 < 0 || d < 0 || d == s1 || d == s2) continue;
          x.op = V_VFMACC_BF; x.vs1 = ROW_AW'(s1); x.vs2 = ROW_AW'(s2); x.vd = ROW_AW'(d);
          rt[d] = T_BFACC;
        end
        7: begin
          s1 = pick_row(T_BF, T_BF, 0); s2 = pick_row(T_BF, T_BF, 0);
          if (s1 < 0 || s2 < 0 || d == s1 || d == s2) continue;
          x.op = V_VFADD_BF; x.vs1 = ROW_AW'(s1); x.vs2 = ROW_AW'(s2);
          rt[d] = T_BFACC;
        end
        8, 9: begin
          s1 = pick_row(T_HF, T_HF, 0); s2 = pick_row(T_HF, T_HF, 0);
          if (s1 < 0 || s2 < 0 || d == s1 || d == s2) continue;
          x.op = (k == 8) ? V_VFMUL_HF : V_VFADD_HF; x.vs1 = ROW_AW'(s1); x.vs2 = ROW_AW'(s2);
          rt[d] = T_OTHER;
        end
        default: begin
          x.op = V_ARITH; x.fn = 4'($urandom % 2);
          x.vs1 = ROW_AW'($urandom % NROW); x.vs2 = ROW_AW'($urandom % NROW);
          rt[d] = T_OTHER;
        end
      endcase
      prog.push_back(x);
    end
    // a run of back-to-back MACs on freshly loaded rows
    for (int i = 0; i < 6; i++) begin
      x = '0; x.op = V_VLE; x.vd = ROW_AW'(20 + i); x.scalar = 32'(512 + 8 * i);
      prog.push_back(x);
    end
    for (int i = 0; i < 6; i++) begin
      x = '0; x.op = V_VMACC_I8; x.vd = ROW_AW'(20 + i); x.vs1 = 1; x.vs2 = 2;
      prog.push_back(x);
    end
    // finally store every row
    for (int r = 0; r < 26; r++) begin
      if (r >= NROW && r < 20) continue;      // rows never written
      x = '0; x.op = V_VSE; x.vs2 = ROW_AW'(r); x.scalar = 32'(768 + 8 * r);
      prog.push_back(x);
    end
    for (int i = 0; i < prog.size(); i++) prog[i].id = ID_W'(i);
  endfunction

  // ---------------- monitors ----------------
  int n_ack = 0, n_port = 0, n_dep = 0, n_ooo = 0, n_multi = 0, n_done = 0, n_b2b = 0;
  int n_op [9];
  int n_ld_beats = 0, n_st_beats = 0, last_cim = -100, cyc = 0;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    for (int q = 0; q < NQ; q++) if (ack_valid[q]) n_ack++;
    if (ev_port)  n_port++;
    if (ev_dep)   n_dep++;
    if (ev_ooo)   n_ooo++;
    if (ev_multi) n_multi++;
    if (cim_done) n_done++;
    if (mem_req && !mem_we) n_ld_beats++;
    if (mem_req && mem_we)  n_st_beats++;
    if (dut.cim_issue) begin
      if (cyc - last_cim == int'(cim_steps(cim_op_of(dut.cim_instr.op)))) n_b2b++;
      last_cim = cyc;
      n_op[dut.cim_instr.op]++;
    end
    if (dut.mem_issue) n_op[dut.mem_instr.op]++;
    if (arith_issue)   n_op[V_ARITH]++;
  end

  // ---------------- stimulus and checks ----------------
  initial begin
    instr_valid = 0; instr = '0; arith_wdata = '0; arith_ready = 1;
    for (int i = 0; i < MEM_LAT; i++) begin rv_pipe[i] = 0; ra_pipe[i] = 0; end
    for (int l = 0; l < LANES; l++)
      for (int a = 0; a < MWORDS; a++) begin
        logic [63:0] w;
        w = (a < 256) ? rand_word(CIM_VFADD_BF) : (a < 512) ? rand_word(CIM_VFADD_HF)
                                                             : {$urandom, $urandom};
        mem[l][a] = w; rmem[l][a] = w;
      end
    for (int l = 0; l < LANES; l++)
      for (int b = 0; b < NBANK; b++)
        for (int r = 0; r < 64; r++) rvrf[l][b][r] = 'x;
    gen_program();
    foreach (prog[i]) ref_exec(prog[i]);
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    foreach (prog[i]) begin
      instr_valid = 1; instr = prog[i];
      @(posedge clk);
      while (!instr_ready) @(posedge clk);
      @(negedge clk);
    end
    instr_valid = 0;
    repeat (200) @(posedge clk);
    check(n_ack == prog.size(), $sformatf("acknowledges %0d of %0d", n_ack, prog.size()));
    for (int l = 0; l < LANES; l++)
      for (int a = 768; a < MWORDS; a++)
        check(mem[l][a] === rmem[l][a],
              $sformatf("memory lane %0d beat %0d: %h expected %h", l, a, mem[l][a], rmem[l][a]));
    $display("mechanisms: port_stall=%0d dep_stall=%0d ooo=%0d multi=%0d cim_done=%0d b2b_cim=%0d",
             n_port, n_dep, n_ooo, n_multi, n_done, n_b2b);
    $display("issued: vle=%0d vse=%0d vmacc=%0d vdot=%0d vfmacc_bf=%0d vfmul_hf=%0d vfadd_bf=%0d vfadd_hf=%0d arith=%0d",
             n_op[V_VLE], n_op[V_VSE], n_op[V_VMACC_I8], n_op[V_VDOT_I8], n_op[V_VFMACC_BF],
             n_op[V_VFMUL_HF], n_op[V_VFADD_BF], n_op[V_VFADD_HF], n_op[V_ARITH]);
    $display("memory beats: load=%0d store=%0d, %0d cycles for %0d instructions",
             n_ld_beats, n_st_beats, cyc, prog.size());
    check(n_port > 0, "port stall never seen");
    check(n_dep > 0, "dependency stall never seen");
    check(n_ooo > 0, "out-of-order issue never seen");
    check(n_multi > 0, "multi-issue never seen");
    check(n_b2b > 0, "back-to-back CIM operations never seen");
    for (int o = 0; o < 9; o++) check(n_op[o] > 0, $sformatf("operation %0d never issued", o));
    check(n_ld_beats == NBANK * n_op[V_VLE], "load beats");
    check(n_st_beats == NBANK * n_op[V_VSE], "store beats");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_vec_sequencer: drives the sequencer with instruction streams and checks
// the issue order it produces against the port-use rules of the design,
// computed here from each instruction's issue cycle:
//   - no two uses of the same bank read port or write port in one cycle,
//   - for every pair of instructions touching the same row where one writes,
//     the older one's access comes first (no RAW, WAR or WAW violation),
//   - one CIM operation at a time, load/store rows NBANK cycles apart,
//   - acknowledges carry the ids in issue order.
// A directed case (vmacc, then a load, then an ARITH instruction, all
// independent) checks exact issue cycles: the load waits for the CIM
// write-back's write port and the ARITH instruction overtakes it. Every
// mechanism (port stall, dependency stall, out-of-order issue, multi-issue)
// must occur at least once.
module tb_vec_sequencer;
  import vecim_pkg::*;

  localparam int NBANK = 8, MEM_LAT = 4, ARITH_LAT = 2;

  logic clk = 0, rst_n = 0;
  logic instr_valid, instr_ready, arith_ready;
  vinstr_t instr;
  logic [NQ-1:0] ack_valid;
  logic [NQ-1:0][ID_W-1:0] ack_id;
  logic cim_issue, mem_issue, arith_issue;
  vinstr_t cim_instr, mem_instr, arith_instr;
  logic ev_port, ev_dep, ev_ooo, ev_multi;
  int checks = 0, failures = 0;
  int cyc = 0;
  int n_port = 0, n_dep = 0, n_ooo = 0, n_multi = 0;

  vec_sequencer #(.NBANK(NBANK), .MEM_LAT(MEM_LAT), .ARITH_LAT(ARITH_LAT)) dut (
    .clk, .rst_n, .instr_valid_i(instr_valid), .instr_ready_o(instr_ready), .instr_i(instr),
    .ack_valid_o(ack_valid), .ack_id_o(ack_id),
    .cim_issue_o(cim_issue), .cim_instr_o(cim_instr),
    .mem_issue_o(mem_issue), .mem_instr_o(mem_instr),
    .arith_issue_o(arith_issue), .arith_instr_o(arith_instr), .arith_ready_i(arith_ready),
    .ev_port_stall_o(ev_port), .ev_dep_stall_o(ev_dep), .ev_ooo_o(ev_ooo), .ev_multi_o(ev_multi));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // program and issue record
  vinstr_t prog [$];
  int      issue_cyc [$];
  int      qlist [3][$];      // program indices per class, in order
  int      n_issued = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (ev_port)  n_port++;
    if (ev_dep)   n_dep++;
    if (ev_ooo)   n_ooo++;
    if (ev_multi) n_multi++;
    for (int q = 0; q < 3; q++) begin
      logic iss;
      vinstr_t ins;
      iss = (q == 0) ? mem_issue : (q == 1) ? cim_issue : arith_issue;
      ins = (q == 0) ? mem_instr : (q == 1) ? cim_instr : arith_instr;
      check(ack_valid[q] == iss, "ack with issue");
      if (iss) begin
        int idx;
        idx = qlist[q].pop_front();
        issue_cyc[idx] = cyc - 1;
        n_issued++;
        check(ins == prog[idx], "issued instruction matches program order in its queue");
        check(ack_id[q] == ID_W'(idx), "ack id");
      end
    end
  end

  task automatic send(input vinstr_t ins);
    ins.id = ID_W'(prog.size());
    prog.push_back(ins);
    issue_cyc.push_back(-1);
    qlist[int'(qclass_of(ins.op))].push_back(prog.size() - 1);
    // entered at a falling edge; leaves at the next falling edge after acceptance
    instr_valid = 1; instr = ins;
    @(posedge clk);
    while (!instr_ready) @(posedge clk);
    @(negedge clk);
    instr_valid = 0;
  endtask

  function automatic vinstr_t mk(input vop_e op, input int vd, input int vs1, input int vs2);
    vinstr_t i;
    i = '0;
    i.op = op; i.vd = ROW_AW'(vd); i.vs1 = ROW_AW'(vs1); i.vs2 = ROW_AW'(vs2);
    return i;
  endfunction

  // VRF accesses of instruction i: kind 0 read, 1 write
  typedef struct { int cyc; int bank; int row; int kind; } acc_t;

  function automatic void accesses(input int i, ref acc_t a [$]);
    vinstr_t ins;
    int t;
    ins = prog[i];
    t = issue_cyc[i];
    a.delete();
    for (int b = 0; b < NBANK; b++) begin
      case (ins.op)
        V_VLE: a.push_back('{t + 1 + MEM_LAT + b, b, ins.vd, 1});
        V_VSE: a.push_back('{t + 1 + b, b, ins.vs2, 0});
        V_ARITH: begin
          a.push_back('{t + 1, b, ins.vs2, 0});
          a.push_back('{t + 2, b, ins.vs1, 0});
          a.push_back('{t + 2 + ARITH_LAT, b, ins.vd, 1});
        end
        V_VFMUL_HF: begin
          a.push_back('{t + 1, b, ins.vs2, 0});
          a.push_back('{t + 2, b, ins.vs1, 0});
          a.push_back('{t + 9, b, ins.vd, 1});
        end
        V_VFADD_BF, V_VFADD_HF: begin
          a.push_back('{t + 1, b, ins.vs2, 0});
          a.push_back('{t + 2, b, ins.vs1, 0});
          a.push_back('{t + 4, b, ins.vd, 1});
        end
        default: begin
          a.push_back('{t + 1, b, ins.vs2, 0});
          a.push_back('{t + 2, b, ins.vs1, 0});
          a.push_back('{t + 7, b, ins.vd, 0});
          a.push_back('{t + 8, b, ins.vd, 1});
        end
      endcase
    end
  endfunction

  task automatic verify_all();
    acc_t ai [$], aj [$];
    int port_use [int];
    for (int i = 0; i < prog.size(); i++) begin
      check(issue_cyc[i] >= 0, $sformatf("instruction %0d issued", i));
      if (issue_cyc[i] < 0) continue;
      accesses(i, ai);
      foreach (ai[k]) begin
        int key;
        key = (ai[k].cyc * NBANK + ai[k].bank) * 2 + ai[k].kind;
        check(!port_use.exists(key), $sformatf("port collision cycle %0d bank %0d", ai[k].cyc, ai[k].bank));
        port_use[key] = i;
      end
      for (int j = i + 1; j < prog.size(); j++) begin
        if (issue_cyc[j] < 0) continue;
        accesses(j, aj);
        foreach (ai[x]) foreach (aj[y])
          if (ai[x].row == aj[y].row && ai[x].bank == aj[y].bank && (ai[x].kind | aj[y].kind))
            check(ai[x].cyc < aj[y].cyc, $sformatf("order of %0d and %0d on row %0d", i, j, ai[x].row));
      end
    end
  endtask

  task automatic verify_units();
    int prev_cim, prev_cim_steps, prev_mem;
    int order [$];
    prev_cim = -100; prev_cim_steps = 0; prev_mem = -100;
    for (int i = 0; i < prog.size(); i++) order.push_back(i);
    order.sort() with (issue_cyc[item]);
    foreach (order[k]) begin
      int i;
      i = order[k];
      if (qclass_of(prog[i].op) == Q_CIM) begin
        check(issue_cyc[i] >= prev_cim + prev_cim_steps, "one CIM operation at a time");
        prev_cim = issue_cyc[i];
        prev_cim_steps = int'(cim_steps(cim_op_of(prog[i].op)));
      end
      if (qclass_of(prog[i].op) == Q_MEM) begin
        check(issue_cyc[i] >= prev_mem + NBANK, "load/store beats do not overlap");
        prev_mem = issue_cyc[i];
      end
    end
  endtask

  initial begin
    instr_valid = 0; instr = '0; arith_ready = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // directed: vmacc, load, ARITH, all independent
    send(mk(V_VMACC_I8, 1, 2, 3));
    send(mk(V_VLE, 10, 0, 0));
    send(mk(V_ARITH, 20, 21, 22));
    repeat (30) @(negedge clk);
    $display("directed issue cycles: vmacc %0d load %0d arith %0d", issue_cyc[0], issue_cyc[1], issue_cyc[2]);
    check(issue_cyc[0] >= 0, "vmacc issued");
    check(issue_cyc[1] == issue_cyc[0] + 4,
          $sformatf("load issue cycle %0d, expected vmacc+4 (waits for the CIM write port)", issue_cyc[1]));
    check(issue_cyc[2] == issue_cyc[0] + 2,
          $sformatf("ARITH issue cycle %0d, expected vmacc+2 (overtakes the load)", issue_cyc[2]));
    // random streams on few rows
    fork
      begin
        for (int k = 0; k < 400; k++) begin
          vop_e op;
          op = vop_e'($urandom_range(8));
          send(mk(op, $urandom_range(7), $urandom_range(7), $urandom_range(7)));
        end
      end
      begin
        repeat (6000) begin
          @(negedge clk);
          arith_ready = ($urandom % 100) < 80;
        end
      end
    join_any
    arith_ready = 1;
    repeat (200) @(negedge clk);
    check(n_issued == prog.size(), $sformatf("all issued (%0d of %0d)", n_issued, prog.size()));
    verify_all();
    verify_units();
    check(n_port > 0, "port stall seen");
    check(n_dep > 0, "dependency stall seen");
    check(n_ooo > 0, "out-of-order issue seen");
    check(n_multi > 0, "multi-issue seen");
    $display("events: port stalls %0d, dependency stalls %0d, out-of-order %0d, multi-issue %0d",
             n_port, n_dep, n_ooo, n_multi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

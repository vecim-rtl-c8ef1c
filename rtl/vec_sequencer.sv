// vec_sequencer: the dedicated vector sequencer with light-weight
// out-of-order issue.
//
// Instructions arrive from the scalar CPU with a valid/ready handshake into an
// instruction FIFO and are dispatched in order into one of three issue queues:
// MEM (loads/stores), CIM (operations executed inside the VRF banks) and ARITH
// (everything for the lane ALU/FPU and slide unit). Each cycle the head of
// every queue may issue, so a younger instruction of one queue can overtake an
// older one waiting in another. A head issues when
//   - its unit is free (one CIM operation at a time, the next one may issue
//     in the write-back cycle of the previous; the load-store unit is busy
//     for the NBANK beats of a row; ARITH needs arith_ready_i),
//   - it has no register dependency (RAW, WAW, WAR) with an instruction in
//     flight, with one issued earlier in the same cycle, or with an older
//     instruction still waiting in another queue,
//   - its VRF port use does not collide with the ports already reserved.
// VRF ports are tracked per bank in a reservation table that looks HOR cycles
// ahead. Every instruction class uses the ports at fixed offsets after its
// issue cycle t (see the rd_at / wr_at functions): CIM MAC reads at t+1, t+2,
// t+7 and writes at t+8; a load writes bank b at t+1+MEM_LAT+b; a store reads
// bank b at t+1+b; ARITH reads at t+1 and t+2 and writes at t+2+ARITH_LAT.
// The queues are considered in the order CIM, MEM, ARITH, so the CIM unit has
// write priority and a load whose write would collide waits a cycle.
// Acknowledge: each issued instruction is acknowledged to the scalar CPU in
// its issue cycle on the ack lane of its queue, carrying its id.
//
// The three queues, the out-of-order issue, CIM write priority and the
// acknowledge path follow the described design. Fixed port-use offsets, the
// exact hazard rules and acknowledging at issue are this implementation's
// choices. The ev_* outputs pulse when a mechanism is exercised.
module vec_sequencer
  import vecim_pkg::*;
#(
  parameter int unsigned NBANK       = 8,
  parameter int unsigned IFIFO_DEPTH = 4,
  parameter int unsigned QDEPTH      = 4,
  parameter int unsigned NINF        = 8,   // instructions tracked in flight
  parameter int unsigned MEM_LAT     = 4,   // memory read latency, cycles
  parameter int unsigned ARITH_LAT   = 2    // ARITH unit latency, cycles
) (
  input  logic              clk,
  input  logic              rst_n,
  // from the scalar CPU
  input  logic              instr_valid_i,
  output logic              instr_ready_o,
  input  vinstr_t           instr_i,
  output logic [NQ-1:0]     ack_valid_o,
  output logic [NQ-1:0][ID_W-1:0] ack_id_o,
  // issue to the units
  output logic              cim_issue_o,
  output vinstr_t           cim_instr_o,
  output logic              mem_issue_o,
  output vinstr_t           mem_instr_o,
  output logic              arith_issue_o,
  output vinstr_t           arith_instr_o,
  input  logic              arith_ready_i,
  // mechanism events
  output logic              ev_port_stall_o,   // a head waited for a VRF port
  output logic              ev_dep_stall_o,    // a head waited for a dependency
  output logic              ev_ooo_o,          // issued ahead of an older instruction
  output logic              ev_multi_o         // two or more issued in one cycle
);

  localparam int unsigned HOR = MEM_LAT + NBANK + ARITH_LAT + 10;
  localparam int unsigned QW  = $clog2(QDEPTH);
  localparam int unsigned SEQ_W = 8;

  typedef logic [NBANK-1:0] bmask_t;

  // ---------------- port-use pattern of each instruction ----------------
  function automatic bmask_t rd_at(input vinstr_t ins, input int unsigned off);
    bmask_t m;
    m = '0;
    case (qclass_of(ins.op))
      Q_MEM: if (ins.op == V_VSE && off >= 1 && off <= NBANK) m[off-1] = 1'b1;
      Q_CIM: begin
        if (off == 1 || off == 2) m = '1;
        if (off == 7 && (ins.op == V_VMACC_I8 || ins.op == V_VDOT_I8 || ins.op == V_VFMACC_BF))
          m = '1;
      end
      default: if (off == 1 || off == 2) m = '1;
    endcase
    return m;
  endfunction

  function automatic bmask_t wr_at(input vinstr_t ins, input int unsigned off);
    bmask_t m;
    m = '0;
    case (qclass_of(ins.op))
      Q_MEM: if (ins.op == V_VLE && off >= 1 + MEM_LAT && off < 1 + MEM_LAT + NBANK)
               m[off-1-MEM_LAT] = 1'b1;
      Q_CIM: if (off == cim_steps(cim_op_of(ins.op))) m = '1;
      default: if (off == 2 + ARITH_LAT) m = '1;
    endcase
    return m;
  endfunction

  // last cycle offset in which the instruction touches the VRF
  function automatic int unsigned last_use(input vinstr_t ins);
    case (qclass_of(ins.op))
      Q_MEM:   return (ins.op == V_VLE) ? MEM_LAT + NBANK : NBANK;
      Q_CIM:   return cim_steps(cim_op_of(ins.op));
      default: return 2 + ARITH_LAT;
    endcase
  endfunction

  function automatic logic writes(input vinstr_t ins);
    return ins.op != V_VSE;
  endfunction

  function automatic logic reads_row(input vinstr_t ins, input logic [ROW_AW-1:0] r);
    case (ins.op)
      V_VLE:  return 1'b0;
      V_VSE:  return ins.vs2 == r;
      V_VMACC_I8, V_VDOT_I8, V_VFMACC_BF:
              return (ins.vs1 == r) || (ins.vs2 == r) || (ins.vd == r);
      default: return (ins.vs1 == r) || (ins.vs2 == r);
    endcase
  endfunction

  // y must wait for x (x is older or in flight)
  function automatic logic depends(input vinstr_t y, input vinstr_t x);
    logic raw, waw, war;
    raw = writes(x) && reads_row(y, x.vd);
    waw = writes(x) && writes(y) && (x.vd == y.vd);
    war = writes(y) && reads_row(x, y.vd);
    return raw || waw || war;
  endfunction

  // ---------------- instruction FIFO ----------------
  logic    if_valid, if_ready;
  vinstr_t if_data;

  sync_fifo #(.T(vinstr_t), .DEPTH(IFIFO_DEPTH)) u_ififo (
    .clk, .rst_n,
    .in_valid_i (instr_valid_i),
    .in_ready_o (instr_ready_o),
    .in_data_i  (instr_i),
    .out_valid_o(if_valid),
    .out_ready_i(if_ready),
    .out_data_o (if_data)
  );

  // ---------------- issue queues ----------------
  vinstr_t          q_ins [NQ][QDEPTH];
  logic [SEQ_W-1:0] q_seq [NQ][QDEPTH];
  logic [QW-1:0]    q_hd  [NQ];
  logic [QW-1:0]    q_tl  [NQ];
  logic [QW:0]      q_cnt [NQ];
  logic [SEQ_W-1:0] seq_ctr;

  qclass_e dq;
  assign dq       = qclass_of(if_data.op);
  assign if_ready = (q_cnt[dq] != (QW+1)'(QDEPTH));

  // ---------------- in-flight table and reservations ----------------
  vinstr_t     inf_ins [NINF];
  logic [4:0]  inf_rem [NINF];
  bmask_t      rd_res [HOR];
  bmask_t      wr_res [HOR];
  logic [3:0]  cim_cnt;
  logic [4:0]  mem_cnt;

  // ---------------- issue decision ----------------
  logic [NQ-1:0] head_v, can, port_ok, dep_ok, unit_ok, older_wait;
  vinstr_t       head [NQ];
  logic [SEQ_W-1:0] head_seq [NQ];
  bmask_t        trd [HOR];
  bmask_t        twr [HOR];
  logic [NINF-1:0] free_slot;
  int unsigned   slot_of [NQ];
  logic [NQ-1:0] slot_ok;
  int            qs;
  logic [QW-1:0] ix;

  always_comb begin
    qs = 0;
    ix = '0;
    for (int q = 0; q < NQ; q++) begin
      head_v[q]   = (q_cnt[q] != '0);
      head[q]     = q_ins[q][q_hd[q]];
      head_seq[q] = q_seq[q][q_hd[q]];
    end
    unit_ok[Q_CIM]   = (cim_cnt == '0);
    unit_ok[Q_MEM]   = (mem_cnt == '0);
    unit_ok[Q_ARITH] = arith_ready_i;

    for (int h = 0; h < HOR; h++) begin
      trd[h] = rd_res[h];
      twr[h] = wr_res[h];
    end
    for (int i = 0; i < NINF; i++) free_slot[i] = (inf_rem[i] == '0);

    can        = '0;
    port_ok    = '0;
    dep_ok     = '0;
    older_wait = '0;
    slot_ok    = '0;
    for (int q = 0; q < NQ; q++) slot_of[q] = 0;

    // Queues in priority order CIM, MEM, ARITH.
    for (int k = 0; k < NQ; k++) begin
      qs = (k == 0) ? int'(Q_CIM) : (k == 1) ? int'(Q_MEM) : int'(Q_ARITH);
      if (head_v[qs]) begin
        // ports
        port_ok[qs] = 1'b1;
        for (int h = 1; h < HOR; h++)
          if (((trd[h] & rd_at(head[qs], h)) != '0) || ((twr[h] & wr_at(head[qs], h)) != '0))
            port_ok[qs] = 1'b0;
        // dependencies: in flight
        dep_ok[qs] = 1'b1;
        for (int i = 0; i < NINF; i++)
          if (inf_rem[i] != '0 && depends(head[qs], inf_ins[i])) dep_ok[qs] = 1'b0;
        // issued earlier this cycle
        for (int p = 0; p < NQ; p++)
          if (can[p] && depends(head[qs], head[p])) dep_ok[qs] = 1'b0;
        // older instructions still waiting in the other queues
        for (int p = 0; p < NQ; p++)
          if (p != qs)
            for (int e = 0; e < QDEPTH; e++)
              if ((QW+1)'(e) < q_cnt[p] && !(e == 0 && can[p])) begin
                ix = QW'((int'(q_hd[p]) + e) % QDEPTH);
                if ($signed(q_seq[p][ix] - head_seq[qs]) < 0) begin
                  older_wait[qs] = 1'b1;
                  if (depends(head[qs], q_ins[p][ix])) dep_ok[qs] = 1'b0;
                end
              end
        // a free in-flight slot
        for (int i = NINF - 1; i >= 0; i--)
          if (free_slot[i]) begin
            slot_ok[qs] = 1'b1;
            slot_of[qs] = i;
          end
        can[qs] = unit_ok[qs] && port_ok[qs] && dep_ok[qs] && slot_ok[qs];
        if (can[qs]) begin
          free_slot[slot_of[qs]] = 1'b0;
          for (int h = 1; h < HOR; h++) begin
            trd[h] = trd[h] | rd_at(head[qs], h);
            twr[h] = twr[h] | wr_at(head[qs], h);
          end
        end
      end
    end
  end

  // ---------------- state ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int q = 0; q < NQ; q++) begin
        q_hd[q]  <= '0;
        q_tl[q]  <= '0;
        q_cnt[q] <= '0;
      end
      for (int i = 0; i < NINF; i++) inf_rem[i] <= '0;
      for (int h = 0; h < HOR; h++) begin
        rd_res[h] <= '0;
        wr_res[h] <= '0;
      end
      seq_ctr <= '0;
      cim_cnt <= '0;
      mem_cnt <= '0;
    end else begin
      // reservations advance by one cycle
      for (int h = 0; h < HOR - 1; h++) begin
        rd_res[h] <= trd[h+1];
        wr_res[h] <= twr[h+1];
      end
      rd_res[HOR-1] <= '0;
      wr_res[HOR-1] <= '0;
      for (int i = 0; i < NINF; i++)
        if (inf_rem[i] != '0) inf_rem[i] <= inf_rem[i] - 5'd1;
      if (cim_cnt != '0) cim_cnt <= cim_cnt - 4'd1;
      if (mem_cnt != '0) mem_cnt <= mem_cnt - 5'd1;
      // issue
      for (int q = 0; q < NQ; q++) begin
        if (can[q]) begin
          q_hd[q] <= QW'((int'(q_hd[q]) + 1) % QDEPTH);
          inf_ins[slot_of[q]] <= head[q];
          inf_rem[slot_of[q]] <= 5'(last_use(head[q]) - 1);
        end
        if (if_valid && if_ready && dq == qclass_e'(q)) begin
          q_ins[q][q_tl[q]] <= if_data;
          q_seq[q][q_tl[q]] <= seq_ctr;
          q_tl[q] <= QW'((int'(q_tl[q]) + 1) % QDEPTH);
        end
        q_cnt[q] <= q_cnt[q] - (QW+1)'(can[q]) + (QW+1)'(if_valid && if_ready && dq == qclass_e'(q));
      end
      if (if_valid && if_ready) seq_ctr <= seq_ctr + 1'b1;
      if (can[Q_CIM]) cim_cnt <= 4'(cim_steps(cim_op_of(head[Q_CIM].op)) - 1);
      if (can[Q_MEM]) mem_cnt <= 5'(NBANK - 1);
    end
  end

  // ---------------- outputs ----------------
  assign cim_issue_o   = can[Q_CIM];
  assign cim_instr_o   = head[Q_CIM];
  assign mem_issue_o   = can[Q_MEM];
  assign mem_instr_o   = head[Q_MEM];
  assign arith_issue_o = can[Q_ARITH];
  assign arith_instr_o = head[Q_ARITH];

  always_comb begin
    for (int q = 0; q < NQ; q++) begin
      ack_valid_o[q] = can[q];
      ack_id_o[q]    = head[q].id;
    end
  end

  always_comb begin
    ev_port_stall_o = 1'b0;
    ev_dep_stall_o  = 1'b0;
    ev_ooo_o        = 1'b0;
    for (int q = 0; q < NQ; q++) begin
      if (head_v[q] && unit_ok[q] && !port_ok[q]) ev_port_stall_o = 1'b1;
      if (head_v[q] && !dep_ok[q])                 ev_dep_stall_o  = 1'b1;
      if (can[q] && older_wait[q])                 ev_ooo_o        = 1'b1;
    end
  end
  assign ev_multi_o = (32'(can[0]) + 32'(can[1]) + 32'(can[2])) >= 2;

endmodule

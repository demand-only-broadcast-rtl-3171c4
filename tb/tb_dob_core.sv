// tb_dob_core: end-to-end test of the Demand-Only Broadcast core at its
// default (full) size.
//
// Generates a random program (first 32 instructions load every architectural
// register with an immediate, then a mix of register-register, add-immediate,
// load-immediate and move operations, with a serial dependence chain in the
// middle to fill the scheduling windows). A reference model computes every
// result in program order. The program is offered 16 instructions per cycle;
// the retire stream must reproduce the reference results in order.
//
// It also counts how often each mechanism of the design happened and fails if
// one never did: remote register-file writes, blocked result broadcasts,
// bypassed operands, copy requests, copy insertions, steering away from the
// preferred cluster, Modulo-N steering, and issue stalls. It checks that
// fewer than 4 register-file writes are made per result (the point of the
// design), that every result is either written or blocked in each of the 4
// clusters, and that a copy instruction is issued no earlier than 5 cycles
// after the request for it (exactly 5 when ports are free).
module tb_dob_core;
  import dob_pkg::*;

  localparam int N_INSN   = 4000;
  localparam int MAX_CYC  = 40000;
  localparam int CHAIN_LO = 1500;
  localparam int CHAIN_HI = 1900;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // asynchronous reset before the first clock edge
  always #5 clk = ~clk;

  logic  [RENAME_WIDTH-1:0]       in_valid;
  insn_t [RENAME_WIDTH-1:0]       in_insn;
  logic  [$clog2(RENAME_WIDTH+1)-1:0] accept_cnt;
  logic  [RENAME_WIDTH-1:0]       ret_valid, ret_dst_v;
  areg_t [RENAME_WIDTH-1:0]       ret_dst;
  data_t [RENAME_WIDTH-1:0]       ret_data;
  logic  [7:0] ev_rf_writes, ev_remote_writes, ev_blocked, ev_bypass, ev_results;
  logic  [5:0] ev_copy_req;
  logic  [4:0] ev_copies, ev_with_src, ev_not_pref, ev_modulo;
  logic        ev_stall;

  dob_core dut (.*);

  insn_t prog [N_INSN];
  data_t expv [N_INSN];
  data_t arch [NUM_AREGS];

  int checks = 0, failures = 0;
  int pc = 0, rp = 0, cycles = 0;
  longint s_writes = 0, s_remote = 0, s_blocked = 0, s_bypass = 0, s_results = 0;
  longint s_copy_req = 0, s_copies = 0, s_with_src = 0, s_not_pref = 0, s_modulo = 0, s_stall = 0;

  function automatic data_t sext(logic [IMM_W-1:0] i);
    return data_t'($signed(i));
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    // Program and reference model.
    for (int i = 0; i < N_INSN; i++) begin
      insn_t x;
      int r;
      x = '0;
      x.dst_v = 1'b1;
      x.dst   = areg_t'($urandom_range(NUM_AREGS-1));
      x.imm   = IMM_W'($urandom);
      if (i < NUM_AREGS) begin
        x.op = OP_LI; x.dst = areg_t'(i);
      end else if (i >= CHAIN_LO && i < CHAIN_HI) begin
        // serial chain on r1 with an occasional side read of an old register
        x.op = OP_ADDI; x.src1_v = 1'b1; x.src1 = 5'd1; x.dst = 5'd1;
        if (i % 7 == 0) begin
          x.op = OP_ADD; x.src2_v = 1'b1; x.src2 = areg_t'($urandom_range(NUM_AREGS-1));
        end
      end else begin
        r = $urandom_range(99);
        x.src1   = areg_t'($urandom_range(NUM_AREGS-1));
        x.src2   = areg_t'($urandom_range(NUM_AREGS-1));
        if (r < 8)       begin x.op = OP_LI; end
        else if (r < 25) begin x.op = OP_ADDI; x.src1_v = 1'b1; end
        else if (r < 30) begin x.op = OP_MOV;  x.src1_v = 1'b1; end
        else begin
          x.op = op_e'($urandom_range(4));
          x.src1_v = 1'b1; x.src2_v = 1'b1;
        end
      end
      prog[i] = x;
      case (x.op)
        OP_ADD:  expv[i] = arch[x.src1] + arch[x.src2];
        OP_SUB:  expv[i] = arch[x.src1] - arch[x.src2];
        OP_AND:  expv[i] = arch[x.src1] & arch[x.src2];
        OP_OR:   expv[i] = arch[x.src1] | arch[x.src2];
        OP_XOR:  expv[i] = arch[x.src1] ^ arch[x.src2];
        OP_ADDI: expv[i] = arch[x.src1] + sext(x.imm);
        OP_LI:   expv[i] = sext(x.imm);
        default: expv[i] = arch[x.src1];
      endcase
      arch[x.dst] = expv[i];
    end
  end

  // Offer instructions.
  always_comb begin
    for (int k = 0; k < RENAME_WIDTH; k++) begin
      in_valid[k] = rst_n && (pc + k < N_INSN);
      in_insn[k]  = (pc + k < N_INSN) ? prog[pc + k] : '0;
    end
  end

  always @(posedge clk) if (rst_n) begin
    cycles++;
    pc <= pc + int'(accept_cnt);
    for (int k = 0; k < RENAME_WIDTH; k++) begin
      if (ret_valid[k]) begin
        if (rp + k < N_INSN) begin
          check(ret_dst_v[k] && ret_dst[k] == prog[rp + k].dst && ret_data[k] == expv[rp + k],
                $sformatf("insn %0d: got r%0d=%h expected r%0d=%h", rp + k, ret_dst[k], ret_data[k],
                          prog[rp + k].dst, expv[rp + k]));
        end else check(1'b0, "retired more instructions than offered");
      end
    end
    rp <= rp + $countones(ret_valid);
    s_writes   += ev_rf_writes;
    s_remote   += ev_remote_writes;
    s_blocked  += ev_blocked;
    s_bypass   += ev_bypass;
    s_results  += ev_results;
    s_copy_req += ev_copy_req;
    s_copies   += ev_copies;
    s_with_src += ev_with_src;
    s_not_pref += ev_not_pref;
    s_modulo   += ev_modulo;
    s_stall    += ev_stall;
  end

  // Copy latency: a request made in cycle T sets the Copy Request Vector for
  // T+2, where the copy can be picked; the picked copy is issued 3 cycles
  // later. So a copy is never issued earlier than 5 cycles after the request
  // that caused it, and exactly 5 when ports are free. Requests for a register
  // whose copy is already on its way are served by that copy and not timed.
  int req_cyc [preg_t];
  int pick_q [preg_t][$];
  int copy_min = 1 << 30, copy_five = 0;
  int cc = 0;

  function automatic bit crv_busy(preg_t r);
    // bit already set, or a request for r already on its way to the vector
    if (dut.u_crv.crv_q[r]) return 1;
    for (int i = 0; i < 2*NUM_CLUSTERS*ISSUE_PORTS; i++)
      if (dut.u_crv.rv_q[i] && dut.u_crv.rp_q[i] == r) return 1;
    return 0;
  endfunction

  always @(posedge clk) if (rst_n) begin
    cc <= cc + 1;
    for (int c = 0; c < NUM_CLUSTERS; c++)
      for (int p = 0; p < ISSUE_PORTS; p++)
        if (dut.iss[c][p].valid && dut.iss[c][p].is_copy && pick_q.exists(dut.iss[c][p].src1)) begin
          check(cc - pick_q[dut.iss[c][p].src1].pop_front() == STEER_TO_ISSUE,
                "picked copy not issued after the steer-to-issue pipeline");
          if (pick_q[dut.iss[c][p].src1].size() == 0) pick_q.delete(dut.iss[c][p].src1);
        end
    for (int c = 0; c < NUM_CLUSTERS; c++)
      for (int k = 0; k < ISSUE_PORTS; k++)
        if (dut.pick_valid[c][k]) begin
          preg_t r;
          r = dut.pick_preg[c][k];
          if (req_cyc.exists(r)) begin
            int d;
            d = cc - req_cyc[r] + STEER_TO_ISSUE;   // request to issue
            if (d < copy_min) copy_min = d;
            if (d == 5) copy_five++;
            req_cyc.delete(r);
          end
          pick_q[r].push_back(cc);
        end
    for (int r = 0; r < 2*NUM_CLUSTERS*ISSUE_PORTS; r++)
      if (dut.req_valid[r] && !req_cyc.exists(dut.req_preg[r]) && !crv_busy(dut.req_preg[r]))
        req_cyc[dut.req_preg[r]] = cc;
  end

  task automatic mech(input string name, input longint n);
    $display("  %-28s %0d", name, n);
    check(n > 0, {"mechanism never happened: ", name});
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    wait (rp >= N_INSN);
    repeat (5) @(posedge clk);
    $display("retired %0d instructions in %0d cycles (IPC %0.2f)", rp, cycles, real'(rp) / real'(cycles));
    mech("results broadcast", s_results);
    mech("register file writes", s_writes);
    mech("remote register file writes", s_remote);
    mech("blocked broadcasts", s_blocked);
    mech("bypassed operands", s_bypass);
    mech("copy requests", s_copy_req);
    mech("copy instructions inserted", s_copies);
    mech("steered off preference", s_not_pref);
    mech("modulo-N steered", s_modulo);
    mech("issue stall cycles", s_stall);
    mech("copies issued 5 cycles after the request", copy_five);
    $display("  shortest request-to-copy-issue distance: %0d cycles", copy_min);
    check(copy_min >= 5, "a copy was issued less than 5 cycles after its request");
    $display("  register file writes per result: %0.2f (replicated broadcast: 4)",
             real'(s_writes) / real'(s_results));
    check(s_writes < 4 * s_results, "demand-only broadcast saved no register file writes");
    check(s_writes + s_blocked == 4 * s_results, "every result must be written or blocked in each cluster");
    check(s_writes >= s_results, "every result is written at least in its own cluster");
    check(rp == N_INSN, "retired count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (MAX_CYC) @(posedge clk);
    failures++;
    $display("watchdog: retired %0d of %0d", rp, N_INSN);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

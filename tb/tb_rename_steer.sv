// tb_rename_steer: directed steering and renaming cases.
//   1. 8 source-less instructions: Modulo-4, the first 4 to cluster 0 and the
//      next 4 to cluster 1.
//   2. 8 instructions reading r0 (bank 0): 4 in cluster 0 (its ports), the
//      other 4 in cluster 1 (closest); destinations come from the chosen
//      cluster's bank; 4 counted as not in the preferred cluster.
//   3. a dependant in the same group reads the new register of its producer
//      and follows it to its cluster.
//   4. copies picked for cluster 2 take its lowest ports before regular
//      instructions.
//   5. a bank with no free register: its instructions go elsewhere; with
//      no cluster able to take an instruction, it and all younger wait.
module tb_rename_steer;
  import dob_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b1;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;

  logic  [15:0] in_valid;
  insn_t [15:0] in_insn;
  logic  [4:0]  accept_cnt;
  preg_t [3:0][3:0] fl_head;
  logic  [3:0][7:0] fl_count;
  logic  [3:0][2:0] fl_alloc;
  iwidx_t       iw_tail;
  logic  [9:0]  iw_free;
  logic  [15:0] iw_dst_v;
  areg_t [15:0] iw_dst;
  preg_t [15:0] iw_old;
  logic  [3:0][2:0] copy_slots;
  logic  [3:0][3:0] pick_valid;
  preg_t [3:0][3:0] pick_preg;
  logic  [3:0][2:0] dealloc_cnt;
  uop_t  [3:0][3:0] out_uop;
  logic  [4:0]  n_not_pref, n_with_src, n_modulo, n_copies;
  logic         stalled;

  rename_steer dut (.*);

  int checks = 0, failures = 0;
  int base [4];

  task automatic check(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  function automatic insn_t mk(op_e op, logic v1, areg_t s1, areg_t d);
    insn_t x;
    x = '0;
    x.op = op; x.src1_v = v1; x.src1 = s1; x.dst_v = 1'b1; x.dst = d; x.imm = 16'h1;
    return x;
  endfunction

  // free lists modelled as counters: head[k] = bank base + next + k
  always_comb
    for (int c = 0; c < 4; c++)
      for (int k = 0; k < 4; k++) fl_head[c][k] = preg_t'(c * BANK_SIZE + 32 + base[c] + k);
  always @(posedge clk) if (rst_n)
    for (int c = 0; c < 4; c++) base[c] <= base[c] + int'(fl_alloc[c]);

  task automatic cyc();
    @(negedge clk);
    in_valid = '0; in_insn = '0; pick_valid = '0; pick_preg = '0;
  endtask

  initial begin
    for (int c = 0; c < 4; c++) base[c] = 0;
    in_valid = '0; in_insn = '0; pick_valid = '0; pick_preg = '0; dealloc_cnt = '0;
    fl_count = {8'd96, 8'd96, 8'd96, 8'd96};
    iw_tail = '0; iw_free = 10'd512;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    check(copy_slots == {3'd4, 3'd4, 3'd4, 3'd4}, "four copy slots per cluster when empty");

    // 1. modulo
    cyc();
    for (int i = 0; i < 8; i++) begin in_valid[i] = 1; in_insn[i] = mk(OP_LI, 0, '0, areg_t'(8 + i)); end
    #1;
    check(accept_cnt == 8 && n_modulo == 8 && n_with_src == 0, "8 modulo instructions accepted");
    check(out_uop[0][3].valid && out_uop[1][3].valid && !out_uop[2][0].valid, "modulo: 4 to cluster 0, 4 to cluster 1");
    check(bank_of(out_uop[1][0].dst) == 2'd1 && bank_of(out_uop[0][0].dst) == 2'd0, "destination from own bank");
    check(iw_old[0] == 9'd8 && iw_dst[0] == 5'd8, "old mapping to the instruction window");

    // 2. dependence on r0 (bank 0)
    cyc();
    for (int i = 0; i < 8; i++) begin in_valid[i] = 1; in_insn[i] = mk(OP_ADDI, 1, 5'd0, areg_t'(16 + i)); end
    #1;
    check(accept_cnt == 8 && n_with_src == 8 && n_not_pref == 4, "4 of 8 off their preferred cluster");
    check(out_uop[0][3].valid && out_uop[1][3].valid && !out_uop[2][0].valid && !out_uop[3][0].valid,
          "spill to the closest cluster");
    check(out_uop[0][0].src1 == 9'd0 && out_uop[1][0].src1 == 9'd0, "source renamed to p0");

    // 3. same-group dependant follows its producer (r8 was renamed to a bank-0 register)
    cyc();
    in_valid[0] = 1; in_insn[0] = mk(OP_ADDI, 1, 5'd12, 5'd30);   // r12 lives in bank 1
    in_valid[1] = 1; in_insn[1] = mk(OP_ADDI, 1, 5'd30, 5'd31);
    #1;
    check(out_uop[1][0].valid && out_uop[1][1].valid && out_uop[1][1].src1 == out_uop[1][0].dst,
          "dependant reads producer's new register in the same cluster");

    // 4. copies first
    cyc();
    pick_valid[2] = 4'b0011; pick_preg[2][0] = 9'd260; pick_preg[2][1] = 9'd261;
    for (int i = 0; i < 4; i++) begin in_valid[i] = 1; in_insn[i] = mk(OP_ADDI, 1, 5'd31, areg_t'(i)); end
    #1;
    check(n_copies == 2 && out_uop[2][0].is_copy && out_uop[2][0].src1 == 9'd260 && out_uop[2][0].dst == 9'd260 &&
          out_uop[2][1].is_copy, "copies in the lowest ports of their cluster");
    check(out_uop[1][3].valid && !out_uop[1][3].is_copy, "regular instructions still placed");

    // 5. bank 1 empty: r31 lives in bank 1, instructions go to 0 and 2
    cyc();
    fl_count[1] = 8'd0;
    for (int i = 0; i < 4; i++) begin in_valid[i] = 1; in_insn[i] = mk(OP_ADDI, 1, 5'd31, areg_t'(i)); end
    #1;
    check(accept_cnt == 4 && n_not_pref == 4 && !out_uop[1][0].valid, "no instruction into a cluster without registers");
    cyc();
    fl_count = '0;
    in_valid[0] = 1; in_insn[0] = mk(OP_ADDI, 1, 5'd31, 5'd1);
    in_valid[1] = 1; in_insn[1] = mk(OP_ADDI, 1, 5'd31, 5'd2);
    #1;
    check(accept_cnt == 0 && stalled, "no cluster can take it: stall");
    cyc();
    fl_count = {8'd96, 8'd96, 8'd96, 8'd96};
    iw_free = 10'd1;
    for (int i = 0; i < 3; i++) begin in_valid[i] = 1; in_insn[i] = mk(OP_LI, 0, '0, areg_t'(i)); end
    #1;
    check(accept_cnt == 1 && stalled, "instruction window limits acceptance");
    cyc();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

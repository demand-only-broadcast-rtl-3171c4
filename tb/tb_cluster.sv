// tb_cluster: one cluster (number 1) with its neighbours' broadcasts driven
// by the testbench.
//   - A (load-immediate 5 into p130) and B (p131 = p130 + p130) are issued
//     together: A's tag goes out the cycle after issue, B's tag one cycle
//     later (back-to-back wakeup), A's result TAG_TO_DATA = 3 cycles after
//     its tag, and B's result (10) one cycle after A's, taking both operands
//     from the bypass.
//   - C needs p40 from cluster 0 and is issued before p40's tag arrives: the
//     tag wakes C, the data 3 cycles later is written (a remote write) and
//     bypassed, and C's result uses it.
//   - p41 from cluster 0 arrives with no consumer: its data is blocked; a
//     consumer D issued afterwards requests a copy and stays asleep until the
//     copy's tag arrives; its data then passes and D computes with it.
module tb_cluster;
  import dob_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b1;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;

  uop_t      [3:0]       iss;
  uop_t      [15:0]      clr_uop;
  logic      [3:0][1:0]  copy_req;
  tag_bus_t  [15:0]      tag_in;
  data_bus_t [15:0]      data_in;
  tag_bus_t  [3:0]       tag_out;
  data_bus_t [3:0]       data_out;
  complete_t [3:0]       done;
  logic      [2:0]       dealloc_cnt;
  logic      [4:0]       n_rf_writes, n_blocked, n_remote_writes;
  logic      [3:0]       n_bypass;

  cluster #(.CLUSTER_ID(1)) dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  int t_tag [preg_t];
  int t_data [preg_t];
  data_t v_data [preg_t];
  int blocked = 0, remote = 0, bypassed = 0;

  task automatic check(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  function automatic uop_t mk(op_e op, logic v1, preg_t s1, logic v2, preg_t s2, preg_t d, int imm);
    uop_t u;
    u = '0;
    u.valid = 1'b1; u.op = op; u.src1_v = v1; u.src1 = s1; u.src2_v = v2; u.src2 = s2;
    u.dst_v = 1'b1; u.dst = d; u.imm = IMM_W'(imm); u.iw_idx = iwidx_t'(d);
    return u;
  endfunction

  always @(posedge clk) if (rst_n) begin
    cyc++;
    for (int k = 0; k < 4; k++) begin
      if (tag_out[k].valid)  t_tag[tag_out[k].tag] = cyc;
      if (data_out[k].valid) begin
        t_data[data_out[k].tag] = cyc;
        v_data[data_out[k].tag] = data_out[k].data;
        check(done[k].valid && done[k].data == data_out[k].data && done[k].iw_idx == iwidx_t'(data_out[k].tag),
              "completion reported with the result");
      end
    end
    blocked  += n_blocked;
    remote   += n_remote_writes;
    bypassed += n_bypass;
  end

  task automatic step();
    @(negedge clk);
    iss = '0; clr_uop = '0; tag_in = '0; data_in = '0;
  endtask

  initial begin
    int t0;
    iss = '0; clr_uop = '0; tag_in = '0; data_in = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // A and B, plus allocation of p40 and p41 in cluster 0
    step();
    iss[0] = mk(OP_LI, 0, '0, 0, '0, 9'd130, 5);
    iss[1] = mk(OP_ADD, 1, 9'd130, 1, 9'd130, 9'd131, 0);
    clr_uop[4] = iss[0]; clr_uop[5] = iss[1];
    clr_uop[0] = mk(OP_LI, 0, '0, 0, '0, 9'd40, 0);
    clr_uop[1] = mk(OP_LI, 0, '0, 0, '0, 9'd41, 0);
    t0 = cyc;
    // C waits for p40
    step();
    iss[0] = mk(OP_ADDI, 1, 9'd40, 0, '0, 9'd132, 3);
    clr_uop[4] = iss[0];
    // tags of p40 and p41 arrive from cluster 0 (buses 0 and 1)
    step();
    tag_in[0] = '{valid: 1'b1, tag: 9'd40};
    tag_in[1] = '{valid: 1'b1, tag: 9'd41};
    step(); step();
    step();
    data_in[0] = '{valid: 1'b1, tag: 9'd40, data: 64'h100};
    data_in[1] = '{valid: 1'b1, tag: 9'd41, data: 64'h200};
    #1 check(n_blocked == 5'd1 && n_remote_writes == 5'd1, "p40 written, p41 blocked");
    step(); step();
    // D needs p41: copy request
    iss[2] = mk(OP_ADDI, 1, 9'd41, 0, '0, 9'd133, 1);
    clr_uop[6] = iss[2];
    #1 check(copy_req[2][0] && !copy_req[2][1], "D requests a copy of p41");
    repeat (4) step();
    check(!t_tag.exists(9'd133), "D asleep before the copy");
    // copy of p41 re-broadcast by cluster 0
    tag_in[2] = '{valid: 1'b1, tag: 9'd41};
    step(); step(); step();
    data_in[2] = '{valid: 1'b1, tag: 9'd41, data: 64'h200};
    repeat (6) step();

    check(t_tag[9'd130] == t0 + 2, "A's tag the cycle after insertion");
    check(t_tag[9'd131] == t_tag[9'd130] + 1, "B woken back-to-back");
    check(t_data[9'd130] == t_tag[9'd130] + 3, "A's data 3 cycles after its tag");
    check(t_data[9'd131] == t_data[9'd130] + 1 && v_data[9'd131] == 64'd10, "B = 10 from the bypass");
    check(v_data[9'd132] == 64'h103, "C computed with remote p40");
    check(t_tag[9'd132] == t0 + 4, "C selected the cycle after the remote tag");
    check(t_tag.exists(9'd133) && v_data[9'd133] == 64'h201, "D computed with the copied p41");
    check(blocked == 1 && remote == 2, "one blocked broadcast, two remote writes");
    check(bypassed >= 4, "bypass used");
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

// tb_sched_window: wakeup and select timing of one scheduling window.
//   - an entry inserted ready requests in the next cycle and is selected;
//   - an entry waiting on one tag is selected the cycle after that tag is
//     broadcast (back-to-back), one waiting on two tags only after both;
//   - with 6 ready entries, 4 are selected in one cycle and 2 in the next,
//     lowest entry first; a selected entry is never selected again;
//   - freeing entries returns them (free_cnt), and new entries reuse them.
module tb_sched_window;
  import dob_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b1;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;

  uop_t     [3:0]      iss;
  logic     [3:0][1:0] iss_ready;
  tag_bus_t [15:0]     tag;
  logic     [3:0]      sel_valid;
  uop_t     [3:0]      sel_uop;
  logic     [3:0][5:0] sel_idx;
  logic     [3:0]      free_valid;
  logic     [3:0][5:0] free_idx;
  logic     [6:0]      free_cnt;
  int checks = 0, failures = 0;
  int seen [preg_t];

  sched_window dut (.*);

  task automatic check(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  function automatic uop_t mk(preg_t s1, logic v1, preg_t s2, logic v2, preg_t d);
    uop_t u;
    u = '0;
    u.valid = 1'b1; u.op = OP_ADD; u.src1_v = v1; u.src1 = s1; u.src2_v = v2; u.src2 = s2;
    u.dst_v = 1'b1; u.dst = d;
    return u;
  endfunction

  function automatic int nsel();
    return $countones(sel_valid);
  endfunction

  function automatic bit selected(preg_t d);
    for (int k = 0; k < 4; k++) if (sel_valid[k] && sel_uop[k].dst == d) return 1;
    return 0;
  endfunction

  task automatic idle();
    @(negedge clk);
    iss = '0; iss_ready = '0; tag = '0; free_valid = '0;
  endtask

  // count selections over the whole test: nothing may be selected twice
  always @(posedge clk) if (rst_n)
    for (int k = 0; k < 4; k++) if (sel_valid[k]) begin
      if (seen.exists(sel_uop[k].dst)) begin failures++; $display("FAIL p%0d selected twice", sel_uop[k].dst); end
      seen[sel_uop[k].dst] = 1;
    end

  initial begin
    iss = '0; iss_ready = '0; tag = '0; free_valid = '0; free_idx = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    #1 check(free_cnt == 7'd64, "empty after reset");

    // X ready; Y waits on 100; Z waits on 100 and 101
    idle();
    iss[0] = mk(9'd1, 1, 9'd2, 1, 9'd300); iss_ready[0] = 2'b11;
    iss[1] = mk(9'd100, 1, 9'd2, 0, 9'd301); iss_ready[1] = 2'b10;
    iss[2] = mk(9'd100, 1, 9'd101, 1, 9'd302); iss_ready[2] = 2'b00;
    #1 check(nsel() == 0, "nothing selected in the insertion cycle");
    idle(); #1;
    check(nsel() == 1 && selected(9'd300), "X selected the cycle after insertion");
    check(free_cnt == 7'd61, "three entries used");
    idle(); tag[7] = '{valid: 1'b1, tag: 9'd100}; #1;
    check(nsel() == 0, "Y not yet selected in the tag cycle");
    idle(); #1;
    check(nsel() == 1 && selected(9'd301), "Y selected back-to-back after tag 100");
    idle(); tag[15] = '{valid: 1'b1, tag: 9'd101}; #1;
    idle(); #1;
    check(nsel() == 1 && selected(9'd302), "Z selected after both tags");
    // free the three entries
    idle(); free_valid = 4'b0111; free_idx[0] = 6'd0; free_idx[1] = 6'd1; free_idx[2] = 6'd2;
    idle(); #1 check(free_cnt == 7'd64, "entries returned");

    // six ready entries: 4 then 2
    idle();
    for (int p = 0; p < 4; p++) begin iss[p] = mk(9'd1, 1, 9'd1, 1, preg_t'(310 + p)); iss_ready[p] = 2'b11; end
    idle();
    for (int p = 0; p < 2; p++) begin iss[p] = mk(9'd1, 1, 9'd1, 1, preg_t'(314 + p)); iss_ready[p] = 2'b11; end
    #1 check(nsel() == 4 && sel_idx[0] == 6'd0 && sel_idx[3] == 6'd3, "four lowest selected");
    idle(); #1
    check(nsel() == 2 && selected(9'd314) && selected(9'd315), "remaining two selected next cycle");
    idle(); #1 check(nsel() == 0, "nothing left");
    idle();
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

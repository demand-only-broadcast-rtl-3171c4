// tb_busy_bit_table: the issue-time and tag-time rules of the Demand-Only
// Busy-Bit Table, one directed case each, for the table of cluster 3:
//   - consumer issued before its producer's tag arrives (Table 1): not ready,
//     no copy, and the later tag is let through (use_en);
//   - tag arrives with no consumer (Table 2): blocked; the consumer issued
//     afterwards requests a copy and is not ready; a second consumer does not
//     request again; the copy's tag is let through; a later consumer is ready;
//   - consumer issued in the same cycle as the tag: ready and let through;
//   - consumer issued in the same cycle as its producer: stale bits ignored;
//   - an instruction's own destination is always let through;
//   - initial architectural registers are ready; copies are ready.
module tb_busy_bit_table;
  import dob_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b1;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;

  uop_t     [3:0]      iss;
  logic     [3:0][1:0] src_ready, copy_req;
  uop_t     [15:0]     clr_uop;
  tag_bus_t [15:0]     tag;
  logic     [15:0]     use_en;
  int checks = 0, failures = 0;

  busy_bit_table dut (.*);

  task automatic check(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  function automatic uop_t mk(preg_t s1, logic v1, preg_t d);
    uop_t u;
    u = '0;
    u.valid = 1'b1; u.op = OP_ADDI; u.src1_v = v1; u.src1 = s1; u.dst_v = 1'b1; u.dst = d;
    return u;
  endfunction

  // one cycle: drive at negedge, sample combinational outputs, then clock
  task automatic idle();
    @(negedge clk);
    iss = '0; clr_uop = '0; tag = '0;
  endtask

  initial begin
    iss = '0; clr_uop = '0; tag = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // initial register
    idle(); iss[0] = mk(9'd3, 1, 9'd400); clr_uop[0] = iss[0]; #1;
    check(src_ready[0][0] && !copy_req[0][0], "initial register is ready");

    // ---- Table 1: A (dst 200, cluster 0) allocated; B issued here first
    idle(); clr_uop[5] = mk(9'd0, 0, 9'd200);
    idle(); iss[1] = mk(9'd200, 1, 9'd401); clr_uop[1] = iss[1]; #1;
    check(!src_ready[1][0] && !copy_req[1][0], "B waits, no copy");
    idle(); tag[2] = '{valid: 1'b1, tag: 9'd200}; #1;
    check(use_en[2], "A's tag let through (Use set by B)");
    idle(); iss[2] = mk(9'd200, 1, 9'd402); clr_uop[2] = iss[2]; #1;
    check(src_ready[2][0] && !copy_req[2][0], "later consumer of A ready");

    // ---- Table 2: D (dst 210) allocated elsewhere, tag arrives, nobody here
    idle(); clr_uop[6] = mk(9'd0, 0, 9'd210);
    idle(); tag[4] = '{valid: 1'b1, tag: 9'd210}; #1;
    check(!use_en[4], "broadcast of 210 blocked");
    idle(); iss[0] = mk(9'd210, 1, 9'd403); clr_uop[0] = iss[0]; #1;
    check(!src_ready[0][0] && copy_req[0][0], "E requests a copy and waits");
    idle(); iss[3] = mk(9'd210, 1, 9'd404); clr_uop[3] = iss[3]; #1;
    check(!src_ready[3][0] && !copy_req[3][0], "F waits without a second request");
    idle(); iss[1] = '{valid: 1'b1, is_copy: 1'b1, op: OP_MOV, src1_v: 1'b1, src1: 9'd7,
                       src2_v: 1'b0, src2: '0, dst_v: 1'b1, dst: 9'd7, imm: '0, iw_idx: '0};
    tag[9] = '{valid: 1'b1, tag: 9'd210}; #1;
    check(use_en[9], "copy's tag of 210 let through");
    check(src_ready[1][0] && !copy_req[1][0], "copy instruction is ready");
    idle(); iss[0] = mk(9'd210, 1, 9'd405); clr_uop[0] = iss[0]; #1;
    check(src_ready[0][0] && !copy_req[0][0], "G ready after copy");

    // ---- same cycle: consumer issued while the tag arrives
    idle(); clr_uop[7] = mk(9'd0, 0, 9'd220);
    idle(); iss[2] = mk(9'd220, 1, 9'd406); clr_uop[2] = iss[2]; tag[12] = '{valid: 1'b1, tag: 9'd220}; #1;
    check(src_ready[2][0] && !copy_req[2][0], "same-cycle tag makes consumer ready");
    check(use_en[12], "same-cycle consumer lets the data through");

    // ---- same cycle as producer: register 5 has stale set bits
    idle(); clr_uop[9] = mk(9'd0, 0, 9'd5); iss[0] = mk(9'd5, 1, 9'd407); clr_uop[0] = iss[0]; #1;
    check(!src_ready[0][0] && !copy_req[0][0], "freshly allocated register is not ready");

    // ---- own destination: issued here with dst 230; tag later
    idle(); iss[3] = mk(9'd0, 0, 9'd230); clr_uop[3] = iss[3];
    idle(); idle(); tag[13] = '{valid: 1'b1, tag: 9'd230}; #1;
    check(use_en[13], "own destination let through");
    // register 231 allocated elsewhere, tag with no consumer: blocked
    idle(); clr_uop[10] = mk(9'd0, 0, 9'd231);
    idle(); tag[0] = '{valid: 1'b1, tag: 9'd231}; #1;
    check(!use_en[0], "remote-only result blocked");
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

// tb_copy_request_unit: a copy request made in cycle t is picked in cycle
// t+2 (Table 2: issue in cycle 4, vector bit set in cycle 6), picks go to
// the register's bank (cluster), at most slots[c] per cluster, lowest
// register first, and picked bits are cleared.
module tb_copy_request_unit;
  import dob_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b1;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;

  logic  [31:0]      req_valid;
  preg_t [31:0]      req_preg;
  logic  [3:0][2:0]  slots;
  logic  [3:0][3:0]  pick_valid;
  preg_t [3:0][3:0]  pick_preg;
  logic  [9:0]       pending;
  int checks = 0, failures = 0;

  copy_request_unit dut (.*);

  task automatic check(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    req_valid = '0; req_preg = '0; slots = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // cycle 0: requests for 150 (bank 1), 140 (bank 1), 5 (bank 0) and 140 again
    req_valid[0] = 1; req_preg[0] = 9'd150;
    req_valid[9] = 1; req_preg[9] = 9'd140;
    req_valid[31] = 1; req_preg[31] = 9'd5;
    req_valid[20] = 1; req_preg[20] = 9'd140;
    slots = {3'd4, 3'd4, 3'd4, 3'd4};
    #1 check(pick_valid == '0, "nothing picked in the request cycle");
    @(negedge clk); req_valid = '0;
    #1 check(pick_valid == '0, "nothing picked one cycle later");
    @(negedge clk); slots[1] = 3'd1;
    #1;
    check(pending == 10'd3, "three registers pending");
    check(pick_valid[0] == 4'b0001 && pick_preg[0][0] == 9'd5, "register 5 to cluster 0 in cycle t+2");
    check(pick_valid[1] == 4'b0001 && pick_preg[1][0] == 9'd140, "lowest register of bank 1 first, one slot");
    check(pick_valid[2] == '0 && pick_valid[3] == '0, "no copies for other clusters");
    @(negedge clk); #1;
    check(pick_valid[0] == '0, "picked bit cleared");
    check(pick_valid[1] == 4'b0001 && pick_preg[1][0] == 9'd150, "next register of bank 1");
    slots[1] = 3'd0;
    #1 check(pick_valid[1] == '0, "no slot, no pick");
    @(negedge clk); slots[1] = 3'd4; #1;
    check(pick_valid[1] == 4'b0001 && pending == 10'd1, "kept until a slot is free");
    // many requests in bank 3: 4 picked per cycle
    @(negedge clk);
    for (int r = 0; r < 6; r++) begin req_valid[r] = 1; req_preg[r] = preg_t'(400 + r); end
    @(negedge clk); req_valid = '0;
    @(negedge clk); #1;
    check(pick_valid[3] == 4'b1111 && pick_preg[3][0] == 9'd400 && pick_preg[3][3] == 9'd403, "four per cluster");
    @(negedge clk); #1;
    check(pick_valid[3] == 4'b0011 && pick_preg[3][1] == 9'd405, "remaining two");
    @(negedge clk); #1 check(pending == 10'd0, "vector empty");
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

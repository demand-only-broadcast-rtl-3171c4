// tb_free_list: random allocations (up to 4 per cycle) and releases (up to 16
// per cycle) of bank 2's registers against a queue model; bank 0 style
// initial reservation is checked on a second instance.
module tb_free_list;
  import dob_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b1;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;

  logic [2:0]  alloc_cnt;
  preg_t [3:0] head;
  logic [7:0]  count;
  logic [15:0] free_valid;
  preg_t [15:0] free_preg;
  preg_t [3:0] head0;
  logic [7:0]  count0;

  free_list #(.BANK(2)) dut (.clk, .rst_n, .alloc_cnt, .head, .count, .free_valid, .free_preg);
  free_list #(.BANK(0), .INIT_USED(32)) dut0 (.clk, .rst_n, .alloc_cnt(3'd0), .head(head0), .count(count0),
                                              .free_valid(16'd0), .free_preg(free_preg));

  preg_t model [$];
  preg_t out [$];
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    alloc_cnt = '0; free_valid = '0; free_preg = '0;
    for (int i = 0; i < BANK_SIZE; i++) model.push_back(preg_t'(2*BANK_SIZE + i));
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    check(count0 == 8'(BANK_SIZE - 32) && head0[0] == preg_t'(32), "bank 0 starts after the architectural registers");
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      check(count == 8'(model.size()), $sformatf("count %0d vs %0d", count, model.size()));
      for (int k = 0; k < 4; k++)
        if (k < model.size()) check(head[k] == model[k], $sformatf("head[%0d] %0d vs %0d", k, head[k], model[k]));
      alloc_cnt = 3'($urandom_range(4));
      if (alloc_cnt > model.size()) alloc_cnt = 3'(model.size());
      free_valid = '0;
      if (out.size() > 0 && $urandom_range(1)) begin
        int n;
        n = $urandom_range(out.size() < 16 ? out.size() : 16);
        for (int f = 0; f < 16 && n > 0; f++)
          if ($urandom_range(1)) begin
            free_valid[f] = 1'b1;
            free_preg[f]  = out.pop_front();
            n--;
          end
      end
      @(posedge clk);
      for (int k = 0; k < alloc_cnt; k++) out.push_back(model.pop_front());
      for (int f = 0; f < 16; f++) if (free_valid[f]) model.push_back(free_preg[f]);
      out.shuffle();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

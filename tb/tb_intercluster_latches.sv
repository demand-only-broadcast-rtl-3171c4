// tb_intercluster_latches: a chain of depth 3 (cluster 0 to cluster 3) must
// deliver every value exactly 3 cycles after it was sent, and nothing while
// in reset.
module tb_intercluster_latches;
  import dob_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b1;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;

  tag_bus_t d, q;
  tag_bus_t sent [$];
  int checks = 0, failures = 0;

  intercluster_latches #(.T(tag_bus_t), .DEPTH(3)) dut (.*);

  initial begin
    d = '0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (q.valid) failures++;
    @(negedge clk) rst_n = 1'b1;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      d.valid = 1'(($urandom_range(3)) != 0);
      d.tag   = preg_t'($urandom);
      @(posedge clk);
      sent.push_back(d);
      #1;
      if (sent.size() >= 3) begin  // sent in cycle t, seen in cycle t+3
        tag_bus_t e;
        e = sent.pop_front();
        checks++;
        if (q != e) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d q=%p expected %p", t, q, e);
        end
      end
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

// tb_regfile: writes random values through all 16 write ports (each port in
// its own bank), reads them back through the 8 read ports and compares with a
// shadow copy. Also checks that a read in the cycle of a write returns the
// old value, as the cluster's bypass expects.
module tb_regfile;
  import dob_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  data_bus_t [15:0] wr;
  preg_t     [7:0]  rd_addr;
  data_t     [7:0]  rd_data;
  data_t shadow [NUM_PREGS];
  logic  [NUM_PREGS-1:0] known;
  int checks = 0, failures = 0;

  regfile dut (.clk, .wr, .rd_addr, .rd_data);

  initial begin
    known = '0;
    wr = '0;
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      // new writes: distinct registers, port w in bank w/4
      wr = '0;
      for (int w = 0; w < 16; w++) begin
        if ($urandom_range(3) != 0) begin
          wr[w].valid = 1'b1;
          wr[w].tag   = preg_t'((w / 4) * BANK_SIZE + (w % 4) * 32 + $urandom_range(31));
          wr[w].data  = {$urandom, $urandom};
        end
      end
      for (int r = 0; r < 8; r++) rd_addr[r] = preg_t'($urandom_range(NUM_PREGS-1));
      if (t > 0 && wr[0].valid) rd_addr[0] = wr[0].tag;  // same-cycle read of a written register
      #1;
      for (int r = 0; r < 8; r++)
        if (known[rd_addr[r]]) begin
          checks++;
          if (rd_data[r] !== shadow[rd_addr[r]]) begin
            failures++;
            if (failures < 10) $display("FAIL t=%0d read p%0d got %h exp %h", t, rd_addr[r], rd_data[r], shadow[rd_addr[r]]);
          end
        end
      @(posedge clk);
      for (int w = 0; w < 16; w++)
        if (wr[w].valid) begin
          shadow[wr[w].tag] = wr[w].data;
          known[wr[w].tag]  = 1'b1;
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

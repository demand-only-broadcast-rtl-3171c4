// tb_select_logic: random request vectors against a reference that grants
// the lowest-numbered requesting entries, up to 4.
module tb_select_logic;
  localparam int E = 64, G = 4;
  logic [E-1:0] req;
  logic [G-1:0] gnt_valid;
  logic [G-1:0][5:0] gnt_idx;
  int checks = 0, failures = 0;

  select_logic #(.ENTRIES(E), .GRANTS(G)) dut (.*);

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int n;
      req = {$urandom, $urandom};
      if (t % 3 == 0) req &= {$urandom, $urandom};   // sparser vectors
      if (t % 5 == 0) req &= {$urandom, $urandom};
      if (t == 0) req = '0;
      #1;
      n = 0;
      for (int i = 0; i < E; i++) begin
        if (req[i] && n < G) begin
          checks++;
          if (!(gnt_valid[n] && gnt_idx[n] == 6'(i))) begin
            failures++;
            $display("FAIL t=%0d grant %0d: expected %0d", t, n, i);
          end
          n++;
        end
      end
      for (int k = n; k < G; k++) begin
        checks++;
        if (gnt_valid[k]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

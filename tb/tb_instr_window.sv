// tb_instr_window: random allocation (up to 16 per cycle), completion in a
// random order (up to 16 per cycle) and in-order retirement. Every
// instruction must retire exactly once, in program order, with its result
// and destination, free the register recorded at allocation, never before it
// completed, and never more than 512 may be in flight.
module tb_instr_window;
  import dob_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b1;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;

  localparam int N = 3000;

  logic  [4:0]  alloc_cnt;
  logic  [15:0] alloc_dst_v;
  areg_t [15:0] alloc_dst;
  preg_t [15:0] alloc_old;
  iwidx_t       tail;
  logic  [9:0]  free_cnt;
  complete_t [15:0] done;
  logic  [15:0] ret_valid, ret_dst_v, free_valid;
  areg_t [15:0] ret_dst;
  data_t [15:0] ret_data;
  preg_t [15:0] free_preg;

  instr_window dut (.*);

  int checks = 0, failures = 0;
  int nalloc = 0, nret = 0, inflight = 0, max_inflight = 0;
  int slot_of [N];
  bit completed [N];
  int pend [$];          // allocated, not completed

  function automatic areg_t dst_of(int i); return areg_t'(i * 7); endfunction
  function automatic preg_t old_of(int i); return preg_t'(i * 13); endfunction
  function automatic data_t val_of(int i); return data_t'(i) * 64'h9e3779b97f4a7c15; endfunction

  task automatic check(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    alloc_cnt = '0; alloc_dst_v = '0; alloc_dst = '0; alloc_old = '0; done = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    while (nret < N) begin
      int n, want;
      @(negedge clk);
      // allocate
      want = $urandom_range(16);
      if (want > N - nalloc) want = N - nalloc;
      if (want > int'(free_cnt)) want = int'(free_cnt);
      alloc_cnt = 5'(want);
      for (int a = 0; a < 16; a++) begin
        alloc_dst_v[a] = (a < want) && ((nalloc + a) % 5 != 0);
        alloc_dst[a]   = dst_of(nalloc + a);
        alloc_old[a]   = old_of(nalloc + a);
      end
      // complete a random subset of pending instructions
      done = '0;
      pend.shuffle();
      n = 0;
      while (n < 16 && pend.size() > 0 && $urandom_range(3) != 0) begin
        int i;
        i = pend.pop_front();
        done[n] = '{valid: 1'b1, iw_idx: iwidx_t'(slot_of[i]), data: val_of(i)};
        completed[i] = 1;
        n++;
      end
      #1;
      // retire outputs of this cycle
      for (int r = 0; r < 16; r++) if (ret_valid[r]) begin
        int i;
        i = nret + r;
        check(i < nalloc, "retired an unallocated instruction");
        check(ret_dst_v[r] == ((i % 5) != 0) && ret_dst[r] == dst_of(i) && ret_data[r] == val_of(i),
              $sformatf("retire %0d content", i));
        check(free_valid[r] == ((i % 5) != 0) && (!free_valid[r] || free_preg[r] == old_of(i)),
              $sformatf("retire %0d frees its old register", i));
      end
      @(posedge clk);
      for (int a = 0; a < want; a++) begin
        slot_of[nalloc + a] = (int'(tail) + a) % IW_ENTRIES;
        pend.push_back(nalloc + a);
      end
      nalloc += want;
      nret   += $countones(ret_valid);
      inflight = nalloc - nret;
      if (inflight > max_inflight) max_inflight = inflight;
      check(inflight <= IW_ENTRIES, "more than 512 in flight");
    end
    check(max_inflight > 400, "window nearly filled at least once");
    $display("retired %0d, max in flight %0d", nret, max_inflight);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

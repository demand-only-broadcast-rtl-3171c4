// instr_window: the in-order instruction window (issued, not yet retired).
//
// A circular buffer of ENTRIES slots. The rename/steer stage allocates up to
// ALLOC_W consecutive slots per cycle in program order, recording for each the
// architectural destination and the physical register that destination was
// mapped to before (to be freed at retirement). Completing instructions
// (up to NDONE per cycle) mark their slot done and leave their result.
// Up to RETIRE_W of the oldest done instructions retire per cycle, in order:
// each frees its old physical register and presents its destination and
// result on the retire ports (the architectural commit stream).
//
// Interface timing: tail and free_cnt are valid in the cycle of allocation;
// an instruction completing in cycle t can retire in cycle t+1.
// The document gives the window size (512 in flight) and the RETIRE stage;
// the organisation, the widths and the result field are this design's.
module instr_window
  import dob_pkg::*;
#(
  parameter int unsigned ENTRIES  = IW_ENTRIES,
  parameter int unsigned ALLOC_W  = RENAME_WIDTH,
  parameter int unsigned NDONE    = NUM_TAG_BUSES,
  parameter int unsigned RETIRE_W = RENAME_WIDTH
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // allocation
  input  logic  [$clog2(ALLOC_W+1)-1:0] alloc_cnt,
  input  logic  [ALLOC_W-1:0]           alloc_dst_v,
  input  areg_t [ALLOC_W-1:0]           alloc_dst,
  input  preg_t [ALLOC_W-1:0]           alloc_old,
  output iwidx_t                        tail,
  output logic  [$clog2(ENTRIES+1)-1:0] free_cnt,
  // completion
  input  complete_t [NDONE-1:0]         done,
  // retirement
  output logic  [RETIRE_W-1:0]          ret_valid,
  output logic  [RETIRE_W-1:0]          ret_dst_v,
  output areg_t [RETIRE_W-1:0]          ret_dst,
  output data_t [RETIRE_W-1:0]          ret_data,
  output logic  [RETIRE_W-1:0]          free_valid,
  output preg_t [RETIRE_W-1:0]          free_preg
);
  localparam int unsigned W = $clog2(ENTRIES);

  typedef struct packed {
    logic  dst_v;
    areg_t dst;
    preg_t old;
  } info_t;

  info_t              info [ENTRIES];
  data_t              res  [ENTRIES];
  logic [ENTRIES-1:0] done_q;
  logic [W-1:0]       head_q, tail_q;
  logic [$clog2(ENTRIES+1)-1:0] cnt_q;
  logic [$clog2(RETIRE_W+1)-1:0] nret;

  assign tail     = iwidx_t'(tail_q);
  assign free_cnt = ($clog2(ENTRIES+1))'(ENTRIES) - cnt_q;

  always_comb begin
    logic stop;
    stop = 1'b0;
    nret = '0;
    for (int unsigned r = 0; r < RETIRE_W; r++) begin
      logic [W-1:0] s;
      s = W'(head_q + W'(r));
      ret_valid[r] = 1'b0;
      if (!stop && r < cnt_q && done_q[s]) begin
        ret_valid[r] = 1'b1;
        nret = nret + 1'b1;
      end else stop = 1'b1;
      ret_dst_v[r]  = info[s].dst_v;
      ret_dst[r]    = info[s].dst;
      ret_data[r]   = res[s];
      free_valid[r] = ret_valid[r] && info[s].dst_v;
      free_preg[r]  = info[s].old;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head_q <= '0;
      tail_q <= '0;
      cnt_q  <= '0;
      done_q <= '0;
    end else begin
      for (int unsigned r = 0; r < RETIRE_W; r++)
        if (ret_valid[r]) done_q[W'(head_q + W'(r))] <= 1'b0;
      for (int unsigned d = 0; d < NDONE; d++)
        if (done[d].valid) done_q[W'(done[d].iw_idx)] <= 1'b1;
      head_q <= W'(head_q + W'(nret));
      tail_q <= W'(tail_q + W'(alloc_cnt));
      cnt_q  <= cnt_q + ($clog2(ENTRIES+1))'(alloc_cnt) - ($clog2(ENTRIES+1))'(nret);
    end
  end

  always_ff @(posedge clk) begin
    for (int unsigned a = 0; a < ALLOC_W; a++)
      if (a < alloc_cnt)
        info[W'(tail_q + W'(a))] <= '{dst_v: alloc_dst_v[a], dst: alloc_dst[a], old: alloc_old[a]};
    for (int unsigned d = 0; d < NDONE; d++)
      if (done[d].valid) res[W'(done[d].iw_idx)] <= done[d].data;
  end

  always_ff @(posedge clk)
    if (rst_n) assert (32'(alloc_cnt) <= 32'(free_cnt)) else $error("instr_window: overflow");
endmodule

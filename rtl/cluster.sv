// cluster: one execution cluster of the Demand-Only Broadcast core.
//
// Contents: a copy of the Busy-Bit Table, the scheduling window with its
// wakeup and select logic, a copy of the physical register file, FU_PER_CL
// general-purpose functional units, and the data and tag bypass.
//
// Pipeline of an instruction selected in cycle t:
//   t    WAKEUP/SELECT  destination tag driven on this cluster's tag bus
//                       (local wakeup at the edge, dependant selectable at t+1)
//   t+1  RF READ 1
//   t+2  RF READ 2      register file read
//   t+3  EXEC           operands from the register file or from the bypass
//                       latches (results written in t+2); result on the data bus
// so the data follows the tag by TAG_TO_DATA = 3 cycles. The window entry is
// freed when the instruction executes.
//
// Broadcast inputs: tag_in/data_in carry the broadcasts of all NUM_TAG_BUSES
// functional units of the core, bus s*FU_PER_CL+f belonging to unit f of
// cluster s, already delayed by the inter-cluster latches; the slots of this
// cluster are ignored and replaced by its own buses.
//
// Demand-Only Broadcast: when a tag arrives, the Busy-Bit Table reads its Use
// bit; the answer is delayed TAG_TO_DATA cycles and enables the data bus of
// that unit in the same cycle the data arrives. A disabled result is neither
// written to this register file copy nor latched for bypass (blocked). Local
// results always pass, because an instruction sets the Use bit of its own
// destination when issued.
//
// The structure, the stage names and the gating follow the document; the
// one-stage bypass placement and the counters are this design's.
module cluster
  import dob_pkg::*;
#(
  parameter int unsigned CLUSTER_ID = 0,
  parameter int unsigned ENTRIES    = SW_ENTRIES
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // issue (from the steering pipeline)
  input  uop_t      [ISSUE_PORTS-1:0]       iss,
  input  uop_t      [NUM_CLUSTERS*ISSUE_PORTS-1:0] clr_uop,
  output logic      [ISSUE_PORTS-1:0][1:0]  copy_req,
  // broadcast network
  input  tag_bus_t  [NUM_TAG_BUSES-1:0]     tag_in,
  input  data_bus_t [NUM_TAG_BUSES-1:0]     data_in,
  output tag_bus_t  [FU_PER_CL-1:0]         tag_out,
  output data_bus_t [FU_PER_CL-1:0]         data_out,
  // completion and window release
  output complete_t [FU_PER_CL-1:0]         done,
  output logic      [$clog2(FU_PER_CL+1)-1:0] dealloc_cnt,
  // event counts for this cycle
  output logic      [4:0]                   n_rf_writes,
  output logic      [4:0]                   n_blocked,
  output logic      [3:0]                   n_bypass,
  output logic      [4:0]                   n_remote_writes
);
  localparam int unsigned EW = $clog2(ENTRIES);
  localparam int unsigned LO = CLUSTER_ID * FU_PER_CL;

  typedef struct packed {
    logic          valid;
    uop_t          uop;
    logic [EW-1:0] idx;
  } stage_t;

  typedef struct packed {
    logic          valid;
    uop_t          uop;
    logic [EW-1:0] idx;
    data_t         a;
    data_t         b;
  } ex_t;

  // ---------------- scheduling ----------------
  logic      [FU_PER_CL-1:0]          sel_valid;
  uop_t      [FU_PER_CL-1:0]          sel_uop;
  logic      [FU_PER_CL-1:0][EW-1:0]  sel_idx;
  logic      [ISSUE_PORTS-1:0][1:0]   iss_ready;
  tag_bus_t  [NUM_TAG_BUSES-1:0]      tags;
  logic      [NUM_TAG_BUSES-1:0]      use_en;
  logic      [FU_PER_CL-1:0]          free_valid;
  logic      [FU_PER_CL-1:0][EW-1:0]  free_idx;
  logic      [$clog2(ENTRIES+1)-1:0]  win_free_cnt;

  always_comb begin
    for (int unsigned k = 0; k < FU_PER_CL; k++) begin
      tag_out[k].valid = sel_valid[k] && sel_uop[k].dst_v;
      tag_out[k].tag   = sel_uop[k].dst;
    end
    tags = tag_in;
    for (int unsigned k = 0; k < FU_PER_CL; k++) tags[LO+k] = tag_out[k];
  end

  busy_bit_table u_bbt (
    .clk, .rst_n, .iss, .src_ready(iss_ready), .copy_req,
    .clr_uop, .tag(tags), .use_en);

  sched_window #(.ENTRIES(ENTRIES)) u_win (
    .clk, .rst_n, .iss, .iss_ready, .tag(tags),
    .sel_valid, .sel_uop, .sel_idx,
    .free_valid, .free_idx, .free_cnt(win_free_cnt));

  // ---------------- demand-only gating ----------------
  logic [TAG_TO_DATA-1:0][NUM_TAG_BUSES-1:0] en_pipe;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) en_pipe <= '0;
    else begin
      en_pipe[0] <= use_en;
      for (int unsigned i = 1; i < TAG_TO_DATA; i++) en_pipe[i] <= en_pipe[i-1];
    end
  end

  // ---------------- execution pipeline ----------------
  stage_t [FU_PER_CL-1:0] rf1_q, rf2_q;
  ex_t    [FU_PER_CL-1:0] ex_q;
  preg_t  [2*FU_PER_CL-1:0] rd_addr;
  data_t  [2*FU_PER_CL-1:0] rd_data;
  data_bus_t [NUM_TAG_BUSES-1:0] data_all, gated, byp_q;

  always_comb begin
    for (int unsigned k = 0; k < FU_PER_CL; k++) begin
      rd_addr[2*k]   = rf2_q[k].uop.src1;
      rd_addr[2*k+1] = rf2_q[k].uop.src2;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rf1_q <= '0;
      rf2_q <= '0;
      ex_q  <= '0;
      byp_q <= '0;
    end else begin
      for (int unsigned k = 0; k < FU_PER_CL; k++) begin
        rf1_q[k] <= '{valid: sel_valid[k], uop: sel_uop[k], idx: sel_idx[k]};
        rf2_q[k] <= rf1_q[k];
        ex_q[k]  <= '{valid: rf2_q[k].valid, uop: rf2_q[k].uop, idx: rf2_q[k].idx,
                      a: rd_data[2*k], b: rd_data[2*k+1]};
      end
      byp_q <= gated;
    end
  end

  function automatic logic [NUM_TAG_BUSES:0] bypass_hit(data_bus_t [NUM_TAG_BUSES-1:0] b, preg_t p);
    logic [NUM_TAG_BUSES:0] r;
    r = '0;
    for (int unsigned i = 0; i < NUM_TAG_BUSES; i++)
      if (b[i].valid && b[i].tag == p) r[i] = 1'b1;
    r[NUM_TAG_BUSES] = |r[NUM_TAG_BUSES-1:0];
    return r;
  endfunction

  data_t [FU_PER_CL-1:0] opa, opb, res;
  logic  [FU_PER_CL-1:0][1:0] byp_used;
  always_comb begin
    for (int unsigned k = 0; k < FU_PER_CL; k++) begin
      logic [NUM_TAG_BUSES:0] ha, hb;
      ha = bypass_hit(byp_q, ex_q[k].uop.src1);
      hb = bypass_hit(byp_q, ex_q[k].uop.src2);
      opa[k] = ex_q[k].a;
      opb[k] = ex_q[k].b;
      for (int unsigned i = 0; i < NUM_TAG_BUSES; i++) begin
        if (ha[i]) opa[k] = byp_q[i].data;
        if (hb[i]) opb[k] = byp_q[i].data;
      end
      byp_used[k][0] = ex_q[k].valid && ex_q[k].uop.src1_v && ha[NUM_TAG_BUSES];
      byp_used[k][1] = ex_q[k].valid && ex_q[k].uop.src2_v && hb[NUM_TAG_BUSES];
    end
  end

  for (genvar k = 0; k < FU_PER_CL; k++) begin : g_fu
    func_unit u_fu (.op(ex_q[k].uop.op), .a(opa[k]), .b(opb[k]),
                    .imm(ex_q[k].uop.imm), .y(res[k]));
  end

  always_comb begin
    for (int unsigned k = 0; k < FU_PER_CL; k++) begin
      data_out[k].valid = ex_q[k].valid && ex_q[k].uop.dst_v;
      data_out[k].tag   = ex_q[k].uop.dst;
      data_out[k].data  = res[k];
      done[k].valid     = ex_q[k].valid && !ex_q[k].uop.is_copy;
      done[k].iw_idx    = ex_q[k].uop.iw_idx;
      done[k].data      = res[k];
      free_valid[k]     = ex_q[k].valid;
      free_idx[k]       = ex_q[k].idx;
    end
    data_all = data_in;
    for (int unsigned k = 0; k < FU_PER_CL; k++) data_all[LO+k] = data_out[k];
    for (int unsigned i = 0; i < NUM_TAG_BUSES; i++) begin
      gated[i]       = data_all[i];
      gated[i].valid = data_all[i].valid && en_pipe[TAG_TO_DATA-1][i];
    end
  end

  regfile u_rf (.clk, .wr(gated), .rd_addr, .rd_data);

  // ---------------- counters ----------------
  always_comb begin
    dealloc_cnt     = '0;
    n_rf_writes     = '0;
    n_blocked       = '0;
    n_bypass        = '0;
    n_remote_writes = '0;
    for (int unsigned k = 0; k < FU_PER_CL; k++) begin
      dealloc_cnt += ($clog2(FU_PER_CL+1))'(free_valid[k]);
      n_bypass    += 4'(byp_used[k][0]) + 4'(byp_used[k][1]);
    end
    for (int unsigned i = 0; i < NUM_TAG_BUSES; i++) begin
      n_rf_writes += 5'(gated[i].valid);
      n_blocked   += 5'(data_all[i].valid && !gated[i].valid);
      if (i / FU_PER_CL != CLUSTER_ID) n_remote_writes += 5'(gated[i].valid);
    end
  end

  // A data broadcast is enabled only if its tag was seen TAG_TO_DATA cycles ago.
  always_ff @(posedge clk)
    if (rst_n)
      for (int unsigned i = 0; i < NUM_TAG_BUSES; i++)
        if (en_pipe[TAG_TO_DATA-1][i])
          assert (data_all[i].valid) else $error("cluster %0d: enabled bus %0d carries no data", CLUSTER_ID, i);

  logic unused;
  assign unused = ^win_free_cnt;
endmodule

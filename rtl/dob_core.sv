// dob_core: a 4-cluster, 16-wide clustered out-of-order execution core with a
// replicated, banked physical register file and Demand-Only Broadcast.
//
// Every cluster holds a full copy of the register file, but a result is
// written into (and bypassed within) a remote cluster only if, when the
// producer's tag reaches that cluster, some instruction there has already
// marked the register as used in its Busy-Bit Table. A consumer that arrives
// after its producer's data was blocked asks for a copy instruction, which the
// steering logic inserts into the producer's cluster to broadcast the value
// again.
//
// Datapath, from decoded instructions to retirement:
//   rename_steer        renames up to 16 instructions per cycle, steers each to
//                       a cluster and inserts copy instructions;
//   issue pipeline      STEER_TO_ISSUE = 3 register stages (routing delay);
//   cluster x 4         Busy-Bit Table, scheduling window, select, register
//                       file copy, 4 functional units, demand-only gating;
//   intercluster_latches one chain per ordered pair of clusters, |i-j| cycles
//                       long, for the 4 tag buses and the 4 result buses;
//   copy_request_unit   Copy Request Vector, 2 cycles after issue;
//   free_list x 4       free registers of each bank;
//   instr_window        512-entry in-order window, frees registers at retire.
//
// Interface: in_valid/in_insn offer up to 16 decoded instructions in program
// order (in_valid a prefix); accept_cnt of them are taken this cycle and the
// rest must be offered again. The retire ports give the architectural commit
// stream in order. The ev_* outputs count, per cycle, the events the design
// is about (register file writes, blocked broadcasts, copy requests and
// insertions, steering outcomes, bypasses). After reset, architectural
// register r is mapped to physical register r; its value is undefined until
// written.
//
// Fetch, decode, caches, branch prediction and memory instructions are not
// part of this core. The organisation follows the document; the instruction
// set and the points listed in each block are this design's choices.
module dob_core
  import dob_pkg::*;
(
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic  [RENAME_WIDTH-1:0]       in_valid,
  input  insn_t [RENAME_WIDTH-1:0]       in_insn,
  output logic  [$clog2(RENAME_WIDTH+1)-1:0] accept_cnt,
  output logic  [RENAME_WIDTH-1:0]       ret_valid,
  output logic  [RENAME_WIDTH-1:0]       ret_dst_v,
  output areg_t [RENAME_WIDTH-1:0]       ret_dst,
  output data_t [RENAME_WIDTH-1:0]       ret_data,
  output logic  [7:0]                    ev_rf_writes,     // register file writes, all copies
  output logic  [7:0]                    ev_remote_writes, // of which into a remote cluster
  output logic  [7:0]                    ev_blocked,       // result broadcasts blocked
  output logic  [7:0]                    ev_bypass,        // operands taken from the bypass
  output logic  [7:0]                    ev_results,       // results produced
  output logic  [5:0]                    ev_copy_req,      // copy requests from the BBTs
  output logic  [4:0]                    ev_copies,        // copy instructions inserted
  output logic  [4:0]                    ev_with_src,
  output logic  [4:0]                    ev_not_pref,
  output logic  [4:0]                    ev_modulo,
  output logic                           ev_stall
);
  localparam int unsigned NCL = NUM_CLUSTERS;

  // ---------------- rename / steer ----------------
  preg_t [NCL-1:0][ISSUE_PORTS-1:0]                 fl_head;
  logic  [NCL-1:0][$clog2(BANK_SIZE+1)-1:0]         fl_count;
  logic  [NCL-1:0][$clog2(ISSUE_PORTS+1)-1:0]       fl_alloc;
  iwidx_t                                           iw_tail;
  logic  [$clog2(IW_ENTRIES+1)-1:0]                 iw_free;
  logic  [RENAME_WIDTH-1:0]                         iw_dst_v;
  areg_t [RENAME_WIDTH-1:0]                         iw_dst;
  preg_t [RENAME_WIDTH-1:0]                         iw_old;
  logic  [NCL-1:0][$clog2(ISSUE_PORTS+1)-1:0]       copy_slots;
  logic  [NCL-1:0][ISSUE_PORTS-1:0]                 pick_valid;
  preg_t [NCL-1:0][ISSUE_PORTS-1:0]                 pick_preg;
  logic  [NCL-1:0][$clog2(FU_PER_CL+1)-1:0]         dealloc_cnt;
  uop_t  [NCL-1:0][ISSUE_PORTS-1:0]                 steer_uop;
  logic  [$clog2(NUM_PREGS+1)-1:0]                  crv_pending;

  rename_steer u_steer (
    .clk, .rst_n, .in_valid, .in_insn, .accept_cnt,
    .fl_head, .fl_count, .fl_alloc,
    .iw_tail, .iw_free, .iw_dst_v, .iw_dst, .iw_old,
    .copy_slots, .pick_valid, .pick_preg, .dealloc_cnt,
    .out_uop(steer_uop),
    .n_not_pref(ev_not_pref), .n_with_src(ev_with_src), .n_modulo(ev_modulo),
    .n_copies(ev_copies), .stalled(ev_stall));

  // ---------------- free lists ----------------
  logic  [RENAME_WIDTH-1:0] rel_valid;
  preg_t [RENAME_WIDTH-1:0] rel_preg;

  for (genvar b = 0; b < NCL; b++) begin : g_fl
    logic [RENAME_WIDTH-1:0] fv;
    always_comb
      for (int unsigned r = 0; r < RENAME_WIDTH; r++)
        fv[r] = rel_valid[r] && bank_of(rel_preg[r]) == CL_W'(b);
    free_list #(.BANK(b), .INIT_USED(b == 0 ? NUM_AREGS : 0)) u_fl (
      .clk, .rst_n, .alloc_cnt(fl_alloc[b]), .head(fl_head[b]), .count(fl_count[b]),
      .free_valid(fv), .free_preg(rel_preg));
  end

  // ---------------- instruction window ----------------
  complete_t [NCL-1:0][FU_PER_CL-1:0] done;

  instr_window u_iw (
    .clk, .rst_n,
    .alloc_cnt(accept_cnt), .alloc_dst_v(iw_dst_v), .alloc_dst(iw_dst), .alloc_old(iw_old),
    .tail(iw_tail), .free_cnt(iw_free),
    .done(done),
    .ret_valid, .ret_dst_v, .ret_dst, .ret_data,
    .free_valid(rel_valid), .free_preg(rel_preg));

  // ---------------- steer-to-issue pipeline ----------------
  uop_t [STEER_TO_ISSUE-1:0][NCL-1:0][ISSUE_PORTS-1:0] pipe_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pipe_q <= '0;
    else begin
      pipe_q[0] <= steer_uop;
      for (int unsigned s = 1; s < STEER_TO_ISSUE; s++) pipe_q[s] <= pipe_q[s-1];
    end
  end

  uop_t [NCL-1:0][ISSUE_PORTS-1:0] iss;
  uop_t [NCL*ISSUE_PORTS-1:0]      iss_all;
  assign iss     = pipe_q[STEER_TO_ISSUE-1];
  assign iss_all = iss;

  // ---------------- copy request vector ----------------
  logic  [NCL-1:0][ISSUE_PORTS-1:0][1:0] copy_req;
  logic  [2*NCL*ISSUE_PORTS-1:0]         req_valid;
  preg_t [2*NCL*ISSUE_PORTS-1:0]         req_preg;
  always_comb begin
    for (int unsigned c = 0; c < NCL; c++)
      for (int unsigned p = 0; p < ISSUE_PORTS; p++) begin
        req_valid[(c*ISSUE_PORTS+p)*2]   = copy_req[c][p][0];
        req_preg [(c*ISSUE_PORTS+p)*2]   = iss[c][p].src1;
        req_valid[(c*ISSUE_PORTS+p)*2+1] = copy_req[c][p][1];
        req_preg [(c*ISSUE_PORTS+p)*2+1] = iss[c][p].src2;
      end
  end

  copy_request_unit u_crv (
    .clk, .rst_n, .req_valid, .req_preg, .slots(copy_slots),
    .pick_valid, .pick_preg, .pending(crv_pending));

  // ---------------- clusters and broadcast network ----------------
  tag_bus_t  [NCL-1:0][FU_PER_CL-1:0]     tag_out;
  data_bus_t [NCL-1:0][FU_PER_CL-1:0]     data_out;
  tag_bus_t  [NCL-1:0][NUM_TAG_BUSES-1:0] tag_in;
  data_bus_t [NCL-1:0][NUM_TAG_BUSES-1:0] data_in;
  logic      [NCL-1:0][4:0]               n_wr, n_blk, n_rw;
  logic      [NCL-1:0][3:0]               n_byp;

  for (genvar c = 0; c < NCL; c++) begin : g_cl
    for (genvar s = 0; s < NCL; s++) begin : g_src
      if (s == c) begin : g_local
        // The cluster uses its own buses directly.
        assign tag_in[c][s*FU_PER_CL +: FU_PER_CL]  = '0;
        assign data_in[c][s*FU_PER_CL +: FU_PER_CL] = '0;
      end else begin : g_remote
        intercluster_latches #(.T(tag_bus_t [FU_PER_CL-1:0]), .DEPTH(cl_dist(s, c))) u_tag_lat (
          .clk, .rst_n, .d(tag_out[s]), .q(tag_in[c][s*FU_PER_CL +: FU_PER_CL]));
        intercluster_latches #(.T(data_bus_t [FU_PER_CL-1:0]), .DEPTH(cl_dist(s, c))) u_data_lat (
          .clk, .rst_n, .d(data_out[s]), .q(data_in[c][s*FU_PER_CL +: FU_PER_CL]));
      end
    end

    cluster #(.CLUSTER_ID(c)) u_cluster (
      .clk, .rst_n,
      .iss(iss[c]), .clr_uop(iss_all), .copy_req(copy_req[c]),
      .tag_in(tag_in[c]), .data_in(data_in[c]),
      .tag_out(tag_out[c]), .data_out(data_out[c]),
      .done(done[c]), .dealloc_cnt(dealloc_cnt[c]),
      .n_rf_writes(n_wr[c]), .n_blocked(n_blk[c]), .n_bypass(n_byp[c]),
      .n_remote_writes(n_rw[c]));
  end

  always_comb begin
    ev_rf_writes     = '0;
    ev_remote_writes = '0;
    ev_blocked       = '0;
    ev_bypass        = '0;
    ev_results       = '0;
    ev_copy_req      = '0;
    for (int unsigned c = 0; c < NCL; c++) begin
      ev_rf_writes     += 8'(n_wr[c]);
      ev_remote_writes += 8'(n_rw[c]);
      ev_blocked       += 8'(n_blk[c]);
      ev_bypass        += 8'(n_byp[c]);
      for (int unsigned k = 0; k < FU_PER_CL; k++)
        ev_results += 8'(data_out[c][k].valid);
    end
    for (int unsigned r = 0; r < 2*NCL*ISSUE_PORTS; r++)
      ev_copy_req += 6'(req_valid[r]);
  end

  logic unused;
  assign unused = ^crv_pending;
endmodule

// sched_window: one cluster's non-compacting scheduling window with wakeup
// and select.
//
// Each entry holds two source tags with their Ready bits, the destination tag
// (the Destination Tag Array) and the payload needed to execute (operation,
// immediate, instruction-window slot, copy flag). Every cycle each source tag
// is compared against all NTAGS destination tag buses and the Ready bit is set
// on a match. An entry whose Ready bits are both set requests execution;
// select_logic grants up to FU_PER_CL entries, whose destination tags the
// cluster drives onto its tag buses in the same cycle. A granted entry stays
// in place (marked selected) until the cluster frees it after it executes.
//
// Issue: up to IPORTS new entries per cycle are written into the lowest free
// slots, with Ready bits taken from the Busy-Bit Table (which already includes
// same-cycle tag buses). The steering logic guarantees a free slot exists
// (asserted). Entries never move. free_cnt counts unoccupied entries.
//
// Wakeup CAM, Ready bits, destination tag array, non-compacting layout and
// deallocation after execution follow the document; fixed low-index select
// priority and first-free slot allocation are this design's choices.
module sched_window
  import dob_pkg::*;
#(
  parameter int unsigned ENTRIES = SW_ENTRIES,
  parameter int unsigned IPORTS  = ISSUE_PORTS,
  parameter int unsigned NTAGS   = NUM_TAG_BUSES,
  parameter int unsigned NSEL    = FU_PER_CL
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  uop_t      [IPORTS-1:0]      iss,
  input  logic      [IPORTS-1:0][1:0] iss_ready,
  input  tag_bus_t  [NTAGS-1:0]       tag,
  output logic      [NSEL-1:0]        sel_valid,
  output uop_t      [NSEL-1:0]        sel_uop,
  output logic      [NSEL-1:0][$clog2(ENTRIES)-1:0] sel_idx,
  input  logic      [NSEL-1:0]        free_valid,   // entries done executing
  input  logic      [NSEL-1:0][$clog2(ENTRIES)-1:0] free_idx,
  output logic      [$clog2(ENTRIES+1)-1:0] free_cnt
);
  localparam int unsigned IW = $clog2(ENTRIES);

  uop_t             ent   [ENTRIES];
  logic [ENTRIES-1:0] valid_q, selected_q, r1_q, r2_q;
  logic [ENTRIES-1:0] req;

  assign req = valid_q & ~selected_q & r1_q & r2_q;

  select_logic #(.ENTRIES(ENTRIES), .GRANTS(NSEL)) u_select (
    .req(req), .gnt_valid(sel_valid), .gnt_idx(sel_idx));

  always_comb begin
    for (int unsigned k = 0; k < NSEL; k++) sel_uop[k] = ent[sel_idx[k]];
  end

  always_comb begin
    free_cnt = '0;
    for (int unsigned i = 0; i < ENTRIES; i++)
      free_cnt += ($clog2(ENTRIES+1))'(!valid_q[i]);
  end

  // Slot for each issue port: the lowest free entries in port order.
  logic [IPORTS-1:0]         slot_ok;
  logic [IPORTS-1:0][IW-1:0] slot;
  always_comb begin
    logic [ENTRIES-1:0] taken;
    taken   = valid_q;
    slot_ok = '0;
    slot    = '0;
    for (int unsigned p = 0; p < IPORTS; p++) begin
      if (iss[p].valid) begin
        for (int unsigned i = 0; i < ENTRIES; i++) begin
          if (!taken[i] && !slot_ok[p]) begin
            slot_ok[p] = 1'b1;
            slot[p]    = IW'(i);
            taken[i]   = 1'b1;
          end
        end
      end
    end
  end

  function automatic logic hit(tag_bus_t [NTAGS-1:0] t, preg_t p);
    logic h;
    h = 1'b0;
    for (int unsigned i = 0; i < NTAGS; i++) h |= t[i].valid && t[i].tag == p;
    return h;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q    <= '0;
      selected_q <= '0;
      r1_q       <= '0;
      r2_q       <= '0;
    end else begin
      // Wakeup.
      for (int unsigned i = 0; i < ENTRIES; i++) begin
        if (valid_q[i] && ent[i].src1_v && hit(tag, ent[i].src1)) r1_q[i] <= 1'b1;
        if (valid_q[i] && ent[i].src2_v && hit(tag, ent[i].src2)) r2_q[i] <= 1'b1;
      end
      for (int unsigned k = 0; k < NSEL; k++)
        if (sel_valid[k]) selected_q[sel_idx[k]] <= 1'b1;
      for (int unsigned k = 0; k < NSEL; k++)
        if (free_valid[k]) valid_q[free_idx[k]] <= 1'b0;
      // Insertion.
      for (int unsigned p = 0; p < IPORTS; p++)
        if (iss[p].valid && slot_ok[p]) begin
          valid_q[slot[p]]    <= 1'b1;
          selected_q[slot[p]] <= 1'b0;
          r1_q[slot[p]]       <= iss_ready[p][0];
          r2_q[slot[p]]       <= iss_ready[p][1];
        end
    end
  end

  always_ff @(posedge clk)
    for (int unsigned p = 0; p < IPORTS; p++)
      if (iss[p].valid && slot_ok[p]) ent[slot[p]] <= iss[p];

  always_ff @(posedge clk)
    if (rst_n)
      for (int unsigned p = 0; p < IPORTS; p++)
        if (iss[p].valid) assert (slot_ok[p]) else $error("sched_window: issued into a full window");
endmodule

// busy_bit_table: one cluster's Busy-Bit Table, extended for Demand-Only
// Broadcast.
//
// Each physical register has two bits in every cluster's copy:
//   Broadcast - its destination tag has been broadcast to this cluster;
//   Use       - some instruction in this cluster needs the register.
//
// Issue (up to ISSUE_PORTS instructions into this cluster per cycle). For each
// source the old entry is read, as a scoreboard would:
//   ready    = (Broadcast & Use) | tag of the source is on a tag bus now
//   copy_req = Broadcast & ~Use & not on a tag bus now: the producer already
//              broadcast, its data was blocked here, so a copy instruction must
//              re-broadcast it. The entry's Broadcast bit is then reset.
// The source's Use bit is set. The instruction also sets the Use bit of its own
// destination. Copy instructions are ready on insertion and touch no entry.
// Allocation clears: every instruction issued anywhere in the core (clr_uop)
// clears both bits of its destination register in every cluster's copy.
//
// Tag broadcast (up to NUM_TAG_BUSES per cycle): the Broadcast bit of the tag
// is set and its Use bit is read out as use_en, which gates the data broadcast
// TAG_TO_DATA cycles later. The Use read is bypassed with the sources of the
// instructions issued in the same cycle, so a consumer that arrives together
// with its producer's tag is never left without data.
//
// Priority within a cycle: allocation clear, then Use sets, then copy-request
// Broadcast reset, then tag Broadcast set. Reads (ready, copy_req, use_en) are
// combinational on the state before the edge, except that a register being
// allocated in the same cycle reads as clear. After reset the first INIT_USED
// registers (the initial architectural state) have both bits set.
//
// The two-bit entry, the issue-time reads, the copy condition and the Use-bit
// read at tag time follow the document; the same-cycle bypass of the Use read,
// the allocation clear of the Use bit and the priorities are this design's.
module busy_bit_table
  import dob_pkg::*;
#(
  parameter int unsigned NREGS     = NUM_PREGS,
  parameter int unsigned IPORTS    = ISSUE_PORTS,
  parameter int unsigned NTAGS     = NUM_TAG_BUSES,
  parameter int unsigned NCLR      = NUM_CLUSTERS * ISSUE_PORTS,
  parameter int unsigned INIT_USED = NUM_AREGS
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  uop_t     [IPORTS-1:0]      iss,        // instructions issued into this cluster
  output logic     [IPORTS-1:0][1:0] src_ready,
  output logic     [IPORTS-1:0][1:0] copy_req,   // copy needed for src (preg = iss.src1/src2)
  input  uop_t     [NCLR-1:0]        clr_uop,    // all instructions issued in the core
  input  tag_bus_t [NTAGS-1:0]       tag,
  output logic     [NTAGS-1:0]       use_en
);
  logic [NREGS-1:0] bc_q, use_q;

  function automatic logic on_tag_bus(tag_bus_t [NTAGS-1:0] t, preg_t p);
    logic hit;
    hit = 1'b0;
    for (int unsigned i = 0; i < NTAGS; i++) hit |= t[i].valid && t[i].tag == p;
    return hit;
  endfunction

  // Issue-time reads.
  always_comb begin
    for (int unsigned p = 0; p < IPORTS; p++) begin
      for (int unsigned s = 0; s < 2; s++) begin
        preg_t r;
        logic  v, hit, fresh, bc, us;
        r   = (s == 0) ? iss[p].src1   : iss[p].src2;
        v   = (s == 0) ? iss[p].src1_v : iss[p].src2_v;
        hit = on_tag_bus(tag, r);
        // A register allocated in this same cycle reads as clear: the old
        // bits belong to its previous lifetime.
        fresh = 1'b0;
        for (int unsigned c = 0; c < NCLR; c++)
          fresh |= clr_uop[c].valid && !clr_uop[c].is_copy && clr_uop[c].dst_v && clr_uop[c].dst == r;
        bc = bc_q[r] & ~fresh;
        us = use_q[r] & ~fresh;
        if (!iss[p].valid || !v) begin
          src_ready[p][s] = 1'b1;
          copy_req[p][s]  = 1'b0;
        end else if (iss[p].is_copy) begin
          src_ready[p][s] = 1'b1;
          copy_req[p][s]  = 1'b0;
        end else begin
          src_ready[p][s] = (bc & us) | hit;
          copy_req[p][s]  = bc & ~us & ~hit;
        end
      end
    end
  end

  // Tag-time Use read, bypassed with same-cycle issuing sources.
  always_comb begin
    for (int unsigned t = 0; t < NTAGS; t++) begin
      logic u;
      u = use_q[tag[t].tag];
      for (int unsigned p = 0; p < IPORTS; p++) begin
        u |= iss[p].valid && iss[p].src1_v && iss[p].src1 == tag[t].tag;
        u |= iss[p].valid && iss[p].src2_v && iss[p].src2 == tag[t].tag;
      end
      use_en[t] = tag[t].valid & u;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < NREGS; i++) begin
        bc_q[i]  <= (i < INIT_USED);
        use_q[i] <= (i < INIT_USED);
      end
    end else begin
      logic [NREGS-1:0] bc_n, use_n;
      bc_n  = bc_q;
      use_n = use_q;
      for (int unsigned c = 0; c < NCLR; c++)
        if (clr_uop[c].valid && !clr_uop[c].is_copy && clr_uop[c].dst_v) begin
          bc_n[clr_uop[c].dst]  = 1'b0;
          use_n[clr_uop[c].dst] = 1'b0;
        end
      for (int unsigned p = 0; p < IPORTS; p++)
        if (iss[p].valid && !iss[p].is_copy) begin
          if (iss[p].dst_v)  use_n[iss[p].dst]  = 1'b1;
          if (iss[p].src1_v) use_n[iss[p].src1] = 1'b1;
          if (iss[p].src2_v) use_n[iss[p].src2] = 1'b1;
          if (copy_req[p][0]) bc_n[iss[p].src1] = 1'b0;
          if (copy_req[p][1]) bc_n[iss[p].src2] = 1'b0;
        end
      for (int unsigned t = 0; t < NTAGS; t++)
        if (tag[t].valid) bc_n[tag[t].tag] = 1'b1;
      bc_q  <= bc_n;
      use_q <= use_n;
    end
  end
endmodule

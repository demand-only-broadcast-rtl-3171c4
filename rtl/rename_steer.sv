// rename_steer: register renaming, dependence-based steering and copy
// insertion (the DEP ANL/STEER stages).
//
// Per cycle up to WIDTH decoded instructions are handled in program order
// (in_valid must be a prefix). For each:
//   1. Sources are renamed through the Register Alias Table, including the
//      destinations of older instructions of the same group.
//   2. The preferred cluster is the bank of the first source's physical
//      register (its two top bits), else the second source's, else the
//      Modulo-N heuristic: the next MOD_N source-less instructions go to
//      cluster 0, the next MOD_N to cluster 1, and so on.
//   3. A cluster can take the instruction if it has a free issue port
//      (ISSUE_PORTS per cycle), a free scheduling-window entry and, when the
//      instruction writes a register, a free register in its bank. If the
//      preferred cluster cannot, the closest one that can is used (on a tie
//      the lower-numbered cluster). If none can, or the instruction window is
//      full, this instruction and all younger ones wait (accept_cnt tells how
//      many were taken).
//   4. The destination gets the next free register of the chosen cluster's
//      bank and the RAT is updated; the old mapping goes to the instruction
//      window for release at retirement.
// Copy instructions picked from the Copy Request Vector are placed first, in
// the lowest ports of their cluster, so they take issue ports and window
// entries from regular instructions. copy_slots tells the Copy Request Vector
// how many copies each cluster can accept this cycle.
//
// Window entries are tracked with a per-cluster occupancy count that rises
// when an instruction is steered and falls when the cluster releases an entry
// (so entries in the issue pipeline count as used). Outputs are combinational;
// the core delays them by STEER_TO_ISSUE cycles before the windows.
//
// The steering policy, the resource rules, the banked allocation and copy
// insertion follow the document; the tie rule, MOD_N, the single-cycle group
// rename and copies-first port priority are this design's.
module rename_steer
  import dob_pkg::*;
#(
  parameter int unsigned WIDTH   = RENAME_WIDTH,
  parameter int unsigned ENTRIES = SW_ENTRIES,
  parameter int unsigned MOD_N   = 4
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic  [WIDTH-1:0]             in_valid,
  input  insn_t [WIDTH-1:0]             in_insn,
  output logic  [$clog2(WIDTH+1)-1:0]   accept_cnt,
  // free lists
  input  preg_t [NUM_CLUSTERS-1:0][ISSUE_PORTS-1:0] fl_head,
  input  logic  [NUM_CLUSTERS-1:0][$clog2(BANK_SIZE+1)-1:0] fl_count,
  output logic  [NUM_CLUSTERS-1:0][$clog2(ISSUE_PORTS+1)-1:0] fl_alloc,
  // instruction window
  input  iwidx_t                        iw_tail,
  input  logic  [$clog2(IW_ENTRIES+1)-1:0] iw_free,
  output logic  [WIDTH-1:0]             iw_dst_v,
  output areg_t [WIDTH-1:0]             iw_dst,
  output preg_t [WIDTH-1:0]             iw_old,
  // copy insertion
  output logic  [NUM_CLUSTERS-1:0][$clog2(ISSUE_PORTS+1)-1:0] copy_slots,
  input  logic  [NUM_CLUSTERS-1:0][ISSUE_PORTS-1:0] pick_valid,
  input  preg_t [NUM_CLUSTERS-1:0][ISSUE_PORTS-1:0] pick_preg,
  // window release
  input  logic  [NUM_CLUSTERS-1:0][$clog2(FU_PER_CL+1)-1:0] dealloc_cnt,
  // steered instructions, per cluster and port
  output uop_t  [NUM_CLUSTERS-1:0][ISSUE_PORTS-1:0] out_uop,
  // event counts for this cycle
  output logic  [$clog2(WIDTH+1)-1:0]   n_not_pref,   // with a source, not in preferred cluster
  output logic  [$clog2(WIDTH+1)-1:0]   n_with_src,
  output logic  [$clog2(WIDTH+1)-1:0]   n_modulo,
  output logic  [4:0]                   n_copies,
  output logic                          stalled       // an offered instruction could not be placed
);
  localparam int unsigned PW = $clog2(ISSUE_PORTS+1);
  localparam int unsigned SW = $clog2(ENTRIES+1);

  preg_t [NUM_AREGS-1:0]           rat_q;
  logic  [NUM_CLUSTERS-1:0][SW-1:0] sw_used_q;
  logic  [15:0]                    mod_q;

  preg_t [NUM_AREGS-1:0]           rat_n;
  logic  [NUM_CLUSTERS-1:0][SW-1:0] win_used;
  logic  [15:0]                    mod_n;

  always_comb begin
    for (int unsigned c = 0; c < NUM_CLUSTERS; c++) begin
      int unsigned room;
      room = ENTRIES - int'(sw_used_q[c]);
      copy_slots[c] = PW'((room < ISSUE_PORTS) ? room : ISSUE_PORTS);
    end
  end

  always_comb begin
    logic [NUM_CLUSTERS-1:0][PW-1:0] ports;
    logic [NUM_CLUSTERS-1:0][PW-1:0] banku;
    logic stop;
    int unsigned iwu;
    preg_t s1, s2;
    logic [CL_W-1:0] pref, pick;
    logic found;
    int signed cs;
    uop_t u;

    s1 = '0; s2 = '0; pref = '0; pick = '0; found = 1'b0; cs = 0; u = '0;
    ports = '0;
    banku = '0;
    fl_alloc = '0;

    rat_n      = rat_q;
    mod_n      = mod_q;
    out_uop    = '0;
    accept_cnt = '0;
    iw_dst_v   = '0;
    iw_dst     = '0;
    iw_old     = '0;
    n_not_pref = '0;
    n_with_src = '0;
    n_modulo   = '0;
    n_copies   = '0;
    stalled    = 1'b0;
    stop       = 1'b0;
    iwu        = 0;

    // Copies first.
    for (int unsigned c = 0; c < NUM_CLUSTERS; c++) begin
      ports[c]    = '0;
      banku[c]    = '0;
      win_used[c] = sw_used_q[c];
      for (int unsigned k = 0; k < ISSUE_PORTS; k++) begin
        if (pick_valid[c][k]) begin
          out_uop[c][ports[c]] = '{valid: 1'b1, is_copy: 1'b1, op: OP_MOV,
                                   src1_v: 1'b1, src1: pick_preg[c][k],
                                   src2_v: 1'b0, src2: '0,
                                   dst_v: 1'b1, dst: pick_preg[c][k],
                                   imm: '0, iw_idx: '0};
          ports[c]    = ports[c] + 1'b1;
          win_used[c] = win_used[c] + 1'b1;
          n_copies    = n_copies + 1'b1;
        end
      end
    end

    for (int unsigned i = 0; i < WIDTH; i++) begin
      if (in_valid[i] && !stop) begin
        s1 = rat_n[in_insn[i].src1];
        s2 = rat_n[in_insn[i].src2];
        if (in_insn[i].src1_v)      pref = bank_of(s1);
        else if (in_insn[i].src2_v) pref = bank_of(s2);
        else                        pref = CL_W'((32'(mod_n) / MOD_N) % NUM_CLUSTERS);
        found = 1'b0;
        pick  = pref;
        for (int unsigned d = 0; d < NUM_CLUSTERS; d++) begin
          for (int unsigned side = 0; side < 2; side++) begin
            cs = (side == 0) ? int'(pref) - int'(d) : int'(pref) + int'(d);
            if (!found && cs >= 0 && cs < NUM_CLUSTERS && !(d == 0 && side == 1)) begin
              if (32'(ports[cs]) < ISSUE_PORTS && 32'(win_used[cs]) < ENTRIES &&
                  (!in_insn[i].dst_v || 32'(banku[cs]) < 32'(fl_count[cs]))) begin
                found = 1'b1;
                pick  = CL_W'(cs);
              end
            end
          end
        end
        if (!found || iwu >= int'(iw_free)) begin
          stop    = 1'b1;
          stalled = 1'b1;
        end else begin
          u.valid   = 1'b1;
          u.is_copy = 1'b0;
          u.op      = in_insn[i].op;
          u.src1_v  = in_insn[i].src1_v;
          u.src1    = s1;
          u.src2_v  = in_insn[i].src2_v;
          u.src2    = s2;
          u.dst_v   = in_insn[i].dst_v;
          u.dst     = in_insn[i].dst_v ? fl_head[pick][banku[pick][$clog2(ISSUE_PORTS)-1:0]] : '0;
          u.imm     = in_insn[i].imm;
          u.iw_idx  = iwidx_t'(iw_tail + iwidx_t'(i));
          out_uop[pick][ports[pick][$clog2(ISSUE_PORTS)-1:0]] = u;
          ports[pick]    = ports[pick] + 1'b1;
          win_used[pick] = win_used[pick] + 1'b1;
          iw_dst_v[i]    = in_insn[i].dst_v;
          iw_dst[i]      = in_insn[i].dst;
          iw_old[i]      = rat_n[in_insn[i].dst];
          if (in_insn[i].dst_v) begin
            banku[pick] = banku[pick] + 1'b1;
            rat_n[in_insn[i].dst] = u.dst;
          end
          if (in_insn[i].src1_v || in_insn[i].src2_v) begin
            n_with_src = n_with_src + 1'b1;
            if (pick != pref) n_not_pref = n_not_pref + 1'b1;
          end else begin
            mod_n    = mod_n + 1'b1;
            n_modulo = n_modulo + 1'b1;
          end
          iwu        = iwu + 1;
          accept_cnt = accept_cnt + 1'b1;
        end
      end
    end
    fl_alloc = banku;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned a = 0; a < NUM_AREGS; a++) rat_q[a] <= preg_t'(a);
      sw_used_q <= '0;
      mod_q     <= '0;
    end else begin
      rat_q <= rat_n;
      mod_q <= mod_n;
      for (int unsigned c = 0; c < NUM_CLUSTERS; c++)
        sw_used_q[c] <= win_used[c] - SW'(dealloc_cnt[c]);
    end
  end
endmodule

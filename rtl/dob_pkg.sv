// dob_pkg: shared sizes and types of the Demand-Only Broadcast execution core.
//
// The core has 4 clusters of 4 general-purpose functional units (16-wide),
// a physical register file of 512 entries replicated in every cluster and
// split into 4 write banks of 128 (bank c is written only by cluster c), a
// 64-entry scheduling window per cluster with 4 write (issue) ports, and a
// 512-entry instruction window. These numbers follow the document's main
// configuration. The data width (64, the width of an Alpha register), the
// number of architectural registers (32) and the micro-operation encoding are
// this design's own choices.
package dob_pkg;

  localparam int unsigned NUM_CLUSTERS  = 4;    // clusters
  localparam int unsigned FU_PER_CL     = 4;    // functional units per cluster
  localparam int unsigned NUM_TAG_BUSES = NUM_CLUSTERS * FU_PER_CL;  // 16
  localparam int unsigned ISSUE_PORTS   = 4;    // window write ports per cluster
  localparam int unsigned RENAME_WIDTH  = 16;   // instructions renamed/steered per cycle
  localparam int unsigned NUM_PREGS     = 512;  // physical registers
  localparam int unsigned PREG_W        = $clog2(NUM_PREGS);           // 9
  localparam int unsigned BANK_SIZE     = NUM_PREGS / NUM_CLUSTERS;    // 128
  localparam int unsigned CL_W          = $clog2(NUM_CLUSTERS);        // 2
  localparam int unsigned SW_ENTRIES    = 64;   // scheduling window entries per cluster
  localparam int unsigned IW_ENTRIES    = 512;  // instruction window (in flight)
  localparam int unsigned IW_W          = $clog2(IW_ENTRIES);
  localparam int unsigned NUM_AREGS     = 32;   // architectural registers
  localparam int unsigned AREG_W        = $clog2(NUM_AREGS);
  localparam int unsigned DATA_W        = 64;
  localparam int unsigned IMM_W         = 16;
  // Cycles from the tag broadcast (select) to the cycle the result is on the
  // data bus: RF READ, RF READ, EXEC.
  localparam int unsigned TAG_TO_DATA   = 3;
  // Cycles from steering to insertion into a scheduling window.
  localparam int unsigned STEER_TO_ISSUE = 3;
  // Cycles from issue (BBT read) until a copy request reaches the steering logic.
  localparam int unsigned ISSUE_TO_STEER = 2;

  typedef logic [PREG_W-1:0] preg_t;
  typedef logic [AREG_W-1:0] areg_t;
  typedef logic [DATA_W-1:0] data_t;
  typedef logic [IW_W-1:0]   iwidx_t;

  typedef enum logic [2:0] {
    OP_ADD = 3'd0,  // dst = src1 + src2
    OP_SUB = 3'd1,  // dst = src1 - src2
    OP_AND = 3'd2,  // dst = src1 & src2
    OP_OR  = 3'd3,  // dst = src1 | src2
    OP_XOR = 3'd4,  // dst = src1 ^ src2
    OP_ADDI= 3'd5,  // dst = src1 + sign-extended imm
    OP_LI  = 3'd6,  // dst = sign-extended imm (no source)
    OP_MOV = 3'd7   // dst = src1 (also used by copy instructions)
  } op_e;

  // Decoded instruction as it enters rename (architectural registers).
  typedef struct packed {
    op_e                op;
    logic               src1_v;
    areg_t              src1;
    logic               src2_v;
    areg_t              src2;
    logic               dst_v;
    areg_t              dst;
    logic [IMM_W-1:0]   imm;
  } insn_t;

  // Renamed instruction travelling from steering to a scheduling window.
  typedef struct packed {
    logic               valid;
    logic               is_copy;   // copy instruction: re-broadcasts src1 == dst
    op_e                op;
    logic               src1_v;
    preg_t              src1;
    logic               src2_v;
    preg_t              src2;
    logic               dst_v;
    preg_t              dst;
    logic [IMM_W-1:0]   imm;
    iwidx_t             iw_idx;    // instruction window slot (not used by copies)
  } uop_t;

  // Destination tag broadcast.
  typedef struct packed {
    logic  valid;
    preg_t tag;
  } tag_bus_t;

  // Result (data) broadcast.
  typedef struct packed {
    logic  valid;
    preg_t tag;
    data_t data;
  } data_bus_t;

  // Completion of a (non-copy) instruction, to the instruction window.
  typedef struct packed {
    logic   valid;
    iwidx_t iw_idx;
    data_t  data;
  } complete_t;

  function automatic logic [CL_W-1:0] bank_of(preg_t p);
    return p[PREG_W-1 -: CL_W];
  endfunction

  function automatic int unsigned cl_dist(int unsigned a, int unsigned b);
    return (a > b) ? a - b : b - a;
  endfunction

endpackage

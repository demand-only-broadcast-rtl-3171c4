// copy_request_unit: the Copy Request Vector and its priority circuit.
//
// A consumer that finds its source's Broadcast bit set and Use bit clear in
// its cluster's Busy-Bit Table needs a copy instruction. The requests of all
// clusters (NREQ = 16 issue slots x 2 sources) set one bit per physical
// register; this is the OR of the four clusters' bit vectors. Requests take
// ISSUE_TO_STEER = 2 cycles to reach the vector: a request made in cycle t
// is visible to the steering logic in cycle t+2.
//
// Each cycle a priority circuit picks, for every cluster c, up to
// slots[c] (at most ISSUE_PORTS) set bits among the registers of bank c, lowest
// number first: the copy is inserted into the cluster that produced the value,
// which with the banked register file is the register's bank. Picked bits are
// cleared at the edge; a request arriving in the same cycle for the same
// register sets it again (a redundant copy is harmless).
//
// The vector, the OR of the clusters' vectors, the 4-per-cluster priority pick
// and the 2-cycle delay follow the document; lowest-number priority is this
// design's choice.
module copy_request_unit
  import dob_pkg::*;
#(
  parameter int unsigned NREGS = NUM_PREGS,
  parameter int unsigned NREQ  = 2 * NUM_CLUSTERS * ISSUE_PORTS,
  parameter int unsigned PICKS = ISSUE_PORTS
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic  [NREQ-1:0]             req_valid,
  input  preg_t [NREQ-1:0]             req_preg,
  input  logic  [NUM_CLUSTERS-1:0][$clog2(PICKS+1)-1:0] slots,
  output logic  [NUM_CLUSTERS-1:0][PICKS-1:0] pick_valid,
  output preg_t [NUM_CLUSTERS-1:0][PICKS-1:0] pick_preg,
  output logic  [$clog2(NREGS+1)-1:0]  pending
);
  localparam int unsigned BSZ = NREGS / NUM_CLUSTERS;

  logic  [NREGS-1:0] crv_q;
  logic  [NREQ-1:0]  rv_q;
  preg_t [NREQ-1:0]  rp_q;

  always_comb begin
    for (int unsigned c = 0; c < NUM_CLUSTERS; c++) begin
      int unsigned n;
      n = 0;
      pick_valid[c] = '0;
      pick_preg[c]  = '0;
      for (int unsigned i = 0; i < BSZ; i++) begin
        if (crv_q[c*BSZ+i] && n < 32'(slots[c])) begin
          pick_valid[c][n[$clog2(PICKS)-1:0]] = 1'b1;
          pick_preg[c][n[$clog2(PICKS)-1:0]]  = preg_t'(c*BSZ+i);
          n = n + 1;
        end
      end
    end
    pending = '0;
    for (int unsigned i = 0; i < NREGS; i++) pending += ($clog2(NREGS+1))'(crv_q[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      crv_q <= '0;
      rv_q  <= '0;
      rp_q  <= '0;
    end else begin
      logic [NREGS-1:0] n;
      rv_q <= req_valid;
      rp_q <= req_preg;
      n = crv_q;
      for (int unsigned c = 0; c < NUM_CLUSTERS; c++)
        for (int unsigned k = 0; k < PICKS; k++)
          if (pick_valid[c][k]) n[pick_preg[c][k]] = 1'b0;
      for (int unsigned r = 0; r < NREQ; r++)
        if (rv_q[r]) n[rp_q[r]] = 1'b1;
      crv_q <= n;
    end
  end
endmodule

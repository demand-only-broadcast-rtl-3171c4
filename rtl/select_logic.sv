// select_logic: picks up to GRANTS requesting scheduling-window entries per cycle.
//
// Each requesting entry has all its Ready bits set. The document states that
// selection is not oldest-first and that the priority has little effect, so
// this design uses the simplest fixed priority: lowest entry index first.
// Purely combinational: requests in, up to GRANTS (valid, index) pairs out in
// the same cycle, grant k being the k-th lowest requesting index.
module select_logic #(
  parameter int unsigned ENTRIES = 64,
  parameter int unsigned GRANTS  = 4
) (
  input  logic [ENTRIES-1:0]                 req,
  output logic [GRANTS-1:0]                  gnt_valid,
  output logic [GRANTS-1:0][$clog2(ENTRIES)-1:0] gnt_idx
);
  always_comb begin
    int unsigned n;
    n = 0;
    gnt_valid = '0;
    gnt_idx   = '0;
    for (int unsigned i = 0; i < ENTRIES; i++) begin
      if (req[i] && n < GRANTS) begin
        gnt_valid[n[$clog2(GRANTS)-1:0]] = 1'b1;
        gnt_idx[n[$clog2(GRANTS)-1:0]]   = i[$clog2(ENTRIES)-1:0];
        n = n + 1;
      end
    end
  end
endmodule

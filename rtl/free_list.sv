// free_list: the free physical registers of one register-file bank.
//
// With the banked register file, an instruction steered to cluster c gets its
// destination from bank c (registers c*128 .. c*128+127), so each bank keeps
// its own list. The list is a circular queue of register numbers. Up to
// ALLOC_W registers are handed out per cycle (a cluster accepts at most 4 new
// instructions per cycle), and up to FREE_W are returned per cycle by
// retirement. The queue holds the whole bank, so it cannot overflow.
//
// Interface: head[k] is the k-th register that will be handed out; count is
// the number available. alloc_cnt (<= count, <= ALLOC_W) pops that many at the
// clock edge. free_valid/free_preg push returned registers in port order.
// After reset the list holds the bank's registers except the first INIT_USED,
// which hold the initial architectural state. The document gives the banking;
// the queue organisation is this design's choice.
module free_list
  import dob_pkg::*;
#(
  parameter int unsigned BANK      = 0,
  parameter int unsigned BSZ       = BANK_SIZE,
  parameter int unsigned ALLOC_W   = ISSUE_PORTS,
  parameter int unsigned FREE_W    = RENAME_WIDTH,
  parameter int unsigned INIT_USED = 0
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [$clog2(ALLOC_W+1)-1:0]  alloc_cnt,
  output preg_t [ALLOC_W-1:0]           head,
  output logic [$clog2(BSZ+1)-1:0]      count,
  input  logic [FREE_W-1:0]             free_valid,
  input  preg_t [FREE_W-1:0]            free_preg
);
  localparam int unsigned PW = $clog2(BSZ);

  preg_t            q [BSZ];
  logic [PW-1:0]    rd_ptr, wr_ptr;
  logic [$clog2(BSZ+1)-1:0] cnt;

  assign count = cnt;

  always_comb begin
    for (int unsigned k = 0; k < ALLOC_W; k++)
      head[k] = q[PW'(rd_ptr + PW'(k))];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < BSZ; i++)
        q[i] <= preg_t'(BANK * BSZ + ((i + INIT_USED) % BSZ));
      rd_ptr <= '0;
      wr_ptr <= PW'(BSZ - INIT_USED);
      cnt    <= ($clog2(BSZ+1))'(BSZ - INIT_USED);
    end else begin
      logic [PW-1:0] wp;
      logic [$clog2(BSZ+1)-1:0] nfree;
      wp = wr_ptr;
      nfree = '0;
      for (int unsigned f = 0; f < FREE_W; f++) begin
        if (free_valid[f]) begin
          q[wp] <= free_preg[f];
          wp = wp + 1'b1;
          nfree = nfree + 1'b1;
        end
      end
      wr_ptr <= wp;
      rd_ptr <= rd_ptr + PW'(alloc_cnt);
      cnt    <= cnt + nfree - ($clog2(BSZ+1))'(alloc_cnt);
    end
  end

  always_ff @(posedge clk)
    if (rst_n) begin
      assert (32'(alloc_cnt) <= 32'(cnt)) else $error("free_list %0d: allocation from empty list", BANK);
      for (int unsigned f = 0; f < FREE_W; f++)
        if (free_valid[f])
          assert (32'(free_preg[f]) / BSZ == BANK) else $error("free_list %0d: foreign register", BANK);
    end
endmodule

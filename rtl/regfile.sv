// regfile: one copy of the replicated, banked physical register file.
//
// Every cluster holds a full copy of the 512 physical registers. As in the
// document's banked configuration, the file is split into 4 banks of 128
// registers; bank b holds the destinations of the instructions of cluster b
// and is written only by that cluster's 4 result buses, so each bank has 4
// write ports while the copy as a whole accepts 16 writes per cycle. There are
// 8 read ports (two per functional unit).
//
// Timing: writes take effect at the clock edge; reads are combinational and do
// not see a write of the same cycle (the cluster's bypass covers that case).
// Write port w belongs to bank w / WP_PER_BANK and uses only the low address
// bits; the bank field of its tag must equal the bank (asserted). The array is
// not reset: a register is read only after it has been written. The write and
// read port counts follow the document; reset behaviour is this design's.
module regfile
  import dob_pkg::*;
#(
  parameter int unsigned NREGS       = NUM_PREGS,
  parameter int unsigned NBANKS      = NUM_CLUSTERS,
  parameter int unsigned WP_PER_BANK = FU_PER_CL,
  parameter int unsigned RPORTS      = 2 * FU_PER_CL
) (
  input  logic                                   clk,
  input  data_bus_t [NBANKS*WP_PER_BANK-1:0]     wr,
  input  preg_t     [RPORTS-1:0]                 rd_addr,
  output data_t     [RPORTS-1:0]                 rd_data
);
  localparam int unsigned BSZ = NREGS / NBANKS;
  localparam int unsigned BW  = $clog2(BSZ);

  data_t mem [NBANKS][BSZ];

  for (genvar b = 0; b < NBANKS; b++) begin : g_bank
    always_ff @(posedge clk) begin
      for (int unsigned p = 0; p < WP_PER_BANK; p++) begin
        if (wr[b*WP_PER_BANK+p].valid)
          mem[b][wr[b*WP_PER_BANK+p].tag[BW-1:0]] <= wr[b*WP_PER_BANK+p].data;
      end
    end
  end

  always_comb begin
    for (int unsigned r = 0; r < RPORTS; r++)
      rd_data[r] = mem[32'(rd_addr[r]) / BSZ][rd_addr[r][BW-1:0]];
  end

  // A write port may only write its own bank.
  for (genvar w = 0; w < NBANKS*WP_PER_BANK; w++) begin : g_chk
    always_ff @(posedge clk)
      if (wr[w].valid)
        assert (32'(wr[w].tag) / BSZ == w / WP_PER_BANK)
          else $error("regfile: write port %0d wrote outside its bank", w);
  end
endmodule

// gtm_sram_model: behavioural model of one on-board synchronous SRAM bank.
//
// Not part of the design: it stands in for a board memory chip in the
// testbenches. A write (en && rw) stores wdata at addr on the clock edge; a
// read (en && !rw) presents the stored word on rdata after the clock edge,
// i.e. one cycle of read latency. Every word starts at zero. It also counts
// reads and writes and records the cycle of the last access so that
// testbenches can check port occupancy.
module gtm_sram_model #(
  parameter int unsigned AW    = 16,
  parameter int unsigned DW    = 32,
  parameter int unsigned DEPTH = 1 << AW
) (
  input  logic          clk,
  input  logic          en,
  input  logic          rw,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [DEPTH];
  int unsigned   n_reads  = 0;
  int unsigned   n_writes = 0;

  initial begin
    for (int unsigned i = 0; i < DEPTH; i++) mem[i] = '0;
    rdata = '0;
  end

  always_ff @(posedge clk) begin
    if (en) begin
      if (rw) begin
        mem[addr] <= wdata;
        n_writes  <= n_writes + 1;
      end else begin
        rdata   <= mem[addr];
        n_reads <= n_reads + 1;
      end
    end
  end

endmodule

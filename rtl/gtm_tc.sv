// gtm_tc: Template Controller (TC) of the RF controller.
//
// Receives the template from the host and holds it for the loop controller
// (tap offsets) and the unit function (tap weights). A template is a list of
// taps; tap `addr` is written with wdata[7:0] = signed weight and
// wdata[23:8] = signed offset in memory words from the word being evaluated
// (row offset times words per row plus word-column offset), so a sparse
// template costs only its non-zero taps. The tap count is fixed by the UF
// timing (one tap per read cycle). Stored values appear the cycle after the
// write. Template storage on the FPGA follows the document; the tap format is
// this design's choice.
module gtm_tc
  import gtm_pkg::*;
(
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        we,
  input  logic [$clog2(MAX_TAPS)-1:0] addr,
  input  logic [HDW-1:0]              wdata,
  output logic signed [OFF_W-1:0]     offset [MAX_TAPS],
  output logic signed [WGT_W-1:0]     weight [MAX_TAPS]
);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int unsigned t = 0; t < MAX_TAPS; t++) begin
        offset[t] <= '0;
        weight[t] <= '0;
      end
    end else if (we) begin
      offset[addr] <= wdata[WGT_W +: OFF_W];
      weight[addr] <= wdata[WGT_W-1:0];
    end
  end

endmodule

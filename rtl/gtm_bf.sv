// gtm_bf: Basic Function (BF), the template evaluation for one pixel location.
//
// A UF word carries NBF neighbouring pixels; one BF handles one pixel lane of
// it. For every template tap the BF receives the lane's pixel of the word read
// at that tap's offset and the tap's weight, and accumulates weight * pixel.
// The taps arrive in up to two read stages (stage 1 from memory port 0,
// stage 2 from port 1). Each stage has its own multiplier and accumulator, so
// the two stages of successive computations can overlap without sharing
// hardware; stage 2 continues from the finished stage-1 sum. When `sat_en`
// is high the finished sum is saturated to RES_W bits into `res_o`.
//
// Timing: one tap per cycle per stage; `s1_first`/`s2_first` mark the first
// tap of a stage; `res_o` is valid the cycle after `sat_en`. The weighted sum
// is this design's choice of GTM function: the document leaves the UF to the
// application.
module gtm_bf
  import gtm_pkg::*;
#(
  parameter bit USE_S2 = 1'b0   // 1: the final sum is taken after read stage 2
) (
  input  logic                    clk,
  input  logic                    s1_en,
  input  logic                    s1_first,
  input  logic [PIX_W-1:0]        s1_pix,
  input  logic signed [WGT_W-1:0] s1_wgt,
  input  logic                    s2_en,
  input  logic                    s2_first,
  input  logic [PIX_W-1:0]        s2_pix,
  input  logic signed [WGT_W-1:0] s2_wgt,
  input  logic                    sat_en,
  output logic signed [RES_W-1:0] res_o
);

  logic signed [ACC_W-1:0] acc1, acc2, prod1, prod2, sum;

  always_comb begin
    prod1 = ACC_W'($signed({1'b0, s1_pix}) * s1_wgt);
    prod2 = ACC_W'($signed({1'b0, s2_pix}) * s2_wgt);
    sum   = USE_S2 ? acc2 : acc1;
  end

  always_ff @(posedge clk) begin
    if (s1_en) acc1 <= (s1_first ? ACC_W'(0) : acc1) + prod1;
    if (s2_en) acc2 <= (s2_first ? acc1 : acc2) + prod2;
    if (sat_en) begin
      if (sum > ACC_W'(2**(RES_W-1) - 1))       res_o <= RES_W'(2**(RES_W-1) - 1);
      else if (sum < -ACC_W'(2**(RES_W-1)))     res_o <= RES_W'(-(2**(RES_W-1)));
      else                                      res_o <= RES_W'(sum);
    end
  end

endmodule

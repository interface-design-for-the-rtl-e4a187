// tb_gtm_bf: self-checking test of the basic function. Two BFs are driven:
// one with a single read stage of 6 taps, one with two read stages (stage 1
// with six taps, then stage 2 with three more taps continuing from the
// stage-1 sum). Random pixels and weights, plus runs with extreme weights to
// force positive and negative saturation, are compared with weighted sums
// computed here.
module tb_gtm_bf;
  import gtm_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                    s1_en, s1_first, s2_en, s2_first, sat_en;
  logic [PIX_W-1:0]        s1_pix, s2_pix;
  logic signed [WGT_W-1:0] s1_wgt, s2_wgt;
  logic signed [RES_W-1:0] res_a, res_b;
  int unsigned checks = 0, failures = 0, n_sat = 0;

  gtm_bf #(.USE_S2(1'b0)) u_a (.clk, .s1_en, .s1_first, .s1_pix, .s1_wgt, .s2_en, .s2_first,
                               .s2_pix, .s2_wgt, .sat_en, .res_o(res_a));
  gtm_bf #(.USE_S2(1'b1)) u_b (.clk, .s1_en, .s1_first, .s1_pix, .s1_wgt, .s2_en, .s2_first,
                               .s2_pix, .s2_wgt, .sat_en, .res_o(res_b));

  function automatic logic signed [RES_W-1:0] sat16(longint s);
    if (s > 32767)  return 16'sh7fff;
    if (s < -32768) return -16'sh8000;
    return RES_W'(s);
  endfunction

  task automatic run(input int mode);
    logic [PIX_W-1:0]        pix [6];
    logic signed [WGT_W-1:0] wgt [6];
    longint sa = 0, sb = 0;
    for (int t = 0; t < 6; t++) begin
      pix[t] = (mode == 0) ? PIX_W'($urandom) : 8'd255;
      wgt[t] = (mode == 0) ? WGT_W'($urandom) : (mode == 1 ? 8'sd127 : -8'sd128);
      sa += longint'(wgt[t]) * longint'(pix[t]);
    end
    sb = sa;
    // Both BFs see all six taps on stage 1; BF b then adds taps 3-5 again
    // on stage 2, continuing from its stage-1 sum.
    for (int t = 3; t < 6; t++) sb += longint'(wgt[t]) * longint'(pix[t]);
    for (int t = 0; t < 6; t++) begin
      @(negedge clk);
      s1_en = 1'b1; s1_first = (t == 0); s1_pix = pix[t]; s1_wgt = wgt[t];
      s2_en = 1'b0; s2_first = 1'b0;
    end
    for (int t = 3; t < 6; t++) begin
      @(negedge clk);
      s1_en = 1'b0;
      s2_en = 1'b1; s2_first = (t == 3); s2_pix = pix[t]; s2_wgt = wgt[t];
    end
    @(negedge clk);
    s2_en = 1'b0; sat_en = 1'b1;
    @(negedge clk);
    sat_en = 1'b0;
    checks += 2;
    if (res_a != sat16(sa)) begin failures++; $display("FAIL a: %0d vs %0d", res_a, sat16(sa)); end
    if (res_b != sat16(sb)) begin failures++; $display("FAIL b: %0d vs %0d", res_b, sat16(sb)); end
    if (sa > 32767 || sa < -32768) n_sat++;
  endtask

  initial begin
    s1_en = 0; s1_first = 0; s2_en = 0; s2_first = 0; sat_en = 0;
    s1_pix = 0; s2_pix = 0; s1_wgt = 0; s2_wgt = 0;
    for (int i = 0; i < 200; i++) run(0);
    run(1);
    run(2);
    checks++;
    if (n_sat < 2) begin failures++; $display("FAIL: saturation not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule

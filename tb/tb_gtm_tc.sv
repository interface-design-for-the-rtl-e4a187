// tb_gtm_tc: self-checking test of the template controller: random tap
// writes (signed offset in wdata[23:8], signed weight in wdata[7:0]) are
// checked against a copy kept here, across all MAX_TAPS taps.
module tb_gtm_tc;
  import gtm_pkg::*;
  logic clk = 1'b0, rst, we;
  always #5 clk = ~clk;
  logic [$clog2(MAX_TAPS)-1:0] addr;
  logic [HDW-1:0]              wdata;
  logic signed [OFF_W-1:0]     offset [MAX_TAPS], e_off [MAX_TAPS];
  logic signed [WGT_W-1:0]     weight [MAX_TAPS], e_wgt [MAX_TAPS];
  int unsigned checks = 0, failures = 0;

  gtm_tc dut (.*);

  initial begin
    rst = 1; we = 0; addr = 0; wdata = 0;
    for (int t = 0; t < MAX_TAPS; t++) begin e_off[t] = 0; e_wgt[t] = 0; end
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 200; i++) begin
      automatic int signed o = int'($urandom_range(2000)) - 1000;
      automatic int signed w = int'($urandom_range(255)) - 128;
      @(negedge clk);
      we = $urandom_range(3) != 0; addr = $urandom; wdata = {8'h5a, 16'(o), 8'(w)};
      if (we) begin e_off[addr] = OFF_W'(o); e_wgt[addr] = WGT_W'(w); end
      @(negedge clk);
      we = 0;
      for (int t = 0; t < MAX_TAPS; t++) begin
        checks++;
        if (offset[t] != e_off[t] || weight[t] != e_wgt[t]) begin
          failures++;
          $display("FAIL: tap %0d after write %0d", t, i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule

// tb_gtm_rc: self-checking test of the region controller: random writes to
// each of the seven region registers are checked against a copy kept here,
// writes without `we` must not change anything, and `clear` empties it.
module tb_gtm_rc;
  import gtm_pkg::*;
  logic clk = 1'b0, rst, clear, we;
  always #5 clk = ~clk;
  logic [2:0]     addr;
  logic [HDW-1:0] wdata;
  region_t        region;
  logic [AW-1:0]  shadow [7];
  int unsigned checks = 0, failures = 0;

  gtm_rc dut (.*);

  task automatic check(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  function automatic region_t expect_region();
    return '{row_first: shadow[0], row_last: shadow[1], col_first: shadow[2], col_last: shadow[3],
             stride: shadow[4], img_base: shadow[5], res_base: shadow[6]};
  endfunction

  initial begin
    rst = 1; clear = 0; we = 0; addr = 0; wdata = 0;
    for (int i = 0; i < 7; i++) shadow[i] = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      we = $urandom_range(1); addr = 3'($urandom_range(7)); wdata = $urandom;
      if (we && addr < 7) shadow[addr] = wdata[AW-1:0];
      @(negedge clk);
      we = 0;
      check(region == expect_region(), $sformatf("region after write %0d", i));
    end
    clear = 1;
    @(negedge clk) clear = 0;
    check(region == '0, "clear empties the region");
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

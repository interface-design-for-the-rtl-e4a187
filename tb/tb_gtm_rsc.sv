// tb_gtm_rsc: self-checking test of the result and status controller:
// random result groups (with ties and negative values) are fed in, and the
// count, best value and best index read back after each are compared with a
// reference; the done flag, the busy bit, the one-cycle read latency and the
// clear are checked too.
module tb_gtm_rsc;
  import gtm_pkg::*;
  logic clk = 1'b0, rst, clear, res_valid, busy, done, rd_en, rd_valid;
  always #5 clk = ~clk;
  logic [2*DW-1:0] res_data;
  logic [1:0]      rd_addr;
  logic [HDW-1:0]  rd_data;
  int unsigned checks = 0, failures = 0;

  gtm_rsc #(.W_LEN(2)) dut (.*);

  task automatic check(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  task automatic rd(input int a, output logic [HDW-1:0] d);
    @(negedge clk); rd_en = 1; rd_addr = 2'(a);
    @(negedge clk); rd_en = 0;
    check(rd_valid, "read data one cycle after the read");
    d = rd_data;
  endtask

  initial begin
    logic [HDW-1:0] d;
    int signed best = 0; int unsigned bidx = 0, n = 0; bit have = 0;
    rst = 1; clear = 0; res_valid = 0; busy = 0; done = 0; rd_en = 0; rd_addr = 0; res_data = 0;
    repeat (2) @(negedge clk);
    rst = 0; busy = 1;
    for (int k = 0; k < 60; k++) begin
      @(negedge clk);
      for (int j = 0; j < NBF; j++)
        res_data[j*RES_W +: RES_W] = (k % 7 == 3) ? RES_W'(best) : RES_W'(int'($urandom_range(4000)) - 2000 + k * 40);
      res_valid = 1;
      for (int j = 0; j < NBF; j++) begin
        automatic int signed v = $signed(res_data[j*RES_W +: RES_W]);
        if (!have || v > best) begin have = 1; best = v; bidx = n * NBF + j; end
      end
      n++;
      @(negedge clk); res_valid = 0;
      rd(1, d); check(d == n, $sformatf("count %0d expected %0d", d, n));
      rd(2, d); check($signed(d) == best, $sformatf("best %0d expected %0d", $signed(d), best));
      rd(3, d); check(d == bidx, $sformatf("index %0d expected %0d", d, bidx));
    end
    rd(0, d); check(d[1:0] == 2'b01, "status busy, not done");
    @(negedge clk) done = 1; busy = 0;
    @(negedge clk) done = 0;
    rd(0, d); check(d[1:0] == 2'b10, "status done, not busy");
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    rd(1, d); check(d == 0, "clear empties count");
    rd(0, d); check(d[1] == 0, "clear drops done");
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

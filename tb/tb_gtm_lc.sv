// tb_gtm_lc: self-checking test of the loop controller under the three loop
// pipelinings: 6/3/2 UF timing on one port (new computation every 8 cycles,
// results written 14 cycles after the start, after the next computation's
// reads), the same timing with results on a second port (every 6 cycles,
// written as soon as ready at 11), and the 3/3/3/2 timing on two ports with
// results on port 0 (every 5 cycles, written at 13).
module tb_gtm_lc;
  logic        f_a, f_c, f_d;
  int unsigned c_a, c_c, c_d, x_a, x_c, x_d;

  gtm_lc_harness #(.N_PORTS(1), .R1_LEN(6), .R2_LEN(0), .WP(0), .EXP_P(8), .EXP_WS(14)) h_a (
    .finished(f_a), .checks(c_a), .failures(x_a));
  gtm_lc_harness #(.N_PORTS(2), .R1_LEN(6), .R2_LEN(0), .WP(1), .EXP_P(6), .EXP_WS(11)) h_c (
    .finished(f_c), .checks(c_c), .failures(x_c));
  gtm_lc_harness #(.N_PORTS(2), .R1_LEN(3), .R2_LEN(3), .WP(0), .EXP_P(5), .EXP_WS(13)) h_d (
    .finished(f_d), .checks(c_d), .failures(x_d));

  initial begin
    wait (f_a && f_c && f_d);
    $display("TB_RESULT checks=%0d failures=%0d", c_a + c_c + c_d, x_a + x_c + x_d);
    $finish;
  end

  initial begin
    #100000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c_a + c_c + c_d, x_a + x_c + x_d + 1);
    $finish;
  end
endmodule

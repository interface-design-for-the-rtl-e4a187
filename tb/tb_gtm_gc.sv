// tb_gtm_gc: self-checking test of the global controller in two forms (one
// port with one HMI; two ports with image on port 0, results on port 1 and
// split HMIs). Every task command is checked for the task it records and the
// Mux_Sel it gives each port; T4 must give Reset one cycle after the command
// and Assert the next, hold until the RF reports done, refuse commands in
// between and count the computation; an unknown task number is refused.
// A third controller with two RFs (RF r on port r) runs the schedule "T1 to
// both, T2 to RF1, T2 to RF2, T3 to both, T4 to both, T5 to RF1, T5 to RF2":
// the selected RFs, the port owners, the HMI port choices, Reset/Assert per
// RF and the wait for both RFs' done are checked, and T5 to both RFs and a
// nonexistent RF are refused.
module tb_gtm_gc;
  import gtm_pkg::*;
  logic clk = 1'b0, rst, cmd_we, rf_done;
  always #5 clk = ~clk;
  logic [HDW-1:0] cmd_data;
  task_e          t_a, t_c;
  src_e           ms_a [1], ms_c [2];
  logic           rr_a, ra_a, ce_a, rr_c, ra_c, ce_c;
  logic [15:0]    nc_a, nc_c, nc_m;
  task_e          t_m;
  src_e           ms_m [2];
  logic [1:0]     sel_m, rr_m, ra_m, done_m, ip_m;
  logic           ce_m, rp_m, rp_c;
  logic [0:0]     sel_a, sel_c;
  logic [1:0]     ip_a, ip_c;
  logic           rp_a;
  int unsigned checks = 0, failures = 0;

  gtm_gc #(.N_PORTS(1), .IMG_MASK(2'b01), .RES_PORT(0), .SPLIT_HMI(1'b0)) u_a (
    .clk, .rst, .cmd_we, .cmd_data, .rf_done, .cur_task(t_a), .rf_sel(sel_a), .mux_sel(ms_a),
    .img_ports(ip_a), .rd_port(rp_a), .rf_reset(rr_a), .rf_assert(ra_a), .cmd_err(ce_a), .n_compute(nc_a));
  gtm_gc #(.N_PORTS(2), .IMG_MASK(2'b01), .RES_PORT(1), .SPLIT_HMI(1'b1)) u_c (
    .clk, .rst, .cmd_we, .cmd_data, .rf_done, .cur_task(t_c), .rf_sel(sel_c), .mux_sel(ms_c),
    .img_ports(ip_c), .rd_port(rp_c), .rf_reset(rr_c), .rf_assert(ra_c), .cmd_err(ce_c), .n_compute(nc_c));
  gtm_gc #(.N_PORTS(2), .N_RF(2), .IMG_MASK(2'b11), .RES_PORT(0), .SPLIT_HMI(1'b1)) u_m (
    .clk, .rst, .cmd_we, .cmd_data, .rf_done(done_m), .cur_task(t_m), .rf_sel(sel_m), .mux_sel(ms_m),
    .img_ports(ip_m), .rd_port(rp_m), .rf_reset(rr_m), .rf_assert(ra_m), .cmd_err(ce_m),
    .n_compute(nc_m));

  task automatic check(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  task automatic cmd(input int t);
    @(negedge clk); cmd_we = 1; cmd_data = HDW'(t);
    @(negedge clk); cmd_we = 0;
  endtask

  initial begin
    rst = 1; cmd_we = 0; cmd_data = 0; rf_done = 0; done_m = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    check(ms_a[0] == SRC_NONE && ms_c[0] == SRC_NONE && ms_c[1] == SRC_NONE, "idle: no port owner");
    cmd(1);
    check(t_a == TASK_IMAGE && ms_a[0] == SRC_HMI1 && ip_a == 2'b01, "a T1");
    check(ms_c[0] == SRC_HMI1 && ms_c[1] == SRC_NONE && ip_c == 2'b01, "c T1");
    cmd(2);
    check(t_a == TASK_REGION && ms_a[0] == SRC_NONE && ms_c[0] == SRC_NONE, "T2");
    cmd(3);
    check(t_c == TASK_TEMPLATE && ms_c[1] == SRC_NONE, "T3");
    // T4
    @(negedge clk); cmd_we = 1; cmd_data = 4;
    @(negedge clk); cmd_we = 0;
    check(rr_a && rr_c && !ra_a, "Reset the cycle after T4");
    check(ms_a[0] == SRC_RF && ms_c[0] == SRC_RF && ms_c[1] == SRC_RF, "T4: RF owns all ports");
    @(negedge clk);
    check(ra_a && ra_c && !rr_a, "Assert the cycle after Reset");
    @(negedge clk);
    check(!ra_a && !rr_a, "single pulses");
    cmd_we = 1; cmd_data = 1;
    @(negedge clk); cmd_we = 0;
    check(ce_a && ce_c, "command during T4 refused");
    check(t_a == TASK_COMPUTE, "still in T4");
    repeat (5) @(negedge clk);
    check(t_a == TASK_COMPUTE && ms_a[0] == SRC_RF, "T4 holds until done");
    rf_done = 1; done_m = 2'b11;
    @(negedge clk); rf_done = 0; done_m = 2'b00;
    check(t_a == TASK_IDLE && nc_a == 1 && nc_c == 1 && nc_m == 1, "T4 ends on done and is counted");
    cmd(5);
    check(ms_a[0] == SRC_HMI1, "a T5: bidirectional HMI reads results");
    check(ms_c[0] == SRC_NONE && ms_c[1] == SRC_HMI2 && rp_c == 1'b1, "c T5: second HMI on result port");
    @(negedge clk); cmd_we = 1; cmd_data = 7;
    @(negedge clk); cmd_we = 0;
    check(ce_a && t_a == TASK_RESULT, "unknown task refused");
    cmd(3);
    check(t_a == TASK_TEMPLATE, "tasks may repeat in any order");

    // two RFs, following the schedule T1 both / T2 RF1 / T2 RF2 / T3 both /
    // T4 both / T5 RF1 / T5 RF2 (command bits [4:3] name the RFs)
    cmd(1 | (3 << 3));
    check(t_m == TASK_IMAGE && sel_m == 2'b11 && ms_m[0] == SRC_HMI1 && ms_m[1] == SRC_HMI1 &&
          ip_m == 2'b11, "m: T1 broadcast to both ports");
    cmd(1 | (1 << 3));
    check(sel_m == 2'b01 && ip_m == 2'b01 && ms_m[1] == SRC_NONE, "m: T1 to RF1 only");
    cmd(2 | (1 << 3));
    check(t_m == TASK_REGION && sel_m == 2'b01, "m: T2 to RF1");
    cmd(2 | (2 << 3));
    check(t_m == TASK_REGION && sel_m == 2'b10, "m: T2 to RF2");
    cmd(3);
    check(t_m == TASK_TEMPLATE && sel_m == 2'b11, "m: T3 with no mask goes to both");
    cmd(4 | (3 << 3));
    check(rr_m == 2'b11 && ra_m == 2'b00, "m: Reset to both RFs");
    check(ms_m[0] == SRC_RF && ms_m[1] == SRC_RF, "m: T4 gives each RF its port");
    @(negedge clk);
    check(ra_m == 2'b11 && rr_m == 2'b00, "m: Assert to both RFs");
    repeat (3) @(negedge clk);
    done_m = 2'b10;
    @(negedge clk); done_m = 2'b00;
    repeat (3) @(negedge clk);
    check(t_m == TASK_COMPUTE, "m: T4 waits for the second RF");
    done_m = 2'b01;
    @(negedge clk); done_m = 2'b00;
    check(t_m == TASK_IDLE && nc_m == 2, "m: T4 ends when both RFs are done");
    cmd(5 | (3 << 3));
    check(ce_m && t_m == TASK_IDLE, "m: T5 to both RFs refused");
    cmd(5 | (1 << 3));
    check(ms_m[0] == SRC_HMI2 && ms_m[1] == SRC_NONE && rp_m == 1'b0, "m: T5 to RF1 reads port 0");
    cmd(5 | (2 << 3));
    check(ms_m[0] == SRC_NONE && ms_m[1] == SRC_HMI2 && rp_m == 1'b1, "m: T5 to RF2 reads port 1");
    cmd(4 | (2 << 3));
    check(rr_m == 2'b10, "m: T4 to RF2 alone resets only RF2");
    check(ms_m[0] == SRC_NONE && ms_m[1] == SRC_RF, "m: RF1's port stays free");
    repeat (3) @(negedge clk);
    done_m = 2'b10;
    @(negedge clk); done_m = 2'b00;
    @(negedge clk);
    check(t_m == TASK_IDLE && nc_m == 3, "m: single-RF T4 ends on its done");
    cmd(2 | (1 << 3));
    check(!ce_a && sel_a == 1'b1 && t_a == TASK_REGION, "a: mask bit of RF1 accepted with one RF");
    cmd(2 | (2 << 3));
    check(ce_a && t_a == TASK_REGION, "a: nonexistent RF refused");
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

// tb_gtm_fpga_top: end-to-end test of the GTM FPGA top level at its default
// parameters (one memory port, one bidirectional HMI, UF timing 6/3/2, loop
// period 8). gtm_host_env plays the host and the memory, runs every task
// with loop-backs to T1, T2 and T3, and checks the results, the loop period
// and that each mechanism occurred.
module tb_gtm_fpga_top;
  import gtm_pkg::*;

  logic           clk, rst, h_valid, h_we, h_ready, h_rvalid, acc_err, cmd_err, rf_busy, finished;
  tag_e           h_tag;
  logic [AW-1:0]  h_addr;
  logic [HDW-1:0] h_wdata, h_rdata;
  task_e          cur_task;
  logic [15:0]    n_compute;
  logic           m_en [1], m_rw [1];
  logic [AW-1:0]  m_addr [1];
  logic [DW-1:0]  m_wdata [1], m_rdata [1];
  int unsigned    checks, failures;

  gtm_fpga_top dut (.*);

  gtm_host_env #(
    .N_PORTS(1), .R1_LEN(6), .R2_LEN(0), .W_LEN(2), .WP(0), .IMG_MASK(2'b01),
    .EXP_PERIOD(8), .EXP_DEFER(1'b1), .IMG_ROWS(12), .STRIDE(6), .SEED(11)
  ) env (
    .*, .p_start(dut.g_rf[0].u_rf.uf_start), .p_ok(dut.g_rf[0].u_rf.uf_ok), .p_uf_done(dut.g_rf[0].u_rf.uf_done)
  );

  initial begin
    wait (finished);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule

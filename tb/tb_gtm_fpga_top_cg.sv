// tb_gtm_fpga_top_cg: the GTM top level in its other connectivity graphs,
// run side by side, each with its own host/memory environment:
//   b : one memory port, separate HMIs for image in and results out; the
//       6/3/2 UF timing gives a loop period of 8
//   c : image on port 0, results on port 1; period 6
//   d : 3/3/3/2 UF timing, reads split over two ports holding duplicated
//       images, results on port 0; period 5
// Each environment runs the full task sequence and checks results, period
// and mechanisms; the totals are summed.
module tb_gtm_fpga_top_cg;
  import gtm_pkg::*;

  int unsigned chk_b, chk_c, chk_d, fl_b, fl_c, fl_d;
  logic        fin_b, fin_c, fin_d;

  // ---------------- design b ----------------
  logic           b_clk, b_rst, b_hv, b_hwe, b_hrdy, b_hrv, b_aerr, b_cerr, b_busy;
  tag_e           b_tag;
  logic [AW-1:0]  b_ha;
  logic [HDW-1:0] b_hwd, b_hrd;
  task_e          b_task;
  logic [15:0]    b_ncomp;
  logic           b_men [1], b_mrw [1];
  logic [AW-1:0]  b_maddr [1];
  logic [DW-1:0]  b_mwd [1], b_mrd [1];

  gtm_fpga_top #(.N_PORTS(1), .SPLIT_HMI(1'b1), .R1_LEN(6), .R2_LEN(0), .WP(0), .IMG_MASK(2'b01)) dut_b (
    .clk(b_clk), .rst(b_rst), .h_valid(b_hv), .h_we(b_hwe), .h_tag(b_tag), .h_addr(b_ha),
    .h_wdata(b_hwd), .h_ready(b_hrdy), .h_rvalid(b_hrv), .h_rdata(b_hrd), .acc_err(b_aerr),
    .cmd_err(b_cerr), .cur_task(b_task), .rf_busy(b_busy), .n_compute(b_ncomp),
    .m_en(b_men), .m_rw(b_mrw), .m_addr(b_maddr), .m_wdata(b_mwd), .m_rdata(b_mrd)
  );
  gtm_host_env #(.N_PORTS(1), .R1_LEN(6), .R2_LEN(0), .WP(0), .IMG_MASK(2'b01),
                 .EXP_PERIOD(8), .EXP_DEFER(1'b1), .SEED(21)) env_b (
    .clk(b_clk), .rst(b_rst), .h_valid(b_hv), .h_we(b_hwe), .h_tag(b_tag), .h_addr(b_ha),
    .h_wdata(b_hwd), .h_ready(b_hrdy), .h_rvalid(b_hrv), .h_rdata(b_hrd), .acc_err(b_aerr),
    .cmd_err(b_cerr), .cur_task(b_task), .n_compute(b_ncomp),
    .m_en(b_men), .m_rw(b_mrw), .m_addr(b_maddr), .m_wdata(b_mwd), .m_rdata(b_mrd),
    .p_start(dut_b.g_rf[0].u_rf.uf_start), .p_ok(dut_b.g_rf[0].u_rf.uf_ok), .p_uf_done(dut_b.g_rf[0].u_rf.uf_done),
    .finished(fin_b), .checks(chk_b), .failures(fl_b)
  );

  // ---------------- design c ----------------
  logic           c_clk, c_rst, c_hv, c_hwe, c_hrdy, c_hrv, c_aerr, c_cerr, c_busy;
  tag_e           c_tag;
  logic [AW-1:0]  c_ha;
  logic [HDW-1:0] c_hwd, c_hrd;
  task_e          c_task;
  logic [15:0]    c_ncomp;
  logic           c_men [2], c_mrw [2];
  logic [AW-1:0]  c_maddr [2];
  logic [DW-1:0]  c_mwd [2], c_mrd [2];

  gtm_fpga_top #(.N_PORTS(2), .SPLIT_HMI(1'b1), .R1_LEN(6), .R2_LEN(0), .WP(1), .IMG_MASK(2'b01)) dut_c (
    .clk(c_clk), .rst(c_rst), .h_valid(c_hv), .h_we(c_hwe), .h_tag(c_tag), .h_addr(c_ha),
    .h_wdata(c_hwd), .h_ready(c_hrdy), .h_rvalid(c_hrv), .h_rdata(c_hrd), .acc_err(c_aerr),
    .cmd_err(c_cerr), .cur_task(c_task), .rf_busy(c_busy), .n_compute(c_ncomp),
    .m_en(c_men), .m_rw(c_mrw), .m_addr(c_maddr), .m_wdata(c_mwd), .m_rdata(c_mrd)
  );
  gtm_host_env #(.N_PORTS(2), .R1_LEN(6), .R2_LEN(0), .WP(1), .IMG_MASK(2'b01),
                 .EXP_PERIOD(6), .EXP_DEFER(1'b0), .SEED(31)) env_c (
    .clk(c_clk), .rst(c_rst), .h_valid(c_hv), .h_we(c_hwe), .h_tag(c_tag), .h_addr(c_ha),
    .h_wdata(c_hwd), .h_ready(c_hrdy), .h_rvalid(c_hrv), .h_rdata(c_hrd), .acc_err(c_aerr),
    .cmd_err(c_cerr), .cur_task(c_task), .n_compute(c_ncomp),
    .m_en(c_men), .m_rw(c_mrw), .m_addr(c_maddr), .m_wdata(c_mwd), .m_rdata(c_mrd),
    .p_start(dut_c.g_rf[0].u_rf.uf_start), .p_ok(dut_c.g_rf[0].u_rf.uf_ok), .p_uf_done(dut_c.g_rf[0].u_rf.uf_done),
    .finished(fin_c), .checks(chk_c), .failures(fl_c)
  );

  // ---------------- design d ----------------
  logic           d_clk, d_rst, d_hv, d_hwe, d_hrdy, d_hrv, d_aerr, d_cerr, d_busy;
  tag_e           d_tag;
  logic [AW-1:0]  d_ha;
  logic [HDW-1:0] d_hwd, d_hrd;
  task_e          d_task;
  logic [15:0]    d_ncomp;
  logic           d_men [2], d_mrw [2];
  logic [AW-1:0]  d_maddr [2];
  logic [DW-1:0]  d_mwd [2], d_mrd [2];

  gtm_fpga_top #(.N_PORTS(2), .SPLIT_HMI(1'b1), .R1_LEN(3), .R2_LEN(3), .WP(0), .IMG_MASK(2'b11)) dut_d (
    .clk(d_clk), .rst(d_rst), .h_valid(d_hv), .h_we(d_hwe), .h_tag(d_tag), .h_addr(d_ha),
    .h_wdata(d_hwd), .h_ready(d_hrdy), .h_rvalid(d_hrv), .h_rdata(d_hrd), .acc_err(d_aerr),
    .cmd_err(d_cerr), .cur_task(d_task), .rf_busy(d_busy), .n_compute(d_ncomp),
    .m_en(d_men), .m_rw(d_mrw), .m_addr(d_maddr), .m_wdata(d_mwd), .m_rdata(d_mrd)
  );
  gtm_host_env #(.N_PORTS(2), .R1_LEN(3), .R2_LEN(3), .WP(0), .IMG_MASK(2'b11),
                 .EXP_PERIOD(5), .EXP_DEFER(1'b1), .SEED(41)) env_d (
    .clk(d_clk), .rst(d_rst), .h_valid(d_hv), .h_we(d_hwe), .h_tag(d_tag), .h_addr(d_ha),
    .h_wdata(d_hwd), .h_ready(d_hrdy), .h_rvalid(d_hrv), .h_rdata(d_hrd), .acc_err(d_aerr),
    .cmd_err(d_cerr), .cur_task(d_task), .n_compute(d_ncomp),
    .m_en(d_men), .m_rw(d_mrw), .m_addr(d_maddr), .m_wdata(d_mwd), .m_rdata(d_mrd),
    .p_start(dut_d.g_rf[0].u_rf.uf_start), .p_ok(dut_d.g_rf[0].u_rf.uf_ok), .p_uf_done(dut_d.g_rf[0].u_rf.uf_done),
    .finished(fin_d), .checks(chk_d), .failures(fl_d)
  );

  initial begin
    wait (fin_b && fin_c && fin_d);
    $display("TB_RESULT checks=%0d failures=%0d", chk_b + chk_c + chk_d, fl_b + fl_c + fl_d);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge b_clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", chk_b + chk_c + chk_d, fl_b + fl_c + fl_d + 1);
    $finish;
  end
endmodule

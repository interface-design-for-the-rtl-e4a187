// tb_gtm_hmi: self-checking test of the host-memory interface, each HMI
// driving MIs and SRAM models directly. (a) A bidirectional HMI on one port:
// host image writes must land at the host's address, and host reads must
// return that memory word 3 cycles after the read (HMI register + MI + SRAM).
// (b) A write-only HMI duplicating image words onto two ports and a
// read-only HMI: both memories must hold every word, and reads through the
// second HMI must return them from whichever port `rd_port` names. Finally the
// write HMI is limited to port 0 and must leave port 1 untouched.
module tb_gtm_hmi;
  import gtm_pkg::*;
  logic clk = 1'b0, rst;
  always #5 clk = ~clk;
  int unsigned checks = 0, failures = 0;

  logic           wr_en, rd_en;
  logic [AW-1:0]  addr;
  logic [HDW-1:0] wdata;
  logic [1:0]     b_wports;
  logic           b_rport;

  // (a) bidirectional, one port
  mem_req_t       a_req [1];
  logic           a_mrv [1], a_hrv, a_en, a_rw;
  logic [DW-1:0]  a_mrd [1], a_wd, a_rd;
  logic [AW-1:0]  a_ad;
  logic [HDW-1:0] a_hrd;
  gtm_hmi #(.N_PORTS(1), .WR_EN(1), .RD_EN(1)) u_a (
    .clk, .rst, .wr_en, .rd_en, .addr, .wdata, .wr_ports(2'b01), .rd_port(1'b0), .req(a_req), .mi_rvalid(a_mrv), .mi_rdata(a_mrd),
    .h_rvalid(a_hrv), .h_rdata(a_hrd));
  gtm_mi u_ami (.clk, .rst, .req(a_req[0]), .rvalid(a_mrv[0]), .rdata(a_mrd[0]),
                .m_en(a_en), .m_rw(a_rw), .m_addr(a_ad), .m_wdata(a_wd), .m_rdata(a_rd));
  gtm_sram_model #(.AW(AW), .DW(DW)) u_amem (.clk, .en(a_en), .rw(a_rw), .addr(a_ad), .wdata(a_wd), .rdata(a_rd));

  // (b) split: write HMI on both ports, read HMI on port 1
  mem_req_t       w_req [2], r_req [2], b_req [2];
  logic           b_mrv [2], b_hrv, w_hrv, b_en [2], b_rw [2];
  logic [DW-1:0]  b_mrd [2], b_wd [2], b_rd [2];
  logic [AW-1:0]  b_ad [2];
  logic [HDW-1:0] b_hrd, w_hrd;
  gtm_hmi #(.N_PORTS(2), .WR_EN(1), .RD_EN(0)) u_w (
    .clk, .rst, .wr_en, .rd_en(1'b0), .addr, .wdata, .wr_ports(b_wports), .rd_port(1'b0), .req(w_req), .mi_rvalid(b_mrv), .mi_rdata(b_mrd),
    .h_rvalid(w_hrv), .h_rdata(w_hrd));
  gtm_hmi #(.N_PORTS(2), .WR_EN(0), .RD_EN(1)) u_r (
    .clk, .rst, .wr_en(1'b0), .rd_en, .addr, .wdata, .wr_ports(2'b00), .rd_port(b_rport), .req(r_req), .mi_rvalid(b_mrv), .mi_rdata(b_mrd),
    .h_rvalid(b_hrv), .h_rdata(b_hrd));
  for (genvar p = 0; p < 2; p++) begin : g_b
    assign b_req[p] = w_req[p].en ? w_req[p] : r_req[p];
    gtm_mi u_mi (.clk, .rst, .req(b_req[p]), .rvalid(b_mrv[p]), .rdata(b_mrd[p]),
                 .m_en(b_en[p]), .m_rw(b_rw[p]), .m_addr(b_ad[p]), .m_wdata(b_wd[p]), .m_rdata(b_rd[p]));
    gtm_sram_model #(.AW(AW), .DW(DW)) u_mem (.clk, .en(b_en[p]), .rw(b_rw[p]), .addr(b_ad[p]),
                                             .wdata(b_wd[p]), .rdata(b_rd[p]));
  end

  logic [DW-1:0] img [64];

  task automatic check(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  initial begin
    rst = 1; wr_en = 0; rd_en = 0; addr = 0; wdata = 0; b_wports = 2'b11; b_rport = 1'b1;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 64; i++) begin
      img[i] = $urandom;
      @(negedge clk); wr_en = 1; addr = AW'(16'h0200 + i); wdata = img[i];
    end
    @(negedge clk); wr_en = 0;
    repeat (3) @(negedge clk);
    for (int i = 0; i < 64; i++) begin
      check(u_amem.mem['h0200 + i] == img[i], "a: image word in memory");
      check(g_b[0].u_mem.mem['h0200 + i] == img[i] && g_b[1].u_mem.mem['h0200 + i] == img[i],
            "b: image word duplicated on both ports");
    end
    for (int i = 0; i < 64; i += 3) begin
      automatic int n = 0;
      @(negedge clk); rd_en = 1; addr = AW'(16'h0200 + i); b_rport = 1'(i % 2);
      @(negedge clk); rd_en = 0;
      while (!a_hrv) begin @(negedge clk); n++; end
      check(n == 2, $sformatf("a: read returned %0d cycles after the read", n + 1));
      check(a_hrd == img[i], "a: read data");
      check(b_hrv && b_hrd == img[i], "b: read data through the second HMI");
      check(!w_hrv, "write-only HMI returns nothing");
    end
    // write HMI limited to port 0: port 1 keeps the old word
    b_wports = 2'b01;
    for (int i = 0; i < 16; i++) begin
      @(negedge clk); wr_en = 1; addr = AW'(16'h0200 + i); wdata = ~img[i];
    end
    @(negedge clk); wr_en = 0;
    repeat (3) @(negedge clk);
    for (int i = 0; i < 16; i++) begin
      check(g_b[0].u_mem.mem['h0200 + i] == ~img[i], "b: port 0 rewritten");
      check(g_b[1].u_mem.mem['h0200 + i] == img[i], "b: port 1 left alone");
    end
    // the read HMI returns the word of the port it is pointed at
    for (int i = 0; i < 8; i++) begin
      @(negedge clk); rd_en = 1; addr = AW'(16'h0200 + i); b_rport = 1'(i % 2);
      @(negedge clk); rd_en = 0; b_rport = 1'(~i % 2);
      while (!b_hrv) @(negedge clk);
      check(b_hrd == ((i % 2) ? img[i] : ~img[i]), "b: read from the chosen port");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule

// tb_gtm_fpga_top_mrf: the GTM top level with two region functions, RF1 alone
// on memory port 0 and RF2 alone on port 1, with one HMI for image data in
// and one for results out.
//
// The host follows the two-RF task schedule in which both RFs share the
// image and the template but work on different regions:
//   T1 to both (the image is broadcast to both memory banks)
//   T2 to RF1 (region A), T2 to RF2 (region B)
//   T3 to both (one shared template), T4 to both (the RFs run in parallel)
//   T5 to RF1, T5 to RF2 (results come back one RF at a time)
// followed by a second template for RF2 alone, T4 and T5 on RF2 alone, and T4
// and T5 on RF1 alone, which must still use the first template. Last, both
// RFs get the same region and each its own template, and run in parallel
// again (two templates on one region).
// Every result word and each RF's status (count, best value, best index) is
// compared with a reference computed here; each RF's loop period must be 8.
// Mechanisms counted: broadcast image, separate T2, shared T3, cycles with
// both RFs computing, single-RF T4 leaving the other RF's port alone, T5 to
// both RFs refused, commands during T4 refused.
module tb_gtm_fpga_top_mrf;
  import gtm_pkg::*;

  localparam int unsigned IMG_ROWS = 10;
  localparam int unsigned STRIDE   = 6;
  localparam int unsigned IMG_BASE = 32'h0100;
  localparam int unsigned PERIOD   = 8;
  localparam int unsigned R        = 6;

  logic           clk = 1'b0, rst;
  always #5 clk = ~clk;

  logic           h_valid, h_we, h_ready, h_rvalid, acc_err, cmd_err, rf_busy;
  tag_e           h_tag;
  logic [AW-1:0]  h_addr;
  logic [HDW-1:0] h_wdata, h_rdata;
  task_e          cur_task;
  logic [15:0]    n_compute;
  logic           m_en [2], m_rw [2];
  logic [AW-1:0]  m_addr [2];
  logic [DW-1:0]  m_wdata [2], m_rdata [2];

  gtm_fpga_top #(
    .N_PORTS(2), .N_RF(2), .SPLIT_HMI(1'b1), .R1_LEN(6), .R2_LEN(0), .WP(0), .IMG_MASK(2'b11)
  ) dut (.*);

  for (genvar p = 0; p < 2; p++) begin : g_mem
    gtm_sram_model #(.AW(AW), .DW(DW)) u_mem (
      .clk, .en(m_en[p]), .rw(m_rw[p]), .addr(m_addr[p]), .wdata(m_wdata[p]), .rdata(m_rdata[p])
    );
  end

  int unsigned checks = 0, failures = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- probes ----------------
  logic busy0, busy1, start0, start1;
  assign busy0  = dut.g_rf[0].u_rf.rf_busy;
  assign busy1  = dut.g_rf[1].u_rf.rf_busy;
  assign start0 = dut.g_rf[0].u_rf.uf_start;
  assign start1 = dut.g_rf[1].u_rf.uf_start;

  longint unsigned cyc = 0, last0 = 0, last1 = 0;
  int unsigned n_start [2], n_bad_period = 0, n_parallel = 0, n_cmd_err = 0, n_port_use [2];
  bit first0 = 1'b1, first1 = 1'b1;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst) begin
      if (start0) begin
        if (!first0 && cyc - last0 != 64'(PERIOD)) n_bad_period <= n_bad_period + 1;
        first0 = 1'b0;
        last0 <= cyc;
        n_start[0] <= n_start[0] + 1;
      end
      if (start1) begin
        if (!first1 && cyc - last1 != 64'(PERIOD)) n_bad_period <= n_bad_period + 1;
        first1 = 1'b0;
        last1 <= cyc;
        n_start[1] <= n_start[1] + 1;
      end
      if (busy0 && busy1) n_parallel <= n_parallel + 1;
      if (cmd_err) n_cmd_err <= n_cmd_err + 1;
      for (int p = 0; p < 2; p++) if (m_en[p]) n_port_use[p] <= n_port_use[p] + 1;
    end
  end

  // ---------------- host bus ----------------
  task automatic host_acc(input tag_e tag, input bit we, input int unsigned addr,
                          input logic [HDW-1:0] data);
    @(negedge clk);
    h_valid = 1'b1; h_we = we; h_tag = tag; h_addr = AW'(addr); h_wdata = data;
    @(posedge clk);
    while (!h_ready) @(posedge clk);
    @(negedge clk);
    h_valid = 1'b0;
  endtask

  task automatic host_rd(input tag_e tag, input int unsigned addr, output logic [HDW-1:0] data);
    host_acc(tag, 1'b0, addr, '0);
    while (!h_rvalid) @(posedge clk);
    data = h_rdata;
    @(negedge clk);
  endtask

  // command bits [4:3]: RFs taking part (bit 0 = RF1, bit 1 = RF2)
  task automatic command(input task_e t, input logic [1:0] rfs);
    host_acc(TAG_CMD, 1'b1, 0, HDW'({rfs, 3'(t)}));
  endtask

  // ---------------- reference state ----------------
  logic [DW-1:0]           img [IMG_ROWS*STRIDE];
  logic signed [OFF_W-1:0] t_off [2][R];
  logic signed [WGT_W-1:0] t_wgt [2][R];
  int unsigned rg [2][5];          // r0, r1, c0, c1, result base

  function automatic logic signed [RES_W-1:0] ref_pix(int unsigned f, int unsigned r,
                                                      int unsigned c, int unsigned j);
    longint s = 0;
    for (int unsigned t = 0; t < R; t++) begin
      int a = int'(r * STRIDE + c) + int'(t_off[f][t]);
      s += longint'(t_wgt[f][t]) * longint'(img[a][j*PIX_W +: PIX_W]);
    end
    if (s > 32767)  s = 32767;
    if (s < -32768) s = -32768;
    return RES_W'(s);
  endfunction

  // Region to the RFs in `rfs`.
  task automatic load_region(input logic [1:0] rfs, input int unsigned r0, r1, c0, c1, base);
    for (int unsigned f = 0; f < 2; f++) if (rfs[f]) rg[f] = '{r0, r1, c0, c1, base};
    command(TASK_REGION, rfs);
    host_acc(TAG_REGION, 1'b1, 0, r0);
    host_acc(TAG_REGION, 1'b1, 1, r1);
    host_acc(TAG_REGION, 1'b1, 2, c0);
    host_acc(TAG_REGION, 1'b1, 3, c1);
    host_acc(TAG_REGION, 1'b1, 4, STRIDE);
    host_acc(TAG_REGION, 1'b1, 5, IMG_BASE);
    host_acc(TAG_REGION, 1'b1, 6, base);
  endtask

  // Template to the RFs in `rfs`; the reference copy follows.
  task automatic load_template(input logic [1:0] rfs);
    int signed offs [6] = '{-int'(STRIDE), -1, 0, 1, int'(STRIDE), int'(STRIDE) + 1};
    command(TASK_TEMPLATE, rfs);
    for (int unsigned t = 0; t < R; t++) begin
      logic signed [WGT_W-1:0] w = WGT_W'(int'($urandom_range(40)) - 20);
      for (int unsigned f = 0; f < 2; f++) begin
        if (rfs[f]) begin
          t_off[f][t] = OFF_W'(offs[t]);
          t_wgt[f][t] = w;
        end
      end
      host_acc(TAG_TEMPLATE, 1'b1, t, {8'h00, 16'(offs[t]), 8'(w)});
    end
  endtask

  function automatic int unsigned n_groups(int unsigned f);
    return (rg[f][1] - rg[f][0] + 1) * (rg[f][3] - rg[f][2] + 1);
  endfunction

  // T4 on the RFs in `rfs`; waits until each reports done.
  task automatic compute(input logic [1:0] rfs, input string tag);
    logic [HDW-1:0] d;
    int unsigned s0 [2];
    s0[0] = n_start[0]; s0[1] = n_start[1];
    first0 = 1'b1; first1 = 1'b1;
    command(TASK_COMPUTE, rfs);
    host_acc(TAG_CMD, 1'b1, 0, HDW'(TASK_IMAGE));   // refused: T4 is running
    for (int unsigned f = 0; f < 2; f++) begin
      if (rfs[f]) begin
        do host_rd(TAG_STATUS, 4 * f, d); while (d[1] != 1'b1);
      end
    end
    while (cur_task != TASK_IDLE) @(negedge clk);
    for (int unsigned f = 0; f < 2; f++) begin
      int unsigned exp_n = rfs[f] ? n_groups(f) : 0;
      check(n_start[f] - s0[f] == exp_n,
            $sformatf("%s: RF%0d made %0d UF starts, expected %0d", tag, f + 1, n_start[f] - s0[f], exp_n));
    end
  endtask

  // T5 on RF f: every result word and the status summary.
  task automatic results(input int unsigned f, input string tag);
    logic [HDW-1:0] d;
    int unsigned k = 0, best_idx = 0;
    logic signed [RES_W-1:0] best = '0;
    bit have = 1'b0;
    command(TASK_RESULT, 2'(1 << f));
    for (int unsigned r = rg[f][0]; r <= rg[f][1]; r++) begin
      for (int unsigned c = rg[f][2]; c <= rg[f][3]; c++) begin
        logic [2*DW-1:0] exp_v, got;
        for (int unsigned j = 0; j < NBF; j++) begin
          logic signed [RES_W-1:0] v = ref_pix(f, r, c, j);
          exp_v[j*RES_W +: RES_W] = v;
          if (!have || v > best) begin
            have = 1'b1; best = v; best_idx = k * NBF + j;
          end
        end
        for (int unsigned w = 0; w < 2; w++) begin
          host_rd(TAG_RESULT, rg[f][4] + k * 2 + w, d);
          got[w*DW +: DW] = d;
        end
        check(got == exp_v, $sformatf("%s: RF%0d result (%0d,%0d) got %h expected %h",
                                      tag, f + 1, r, c, got, exp_v));
        k++;
      end
    end
    host_rd(TAG_STATUS, 4 * f + 1, d);
    check(d == n_groups(f), $sformatf("%s: RF%0d status count %0d", tag, f + 1, d));
    host_rd(TAG_STATUS, 4 * f + 2, d);
    check($signed(d) == $signed(HDW'(best)), $sformatf("%s: RF%0d best value %0d expected %0d",
                                                       tag, f + 1, $signed(d), best));
    host_rd(TAG_STATUS, 4 * f + 3, d);
    check(d == best_idx, $sformatf("%s: RF%0d best index %0d expected %0d", tag, f + 1, d, best_idx));
  endtask

  initial begin
    int unsigned e0, u0;
    bit both;
    void'($urandom(7));
    n_start[0] = 0; n_start[1] = 0; n_port_use[0] = 0; n_port_use[1] = 0;
    h_valid = 1'b0; h_we = 1'b0; h_tag = TAG_CMD; h_addr = '0; h_wdata = '0;
    rst = 1'b1;
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 1'b0;

    // T1 to both RFs: one host write reaches both memory banks
    command(TASK_IMAGE, 2'b11);
    for (int unsigned a = 0; a < IMG_ROWS * STRIDE; a++) begin
      img[a] = $urandom;
      host_acc(TAG_IMAGE, 1'b1, IMG_BASE + a, img[a]);
    end
    repeat (4) @(negedge clk);
    both = 1'b1;
    for (int unsigned a = 0; a < IMG_ROWS * STRIDE; a++)
      if (g_mem[0].u_mem.mem[IMG_BASE + a] != img[a] || g_mem[1].u_mem.mem[IMG_BASE + a] != img[a])
        both = 1'b0;
    check(both, "T1 broadcast: image in both memory banks");

    // T2 to each RF separately: different regions
    load_region(2'b01, 1, 4, 1, 4, 32'h4000);
    load_region(2'b10, 4, 8, 1, 3, 32'h4800);

    // T3 to both: the shared template
    load_template(2'b11);

    // T4 to both: parallel region computations
    e0 = n_cmd_err;
    compute(2'b11, "parallel T4");
    check(n_parallel > 0, "both RFs computing at the same time");
    check(n_cmd_err > e0, "command during T4 refused");

    // T5 to both at once is refused; then one RF at a time
    e0 = n_cmd_err;
    command(TASK_RESULT, 2'b11);
    @(negedge clk);
    check(n_cmd_err == e0 + 1 && cur_task == TASK_IDLE, "T5 to both RFs refused");
    results(0, "shared template");
    results(1, "shared template");

    // a second template for RF2 only, computed by RF2 alone
    load_template(2'b10);
    u0 = n_port_use[0];
    compute(2'b10, "RF2 alone");
    check(n_port_use[0] == u0, "RF2 alone: RF1's memory port stays quiet");
    results(1, "RF2 template 2");

    // RF1 alone still holds the first template
    compute(2'b01, "RF1 alone");
    results(0, "RF1 template 1 again");

    // the other use of two RFs: one region, a different template in each
    load_region(2'b11, 2, 7, 1, 4, 32'h5000);
    load_template(2'b01);
    load_template(2'b10);
    check(t_wgt[0] != t_wgt[1], "two different templates");
    compute(2'b11, "two templates, one region");
    results(0, "one region, RF1's template");
    results(1, "one region, RF2's template");

    check(n_bad_period == 0, $sformatf("loop period differs from %0d (%0d times)", PERIOD, n_bad_period));
    check(n_compute == 4, "GC counted four T4 tasks");
    $display("mechanisms: parallel cycles=%0d starts RF1=%0d RF2=%0d cmd_err=%0d",
             n_parallel, n_start[0], n_start[1], n_cmd_err);
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

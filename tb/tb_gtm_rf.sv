// tb_gtm_rf: self-checking test of a region function on its own, with an MI
// and SRAM model on its memory port. The image is placed in memory directly;
// the region and a sparse six-tap template are written through the RF's
// host-side ports; Reset then Assert start it. After done, every result word
// in memory and the status registers (count, best value and index) are
// compared with a reference computed here, and the run must take the
// pipelined time: one computation every 8 cycles.
module tb_gtm_rf;
  import gtm_pkg::*;
  localparam int STRIDE = 8, ROWS = 10, IMG = 16'h0040, RES = 16'h2000;
  localparam int R0 = 1, R1 = 8, C0 = 1, C1 = 6;

  logic clk = 1'b0, rst;
  always #5 clk = ~clk;

  logic                        gc_reset, gc_assert, rf_busy, rf_done, rgn_we, tpl_we, sts_re, sts_rvalid;
  logic [2:0]                  rgn_addr;
  logic [$clog2(MAX_TAPS)-1:0] tpl_addr;
  logic [HDW-1:0]              h_wdata, sts_rdata;
  logic [1:0]                  sts_addr;
  mem_req_t                    mem_req [1];
  logic [DW-1:0]               mem_rdata [1];
  logic                        mrv, m_en, m_rw;
  logic [AW-1:0]               m_addr;
  logic [DW-1:0]               m_wdata, m_rdata;
  int unsigned checks = 0, failures = 0;

  gtm_rf #(.N_PORTS(1), .R1_LEN(6), .R2_LEN(0), .C_LEN(3), .W_LEN(2), .WP(0)) dut (.*);
  gtm_mi u_mi (.clk, .rst, .req(mem_req[0]), .rvalid(mrv), .rdata(mem_rdata[0]),
               .m_en, .m_rw, .m_addr, .m_wdata, .m_rdata);
  gtm_sram_model #(.AW(AW), .DW(DW)) u_mem (.clk, .en(m_en), .rw(m_rw), .addr(m_addr),
                                           .wdata(m_wdata), .rdata(m_rdata));

  logic [DW-1:0]           img [ROWS*STRIDE];
  int signed               off [6] = '{-STRIDE, -1, 0, 1, STRIDE, STRIDE + 1};
  logic signed [WGT_W-1:0] wgt [6];

  task automatic check(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  task automatic sts(input int a, output logic [HDW-1:0] d);
    @(negedge clk); sts_re = 1; sts_addr = 2'(a);
    @(negedge clk); sts_re = 0;
    d = sts_rdata;
  endtask

  initial begin
    logic [HDW-1:0] d;
    int k = 0, best_idx = 0;
    logic signed [RES_W-1:0] best = 0;
    bit have = 0;
    longint t0, t1;
    rst = 1; gc_reset = 0; gc_assert = 0; rgn_we = 0; tpl_we = 0; sts_re = 0;
    rgn_addr = 0; tpl_addr = 0; h_wdata = 0; sts_addr = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int a = 0; a < ROWS * STRIDE; a++) begin
      img[a] = $urandom;
      u_mem.mem[IMG + a] = img[a];
    end
    foreach (wgt[t]) wgt[t] = WGT_W'(int'($urandom_range(60)) - 30);
    begin
      int unsigned regs [7] = '{R0, R1, C0, C1, STRIDE, IMG, RES};
      for (int i = 0; i < 7; i++) begin
        @(negedge clk); rgn_we = 1; rgn_addr = 3'(i); h_wdata = regs[i];
      end
    end
    for (int t = 0; t < 6; t++) begin
      @(negedge clk); rgn_we = 0; tpl_we = 1; tpl_addr = 4'(t); h_wdata = {8'h0, 16'(off[t]), 8'(wgt[t])};
    end
    @(negedge clk); tpl_we = 0; gc_reset = 1;
    @(negedge clk); gc_reset = 0; gc_assert = 1; t0 = $time;
    @(negedge clk); gc_assert = 0;
    while (!rf_done) @(negedge clk);
    t1 = $time;
    check((t1 - t0) / 10 == ((R1 - R0 + 1) * (C1 - C0 + 1) - 1) * 8 + 18,
          $sformatf("region took %0d cycles", (t1 - t0) / 10));
    for (int r = R0; r <= R1; r++) for (int c = C0; c <= C1; c++) begin
      logic [2*DW-1:0] e;
      for (int j = 0; j < NBF; j++) begin
        automatic longint s = 0;
        for (int t = 0; t < 6; t++) s += longint'(wgt[t]) * longint'(img[r * STRIDE + c + off[t]][j*8 +: 8]);
        if (s > 32767) s = 32767;
        if (s < -32768) s = -32768;
        e[j*16 +: 16] = 16'(s);
        if (!have || $signed(16'(s)) > best) begin have = 1; best = 16'(s); best_idx = k * NBF + j; end
      end
      check({u_mem.mem[RES + 2*k + 1], u_mem.mem[RES + 2*k]} == e, $sformatf("result %0d", k));
      k++;
    end
    sts(0, d); check(d[1:0] == 2'b10, "status: done, not busy");
    sts(1, d); check(d == k, "status: count");
    sts(2, d); check($signed(d) == best, "status: best value");
    sts(3, d); check(d == best_idx, "status: best index");
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

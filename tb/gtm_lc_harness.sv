// gtm_lc_harness: drives one loop controller with a region and a template,
// stands in for the UF (Ok EXP_READY cycles after each Start, with a result
// that identifies the computation) and compares every memory request, every
// cycle, with a schedule computed here from the expected period EXP_P and
// expected write start EXP_WS: reads of tap t at start + t on port 0 (stage
// 1) or port 1 (stage 2), result word w written at start + EXP_WS + w.
module gtm_lc_harness
  import gtm_pkg::*;
#(
  parameter int unsigned N_PORTS   = 1,
  parameter int unsigned R1_LEN    = 6,
  parameter int unsigned R2_LEN    = 0,
  parameter int unsigned WP        = 0,
  parameter int unsigned EXP_P     = 8,
  parameter int unsigned EXP_WS    = 14,
  parameter int unsigned EXP_READY = 11
) (
  output logic        finished,
  output int unsigned checks,
  output int unsigned failures
);
  localparam int unsigned R = R1_LEN + R2_LEN;
  localparam int unsigned ROWS = 3, COLS = 3, N = ROWS * COLS;

  logic clk = 1'b0, rst, rfc_reset, assert_i, uf_start, uf_ok, uf_done, res_valid, busy_o, done_o;
  always #5 clk = ~clk;

  region_t                 region;
  logic signed [OFF_W-1:0] offset [MAX_TAPS];
  mem_req_t                mem_req [N_PORTS];
  logic [2*DW-1:0]         uf_res, res_data;

  gtm_lc #(.N_PORTS(N_PORTS), .R1_LEN(R1_LEN), .R2_LEN(R2_LEN), .C_LEN(3), .W_LEN(2), .WP(WP)) dut (
    .clk, .rst, .rfc_reset, .assert_i, .region, .offset, .mem_req, .uf_start, .uf_ok, .uf_res,
    .uf_done, .res_valid, .res_data, .busy_o, .done_o);

  longint unsigned cyc = 0, t_assert = 0, s [N];
  int unsigned ns = 0, n_done = 0;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic logic [2*DW-1:0] res_of(int k);
    return {32'hB000_0000 + 32'(k), 32'hA000_0000 + 32'(k)};
  endfunction

  // UF stand-in
  always_comb begin
    uf_ok = 1'b0; uf_res = '0; uf_done = 1'b1;
    for (int k = 0; k < N; k++) if (k < ns) begin
      if (cyc == s[k] + EXP_READY) begin uf_ok = 1'b1; uf_res = res_of(k); end
      if (cyc < s[k] + EXP_READY) uf_done = 1'b0;
    end
  end

  task automatic check(input bit c, input string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL: %s", m); end
  endtask

  // Compare the requests of this cycle with the reference schedule.
  always @(negedge clk) if (!rst && t_assert != 0) begin
    automatic mem_req_t e [N_PORTS];
    for (int p = 0; p < N_PORTS; p++) e[p] = MEM_REQ_IDLE;
    for (int k = 0; k < N; k++) begin
      automatic longint st = longint'(t_assert) + 1 + longint'(k) * EXP_P;
      automatic longint d  = longint'(cyc) - st;
      automatic int unsigned base = 100 + (1 + k / COLS) * 10 + (2 + k % COLS);
      if (d >= 0 && d < R) begin
        automatic int p = (d < R1_LEN) ? 0 : 1;
        e[p].en = 1'b1;
        e[p].addr = AW'(int'(base) + int'(offset[d]));
      end
      if (d >= EXP_WS && d < EXP_WS + 2) begin
        automatic logic [2*DW-1:0] rv = res_of(k);
        e[WP].en = 1'b1; e[WP].we = 1'b1;
        e[WP].addr = AW'(500 + k * 2 + (d - EXP_WS));
        e[WP].wdata = rv[(d - EXP_WS) * DW +: DW];
      end
      if (d == 0) check(uf_start, $sformatf("start of computation %0d at cycle %0d", k, cyc));
    end
    for (int p = 0; p < N_PORTS; p++)
      check(mem_req[p] == e[p], $sformatf("port %0d cycle %0d: got %p expected %p", p, cyc - t_assert, mem_req[p], e[p]));
  end

  always @(posedge clk) begin
    if (!rst && uf_start) begin s[ns] <= cyc; ns <= ns + 1; end
    if (!rst && done_o) n_done <= n_done + 1;
  end

  initial begin
    finished = 0; checks = 0; failures = 0;
    rst = 1; rfc_reset = 0; assert_i = 0;
    region = '{row_first: 1, row_last: ROWS, col_first: 2, col_last: 1 + COLS, stride: 10,
               img_base: 100, res_base: 500};
    for (int t = 0; t < MAX_TAPS; t++) offset[t] = OFF_W'(int'($urandom_range(20)) - 10);
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    @(negedge clk) rfc_reset = 1;
    @(negedge clk) rfc_reset = 0; assert_i = 1; t_assert = cyc;
    @(negedge clk) assert_i = 0;
    repeat (N * EXP_P + EXP_WS + 10) @(negedge clk);
    check(ns == N, $sformatf("%0d starts, expected %0d", ns, N));
    check(n_done == 1, "one done pulse");
    check(!busy_o, "idle at the end");
    finished = 1;
  end
endmodule

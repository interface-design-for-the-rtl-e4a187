// gtm_host_env: host, board memory and checker for the GTM FPGA top level.
//
// Connects to the top's host port and memory pins. It makes the clock and
// reset, models each memory bank with gtm_sram_model, and plays the host
// through the GTM tasks, looping back the way the operation scenario allows:
//   T1 image -> T2 region A -> T3 template 1 -> T4 -> T5
//   T3 template 2 (saturating weights) -> T4 -> T5
//   T2 region B -> T4 -> T5
//   T1 part of the image rewritten -> T4 -> T5
// Every result word read back through the host port, and the RSC summary
// (count, best value, best index), is compared with a reference computed
// here from the env's own copy of the image. The UF start pulses are probed
// to check the loop period against EXP_PERIOD, and the mechanisms
// (each task, loop overlap, deferred result write, saturation, refused host
// access, refused command) are counted; one that never happens is a failure.
// Results go out on `checks`/`failures` when `finished` rises.
module gtm_host_env
  import gtm_pkg::*;
#(
  parameter int unsigned N_PORTS    = 1,
  parameter int unsigned R1_LEN     = 6,
  parameter int unsigned R2_LEN     = 0,
  parameter int unsigned W_LEN      = 2,
  parameter int unsigned WP         = 0,
  parameter logic [1:0]  IMG_MASK   = 2'b01,
  parameter int unsigned EXP_PERIOD = 8,
  parameter bit          EXP_DEFER  = 1'b1,   // write slot comes after the result
  parameter int unsigned IMG_ROWS   = 12,
  parameter int unsigned STRIDE     = 6,      // words per image row
  parameter int unsigned SEED       = 1
) (
  output logic           clk,
  output logic           rst,
  output logic           h_valid,
  output logic           h_we,
  output tag_e           h_tag,
  output logic [AW-1:0]  h_addr,
  output logic [HDW-1:0] h_wdata,
  input  logic           h_ready,
  input  logic           h_rvalid,
  input  logic [HDW-1:0] h_rdata,
  input  logic           acc_err,
  input  logic           cmd_err,
  input  task_e          cur_task,
  input  logic [15:0]    n_compute,
  input  logic           m_en    [N_PORTS],
  input  logic           m_rw    [N_PORTS],
  input  logic [AW-1:0]  m_addr  [N_PORTS],
  input  logic [DW-1:0]  m_wdata [N_PORTS],
  output logic [DW-1:0]  m_rdata [N_PORTS],
  // probes inside the RF
  input  logic           p_start,
  input  logic           p_ok,
  input  logic           p_uf_done,
  output logic           finished,
  output int unsigned    checks,
  output int unsigned    failures
);

  localparam int unsigned R        = R1_LEN + R2_LEN;
  localparam int unsigned IMG_BASE = 32'h0100;
  localparam int unsigned RES_BASE = 32'h4000;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  for (genvar p = 0; p < N_PORTS; p++) begin : g_mem
    gtm_sram_model #(.AW(AW), .DW(DW)) u_mem (
      .clk, .en(m_en[p]), .rw(m_rw[p]), .addr(m_addr[p]), .wdata(m_wdata[p]), .rdata(m_rdata[p])
    );
  end

  // ---------------- reference state ----------------
  logic [DW-1:0]           img [IMG_ROWS*STRIDE];
  logic signed [OFF_W-1:0] t_off [R];
  logic signed [WGT_W-1:0] t_wgt [R];
  int unsigned rg_r0, rg_r1, rg_c0, rg_c1;

  // mechanism counters
  int unsigned n_task [6];
  int unsigned n_overlap, n_defer, n_sat, n_acc_err, n_cmd_err, n_loop;

  // period measurement
  longint unsigned cyc, last_start;
  int unsigned     n_starts, n_bad_period;
  bit              first_start = 1'b1;  // next start opens a new region run
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst && p_start) begin
      if (!first_start && (cyc - last_start) != EXP_PERIOD) n_bad_period <= n_bad_period + 1;
      first_start = 1'b0;
      last_start <= cyc;
      n_starts   <= n_starts + 1;
      if (!p_uf_done) n_overlap <= n_overlap + 1;
    end
    if (!rst && acc_err) n_acc_err <= n_acc_err + 1;
    if (!rst && cmd_err) n_cmd_err <= n_cmd_err + 1;
  end

  // deferred write: the UF result appears but no write reaches the pins in
  // the next cycle (the MI registers requests).
  logic ok_q;
  always @(posedge clk) begin
    ok_q <= p_ok;
    if (!rst && ok_q) begin
      automatic bit wr = 1'b0;
      for (int p = 0; p < N_PORTS; p++) if (m_en[p] && m_rw[p]) wr = 1'b1;
      if (!wr) n_defer <= n_defer + 1;
    end
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

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

  task automatic host_wr(input tag_e tag, input int unsigned addr, input logic [HDW-1:0] data);
    host_acc(tag, 1'b1, addr, data);
  endtask

  task automatic host_rd(input tag_e tag, input int unsigned addr, output logic [HDW-1:0] data);
    host_acc(tag, 1'b0, addr, '0);
    while (!h_rvalid) @(posedge clk);
    data = h_rdata;
    @(negedge clk);
  endtask

  task automatic command(input task_e t);
    host_wr(TAG_CMD, 0, HDW'(t));
    n_task[t]++;
  endtask

  // ---------------- reference model ----------------
  function automatic logic signed [RES_W-1:0] ref_pix(int unsigned r, int unsigned c, int unsigned j,
                                                      output bit sat);
    longint s = 0;
    for (int unsigned t = 0; t < R; t++) begin
      int a = int'(r * STRIDE + c) + int'(t_off[t]);
      s += longint'(t_wgt[t]) * longint'(img[a][j*PIX_W +: PIX_W]);
    end
    sat = 1'b0;
    if (s > 32767)  begin s = 32767;  sat = 1'b1; end
    if (s < -32768) begin s = -32768; sat = 1'b1; end
    return RES_W'(s);
  endfunction

  // Run T4 then T5 on the current region and template and check everything.
  task automatic compute_and_check(input string tag);
    logic [HDW-1:0] d;
    int unsigned k = 0, n_groups, starts0, bad0;
    longint unsigned t0;
    logic signed [RES_W-1:0] best;
    int unsigned best_idx;
    bit have = 1'b0, sat;
    n_groups = (rg_r1 - rg_r0 + 1) * (rg_c1 - rg_c0 + 1);
    starts0  = n_starts;
    bad0     = n_bad_period;
    t0       = cyc;
    first_start = 1'b1;
    command(TASK_COMPUTE);
    // a command while computing must be refused
    host_wr(TAG_CMD, 0, HDW'(TASK_IMAGE));
    do host_rd(TAG_STATUS, 0, d); while (d[1] != 1'b1);
    check(n_starts - starts0 == n_groups, $sformatf("%s: %0d UF starts, expected %0d", tag, n_starts - starts0, n_groups));
    check(n_bad_period == bad0, $sformatf("%s: loop period differs from %0d", tag, EXP_PERIOD));
    check(cur_task == TASK_IDLE, $sformatf("%s: GC not idle after T4", tag));
    $display("%s: %0d computations, period %0d, T4 took %0d cycles", tag, n_groups, EXP_PERIOD, cyc - t0);
    command(TASK_RESULT);
    for (int unsigned r = rg_r0; r <= rg_r1; r++) begin
      for (int unsigned c = rg_c0; c <= rg_c1; c++) begin
        logic [W_LEN*DW-1:0] exp_v, got;
        for (int unsigned j = 0; j < NBF; j++) begin
          logic signed [RES_W-1:0] v = ref_pix(r, c, j, sat);
          exp_v[j*RES_W +: RES_W] = v;
          if (sat) n_sat++;
          if (!have || v > best) begin
            have = 1'b1; best = v; best_idx = k * NBF + j;
          end
        end
        for (int unsigned w = 0; w < W_LEN; w++) begin
          host_rd(TAG_RESULT, RES_BASE + k * W_LEN + w, d);
          got[w*DW +: DW] = d;
        end
        check(got == exp_v, $sformatf("%s: result (%0d,%0d) got %h expected %h", tag, r, c, got, exp_v));
        k++;
      end
    end
    host_rd(TAG_STATUS, 1, d);
    check(d == n_groups, $sformatf("%s: RSC count %0d expected %0d", tag, d, n_groups));
    host_rd(TAG_STATUS, 2, d);
    check($signed(d) == $signed(HDW'(best)), $sformatf("%s: RSC best %0d expected %0d", tag, $signed(d), best));
    host_rd(TAG_STATUS, 3, d);
    check(d == best_idx, $sformatf("%s: RSC best index %0d expected %0d", tag, d, best_idx));
  endtask

  task automatic load_region(input int unsigned r0, r1, c0, c1);
    rg_r0 = r0; rg_r1 = r1; rg_c0 = c0; rg_c1 = c1;
    command(TASK_REGION);
    host_wr(TAG_REGION, 0, r0);
    host_wr(TAG_REGION, 1, r1);
    host_wr(TAG_REGION, 2, c0);
    host_wr(TAG_REGION, 3, c1);
    host_wr(TAG_REGION, 4, STRIDE);
    host_wr(TAG_REGION, 5, IMG_BASE);
    host_wr(TAG_REGION, 6, RES_BASE);
  endtask

  task automatic load_template(input bit big);
    int signed offs [6] = '{-int'(STRIDE), -1, 0, 1, int'(STRIDE), int'(STRIDE) + 1};
    command(TASK_TEMPLATE);
    for (int unsigned t = 0; t < R; t++) begin
      t_off[t] = OFF_W'(offs[t % 6]);
      if (big) t_wgt[t] = (t % 2 == 0) ? 8'sd127 : 8'sd100;
      else     t_wgt[t] = WGT_W'(int'($urandom_range(40)) - 20);
      host_wr(TAG_TEMPLATE, t, {8'h00, 16'(t_off[t]), 8'(t_wgt[t])});
    end
  endtask

  task automatic load_image(input int unsigned first, input int unsigned last);
    command(TASK_IMAGE);
    for (int unsigned a = first; a <= last; a++) begin
      img[a] = $urandom;
      host_wr(TAG_IMAGE, IMG_BASE + a, img[a]);
    end
  endtask

  initial begin
    logic [HDW-1:0] d;
    void'($urandom(SEED));
    checks = 0; failures = 0; finished = 1'b0;
    n_starts = 0; n_bad_period = 0; cyc = 0; last_start = 0;
    n_overlap = 0; n_defer = 0; n_sat = 0; n_acc_err = 0; n_cmd_err = 0; n_loop = 0;
    for (int i = 0; i < 6; i++) n_task[i] = 0;
    h_valid = 1'b0; h_we = 1'b0; h_tag = TAG_CMD; h_addr = '0; h_wdata = '0;
    rst = 1'b1;
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 1'b0;

    // a region write outside T2 must be refused; a refused read returns zero
    host_wr(TAG_REGION, 0, 1);
    host_rd(TAG_RESULT, RES_BASE, d);
    check(d == 0, "refused read returns zero");

    load_image(0, IMG_ROWS * STRIDE - 1);
    load_region(1, IMG_ROWS - 2, 1, STRIDE - 2);
    load_template(1'b0);
    compute_and_check("region A, template 1");

    n_loop++;                                  // back to T3: another template
    load_template(1'b1);
    compute_and_check("region A, template 2");

    n_loop++;                                  // back to T2: another region
    load_region(2, 4, 1, 2);
    compute_and_check("region B, template 2");

    n_loop++;                                  // back to T1: new image data
    load_image(2 * STRIDE, 5 * STRIDE - 1);
    load_template(1'b0);
    compute_and_check("region B, new image");

    check(n_compute == 4, "GC counted four region computations");

    // each mechanism must have happened
    for (int t = 1; t <= 5; t++) check(n_task[t] > 0, $sformatf("task T%0d never ran", t));
    check(n_loop == 3, "loops back to T1, T2, T3");
    check(n_overlap > 0, "loop pipelining: UF start while previous computation in flight");
    check(EXP_DEFER ? (n_defer > 0) : (n_defer == 0), "result write deferral as the schedule requires");
    check(n_sat > 0, "BF saturation exercised");
    check(n_acc_err >= 2, "refused host accesses flagged");
    check(n_cmd_err >= 4, "commands during T4 refused");
    $display("mechanisms: T1=%0d T2=%0d T3=%0d T4=%0d T5=%0d loops=%0d overlap=%0d deferred=%0d saturated=%0d acc_err=%0d cmd_err=%0d",
             n_task[1], n_task[2], n_task[3], n_task[4], n_task[5], n_loop, n_overlap, n_defer,
             n_sat, n_acc_err, n_cmd_err);
    finished = 1'b1;
  end

endmodule

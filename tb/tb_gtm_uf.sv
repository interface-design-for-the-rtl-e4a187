// tb_gtm_uf: self-checking test of the unit function with the 6/3/2 timing
// (one read stage) and the 3/3/3/2 timing (two read stages, port 1 for the
// second). Back-to-back computations are started every P cycles (8 and 5)
// with a memory model that returns each tap's word MEM_LAT cycles after the
// request. Each `ok` must come exactly uf_ready = 11 cycles after its start
// with all NBF lane results equal to the weighted sums computed here; `done`
// must be low while work is in flight and high afterwards.
module tb_gtm_uf;
  import gtm_pkg::*;

  logic clk = 1'b0, rst;
  always #5 clk = ~clk;

  localparam int NCOMP = 20;
  int unsigned checks = 0, failures = 0;

  logic signed [WGT_W-1:0] wgt [MAX_TAPS];
  logic [DW-1:0]           words [NCOMP][6];   // words[k][t]: tap t of computation k

  function automatic logic [2*DW-1:0] expect_res(int k);
    logic [2*DW-1:0] v;
    for (int j = 0; j < NBF; j++) begin
      longint s = 0;
      for (int t = 0; t < 6; t++) s += longint'(wgt[t]) * longint'(words[k][t][j*PIX_W +: PIX_W]);
      if (s > 32767) s = 32767;
      if (s < -32768) s = -32768;
      v[j*RES_W +: RES_W] = RES_W'(s);
    end
    return v;
  endfunction

  // Two UFs, same stimulus schedule shape, different timing.
  logic          st_a, st_d, ok_a, ok_d, dn_a, dn_d;
  logic [DW-1:0] rd_a [2], rd_d [2];
  logic [2*DW-1:0] res_a, res_d;

  gtm_uf #(.R1_LEN(6), .R2_LEN(0), .C_LEN(3), .W_LEN(2)) u_a (
    .clk, .rst, .start(st_a), .rdata(rd_a), .wgt, .ok(ok_a), .res(res_a), .done(dn_a));
  gtm_uf #(.R1_LEN(3), .R2_LEN(3), .C_LEN(3), .W_LEN(2)) u_d (
    .clk, .rst, .start(st_d), .rdata(rd_d), .wgt, .ok(ok_d), .res(res_d), .done(dn_d));

  // Memory stand-in: tap t of the computation started at cycle s is on
  // rdata at cycle s + t + MEM_LAT (port 0 for stage 1, port 1 for stage 2).
  longint unsigned cyc = 0;
  longint unsigned start_a [NCOMP], start_d [NCOMP];
  int na = 0, nd = 0, oka = 0, okd = 0;

  always @(posedge clk) cyc <= cyc + 1;

  always_comb begin
    rd_a[0] = '0; rd_a[1] = '0; rd_d[0] = '0; rd_d[1] = '0;
    for (int k = 0; k < NCOMP; k++) begin
      for (int t = 0; t < 6; t++) begin
        if (k < na && cyc == start_a[k] + t + MEM_LAT) rd_a[0] = words[k][t];
        if (k < nd && cyc == start_d[k] + t + MEM_LAT) begin
          if (t < 3) rd_d[0] = words[k][t]; else rd_d[1] = words[k][t];
        end
      end
    end
  end

  always @(posedge clk) begin
    if (!rst && ok_a) begin
      checks += 2;
      if (cyc != start_a[oka] + 11) begin failures++; $display("FAIL a: ok at %0d", cyc - start_a[oka]); end
      if (res_a != expect_res(oka)) begin failures++; $display("FAIL a: result %0d", oka); end
      oka++;
    end
    if (!rst && ok_d) begin
      checks += 2;
      if (cyc != start_d[okd] + 11) begin failures++; $display("FAIL d: ok at %0d", cyc - start_d[okd]); end
      if (res_d != expect_res(okd)) begin failures++; $display("FAIL d: result %0d", okd); end
      okd++;
    end
  end

  initial begin
    for (int t = 0; t < MAX_TAPS; t++) wgt[t] = WGT_W'($urandom);
    for (int k = 0; k < NCOMP; k++) for (int t = 0; t < 6; t++) words[k][t] = $urandom;
    words[3] = '{default: 32'hffff_ffff};  // large sums: saturation
    st_a = 0; st_d = 0; rst = 1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    fork
      for (int k = 0; k < NCOMP; k++) begin
        @(negedge clk); st_a = 1; start_a[k] = cyc; na = k + 1;
        @(negedge clk); st_a = 0;
        repeat (6) @(negedge clk);
        checks++;
        if (dn_a) begin failures++; $display("FAIL a: done while busy"); end
      end
      for (int k = 0; k < NCOMP; k++) begin
        @(negedge clk); st_d = 1; start_d[k] = cyc; nd = k + 1;
        @(negedge clk); st_d = 0;
        repeat (3) @(negedge clk);
      end
    join
    repeat (20) @(negedge clk);
    checks += 4;
    if (oka != NCOMP) begin failures++; $display("FAIL: %0d results from a", oka); end
    if (okd != NCOMP) begin failures++; $display("FAIL: %0d results from d", okd); end
    if (!dn_a || !dn_d) begin failures += 2; $display("FAIL: done low when idle"); end
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

// gtm_uf: Unit Function (UF), a pipelined group of NBF basic functions.
//
// One memory word holds NBF pixels, so NBF BFs evaluate the template at NBF
// neighbouring pixel locations at once. The UF follows the R/C/W timing
// specification: after `start` it consumes R1 words from memory port 0
// (stage R1) and then R2 words from port 1 (stage R2, absent when R2 = 0),
// one word per cycle, computes for C_LEN cycles and hands W_LEN result words
// to the loop controller, which writes them to memory.
//
// Timing, counted from the cycle `start` is high (the cycle the loop
// controller issues the first read): the word of tap t arrives MEM_LAT cycles
// after its read, i.e. at offset t + MEM_LAT; the sums are complete at offset
// R1 + R2 + MEM_LAT; the first compute cycle saturates them and the remaining
// C_LEN - 1 cycles are pipeline registers; `ok` is high for one cycle at
// offset gtm_pkg::uf_ready(R1, R2, C_LEN) with the packed results in `res`
// (lane 0 in the low RES_W bits). A new `start` may come every P cycles, with
// P no smaller than R1 or R2. `done` is high when no computation is in flight.
// The stage structure and cycle counts follow the document's UF timing; the
// arithmetic and the memory latency are this design's choices.
module gtm_uf
  import gtm_pkg::*;
#(
  parameter int unsigned R1_LEN = 6,
  parameter int unsigned R2_LEN = 0,
  parameter int unsigned C_LEN  = 3,
  parameter int unsigned W_LEN  = 2
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    start,
  input  logic [DW-1:0]           rdata [2],     // read data of memory ports 0 and 1
  input  logic signed [WGT_W-1:0] wgt   [MAX_TAPS],
  output logic                    ok,
  output logic [W_LEN*DW-1:0]     res,
  output logic                    done
);

  localparam int unsigned R     = R1_LEN + R2_LEN;
  localparam int unsigned READY = uf_ready(R1_LEN, R2_LEN, C_LEN);

  initial begin
    assert (NBF * RES_W == W_LEN * DW)
      else $error("gtm_uf: NBF*RES_W must fill exactly W_LEN memory words");
    assert (R1_LEN >= 1 && C_LEN >= 1 && R <= MAX_TAPS)
      else $error("gtm_uf: unsupported UF timing");
  end

  // st[d]: a computation started d cycles ago.
  logic [READY:0] st;
  logic [READY:1] st_q;
  assign st = {st_q, start};

  always_ff @(posedge clk) begin
    if (rst) st_q <= '0;
    else     st_q <= st[READY-1:0];
  end

  // Stage controls: which tap arrives on each port this cycle.
  logic                         s1_en, s1_first, s2_en, s2_first, sat_en;
  logic [$clog2(MAX_TAPS)-1:0]  s1_tap, s2_tap;

  always_comb begin
    s1_en = 1'b0; s1_first = 1'b0; s1_tap = '0;
    s2_en = 1'b0; s2_first = 1'b0; s2_tap = '0;
    for (int unsigned t = 0; t < R; t++) begin
      if (st[t + MEM_LAT]) begin
        if (t < R1_LEN) begin
          s1_en = 1'b1; s1_first = (t == 0); s1_tap = t[$clog2(MAX_TAPS)-1:0];
        end else begin
          s2_en = 1'b1; s2_first = (t == R1_LEN); s2_tap = t[$clog2(MAX_TAPS)-1:0];
        end
      end
    end
    sat_en = st[R + MEM_LAT];
  end

  logic [NBF*RES_W-1:0] c_first;

  for (genvar j = 0; j < NBF; j++) begin : g_bf
    gtm_bf #(.USE_S2(R2_LEN != 0)) u_bf (
      .clk     (clk),
      .s1_en   (s1_en),
      .s1_first(s1_first),
      .s1_pix  (rdata[0][j*PIX_W +: PIX_W]),
      .s1_wgt  (wgt[s1_tap]),
      .s2_en   (s2_en),
      .s2_first(s2_first),
      .s2_pix  (rdata[1][j*PIX_W +: PIX_W]),
      .s2_wgt  (wgt[s2_tap]),
      .sat_en  (sat_en),
      .res_o   (c_first[j*RES_W +: RES_W])
    );
  end

  // Remaining compute cycles: plain pipeline registers.
  if (C_LEN == 1) begin : g_c1
    assign res = c_first;
  end else begin : g_cn
    logic [NBF*RES_W-1:0] c_pipe [C_LEN-1];
    always_ff @(posedge clk) begin
      c_pipe[0] <= c_first;
      for (int unsigned k = 1; k < C_LEN - 1; k++) c_pipe[k] <= c_pipe[k-1];
    end
    assign res = c_pipe[C_LEN-2];
  end

  assign ok   = st[READY];
  assign done = ~|st;

endmodule

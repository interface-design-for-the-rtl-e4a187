// gtm_lc: Loop Controller (LC) of the RF controller.
//
// Once activated by `assert_i`, the LC walks the region word by word in
// scan-line order (rows row_first..row_last, word columns
// col_first..col_last) and starts one UF computation per word every P cycles.
// For each computation it issues the template reads (tap t at address
// base + offset[t], where base = img_base + row * stride + col), taps
// 0..R1-1 on memory port 0 and taps R1..R1+R2-1 on port 1, one per cycle
// after the start. It captures the UF result on `uf_ok` and writes its W_LEN
// words to consecutive addresses from res_base on port WP, in the first
// cycles at or after the result is ready that never meet a read on that port
// (gtm_pkg::write_start). P is the smallest period for which reads and writes
// never collide (gtm_pkg::pipe_period): 8 for the 6/3/2 timing on one port,
// 6 with the write moved to a second port, and 5 for the 3/3/3/2 timing with
// the write on the port of R1. Each result and the end of the region are
// reported to the result and status controller.
//
// Interface: memory requests are mem_req_t per port (M_EN, M_RW, M_Addr of
// the document's LC), valid in the cycle they are driven; `rfc_reset`
// clears the loop; `done_o` pulses once when the last write has been issued
// and the UF is empty. The loop pipelining follows the document; the address
// arithmetic, the region encoding and the single result buffer are this
// design's choices.
module gtm_lc
  import gtm_pkg::*;
#(
  parameter int unsigned N_PORTS = 1,
  parameter int unsigned R1_LEN  = 6,
  parameter int unsigned R2_LEN  = 0,
  parameter int unsigned C_LEN   = 3,
  parameter int unsigned W_LEN   = 2,
  parameter int unsigned WP      = 0    // memory port that receives the results
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    rfc_reset,
  input  logic                    assert_i,
  input  region_t                 region,
  input  logic signed [OFF_W-1:0] offset [MAX_TAPS],
  output mem_req_t                mem_req [N_PORTS],
  output logic                    uf_start,
  input  logic                    uf_ok,
  input  logic [W_LEN*DW-1:0]     uf_res,
  input  logic                    uf_done,
  output logic                    res_valid,
  output logic [W_LEN*DW-1:0]     res_data,
  output logic                    busy_o,
  output logic                    done_o
);

  localparam int unsigned R     = R1_LEN + R2_LEN;
  localparam int unsigned P     = pipe_period(R1_LEN, R2_LEN, C_LEN, W_LEN, WP);
  localparam int unsigned WS    = write_start(P, R1_LEN, R2_LEN, C_LEN, W_LEN, WP);
  localparam int unsigned READY = uf_ready(R1_LEN, R2_LEN, C_LEN);
  localparam int unsigned DEPTH = WS + W_LEN;          // offsets 0..DEPTH-1 tracked
  localparam int unsigned PH_W  = $clog2(P + 1);

  initial begin
    assert (N_PORTS >= 1 && N_PORTS <= 2) else $error("gtm_lc: 1 or 2 memory ports");
    assert (R2_LEN == 0 || N_PORTS == 2) else $error("gtm_lc: stage R2 needs port 1");
    assert (WP < N_PORTS) else $error("gtm_lc: write port does not exist");
    // One result buffer: a result must be written before the next is ready.
    assert (WS + W_LEN <= READY + P) else $error("gtm_lc: result buffer too small");
  end

  logic            running, more;
  logic [PH_W-1:0] ph;
  logic [AW-1:0]   row, col, row_base, wptr;
  logic [AW-1:0]   base_now;
  logic            start;

  // st[d] / base[d]: computation started d cycles ago and its base address.
  logic [DEPTH-1:0] st;
  logic [DEPTH-1:1] st_q;
  logic [AW-1:0]    base [DEPTH];
  logic [AW-1:0]    base_q [DEPTH];
  logic [W_LEN*DW-1:0] resbuf, wbuf;

  assign start    = running && more && (ph == '0);
  assign base_now = row_base + col;
  assign st       = {st_q, start};

  always_comb begin
    base[0] = base_now;
    for (int unsigned d = 1; d < DEPTH; d++) base[d] = base_q[d];
  end

  always_ff @(posedge clk) begin
    if (rst || rfc_reset) begin
      running  <= 1'b0;
      more     <= 1'b0;
      ph       <= '0;
      row      <= '0;
      col      <= '0;
      row_base <= '0;
      wptr     <= '0;
      st_q     <= '0;
      done_o   <= 1'b0;
    end else begin
      done_o <= 1'b0;
      st_q   <= st[DEPTH-2:0];
      if (!running) begin
        if (assert_i) begin
          running  <= 1'b1;
          more     <= 1'b1;
          ph       <= '0;
          row      <= region.row_first;
          col      <= region.col_first;
          row_base <= region.img_base + AW'(32'(region.row_first) * 32'(region.stride));
          wptr     <= region.res_base;
        end
      end else begin
        ph <= (ph == PH_W'(P - 1)) ? '0 : ph + 1'b1;
        if (start) begin
          if (col == region.col_last) begin
            col      <= region.col_first;
            row      <= row + 1'b1;
            row_base <= row_base + region.stride;
            if (row == region.row_last) more <= 1'b0;
          end else begin
            col <= col + 1'b1;
          end
        end
        if (!more && !(|st) && uf_done) begin
          running <= 1'b0;
          done_o  <= 1'b1;
        end
      end
      // Result words are written one per cycle from the write pointer.
      for (int unsigned d = WS; d < DEPTH; d++)
        if (st[d]) wptr <= wptr + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    for (int unsigned d = 1; d < DEPTH; d++) base_q[d] <= base[d-1];
    if (uf_ok) resbuf <= uf_res;
  end

  // Memory requests: reads on their stage's port, writes in the write slots.
  always_comb begin
    for (int unsigned p = 0; p < N_PORTS; p++) mem_req[p] = MEM_REQ_IDLE;
    for (int unsigned d = 0; d < R; d++) begin
      if (st[d]) begin
        if (d < R1_LEN) begin
          mem_req[0].en   = 1'b1;
          mem_req[0].addr = base[d] + AW'(offset[d]);
        end else begin
          mem_req[N_PORTS-1].en   = 1'b1;
          mem_req[N_PORTS-1].addr = base[d] + AW'(offset[d]);
        end
      end
    end
    for (int unsigned d = WS; d < DEPTH; d++) begin
      if (st[d]) begin
        mem_req[WP].en    = 1'b1;
        mem_req[WP].we    = 1'b1;
        mem_req[WP].addr  = wptr;
        mem_req[WP].wdata = wbuf[(d - WS) * DW +: DW];
      end
    end
  end

  // When the write slot opens in the very cycle the result appears, the
  // result is written straight from the UF.
  assign wbuf = uf_ok ? uf_res : resbuf;

  assign uf_start  = start;
  assign res_valid = uf_ok;
  assign res_data  = uf_res;
  assign busy_o    = running;

endmodule

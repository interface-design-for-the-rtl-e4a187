// gtm_rsc: Result and Status Controller (RSC) of the RF controller.
//
// Collects the UF results reported by the loop controller and the RF status,
// and answers host reads. For template matching the result the host needs
// most is the best match, so the RSC keeps the number of UF computations so
// far, the largest single-pixel result and the index of the pixel that
// produced it (computation number * NBF + lane; on a tie the earlier pixel
// wins). Host registers (`rd_addr`): 0 status {done, busy} in bits [1:0],
// 1 computation count, 2 best value (sign-extended), 3 best index.
//
// Timing: `rd_data` is valid with `rd_valid` one cycle after `rd_en`.
// `clear` (the GC's Reset) empties the statistics; `done` sets the done flag
// until the next clear. The per-pixel results themselves are written to
// memory by the loop controller. What the summary holds is this design's
// choice; the document says only that the RSC sends results and status.
module gtm_rsc
  import gtm_pkg::*;
#(
  parameter int unsigned W_LEN = 2
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                clear,
  input  logic                res_valid,
  input  logic [W_LEN*DW-1:0] res_data,
  input  logic                busy,
  input  logic                done,
  input  logic                rd_en,
  input  logic [1:0]          rd_addr,
  output logic                rd_valid,
  output logic [HDW-1:0]      rd_data
);

  logic                    done_q, have_best;
  logic [HDW-1:0]          count, best_idx;
  logic signed [RES_W-1:0] best_val;

  // Largest lane of the incoming result word group (lowest lane on a tie).
  logic signed [RES_W-1:0] lane_max;
  logic [$clog2(NBF)-1:0]  lane_arg;
  always_comb begin
    lane_max = res_data[RES_W-1:0];
    lane_arg = '0;
    for (int unsigned j = 1; j < NBF; j++) begin
      if ($signed(res_data[j*RES_W +: RES_W]) > lane_max) begin
        lane_max = res_data[j*RES_W +: RES_W];
        lane_arg = j[$clog2(NBF)-1:0];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      done_q    <= 1'b0;
      have_best <= 1'b0;
      count     <= '0;
      best_val  <= '0;
      best_idx  <= '0;
    end else begin
      if (done) done_q <= 1'b1;
      if (res_valid) begin
        count <= count + 1'b1;
        if (!have_best || lane_max > best_val) begin
          have_best <= 1'b1;
          best_val  <= lane_max;
          best_idx  <= (count << $clog2(NBF)) | HDW'(lane_arg);
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_valid <= 1'b0;
      rd_data  <= '0;
    end else begin
      rd_valid <= rd_en;
      if (rd_en) begin
        unique case (rd_addr)
          2'd0: rd_data <= {30'b0, done_q, busy};
          2'd1: rd_data <= count;
          2'd2: rd_data <= HDW'(best_val);
          2'd3: rd_data <= best_idx;
        endcase
      end
    end
  end

endmodule

// gtm_rc: Region Controller (RC) of the RF controller.
//
// Receives the region boundary from the host and holds it for the loop
// controller. The host writes one register per access, selected by `addr`:
// 0 first row, 1 last row, 2 first word column, 3 last word column,
// 4 words per image row, 5 image base address, 6 result base address
// (the low AW bits of `wdata` are used). The stored boundary is presented on
// `region` from the cycle after the write. `clear` empties the registers.
// Storing the region in registers follows the document; the register map is
// this design's choice.
module gtm_rc
  import gtm_pkg::*;
(
  input  logic           clk,
  input  logic           rst,
  input  logic           clear,
  input  logic           we,
  input  logic [2:0]     addr,
  input  logic [HDW-1:0] wdata,
  output region_t        region
);

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      region <= '0;
    end else if (we) begin
      unique case (addr)
        3'd0: region.row_first <= wdata[AW-1:0];
        3'd1: region.row_last  <= wdata[AW-1:0];
        3'd2: region.col_first <= wdata[AW-1:0];
        3'd3: region.col_last  <= wdata[AW-1:0];
        3'd4: region.stride    <= wdata[AW-1:0];
        3'd5: region.img_base  <= wdata[AW-1:0];
        3'd6: region.res_base  <= wdata[AW-1:0];
        default: ;
      endcase
    end
  end

endmodule

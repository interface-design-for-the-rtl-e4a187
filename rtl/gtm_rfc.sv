// gtm_rfc: RF Controller (RFC), the four controllers of a region function.
//
// The RFC is split into four parts: the Region Controller (region boundary
// from the host), the Template Controller (template from the host), the
// Result and Status Controller (results and status to the host) and the Loop
// Controller (drives the UF over the region and the memory traffic). The
// GC's Reset clears the LC and the RSC, and its Assert starts the LC. The
// host's region and template writes are already decoded by the HI.
// UF side: Start to the UF, Ok and Done from it, and the UF results.
// Timing of each part is described in its own module. This split and the
// signal names (Reset, Assert, Start, Ok, Done, M_EN/M_RW/M_Addr) follow the
// document; the host-side register maps are this design's choice.
module gtm_rfc
  import gtm_pkg::*;
#(
  parameter int unsigned N_PORTS = 1,
  parameter int unsigned R1_LEN  = 6,
  parameter int unsigned R2_LEN  = 0,
  parameter int unsigned C_LEN   = 3,
  parameter int unsigned W_LEN   = 2,
  parameter int unsigned WP      = 0
) (
  input  logic                        clk,
  input  logic                        rst,
  // global controller
  input  logic                        gc_reset,
  input  logic                        gc_assert,
  output logic                        rf_busy,
  output logic                        rf_done,
  // host interface
  input  logic                        rgn_we,
  input  logic [2:0]                  rgn_addr,
  input  logic                        tpl_we,
  input  logic [$clog2(MAX_TAPS)-1:0] tpl_addr,
  input  logic [HDW-1:0]              h_wdata,
  input  logic                        sts_re,
  input  logic [1:0]                  sts_addr,
  output logic                        sts_rvalid,
  output logic [HDW-1:0]              sts_rdata,
  // memory interface
  output mem_req_t                    mem_req [N_PORTS],
  // unit function
  output logic                        uf_start,
  input  logic                        uf_ok,
  input  logic [W_LEN*DW-1:0]         uf_res,
  input  logic                        uf_done,
  output logic signed [WGT_W-1:0]     uf_wgt [MAX_TAPS]
);

  region_t                 region;
  logic signed [OFF_W-1:0] offset [MAX_TAPS];
  logic                    res_valid;
  logic [W_LEN*DW-1:0]     res_data;

  gtm_rc u_rc (
    .clk, .rst, .clear(1'b0), .we(rgn_we), .addr(rgn_addr), .wdata(h_wdata), .region
  );

  gtm_tc u_tc (
    .clk, .rst, .we(tpl_we), .addr(tpl_addr), .wdata(h_wdata), .offset, .weight(uf_wgt)
  );

  gtm_lc #(
    .N_PORTS(N_PORTS), .R1_LEN(R1_LEN), .R2_LEN(R2_LEN), .C_LEN(C_LEN), .W_LEN(W_LEN), .WP(WP)
  ) u_lc (
    .clk, .rst, .rfc_reset(gc_reset), .assert_i(gc_assert), .region, .offset,
    .mem_req, .uf_start, .uf_ok, .uf_res, .uf_done,
    .res_valid, .res_data, .busy_o(rf_busy), .done_o(rf_done)
  );

  gtm_rsc #(.W_LEN(W_LEN)) u_rsc (
    .clk, .rst, .clear(gc_reset), .res_valid, .res_data, .busy(rf_busy), .done(rf_done),
    .rd_en(sts_re), .rd_addr(sts_addr), .rd_valid(sts_rvalid), .rd_data(sts_rdata)
  );

endmodule

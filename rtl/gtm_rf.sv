// gtm_rf: Region Function (RF), a unit function plus its RF controller.
//
// The RF applies the template to every pixel of one image region: the RFC's
// loop controller feeds the UF from on-board memory and stores the UF
// results back, while the RFC's other parts take the region and template
// from the host and report results and status. Memory requests leave on
// `mem_req` (one per port the RF uses) and read data returns on `mem_rdata`
// MEM_LAT cycles after the request. Port 1 read data is unused when the UF
// has no second read stage. Structure follows the document.
module gtm_rf
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
  input  logic                        gc_reset,
  input  logic                        gc_assert,
  output logic                        rf_busy,
  output logic                        rf_done,
  input  logic                        rgn_we,
  input  logic [2:0]                  rgn_addr,
  input  logic                        tpl_we,
  input  logic [$clog2(MAX_TAPS)-1:0] tpl_addr,
  input  logic [HDW-1:0]              h_wdata,
  input  logic                        sts_re,
  input  logic [1:0]                  sts_addr,
  output logic                        sts_rvalid,
  output logic [HDW-1:0]              sts_rdata,
  output mem_req_t                    mem_req   [N_PORTS],
  input  logic [DW-1:0]               mem_rdata [N_PORTS]
);

  logic                    uf_start, uf_ok, uf_done;
  logic [W_LEN*DW-1:0]     uf_res;
  logic signed [WGT_W-1:0] uf_wgt [MAX_TAPS];
  logic [DW-1:0]           uf_rdata [2];

  assign uf_rdata[0] = mem_rdata[0];
  assign uf_rdata[1] = mem_rdata[N_PORTS-1];

  gtm_rfc #(
    .N_PORTS(N_PORTS), .R1_LEN(R1_LEN), .R2_LEN(R2_LEN), .C_LEN(C_LEN), .W_LEN(W_LEN), .WP(WP)
  ) u_rfc (
    .clk, .rst, .gc_reset, .gc_assert, .rf_busy, .rf_done,
    .rgn_we, .rgn_addr, .tpl_we, .tpl_addr, .h_wdata,
    .sts_re, .sts_addr, .sts_rvalid, .sts_rdata,
    .mem_req, .uf_start, .uf_ok, .uf_res, .uf_done, .uf_wgt
  );

  gtm_uf #(.R1_LEN(R1_LEN), .R2_LEN(R2_LEN), .C_LEN(C_LEN), .W_LEN(W_LEN)) u_uf (
    .clk, .rst, .start(uf_start), .rdata(uf_rdata), .wgt(uf_wgt),
    .ok(uf_ok), .res(uf_res), .done(uf_done)
  );

endmodule

// gtm_fpga_top: FPGA side of the GTM interface, one or two region functions.
//
// The host loads an image into on-board memory, gives a region boundary and a
// template, starts the region computation and reads the results back, each
// as a separate task it commands. Inside, the HI decodes the host's tagged
// accesses, the GC follows the task commands and owns Mux_Sel, Reset and
// Assert, the HMI(s) move data between host and memory, one multiplexer per
// memory port picks which unit drives that port's MI, and the RF (UF plus RF
// controller) evaluates the template over the region at the pipeline period
// the UF timing and the connectivity graph allow.
//
// The parameters select the connectivity graph and the UF timing:
//   N_PORTS=1, SPLIT_HMI=0            one port, one bidirectional HMI
//   N_PORTS=1, SPLIT_HMI=1            one port, one HMI per direction
//   N_PORTS=2, SPLIT_HMI=1, WP=1      image on port 0, results on port 1
//   N_PORTS=2, R2_LEN>0, IMG_MASK=3   two read stages on duplicated images
//   N_RF=2, N_PORTS=2, SPLIT_HMI=1, IMG_MASK=3
//                                     two RFs, RF r alone on port r; the
//                                     image is broadcast to both ports
// The defaults are the one-port, one-HMI design with the 6/3/2 UF timing,
// whose loop period is 8 cycles (6 with results on a second port, 5 with the
// 3/3/3/2 timing on two ports). With two RFs, each task command names the
// RFs that take part (see gtm_gc): region and template writes reach only
// those RFs, T4 runs them in parallel, and status register r of RF k is read
// at status address 4k + r. Memory pins are registered by the MIs and
// expect a synchronous SRAM with one cycle of read latency. The block
// structure and the period rules follow the document; widths, tags, command
// encoding and the UF arithmetic are this design's choices.
module gtm_fpga_top
  import gtm_pkg::*;
#(
  parameter int unsigned N_PORTS   = 1,
  parameter int unsigned N_RF      = 1,
  parameter bit          SPLIT_HMI = 1'b0,
  parameter int unsigned R1_LEN    = 6,
  parameter int unsigned R2_LEN    = 0,
  parameter int unsigned C_LEN     = 3,
  parameter int unsigned W_LEN     = 2,
  parameter int unsigned WP        = 0,
  parameter logic [1:0]  IMG_MASK  = 2'b01
) (
  input  logic           clk,
  input  logic           rst,
  // host
  input  logic           h_valid,
  input  logic           h_we,
  input  tag_e           h_tag,
  input  logic [AW-1:0]  h_addr,
  input  logic [HDW-1:0] h_wdata,
  output logic           h_ready,
  output logic           h_rvalid,
  output logic [HDW-1:0] h_rdata,
  output logic           acc_err,
  output logic           cmd_err,
  output task_e          cur_task,
  output logic           rf_busy,       // some RF is computing
  output logic [15:0]    n_compute,     // completed region computations
  // on-board memory ports
  output logic           m_en    [N_PORTS],
  output logic           m_rw    [N_PORTS],
  output logic [AW-1:0]  m_addr  [N_PORTS],
  output logic [DW-1:0]  m_wdata [N_PORTS],
  input  logic [DW-1:0]  m_rdata [N_PORTS]
);

  // HI decoded accesses
  logic           cmd_we, img_we, res_re, rgn_we, tpl_we, sts_re;
  logic [AW-1:0]  hi_addr;
  logic [HDW-1:0] hi_wdata;
  logic           sts_rvalid, hmi_rvalid;
  logic [HDW-1:0] sts_rdata, hmi_rdata;

  // GC
  src_e            mux_sel [N_PORTS];
  logic [N_RF-1:0] rf_sel, rf_reset, rf_assert, rf_done, busy_v, sts_rv_v;
  logic [1:0]      img_ports;
  logic            rd_port;
  logic [HDW-1:0]  sts_rd_v [N_RF];

  // Memory traffic
  mem_req_t       rf_req [N_PORTS], hmi1_req [N_PORTS], hmi2_req [N_PORTS], mi_req [N_PORTS];
  logic           mi_rvalid [N_PORTS];
  logic [DW-1:0]  mi_rdata  [N_PORTS];

  gtm_hi u_hi (
    .clk, .rst, .h_valid, .h_we, .h_tag, .h_addr, .h_wdata, .h_ready, .h_rvalid, .h_rdata,
    .acc_err, .cur_task, .cmd_we, .img_we, .res_re, .rgn_we, .tpl_we, .sts_re,
    .addr_o(hi_addr), .wdata_o(hi_wdata),
    .hmi_rvalid, .hmi_rdata, .sts_rvalid, .sts_rdata
  );

  gtm_gc #(
    .N_PORTS(N_PORTS), .N_RF(N_RF), .IMG_MASK(IMG_MASK), .RES_PORT(WP), .SPLIT_HMI(SPLIT_HMI)
  ) u_gc (
    .clk, .rst, .cmd_we, .cmd_data(hi_wdata), .rf_done, .cur_task, .rf_sel, .mux_sel,
    .img_ports, .rd_port, .rf_reset, .rf_assert, .cmd_err, .n_compute
  );

  if (SPLIT_HMI) begin : g_hmi_split
    logic           unused_rv;
    logic [HDW-1:0] unused_rd;
    gtm_hmi #(.N_PORTS(N_PORTS), .WR_EN(1'b1), .RD_EN(1'b0)) u_hmi1 (
      .clk, .rst, .wr_en(img_we), .rd_en(1'b0), .addr(hi_addr), .wdata(hi_wdata),
      .wr_ports(img_ports), .rd_port(1'b0),
      .req(hmi1_req), .mi_rvalid, .mi_rdata, .h_rvalid(unused_rv), .h_rdata(unused_rd)
    );
    gtm_hmi #(.N_PORTS(N_PORTS), .WR_EN(1'b0), .RD_EN(1'b1)) u_hmi2 (
      .clk, .rst, .wr_en(1'b0), .rd_en(res_re), .addr(hi_addr), .wdata(hi_wdata),
      .wr_ports(2'b00), .rd_port,
      .req(hmi2_req), .mi_rvalid, .mi_rdata, .h_rvalid(hmi_rvalid), .h_rdata(hmi_rdata)
    );
  end else begin : g_hmi_one
    gtm_hmi #(.N_PORTS(N_PORTS), .WR_EN(1'b1), .RD_EN(1'b1)) u_hmi (
      .clk, .rst, .wr_en(img_we), .rd_en(res_re), .addr(hi_addr), .wdata(hi_wdata),
      .wr_ports(img_ports), .rd_port,
      .req(hmi1_req), .mi_rvalid, .mi_rdata, .h_rvalid(hmi_rvalid), .h_rdata(hmi_rdata)
    );
    always_comb for (int unsigned p = 0; p < N_PORTS; p++) hmi2_req[p] = MEM_REQ_IDLE;
  end

  // Region functions. With one RF it uses every port; with two, RF r uses
  // port r only. Region and template writes go to the RFs the current task
  // selected; a status read goes to the RF named by address bit 2.
  localparam int unsigned RF_PORTS = (N_RF == 1) ? N_PORTS : 1;

  for (genvar r = 0; r < N_RF; r++) begin : g_rf
    localparam int unsigned P0 = (N_RF == 1) ? 0 : r;
    mem_req_t      req   [RF_PORTS];
    logic [DW-1:0] rdata [RF_PORTS];
    logic          sts_hit;

    for (genvar q = 0; q < RF_PORTS; q++) begin : g_q
      assign rf_req[P0 + q] = req[q];
      assign rdata[q]       = mi_rdata[P0 + q];
    end
    assign sts_hit = (N_RF == 1) || (32'(hi_addr[2]) == r);

    gtm_rf #(
      .N_PORTS(RF_PORTS), .R1_LEN(R1_LEN), .R2_LEN(R2_LEN), .C_LEN(C_LEN), .W_LEN(W_LEN), .WP(WP)
    ) u_rf (
      .clk, .rst, .gc_reset(rf_reset[r]), .gc_assert(rf_assert[r]), .rf_busy(busy_v[r]),
      .rf_done(rf_done[r]),
      .rgn_we(rgn_we && rf_sel[r]), .rgn_addr(hi_addr[2:0]),
      .tpl_we(tpl_we && rf_sel[r]), .tpl_addr(hi_addr[$clog2(MAX_TAPS)-1:0]),
      .h_wdata(hi_wdata), .sts_re(sts_re && sts_hit), .sts_addr(hi_addr[1:0]),
      .sts_rvalid(sts_rv_v[r]), .sts_rdata(sts_rd_v[r]),
      .mem_req(req), .mem_rdata(rdata)
    );
  end

  assign rf_busy = |busy_v;

  always_comb begin
    sts_rvalid = 1'b0;
    sts_rdata  = '0;
    for (int unsigned r = 0; r < N_RF; r++) begin
      if (sts_rv_v[r]) begin
        sts_rvalid = 1'b1;
        sts_rdata  = sts_rd_v[r];
      end
    end
  end

  if (N_RF > 1) begin : g_chk
    initial begin
      assert (N_RF == 2 && N_PORTS == 2 && R2_LEN == 0 && WP == 0)
        else $error("gtm_fpga_top: two RFs need two ports, one read stage and results on their own port");
    end
  end

  for (genvar p = 0; p < N_PORTS; p++) begin : g_port
    gtm_port_mux u_mux (
      .clk, .rst, .sel(mux_sel[p]), .req_rf(rf_req[p]), .req_hmi1(hmi1_req[p]), .req_hmi2(hmi2_req[p]),
      .req_o(mi_req[p])
    );
    gtm_mi u_mi (
      .clk, .rst, .req(mi_req[p]), .rvalid(mi_rvalid[p]), .rdata(mi_rdata[p]),
      .m_en(m_en[p]), .m_rw(m_rw[p]), .m_addr(m_addr[p]), .m_wdata(m_wdata[p]),
      .m_rdata(m_rdata[p])
    );
  end

endmodule

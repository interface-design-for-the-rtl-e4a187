// gtm_hmi: Host-Memory Interface (HMI).
//
// Moves data between the host and on-board memory on the host's behalf.
// Host-to-memory (WR_EN): an image word written by the host is turned into a
// memory write at the host's word address, issued one cycle later on every
// port set in `wr_ports` (given by the GC: the ports this HMI owns in T1).
// Writing the same image to two ports gives the duplicated image storage that
// lets two read stages fetch from separate ports, or broadcasts the image to
// two RFs. Memory-to-host (RD_EN): a host read becomes a memory read on port
// `rd_port` one cycle later; the word returns on `h_rvalid`/`h_rdata` when the
// memory interface delivers it (1 + MEM_LAT cycles after the host read). One
// read may be outstanding, and the port it went to is remembered. A bidirectional HMI has both enabled; the split designs
// use one HMI per direction. Host and memory share one clock here, so no
// buffer is needed. HMI duplication and directions follow the document; the
// single clock and address pass-through are this design's choice.
module gtm_hmi
  import gtm_pkg::*;
#(
  parameter int unsigned N_PORTS = 1,
  parameter bit          WR_EN   = 1'b1,
  parameter bit          RD_EN   = 1'b1
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           wr_en,
  input  logic           rd_en,
  input  logic [AW-1:0]  addr,
  input  logic [HDW-1:0] wdata,
  input  logic [1:0]     wr_ports,
  input  logic           rd_port,
  output mem_req_t       req [N_PORTS],
  input  logic           mi_rvalid [N_PORTS],
  input  logic [DW-1:0]  mi_rdata  [N_PORTS],
  output logic           h_rvalid,
  output logic [HDW-1:0] h_rdata
);

  logic          wr_q, rd_q, pend, rdp_q;
  logic [1:0]    wrp_q;
  logic [AW-1:0] addr_q;
  logic [DW-1:0] wdata_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_q <= 1'b0;
      rd_q <= 1'b0;
      pend <= 1'b0;
      rdp_q <= 1'b0;
    end else begin
      wr_q <= WR_EN && wr_en;
      rd_q <= RD_EN && rd_en;
      if (rd_q) pend <= 1'b1;
      else if (h_rvalid) pend <= 1'b0;
      if (rd_en) rdp_q <= rd_port;
    end
    wrp_q   <= wr_ports;
    addr_q  <= addr;
    wdata_q <= DW'(wdata);
  end

  always_comb begin
    for (int unsigned p = 0; p < N_PORTS; p++) begin
      req[p] = MEM_REQ_IDLE;
      if (wr_q && wrp_q[p]) begin
        req[p].en    = 1'b1;
        req[p].we    = 1'b1;
        req[p].addr  = addr_q;
        req[p].wdata = wdata_q;
      end
      if (rd_q && p == 32'(rdp_q)) begin
        req[p].en   = 1'b1;
        req[p].addr = addr_q;
      end
    end
  end

  // Return from the port the outstanding read went to (at most two ports).
  assign h_rvalid = pend && ((rdp_q && N_PORTS > 1) ? mi_rvalid[N_PORTS-1] : mi_rvalid[0]);
  assign h_rdata  = HDW'((rdp_q && N_PORTS > 1) ? mi_rdata[N_PORTS-1] : mi_rdata[0]);

endmodule

// gtm_mi: Memory Interface (MI) of one on-board memory port.
//
// Registers the selected request onto the memory pins (M_EN, M_RW with
// 1 = write, M_Addr, write data) and returns the read data of a synchronous
// SRAM, which answers one cycle after it sees a read. Read data therefore
// reaches the FPGA logic MEM_LAT = 2 cycles after the request, flagged by
// `rvalid`. Writes take effect one cycle after the request. Only single-word
// accesses are supported. The MI's role follows the document; the registered
// pins and the latency are this design's choice.
module gtm_mi
  import gtm_pkg::*;
(
  input  logic          clk,
  input  logic          rst,
  input  mem_req_t      req,
  output logic          rvalid,
  output logic [DW-1:0] rdata,
  // memory pins
  output logic          m_en,
  output logic          m_rw,
  output logic [AW-1:0] m_addr,
  output logic [DW-1:0] m_wdata,
  input  logic [DW-1:0] m_rdata
);

  always_ff @(posedge clk) begin
    if (rst) begin
      m_en   <= 1'b0;
      m_rw   <= 1'b0;
      rvalid <= 1'b0;
    end else begin
      m_en   <= req.en;
      m_rw   <= req.we;
      rvalid <= m_en && !m_rw;
    end
    m_addr  <= req.addr;
    m_wdata <= req.wdata;
  end

  assign rdata = m_rdata;

endmodule

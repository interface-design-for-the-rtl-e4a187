// gtm_port_mux: memory-port multiplexer at the top level.
//
// Passes the request of the unit that Mux_Sel names (the RF, the first HMI or
// the second HMI) to the memory interface of one port; SRC_NONE leaves the
// port idle. It is purely combinational; clk and rst only clock the
// assertions. An assertion flags a request from a
// unit that does not own the port, since such a request would be lost.
// Multiplexers controlled by the GC's Mux_Sel follow the document; the
// three-source form is this design's way of covering its connectivity graphs.
module gtm_port_mux
  import gtm_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  src_e     sel,
  input  mem_req_t req_rf,
  input  mem_req_t req_hmi1,
  input  mem_req_t req_hmi2,
  output mem_req_t req_o
);

  always_comb begin
    unique case (sel)
      SRC_RF:   req_o = req_rf;
      SRC_HMI1: req_o = req_hmi1;
      SRC_HMI2: req_o = req_hmi2;
      default:  req_o = MEM_REQ_IDLE;
    endcase
  end

  // A unit that does not own the port must not request it.
  a_rf_owns:   assert property (@(posedge clk) disable iff (rst) req_rf.en   |-> sel == SRC_RF)
    else $error("gtm_port_mux: RF request lost");
  a_hmi1_owns: assert property (@(posedge clk) disable iff (rst) req_hmi1.en |-> sel == SRC_HMI1)
    else $error("gtm_port_mux: HMI1 request lost");
  a_hmi2_owns: assert property (@(posedge clk) disable iff (rst) req_hmi2.en |-> sel == SRC_HMI2)
    else $error("gtm_port_mux: HMI2 request lost");

endmodule

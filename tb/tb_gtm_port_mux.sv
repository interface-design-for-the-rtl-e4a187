// tb_gtm_port_mux: self-checking test of the memory-port multiplexer: for
// every Mux_Sel value and random requests the output must be the selected
// source's request, or idle for SRC_NONE. Only the owning source requests, so
// the lost-request assertion must stay quiet.
module tb_gtm_port_mux;
  import gtm_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  src_e     sel;
  mem_req_t req_rf, req_hmi1, req_hmi2, req_o, e;
  int unsigned checks = 0, failures = 0;

  gtm_port_mux dut (.*);

  function automatic mem_req_t rnd(bit en);
    mem_req_t r;
    r.en = en; r.we = 1'($urandom); r.addr = AW'($urandom); r.wdata = $urandom;
    return r;
  endfunction

  initial begin
    sel = SRC_NONE; req_rf = MEM_REQ_IDLE; req_hmi1 = MEM_REQ_IDLE; req_hmi2 = MEM_REQ_IDLE;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      sel = src_e'($urandom_range(3));
      req_rf   = rnd(sel == SRC_RF);
      req_hmi1 = rnd(sel == SRC_HMI1);
      req_hmi2 = rnd(sel == SRC_HMI2);
      #1;
      unique case (sel)
        SRC_RF:   e = req_rf;
        SRC_HMI1: e = req_hmi1;
        SRC_HMI2: e = req_hmi2;
        default:  e = MEM_REQ_IDLE;
      endcase
      checks++;
      if (req_o != e) begin failures++; $display("FAIL: sel %s", sel.name()); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule

// tb_gtm_mi: self-checking test of the memory interface with the SRAM model:
// random reads and writes issued every cycle must reach the pins one cycle
// later, reads must return the last written word exactly MEM_LAT = 2 cycles
// after the request, flagged by rvalid, and rvalid must stay low otherwise.
module tb_gtm_mi;
  import gtm_pkg::*;
  logic clk = 1'b0, rst, rvalid, m_en, m_rw;
  always #5 clk = ~clk;
  mem_req_t      req;
  logic [DW-1:0] rdata, m_wdata, m_rdata;
  logic [AW-1:0] m_addr;
  logic [DW-1:0] shadow [16];
  logic [DW-1:0] exp_q [$];
  bit            rd_hist [$];
  int unsigned checks = 0, failures = 0;

  gtm_mi dut (.*);
  gtm_sram_model #(.AW(AW), .DW(DW), .DEPTH(1 << AW)) u_mem (
    .clk, .en(m_en), .rw(m_rw), .addr(m_addr), .wdata(m_wdata), .rdata(m_rdata));

  initial begin
    rst = 1; req = MEM_REQ_IDLE;
    for (int i = 0; i < 16; i++) shadow[i] = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      // outcome of the request made two cycles ago
      if (rd_hist.size() == 2) begin
        automatic bit was_rd = rd_hist.pop_front();
        checks++;
        if (rvalid != was_rd) begin failures++; $display("FAIL: rvalid at %0d", i); end
        if (was_rd) begin
          automatic logic [DW-1:0] e = exp_q.pop_front();
          checks++;
          if (rdata != e) begin failures++; $display("FAIL: read %h expected %h", rdata, e); end
        end
      end
      req.en = $urandom_range(3) != 0; req.we = $urandom_range(1); req.addr = AW'($urandom_range(15));
      req.wdata = $urandom;
      rd_hist.push_back(req.en && !req.we);
      if (req.en && !req.we) exp_q.push_back(shadow[req.addr]);
      if (req.en && req.we) shadow[req.addr] = req.wdata;
      @(posedge clk); #1;
      checks++;
      if (m_en != req.en || (req.en && (m_rw != req.we || m_addr != req.addr))) begin
        failures++; $display("FAIL: pins at %0d", i);
      end
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

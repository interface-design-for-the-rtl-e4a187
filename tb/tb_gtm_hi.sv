// tb_gtm_hi: self-checking test of the host interface. Random tagged host
// accesses are made in random tasks; each must raise exactly the strobe the
// tag map and the current task allow (or acc_err), with address and data
// passed on. Reads are answered by stand-ins for the HMI (3 cycles) and the
// RSC (1 cycle); the returned word must be the right one, h_ready must drop
// while a read is outstanding, and a refused read must return zero.
module tb_gtm_hi;
  import gtm_pkg::*;
  logic clk = 1'b0, rst;
  always #5 clk = ~clk;
  logic           h_valid, h_we, h_ready, h_rvalid, acc_err;
  tag_e           h_tag;
  logic [AW-1:0]  h_addr, addr_o;
  logic [HDW-1:0] h_wdata, h_rdata, wdata_o, hmi_rdata, sts_rdata;
  task_e          cur_task;
  logic           cmd_we, img_we, res_re, rgn_we, tpl_we, sts_re, hmi_rvalid, sts_rvalid;
  int unsigned checks = 0, failures = 0, n_busy = 0;

  gtm_hi dut (.*);

  // read-return stand-ins
  logic [2:0] hmi_sr;
  always_ff @(posedge clk) begin
    hmi_sr     <= rst ? 3'b0 : {hmi_sr[1:0], res_re};
    sts_rvalid <= !rst && sts_re;
    sts_rdata  <= 32'h5700_0000 | HDW'(addr_o);
  end
  assign hmi_rvalid = hmi_sr[2];
  assign hmi_rdata  = 32'h4d00_0000 | HDW'(h_addr);   // address held by the host

  task automatic check(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  initial begin
    rst = 1; h_valid = 0; h_we = 0; h_tag = TAG_CMD; h_addr = 0; h_wdata = 0; cur_task = TASK_IDLE;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 400; i++) begin
      automatic bit exp_ok;
      automatic logic [5:0] st;
      @(negedge clk);
      cur_task = task_e'($urandom_range(5));
      h_tag = tag_e'($urandom_range(5)); h_we = $urandom_range(1);
      h_addr = AW'($urandom); h_wdata = $urandom; h_valid = 1;
      #1;
      check(h_ready, "ready when nothing is outstanding");
      unique case (h_tag)
        TAG_CMD:      exp_ok = h_we;
        TAG_IMAGE:    exp_ok = h_we && cur_task == TASK_IMAGE;
        TAG_REGION:   exp_ok = h_we && cur_task == TASK_REGION;
        TAG_TEMPLATE: exp_ok = h_we && cur_task == TASK_TEMPLATE;
        TAG_RESULT:   exp_ok = !h_we && cur_task == TASK_RESULT;
        TAG_STATUS:   exp_ok = !h_we;
        default:      exp_ok = 0;
      endcase
      st = {cmd_we, img_we, rgn_we, tpl_we, res_re, sts_re};
      check(st == (exp_ok ? 6'b100000 >> int'(h_tag) : 6'b0), $sformatf("strobes %b for tag %s", st, h_tag.name()));
      check(addr_o == h_addr && wdata_o == h_wdata, "address and data passed on");
      @(negedge clk);
      h_valid = 0;
      check(acc_err == !exp_ok, "acc_err for refused access");
      if (!h_we) begin
        automatic int n = 0;
        while (!h_rvalid) begin
          check(!h_ready, "not ready while a read is outstanding");
          n_busy++;
          @(negedge clk); n++;
        end
        if (!exp_ok)                 check(h_rdata == 0, "refused read returns zero");
        else if (h_tag == TAG_STATUS) check(h_rdata == (32'h5700_0000 | HDW'(h_addr)), "status read data");
        else                          check(h_rdata == (32'h4d00_0000 | HDW'(h_addr)), "result read data");
        @(negedge clk);
      end
    end
    check(n_busy > 0, "reads made the host wait");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule

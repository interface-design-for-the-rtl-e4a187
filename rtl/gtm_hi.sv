// gtm_hi: Host Interface (HI).
//
// The host talks to the FPGA through tagged accesses: h_tag says which kind
// of data is carried, h_addr selects a word or register and h_wdata carries
// written data. The HI is the memory map from tags to storage types:
// TAG_CMD writes go to the GC, TAG_IMAGE writes and TAG_RESULT reads to the
// HMI (on-board memory), TAG_REGION writes to the RC, TAG_TEMPLATE writes to
// the TC and TAG_STATUS reads to the RSC. Commands and status reads are
// always admitted; the others only during their own task (image in T1,
// region in T2, template in T3, results in T5). A refused access pulses
// `acc_err`; a refused or mis-directed read still returns zero so that the
// host never waits forever.
//
// Handshake: an access is taken when h_valid && h_ready. Reads complete with
// h_rvalid and h_rdata; h_ready stays low from an accepted read until its
// data returns, so one read is outstanding at a time. The return multiplexer
// chooses between the HMI and the RSC. The tag map and the task gating are
// this design's choice; the document only requires such a map per board.
module gtm_hi
  import gtm_pkg::*;
(
  input  logic                        clk,
  input  logic                        rst,
  // host side
  input  logic                        h_valid,
  input  logic                        h_we,
  input  tag_e                        h_tag,
  input  logic [AW-1:0]               h_addr,
  input  logic [HDW-1:0]              h_wdata,
  output logic                        h_ready,
  output logic                        h_rvalid,
  output logic [HDW-1:0]              h_rdata,
  output logic                        acc_err,
  // current task from the GC
  input  task_e                       cur_task,
  // decoded accesses
  output logic                        cmd_we,
  output logic                        img_we,
  output logic                        res_re,
  output logic                        rgn_we,
  output logic                        tpl_we,
  output logic                        sts_re,
  output logic [AW-1:0]               addr_o,
  output logic [HDW-1:0]              wdata_o,
  // read returns
  input  logic                        hmi_rvalid,
  input  logic [HDW-1:0]              hmi_rdata,
  input  logic                        sts_rvalid,
  input  logic [HDW-1:0]              sts_rdata
);

  logic take, pend, bad_rd_q;

  assign take    = h_valid && h_ready;
  assign h_ready = !pend;
  assign addr_o  = h_addr;
  assign wdata_o = h_wdata;

  always_comb begin
    cmd_we = 1'b0; img_we = 1'b0; res_re = 1'b0;
    rgn_we = 1'b0; tpl_we = 1'b0; sts_re = 1'b0;
    if (take) begin
      unique case (h_tag)
        TAG_CMD:      cmd_we = h_we;
        TAG_IMAGE:    img_we = h_we && cur_task == TASK_IMAGE;
        TAG_REGION:   rgn_we = h_we && cur_task == TASK_REGION;
        TAG_TEMPLATE: tpl_we = h_we && cur_task == TASK_TEMPLATE;
        TAG_RESULT:   res_re = !h_we && cur_task == TASK_RESULT;
        TAG_STATUS:   sts_re = !h_we;
        default: ;
      endcase
    end
  end

  logic ok_acc;
  assign ok_acc = cmd_we | img_we | res_re | rgn_we | tpl_we | sts_re;

  always_ff @(posedge clk) begin
    if (rst) begin
      pend     <= 1'b0;
      bad_rd_q <= 1'b0;
      acc_err  <= 1'b0;
    end else begin
      acc_err  <= take && !ok_acc;
      bad_rd_q <= take && !h_we && !ok_acc;
      if (take && !h_we) pend <= 1'b1;
      else if (h_rvalid) pend <= 1'b0;
    end
  end

  // Read-return multiplexer.
  always_comb begin
    h_rvalid = hmi_rvalid || sts_rvalid || bad_rd_q;
    h_rdata  = hmi_rvalid ? hmi_rdata : sts_rvalid ? sts_rdata : '0;
  end

  always_ff @(posedge clk) begin
    if (!rst) assert (!(hmi_rvalid && sts_rvalid)) else $error("gtm_hi: two read returns at once");
  end

endmodule

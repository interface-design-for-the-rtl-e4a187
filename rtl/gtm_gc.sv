// gtm_gc: Global Controller (GC).
//
// The host drives the GTM operation as a sequence of tasks (T1 image, T2
// region boundary, T3 template, T4 region computation, T5 results back) and
// may start any of them again in any order; the GC follows those commands.
// A command is a write of the task number (1..5) in cmd_data[2:0] and, with
// several RFs, of the RFs that take part in cmd_data[4:3] (bit r for RF r;
// zero means all RFs). The selected RFs run the task together and the others
// rest, so a task schedule such as "T1 to both RFs, T2 to RF1, T2 to RF2, T3
// to both, T4 to both, T5 to RF1, T5 to RF2" is a list of commands.
//
// The GC records the current task and the selected RFs (`rf_sel`). The HI uses
// the task to admit only the host accesses that belong to it; the top uses
// `rf_sel` to steer region and template writes. Mux_Sel of every memory-port
// multiplexer follows the task: in T1 the ports in IMG_MASK of the selected
// RFs belong to the HMI that carries image data to memory (several ports at
// once broadcast the image), in T4 the selected RFs' ports belong to the RFs,
// in T5 the result port belongs to the HMI that reads memory for the host
// (the second HMI when SPLIT_HMI), and otherwise no unit owns a port. With one
// RF every port belongs to it; with N_RF = 2, RF r owns port r. `img_ports`
// and `rd_port` tell the HMIs which ports to use.
//
// Starting T4 pulses Reset to the selected RF controllers for one cycle and
// Assert on the next; T4 ends when every selected RF has reported done, and
// the GC returns to idle. Commands arriving during T4 are refused and flagged
// on `cmd_err` (one cycle), as are unknown task numbers, RFs that do not exist
// and, with several RFs, T5 to more than one RF (results go back through one
// read path, one RF at a time). The Mux_Sel/Reset/Assert signals, the task
// schedule across RFs and the port ownership follow the document; the
// command encoding and the refusal rules are this design's choice.
module gtm_gc
  import gtm_pkg::*;
#(
  parameter int unsigned N_PORTS   = 1,
  parameter int unsigned N_RF      = 1,
  parameter logic [1:0]  IMG_MASK  = 2'b01,
  parameter int unsigned RES_PORT  = 0,
  parameter bit          SPLIT_HMI = 1'b0
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            cmd_we,
  input  logic [HDW-1:0]  cmd_data,
  input  logic [N_RF-1:0] rf_done,
  output task_e           cur_task,
  output logic [N_RF-1:0] rf_sel,
  output src_e            mux_sel [N_PORTS],
  output logic [1:0]      img_ports,     // ports the image HMI writes now
  output logic            rd_port,       // port the result HMI reads
  output logic [N_RF-1:0] rf_reset,
  output logic [N_RF-1:0] rf_assert,
  output logic            cmd_err,
  output logic [15:0]     n_compute      // completed T4 tasks
);

  typedef enum logic [1:0] {CS_IDLE, CS_RESET, CS_ASSERT, CS_WAIT} cstate_e;
  cstate_e cs;

  localparam logic [1:0] RF_ALL = 2'((1 << N_RF) - 1);

  task_e           new_task;
  logic [1:0]      new_mask, new_sel;
  logic            bad_cmd;
  logic [N_RF-1:0] done_seen, done_now;

  assign new_task = task_e'(cmd_data[2:0]);
  assign new_mask = cmd_data[4:3];
  assign new_sel  = (new_mask == 2'b00) ? RF_ALL : new_mask;
  assign bad_cmd  = cmd_data[2:0] > 3'd5 || (new_sel & ~RF_ALL) != 2'b00 ||
                    (N_RF > 1 && new_task == TASK_RESULT && new_sel == 2'b11);
  assign done_now = done_seen | rf_done;

  always_ff @(posedge clk) begin
    if (rst) begin
      cur_task  <= TASK_IDLE;
      rf_sel    <= '0;
      cs        <= CS_IDLE;
      cmd_err   <= 1'b0;
      n_compute <= '0;
      done_seen <= '0;
    end else begin
      cmd_err <= 1'b0;
      unique case (cs)
        CS_IDLE: begin
          if (cmd_we) begin
            if (!bad_cmd) begin
              cur_task <= new_task;
              rf_sel   <= new_sel[N_RF-1:0];
              if (new_task == TASK_COMPUTE) cs <= CS_RESET;
            end else begin
              cmd_err <= 1'b1;
            end
          end
        end
        CS_RESET: begin
          cs        <= CS_ASSERT;
          done_seen <= '0;
        end
        CS_ASSERT: cs <= CS_WAIT;
        CS_WAIT: begin
          done_seen <= done_now;
          if ((done_now & rf_sel) == rf_sel) begin
            cs        <= CS_IDLE;
            cur_task  <= TASK_IDLE;
            rf_sel    <= '0;
            n_compute <= n_compute + 1'b1;
          end
        end
      endcase
      if (cmd_we && cs != CS_IDLE) cmd_err <= 1'b1;
    end
  end

  assign rf_reset  = (cs == CS_RESET)  ? rf_sel : '0;
  assign rf_assert = (cs == CS_ASSERT) ? rf_sel : '0;

  // RF that owns port p.
  function automatic int unsigned rf_of(int unsigned p);
    return (N_RF == 1) ? 0 : p;
  endfunction

  always_comb begin
    img_ports = 2'b00;
    rd_port   = 1'b0;
    for (int unsigned p = 0; p < N_PORTS; p++) begin
      mux_sel[p] = SRC_NONE;
      unique case (cur_task)
        TASK_IMAGE:   if (IMG_MASK[p] && rf_sel[rf_of(p)]) begin
                        mux_sel[p]   = SRC_HMI1;
                        img_ports[p] = 1'b1;
                      end
        TASK_COMPUTE: if (rf_sel[rf_of(p)]) mux_sel[p] = SRC_RF;
        TASK_RESULT:  if ((N_RF == 1) ? (p == RES_PORT) : rf_sel[rf_of(p)]) begin
                        mux_sel[p] = SPLIT_HMI ? SRC_HMI2 : SRC_HMI1;
                        rd_port    = 1'(p);
                      end
        default: ;
      endcase
    end
  end

endmodule

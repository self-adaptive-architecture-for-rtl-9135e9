// adaptation_controller: finite state machine of the adaptation process.
//
// Idle waits for the new-sensor flag and acknowledges it. Check type
// compares the new sensor's type with the current one: equal returns to Idle,
// different goes to Wait sync. Wait sync holds until a frame synchronization
// so that reconfiguration never starts in the middle of a frame. Launch PR
// pulses pr_req with the target type on entry and waits for the PR
// manager's result: failure goes back to Check type to retry, success goes
// to Save type, which tells the system monitor to store the new type and
// returns to Idle unconditionally. In Check type the controller also copies
// the new sensor's resolution to the static processing area (param_w,
// param_h), which is adapted by parameters only. States and transitions
// follow the source; the pulse/ack signalling is this design's choice.
// One state per clock: without waiting, a switch costs 5 clocks plus the
// frame sync wait and the reconfiguration itself.
module adaptation_controller
  import sav_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic             new_sensor,
  input  stream_header_t   new_hdr,
  input  sensor_type_e     cur_type,
  input  logic             frame_sync,
  input  logic             pr_done,
  input  logic             pr_fail,
  output logic             new_sensor_ack,
  output logic             pr_req,
  output sensor_type_e     pr_type,
  output logic             save_type,
  output logic [RES_W-1:0] param_w,
  output logic [RES_W-1:0] param_h,
  output adapt_state_e     state
);
  adapt_state_e next;

  always_comb begin
    next = state;
    unique case (state)
      AC_IDLE:       if (new_sensor) next = AC_CHECK_TYPE;
      AC_CHECK_TYPE: next = (new_hdr.stype != cur_type) ? AC_WAIT_SYNC : AC_IDLE;
      AC_WAIT_SYNC:  if (frame_sync) next = AC_LAUNCH_PR;
      AC_LAUNCH_PR:  if (pr_fail) next = AC_CHECK_TYPE;
                     else if (pr_done) next = AC_SAVE_TYPE;
      AC_SAVE_TYPE:  next = AC_IDLE;
      default:       next = AC_IDLE;
    endcase
  end

  assign new_sensor_ack = (state == AC_IDLE) && new_sensor;
  assign save_type      = (state == AC_SAVE_TYPE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= AC_IDLE;
      pr_req  <= 1'b0;
      pr_type <= SENSOR_COLOR;
      param_w <= '0;
      param_h <= '0;
    end else begin
      state  <= next;
      pr_req <= (state == AC_WAIT_SYNC) && frame_sync;
      if (state == AC_CHECK_TYPE) begin
        pr_type <= new_hdr.stype;
        param_w <= new_hdr.width;
        param_h <= new_hdr.height;
      end
    end
  end

  a_one_result: assert property (@(posedge clk) disable iff (rst) !(pr_done && pr_fail))
    else $error("adaptation_controller: PR success and failure together");
endmodule

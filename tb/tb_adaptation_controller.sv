// tb_adaptation_controller: self-checking test of adaptation_controller.
// Walks the adaptation state machine through every transition:
//   Idle -> Check type -> Idle                  (same type)
//   Idle -> Check type -> Wait sync (holds) -> Launch PR -> Check type
//        (PR failure) -> Wait sync -> Launch PR -> Save type -> Idle
// and checks the state each clock, one pr_req pulse per launch with the
// new type, the acknowledge of the new-sensor flag, save_type in Save type
// only, and that the resolution parameters follow the new header.
module tb_adaptation_controller;
  import sav_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, reqs = 0, saves = 0;

  logic             new_sensor, frame_sync, pr_done, pr_fail, ack, pr_req, save;
  stream_header_t   new_hdr;
  sensor_type_e     cur_type, pr_type;
  logic [10:0]      pw, ph;
  adapt_state_e     state;

  adaptation_controller dut (.clk, .rst, .new_sensor, .new_hdr, .cur_type, .frame_sync,
    .pr_done, .pr_fail, .new_sensor_ack(ack), .pr_req, .pr_type, .save_type(save),
    .param_w(pw), .param_h(ph), .state);

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (state %s)", m, state.name()); end
  endtask

  // the monitor's flag: set by the test, cleared by ack
  always @(posedge clk) begin
    if (ack) new_sensor <= 0;
    if (!rst && pr_req) begin reqs++; chk(pr_type == new_hdr.stype, "pr_type is the new type"); end
    if (!rst && save) saves++;
  end

  task automatic step(adapt_state_e exp, string m);
    @(negedge clk);
    chk(state == exp, m);
  endtask

  initial begin
    new_sensor = 0; frame_sync = 0; pr_done = 0; pr_fail = 0;
    cur_type = SENSOR_COLOR;
    new_hdr = '{fps: 7'd45, height: 11'd960, width: 11'd1280, stype: SENSOR_COLOR, id: 1'b0};
    repeat (3) @(posedge clk);
    rst = 0;
    step(AC_IDLE, "idle after reset");
    step(AC_IDLE, "idle holds");
    // same type
    new_sensor = 1;
    step(AC_CHECK_TYPE, "sensor changed -> check type");
    chk(!new_sensor, "flag acknowledged");
    step(AC_IDLE, "same type -> idle");
    chk(pw == 1280 && ph == 960, "resolution parameters");
    // different type
    new_hdr = '{fps: 7'd120, height: 11'd480, width: 11'd640, stype: SENSOR_INFRARED, id: 1'b1};
    new_sensor = 1;
    step(AC_CHECK_TYPE, "check type");
    step(AC_WAIT_SYNC, "new type -> wait sync");
    chk(pw == 640 && ph == 480, "new resolution parameters");
    repeat (3) step(AC_WAIT_SYNC, "wait sync holds");
    chk(reqs == 0, "no request before frame sync");
    frame_sync = 1;
    step(AC_LAUNCH_PR, "frame sync -> launch PR");
    frame_sync = 0;
    @(negedge clk);
    chk(reqs == 1, "one request");
    repeat (3) step(AC_LAUNCH_PR, "launch PR waits for result");
    pr_fail = 1;
    step(AC_CHECK_TYPE, "PR failure -> check type");
    pr_fail = 0;
    step(AC_WAIT_SYNC, "retry waits for sync");
    frame_sync = 1;
    step(AC_LAUNCH_PR, "second launch");
    frame_sync = 0;
    @(negedge clk);
    chk(reqs == 2, "second request");
    pr_done = 1;
    step(AC_SAVE_TYPE, "PR success -> save type");
    pr_done = 0;
    chk(save, "save_type in save state");
    cur_type = SENSOR_INFRARED;
    step(AC_IDLE, "save type -> idle");
    repeat (2) @(negedge clk);
    chk(saves == 1 && reqs == 2, "one save, two requests in total");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

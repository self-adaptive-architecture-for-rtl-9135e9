// tb_pr_manager: self-checking test of pr_manager.
// Bitstream lengths are shortened to 16 (color) and 12 (infrared) words.
// Runs: a color load, an infrared load, a load that the PR block rejects,
// and a request for the low-light type, which has no bitstream. Checks the
// result pulses, freeze held from request to result, load and load_type on
// success only, the number of words delivered, and that every delivered
// word was the right one (the PR block model checks content and order).
module tb_pr_manager;
  import sav_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic         pr_req, pr_done, pr_fail, freeze, load;
  sensor_type_e pr_type, load_type;
  logic         bs_req, bs_gnt, bs_rvalid, prb_start, prb_valid, prb_ready, prb_done, prb_error;
  logic [31:0]  bs_addr, bs_rdata, prb_data;
  logic         fail_next;
  int           loaded, words, loads_seen, freeze_cycles;

  pr_manager #(.BS_LEN_COLOR(16), .BS_LEN_IR(12)) dut (.clk, .rst,
    .pr_req, .pr_type, .pr_done, .pr_fail, .freeze, .load, .load_type,
    .bs_req, .bs_addr, .bs_gnt, .bs_rvalid, .bs_rdata,
    .prb_start, .prb_valid, .prb_data, .prb_ready, .prb_done, .prb_error);

  bitstream_mem_model u_mem (.clk, .bs_req, .bs_addr, .bs_gnt, .bs_rvalid, .bs_rdata);
  pr_block_model #(.LEN_COLOR(16), .LEN_IR(12)) u_prb (.clk, .prb_start, .prb_valid, .prb_data,
    .prb_ready, .prb_done, .prb_error, .fail_next, .loaded, .words);

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  always @(posedge clk) if (!rst) begin
    if (load) loads_seen++;
    if (freeze) freeze_cycles++;
  end

  // request a type and wait for the result; returns 1 on success
  task automatic run(sensor_type_e t, output bit ok);
    @(negedge clk) pr_req = 1; pr_type = t;
    @(negedge clk) pr_req = 0;
    while (!pr_done && !pr_fail) @(negedge clk);
    ok = pr_done;
    if (pr_done) chk(load && load_type == t, "load with the requested type");
    @(negedge clk);
    chk(!freeze, "freeze released after the result");
  endtask

  initial begin
    bit ok;
    pr_req = 0; pr_type = SENSOR_COLOR; fail_next = 0; loads_seen = 0; freeze_cycles = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    run(SENSOR_COLOR, ok);
    chk(ok && words == 16 && loaded == 1, "color bitstream loaded (16 words)");
    chk(freeze_cycles > 16, "area frozen during the load");
    run(SENSOR_INFRARED, ok);
    chk(ok && words == 12 && loaded == 2, "infrared bitstream loaded (12 words)");
    fail_next = 1;
    run(SENSOR_INFRARED, ok);
    fail_next = 0;
    chk(!ok && loaded == 2, "rejected load reports failure");
    freeze_cycles = 0;
    run(SENSOR_LOWLIGHT, ok);
    chk(!ok && freeze_cycles == 0, "type without bitstream fails at once");
    chk(loads_seen == 2, "two load pulses in total");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_sensor_selector: self-checking test of sensor_selector.
// Two sources send frames with different periods; every output word must
// come from the selected source. After the switch is flipped the output
// must stay with the old source until the new source's next fsync, and
// the first thing seen from the new source must be that fsync.
module tb_sensor_selector;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0, switches = 0;

  logic        sw, a_fsync, a_valid, b_fsync, b_valid, out_fsync, out_valid, sel;
  logic [31:0] a_data, b_data, out_data;
  logic        exp_sel;

  sensor_selector dut (.clk, .rst, .sel_switch(sw), .a_fsync, .a_valid, .a_data,
    .b_fsync, .b_valid, .b_data, .out_fsync, .out_valid, .out_data, .sel);

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0d", m, cyc); end
  endtask

  // source a: frame every 23 clocks, source b: every 37; data tag the source
  always_comb begin
    a_fsync = (cyc % 23) == 0;
    b_fsync = (cyc % 37) == 5;
    a_valid = (cyc % 2) == 1;
    b_valid = (cyc % 3) == 1;
    a_data  = {8'hAA, 24'(cyc)};
    b_data  = {8'hBB, 24'(cyc)};
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst) begin
      // the registered output follows the selection made on the same edge
      if (out_valid) chk(out_data[31:24] == (exp_sel ? 8'hBB : 8'hAA), "word from selected source");
    end
  end

  // reference model of the switch-over
  logic [1:0] sw_s;
  always @(posedge clk) begin
    if (rst) begin exp_sel <= 0; sw_s <= 0; end
    else begin
      sw_s <= {sw_s[0], sw};
      if (sw_s[1] != exp_sel && (sw_s[1] ? b_fsync : a_fsync)) begin
        exp_sel <= sw_s[1];
        switches++;
      end
    end
  end

  always @(posedge clk) if (!rst) chk(sel == exp_sel, "sel matches reference");

  initial begin
    sw = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (50) @(negedge clk);
    sw = 1;
    repeat (4) @(negedge clk);
    chk(sel == 0, "no switch before the new source's fsync");
    repeat (80) @(negedge clk);
    sw = 0;
    repeat (80) @(negedge clk);
    chk(switches == 2 && sel == 0, "two switch-overs");
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

// tb_system_monitor: self-checking test of system_monitor.
// Sequence: first header after reset raises new-sensor; the same ID again
// does not; acknowledge clears the flag; a different ID raises it again;
// stored header follows every new header; the current type keeps its reset
// value (color) until save_type, then takes the stored header's type.
module tb_system_monitor;
  import sav_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic           hdr_valid, ack, save, new_sensor;
  stream_header_t hdr, new_hdr;
  sensor_type_e   cur_type;

  system_monitor dut (.clk, .rst, .hdr_valid, .hdr, .new_sensor_ack(ack), .save_type(save),
    .new_sensor, .new_hdr, .cur_type);

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  task automatic send(int id, sensor_type_e t, int w, int h);
    @(negedge clk);
    hdr = '{fps: 7'd30, height: 11'(h), width: 11'(w), stype: t, id: 1'(id)};
    hdr_valid = 1;
    @(negedge clk) hdr_valid = 0;
  endtask

  task automatic pulse_ack();
    @(negedge clk) ack = 1;
    @(negedge clk) ack = 0;
  endtask

  initial begin
    hdr_valid = 0; ack = 0; save = 0; hdr = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    @(negedge clk);
    chk(!new_sensor && cur_type == SENSOR_COLOR, "reset state");
    send(0, SENSOR_COLOR, 1280, 960);
    chk(new_sensor, "first header is a new sensor");
    chk(new_hdr.width == 1280 && new_hdr.height == 960 && new_hdr.id == 0, "header stored");
    pulse_ack();
    chk(!new_sensor, "ack clears the flag");
    send(0, SENSOR_COLOR, 1280, 960);
    chk(!new_sensor, "same ID: no new sensor");
    send(1, SENSOR_INFRARED, 640, 480);
    chk(new_sensor, "different ID: new sensor");
    chk(new_hdr.stype == SENSOR_INFRARED && new_hdr.width == 640, "new header stored");
    chk(cur_type == SENSOR_COLOR, "current type kept until save");
    pulse_ack();
    @(negedge clk) save = 1;
    @(negedge clk) save = 0;
    chk(cur_type == SENSOR_INFRARED, "save_type stores the new type");
    send(1, SENSOR_INFRARED, 640, 480);
    chk(!new_sensor, "same ID after switch: no new sensor");
    send(0, SENSOR_COLOR, 1280, 960);
    chk(new_sensor && cur_type == SENSOR_INFRARED, "switch back flagged, type not yet saved");
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

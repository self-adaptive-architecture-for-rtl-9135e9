// tb_header_encoder: self-checking test of header_encoder.
// Parameters describe an infrared sensor, ID 1, 640x480 at 120 fps. After
// each input fsync the output must carry fsync, then exactly one header
// word, then the input data words in order. The expected header is built
// here bit by bit: id at bit 0, type at 1-2, width at 3-13, height at
// 14-24, frame rate at 25-31. Data words arrive every second clock, as
// from data_packaging, starting right after the fsync.
module tb_header_encoder;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam logic [31:0] EXP_HDR = 32'(1) | (32'(2) << 1) | (32'(640) << 3)
                                  | (32'(480) << 14) | (32'(120) << 25);
  logic        in_fsync, in_valid, out_fsync, out_valid;
  logic [31:0] in_data, out_data;
  logic [31:0] exp_q [$];
  bit          want_hdr;
  int          hdrs = 0;

  header_encoder #(.SENSOR_ID(1'b1), .SENSOR_TYPE(sav_pkg::SENSOR_INFRARED),
    .RES_W_PX(640), .RES_H_PX(480), .FPS(120)) dut (
    .clk, .rst, .in_fsync, .in_valid, .in_data, .out_fsync, .out_valid, .out_data);

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  always @(posedge clk) if (!rst) begin
    if (out_fsync) begin
      chk(!want_hdr, "header sent for previous fsync");
      want_hdr = 1;
    end
    if (out_valid) begin
      if (want_hdr) begin
        chk(out_data === EXP_HDR, $sformatf("header %h expected %h", out_data, EXP_HDR));
        want_hdr = 0;
        hdrs++;
      end else if (exp_q.size() == 0) chk(0, "unexpected word");
      else begin
        automatic logic [31:0] e = exp_q.pop_front();
        chk(out_data === e, $sformatf("data %h expected %h", out_data, e));
      end
    end
  end

  initial begin
    in_fsync = 0; in_valid = 0; in_data = 0; want_hdr = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int f = 0; f < 3; f++) begin
      @(negedge clk) in_fsync = 1;
      @(negedge clk) in_fsync = 0;
      for (int k = 0; k < 10; k++) begin
        in_valid = 1; in_data = $urandom; exp_q.push_back(in_data);
        @(negedge clk) in_valid = 0;
        repeat (1 + (k % 3 == 0 ? 2 : 0)) @(negedge clk);
      end
      repeat (5) @(negedge clk);
    end
    chk(exp_q.size() == 0 && hdrs == 3, "three headers and all data");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

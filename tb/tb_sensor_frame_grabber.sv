// tb_sensor_frame_grabber: self-checking test of sensor_frame_grabber.
// A color sensor model (ID 0, 6x4 pixels, 45 fps in the header) drives
// frame valid / line valid / pixel for two frames. On the link each frame
// must begin with fsync, then the header word (checked field by field),
// then the pixels packed two per word in raster order.
module tb_sensor_frame_grabber;
  import sav_pkg::*;
  localparam int W = 6, H = 4;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        fval, lval, link_fsync, link_valid;
  logic [11:0] pix;
  logic [31:0] link_data;
  logic [31:0] exp_q [$];
  bit          want_hdr;
  int          frames = 0;

  sensor_frame_grabber #(.SENSOR_ID(1'b0), .SENSOR_TYPE(SENSOR_COLOR),
    .RES_W_PX(W), .RES_H_PX(H), .FPS(45)) dut (
    .clk, .rst, .fval, .lval, .pix, .link_fsync, .link_valid, .link_data);

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  always @(posedge clk) if (!rst) begin
    if (link_fsync) want_hdr = 1;
    if (link_valid) begin
      if (want_hdr) begin
        chk(link_data[0] == 1'b0 && link_data[2:1] == 2'd0 && link_data[13:3] == 11'(W)
            && link_data[24:14] == 11'(H) && link_data[31:25] == 7'd45, $sformatf("header %h", link_data));
        want_hdr = 0;
        frames++;
      end else if (exp_q.size() == 0) chk(0, "unexpected word");
      else begin
        automatic logic [31:0] e = exp_q.pop_front();
        chk(link_data === e, $sformatf("data %h expected %h", link_data, e));
      end
    end
  end

  initial begin
    logic [11:0] p0;
    fval = 0; lval = 0; pix = 0; want_hdr = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int f = 0; f < 2; f++) begin
      @(negedge clk) fval = 1;
      for (int y = 0; y < H; y++) begin
        for (int x = 0; x < W; x++) begin
          lval = 1; pix = 12'($urandom);
          if (x % 2 == 0) p0 = pix;
          else exp_q.push_back({4'd0, pix, 4'd0, p0});
          @(negedge clk);
        end
        lval = 0;
        repeat (2) @(negedge clk);
      end
      fval = 0;
      repeat (6) @(negedge clk);
    end
    chk(exp_q.size() == 0 && frames == 2, "two frames complete");
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

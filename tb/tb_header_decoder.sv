// tb_header_decoder: self-checking test of header_decoder.
// Sends three frames on the link: fsync, header, packed pixel words (one
// word every second clock). Frame sizes are 5x3, 4x2 and again 5x3 with a
// different sensor ID and type. Checks: hdr_valid exactly 3 clocks after
// the header word is on the input (30 ns at 100 MHz), every header field,
// every pixel value in raster order, sof on the first pixel only and eol on
// the last pixel of each line; extra words past the frame are ignored.
module tb_header_decoder;
  import sav_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic           link_fsync, link_valid, hdr_valid, pix_valid, pix_sof, pix_eol;
  logic [31:0]    link_data;
  stream_header_t hdr;
  logic [11:0]    pix_data;
  int             exp_pix [$];
  int             pcount, fw, cyc, hdr_cyc;

  header_decoder dut (.clk, .rst, .link_fsync, .link_valid, .link_data,
    .hdr_valid, .hdr, .pix_valid, .pix_sof, .pix_eol, .pix_data);

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  bit sending_hdr;
  always @(posedge clk) begin
    cyc++;
    if (sending_hdr && link_valid) hdr_cyc = cyc;
    if (!rst && hdr_valid) chk(cyc - hdr_cyc == 3, $sformatf("header latency %0d clocks", cyc - hdr_cyc));
    if (!rst && pix_valid) begin
      if (exp_pix.size() == 0) chk(0, "unexpected pixel");
      else begin
        automatic int e = exp_pix.pop_front();
        chk(int'(pix_data) == e, $sformatf("pixel %0d expected %0d", pix_data, e));
        chk(pix_sof == (pcount == 0), "sof position");
        chk(pix_eol == ((pcount % fw) == fw - 1), "eol position");
        pcount++;
      end
    end
  end

  task automatic frame(int id, int t, int w, int h, int fps);
    logic [31:0] hw;
    int p [$];
    hw = 32'(id) | (32'(t) << 1) | (32'(w) << 3) | (32'(h) << 14) | (32'(fps) << 25);
    @(negedge clk) link_fsync = 1;
    @(negedge clk) link_fsync = 0;
    @(negedge clk) link_valid = 1; link_data = hw; sending_hdr = 1;
    @(negedge clk) link_valid = 0; sending_hdr = 0;
    pcount = 0; fw = w;
    for (int y = 0; y < h; y++) begin
      for (int x = 0; x < w; x++) begin
        p.push_back(int'($urandom % 4096));
        exp_pix.push_back(p[$]);
      end
      for (int x = 0; x < w; x += 2) begin
        @(negedge clk);
        link_valid = 1;
        link_data = {4'd0, (x + 1 < w) ? 12'(p[y*w + x + 1]) : 12'd0, 4'd0, 12'(p[y*w + x])};
        @(negedge clk) link_valid = 0;
      end
    end
    // a stray word past the end of the frame must be dropped
    @(negedge clk) link_valid = 1; link_data = '1;
    @(negedge clk) link_valid = 0;
    repeat (8) @(negedge clk);
    chk(exp_pix.size() == 0, "all pixels of the frame");
  endtask


  initial begin
    link_fsync = 0; link_valid = 0; link_data = 0; cyc = 0; hdr_cyc = 0; sending_hdr = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    frame(0, 0, 5, 3, 45);
    chk(hdr.id == 1'b0 && hdr.stype == SENSOR_COLOR && hdr.width == 5 && hdr.height == 3 && hdr.fps == 45, "header 1");
    frame(1, 2, 4, 2, 120);
    chk(hdr.id == 1'b1 && hdr.stype == SENSOR_INFRARED && hdr.width == 4 && hdr.height == 2 && hdr.fps == 120, "header 2");
    frame(1, 1, 5, 3, 60);
    chk(hdr.stype == SENSOR_LOWLIGHT && hdr.fps == 60, "header 3");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

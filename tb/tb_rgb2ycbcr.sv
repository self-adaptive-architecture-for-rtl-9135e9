// tb_rgb2ycbcr: self-checking test of rgb2ycbcr.
// Streams known colors (black, white, pure red, green, blue) and random
// RGB values with random gaps and stalls, and compares each result with the
// full-range BT.601 formulas evaluated here in integer arithmetic.
module tb_rgb2ycbcr;
  localparam int W = 5, N = 40;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        in_valid, in_ready, in_sof, in_eol, out_valid, out_ready, out_sof, out_eol;
  logic [35:0] in_data, img [N];
  logic [23:0] out_data;
  int          idx, oidx;
  bit          gap;

  rgb2ycbcr dut (.clk, .rst, .in_valid, .in_ready, .in_sof, .in_eol, .in_data,
    .out_valid, .out_ready, .out_sof, .out_eol, .out_data);

  assign in_valid = !rst && idx < N && !gap;
  assign in_data  = img[idx % N];
  assign in_sof   = idx == 0;
  assign in_eol   = (idx % W) == W - 1;

  function automatic int clamp(int v);
    return v < 0 ? 0 : (v > 255 ? 255 : v);
  endfunction

  function automatic logic [23:0] expected(int k);
    int r = int'(img[k][35:28]), g = int'(img[k][23:16]), b = int'(img[k][11:4]);
    int y, cb, cr;
    y  = (77*r + 150*g + 29*b + 128) >>> 8;
    cb = ((-43*r - 85*g + 128*b + 128) >>> 8) + 128;
    cr = ((128*r - 107*g - 21*b + 128) >>> 8) + 128;
    return {8'(clamp(y)), 8'(clamp(cb)), 8'(clamp(cr))};
  endfunction

  always @(posedge clk) begin
    gap       <= ($urandom % 4) == 0;
    out_ready <= ($urandom % 3) != 0;
    if (in_valid && in_ready) idx <= idx + 1;
    if (!rst && out_valid && out_ready) begin
      checks++;
      if (out_data !== expected(oidx) || out_sof !== (oidx == 0) || out_eol !== ((oidx % W) == W-1)) begin
        failures++;
        $display("FAIL k=%0d got %h exp %h", oidx, out_data, expected(oidx));
      end
      oidx <= oidx + 1;
    end
  end

  initial begin
    idx = 0; oidx = 0; gap = 0; out_ready = 0;
    for (int k = 0; k < N; k++) img[k] = 36'($urandom) ^ (36'($urandom) << 20);
    img[0] = '0;
    img[1] = '1;
    img[2] = {12'hFFF, 12'h000, 12'h000};
    img[3] = {12'h000, 12'hFFF, 12'h000};
    img[4] = {12'h000, 12'h000, 12'hFFF};
    repeat (3) @(posedge clk);
    rst = 0;
    wait (oidx == N);
    @(posedge clk);
    // absolute anchors: white is Y=255, Cb=Cr=128; black is Y=0, Cb=Cr=128
    checks++;
    if (expected(1) !== 24'hFF8080 || expected(0) !== 24'h008080) failures++;
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

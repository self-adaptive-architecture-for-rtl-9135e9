// tb_contrast_enhance: self-checking test of contrast_enhance.
// Streams four 5x4 frames with random gaps and stalls. Frame 0 must pass
// unchanged; every later frame must be stretched with the luma minimum and
// maximum of the frame before it: Y' = clamp(((Y-lo) * (65280/(hi-lo))) >> 8).
// Frame 2 is flat, so frame 3 must pass unchanged; Cb/Cr always pass.
module tb_contrast_enhance;
  localparam int W = 5, H = 4, F = 4, FS = W * H, N = F * FS;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, stretched = 0;

  logic        in_valid, in_ready, in_sof, in_eol, out_valid, out_ready, out_sof, out_eol;
  logic [23:0] in_data, out_data, img [N];
  int          idx, oidx;
  bit          gap;

  contrast_enhance dut (.clk, .rst, .in_valid, .in_ready, .in_sof, .in_eol, .in_data,
    .out_valid, .out_ready, .out_sof, .out_eol, .out_data);

  assign in_valid = !rst && idx < N && !gap;
  assign in_data  = img[idx % N];
  assign in_sof   = (idx % FS) == 0;
  assign in_eol   = (idx % W) == W - 1;

  function automatic logic [23:0] expected(int k);
    int f = k / FS, lo = 255, hi = 0, y = int'(img[k][23:16]), g, v;
    if (f == 0) return img[k];
    for (int j = (f-1)*FS; j < f*FS; j++) begin
      if (int'(img[j][23:16]) < lo) lo = int'(img[j][23:16]);
      if (int'(img[j][23:16]) > hi) hi = int'(img[j][23:16]);
    end
    if (hi <= lo) return img[k];
    g = (255 * 256) / (hi - lo);
    v = (y > lo) ? ((y - lo) * g) >> 8 : 0;
    if (v > 255) v = 255;
    return {8'(v), img[k][15:0]};
  endfunction

  always @(posedge clk) begin
    gap       <= ($urandom % 4) == 0;
    out_ready <= ($urandom % 3) != 0;
    if (in_valid && in_ready) idx <= idx + 1;
    if (!rst && out_valid && out_ready) begin
      checks++;
      if (out_data !== img[oidx]) stretched++;
      if (out_data !== expected(oidx) || out_sof !== ((oidx % FS) == 0) || out_eol !== ((oidx % W) == W-1)) begin
        failures++;
        $display("FAIL k=%0d got %h exp %h", oidx, out_data, expected(oidx));
      end
      oidx <= oidx + 1;
    end
  end

  initial begin
    idx = 0; oidx = 0; gap = 0; out_ready = 0;
    for (int k = 0; k < N; k++) begin
      img[k] = 24'($urandom);
      // frames 0 and 1: low-contrast luma 100..139
      if (k < 2 * FS) img[k][23:16] = 8'(100 + $urandom % 40);
      if (k >= 2 * FS && k < 3 * FS) img[k][23:16] = 8'd77;  // flat frame
    end
    repeat (3) @(posedge clk);
    rst = 0;
    wait (oidx == N);
    @(posedge clk);
    checks++;
    if (stretched == 0) begin failures++; $display("no pixel was stretched"); end
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

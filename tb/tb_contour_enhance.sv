// tb_contour_enhance: self-checking test of contour_enhance.
// Checks the 5c-n-s-e-w luma sharpening and that Cb/Cr stay with their pixel.
// Two random 6x5 frames are streamed with random input gaps and output
// stalls. The expected result for input pixel (x,y) is computed here from
// the 3x3 neighbourhood centred on (x-1,y-1), with rows and columns before
// the frame edge replaced by row/column 0.
module tb_contour_enhance;
  localparam int W = 6, H = 5, N = 2 * W * H;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic            in_valid, in_ready, in_sof, in_eol, out_valid, out_ready, out_sof, out_eol;
  logic [24-1:0] in_data, img [N];
  logic [24-1:0] out_data;
  int              idx, oidx;
  bit              gap;

  contour_enhance #(.MAX_W(16)) dut (.clk, .rst,
    .in_valid, .in_ready, .in_sof, .in_eol, .in_data,
    .out_valid, .out_ready, .out_sof, .out_eol, .out_data);

  assign in_valid = !rst && idx < N && !gap;
  assign in_data  = img[idx % N];
  assign in_sof   = (idx % (W * H)) == 0;
  assign in_eol   = (idx % W) == W - 1;

  // pixel at (x,y) of the frame that holds stream index k, clamped at 0
  function automatic logic [24-1:0] px(int k, int x, int y);
    int base = (k / (W * H)) * W * H;
    if (x < 0) x = 0;
    if (y < 0) y = 0;
    return img[base + y * W + x];
  endfunction

  function automatic logic [24-1:0] expected(int k);
    int x = k % W, y = (k / W) % H;
    int cx = (x > 0) ? x - 1 : 0, cy = (y > 0) ? y - 1 : 0;
    int c, sh;
    logic [23:0] cp;
    cp = px(k, x-1, y-1);
    c  = cp[23:16];
    sh = 5*c - int'(px(k, x-1, y-2) >> 16) - int'(px(k, x-1, y) >> 16)
             - int'(px(k, x-2, y-1) >> 16) - int'(px(k, x, y-1) >> 16);
    if (sh < 0) sh = 0;
    if (sh > 255) sh = 255;
    return {8'(sh), cp[15:0]};
  endfunction

  always @(posedge clk) begin
    gap       <= ($urandom % 4) == 0;
    out_ready <= ($urandom % 3) != 0;
    if (in_valid && in_ready) idx <= idx + 1;
    if (!rst && out_valid && out_ready) begin
      checks++;
      if (out_data !== expected(oidx) || out_sof !== ((oidx % (W*H)) == 0) || out_eol !== ((oidx % W) == W-1)) begin
        failures++;
        $display("FAIL k=%0d got %h exp %h", oidx, out_data, expected(oidx));
      end
      oidx <= oidx + 1;
    end
  end

  initial begin
    idx = 0; oidx = 0; gap = 0; out_ready = 0;
    for (int k = 0; k < N; k++) img[k] = 24'($urandom);
    repeat (3) @(posedge clk);
    rst = 0;
    wait (oidx == N);
    @(posedge clk);
    if (checks != N) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_debayer: self-checking test of debayer.
// Checks bilinear RGGB interpolation of all four site kinds.
// Two random 7x5 frames are streamed with random input gaps and output
// stalls. The expected result for input pixel (x,y) is computed here from
// the 3x3 neighbourhood centred on (x-1,y-1), with rows and columns before
// the frame edge replaced by row/column 0.
module tb_debayer;
  localparam int W = 7, H = 5, N = 2 * W * H;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic            in_valid, in_ready, in_sof, in_eol, out_valid, out_ready, out_sof, out_eol;
  logic [12-1:0] in_data, img [N];
  logic [36-1:0] out_data;
  int              idx, oidx;
  bit              gap;

  debayer #(.MAX_W(16)) dut (.clk, .rst,
    .in_valid, .in_ready, .in_sof, .in_eol, .in_data,
    .out_valid, .out_ready, .out_sof, .out_eol, .out_data);

  assign in_valid = !rst && idx < N && !gap;
  assign in_data  = img[idx % N];
  assign in_sof   = (idx % (W * H)) == 0;
  assign in_eol   = (idx % W) == W - 1;

  // pixel at (x,y) of the frame that holds stream index k, clamped at 0
  function automatic logic [12-1:0] px(int k, int x, int y);
    int base = (k / (W * H)) * W * H;
    if (x < 0) x = 0;
    if (y < 0) y = 0;
    return img[base + y * W + x];
  endfunction

  function automatic logic [36-1:0] expected(int k);
    int x = k % W, y = (k / W) % H;
    int cx = (x > 0) ? x - 1 : 0, cy = (y > 0) ? y - 1 : 0;
    int c, n, s, e, w, nw, ne, sw, se, r, g, b;
    c  = px(k, x-1, y-1); n  = px(k, x-1, y-2); s  = px(k, x-1, y);
    w  = px(k, x-2, y-1); e  = px(k, x, y-1);
    nw = px(k, x-2, y-2); ne = px(k, x, y-2); sw = px(k, x-2, y); se = px(k, x, y);
    // RGGB: red at (even, even), blue at (odd, odd)
    if (cx % 2 == 0 && cy % 2 == 0)      begin r = c; g = (n+s+e+w)/4; b = (nw+ne+sw+se)/4; end
    else if (cx % 2 == 1 && cy % 2 == 0) begin r = (e+w)/2; g = c; b = (n+s)/2; end
    else if (cx % 2 == 0 && cy % 2 == 1) begin r = (n+s)/2; g = c; b = (e+w)/2; end
    else                                 begin r = (nw+ne+sw+se)/4; g = (n+s+e+w)/4; b = c; end
    return {12'(r), 12'(g), 12'(b)};
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
    for (int k = 0; k < N; k++) img[k] = 12'($urandom);
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

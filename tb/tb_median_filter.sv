// tb_median_filter: self-checking test of median_filter.
// Checks the 3x3 median against a sort of the nine samples.
// Two random 6x5 frames are streamed with random input gaps and output
// stalls. The expected result for input pixel (x,y) is computed here from
// the 3x3 neighbourhood centred on (x-1,y-1), with rows and columns before
// the frame edge replaced by row/column 0.
module tb_median_filter;
  localparam int W = 6, H = 5, N = 2 * W * H;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic            in_valid, in_ready, in_sof, in_eol, out_valid, out_ready, out_sof, out_eol;
  logic [12-1:0] in_data, img [N];
  logic [12-1:0] out_data;
  int              idx, oidx;
  bit              gap;

  median_filter #(.MAX_W(16)) dut (.clk, .rst,
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

  function automatic logic [12-1:0] expected(int k);
    int x = k % W, y = (k / W) % H;
    int cx = (x > 0) ? x - 1 : 0, cy = (y > 0) ? y - 1 : 0;
    int v[9], t;
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++) v[i*3+j] = px(k, x-2+j, y-2+i);
    // insertion sort, take the middle
    for (int i = 1; i < 9; i++)
      for (int j = i; j > 0 && v[j-1] > v[j]; j--) begin t = v[j]; v[j] = v[j-1]; v[j-1] = t; end
    return 12'(v[4]);
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

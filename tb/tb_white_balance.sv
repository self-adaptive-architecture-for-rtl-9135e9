// tb_white_balance: self-checking test of white_balance.
// Streams two random 6x4 RGGB frames with random input gaps and output
// stalls and compares every result with (sample * site gain) >> 8,
// saturated at 4095, computed here from the pixel's position.
module tb_white_balance;
  localparam int W = 6, H = 4, N = 2 * W * H;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [9:0]  gr = 10'd384, gg = 10'd256, gb = 10'd600;
  logic        in_valid, in_ready, in_sof, in_eol, out_valid, out_ready, out_sof, out_eol;
  logic [11:0] in_data, out_data;
  logic [11:0] img [N];
  int          idx, oidx;
  bit          gap;

  white_balance dut (.clk, .rst, .gain_r(gr), .gain_g(gg), .gain_b(gb),
    .in_valid, .in_ready, .in_sof, .in_eol, .in_data,
    .out_valid, .out_ready, .out_sof, .out_eol, .out_data);

  assign in_valid = !rst && idx < N && !gap;
  assign in_data  = img[idx % N];
  assign in_sof   = (idx % (W * H)) == 0;
  assign in_eol   = (idx % W) == W - 1;

  function automatic logic [11:0] ref_wb(int k);
    int x = k % W, y = (k / W) % H, g, p;
    if (x % 2 == 0 && y % 2 == 0) g = gr;
    else if (x % 2 == 1 && y % 2 == 1) g = gb;
    else g = gg;
    p = (img[k] * g) >> 8;
    return (p > 4095) ? 12'd4095 : 12'(p);
  endfunction

  always @(posedge clk) begin
    gap       <= ($urandom % 4) == 0;
    out_ready <= ($urandom % 3) != 0;
    if (in_valid && in_ready) idx <= idx + 1;
    if (!rst && out_valid && out_ready) begin
      checks++;
      if (out_data !== ref_wb(oidx) || out_sof !== ((oidx % (W*H)) == 0) || out_eol !== ((oidx % W) == W-1)) begin
        failures++;
        $display("FAIL k=%0d got %0d exp %0d", oidx, out_data, ref_wb(oidx));
      end
      oidx <= oidx + 1;
    end
  end

  initial begin
    idx = 0; oidx = 0; gap = 0; out_ready = 0;
    for (int k = 0; k < N; k++) img[k] = 12'($urandom);
    img[0] = 12'd4095;  // saturates with gain 1.5
    repeat (3) @(posedge clk);
    rst = 0;
    wait (oidx == N);
    @(posedge clk);
    if (checks != N) failures++;
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

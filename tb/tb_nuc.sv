// tb_nuc: self-checking test of nuc.
// Streams two 6x3 frames of random pixels and a coefficient stream with
// random gains (0.5 .. 2.5) and offsets (-600 .. +600); both streams have
// their own random gaps and the output has random stalls. Each result is
// compared with clamp((pix * gain) >> 12 + offset). Before the second
// frame three stray coefficient words (not marked as frame start) are
// inserted; they must be dropped so that the frames realign.
module tb_nuc;
  localparam int W = 6, H = 3, N = 2 * W * H, NC = N + 3;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        in_valid, in_ready, in_sof, in_eol, out_valid, out_ready, out_sof, out_eol;
  logic [11:0] in_data, out_data, img [N];
  logic        coef_valid, coef_ready, coef_sof;
  logic [15:0] gain [NC];
  logic signed [15:0] offs [NC];
  int          cmap [NC];      // pixel index each coefficient word belongs to (-1 stray)
  int          pidx [N];       // coefficient word index for each pixel
  int          idx, cidx, oidx;
  bit          gap, cgap;

  nuc dut (.clk, .rst, .in_valid, .in_ready, .in_sof, .in_eol, .in_data,
    .coef_valid, .coef_ready, .coef_sof, .coef_gain(gain[cidx % NC]), .coef_offset(offs[cidx % NC]),
    .out_valid, .out_ready, .out_sof, .out_eol, .out_data);

  assign in_valid   = !rst && idx < N && !gap;
  assign in_data    = img[idx % N];
  assign in_sof     = (idx % (W * H)) == 0;
  assign in_eol     = (idx % W) == W - 1;
  assign coef_valid = !rst && cidx < NC && !cgap;
  assign coef_sof   = (cmap[cidx % NC] >= 0) && (cmap[cidx % NC] % (W * H) == 0);

  function automatic logic [11:0] expected(int k);
    int c = pidx[k];
    int v = ((int'(img[k]) * int'(gain[c])) >>> 12) + int'(offs[c]);
    return v < 0 ? 12'd0 : (v > 4095 ? 12'd4095 : 12'(v));
  endfunction

  always @(posedge clk) begin
    gap       <= ($urandom % 4) == 0;
    cgap      <= ($urandom % 5) == 0;
    out_ready <= ($urandom % 3) != 0;
    if (in_valid && in_ready) idx <= idx + 1;
    if (coef_valid && coef_ready) cidx <= cidx + 1;
    if (!rst && out_valid && out_ready) begin
      checks++;
      if (out_data !== expected(oidx) || out_sof !== ((oidx % (W*H)) == 0) || out_eol !== ((oidx % W) == W-1)) begin
        failures++;
        $display("FAIL k=%0d got %0d exp %0d", oidx, out_data, expected(oidx));
      end
      oidx <= oidx + 1;
    end
  end

  initial begin
    int c;
    idx = 0; cidx = 0; oidx = 0; gap = 0; cgap = 0; out_ready = 0;
    c = 0;
    for (int k = 0; k < N; k++) begin
      if (k == W * H) for (int s = 0; s < 3; s++) begin cmap[c] = -1; c++; end
      cmap[c] = k; pidx[k] = c; c++;
      img[k] = 12'($urandom);
    end
    for (int j = 0; j < NC; j++) begin
      gain[j] = 16'(2048 + $urandom % 8192);
      offs[j] = 16'(int'($urandom % 1201) - 600);
    end
    gain[pidx[0]] = 16'd4096; offs[pidx[0]] = 16'sd0; img[0] = 12'd1234;  // identity
    gain[pidx[1]] = 16'd10000; img[1] = 12'd4000;                         // saturates high
    gain[pidx[2]] = 16'd4096; offs[pidx[2]] = -16'sd600; img[2] = 12'd100; // clamps low
    repeat (3) @(posedge clk);
    rst = 0;
    wait (oidx == N);
    @(posedge clk);
    checks++;
    if (expected(0) !== 12'd1234 || expected(1) !== 12'd4095 || expected(2) !== 12'd0) failures++;
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

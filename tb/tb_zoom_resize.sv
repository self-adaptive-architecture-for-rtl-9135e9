// tb_zoom_resize: self-checking test of zoom_resize.
// Output size 8x6. Four frames of different size and zoom are streamed
// back to back with random gaps and stalls: 16x12 at zoom 1 (halving),
// 8x6 at zoom 2 (centre 4x3 crop doubled), 5x3 at zoom 1 (uneven
// enlargement) and 12x10 at zoom 4 (3x2 crop). Every output pixel is
// compared with the nearest-neighbour source pixel of the centred crop,
// computed here; each output frame must hold exactly 8x6 pixels.
module tb_zoom_resize;
  localparam int OW = 8, OH = 6, F = 4;
  localparam int FW [F] = '{16, 8, 5, 12};
  localparam int FH [F] = '{12, 6, 3, 10};
  localparam int FZ [F] = '{0, 1, 0, 2};
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        in_valid, in_ready, in_sof, in_eol, out_valid, out_ready, out_sof, out_eol;
  logic [23:0] in_data, out_data;
  logic [23:0] img [F][256];
  logic [10:0] in_w, in_h;
  logic [1:0]  zsh;
  int          f, x, y, of, ok;   // input position; output frame and index
  bit          gap, done_in;

  zoom_resize #(.OUT_W(OW), .OUT_H(OH), .MAX_W(16)) dut (.clk, .rst,
    .in_w, .in_h, .zoom_sh(zsh),
    .in_valid, .in_ready, .in_sof, .in_eol, .in_data,
    .out_valid, .out_ready, .out_sof, .out_eol, .out_data);

  assign in_w     = 11'(FW[f % F]);
  assign in_h     = 11'(FH[f % F]);
  assign zsh      = 2'(FZ[f % F]);
  assign in_valid = !rst && !done_in && !gap;
  assign in_data  = img[f % F][y * FW[f % F] + x];
  assign in_sof   = (x == 0) && (y == 0);
  assign in_eol   = x == FW[f % F] - 1;

  function automatic logic [23:0] expected(int fr, int k);
    int cw = FW[fr] >> FZ[fr], ch = FH[fr] >> FZ[fr];
    int xo = (FW[fr] - cw) / 2, yo = (FH[fr] - ch) / 2;
    longint sx = (longint'(cw) << 16) / OW, sy = (longint'(ch) << 16) / OH;
    int ox = k % OW, oy = k / OW;
    return img[fr][(yo + int'((oy * sy) >> 16)) * FW[fr] + xo + int'((ox * sx) >> 16)];
  endfunction

  always @(posedge clk) begin
    gap       <= ($urandom % 4) == 0;
    out_ready <= ($urandom % 3) != 0;
    if (in_valid && in_ready) begin
      if (in_eol) begin
        x <= 0;
        if (y == FH[f % F] - 1) begin
          y <= 0;
          f <= f + 1;
          if (f == F - 1) done_in <= 1;
        end else y <= y + 1;
      end else x <= x + 1;
    end
    if (!rst && out_valid && out_ready) begin
      checks++;
      if (out_data !== expected(of, ok) || out_sof !== (ok == 0) || out_eol !== ((ok % OW) == OW-1)) begin
        failures++;
        $display("FAIL frame %0d k=%0d got %h exp %h", of, ok, out_data, expected(of, ok));
      end
      if (ok == OW * OH - 1) begin ok <= 0; of <= of + 1; end
      else ok <= ok + 1;
    end
  end

  initial begin
    f = 0; x = 0; y = 0; of = 0; ok = 0; gap = 0; done_in = 0; out_ready = 0;
    for (int i = 0; i < F; i++) for (int k = 0; k < 256; k++) img[i][k] = 24'($urandom);
    repeat (3) @(posedge clk);
    rst = 0;
    wait (of == F);
    repeat (20) @(posedge clk);
    checks++;
    if (of != F || ok != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired: frame %0d pixel %0d", of, ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

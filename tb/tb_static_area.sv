// tb_static_area: self-checking test of static_area (zoom -> contour
// enhancing -> contrast enhancing) with an 8x6 output.
// Three frames are streamed with random gaps and output stalls: 16x12 at
// zoom 1, 8x6 at zoom 2 and 16x12 at zoom 1 again. The expected output is
// built here in three steps: nearest-neighbour crop and scale, the 3x3
// sharpening of the luma on the scaled image, and the contrast stretch
// that uses the luma range of the previous output frame (the first frame
// passes unchanged). Every pixel, start-of-frame and end-of-line flag is
// compared and each frame must hold exactly 8x6 pixels.
module tb_static_area;
  localparam int OW = 8, OH = 6, F = 3;
  localparam int FW [F] = '{16, 8, 16};
  localparam int FH [F] = '{12, 6, 12};
  localparam int FZ [F] = '{0, 1, 0};
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        in_valid, in_ready, in_sof, in_eol, out_valid, out_ready, out_sof, out_eol;
  logic [23:0] in_data, out_data;
  logic [23:0] img [F][192];
  logic [23:0] zm  [F][OW*OH];   // after scaling
  logic [23:0] ct  [F][OW*OH];   // after contour enhancing
  logic [23:0] ex  [F][OW*OH];   // after contrast enhancing
  logic [10:0] in_w, in_h;
  logic [1:0]  zsh;
  int          f, x, y, of, ok;
  bit          gap, done_in;

  static_area #(.OUT_W(OW), .OUT_H(OH), .MAX_W(16)) dut (.clk, .rst,
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

  function automatic int yat(int fr, int xx, int yy);
    if (xx < 0) xx = 0;
    if (yy < 0) yy = 0;
    return int'(zm[fr][yy * OW + xx][23:16]);
  endfunction

  task automatic build();
    int lo = 255, hi = 0;
    for (int fr = 0; fr < F; fr++) begin
      automatic int cw = FW[fr] >> FZ[fr], ch = FH[fr] >> FZ[fr];
      automatic int xo = (FW[fr] - cw) / 2, yo = (FH[fr] - ch) / 2;
      automatic longint sx = (longint'(cw) << 16) / OW, sy = (longint'(ch) << 16) / OH;
      automatic int nlo = 255, nhi = 0;
      for (int k = 0; k < OW * OH; k++)
        zm[fr][k] = img[fr][(yo + int'(((k / OW) * sy) >> 16)) * FW[fr] + xo + int'(((k % OW) * sx) >> 16)];
      for (int k = 0; k < OW * OH; k++) begin
        automatic int xx = k % OW, yy = k / OW, sh, yv;
        automatic logic [23:0] cp;
        cp = zm[fr][((yy > 0) ? yy - 1 : 0) * OW + ((xx > 0) ? xx - 1 : 0)];
        sh = 5 * int'(cp[23:16]) - yat(fr, xx-1, yy-2) - yat(fr, xx-1, yy)
           - yat(fr, xx-2, yy-1) - yat(fr, xx, yy-1);
        sh = sh < 0 ? 0 : (sh > 255 ? 255 : sh);
        ct[fr][k] = {8'(sh), cp[15:0]};
        yv = sh;
        if (fr > 0 && hi > lo) begin
          automatic int g = (255 << 8) / (hi - lo);
          yv = (sh > lo) ? (((sh - lo) * g) >> 8) : 0;
          if (yv > 255) yv = 255;
        end
        ex[fr][k] = {8'(yv), cp[15:0]};
        if (sh < nlo) nlo = sh;
        if (sh > nhi) nhi = sh;
      end
      lo = nlo; hi = nhi;
    end
  endtask

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
    if (!rst && out_valid && out_ready && of < F) begin
      checks++;
      if (out_data !== ex[of][ok] || out_sof !== (ok == 0) || out_eol !== ((ok % OW) == OW-1)) begin
        failures++;
        $display("FAIL frame %0d k=%0d got %h exp %h", of, ok, out_data, ex[of][ok]);
      end
      if (ok == OW * OH - 1) begin ok <= 0; of <= of + 1; end
      else ok <= ok + 1;
    end
  end

  initial begin
    f = 0; x = 0; y = 0; of = 0; ok = 0; gap = 0; done_in = 0; out_ready = 0;
    // luma spread over a narrow band so the stretch has an effect
    for (int i = 0; i < F; i++) for (int k = 0; k < 192; k++)
      img[i][k] = {8'(60 + $urandom % 40), 16'($urandom)};
    build();
    repeat (3) @(posedge clk);
    rst = 0;
    wait (of == F);
    repeat (20) @(posedge clk);
    checks++;
    if (of != F || ok != 0 || out_valid) failures++;
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

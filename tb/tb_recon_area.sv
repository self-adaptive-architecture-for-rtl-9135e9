// tb_recon_area: self-checking test of recon_area.
// 6x4 frames. (1) Color persona (reset default): a random raw frame must
// come out as white balance -> bilinear RGGB debayer -> BT.601, computed
// here step by step. (2) A reconfiguration: freeze rises in the middle of a
// frame; pixels are still consumed, nothing comes out; the infrared persona
// is loaded and freeze falls; the rest of that frame must be dropped.
// (3) An infrared frame with its coefficient stream must come out as NUC ->
// 3x3 median -> Y = pixel >> 4, Cb = Cr = 128. frame_sync must pulse for
// the two whole frames only, and `active` must follow the load.
module tb_recon_area;
  import sav_pkg::*;
  localparam int W = 6, H = 4, FS = W * H;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, syncs = 0, outs = 0;

  logic        freeze, load, frame_sync;
  sensor_type_e load_type, active;
  logic        in_valid, in_ready, in_sof, in_eol, out_valid, out_ready, out_sof, out_eol;
  logic [11:0] in_data;
  logic [23:0] out_data;
  logic        coef_valid, coef_ready, coef_sof;
  logic [15:0] cg;
  logic signed [15:0] co;
  logic [32:0] cq [$];          // {sof, gain, offset}
  logic [23:0] exp_q [$];
  int          raw [H][W];

  recon_area #(.MAX_W(16)) dut (.clk, .rst, .freeze, .load, .load_type, .active, .frame_sync,
    .wb_gain_r(10'd320), .wb_gain_g(10'd256), .wb_gain_b(10'd400),
    .in_valid, .in_ready, .in_sof, .in_eol, .in_data,
    .coef_valid, .coef_ready, .coef_sof, .coef_gain(cg), .coef_offset(co),
    .out_valid, .out_ready, .out_sof, .out_eol, .out_data);

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  assign coef_valid = cq.size() > 0;
  assign coef_sof   = coef_valid ? cq[0][32] : 1'b0;
  assign cg         = coef_valid ? cq[0][31:16] : 16'd0;
  assign co         = coef_valid ? cq[0][15:0] : 16'd0;
  always @(posedge clk) if (!rst && coef_valid && coef_ready) begin
    #1 void'(cq.pop_front());
  end

  always @(posedge clk) begin
    out_ready <= ($urandom % 4) != 0;
    if (!rst && frame_sync) syncs++;
    if (!rst && out_valid && out_ready) begin
      if (exp_q.size() == 0) chk(0, "unexpected output");
      else begin
        automatic logic [23:0] e = exp_q.pop_front();
        chk(out_data === e, $sformatf("output %0d: %h expected %h", outs, out_data, e));
        chk(out_sof == ((outs % FS) == 0) && out_eol == ((outs % W) == W - 1), "markers");
      end
      outs++;
    end
  end

  function automatic int at(int y, int x, int img [H][W]);
    return img[y < 0 ? 0 : y][x < 0 ? 0 : x];
  endfunction

  function automatic int clamp(int v, int hi);
    return v < 0 ? 0 : (v > hi ? hi : v);
  endfunction

  // drive on the falling edge; the pixel is taken on the rising edge that
  // follows a falling edge where in_ready is high
  task automatic send(int v, bit sof, bit eol);
    @(negedge clk);
    if ($urandom % 3 == 0) begin in_valid = 0; @(negedge clk); end
    in_valid = 1; in_data = 12'(v); in_sof = sof; in_eol = eol;
    #1;  // let in_ready settle on the new sof flag before sampling it
    while (!in_ready) begin @(negedge clk); #1; end
    @(posedge clk);
  endtask

  initial begin
    int wb [H][W], r, g, b, c, n, s, e, w, d4, x4, ir [H][W], v[9], t;
    freeze = 0; load = 0; load_type = SENSOR_COLOR;
    in_valid = 0; in_sof = 0; in_eol = 0; in_data = 0; out_ready = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    chk(active == SENSOR_COLOR, "color persona after reset");
    // ---- (1) color frame
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
      raw[y][x] = $urandom % 4096;
      wb[y][x] = clamp((raw[y][x] * ((x%2==0 && y%2==0) ? 320 : (x%2==1 && y%2==1) ? 400 : 256)) >> 8, 4095);
    end
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
      automatic int cx = x > 0 ? x - 1 : 0, cy = y > 0 ? y - 1 : 0;
      c = at(y-1, x-1, wb); n = at(y-2, x-1, wb); s = at(y, x-1, wb);
      w = at(y-1, x-2, wb); e = at(y-1, x, wb);
      x4 = (n + s + e + w) / 4;
      d4 = (at(y-2, x-2, wb) + at(y-2, x, wb) + at(y, x-2, wb) + at(y, x, wb)) / 4;
      if (cx%2==0 && cy%2==0) begin r = c; g = x4; b = d4; end
      else if (cx%2==1 && cy%2==0) begin r = (e+w)/2; g = c; b = (n+s)/2; end
      else if (cx%2==0 && cy%2==1) begin r = (n+s)/2; g = c; b = (e+w)/2; end
      else begin r = d4; g = x4; b = c; end
      r = r >> 4; g = g >> 4; b = b >> 4;
      exp_q.push_back({8'(clamp((77*r + 150*g + 29*b + 128) >>> 8, 255)),
                       8'(clamp(((-43*r - 85*g + 128*b + 128) >>> 8) + 128, 255)),
                       8'(clamp(((128*r - 107*g - 21*b + 128) >>> 8) + 128, 255))});
    end
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) send(raw[y][x], x == 0 && y == 0, x == W - 1);
    @(negedge clk) in_valid = 0;
    wait (exp_q.size() == 0);
    repeat (5) @(posedge clk);
    chk(outs == FS, "one whole color frame out");
    // ---- (2) reconfiguration in the middle of a frame
    for (int k = 0; k < FS; k++) begin
      if (k == 0) freeze = 1;
      send($urandom % 4096, k == 0, (k % W) == W - 1);
      if (k == FS - 1) @(negedge clk) in_valid = 0;
      if (k == 14) begin
        @(negedge clk) in_valid = 0; load = 1; load_type = SENSOR_INFRARED;
        @(negedge clk) load = 0; freeze = 0;
      end
    end
    repeat (10) @(posedge clk);
    chk(outs == FS, "nothing out during and after the reconfiguration");
    chk(active == SENSOR_INFRARED, "infrared persona loaded");
    // ---- (3) infrared frame
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
      automatic int gn = 3000 + $urandom % 3000, of = int'($urandom % 401) - 200;
      raw[y][x] = $urandom % 4096;
      ir[y][x] = clamp(((raw[y][x] * gn) >>> 12) + of, 4095);
      cq.push_back({x == 0 && y == 0, 16'(gn), 16'(of)});
    end
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
      for (int i = 0; i < 9; i++) v[i] = at(y - 2 + i / 3, x - 2 + i % 3, ir);
      for (int i = 1; i < 9; i++)
        for (int j = i; j > 0 && v[j-1] > v[j]; j--) begin t = v[j]; v[j] = v[j-1]; v[j-1] = t; end
      exp_q.push_back({8'(v[4] >> 4), 8'd128, 8'd128});
    end
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) send(raw[y][x], x == 0 && y == 0, x == W - 1);
    @(negedge clk) in_valid = 0;
    wait (exp_q.size() == 0);
    repeat (5) @(posedge clk);
    chk(outs == 2 * FS, "one whole infrared frame out");
    chk(syncs == 2, $sformatf("frame_sync for whole frames only (%0d)", syncs));
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

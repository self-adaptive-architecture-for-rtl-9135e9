// tb_visualization_if: self-checking test of visualization_if.
// Display 8x4 active, 4 clocks / 3 lines of blanking, 2-clock hsync,
// 1-line vsync. The buffer model first holds three stray pixels, then two
// whole frames and the first 5 pixels of a third. Expected: frame period 0
// black (strays discarded, no sof at its start), periods 1 and 2 show the
// two frames pixel for pixel, period 3 shows 5 pixels then black with
// underflow set; 3 frames counted as shown; 32 de clocks, 7 hsync pulses
// and 1 vsync pulse per period.
module tb_visualization_if;
  localparam int OW = 8, OH = 4, HB = 4, VB = 3, HT = OW + HB, VT = OH + VB;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        in_valid, in_ready, in_sof, vis_de, vis_hs, vis_vs, locked, underflow;
  logic [23:0] in_data, vis_data;
  logic [15:0] frames_shown;
  logic [24:0] q [$];           // {sof, data}
  logic [23:0] frame_px [3][OW*OH];
  int          period, de_cnt, hs_cnt, vs_cnt, pix_in_period;
  logic        hs_q, vs_q;

  visualization_if #(.OUT_W(OW), .OUT_H(OH), .H_BLANK(HB), .V_BLANK(VB), .HS_LEN(2), .VS_LEN(1)) dut (
    .clk, .rst, .in_valid, .in_ready, .in_sof, .in_data,
    .vis_de, .vis_hsync(vis_hs), .vis_vsync(vis_vs), .vis_data,
    .locked, .underflow, .frames_shown);

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  assign in_valid = q.size() > 0;
  assign in_sof   = in_valid ? q[0][24] : 1'b0;
  assign in_data  = in_valid ? q[0][23:0] : 24'd0;

  function automatic logic [23:0] expected(int p, int k);
    if (p == 1 || p == 2) return frame_px[p-1][k];
    if (p == 3 && k < 5) return frame_px[2][k];
    return {8'd0, 8'd128, 8'd128};
  endfunction

  // the buffer model pops just after the edge that took the pixel
  always @(posedge clk) if (!rst && in_valid && in_ready) begin
    #1 void'(q.pop_front());
  end

  always @(posedge clk) begin
    if (!rst) begin
      hs_q <= vis_hs; vs_q <= vis_vs;
      if (vis_hs && !hs_q) hs_cnt++;
      if (vis_vs && !vs_q) begin
        chk(de_cnt == OW * OH, $sformatf("period %0d: %0d de clocks", period, de_cnt));
        chk(hs_cnt == VT || period == 0, $sformatf("period %0d: %0d hsync pulses", period, hs_cnt));
        period++; de_cnt = 0; hs_cnt = 0; vs_cnt++;
      end
      if (vis_de) begin
        chk(vis_data === expected(period, de_cnt),
            $sformatf("period %0d pixel %0d: %h expected %h", period, de_cnt, vis_data, expected(period, de_cnt)));
        de_cnt++;
      end
    end
  end

  initial begin
    period = 0; de_cnt = 0; hs_cnt = 0; vs_cnt = 0; hs_q = 0; vs_q = 0;
    for (int s = 0; s < 3; s++) q.push_back({1'b0, 24'hEEEEEE});
    for (int f = 0; f < 3; f++)
      for (int k = 0; k < OW * OH; k++) begin
        frame_px[f][k] = 24'($urandom);
        if (f < 2 || k < 5) q.push_back({k == 0, frame_px[f][k]});
      end
    repeat (3) @(posedge clk);
    rst = 0;
    wait (period == 4);
    @(posedge clk);
    chk(underflow, "underflow on the short frame");
    chk(frames_shown == 3, $sformatf("frames shown %0d", frames_shown));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5 * HT * VT + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_vision_system: end-to-end test of the two-sensor vision system at
// reduced sizes (color sensor 16x12, infrared sensor 8x6, display 8x6,
// 16- and 12-word bitstreams).
//
// Sensor readout models stream flat frames (color raw 0x800, infrared raw
// 0x400) with a long vertical blank. The NUC coefficient source sends gain
// 2.0 and offset -256 for every pixel, so a clean infrared display frame is
// {0x70, 0x80, 0x80} and a clean color frame {0x80, 0x80, 0x80}; a frame
// processed by the wrong chain has another value. Models of the bitstream
// memory and of the PR control block answer the PR manager; the first
// load is made to fail.
//
// Scenario: start on the color sensor (same type as the default, so no
// reconfiguration), switch to infrared (one failed and one good load),
// switch back to color, then run the display clock fast (underflow) and
// then slow (the output memory backs up to the input memory, which
// overflows), and finally at normal speed again to see clean frames return.
// Checked: every decoded header against the sensor's fields; every
// display frame holds OUT_W x OUT_H active pixels; each phase ends with
// clean frames of the expected kind; the adaptation steps, the PR
// transfers and the data-path mechanisms all happened at least once.
module tb_vision_system;
  import sav_pkg::*;
  localparam int OW = 8, OH = 6;
  localparam int CW = 16, CH = 12, IW = 8, IH = 6;
  localparam int LEN_C = 16, LEN_I = 12;
  localparam logic [23:0] PIX_COL = 24'h808080, PIX_IR = 24'h708080, BLACK = 24'h008080;

  logic clk_sensor = 0, clk_sys = 0, clk_vis = 0;
  logic rst_sensor = 1, rst_sys = 1, rst_vis = 1;
  int   vis_half = 5;
  always #5 clk_sensor = ~clk_sensor;
  always #4 clk_sys = ~clk_sys;
  always #(vis_half) clk_vis = ~clk_vis;
  int checks = 0, failures = 0;

  logic              col_fval, col_lval, ir_fval, ir_lval, sel_switch;
  logic [PIX_W-1:0]  col_pix, ir_pix;
  logic [1:0]        zoom_sh;
  logic              coef_valid, coef_ready, coef_sof;
  logic [15:0]       coef_gain;
  logic signed [15:0] coef_offset;
  logic              bs_req, bs_gnt, bs_rvalid;
  logic [31:0]       bs_addr, bs_rdata;
  logic              prb_start, prb_valid, prb_ready, prb_done, prb_error;
  logic [31:0]       prb_data;
  logic              vis_de, vis_hsync, vis_vsync, sel, freeze, in_overflow;
  logic              vis_locked, vis_underflow;
  logic [23:0]       vis_data;
  logic [15:0]       frames_shown;
  adapt_state_e      adapt_state;
  sensor_type_e      cur_type, active_type;
  logic              fail_next;
  int                loaded, words;

  vision_system #(
    .OUT_W(OW), .OUT_H(OH), .MAX_W(16),
    .COL_W(CW), .COL_H(CH), .IR_W(IW), .IR_H(IH),
    .IN_DEPTH(64), .OUT_DEPTH(64), .H_BLANK(60), .V_BLANK(1),
    .BS_LEN_COLOR(LEN_C), .BS_LEN_IR(LEN_I)
  ) dut (
    .clk_sensor, .rst_sensor, .clk_sys, .rst_sys, .clk_vis, .rst_vis,
    .col_fval, .col_lval, .col_pix, .ir_fval, .ir_lval, .ir_pix, .sel_switch,
    .zoom_sh, .wb_gain_r(10'd256), .wb_gain_g(10'd256), .wb_gain_b(10'd256),
    .coef_valid, .coef_ready, .coef_sof, .coef_gain, .coef_offset,
    .bs_req, .bs_addr, .bs_gnt, .bs_rvalid, .bs_rdata,
    .prb_start, .prb_valid, .prb_data, .prb_ready, .prb_done, .prb_error,
    .vis_de, .vis_hsync, .vis_vsync, .vis_data,
    .sel, .adapt_state, .cur_type, .active_type, .freeze, .in_overflow,
    .vis_locked, .vis_underflow, .frames_shown
  );

  bitstream_mem_model u_mem (.clk(clk_sys), .bs_req, .bs_addr, .bs_gnt, .bs_rvalid, .bs_rdata);
  pr_block_model #(.LEN_COLOR(LEN_C), .LEN_IR(LEN_I), .DONE_DELAY(20)) u_prb (
    .clk(clk_sys), .prb_start, .prb_valid, .prb_data, .prb_ready, .prb_done, .prb_error,
    .fail_next, .loaded, .words);

  // ---------------- sensor readouts: W pixels per line, 2-clock line
  // blank, 400-clock frame blank ----------------
  task automatic readout(int w, int h, ref logic fval, ref logic lval);
    fval = 1;
    repeat (2) @(posedge clk_sensor);
    for (int y = 0; y < h; y++) begin
      #1 lval = 1;
      repeat (w) @(posedge clk_sensor);
      #1 lval = 0;
      repeat (2) @(posedge clk_sensor);
    end
    #1 fval = 0;
    repeat (400) @(posedge clk_sensor);
  endtask

  assign col_pix = 12'h800;
  assign ir_pix  = 12'h400;
  initial begin
    col_fval = 0; col_lval = 0;
    wait (!rst_sensor);
    @(posedge clk_sensor);
    forever begin
      #1;
      readout(CW, CH, col_fval, col_lval);
    end
  end
  initial begin
    ir_fval = 0; ir_lval = 0;
    wait (!rst_sensor);
    repeat (137) @(posedge clk_sensor);   // not in step with the color sensor
    forever begin
      #1;
      readout(IW, IH, ir_fval, ir_lval);
    end
  end

  // ---------------- NUC coefficient source ----------------
  int ck;
  assign coef_valid  = !rst_sys;
  assign coef_sof    = ck == 0;
  assign coef_gain   = 16'd8192;
  assign coef_offset = -16'sd256;
  always @(posedge clk_sys)
    if (rst_sys) ck <= 0;
    else if (coef_valid && coef_ready) ck <= (ck == IW * IH - 1) ? 0 : ck + 1;

  // ---------------- header checks ----------------
  always @(posedge clk_sensor) if (!rst_sensor && dut.u_arch.hd_hdr_valid) begin
    automatic stream_header_t h = dut.u_arch.hd_hdr;
    automatic bit ok = h.id ? (h.stype == SENSOR_INFRARED && h.width == 11'(IW) && h.height == 11'(IH) && h.fps == 7'd120)
                            : (h.stype == SENSOR_COLOR && h.width == 11'(CW) && h.height == 11'(CH) && h.fps == 7'd45);
    checks++;
    if (!ok) begin failures++; $display("FAIL header %h", h); end
  end

  // ---------------- mechanism counters ----------------
  int n_hdr, n_new, n_same, n_wait, n_launch, n_fail, n_done, n_save, n_freeze_drop;
  int n_zoom_stall, n_back, n_ovf, n_unf, n_switch, n_lock, n_col_clean, n_ir_clean, n_other;
  adapt_state_e st_q;
  logic sel_q, ns_q, ovf_q, unf_q;
  always @(posedge clk_sensor) if (!rst_sensor) begin
    if (dut.u_arch.hd_hdr_valid) n_hdr++;
    if (sel != sel_q) n_switch++;
    if (in_overflow && !ovf_q) n_ovf++;
    sel_q <= sel; ovf_q <= in_overflow;
  end
  always @(posedge clk_sys) if (!rst_sys) begin
    if (dut.u_arch.new_sensor && !ns_q) n_new++;
    if (st_q == AC_CHECK_TYPE && adapt_state == AC_IDLE) n_same++;
    if (st_q != AC_WAIT_SYNC && adapt_state == AC_WAIT_SYNC) n_wait++;
    if (dut.u_arch.pr_req) n_launch++;
    if (dut.u_arch.pr_fail) n_fail++;
    if (dut.u_arch.pr_done) n_done++;
    if (dut.u_arch.save_type) n_save++;
    if (dut.u_arch.u_recon.in_valid && dut.u_arch.u_recon.in_ready && !dut.u_arch.u_recon.pass) n_freeze_drop++;
    if (dut.u_arch.u_static.u_zoom.emitting && dut.u_arch.u_static.u_zoom.in_valid) n_zoom_stall++;
    if (dut.u_arch.sa_v && !dut.u_arch.sa_r) n_back++;
    st_q <= adapt_state; ns_q <= dut.u_arch.new_sensor;
  end

  // ---------------- display frames ----------------
  int de_cnt, vis_frames;
  logic vs_q;
  logic [23:0] first_px;
  bit   uniform;
  always @(posedge clk_vis) if (!rst_vis) begin
    if (vis_underflow && !unf_q) n_unf++;
    unf_q <= vis_underflow;
    if (vis_vsync && !vs_q) begin
      if (vis_frames > 0) begin
        checks++;
        if (de_cnt != OW * OH) begin failures++; $display("FAIL display frame with %0d pixels", de_cnt); end
        if (uniform && first_px == PIX_COL) n_col_clean++;
        else if (uniform && first_px == PIX_IR) n_ir_clean++;
        else if (!(uniform && first_px == BLACK)) n_other++;
      end
      vis_frames++;
      de_cnt = 0;
    end
    vs_q <= vis_vsync;
    if (vis_de) begin
      if (de_cnt == 0) begin first_px = vis_data; uniform = 1; end
      else if (vis_data != first_px) uniform = 0;
      de_cnt++;
    end
  end
  always @(posedge frames_shown[0] or negedge frames_shown[0]) n_lock++;

  // wait for n more clean frames of one kind; a failure after `limit`
  // system clocks
  task automatic wait_clean(bit ir, int n, int limit, string what);
    int base = ir ? n_ir_clean : n_col_clean;
    int t = 0;
    while ((ir ? n_ir_clean : n_col_clean) < base + n && t < limit) begin @(posedge clk_sys); t++; end
    checks++;
    if ((ir ? n_ir_clean : n_col_clean) < base + n) begin
      failures++;
      $display("FAIL %s: too few clean frames (color %0d infrared %0d other %0d)", what,
               n_col_clean, n_ir_clean, n_other);
    end else $display("%s ok after %0d clocks", what, t);
  endtask

  task automatic count(string name, int n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never seen: %s", name); end
    else $display("  %-28s %0d", name, n);
  endtask

  initial begin
    sel_switch = 0; zoom_sh = 0; fail_next = 1;
    {n_hdr, n_new, n_same, n_wait, n_launch, n_fail, n_done, n_save, n_freeze_drop} = '0;
    {n_zoom_stall, n_back, n_ovf, n_unf, n_switch, n_lock, n_col_clean, n_ir_clean, n_other} = '0;
    de_cnt = 0; vis_frames = 0; vs_q = 0; sel_q = 0; ovf_q = 0; unf_q = 0; ns_q = 0; st_q = AC_IDLE;
    first_px = 0; uniform = 0;
    repeat (5) @(posedge clk_sys);
    rst_sensor = 0; rst_sys = 0; rst_vis = 0;

    wait_clean(0, 2, 10_000, "color start");
    checks++;
    if (cur_type != SENSOR_COLOR || active_type != SENSOR_COLOR || loaded != 0) failures++;

    sel_switch = 1;
    wait (n_fail > 0);
    fail_next = 0;
    wait_clean(1, 2, 20_000, "switch to infrared");
    checks++;
    if (cur_type != SENSOR_INFRARED || active_type != SENSOR_INFRARED || loaded != 1 || words != LEN_I) begin
      failures++; $display("FAIL after infrared load: type %0d/%0d loaded %0d words %0d", cur_type, active_type, loaded, words);
    end

    sel_switch = 0;
    zoom_sh = 1;
    wait_clean(0, 2, 20_000, "switch back to color");
    checks++;
    if (cur_type != SENSOR_COLOR || active_type != SENSOR_COLOR || loaded != 2 || words != LEN_C) begin
      failures++; $display("FAIL after color load: type %0d/%0d loaded %0d words %0d", cur_type, active_type, loaded, words);
    end

    vis_half = 1;                      // display much faster than the data
    wait (vis_underflow);
    repeat (20) @(posedge clk_vis);
    vis_half = 40;                     // display much slower than the data
    wait (in_overflow);
    vis_half = 5;
    wait_clean(0, 2, 20_000, "recovery after overflow");

    $display("mechanisms:");
    count("header decoded", n_hdr);
    count("new sensor detected", n_new);
    count("same type, no reconfig", n_same);
    count("wait for frame sync", n_wait);
    count("PR launched", n_launch);
    count("PR failed, retried", n_fail);
    count("PR done", n_done);
    count("type saved", n_save);
    count("pixels dropped by freeze", n_freeze_drop);
    count("zoom stall", n_zoom_stall);
    count("output memory backpressure", n_back);
    count("input memory overflow", n_ovf);
    count("display underflow", n_unf);
    count("display lock", n_lock);
    count("sensor switch-over", n_switch);
    count("clean color frames", n_col_clean);
    count("clean infrared frames", n_ir_clean);
    $display("  display frames %0d, other than clean or black %0d", vis_frames, n_other);
    checks++;
    if (n_launch != 3 || n_fail != 1 || n_done != 2 || n_save != 2) begin
      failures++; $display("FAIL PR counts launch %0d fail %0d done %0d save %0d", n_launch, n_fail, n_done, n_save);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100_000) @(posedge clk_sys);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

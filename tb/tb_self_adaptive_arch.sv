// tb_self_adaptive_arch: test of the self-adaptive architecture fed with a
// link stream generated here (display 8x6, 16- and 12-word bitstreams).
//
// The link generator sends frames as a frame grabber would: a frame sync,
// the stream header, then two pixels per word, one word every second
// clock, lines padded to an even count. All pixels of a frame carry the
// same raw value (color 0x800, low-light 0x600, infrared 0x400), and the
// NUC coefficients are gain 2.0 and offset -256, so a clean display frame
// is {0x80,0x80,0x80} after the color chain and {0x70,0x80,0x80} after the
// infrared chain.
// Sequence of sensors and what must follow:
//   ID 0 color 16x12  -> no reconfiguration (color is the default)
//   ID 1 color  8x8   -> new sensor of the same type: no reconfiguration,
//                        the static area takes the new resolution
//   ID 0 low-light 12x8 -> no bitstream for that type: every PR attempt
//                        fails without touching the PR control block, the
//                        color chain stays
//   ID 1 infrared 8x6 -> one load of the infrared bitstream, then clean
//                        infrared frames
module tb_self_adaptive_arch;
  import sav_pkg::*;
  localparam int OW = 8, OH = 6, LEN_C = 16, LEN_I = 12;
  localparam logic [23:0] PIX_COL = 24'h808080, PIX_IR = 24'h708080;

  logic clk_sensor = 0, clk_sys = 0, clk_vis = 0;
  logic rst_sensor = 1, rst_sys = 1, rst_vis = 1;
  always #5 clk_sensor = ~clk_sensor;
  always #4 clk_sys = ~clk_sys;
  always #5 clk_vis = ~clk_vis;
  int checks = 0, failures = 0;

  logic               link_fsync, link_valid;
  logic [31:0]        link_data;
  logic               coef_valid, coef_ready, coef_sof;
  logic [15:0]        coef_gain;
  logic signed [15:0] coef_offset;
  logic               bs_req, bs_gnt, bs_rvalid;
  logic [31:0]        bs_addr, bs_rdata;
  logic               prb_start, prb_valid, prb_ready, prb_done, prb_error;
  logic [31:0]        prb_data;
  logic               vis_de, vis_hsync, vis_vsync, freeze, in_overflow, vis_locked, vis_underflow;
  logic [23:0]        vis_data;
  logic [15:0]        frames_shown;
  adapt_state_e       adapt_state;
  sensor_type_e       cur_type, active_type;
  int                 loaded, words;

  self_adaptive_arch #(
    .OUT_W(OW), .OUT_H(OH), .MAX_W(16), .IN_DEPTH(64), .OUT_DEPTH(64),
    .H_BLANK(60), .V_BLANK(1), .BS_LEN_COLOR(LEN_C), .BS_LEN_IR(LEN_I)
  ) dut (
    .clk_sensor, .rst_sensor, .clk_sys, .rst_sys, .clk_vis, .rst_vis,
    .link_fsync, .link_valid, .link_data,
    .zoom_sh(2'd0), .wb_gain_r(10'd256), .wb_gain_g(10'd256), .wb_gain_b(10'd256),
    .coef_valid, .coef_ready, .coef_sof, .coef_gain, .coef_offset,
    .bs_req, .bs_addr, .bs_gnt, .bs_rvalid, .bs_rdata,
    .prb_start, .prb_valid, .prb_data, .prb_ready, .prb_done, .prb_error,
    .vis_de, .vis_hsync, .vis_vsync, .vis_data,
    .adapt_state, .cur_type, .active_type, .freeze, .in_overflow,
    .vis_locked, .vis_underflow, .frames_shown
  );

  bitstream_mem_model u_mem (.clk(clk_sys), .bs_req, .bs_addr, .bs_gnt, .bs_rvalid, .bs_rdata);
  pr_block_model #(.LEN_COLOR(LEN_C), .LEN_IR(LEN_I)) u_prb (
    .clk(clk_sys), .prb_start, .prb_valid, .prb_data, .prb_ready, .prb_done, .prb_error,
    .fail_next(1'b0), .loaded, .words);

  // ---------------- link generator ----------------
  int cur_id, cur_t, cur_w, cur_h;
  task automatic frame(int id, int t, int w, int h, logic [11:0] v);
    @(negedge clk_sensor) link_fsync = 1;
    @(negedge clk_sensor) link_fsync = 0;
    @(negedge clk_sensor) link_valid = 1;
    link_data = {7'(60), 11'(h), 11'(w), 2'(t), 1'(id)};
    @(negedge clk_sensor) link_valid = 0;
    for (int y = 0; y < h; y++) begin
      for (int x = 0; x < w; x += 2) begin
        @(negedge clk_sensor) link_valid = 1;
        link_data = {4'd0, v, 4'd0, v};
        @(negedge clk_sensor) link_valid = 0;
      end
      repeat (2) @(negedge clk_sensor);
    end
    repeat (400) @(negedge clk_sensor);
  endtask

  initial begin
    link_fsync = 0; link_valid = 0; link_data = 0;
    cur_id = 0; cur_t = 0; cur_w = 16; cur_h = 12;
    wait (!rst_sensor);
    forever frame(cur_id, cur_t, cur_w, cur_h,
                  cur_t == 0 ? 12'h800 : (cur_t == 1 ? 12'h600 : 12'h400));
  end

  // ---------------- NUC coefficient source (8x6 infrared frames) ----------------
  int ck;
  assign coef_valid  = !rst_sys;
  assign coef_sof    = ck == 0;
  assign coef_gain   = 16'd8192;
  assign coef_offset = -16'sd256;
  always @(posedge clk_sys)
    if (rst_sys) ck <= 0;
    else if (coef_valid && coef_ready) ck <= (ck == 47) ? 0 : ck + 1;

  // ---------------- counters ----------------
  int n_launch, n_fail, n_done, n_start, n_col, n_ir, de_cnt, vis_frames;
  logic vs_q;
  logic [23:0] first_px;
  bit uniform;
  always @(posedge clk_sys) if (!rst_sys) begin
    if (dut.pr_req) n_launch++;
    if (dut.pr_fail) n_fail++;
    if (dut.pr_done) n_done++;
    if (prb_start) n_start++;
  end
  always @(posedge clk_vis) if (!rst_vis) begin
    if (vis_vsync && !vs_q) begin
      if (vis_frames > 0) begin
        checks++;
        if (de_cnt != OW * OH) begin failures++; $display("FAIL display frame with %0d pixels", de_cnt); end
        if (uniform && first_px == PIX_COL) n_col++;
        if (uniform && first_px == PIX_IR) n_ir++;
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

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL %s: state %0d type %0d/%0d launch %0d fail %0d done %0d start %0d col %0d ir %0d",
               m, adapt_state, cur_type, active_type, n_launch, n_fail, n_done, n_start, n_col, n_ir);
    end
  endtask

  task automatic frames(int n);
    repeat (n * 700) @(posedge clk_sensor);
  endtask

  initial begin
    {n_launch, n_fail, n_done, n_start, n_col, n_ir, de_cnt, vis_frames} = '0;
    vs_q = 0; first_px = 0; uniform = 0;
    repeat (5) @(posedge clk_sys);
    rst_sensor = 0; rst_sys = 0; rst_vis = 0;

    frames(5);
    chk(n_col >= 2 && n_launch == 0 && cur_type == SENSOR_COLOR, "color sensor 0");
    chk(dut.param_w == 11'd16 && dut.param_h == 11'd12, "resolution 16x12");

    cur_id = 1; cur_w = 8; cur_h = 8;
    n_col = 0;
    frames(5);
    chk(n_col >= 2 && n_launch == 0 && cur_type == SENSOR_COLOR, "color sensor 1");
    chk(dut.param_w == 11'd8 && dut.param_h == 11'd8, "resolution 8x8");

    cur_id = 0; cur_t = 1; cur_w = 12; cur_h = 8;
    frames(5);
    chk(n_fail >= 2 && n_start == 0 && n_done == 0 && cur_type == SENSOR_COLOR && active_type == SENSOR_COLOR,
        "low-light sensor");

    cur_id = 1; cur_t = 2; cur_w = 8; cur_h = 6;
    n_ir = 0;
    frames(6);
    chk(n_ir >= 2 && n_start == 1 && n_done == 1 && loaded == 1 && words == LEN_I, "infrared sensor");
    chk(cur_type == SENSOR_INFRARED && active_type == SENSOR_INFRARED && adapt_state == AC_IDLE, "infrared saved");
    chk(!in_overflow, "no overflow");

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

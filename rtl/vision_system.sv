// vision_system: two-sensor prototype of the self-adaptive vision system.
//
// A color and an infrared sensor frame grabber each turn their sensor's
// readout (frame valid, line valid, pixel) into a link stream that starts
// every frame with a stream header describing the sensor. A manual switch
// (sensor_selector) decides which link reaches the self-adaptive
// architecture, which notices the change from the header and reconfigures
// its sensor-specific processing by itself. Sensor characteristics default
// to the example sensors: color 1280x960 at 45 fps (ID 0), infrared 640x480
// at 120 fps (ID 1). Memories (partial bitstreams, NUC coefficients), the
// FPGA's PR control block and the display are outside and reached through
// ports. Both grabbers and the selector run on clk_sensor; processing runs
// on clk_sys (100 MHz in the reference implementation); the display on
// clk_vis. Resets are synchronous, one per clock. The two-sensor set-up
// with a manual selector follows the source's prototype.
module vision_system
  import sav_pkg::*;
#(
  parameter int unsigned OUT_W     = 640,
  parameter int unsigned OUT_H     = 480,
  parameter int unsigned MAX_W     = 1280,
  parameter int unsigned COL_W     = 1280,
  parameter int unsigned COL_H     = 960,
  parameter int unsigned COL_FPS   = 45,
  parameter int unsigned IR_W      = 640,
  parameter int unsigned IR_H      = 480,
  parameter int unsigned IR_FPS    = 120,
  parameter int unsigned IN_DEPTH  = 4096,
  parameter int unsigned OUT_DEPTH = 4096,
  parameter int unsigned H_BLANK   = 160,
  parameter int unsigned V_BLANK   = 45,
  parameter int unsigned BS_LEN_COLOR = 1520435,
  parameter int unsigned BS_LEN_IR    = 1494221
) (
  input  logic               clk_sensor,
  input  logic               rst_sensor,
  input  logic               clk_sys,
  input  logic               rst_sys,
  input  logic               clk_vis,
  input  logic               rst_vis,
  // sensor readouts
  input  logic               col_fval,
  input  logic               col_lval,
  input  logic [PIX_W-1:0]   col_pix,
  input  logic               ir_fval,
  input  logic               ir_lval,
  input  logic [PIX_W-1:0]   ir_pix,
  input  logic               sel_switch,
  // user settings
  input  logic [1:0]         zoom_sh,
  input  logic [9:0]         wb_gain_r,
  input  logic [9:0]         wb_gain_g,
  input  logic [9:0]         wb_gain_b,
  // NUC coefficient stream
  input  logic               coef_valid,
  output logic               coef_ready,
  input  logic               coef_sof,
  input  logic [15:0]        coef_gain,
  input  logic signed [15:0] coef_offset,
  // bitstream memory
  output logic               bs_req,
  output logic [31:0]        bs_addr,
  input  logic               bs_gnt,
  input  logic               bs_rvalid,
  input  logic [31:0]        bs_rdata,
  // FPGA PR control block
  output logic               prb_start,
  output logic               prb_valid,
  output logic [31:0]        prb_data,
  input  logic               prb_ready,
  input  logic               prb_done,
  input  logic               prb_error,
  // display
  output logic               vis_de,
  output logic               vis_hsync,
  output logic               vis_vsync,
  output logic [YCC_W-1:0]   vis_data,
  // status
  output logic               sel,
  output adapt_state_e       adapt_state,
  output sensor_type_e       cur_type,
  output sensor_type_e       active_type,
  output logic               freeze,
  output logic               in_overflow,
  output logic               vis_locked,
  output logic               vis_underflow,
  output logic [15:0]        frames_shown
);
  logic              a_fsync, a_valid, b_fsync, b_valid, l_fsync, l_valid;
  logic [LINK_W-1:0] a_data, b_data, l_data;

  sensor_frame_grabber #(
    .SENSOR_ID(1'b0), .SENSOR_TYPE(SENSOR_COLOR),
    .RES_W_PX(COL_W), .RES_H_PX(COL_H), .FPS(COL_FPS)
  ) u_grab_color (
    .clk(clk_sensor), .rst(rst_sensor), .fval(col_fval), .lval(col_lval), .pix(col_pix),
    .link_fsync(a_fsync), .link_valid(a_valid), .link_data(a_data)
  );

  sensor_frame_grabber #(
    .SENSOR_ID(1'b1), .SENSOR_TYPE(SENSOR_INFRARED),
    .RES_W_PX(IR_W), .RES_H_PX(IR_H), .FPS(IR_FPS)
  ) u_grab_ir (
    .clk(clk_sensor), .rst(rst_sensor), .fval(ir_fval), .lval(ir_lval), .pix(ir_pix),
    .link_fsync(b_fsync), .link_valid(b_valid), .link_data(b_data)
  );

  sensor_selector u_sel (
    .clk(clk_sensor), .rst(rst_sensor), .sel_switch,
    .a_fsync, .a_valid, .a_data, .b_fsync, .b_valid, .b_data,
    .out_fsync(l_fsync), .out_valid(l_valid), .out_data(l_data), .sel
  );

  self_adaptive_arch #(
    .OUT_W(OUT_W), .OUT_H(OUT_H), .MAX_W(MAX_W),
    .IN_DEPTH(IN_DEPTH), .OUT_DEPTH(OUT_DEPTH), .H_BLANK(H_BLANK), .V_BLANK(V_BLANK),
    .BS_LEN_COLOR(BS_LEN_COLOR), .BS_LEN_IR(BS_LEN_IR)
  ) u_arch (
    .clk_sensor, .rst_sensor, .clk_sys, .rst_sys, .clk_vis, .rst_vis,
    .link_fsync(l_fsync), .link_valid(l_valid), .link_data(l_data),
    .zoom_sh, .wb_gain_r, .wb_gain_g, .wb_gain_b,
    .coef_valid, .coef_ready, .coef_sof, .coef_gain, .coef_offset,
    .bs_req, .bs_addr, .bs_gnt, .bs_rvalid, .bs_rdata,
    .prb_start, .prb_valid, .prb_data, .prb_ready, .prb_done, .prb_error,
    .vis_de, .vis_hsync, .vis_vsync, .vis_data,
    .adapt_state, .cur_type, .active_type, .freeze, .in_overflow,
    .vis_locked, .vis_underflow, .frames_shown
  );
endmodule

// self_adaptive_arch: processing architecture that reconfigures itself when
// the sensor in front of it changes.
//
// Data path: the sensor link enters the header decoder (sensor clock), which
// strips the stream header and unpacks the pixels; an input image memory
// carries the pixels to the system clock; the reconfigurable area restores
// them with the chain of the current sensor type; the static area zooms,
// resizes, sharpens and stretches contrast; an output image memory carries
// the result to the display clock, where the visualization interface
// drives the screen.
// Adaptation path (system clock): header fields cross from the sensor clock
// (cdc_bus_sync) to the system monitor, which flags a new sensor ID. The
// adaptation controller checks whether the type changed, waits for a frame
// synchronization at the reconfigurable area's input and asks the PR
// manager to load the new type's bitstream; on success the monitor records
// the new type. The static area only receives the new resolution.
// Bitstream memory, the FPGA's PR control block and the NUC coefficient
// source are outside and reached through ports. The block structure follows
// the source; clocking, handshakes and the on-chip buffers are this design's.
module self_adaptive_arch
  import sav_pkg::*;
#(
  parameter int unsigned  OUT_W         = 640,
  parameter int unsigned  OUT_H         = 480,
  parameter int unsigned  MAX_W         = 1280,
  parameter int unsigned  IN_DEPTH      = 4096,
  parameter int unsigned  OUT_DEPTH     = 4096,
  parameter int unsigned  H_BLANK       = 160,
  parameter int unsigned  V_BLANK       = 45,
  parameter sensor_type_e DEFAULT_TYPE  = SENSOR_COLOR,
  parameter logic [31:0]  BS_BASE_COLOR = 32'h0000_0000,
  parameter int unsigned  BS_LEN_COLOR  = 1520435,
  parameter logic [31:0]  BS_BASE_IR    = 32'h0100_0000,
  parameter int unsigned  BS_LEN_IR     = 1494221
) (
  input  logic               clk_sensor,
  input  logic               rst_sensor,
  input  logic               clk_sys,
  input  logic               rst_sys,
  input  logic               clk_vis,
  input  logic               rst_vis,
  // sensor link
  input  logic               link_fsync,
  input  logic               link_valid,
  input  logic [LINK_W-1:0]  link_data,
  // user settings (system clock)
  input  logic [1:0]         zoom_sh,
  input  logic [9:0]         wb_gain_r,
  input  logic [9:0]         wb_gain_g,
  input  logic [9:0]         wb_gain_b,
  // NUC coefficient stream (system clock)
  input  logic               coef_valid,
  output logic               coef_ready,
  input  logic               coef_sof,
  input  logic [15:0]        coef_gain,
  input  logic signed [15:0] coef_offset,
  // bitstream memory (system clock)
  output logic               bs_req,
  output logic [31:0]        bs_addr,
  input  logic               bs_gnt,
  input  logic               bs_rvalid,
  input  logic [31:0]        bs_rdata,
  // FPGA PR control block (system clock)
  output logic               prb_start,
  output logic               prb_valid,
  output logic [31:0]        prb_data,
  input  logic               prb_ready,
  input  logic               prb_done,
  input  logic               prb_error,
  // display (display clock)
  output logic               vis_de,
  output logic               vis_hsync,
  output logic               vis_vsync,
  output logic [YCC_W-1:0]   vis_data,
  // status
  output adapt_state_e       adapt_state,
  output sensor_type_e       cur_type,
  output sensor_type_e       active_type,
  output logic               freeze,
  output logic               in_overflow,
  output logic               vis_locked,
  output logic               vis_underflow,
  output logic [15:0]        frames_shown
);
  // ---------------- sensor clock: header decoder ----------------
  logic             hd_hdr_valid;
  stream_header_t   hd_hdr;
  logic             hd_v, hd_s, hd_e;
  logic [PIX_W-1:0] hd_d;
  logic             unused_in_full;

  header_decoder u_hdec (
    .clk(clk_sensor), .rst(rst_sensor),
    .link_fsync, .link_valid, .link_data,
    .hdr_valid(hd_hdr_valid), .hdr(hd_hdr),
    .pix_valid(hd_v), .pix_sof(hd_s), .pix_eol(hd_e), .pix_data(hd_d)
  );

  // ---------------- input image memory ----------------
  logic             ib_v, ib_r;
  logic [PIX_W+1:0] ib_d;

  frame_buffer #(.DW(PIX_W + 2), .DEPTH(IN_DEPTH)) u_in_buf (
    .wr_clk(clk_sensor), .wr_rst(rst_sensor),
    .wr_en(hd_v), .wr_data({hd_s, hd_e, hd_d}), .wr_full(unused_in_full), .overflow(in_overflow),
    .rd_clk(clk_sys), .rd_rst(rst_sys),
    .rd_valid(ib_v), .rd_ready(ib_r), .rd_data(ib_d)
  );

  // ---------------- adaptation brain (system clock) ----------------
  logic             sm_hdr_valid;
  logic [LINK_W-1:0] sm_hdr_bits;
  logic             new_sensor, new_sensor_ack, save_type;
  stream_header_t   new_hdr;
  logic             frame_sync, pr_req, pr_done, pr_fail, load;
  sensor_type_e     pr_type, load_type;
  logic [RES_W-1:0] param_w, param_h;

  cdc_bus_sync #(.W(LINK_W)) u_hdr_cdc (
    .src_clk(clk_sensor), .src_rst(rst_sensor), .src_valid(hd_hdr_valid), .src_data(hd_hdr),
    .dst_clk(clk_sys), .dst_rst(rst_sys), .dst_valid(sm_hdr_valid), .dst_data(sm_hdr_bits)
  );

  system_monitor #(.DEFAULT_TYPE(DEFAULT_TYPE)) u_mon (
    .clk(clk_sys), .rst(rst_sys),
    .hdr_valid(sm_hdr_valid), .hdr(stream_header_t'(sm_hdr_bits)),
    .new_sensor_ack, .save_type, .new_sensor, .new_hdr, .cur_type
  );

  adaptation_controller u_ctrl (
    .clk(clk_sys), .rst(rst_sys),
    .new_sensor, .new_hdr, .cur_type, .frame_sync, .pr_done, .pr_fail,
    .new_sensor_ack, .pr_req, .pr_type, .save_type, .param_w, .param_h,
    .state(adapt_state)
  );

  pr_manager #(
    .BS_BASE_COLOR(BS_BASE_COLOR), .BS_LEN_COLOR(BS_LEN_COLOR),
    .BS_BASE_IR(BS_BASE_IR), .BS_LEN_IR(BS_LEN_IR)
  ) u_prm (
    .clk(clk_sys), .rst(rst_sys),
    .pr_req, .pr_type, .pr_done, .pr_fail, .freeze, .load, .load_type,
    .bs_req, .bs_addr, .bs_gnt, .bs_rvalid, .bs_rdata,
    .prb_start, .prb_valid, .prb_data, .prb_ready, .prb_done, .prb_error
  );

  // ---------------- processing area (system clock) ----------------
  logic             ra_v, ra_r, ra_s, ra_e;
  logic [YCC_W-1:0] ra_d;
  logic             sa_v, sa_r, sa_s, sa_e;
  logic [YCC_W-1:0] sa_d;

  recon_area #(.MAX_W(MAX_W), .DEFAULT_TYPE(DEFAULT_TYPE)) u_recon (
    .clk(clk_sys), .rst(rst_sys),
    .freeze, .load, .load_type, .active(active_type), .frame_sync,
    .wb_gain_r, .wb_gain_g, .wb_gain_b,
    .in_valid(ib_v), .in_ready(ib_r),
    .in_sof(ib_d[PIX_W+1]), .in_eol(ib_d[PIX_W]), .in_data(ib_d[PIX_W-1:0]),
    .coef_valid, .coef_ready, .coef_sof, .coef_gain, .coef_offset,
    .out_valid(ra_v), .out_ready(ra_r), .out_sof(ra_s), .out_eol(ra_e), .out_data(ra_d)
  );

  static_area #(.OUT_W(OUT_W), .OUT_H(OUT_H), .MAX_W(MAX_W)) u_static (
    .clk(clk_sys), .rst(rst_sys),
    .in_w(param_w), .in_h(param_h), .zoom_sh,
    .in_valid(ra_v), .in_ready(ra_r), .in_sof(ra_s), .in_eol(ra_e), .in_data(ra_d),
    .out_valid(sa_v), .out_ready(sa_r), .out_sof(sa_s), .out_eol(sa_e), .out_data(sa_d)
  );

  // ---------------- output image memory ----------------
  logic             ob_full, ob_overflow, ob_v, ob_r;
  logic [YCC_W+1:0] ob_d;

  assign sa_r = !ob_full;

  frame_buffer #(.DW(YCC_W + 2), .DEPTH(OUT_DEPTH)) u_out_buf (
    .wr_clk(clk_sys), .wr_rst(rst_sys),
    .wr_en(sa_v && sa_r), .wr_data({sa_s, sa_e, sa_d}), .wr_full(ob_full), .overflow(ob_overflow),
    .rd_clk(clk_vis), .rd_rst(rst_vis),
    .rd_valid(ob_v), .rd_ready(ob_r), .rd_data(ob_d)
  );

  // ---------------- visualization interface (display clock) ----------------
  visualization_if #(.OUT_W(OUT_W), .OUT_H(OUT_H), .H_BLANK(H_BLANK), .V_BLANK(V_BLANK)) u_vis (
    .clk(clk_vis), .rst(rst_vis),
    .in_valid(ob_v), .in_ready(ob_r), .in_sof(ob_d[YCC_W+1]), .in_data(ob_d[YCC_W-1:0]),
    .vis_de, .vis_hsync, .vis_vsync, .vis_data,
    .locked(vis_locked), .underflow(vis_underflow), .frames_shown
  );
endmodule

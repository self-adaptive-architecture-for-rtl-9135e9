// recon_area: the reconfigurable processing area.
//
// Holds the sensor-specific restoration chain. The color persona is white
// balance -> debayer -> RGB to YCbCr; the infrared persona is NUC -> median
// filter, its 12-bit gray result mapped to Y = pixel >> 4, Cb = Cr = 128.
// Either way the output is a {Y, Cb, Cr} stream for the static area.
// On the FPGA only one persona exists at a time and partial reconfiguration
// swaps it; here both are present and the `active` register, written only by
// a successful reconfiguration (load, load_type), selects which one gets
// the input and drives the output. While freeze is high (reconfiguration in
// progress) both personas are held in reset, input pixels are consumed and
// dropped and nothing leaves; after freeze the area keeps dropping until the
// next start of frame, so the new persona starts on a whole frame.
// The NUC coefficient stream carries its own start-of-frame mark, so it
// realigns with the pixels after a frame has been dropped.
// frame_sync pulses when a start-of-frame pixel is accepted; the adaptation
// controller waits for it before reconfiguring. Chains follow the source;
// the multiplexed stand-in for reconfiguration is this design's.
module recon_area
  import sav_pkg::*;
#(
  parameter int unsigned  MAX_W        = 1280,
  parameter sensor_type_e DEFAULT_TYPE = SENSOR_COLOR
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               freeze,
  input  logic               load,
  input  sensor_type_e       load_type,
  output sensor_type_e       active,
  output logic               frame_sync,
  input  logic [9:0]         wb_gain_r,
  input  logic [9:0]         wb_gain_g,
  input  logic [9:0]         wb_gain_b,
  input  logic               in_valid,
  output logic               in_ready,
  input  logic               in_sof,
  input  logic               in_eol,
  input  logic [PIX_W-1:0]   in_data,
  input  logic               coef_valid,
  output logic               coef_ready,
  input  logic               coef_sof,
  input  logic [15:0]        coef_gain,
  input  logic signed [15:0] coef_offset,
  output logic               out_valid,
  input  logic               out_ready,
  output logic               out_sof,
  output logic               out_eol,
  output logic [YCC_W-1:0]   out_data
);
  logic prst, dropping, pass, is_ir;

  assign prst  = rst || freeze;
  assign is_ir = (active == SENSOR_INFRARED);

  always_ff @(posedge clk) begin
    if (rst) begin
      active   <= DEFAULT_TYPE;
      dropping <= 1'b0;
    end else begin
      if (load) active <= load_type;
      if (freeze) dropping <= 1'b1;
      else if (in_valid && in_sof) dropping <= 1'b0;
    end
  end

  // input gate
  logic g_ready;
  assign pass       = !freeze && !(dropping && !in_sof);
  assign in_ready   = pass ? g_ready : 1'b1;
  assign frame_sync = in_valid && in_ready && in_sof && pass;

  // color persona
  logic c_in_ready;
  logic wb_v, wb_r, wb_s, wb_e;  logic [PIX_W-1:0] wb_d;
  logic db_v, db_r, db_s, db_e;  logic [3*PIX_W-1:0] db_d;
  logic cc_v, cc_s, cc_e;        logic [YCC_W-1:0] cc_d;

  white_balance #(.PIX_W(PIX_W)) u_wb (
    .clk, .rst(prst), .gain_r(wb_gain_r), .gain_g(wb_gain_g), .gain_b(wb_gain_b),
    .in_valid(in_valid && pass && !is_ir), .in_ready(c_in_ready),
    .in_sof, .in_eol, .in_data,
    .out_valid(wb_v), .out_ready(wb_r), .out_sof(wb_s), .out_eol(wb_e), .out_data(wb_d)
  );
  debayer #(.PIX_W(PIX_W), .MAX_W(MAX_W)) u_db (
    .clk, .rst(prst),
    .in_valid(wb_v), .in_ready(wb_r), .in_sof(wb_s), .in_eol(wb_e), .in_data(wb_d),
    .out_valid(db_v), .out_ready(db_r), .out_sof(db_s), .out_eol(db_e), .out_data(db_d)
  );
  rgb2ycbcr #(.PIX_W(PIX_W)) u_csc (
    .clk, .rst(prst),
    .in_valid(db_v), .in_ready(db_r), .in_sof(db_s), .in_eol(db_e), .in_data(db_d),
    .out_valid(cc_v), .out_ready(out_ready && !is_ir), .out_sof(cc_s), .out_eol(cc_e), .out_data(cc_d)
  );

  // infrared persona
  logic i_in_ready, i_coef_ready;
  logic nu_v, nu_r, nu_s, nu_e;  logic [PIX_W-1:0] nu_d;
  logic md_v, md_s, md_e;        logic [PIX_W-1:0] md_d;

  nuc #(.PIX_W(PIX_W)) u_nuc (
    .clk, .rst(prst),
    .in_valid(in_valid && pass && is_ir), .in_ready(i_in_ready),
    .in_sof, .in_eol, .in_data,
    .coef_valid(coef_valid && is_ir && !freeze), .coef_ready(i_coef_ready), .coef_sof, .coef_gain, .coef_offset,
    .out_valid(nu_v), .out_ready(nu_r), .out_sof(nu_s), .out_eol(nu_e), .out_data(nu_d)
  );
  median_filter #(.PIX_W(PIX_W), .MAX_W(MAX_W)) u_med (
    .clk, .rst(prst),
    .in_valid(nu_v), .in_ready(nu_r), .in_sof(nu_s), .in_eol(nu_e), .in_data(nu_d),
    .out_valid(md_v), .out_ready(out_ready && is_ir), .out_sof(md_s), .out_eol(md_e), .out_data(md_d)
  );

  assign g_ready    = is_ir ? i_in_ready : c_in_ready;
  assign coef_ready = i_coef_ready && is_ir && !freeze;

  always_comb begin
    if (is_ir) begin
      out_valid = md_v && !freeze;
      out_sof   = md_s;
      out_eol   = md_e;
      out_data  = {md_d[PIX_W-1 -: 8], 8'd128, 8'd128};
    end else begin
      out_valid = cc_v && !freeze;
      out_sof   = cc_s;
      out_eol   = cc_e;
      out_data  = cc_d;
    end
  end
endmodule

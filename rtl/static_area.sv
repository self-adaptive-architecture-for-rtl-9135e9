// static_area: the processing common to every sensor.
//
// zoom and frame resize -> contour enhancing -> contrast enhancing, all on
// {Y, Cb, Cr} streams with valid/ready. Only the input resolution (in_w,
// in_h, set by the adaptation controller from the stream header) changes
// when the sensor changes; the zoom factor is a user setting. Output frames
// are always OUT_W x OUT_H. Chain order follows the source.
module static_area #(
  parameter int unsigned OUT_W = 640,
  parameter int unsigned OUT_H = 480,
  parameter int unsigned MAX_W = 1280
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic [sav_pkg::RES_W-1:0] in_w,
  input  logic [sav_pkg::RES_W-1:0] in_h,
  input  logic [1:0]                zoom_sh,
  input  logic                      in_valid,
  output logic                      in_ready,
  input  logic                      in_sof,
  input  logic                      in_eol,
  input  logic [23:0]               in_data,
  output logic                      out_valid,
  input  logic                      out_ready,
  output logic                      out_sof,
  output logic                      out_eol,
  output logic [23:0]               out_data
);
  logic zr_v, zr_r, zr_s, zr_e;  logic [23:0] zr_d;
  logic ce_v, ce_r, ce_s, ce_e;  logic [23:0] ce_d;

  zoom_resize #(.OUT_W(OUT_W), .OUT_H(OUT_H), .MAX_W(MAX_W), .DW(24)) u_zoom (
    .clk, .rst, .in_w, .in_h, .zoom_sh,
    .in_valid, .in_ready, .in_sof, .in_eol, .in_data,
    .out_valid(zr_v), .out_ready(zr_r), .out_sof(zr_s), .out_eol(zr_e), .out_data(zr_d)
  );
  contour_enhance #(.MAX_W(OUT_W)) u_contour (
    .clk, .rst,
    .in_valid(zr_v), .in_ready(zr_r), .in_sof(zr_s), .in_eol(zr_e), .in_data(zr_d),
    .out_valid(ce_v), .out_ready(ce_r), .out_sof(ce_s), .out_eol(ce_e), .out_data(ce_d)
  );
  contrast_enhance u_contrast (
    .clk, .rst,
    .in_valid(ce_v), .in_ready(ce_r), .in_sof(ce_s), .in_eol(ce_e), .in_data(ce_d),
    .out_valid, .out_ready, .out_sof, .out_eol, .out_data
  );
endmodule

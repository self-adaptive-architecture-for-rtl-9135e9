// sensor_frame_grabber: frame grabber processing of one sensor.
//
// Takes the readout of the sensor-specific frame grabbing IP (frame valid,
// line valid, pixel), packs the pixels into link words (data_packaging) and
// inserts the stream header that describes this sensor (header_encoder). The
// sensor's characteristics are parameters of the grabber, so the grabber and
// its sensor form one replaceable unit. Output is the sensor link: fsync
// pulse, then the header word, then the packed pixel words of the frame.
// The chain order follows the source; the link format is this design's.
module sensor_frame_grabber
  import sav_pkg::*;
#(
  parameter logic [ID_W-1:0]  SENSOR_ID   = '0,
  parameter sensor_type_e     SENSOR_TYPE = SENSOR_COLOR,
  parameter int unsigned      RES_W_PX    = 1280,
  parameter int unsigned      RES_H_PX    = 960,
  parameter int unsigned      FPS         = 45
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              fval,
  input  logic              lval,
  input  logic [PIX_W-1:0]  pix,
  output logic              link_fsync,
  output logic              link_valid,
  output logic [LINK_W-1:0] link_data
);
  logic        pk_fsync, pk_valid;
  logic [31:0] pk_data;

  data_packaging #(.PIX_W(PIX_W)) u_pack (
    .clk, .rst, .fval, .lval, .pix,
    .out_fsync(pk_fsync), .out_valid(pk_valid), .out_data(pk_data)
  );

  header_encoder #(
    .SENSOR_ID(SENSOR_ID), .SENSOR_TYPE(SENSOR_TYPE),
    .RES_W_PX(RES_W_PX), .RES_H_PX(RES_H_PX), .FPS(FPS)
  ) u_henc (
    .clk, .rst,
    .in_fsync(pk_fsync), .in_valid(pk_valid), .in_data(pk_data),
    .out_fsync(link_fsync), .out_valid(link_valid), .out_data(link_data)
  );
endmodule

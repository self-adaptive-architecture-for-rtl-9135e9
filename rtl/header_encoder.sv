// header_encoder: inserts the stream header into the sensor link.
//
// The header is the sensor's identity card: ID, type, resolution and frame
// rate, fixed per frame grabber by parameters and packed as
// sav_pkg::stream_header_t. After every frame sync on the input the encoder
// forwards the sync and sends the header word as the first data word of the
// frame, before any pixel word. Pixel words that arrive while the header is
// pending or being sent wait in a 4-entry FIFO; because data packaging emits
// at most one word every two clocks the FIFO never fills (asserted).
// Latency: fsync passes through one register; the header follows one clock
// later. Placing the header between frame sync and frame data follows the
// source; the FIFO and the timing are this design's choices.
module header_encoder
  import sav_pkg::*;
#(
  parameter logic [ID_W-1:0]   SENSOR_ID   = '0,
  parameter sensor_type_e      SENSOR_TYPE = SENSOR_COLOR,
  parameter int unsigned       RES_W_PX    = 1280,
  parameter int unsigned       RES_H_PX    = 960,
  parameter int unsigned       FPS         = 45
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        in_fsync,
  input  logic        in_valid,
  input  logic [31:0] in_data,
  output logic        out_fsync,
  output logic        out_valid,
  output logic [31:0] out_data
);
  localparam stream_header_t HEADER = '{
    fps:    FPS_W'(FPS),
    height: RES_W'(RES_H_PX),
    width:  RES_W'(RES_W_PX),
    stype:  SENSOR_TYPE,
    id:     SENSOR_ID
  };

  logic [31:0] fifo_mem [4];
  logic [2:0]  wr_ptr, rd_ptr;
  logic        fifo_empty, fifo_full;
  logic        hdr_pending;

  assign fifo_empty = (wr_ptr == rd_ptr);
  assign fifo_full  = (wr_ptr[1:0] == rd_ptr[1:0]) && (wr_ptr[2] != rd_ptr[2]);

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr      <= '0;
      rd_ptr      <= '0;
      hdr_pending <= 1'b0;
      out_fsync   <= 1'b0;
      out_valid   <= 1'b0;
      out_data    <= '0;
    end else begin
      out_fsync <= in_fsync;
      out_valid <= 1'b0;
      if (in_valid && !fifo_full) begin
        fifo_mem[wr_ptr[1:0]] <= in_data;
        wr_ptr <= wr_ptr + 3'd1;
      end
      if (in_fsync) begin
        hdr_pending <= 1'b1;
      end else if (hdr_pending) begin
        out_valid   <= 1'b1;
        out_data    <= HEADER;
        hdr_pending <= 1'b0;
      end else if (!fifo_empty) begin
        out_valid <= 1'b1;
        out_data  <= fifo_mem[rd_ptr[1:0]];
        rd_ptr    <= rd_ptr + 3'd1;
      end
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (rst) in_valid |-> !fifo_full)
    else $error("header_encoder: data FIFO overflow");
endmodule

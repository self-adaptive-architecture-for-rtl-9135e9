// rgb2ycbcr: color space transform from RGB to YCbCr.
//
// Full-range BT.601 with 8-bit fixed-point coefficients:
//   Y  = ( 77 R + 150 G +  29 B + 128) >> 8
//   Cb = (-43 R -  85 G + 128 B + 128) >> 8 + 128
//   Cr = (128 R - 107 G -  21 B + 128) >> 8 + 128
// computed on the top 8 bits of each PIX_W-bit input and clamped to
// 0..255. out_data is {Y, Cb, Cr}. One register stage with valid/ready.
// The transform as the last step of the color chain follows the source;
// the standard and precision are this design's choices.
module rgb2ycbcr #(
  parameter int unsigned PIX_W = sav_pkg::PIX_W
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               in_valid,
  output logic               in_ready,
  input  logic               in_sof,
  input  logic               in_eol,
  input  logic [3*PIX_W-1:0] in_data,
  output logic               out_valid,
  input  logic               out_ready,
  output logic               out_sof,
  output logic               out_eol,
  output logic [23:0]        out_data
);
  logic              adv;
  logic signed [18:0] r8, g8, b8, ys, cbs, crs;
  logic [7:0]        y, cb, cr;

  assign in_ready = !out_valid || out_ready;
  assign adv      = in_valid && in_ready;

  function automatic logic [7:0] clamp8(input logic signed [18:0] v);
    if (v < 0)        return 8'd0;
    else if (v > 255) return 8'd255;
    else              return v[7:0];
  endfunction

  always_comb begin
    r8  = 19'(in_data[3*PIX_W-1 -: 8]);
    g8  = 19'(in_data[2*PIX_W-1 -: 8]);
    b8  = 19'(in_data[PIX_W-1 -: 8]);
    ys  = (77 * r8 + 150 * g8 + 29 * b8 + 128) >>> 8;
    cbs = ((-43 * r8 - 85 * g8 + 128 * b8 + 128) >>> 8) + 128;
    crs = ((128 * r8 - 107 * g8 - 21 * b8 + 128) >>> 8) + 128;
    y   = clamp8(ys);
    cb  = clamp8(cbs);
    cr  = clamp8(crs);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0; out_sof <= 1'b0; out_eol <= 1'b0; out_data <= '0;
    end else begin
      if (out_ready) out_valid <= 1'b0;
      if (adv) begin
        out_valid <= 1'b1;
        out_sof   <= in_sof;
        out_eol   <= in_eol;
        out_data  <= {y, cb, cr};
      end
    end
  end
endmodule

// nuc: two-point non-uniformity correction for the infrared sensor.
//
// Each pixel is corrected with its own gain and offset:
//   out = clamp((pix * gain) >> 12 + offset, 0, 2^PIX_W - 1)
// with gain unsigned Q4.12 (4096 = 1.0) and offset a signed 16-bit value.
// The per-pixel coefficients are large tables kept outside the chip, so
// they arrive as a second stream (coef_valid/coef_ready, {gain, offset}) in
// the same raster order as the pixels, with coef_sof on the first pixel's
// pair. The two streams are joined and one result leaves one clock after a
// pixel and its coefficients meet. If they disagree on the start of frame
// the stream that is ahead waits: a pixel meeting a frame's first
// coefficients is dropped, coefficients meeting a frame's first pixel are
// dropped, so both realign at the next frame. NUC as
// the first step of the infrared chain follows the source; the formula,
// formats and coefficient stream are this design's.
module nuc #(
  parameter int unsigned PIX_W = sav_pkg::PIX_W
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic             in_sof,
  input  logic             in_eol,
  input  logic [PIX_W-1:0] in_data,
  input  logic             coef_valid,
  output logic             coef_ready,
  input  logic             coef_sof,
  input  logic [15:0]      coef_gain,
  input  logic signed [15:0] coef_offset,
  output logic             out_valid,
  input  logic             out_ready,
  output logic             out_sof,
  output logic             out_eol,
  output logic [PIX_W-1:0] out_data
);
  logic               room, adv, drop_pix, drop_coef;
  logic [PIX_W+15:0]  prod;
  logic signed [PIX_W+6:0] sum;   // product >> 12 has PIX_W+4 bits, plus sign and offset

  assign room       = !out_valid || out_ready;
  assign drop_pix   = in_valid && coef_valid && coef_sof && !in_sof;
  assign drop_coef  = in_valid && coef_valid && in_sof && !coef_sof;
  assign adv        = in_valid && coef_valid && room && (in_sof == coef_sof);
  assign in_ready   = coef_valid && (drop_pix || (room && !drop_coef));
  assign coef_ready = in_valid && (drop_coef || (room && !drop_pix));

  always_comb begin
    prod = in_data * coef_gain;
    sum  = $signed({3'b000, prod[PIX_W+15:12]}) + coef_offset;
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
        if (sum < 0)                              out_data <= '0;
        else if (sum > $signed((PIX_W+7)'({PIX_W{1'b1}}))) out_data <= '1;
        else                                      out_data <= sum[PIX_W-1:0];
      end
    end
  end
endmodule

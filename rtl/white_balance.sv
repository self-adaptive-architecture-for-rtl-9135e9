// white_balance: per-channel gain on a raw Bayer pixel stream.
//
// Each raw sample is multiplied by the gain of its color site and shifted
// right by 8 (gains are unsigned Q2.8, 256 = 1.0); results above full scale
// saturate. The Bayer order is RGGB: red at even column / even row, blue at
// odd column / odd row, green elsewhere; position comes from sof/eol. One
// register stage with valid/ready: a result leaves one clock after its
// pixel is accepted. White balance as the first step of the color chain
// follows the source; gains, format and Bayer order are this design's.
module white_balance #(
  parameter int unsigned PIX_W = sav_pkg::PIX_W
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [9:0]       gain_r,
  input  logic [9:0]       gain_g,
  input  logic [9:0]       gain_b,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic             in_sof,
  input  logic             in_eol,
  input  logic [PIX_W-1:0] in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic             out_sof,
  output logic             out_eol,
  output logic [PIX_W-1:0] out_data
);
  logic             xo, yo, cxo, cyo;   // parity of column / row
  logic             adv;
  logic [9:0]       g;
  logic [PIX_W+9:0] prod;
  logic [PIX_W+1:0] scaled;

  assign in_ready = !out_valid || out_ready;
  assign adv      = in_valid && in_ready;
  assign cxo      = in_sof ? 1'b0 : xo;
  assign cyo      = in_sof ? 1'b0 : yo;

  always_comb begin
    if (!cxo && !cyo)     g = gain_r;
    else if (cxo && cyo)  g = gain_b;
    else                  g = gain_g;
    prod   = in_data * g;
    scaled = prod[PIX_W+9:8];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      xo <= 1'b0; yo <= 1'b0;
      out_valid <= 1'b0; out_sof <= 1'b0; out_eol <= 1'b0; out_data <= '0;
    end else begin
      if (out_ready) out_valid <= 1'b0;
      if (adv) begin
        out_valid <= 1'b1;
        out_sof   <= in_sof;
        out_eol   <= in_eol;
        out_data  <= (scaled[PIX_W+1:PIX_W] != 0) ? '1 : scaled[PIX_W-1:0];
        xo <= in_eol ? 1'b0 : ~cxo;
        yo <= in_eol ? ~cyo : cyo;
      end
    end
  end
endmodule

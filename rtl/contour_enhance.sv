// contour_enhance: edge sharpening of the luma of a YCbCr stream.
//
// A 3x3 window (window3x3) of whole {Y, Cb, Cr} pixels is formed; the
// output luma is the centre sharpened by the Laplacian kernel
//   Y' = clamp(5*c - north - south - east - west, 0, 255)
// and Cb/Cr are the centre's, so all three stay aligned. One result per
// accepted pixel, registered with valid/ready, centred one pixel up and left
// of the input pixel. Contour enhancing in the static area follows the
// source; the kernel is this design's choice.
module contour_enhance #(
  parameter int unsigned MAX_W = 640
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic        in_sof,
  input  logic        in_eol,
  input  logic [23:0] in_data,
  output logic        out_valid,
  input  logic        out_ready,
  output logic        out_sof,
  output logic        out_eol,
  output logic [23:0] out_data
);
  logic               adv;
  logic [23:0]        w [3][3];
  logic signed [11:0] sharp;
  logic [7:0]         y;

  assign in_ready = !out_valid || out_ready;
  assign adv      = in_valid && in_ready;

  window3x3 #(.DW(24), .MAX_W(MAX_W)) u_win (
    .clk, .rst, .adv, .sof(in_sof), .eol(in_eol), .din(in_data),
    .win(w), .cx_odd(), .cy_odd()
  );

  always_comb begin
    sharp = 12'sd5 * $signed({4'b0, w[1][1][23:16]})
          - $signed({4'b0, w[0][1][23:16]}) - $signed({4'b0, w[2][1][23:16]})
          - $signed({4'b0, w[1][0][23:16]}) - $signed({4'b0, w[1][2][23:16]});
    if (sharp < 0)        y = 8'd0;
    else if (sharp > 255) y = 8'd255;
    else                  y = sharp[7:0];
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
        out_data  <= {y, w[1][1][15:0]};
      end
    end
  end
endmodule

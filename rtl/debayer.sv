// debayer: bilinear demosaicing of an RGGB raw stream into RGB.
//
// A 3x3 window (window3x3) around each site gives the two missing colors as
// the mean of the nearest samples of that color: the four edge neighbours
// for green at red/blue sites, the four diagonals for blue at red sites and
// red at blue sites, and the two horizontal or vertical neighbours at green
// sites. One result per accepted pixel, registered with valid/ready, centred
// one pixel up and left of the input pixel (see window3x3); out_data is
// {R, G, B}. Demosaicing as the second step of the color chain follows the
// source; bilinear interpolation and the RGGB order are this design's.
module debayer #(
  parameter int unsigned PIX_W = sav_pkg::PIX_W,
  parameter int unsigned MAX_W = 1280
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               in_valid,
  output logic               in_ready,
  input  logic               in_sof,
  input  logic               in_eol,
  input  logic [PIX_W-1:0]   in_data,
  output logic               out_valid,
  input  logic               out_ready,
  output logic               out_sof,
  output logic               out_eol,
  output logic [3*PIX_W-1:0] out_data
);
  logic             adv, cxo, cyo;
  logic [PIX_W-1:0] w [3][3];
  logic [PIX_W+1:0] cross4, diag4, horiz2, vert2;
  logic [PIX_W-1:0] c, cr, dg, hz, vt, r, g, b;

  assign in_ready = !out_valid || out_ready;
  assign adv      = in_valid && in_ready;

  window3x3 #(.DW(PIX_W), .MAX_W(MAX_W)) u_win (
    .clk, .rst, .adv, .sof(in_sof), .eol(in_eol), .din(in_data),
    .win(w), .cx_odd(cxo), .cy_odd(cyo)
  );

  always_comb begin
    cross4 = (PIX_W+2)'(w[0][1]) + (PIX_W+2)'(w[2][1]) + (PIX_W+2)'(w[1][0]) + (PIX_W+2)'(w[1][2]);
    diag4  = (PIX_W+2)'(w[0][0]) + (PIX_W+2)'(w[0][2]) + (PIX_W+2)'(w[2][0]) + (PIX_W+2)'(w[2][2]);
    horiz2 = (PIX_W+2)'(w[1][0]) + (PIX_W+2)'(w[1][2]);
    vert2  = (PIX_W+2)'(w[0][1]) + (PIX_W+2)'(w[2][1]);
    c  = w[1][1];
    cr = cross4[PIX_W+1:2];
    dg = diag4[PIX_W+1:2];
    hz = horiz2[PIX_W:1];
    vt = vert2[PIX_W:1];
    unique case ({cyo, cxo})
      2'b00: begin r = c;  g = cr; b = dg; end  // red site
      2'b01: begin r = hz; g = c;  b = vt; end  // green on red row
      2'b10: begin r = vt; g = c;  b = hz; end  // green on blue row
      default: begin r = dg; g = cr; b = c; end // blue site
    endcase
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
        out_data  <= {r, g, b};
      end
    end
  end
endmodule

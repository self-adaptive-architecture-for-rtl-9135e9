// median_filter: 3x3 median filter on a gray pixel stream.
//
// A 3x3 window (window3x3) is formed for every accepted pixel and the median
// of its nine samples is output. The median is found by ranking: each sample
// counts the samples smaller than it (ties broken by position), and the one
// with rank 4 is the median. One result per accepted pixel, registered with
// valid/ready, centred one pixel up and left of the input pixel. Median
// filtering as the second step of the infrared chain follows the source;
// the window size and ranking method are this design's.
module median_filter #(
  parameter int unsigned PIX_W = sav_pkg::PIX_W,
  parameter int unsigned MAX_W = 1280
) (
  input  logic             clk,
  input  logic             rst,
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
  logic             adv;
  logic [PIX_W-1:0] w [3][3];
  logic [PIX_W-1:0] v [9];
  logic [3:0]       rank [9];
  logic [PIX_W-1:0] med;

  assign in_ready = !out_valid || out_ready;
  assign adv      = in_valid && in_ready;

  window3x3 #(.DW(PIX_W), .MAX_W(MAX_W)) u_win (
    .clk, .rst, .adv, .sof(in_sof), .eol(in_eol), .din(in_data),
    .win(w), .cx_odd(), .cy_odd()
  );

  always_comb begin
    for (int i = 0; i < 9; i++) v[i] = w[i/3][i%3];
    med = v[0];
    for (int i = 0; i < 9; i++) begin
      rank[i] = '0;
      for (int j = 0; j < 9; j++)
        if (v[j] < v[i] || (v[j] == v[i] && j < i)) rank[i] = rank[i] + 4'd1;
    end
    for (int i = 0; i < 9; i++)
      if (rank[i] == 4'd4) med = v[i];
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
        out_data  <= med;
      end
    end
  end
endmodule

// visualization_if: drives the display from the output image memory.
//
// A raster timing generator on the display clock counts OUT_W + H_BLANK
// clocks per line and OUT_H + V_BLANK lines per frame. de is high in the
// active area; hsync is high for the first HS_LEN clocks of horizontal
// blanking and vsync for the first VS_LEN lines of vertical blanking. Each
// active clock takes one {Y, Cb, Cr} pixel from the buffer. The output is
// locked to the image: it starts taking pixels only when a start-of-frame
// pixel waits at the buffer head at the first active position, and
// discards pixels until then; a start of frame met elsewhere unlocks it.
// Unlocked or empty, it shows black ({0, 128, 128}); an empty buffer in the
// active area while locked sets the sticky `underflow`. All outputs are
// registered. The timing values are this design's choice; the source names
// the interface only.
module visualization_if #(
  parameter int unsigned OUT_W   = 640,
  parameter int unsigned OUT_H   = 480,
  parameter int unsigned H_BLANK = 160,
  parameter int unsigned V_BLANK = 45,
  parameter int unsigned HS_LEN  = 96,
  parameter int unsigned VS_LEN  = 2
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic        in_sof,
  input  logic [23:0] in_data,
  output logic        vis_de,
  output logic        vis_hsync,
  output logic        vis_vsync,
  output logic [23:0] vis_data,
  output logic        locked,
  output logic        underflow,
  output logic [15:0] frames_shown
);
  localparam int unsigned HT = OUT_W + H_BLANK;
  localparam int unsigned VT = OUT_H + V_BLANK;
  localparam logic [23:0] BLACK = {8'd0, 8'd128, 8'd128};

  logic [$clog2(HT)-1:0] h;
  logic [$clog2(VT)-1:0] v;
  logic active, first, take, show, discard, lock_now;

  assign active   = (32'(h) < OUT_W) && (32'(v) < OUT_H);
  assign first    = (h == 0) && (v == 0);
  assign lock_now = first && in_valid && in_sof;
  assign show     = active && in_valid && (lock_now || (locked && !first && !in_sof));
  assign discard  = !locked && !lock_now && in_valid && !in_sof;
  assign take     = show || discard;
  assign in_ready = take;

  always_ff @(posedge clk) begin
    if (rst) begin
      h <= '0; v <= '0;
      locked <= 1'b0; underflow <= 1'b0; frames_shown <= '0;
      vis_de <= 1'b0; vis_hsync <= 1'b0; vis_vsync <= 1'b0; vis_data <= BLACK;
    end else begin
      if (h == $bits(h)'(HT - 1)) begin
        h <= '0;
        v <= (v == $bits(v)'(VT - 1)) ? '0 : v + 1'b1;
      end else begin
        h <= h + 1'b1;
      end
      if (lock_now) locked <= 1'b1;
      else if (locked && active && (first || (in_valid && in_sof))) locked <= 1'b0;
      if (lock_now) frames_shown <= frames_shown + 16'd1;
      if (active && locked && !first && !in_valid) underflow <= 1'b1;

      vis_de    <= active;
      vis_hsync <= (32'(h) >= OUT_W) && (32'(h) < OUT_W + HS_LEN);
      vis_vsync <= (32'(v) >= OUT_H) && (32'(v) < OUT_H + VS_LEN);
      vis_data  <= show ? in_data : BLACK;
    end
  end
endmodule

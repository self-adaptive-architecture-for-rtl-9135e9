// zoom_resize: digital zoom and frame size readjusting.
//
// The input frame (in_w x in_h, given by the adaptation controller) is
// cropped around its centre to in_w >> zoom_sh by in_h >> zoom_sh (zoom
// 1x, 2x or 4x) and the crop is resampled by nearest neighbour to the
// display size OUT_W x OUT_H, so every sensor leaves at the same size.
// Each input line is first written into a line buffer. Then every output
// line whose source line is this one is sent out from the buffer: none when
// shrinking skips the line, several when enlarging repeats it. Input is
// stalled (in_ready low) while lines are sent. Source positions advance by
// 16.16 fixed-point steps crop/out, computed once per frame at sof, where
// crop and steps are latched. A sof arriving early restarts the frame.
// Zoom and resizing in the static area follow the source; crop, zoom steps
// and resampling method are this design's choices.
module zoom_resize #(
  parameter int unsigned OUT_W = 640,
  parameter int unsigned OUT_H = 480,
  parameter int unsigned MAX_W = 1280,
  parameter int unsigned DW    = 24
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [sav_pkg::RES_W-1:0] in_w,
  input  logic [sav_pkg::RES_W-1:0] in_h,
  input  logic [1:0]               zoom_sh,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic                     in_sof,
  input  logic                     in_eol,
  input  logic [DW-1:0]            in_data,
  output logic                     out_valid,
  input  logic                     out_ready,
  output logic                     out_sof,
  output logic                     out_eol,
  output logic [DW-1:0]            out_data
);
  localparam int unsigned RW = sav_pkg::RES_W;

  logic [DW-1:0] lbuf [MAX_W];
  logic          emitting;
  logic [RW-1:0] ix, iy, ox, oy;
  logic [31:0]   acc_x, acc_y;            // 16.16 source offsets within crop
  logic [31:0]   step_x, step_y;
  logic [RW-1:0] xoff, yoff;
  logic [RW-1:0] crop_w, crop_h;
  logic [31:0]   n_step_x, n_step_y;
  logic [RW-1:0] n_xoff, n_yoff;
  logic [RW-1:0] src_x, src_y, cur_ix, cur_iy;
  logic          adv, frame_full;

  // per-frame geometry from the current resolution and zoom
  always_comb begin
    crop_w   = in_w >> zoom_sh;
    crop_h   = in_h >> zoom_sh;
    n_xoff   = (in_w - crop_w) >> 1;
    n_yoff   = (in_h - crop_h) >> 1;
    n_step_x = ({16'd0, 5'd0, crop_w} << 16) / 32'(OUT_W);
    n_step_y = ({16'd0, 5'd0, crop_h} << 16) / 32'(OUT_H);
  end

  assign in_ready   = !emitting;
  assign adv        = in_valid && in_ready;
  assign cur_ix     = in_sof ? '0 : ix;
  assign cur_iy     = in_sof ? '0 : iy;
  assign src_x      = xoff + RW'(acc_x >> 16);
  assign src_y      = yoff + RW'(acc_y >> 16);
  assign frame_full = (oy == RW'(OUT_H));

  always_ff @(posedge clk) begin
    if (adv && cur_ix < RW'(MAX_W)) lbuf[cur_ix] <= in_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      emitting <= 1'b0;
      ix <= '0; iy <= '0; ox <= '0; oy <= RW'(OUT_H);
      acc_x <= '0; acc_y <= '0;
      step_x <= '0; step_y <= '0; xoff <= '0; yoff <= '0;
      out_valid <= 1'b0; out_sof <= 1'b0; out_eol <= 1'b0; out_data <= '0;
    end else begin
      if (out_ready) out_valid <= 1'b0;
      if (adv) begin
        if (in_sof) begin
          step_x <= n_step_x; step_y <= n_step_y;
          xoff   <= n_xoff;   yoff   <= n_yoff;
          oy     <= '0;
          acc_y  <= '0;
        end
        iy <= cur_iy;
        if (in_eol) begin
          ix <= '0;
          // decide whether this line is a source line of the next output line
          emitting <= 1'b1;
          acc_x    <= '0;
          ox       <= '0;
        end else begin
          ix <= cur_ix + RW'(1);
        end
      end else if (emitting && !(out_valid && !out_ready)) begin
        if (frame_full || src_y != iy) begin
          // no (more) output lines from this input line
          emitting <= 1'b0;
          iy       <= iy + RW'(1);
        end else begin
          out_valid <= 1'b1;
          out_data  <= lbuf[src_x];
          out_sof   <= (ox == '0) && (oy == '0);
          out_eol   <= (ox == RW'(OUT_W - 1));
          if (ox == RW'(OUT_W - 1)) begin
            ox    <= '0;
            acc_x <= '0;
            oy    <= oy + RW'(1);
            acc_y <= acc_y + step_y;
          end else begin
            ox    <= ox + RW'(1);
            acc_x <= acc_x + step_x;
          end
        end
      end
    end
  end
endmodule

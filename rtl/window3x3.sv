// window3x3: 3x3 neighbourhood generator for raster pixel streams.
//
// Two line buffers hold the previous two lines; two column registers hold
// the previous two columns. For each accepted pixel (adv) at (x,y) the
// window covers rows y-2..y and columns x-2..x, so its centre is (x-1,y-1):
// a filter built on it emits one result per input pixel with no flush at
// the end of a frame, at the cost of a one-pixel shift right and down.
// Rows and columns that fall outside the frame are replaced by the nearest
// existing one. sof restarts the coordinates, eol ends a line. The window
// is combinational from the current input and the stored state; cx_odd and
// cy_odd give the parity of the centre position. win[r][c]: r=0 top row,
// c=0 left column. This helper is this design's own.
module window3x3 #(
  parameter int unsigned DW    = 12,
  parameter int unsigned MAX_W = 1280
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          adv,
  input  logic          sof,
  input  logic          eol,
  input  logic [DW-1:0] din,
  output logic [DW-1:0] win [3][3],
  output logic          cx_odd,
  output logic          cy_odd
);
  localparam int unsigned XW = $clog2(MAX_W + 1);

  logic [DW-1:0] lb0 [MAX_W];   // line y-1
  logic [DW-1:0] lb1 [MAX_W];   // line y-2
  logic [DW-1:0] creg [3][2];   // previous two columns
  logic [XW-1:0] x, cur_x;
  logic [15:0]   y, cur_y;
  logic [DW-1:0] col [3];

  assign cur_x = sof ? '0 : x;
  assign cur_y = sof ? '0 : y;

  always_comb begin
    col[2] = din;
    col[1] = (cur_y == 0) ? din : lb0[cur_x];
    col[0] = (cur_y == 0) ? din : (cur_y == 1) ? lb0[cur_x] : lb1[cur_x];
    for (int r = 0; r < 3; r++) begin
      win[r][2] = col[r];
      win[r][1] = (cur_x == 0) ? col[r] : creg[r][1];
      win[r][0] = (cur_x == 0) ? col[r] : (cur_x == 1) ? creg[r][1] : creg[r][0];
    end
  end

  assign cx_odd = (cur_x != 0) && !cur_x[0];
  assign cy_odd = (cur_y != 0) && !cur_y[0];

  always_ff @(posedge clk) begin
    if (rst) begin
      x <= '0;
      y <= '0;
    end else if (adv) begin
      if (eol) begin
        x <= '0;
        y <= cur_y + 16'd1;
      end else begin
        x <= cur_x + XW'(1);
        y <= cur_y;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (adv) begin
      if (cur_x < XW'(MAX_W)) begin
        lb0[cur_x] <= din;
        lb1[cur_x] <= lb0[cur_x];
      end
      for (int r = 0; r < 3; r++) begin
        creg[r][0] <= win[r][1];
        creg[r][1] <= win[r][2];
      end
    end
  end
endmodule

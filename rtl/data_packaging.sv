// data_packaging: gathers sensor pixels into 32-bit link words.
//
// The sensor readout arrives as frame valid / line valid / pixel, one pixel
// per clock while both valids are high. Two consecutive pixels of a line are
// packed into one word, the first in bits [15:0] and the second in [31:16],
// each zero-extended. A line with an odd pixel count ends with a word whose
// upper half is zero. A one-cycle out_fsync marks the rising edge of frame
// valid, announcing the start of a frame. Output words come out one clock
// after the pixel that completes them, so the link carries at most one word
// every two clocks; the header encoder relies on those free slots.
// The packing format and fsync timing are this design's choices; the source
// only states that frame data are gathered into packets.
module data_packaging #(
  parameter int unsigned PIX_W = sav_pkg::PIX_W
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              fval,
  input  logic              lval,
  input  logic [PIX_W-1:0]  pix,
  output logic              out_fsync,
  output logic              out_valid,
  output logic [31:0]       out_data
);
  logic             fval_q, lval_q;
  logic             half;          // one pixel waiting in low half
  logic             half_eff;      // half, ignoring leftovers of the previous frame
  logic [15:0]      low_pix;

  assign half_eff = half && !(fval && !fval_q);

  always_ff @(posedge clk) begin
    if (rst) begin
      fval_q    <= 1'b0;
      lval_q    <= 1'b0;
      half      <= 1'b0;
      low_pix   <= '0;
      out_fsync <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      fval_q    <= fval;
      lval_q    <= lval & fval;
      out_fsync <= fval & ~fval_q;
      out_valid <= 1'b0;
      if (fval && lval) begin
        if (half_eff) begin
          out_valid <= 1'b1;
          out_data  <= {16'(pix), low_pix};
          half      <= 1'b0;
        end else begin
          low_pix   <= 16'(pix);
          half      <= 1'b1;
        end
      end else if (lval_q && half_eff) begin
        // line ended on an odd pixel: flush the half word
        out_valid <= 1'b1;
        out_data  <= {16'd0, low_pix};
        half      <= 1'b0;
      end
      else if (fval && !fval_q) half <= 1'b0;
    end
  end
endmodule

// header_decoder: splits the sensor link into stream header and pixels.
//
// The first data word after each frame sync is the stream header. Its
// fields go to the system monitor as `hdr` with a one-cycle `hdr_valid`;
// the path is three registers long (input register, header capture, output
// register), so hdr_valid rises three clocks after the header word is on the
// input, i.e. 30 ns at 100 MHz. The header is not passed on: only the image
// data go to the processing area. Pixel words (two pixels each, first in
// [15:0]) go through a 4-word FIFO and are unpacked into a raster stream of
// one pixel per clock with sof on the first pixel and eol on the last pixel
// of each line; line length and line count come from the header. Words past
// the last line are dropped. The stream has no ready: the link cannot stall,
// and it delivers at most two pixels every two clocks.
// Header extraction and stripping follow the source; the three-register
// latency is chosen to match the header decoding time reported for it; the
// packing and markers are this design's own.
module header_decoder
  import sav_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  input  logic                link_fsync,
  input  logic                link_valid,
  input  logic [LINK_W-1:0]   link_data,
  output logic                hdr_valid,
  output stream_header_t      hdr,
  output logic                pix_valid,
  output logic                pix_sof,
  output logic                pix_eol,
  output logic [PIX_W-1:0]    pix_data
);
  // stage 0: input register
  logic              s0_fsync, s0_valid;
  logic [LINK_W-1:0] s0_data;
  // stage 1: header capture
  logic              expect_hdr, in_frame, hdr_cap;
  stream_header_t    hdr_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      s0_fsync <= 1'b0; s0_valid <= 1'b0; s0_data <= '0;
      expect_hdr <= 1'b0; in_frame <= 1'b0; hdr_cap <= 1'b0; hdr_q <= '0;
      hdr_valid <= 1'b0; hdr <= '0;
    end else begin
      s0_fsync <= link_fsync;
      s0_valid <= link_valid;
      s0_data  <= link_data;
      hdr_cap  <= 1'b0;
      if (s0_fsync) begin
        expect_hdr <= 1'b1;
        in_frame   <= 1'b0;
      end else if (s0_valid && expect_hdr) begin
        hdr_q      <= stream_header_t'(s0_data);
        hdr_cap    <= 1'b1;
        expect_hdr <= 1'b0;
        in_frame   <= 1'b1;
      end
      hdr_valid <= hdr_cap;
      if (hdr_cap) hdr <= hdr_q;
    end
  end

  // pixel words into a small FIFO
  logic [LINK_W-1:0] wf_mem [4];
  logic [2:0]        wf_wr, wf_rd;
  logic              wf_empty, wf_full, wf_push, wf_pop;
  assign wf_empty = (wf_wr == wf_rd);
  assign wf_full  = (wf_wr[1:0] == wf_rd[1:0]) && (wf_wr[2] != wf_rd[2]);
  assign wf_push  = s0_valid && !s0_fsync && !expect_hdr && in_frame && !wf_full;

  // unpacker
  logic [RES_W-1:0] x, y;
  logic             hi_half;     // next pixel comes from bits [31:16]
  logic             frame_done;
  logic             last_in_word;
  logic [RES_W-1:0] w_m1;

  assign w_m1         = hdr_q.width - RES_W'(1);
  assign last_in_word = hi_half || (x == w_m1);
  assign wf_pop       = !wf_empty && !frame_done && last_in_word;

  always_ff @(posedge clk) begin
    if (rst) begin
      wf_wr <= '0; wf_rd <= '0;
      x <= '0; y <= '0; hi_half <= 1'b0; frame_done <= 1'b1;
      pix_valid <= 1'b0; pix_sof <= 1'b0; pix_eol <= 1'b0; pix_data <= '0;
    end else begin
      pix_valid <= 1'b0;
      if (s0_fsync) begin
        wf_wr <= '0; wf_rd <= '0;
        x <= '0; y <= '0; hi_half <= 1'b0; frame_done <= 1'b1;
      end else begin
        if (hdr_cap) frame_done <= 1'b0;
        if (wf_push) begin
          wf_mem[wf_wr[1:0]] <= s0_data;
          wf_wr <= wf_wr + 3'd1;
        end
        if (!wf_empty && !frame_done) begin
          pix_valid <= 1'b1;
          pix_sof   <= (x == '0) && (y == '0);
          pix_eol   <= (x == w_m1);
          pix_data  <= hi_half ? wf_mem[wf_rd[1:0]][16 +: PIX_W]
                               : wf_mem[wf_rd[1:0]][0 +: PIX_W];
          if (wf_pop) wf_rd <= wf_rd + 3'd1;
          if (x == w_m1) begin
            x       <= '0;
            hi_half <= 1'b0;
            if (y == hdr_q.height - RES_W'(1)) frame_done <= 1'b1;
            y <= y + RES_W'(1);
          end else begin
            x       <= x + RES_W'(1);
            hi_half <= ~hi_half;
          end
        end
      end
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (rst)
    (s0_valid && !s0_fsync && !expect_hdr && in_frame) |-> !wf_full)
    else $error("header_decoder: word FIFO overflow");
endmodule

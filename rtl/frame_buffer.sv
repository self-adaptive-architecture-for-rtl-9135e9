// frame_buffer: image memory between two pixel clock domains.
//
// A dual-clock FIFO of DEPTH words of DW bits (DEPTH a power of two).
// Write and read pointers are kept in binary and Gray code; each Gray
// pointer crosses to the other clock through two flip-flops, so full and
// empty are exact or pessimistic, never optimistic. The write side cannot
// be stalled by a sensor, so a word written while full is dropped and the
// sticky `overflow` flag is raised. The read side is first-word-fall-through:
// rd_valid shows a word on rd_data; rd_ready takes it. Separating the
// pixel clocks of the sensor, processing and display sides follows the
// source; the source places whole frames in external memory, whereas this
// buffer is on chip and holds DEPTH words.
module frame_buffer #(
  parameter int unsigned DW    = 14,
  parameter int unsigned DEPTH = 4096
) (
  input  logic          wr_clk,
  input  logic          wr_rst,
  input  logic          wr_en,
  input  logic [DW-1:0] wr_data,
  output logic          wr_full,
  output logic          overflow,
  input  logic          rd_clk,
  input  logic          rd_rst,
  output logic          rd_valid,
  input  logic          rd_ready,
  output logic [DW-1:0] rd_data
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [DW-1:0] mem [DEPTH];
  logic [AW:0]   wbin, wgray, rbin, rgray;
  logic [AW:0]   rgray_w1, rgray_w2, wgray_r1, wgray_r2;
  logic [AW:0]   wbin_n, rbin_n;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // write side
  assign wr_full = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
  assign wbin_n  = wbin + (AW+1)'(1);

  always_ff @(posedge wr_clk) begin
    if (wr_en && !wr_full) mem[wbin[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge wr_clk) begin
    if (wr_rst) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0; overflow <= 1'b0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (wr_en) begin
        if (wr_full) overflow <= 1'b1;
        else begin
          wbin  <= wbin_n;
          wgray <= bin2gray(wbin_n);
        end
      end
    end
  end

  // read side
  assign rd_valid = (rgray != wgray_r2);
  assign rd_data  = mem[rbin[AW-1:0]];
  assign rbin_n   = rbin + (AW+1)'(1);

  always_ff @(posedge rd_clk) begin
    if (rd_rst) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (rd_valid && rd_ready) begin
        rbin  <= rbin_n;
        rgray <= bin2gray(rbin_n);
      end
    end
  end
endmodule

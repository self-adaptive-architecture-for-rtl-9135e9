// contrast_enhance: linear contrast stretch of the luma of a YCbCr stream.
//
// While a frame passes, the smallest and largest luma are tracked. At the
// next start of frame they become the mapping for that frame:
//   Y' = clamp(((Y - lo) * gain) >> 8, 0, 255),  gain = (255 << 8) / (hi - lo)
// so the previous frame's luma range is spread over 0..255. The division
// happens once per frame. The first frame after reset, and any frame whose
// predecessor was flat, pass unchanged. Cb/Cr pass unchanged. One register
// stage with valid/ready. Contrast enhancing as the last step of the static
// area follows the source; the stretch method is this design's choice.
module contrast_enhance (
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
  logic        adv;
  logic [7:0]  run_lo, run_hi;       // statistics of the frame in progress
  logic        run_any;
  logic [7:0]  map_lo;               // mapping of the current frame
  logic [15:0] map_gain;
  logic        map_on;
  logic [7:0]  eff_lo, yin, yout;
  logic [15:0] eff_gain, new_gain;
  logic        eff_on;
  logic [24:0] prod;

  assign in_ready = !out_valid || out_ready;
  assign adv      = in_valid && in_ready;
  assign yin      = in_data[23:16];

  always_comb begin
    new_gain = (run_hi > run_lo) ? 16'((32'd255 << 8) / 32'(run_hi - run_lo)) : 16'd0;
    if (in_sof) begin
      eff_on   = run_any && (run_hi > run_lo);
      eff_lo   = run_lo;
      eff_gain = new_gain;
    end else begin
      eff_on   = map_on;
      eff_lo   = map_lo;
      eff_gain = map_gain;
    end
    prod = (yin > eff_lo) ? 25'(yin - eff_lo) * eff_gain : 25'd0;
    if (!eff_on)                 yout = yin;
    else if (prod[24:8] > 17'd255) yout = 8'd255;
    else                         yout = prod[15:8];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      run_lo <= 8'hFF; run_hi <= 8'h00; run_any <= 1'b0;
      map_lo <= '0; map_gain <= '0; map_on <= 1'b0;
      out_valid <= 1'b0; out_sof <= 1'b0; out_eol <= 1'b0; out_data <= '0;
    end else begin
      if (out_ready) out_valid <= 1'b0;
      if (adv) begin
        if (in_sof) begin
          map_on   <= eff_on;
          map_lo   <= eff_lo;
          map_gain <= eff_gain;
          run_lo   <= yin;
          run_hi   <= yin;
          run_any  <= 1'b1;
        end else begin
          if (yin < run_lo) run_lo <= yin;
          if (yin > run_hi) run_hi <= yin;
        end
        out_valid <= 1'b1;
        out_sof   <= in_sof;
        out_eol   <= in_eol;
        out_data  <= {yout, in_data[15:0]};
      end
    end
  end
endmodule

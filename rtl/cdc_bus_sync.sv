// cdc_bus_sync: carries an occasional bus update from one clock to another.
//
// On src_valid the source side captures src_data and flips a toggle bit.
// The destination synchronises the toggle through two flip-flops, and on
// each change issues a one-cycle dst_valid with the captured word, which has
// been stable since the toggle flipped. Updates must be at least about four
// destination clocks apart; stream headers come once per frame. Used to
// bring header data from the sensor clock to the system clock. This helper
// is this design's own.
module cdc_bus_sync #(
  parameter int unsigned W = 32
) (
  input  logic         src_clk,
  input  logic         src_rst,
  input  logic         src_valid,
  input  logic [W-1:0] src_data,
  input  logic         dst_clk,
  input  logic         dst_rst,
  output logic         dst_valid,
  output logic [W-1:0] dst_data
);
  logic         src_tog;
  logic [W-1:0] src_hold;
  logic [2:0]   dst_sync;

  always_ff @(posedge src_clk) begin
    if (src_rst) begin
      src_tog  <= 1'b0;
      src_hold <= '0;
    end else if (src_valid) begin
      src_tog  <= ~src_tog;
      src_hold <= src_data;
    end
  end

  always_ff @(posedge dst_clk) begin
    if (dst_rst) begin
      dst_sync  <= '0;
      dst_valid <= 1'b0;
      dst_data  <= '0;
    end else begin
      dst_sync  <= {dst_sync[1:0], src_tog};
      dst_valid <= dst_sync[2] ^ dst_sync[1];
      if (dst_sync[2] ^ dst_sync[1]) dst_data <= src_hold;
    end
  end
endmodule

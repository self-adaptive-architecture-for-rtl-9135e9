// sensor_selector: manual switch between two sensor frame grabbers.
//
// Two sensor links (fsync, valid, 32-bit data) come in on the same clock;
// one goes out. The manual switch is synchronised by two flip-flops. When
// it asks for the other source, the selector waits for that source's next
// frame sync and changes over on it, so the output always begins a frame
// with its sync and header; the rest of the old source's frame is cut off.
// Output is registered: one clock of latency. The manual selection follows
// the source's prototype set-up; changing over on a frame sync is this
// design's choice.
module sensor_selector (
  input  logic        clk,
  input  logic        rst,
  input  logic        sel_switch,
  input  logic        a_fsync,
  input  logic        a_valid,
  input  logic [31:0] a_data,
  input  logic        b_fsync,
  input  logic        b_valid,
  input  logic [31:0] b_data,
  output logic        out_fsync,
  output logic        out_valid,
  output logic [31:0] out_data,
  output logic        sel
);
  logic [1:0] sw_sync;
  logic       sel_n;

  always_comb begin
    sel_n = sel;
    if (sw_sync[1] != sel && (sw_sync[1] ? b_fsync : a_fsync)) sel_n = sw_sync[1];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      sw_sync   <= '0;
      sel       <= 1'b0;
      out_fsync <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      sw_sync   <= {sw_sync[0], sel_switch};
      sel       <= sel_n;
      out_fsync <= sel_n ? b_fsync : a_fsync;
      out_valid <= sel_n ? b_valid : a_valid;
      out_data  <= sel_n ? b_data  : a_data;
    end
  end
endmodule

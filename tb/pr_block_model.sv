// pr_block_model: behavioural model of the FPGA's partial reconfiguration
// control block (a vendor hard block; simulation model only).
// After prb_start it takes bitstream words with a random ready. Word 0
// must be {16'hB17E, type, 8'h00}; it selects the expected length
// (LEN_COLOR for type 0, LEN_IR for type 2) and each later word must be
// {type, 24'(index)} ^ 32'h5A5A_0000. DONE_DELAY clocks after the last
// word it pulses prb_done, or prb_error if any word was wrong or
// fail_next was high at start. `loaded` counts successful loads and
// `words` the words of the last load.
module pr_block_model #(
  parameter int unsigned LEN_COLOR  = 16,
  parameter int unsigned LEN_IR     = 12,
  parameter int unsigned DONE_DELAY = 20
) (
  input  logic        clk,
  input  logic        prb_start,
  input  logic        prb_valid,
  input  logic [31:0] prb_data,
  output logic        prb_ready,
  output logic        prb_done,
  output logic        prb_error,
  input  logic        fail_next,
  output int          loaded,
  output int          words
);
  logic [7:0]  t;
  int unsigned len;
  bit          bad, busy;

  initial begin
    prb_ready = 0; prb_done = 0; prb_error = 0; loaded = 0; words = 0; busy = 0;
    forever begin
      @(posedge clk);
      #1;
      prb_done = 0; prb_error = 0;
      if (prb_start) begin
        bad = fail_next; words = 0; len = 1; busy = 1;
        while (words < len) begin
          prb_ready = ($urandom % 3) != 0;
          @(posedge clk);
          if (prb_valid && prb_ready) begin
            if (words == 0) begin
              t = prb_data[15:8];
              if (prb_data[31:16] != 16'hB17E) bad = 1;
              len = (t == 8'd2) ? LEN_IR : LEN_COLOR;
            end else if (prb_data != ({t, 24'(words)} ^ 32'h5A5A_0000)) bad = 1;
            words++;
          end
          #1;
        end
        prb_ready = 0;
        repeat (DONE_DELAY) @(posedge clk);
        #1;
        if (bad) prb_error = 1;
        else begin prb_done = 1; loaded++; end
        busy = 0;
      end
    end
  end
endmodule

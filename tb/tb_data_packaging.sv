// tb_data_packaging: self-checking test of data_packaging.
// Drives two sensor frames of 5x3 pixels (odd line length) with blanking
// between lines and frames. Checks one fsync per frame at the rising edge
// of frame valid, three words per line (two pixels, two pixels, one pixel
// plus zero), and the content of every word.
module tb_data_packaging;
  localparam int W = 5, H = 3;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        fval, lval, out_fsync, out_valid;
  logic [11:0] pix;
  logic [31:0] out_data;
  logic [31:0] exp_q [$];
  int          fsyncs = 0;

  data_packaging dut (.clk, .rst, .fval, .lval, .pix, .out_fsync, .out_valid, .out_data);

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  always @(posedge clk) if (!rst) begin
    if (out_fsync) fsyncs++;
    if (out_valid) begin
      if (exp_q.size() == 0) chk(0, "unexpected word");
      else begin
        automatic logic [31:0] e = exp_q.pop_front();
        chk(out_data === e, $sformatf("word %h expected %h", out_data, e));
      end
    end
  end

  initial begin
    logic [11:0] p [W];
    fval = 0; lval = 0; pix = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int f = 0; f < 2; f++) begin
      @(negedge clk) fval = 1;
      repeat (2) @(negedge clk);
      for (int y = 0; y < H; y++) begin
        for (int x = 0; x < W; x++) p[x] = 12'($urandom);
        exp_q.push_back({4'd0, p[1], 4'd0, p[0]});
        exp_q.push_back({4'd0, p[3], 4'd0, p[2]});
        exp_q.push_back({20'd0, p[4]});
        for (int x = 0; x < W; x++) begin
          lval = 1; pix = p[x];
          @(negedge clk);
        end
        lval = 0; pix = 'x;
        repeat (3) @(negedge clk);
      end
      fval = 0;
      repeat (4) @(negedge clk);
      chk(fsyncs == f + 1, "one fsync per frame");
    end
    repeat (4) @(posedge clk);
    chk(exp_q.size() == 0, "all words seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_frame_buffer: self-checking test of frame_buffer.
// Write clock 7 ns, read clock 10 ns, depth 16. Phase 1: 300 random words
// with random write and read activity; every word read must be the next
// word written, none lost or repeated. Phase 2: with reads stopped, writes
// continue until full; full must rise after 16 words, a further write must
// set overflow and be dropped, and reading must then return exactly the 16
// stored words.
module tb_frame_buffer;
  localparam int DEPTH = 16;
  logic wclk = 0, rclk = 0, rst = 1;
  always #3.5 wclk = ~wclk;
  always #5 rclk = ~rclk;
  int checks = 0, failures = 0;

  logic        wr_en, wr_full, overflow, rd_valid, rd_ready;
  logic [13:0] wr_data, rd_data;
  logic [13:0] q [$];
  bit          reading;

  frame_buffer #(.DW(14), .DEPTH(DEPTH)) dut (
    .wr_clk(wclk), .wr_rst(rst), .wr_en, .wr_data, .wr_full, .overflow,
    .rd_clk(rclk), .rd_rst(rst), .rd_valid, .rd_ready, .rd_data);

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  always @(posedge rclk) begin
    rd_ready <= reading && ($urandom % 2);
    if (!rst && rd_valid && rd_ready) begin
      if (q.size() == 0) chk(0, "read from empty");
      else begin
        automatic logic [13:0] e = q.pop_front();
        chk(rd_data === e, $sformatf("read %h expected %h", rd_data, e));
      end
    end
  end

  initial begin
    wr_en = 0; wr_data = 0; reading = 1; rd_ready = 0;
    repeat (4) @(posedge wclk);
    rst = 0;
    for (int k = 0; k < 300; k++) begin
      @(negedge wclk);
      wr_en = 0;
      if (!wr_full && ($urandom % 3) != 0) begin
        wr_en = 1; wr_data = 14'($urandom); q.push_back(wr_data);
      end
    end
    @(negedge wclk) wr_en = 0;
    wait (q.size() == 0);
    reading = 0;
    repeat (10) @(negedge wclk);
    for (int k = 0; k < DEPTH; k++) begin
      chk(!wr_full, "not full before DEPTH words");
      wr_en = 1; wr_data = 14'(1000 + k); q.push_back(wr_data);
      @(negedge wclk);
    end
    wr_en = 0;
    @(negedge wclk);
    chk(wr_full && !overflow, "full after DEPTH words");
    wr_en = 1; wr_data = 14'h3FFF;
    @(negedge wclk) wr_en = 0;
    chk(overflow, "write while full sets overflow");
    reading = 1;
    wait (q.size() == 0);
    repeat (10) @(posedge rclk);
    chk(!rd_valid, "dropped word never appears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge rclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

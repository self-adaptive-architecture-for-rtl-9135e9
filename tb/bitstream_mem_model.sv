// bitstream_mem_model: behavioural model of the external memory that holds
// the partial bitstreams (not synthesizable logic, a simulation model).
// Answers the pr_manager read port: grants a request after 0-2 clocks and
// returns the word 1-3 clocks later. Contents are generated, not stored:
// word 0 of a bitstream is {16'hB17E, 8'(type), 8'h00}; word i > 0 is
// {8'(type), 24'(i)} ^ 32'h5A5A_0000, where type is 0 for addresses from
// BASE_COLOR and 2 for addresses from BASE_IR.
module bitstream_mem_model #(
  parameter logic [31:0] BASE_COLOR = 32'h0000_0000,
  parameter logic [31:0] BASE_IR    = 32'h0100_0000
) (
  input  logic        clk,
  input  logic        bs_req,
  input  logic [31:0] bs_addr,
  output logic        bs_gnt,
  output logic        bs_rvalid,
  output logic [31:0] bs_rdata
);
  function automatic logic [31:0] word_at(logic [31:0] a);
    logic [7:0]  t = (a >= BASE_IR) ? 8'd2 : 8'd0;
    logic [31:0] i = (a >= BASE_IR) ? a - BASE_IR : a - BASE_COLOR;
    if (i == 0) return {16'hB17E, t, 8'h00};
    return {t, i[23:0]} ^ 32'h5A5A_0000;
  endfunction

  logic [31:0] a;

  initial begin
    bs_gnt = 0; bs_rvalid = 0; bs_rdata = 0;
    forever begin
      @(posedge clk);
      #1;
      bs_gnt = 0; bs_rvalid = 0;
      if (bs_req) begin
        a = bs_addr;
        repeat ($urandom % 3) @(posedge clk);
        #1 bs_gnt = 1;
        @(posedge clk);
        #1 bs_gnt = 0;
        repeat ($urandom % 3) @(posedge clk);
        #1 bs_rvalid = 1; bs_rdata = word_at(a);
      end
    end
  end
endmodule

// pr_manager: runs one partial reconfiguration of the processing area.
//
// A pr_req pulse with a sensor type starts a reconfiguration. The manager
// looks up where that type's partial bitstream lies in memory (base word
// address and length in 32-bit words, parameters), freezes the
// reconfigurable area, pulses prb_start to the FPGA's PR control block and
// then copies the bitstream: it issues one memory read at a time (bs_req
// until bs_gnt), takes the word on bs_rvalid and offers it to the PR block
// (prb_valid until prb_ready). After the last word it waits for prb_done or
// prb_error. Success pulses pr_done and load (with load_type) so that the
// area switches to the new persona; failure, an error at any point, or a
// type without a bitstream pulses pr_fail. Freeze is held from the request
// to the result. The manager's role follows the source; the memory and PR
// block handshakes are this design's own, as the source does not describe
// them. Default lengths are the reported bitstream sizes (5.8 MB and
// 5.7 MB, MB taken as 2^20 bytes) in words.
module pr_manager
  import sav_pkg::*;
#(
  parameter logic [31:0] BS_BASE_COLOR = 32'h0000_0000,
  parameter int unsigned BS_LEN_COLOR  = 1520435,
  parameter logic [31:0] BS_BASE_IR    = 32'h0100_0000,
  parameter int unsigned BS_LEN_IR     = 1494221
) (
  input  logic          clk,
  input  logic          rst,
  // from the adaptation controller
  input  logic          pr_req,
  input  sensor_type_e  pr_type,
  output logic          pr_done,
  output logic          pr_fail,
  // to the reconfigurable area
  output logic          freeze,
  output logic          load,
  output sensor_type_e  load_type,
  // bitstream memory read port
  output logic          bs_req,
  output logic [31:0]   bs_addr,
  input  logic          bs_gnt,
  input  logic          bs_rvalid,
  input  logic [31:0]   bs_rdata,
  // FPGA PR control block
  output logic          prb_start,
  output logic          prb_valid,
  output logic [31:0]   prb_data,
  input  logic          prb_ready,
  input  logic          prb_done,
  input  logic          prb_error
);
  typedef enum logic [2:0] {S_IDLE, S_READ, S_WAIT_R, S_SEND, S_WAIT_DONE} state_e;
  state_e       state;
  logic [31:0]  remaining;

  assign bs_req    = (state == S_READ);
  assign prb_valid = (state == S_SEND);

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      remaining <= '0;
      bs_addr   <= '0;
      prb_data  <= '0;
      freeze    <= 1'b0;
      load      <= 1'b0;
      load_type <= SENSOR_COLOR;
      pr_done   <= 1'b0;
      pr_fail   <= 1'b0;
      prb_start <= 1'b0;
    end else begin
      pr_done   <= 1'b0;
      pr_fail   <= 1'b0;
      load      <= 1'b0;
      prb_start <= 1'b0;
      if (state != S_IDLE && prb_error) begin
        state   <= S_IDLE;
        freeze  <= 1'b0;
        pr_fail <= 1'b1;
      end else begin
        unique case (state)
          S_IDLE: if (pr_req) begin
            load_type <= pr_type;
            if (pr_type == SENSOR_COLOR || pr_type == SENSOR_INFRARED) begin
              bs_addr   <= (pr_type == SENSOR_COLOR) ? BS_BASE_COLOR : BS_BASE_IR;
              remaining <= (pr_type == SENSOR_COLOR) ? BS_LEN_COLOR : BS_LEN_IR;
              freeze    <= 1'b1;
              prb_start <= 1'b1;
              state     <= S_READ;
            end else begin
              pr_fail <= 1'b1;
            end
          end
          S_READ:   if (bs_gnt) state <= S_WAIT_R;
          S_WAIT_R: if (bs_rvalid) begin
            prb_data <= bs_rdata;
            state    <= S_SEND;
          end
          S_SEND: if (prb_ready) begin
            bs_addr   <= bs_addr + 32'd1;
            remaining <= remaining - 32'd1;
            state     <= (remaining == 32'd1) ? S_WAIT_DONE : S_READ;
          end
          S_WAIT_DONE: if (prb_done) begin
            state   <= S_IDLE;
            freeze  <= 1'b0;
            load    <= 1'b1;
            pr_done <= 1'b1;
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end
endmodule

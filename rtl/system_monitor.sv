// system_monitor: watches the stream headers and detects a sensor switch.
//
// Every header (hdr_valid pulse) is compared with the stored sensor ID. If
// no ID is stored yet, or the ID differs, the new-sensor flag is raised and
// stays raised until the adaptation controller acknowledges it. The header
// is then stored in the local registers (new_hdr) and passed on to the
// controller. A separate register holds the sensor type the processing
// area is currently configured for; it changes only on save_type, which the
// controller gives after a successful reconfiguration. Reset leaves no ID
// stored and the current type at DEFAULT_TYPE, the persona assumed present
// at power-up. The comparison, flag and registers follow the source; the
// acknowledge and the reset values are this design's choices.
module system_monitor
  import sav_pkg::*;
#(
  parameter sensor_type_e DEFAULT_TYPE = SENSOR_COLOR
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            hdr_valid,
  input  stream_header_t  hdr,
  input  logic            new_sensor_ack,
  input  logic            save_type,
  output logic            new_sensor,
  output stream_header_t  new_hdr,
  output sensor_type_e    cur_type
);
  logic id_known;

  always_ff @(posedge clk) begin
    if (rst) begin
      id_known   <= 1'b0;
      new_sensor <= 1'b0;
      new_hdr    <= '0;
      cur_type   <= DEFAULT_TYPE;
    end else begin
      if (new_sensor_ack) new_sensor <= 1'b0;
      if (hdr_valid) begin
        if (!id_known || hdr.id != new_hdr.id) new_sensor <= 1'b1;
        id_known <= 1'b1;
        new_hdr  <= hdr;
      end
      if (save_type) cur_type <= new_hdr.stype;
    end
  end
endmodule

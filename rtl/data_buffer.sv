// data_buffer: the one-word data buffer and the Device flag.
//
// Each digitised word is loaded here; loading sets the Device flag, which
// requests a data-channel transfer. When the DM09A completes the transfer
// (ack) the flag clears. A load in the same clock as ack wins, so a new word
// is never lost behind the acknowledge of the old one. The buffer and the
// flag follow the description; the load/ack priority and the clear-on-reset
// are this design's own choices.
//
// Interface: load and ack are one-clock pulses; dout and device_flag are
// registered.
`timescale 1ns/1ps
module data_buffer #(
  parameter int unsigned DATA_W = hsadp_pkg::DATA_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic [DATA_W-1:0] din,
  input  logic              ack,
  output logic [DATA_W-1:0] dout,
  output logic              device_flag
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dout        <= '0;
      device_flag <= 1'b0;
    end else begin
      if (load) begin
        dout        <= din;
        device_flag <= 1'b1;
      end else if (ack) begin
        device_flag <= 1'b0;
      end
    end
  end

endmodule

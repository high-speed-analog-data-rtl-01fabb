// iot_decoder: the port's connection to the PDP-9 programmed I/O bus.
//
// Decodes the IOT instructions addressed to DEVICE_CODE:
//   sub-device 0, IOP1  skip the next instruction if Done is set
//   sub-device 0, IOP2  clear the WCOF and Done flags
//   sub-device 0, IOP4  load the memory address counter from AC bits 3-17
//   sub-device 1, IOP4  load the word counter from AC bits 3-17 (enables the
//                       transfer)
// and, while an IORS instruction reads the I/O status, drives Done onto bus
// bit IORS_BIT so software can tell which device interrupted.
// The description states that MAC and W.C. are loaded over the I/O bus and
// that IORS identifies the interrupting device; the device code, the
// sub-device/pulse assignments and the IORS bit position are this design's
// own (a PDP-9 data-channel device of the RC09 kind is the model).
//
// Interface: io.iop* are one-clock pulses; the command outputs are
// combinational one-clock pulses; skip and status are combinational.
`timescale 1ns/1ps
module iot_decoder
  import hsadp_pkg::*;
#(
  parameter logic [DEV_W-1:0] DEVICE_CODE = 6'o55,
  parameter int unsigned      IORS_BIT    = 6
) (
  input  io_bus_t           io,
  input  logic              done,
  output logic              load_mac,
  output logic              load_wc,
  output logic              clear_flags,
  output logic [ADDR_W-1:0] bus_value,   // AC bits 3-17
  output logic              skip,        // I/O skip request
  output logic [WORD_W-1:0] status       // contribution to the IORS word
);

  logic sel;

  assign sel         = (io.dev == DEVICE_CODE);
  assign bus_value   = io.data[ADDR_W-1:0];

  assign skip        = sel && io.sub == SUB_CTRL && io.iop1 && done;
  assign clear_flags = sel && io.sub == SUB_CTRL && io.iop2;
  assign load_mac    = sel && io.sub == SUB_CTRL && io.iop4;
  assign load_wc     = sel && io.sub == SUB_WC   && io.iop4;

  always_comb begin
    status           = '0;
    status[IORS_BIT] = io.iors && done;
  end

endmodule

// hsadp_pkg: widths, types and I/O-instruction codes shared by the blocks of
// the high-speed analog data port.
//
// The 15-bit memory address and word counters, the 8-bit data word and the
// 18-bit PDP-9 word follow the design description. The layout of the I/O bus
// bundle, the sub-device codes and the placement of the 8-bit sample inside
// the 18-bit memory word are this design's own choices (the description only
// says the registers are initialised "via the I/O bus").
`timescale 1ns/1ps
package hsadp_pkg;

  localparam int unsigned ADDR_W = 15;   // MAC and W.C. width
  localparam int unsigned DATA_W = 8;    // ADC / data buffer width
  localparam int unsigned WORD_W = 18;   // PDP-9 word
  localparam int unsigned DEV_W  = 6;    // IOT device-select field

  // Sub-device field of an IOT addressed to this port (instruction bits 12-13).
  typedef enum logic [1:0] {
    SUB_CTRL = 2'd0,   // IOP1: skip on Done, IOP2: clear flags, IOP4: load MAC
    SUB_WC   = 2'd1    // IOP4: load W.C. and enable the transfer
  } iot_sub_e;

  // PDP-9 programmed I/O bus as seen by one device.
  typedef struct packed {
    logic [DEV_W-1:0]  dev;    // device select code of the executing IOT
    logic [1:0]        sub;    // sub-device bits
    logic              iop1;   // IOT pulse, time 1
    logic              iop2;   // IOT pulse, time 2
    logic              iop4;   // IOT pulse, time 4
    logic              iors;   // an IORS instruction is reading status
    logic [WORD_W-1:0] data;   // accumulator contents on the bus
  } io_bus_t;

  // Data channel request presented to the DM09A adapter multiplexer.
  typedef struct packed {
    logic              req;    // Device flag: a word is waiting
    logic [ADDR_W-1:0] addr;   // memory address counter
    logic [WORD_W-1:0] data;   // sample, right-justified
  } dma_req_t;

endpackage

// hsadp_top: high-speed analog data port for a PDP-9 data channel.
//
// A pulsed analog arriving from the accelerator's analog multiplexer is
// halved and offset by the fast pulse amplifier, digitised by an 8-bit
// Gray-code ADC, converted to binary by a three-level gate tree and held in a
// one-word data buffer. Loading the buffer raises the Device flag, which asks
// the DM09A adapter multiplexer (its second-priority port) for a data-channel
// cycle; the request carries the memory address counter and the sample. Each
// acknowledged cycle advances the memory address counter and the word
// counter and drops the Device flag. When the word counter, preloaded with
// minus the word count, reaches zero, WCOF and Done set, the transfer stops
// and the program interrupt is raised; IORS then reports Done.
//
// Datapath: analog_in -> fast_pulse_amp -> adc_br850 -> gray2bin ->
// data_buffer -> dma.data. Control: digitizer_ctrl steps each sample; the
// iot_decoder, mac_reg, word_counter and status_flags form the data-channel
// interface, all held in hsadp_core. The amplifier and ADC are behavioural
// models, so this top simulates (with timing) but only hsadp_core is
// synthesisable logic.
//
// Timing: one clock (10 MHz assumed by the digitizer's settle counts).
// sample_strobe is a one-clock pulse every 8 us while the multiplexer scans;
// a word reaches the buffer about 3 us later. dma_ack is a one-clock pulse
// from the DM09A when the memory cycle for the current request is done.
// The structure follows the description's block diagram; the clock, the
// pulse handshakes and the bus encodings are this design's own choices.
`timescale 1ns/1ps
module hsadp_top
  import hsadp_pkg::*;
#(
  parameter logic [DEV_W-1:0] DEVICE_CODE     = 6'o55,
  parameter int unsigned      IORS_BIT        = 6,
  parameter int unsigned      AMP_SETTLE_CYC  = 5,
  parameter int unsigned      GRAY_SETTLE_CYC = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  // analog multiplexer
  input  real               analog_in,      // volts, -5..+5
  input  logic              sample_strobe,
  // PDP-9 I/O bus
  input  io_bus_t           io,
  output logic              io_skip,
  output logic [WORD_W-1:0] io_status,      // IORS contribution
  output logic              pi_req,         // program interrupt (Done)
  // DM09A data-channel port
  output dma_req_t          dma,
  input  logic              dma_ack,
  // status, for observation
  output logic              xfer_en,
  output logic              wcof,
  output logic [ADDR_W-1:0] word_count,
  output logic              digitizer_busy
);

  real        amp_out;
  logic       adc_start, adc_ready;
  logic [7:0] adc_gray;

  fast_pulse_amp u_amp (
    .vin  (analog_in),
    .vout (amp_out)
  );

  adc_br850 u_adc (
    .vin   (amp_out),
    .start (adc_start),
    .gray  (adc_gray),
    .ready (adc_ready)
  );

  hsadp_core #(
    .DEVICE_CODE     (DEVICE_CODE),
    .IORS_BIT        (IORS_BIT),
    .AMP_SETTLE_CYC  (AMP_SETTLE_CYC),
    .GRAY_SETTLE_CYC (GRAY_SETTLE_CYC)
  ) u_core (
    .clk            (clk),
    .rst_n          (rst_n),
    .sample_strobe  (sample_strobe),
    .adc_start      (adc_start),
    .adc_ready      (adc_ready),
    .adc_gray       (adc_gray),
    .io             (io),
    .io_skip        (io_skip),
    .io_status      (io_status),
    .pi_req         (pi_req),
    .dma            (dma),
    .dma_ack        (dma_ack),
    .xfer_en        (xfer_en),
    .wcof           (wcof),
    .word_count     (word_count),
    .digitizer_busy (digitizer_busy)
  );

endmodule

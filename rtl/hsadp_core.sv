// hsadp_core: the digital part of the high-speed analog data port.
//
// Everything of the port that is logic: the digitizer sequencer, the
// three-level Gray-to-binary converter, the one-word data buffer with its
// Device flag, and the data-channel interface (I/O-bus decoder, memory
// address counter, word counter, WCOF/Done flags). hsadp_top wraps it with
// the behavioural models of the amplifier and the ADC.
//
// Each sample strobe (while a transfer is enabled) starts the sequence
// amplifier settle -> adc_start -> wait for adc_ready -> Gray settle ->
// buffer load; the loaded buffer raises dma.req with the current memory
// address. Each dma_ack advances the address and word counters and clears
// the request; the increment that brings the word counter to zero sets WCOF
// and Done, stops the transfer and raises pi_req.
//
// Timing: one clock (10 MHz assumed by the settle counts); sample_strobe,
// adc_start, io.iop* and dma_ack are one-clock pulses; adc_ready is
// asynchronous and is synchronised inside the sequencer. The partitioning
// follows the description's block diagram; clock, handshakes and bus
// encodings are this design's own.
`timescale 1ns/1ps
module hsadp_core
  import hsadp_pkg::*;
#(
  parameter logic [DEV_W-1:0] DEVICE_CODE     = 6'o55,
  parameter int unsigned      IORS_BIT        = 6,
  parameter int unsigned      AMP_SETTLE_CYC  = 5,
  parameter int unsigned      GRAY_SETTLE_CYC = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  // analog multiplexer and ADC
  input  logic              sample_strobe,
  output logic              adc_start,
  input  logic              adc_ready,
  input  logic [7:0]        adc_gray,
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

  logic [7:0]        conv_bin;
  logic              buf_load, device_flag;
  logic [DATA_W-1:0] buf_data;
  logic              load_mac, load_wc, clear_flags;
  logic [ADDR_W-1:0] bus_value, mac_q, wc_q;
  logic              wc_loaded, wc_overflow, done;

  // ---- analog signal digitizer ------------------------------------------
  gray2bin u_g2b (
    .gray (adc_gray),
    .bin  (conv_bin)
  );

  digitizer_ctrl #(
    .AMP_SETTLE_CYC  (AMP_SETTLE_CYC),
    .GRAY_SETTLE_CYC (GRAY_SETTLE_CYC)
  ) u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .enable    (xfer_en),
    .sample    (sample_strobe),
    .adc_ready (adc_ready),
    .adc_start (adc_start),
    .buf_load  (buf_load),
    .busy      (digitizer_busy)
  );

  data_buffer u_buf (
    .clk         (clk),
    .rst_n       (rst_n),
    .load        (buf_load),
    .din         (conv_bin),
    .ack         (dma_ack),
    .dout        (buf_data),
    .device_flag (device_flag)
  );

  // ---- data-channel interface -------------------------------------------
  iot_decoder #(
    .DEVICE_CODE (DEVICE_CODE),
    .IORS_BIT    (IORS_BIT)
  ) u_iot (
    .io          (io),
    .done        (done),
    .load_mac    (load_mac),
    .load_wc     (load_wc),
    .clear_flags (clear_flags),
    .bus_value   (bus_value),
    .skip        (io_skip),
    .status      (io_status)
  );

  mac_reg u_mac (
    .clk   (clk),
    .rst_n (rst_n),
    .load  (load_mac),
    .din   (bus_value),
    .inc   (dma_ack),
    .q     (mac_q)
  );

  word_counter u_wc (
    .clk      (clk),
    .rst_n    (rst_n),
    .load     (load_wc),
    .din      (bus_value),
    .inc      (dma_ack),
    .q        (wc_q),
    .loaded   (wc_loaded),
    .overflow (wc_overflow)
  );

  status_flags u_flags (
    .clk         (clk),
    .rst_n       (rst_n),
    .wc_loaded   (wc_loaded),
    .wc_overflow (wc_overflow),
    .clear_flags (clear_flags),
    .xfer_en     (xfer_en),
    .wcof        (wcof),
    .done        (done),
    .pi_req      (pi_req)
  );

  assign word_count = wc_q;
  assign dma.req  = device_flag;
  assign dma.addr = mac_q;
  assign dma.data = WORD_W'(buf_data);

  // The DM09A acknowledges only a pending request.
  a_ack_needs_req: assert property (@(posedge clk) disable iff (!rst_n)
    dma_ack |-> device_flag);

endmodule

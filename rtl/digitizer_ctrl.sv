// digitizer_ctrl: sequences the digitising of one analog sample.
//
// On each sample strobe from the analog multiplexer, while a transfer is
// enabled, the controller
//   1. waits AMP_SETTLE_CYC clocks for the fast pulse amplifier to settle,
//   2. pulses adc_start for one clock and waits for the ADC to report
//      completion (adc_ready low, then high again),
//   3. waits GRAY_SETTLE_CYC clocks for the Gray-to-binary gate tree, and
//   4. pulses buf_load for one clock to load the data buffer.
// The whole sequence must fit the 5 us the description allows for sampling
// and storing one signal out of every 8 us; with the defaults at a 10 MHz
// clock it takes about 3 us. Strobes that arrive while a sample is in
// progress are ignored.
//
// The ordering of the steps and the 500 ns / 1 us / 5 us figures come from
// the description; the clock, the strobe/ready handshake and the two-stage
// synchroniser on the ADC's asynchronous ready line are this design's own.
//
// Interface: sample is a one-clock strobe. adc_ready comes from the ADC and
// is asynchronous. adc_start and buf_load are one-clock pulses.
`timescale 1ns/1ps
module digitizer_ctrl #(
  parameter int unsigned AMP_SETTLE_CYC  = 5,   // 500 ns at 10 MHz
  parameter int unsigned GRAY_SETTLE_CYC = 10   // 1 us at 10 MHz
) (
  input  logic clk,
  input  logic rst_n,
  input  logic enable,     // transfer enabled (W.C. loaded, not overflowed)
  input  logic sample,     // strobe: the multiplexer presents a new channel
  input  logic adc_ready,  // ADC conversion complete (asynchronous)
  output logic adc_start,  // start conversion
  output logic buf_load,   // load the converted word into the data buffer
  output logic busy
);

  typedef enum logic [2:0] {
    S_IDLE, S_AMP, S_START, S_CONV_LO, S_CONV_HI, S_GRAY, S_LOAD
  } state_e;

  localparam int unsigned CNT_W = $clog2(AMP_SETTLE_CYC + GRAY_SETTLE_CYC + 2);

  state_e           state;
  logic [CNT_W-1:0] cnt;
  logic [1:0]       ready_sync;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ready_sync <= '0;
    else        ready_sync <= {ready_sync[0], adc_ready};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (sample && enable) begin
          state <= S_AMP;
          cnt   <= CNT_W'(AMP_SETTLE_CYC);
        end
        S_AMP: begin
          if (cnt <= CNT_W'(1)) state <= S_START;
          else                  cnt   <= cnt - 1'b1;
        end
        S_START:   state <= S_CONV_LO;
        S_CONV_LO: if (!ready_sync[1]) state <= S_CONV_HI;
        S_CONV_HI: if (ready_sync[1]) begin
          state <= S_GRAY;
          cnt   <= CNT_W'(GRAY_SETTLE_CYC);
        end
        S_GRAY: begin
          if (cnt <= CNT_W'(1)) state <= S_LOAD;
          else                  cnt   <= cnt - 1'b1;
        end
        S_LOAD:  state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign adc_start = (state == S_START);
  assign buf_load  = (state == S_LOAD);
  assign busy      = (state != S_IDLE);

endmodule

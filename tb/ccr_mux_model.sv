// ccr_mux_model: behavioural model of the control room's existing analog
// multiplexer, which feeds the data port.
//
// The accelerator pulses at 360 pps and interleaves up to six sequential
// beams; beam_id counts them 0..5. After each beam pulse the multiplexer scans
// three groups of CH_PER_GROUP channels at one channel every SAMPLE_US
// microseconds, the groups starting GROUP0_US, GROUP1_US and GROUP2_US after
// the pulse. With each new channel it drives that channel's voltage on
// analog and gives a one-clock sample strobe. The voltage is a known function
// of beam and channel (see volts()) so a bench can predict every sample.
// Timing is counted in clocks of CLK_NS nanoseconds.
`timescale 1ns/1ps
module ccr_mux_model #(
  parameter int unsigned CLK_NS       = 100,
  parameter int unsigned PERIOD_US    = 2778,   // 1 / 360 s
  parameter int unsigned GROUP0_US    = 150,
  parameter int unsigned GROUP1_US    = 1000,
  parameter int unsigned GROUP2_US    = 1860,
  parameter int unsigned CH_PER_GROUP = 36,
  parameter int unsigned SAMPLE_US    = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  output real        analog,
  output logic       strobe,
  output logic       beam_pulse,
  output logic [2:0] beam_id,
  output logic [6:0] channel
);

  localparam int unsigned CPU = 1000 / CLK_NS;   // clocks per microsecond

  // Test-signal law: spreads the channels over -5..+5 V, different per beam.
  function automatic real volts(input int beam, input int ch);
    return -5.0 + 10.0 * real'((ch * 37 + beam * 101 + 13) % 250) / 250.0 + 0.01;
  endfunction

  int unsigned t;    // clocks since the beam pulse

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t          <= 0;
      beam_id    <= 3'd5;
      beam_pulse <= 1'b0;
      strobe     <= 1'b0;
      channel    <= '0;
      analog     <= 0.0;
    end else begin
      int unsigned g, k, off;
      beam_pulse <= 1'b0;
      strobe     <= 1'b0;
      if (t == PERIOD_US * CPU - 1) begin
        t          <= 0;
        beam_pulse <= 1'b1;
        beam_id    <= (beam_id == 3'd5) ? 3'd0 : beam_id + 3'd1;
      end else begin
        t <= t + 1;
      end
      for (g = 0; g < 3; g++) begin
        off = (g == 0) ? GROUP0_US : (g == 1) ? GROUP1_US : GROUP2_US;
        off = off * CPU;
        if (t >= off && t < off + CH_PER_GROUP * SAMPLE_US * CPU &&
            (t - off) % (SAMPLE_US * CPU) == 0) begin
          k = g * CH_PER_GROUP + (t - off) / (SAMPLE_US * CPU);
          channel <= 7'(k);
          analog  <= volts(int'(beam_id), int'(k));
          strobe  <= 1'b1;
        end
      end
    end
  end

endmodule

// status_flags: transfer enable, word-count-overflow (WCOF) and Done flags.
//
// Writing the word counter enables the transfer. When the word counter
// overflows, WCOF sets, which sets Done and disables the transfer; Done is the
// program-interrupt request and the status bit IORS reports. An IOT clears
// WCOF and Done. The chain W.C. loaded -> enable and overflow -> WCOF -> Done
// -> interrupt follows the description; the clear instruction and the
// interrupt being the Done flag itself are this design's choices.
//
// Interface: all inputs are one-clock pulses; all outputs are registered.
`timescale 1ns/1ps
module status_flags (
  input  logic clk,
  input  logic rst_n,
  input  logic wc_loaded,    // W.C. has just been written
  input  logic wc_overflow,  // W.C. reached zero
  input  logic clear_flags,  // IOT: clear WCOF and Done
  output logic xfer_en,
  output logic wcof,
  output logic done,
  output logic pi_req
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xfer_en <= 1'b0;
      wcof    <= 1'b0;
      done    <= 1'b0;
    end else begin
      if (wc_overflow)    xfer_en <= 1'b0;
      else if (wc_loaded) xfer_en <= 1'b1;

      if (wc_overflow)      wcof <= 1'b1;
      else if (clear_flags) wcof <= 1'b0;

      if (wc_overflow || wcof) done <= 1'b1;
      if (clear_flags)         done <= 1'b0;
    end
  end

  assign pi_req = done;

endmodule

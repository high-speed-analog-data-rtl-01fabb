// adc_br850: behavioural model of the 8-bit analog-to-digital converter (not
// synthesisable; a bought-in mixed-signal part).
//
// The description uses a Bunker Ramo model 850 that digitises 0..+5 V in
// 1 us and delivers Gray code. The model samples vin on the rising edge of
// start, drops ready at once, and CONV_NS later presents the Gray code of
//   code = floor(vin * 2**8 / FULL_SCALE), clipped to 0..255
// on gray and raises ready. gray holds its value until the next conversion
// ends. Resolution, range, conversion time and Gray output follow the
// description; the start/ready handshake, the quantisation law and the bit
// order (gray[7] is the most significant digit) are this model's assumptions.
`timescale 1ns/1ps
module adc_br850 #(
  parameter real FULL_SCALE = 5.0,
  parameter real CONV_NS    = 1000.0
) (
  input  real        vin,
  input  logic       start,
  output logic [7:0] gray,
  output logic       ready
);

  logic [7:0] code;

  function automatic logic [7:0] quantise(input real v);
    real s;
    s = v * 256.0 / FULL_SCALE;
    if (s < 0.0)   return 8'd0;
    if (s >= 255.0) return 8'd255;
    return 8'($rtoi(s));
  endfunction

  initial begin
    gray  = '0;
    ready = 1'b1;
  end

  always @(posedge start) begin
    ready <= 1'b0;
    code  <= quantise(vin);
    #(CONV_NS);
    gray  <= code ^ (code >> 1);
    ready <= 1'b1;
  end

endmodule

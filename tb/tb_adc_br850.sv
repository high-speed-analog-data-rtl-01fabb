// tb_adc_br850: checks the ADC model's code, Gray output and timing.
//
// Random input voltages across (and slightly beyond) 0..5 V are converted.
// ready must drop on start and rise 1 us later; the output, decoded from
// Gray in the bench with the bit-serial rule b(i) = g(i) xor b(i-1), must
// equal floor(v * 256 / 5) clipped to 0..255, so that the reconstructed
// voltage is within one step (about 0.4 % of full scale) of the input.
`timescale 1ns/1ps
module tb_adc_br850;
  real vin;
  logic start = 0, ready;
  logic [7:0] gray;
  int checks = 0, failures = 0;

  adc_br850 dut (.vin(vin), .start(start), .gray(gray), .ready(ready));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic logic [7:0] decode(input logic [7:0] g);
    logic [7:0] b;
    b[7] = g[7];
    for (int i = 6; i >= 0; i--) b[i] = g[i] ^ b[i+1];
    return b;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100;
    for (int i = 0; i < 300; i++) begin
      int want;
      real v;
      v = (i == 0) ? 0.0 : (i == 1) ? 4.9999 : (i == 2) ? 5.5 : (i == 3) ? -0.2
          : ($urandom % 100000) * 5.0 / 100000.0;
      vin = v;
      want = int'($floor(v * 256.0 / 5.0));
      if (want < 0) want = 0;
      if (want > 255) want = 255;
      #10 start = 1;
      #1;
      check(!ready, "ready did not drop on start");
      #100 start = 0;
      vin = 0.0;  // input may change after sampling
      #880;
      check(!ready, "ready before 1 us");
      #20;
      check(ready, "ready not up after 1 us");
      check(decode(gray) == 8'(want), $sformatf("v=%f code=%0d want %0d", v, decode(gray), want));
      if (v >= 0.0 && v <= 5.0)
        check(v - decode(gray) * 5.0 / 256.0 < 5.0 / 256.0 + 1e-9, "error above one step");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

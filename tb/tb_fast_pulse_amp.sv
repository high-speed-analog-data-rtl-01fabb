// tb_fast_pulse_amp: checks the amplifier model's transfer and settling.
//
// Input steps across -5..+5 V: the output must still hold the previous value
// shortly before 500 ns and show 2.5 + vin/2 just after, so -5 V maps to 0 V,
// 0 V to 2.5 V and +5 V to 5 V. Out-of-range inputs clip to 0..5 V.
`timescale 1ns/1ps
module tb_fast_pulse_amp;
  real vin, vout, prev, want;
  int checks = 0, failures = 0;

  fast_pulse_amp dut (.vin(vin), .vout(vout));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic bit near(input real a, input real b);
    return (a - b < 1e-6) && (b - a < 1e-6);
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real steps[8] = '{0.0, -5.0, 5.0, 1.25, -2.5, 6.0, -7.0, 3.3};
    vin = 0.0;
    #1000;
    foreach (steps[i]) begin
      prev = vout;
      vin  = steps[i];
      want = 2.5 + steps[i] / 2.0;
      if (want < 0.0) want = 0.0;
      if (want > 5.0) want = 5.0;
      #490;
      check(near(vout, prev), $sformatf("output moved before settling (step %0d)", i));
      #20;
      check(near(vout, want), $sformatf("vin=%f vout=%f want %f", steps[i], vout, want));
      #990;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

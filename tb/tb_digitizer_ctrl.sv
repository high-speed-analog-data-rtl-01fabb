// tb_digitizer_ctrl: checks the sample sequence of the digitizer controller.
//
// A simple ADC stand-in drops ready when started and raises it CONV_CYC
// clocks later. For each strobe the bench checks that adc_start comes after
// the amplifier settle time, that buf_load comes only after the ADC finished
// plus the Gray settle time, that the whole sequence ends within the 5 us
// (50 clock) budget, that a strobe while busy or while disabled starts
// nothing, and that exactly one load happens per accepted strobe.
`timescale 1ns/1ps
module tb_digitizer_ctrl;
  localparam int AMP = 5, GRAY = 10, CONV_CYC = 10, BUDGET = 50;
  logic clk = 0, rst_n = 0, enable = 0, sample = 0, adc_ready = 1;
  logic adc_start, buf_load, busy;
  int checks = 0, failures = 0;
  int cyc = 0, t_strobe, t_start, t_ready, t_load, loads = 0, starts = 0;

  always #50 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  digitizer_ctrl #(.AMP_SETTLE_CYC(AMP), .GRAY_SETTLE_CYC(GRAY)) dut (
    .clk(clk), .rst_n(rst_n), .enable(enable), .sample(sample),
    .adc_ready(adc_ready), .adc_start(adc_start), .buf_load(buf_load), .busy(busy));

  // ADC stand-in
  int conv_left = 0;
  always @(posedge clk) begin
    if (rst_n && adc_start) begin
      adc_ready <= 1'b0; conv_left <= CONV_CYC; t_start <= cyc; starts++;
    end else if (conv_left > 0) begin
      conv_left <= conv_left - 1;
      if (conv_left == 1) begin adc_ready <= 1'b1; t_ready <= cyc; end
    end
  end
  always @(posedge clk) if (rst_n && buf_load) begin t_load <= cyc; loads++; end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (cycle %0d)", msg, cyc); end
  endtask

  task automatic strobe();
    @(negedge clk) sample = 1'b1;
    @(negedge clk) sample = 1'b0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // disabled: strobe ignored
    strobe();
    repeat (60) @(posedge clk);
    check(loads == 0 && starts == 0, "strobe while disabled started a sample");
    enable = 1;
    for (int k = 0; k < 5; k++) begin
      int l0, s0;
      l0 = loads; s0 = starts;
      @(negedge clk) sample = 1'b1; t_strobe = cyc;
      @(negedge clk) sample = 1'b0;
      // a second strobe while busy must be ignored
      repeat (3) @(negedge clk);
      check(busy, "busy after strobe");
      sample = 1'b1; @(negedge clk) sample = 1'b0;
      repeat (BUDGET + 10) @(posedge clk);
      check(starts == s0 + 1, "exactly one ADC start per strobe");
      check(loads == l0 + 1, "exactly one buffer load per strobe");
      check(t_start - t_strobe >= AMP, "ADC started before amplifier settled");
      check(t_load - t_ready >= GRAY, "buffer loaded before Gray tree settled");
      check(t_load - t_strobe <= BUDGET, "sample not stored within 5 us");
      check(!busy, "idle after sequence");
      $display("strobe->start %0d  strobe->load %0d cycles", t_start - t_strobe, t_load - t_strobe);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

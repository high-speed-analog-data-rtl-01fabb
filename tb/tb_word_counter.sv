// tb_word_counter: checks the word counter and its overflow.
//
// For several word counts N the counter is loaded with -N (15-bit two's
// complement) and incremented N times with random gaps. overflow must pulse
// exactly once, on the N-th increment, and the count must then read zero;
// loaded must pulse once per load.
`timescale 1ns/1ps
module tb_word_counter;
  logic clk = 0, rst_n = 0, load = 0, inc = 0;
  logic [14:0] din = 0, q;
  logic loaded, overflow;
  int checks = 0, failures = 0, ovf_count = 0, loaded_count = 0, incs = 0, ovf_at = -1;

  always #5 clk = ~clk;
  word_counter dut (.clk(clk), .rst_n(rst_n), .load(load), .din(din), .inc(inc),
                    .q(q), .loaded(loaded), .overflow(overflow));
  always @(posedge clk) begin
    if (overflow) begin ovf_count++; ovf_at = incs; end
    if (loaded) loaded_count++;
    if (inc) incs++;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int counts[5] = '{1, 2, 108, 37, 1000};
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (counts[k]) begin
      int n;
      n = counts[k];
      ovf_count = 0; loaded_count = 0;
      @(negedge clk) load = 1; din = 15'(-n);
      @(negedge clk) load = 0;
      incs = 0;
      for (int i = 0; i < n; i++) begin
        repeat ($urandom % 3) @(negedge clk);
        inc = 1; @(negedge clk) inc = 0;
        @(posedge clk);
        if (i < n - 1) check(ovf_count == 0, $sformatf("early overflow n=%0d i=%0d", n, i));
        check(q == 15'(i + 1 - n), $sformatf("count n=%0d i=%0d q=%o", n, i, q));
      end
      repeat (2) @(posedge clk);
      check(ovf_count == 1, $sformatf("overflow pulses=%0d for n=%0d", ovf_count, n));
      check(ovf_at == n, $sformatf("overflow on increment %0d, want %0d", ovf_at, n));
      check(q == 0, "count zero after overflow");
      check(loaded_count == 1, "one loaded pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

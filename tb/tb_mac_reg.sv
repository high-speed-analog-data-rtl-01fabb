// tb_mac_reg: checks the memory address counter.
//
// Random loads and increments against a bench-side model: load takes the
// bus value, increment adds one modulo 2**15, load wins over increment.
// Also checks the wrap from 77777 (octal) to 0.
`timescale 1ns/1ps
module tb_mac_reg;
  logic clk = 0, rst_n = 0, load = 0, inc = 0;
  logic [14:0] din = 0, q;
  int unsigned ref_q = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  mac_reg dut (.clk(clk), .rst_n(rst_n), .load(load), .din(din), .inc(inc), .q(q));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      checks++;
      if (q !== 15'(ref_q)) begin
        failures++;
        $display("FAIL i=%0d q=%o want %o", i, q, 15'(ref_q));
      end
      load = ($urandom % 8) == 0;
      inc  = ($urandom % 2) == 0;
      din  = (i % 100 == 0) ? 15'o77775 : 15'($urandom);
      if (load) ref_q = din;
      else if (inc) ref_q = (ref_q + 1) % 32768;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_gray2bin: exhaustive check of the three-level Gray-to-binary converter.
//
// Every 8-bit binary value n is turned into its Gray code n ^ (n >> 1) and
// applied to both the coincidence-gate build (the default) and the XOR build;
// each must return n. The reference is the Gray-code definition, not the
// converter's gate tree.
`timescale 1ns/1ps
module tb_gray2bin;
  logic [7:0] gray, bin_c, bin_x;
  int checks = 0, failures = 0;

  gray2bin dut (.gray(gray), .bin(bin_c));
  gray2bin #(.COINCIDENCE(1'b0)) dut_xor (.gray(gray), .bin(bin_x));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 256; n++) begin
      gray = 8'(n) ^ (8'(n) >> 1);
      #1;
      checks++;
      if (bin_c !== 8'(n)) begin
        failures++;
        $display("FAIL coincidence gray=%b got %b want %b", gray, bin_c, 8'(n));
      end
      checks++;
      if (bin_x !== 8'(n)) begin
        failures++;
        $display("FAIL xor gray=%b got %b want %b", gray, bin_x, 8'(n));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_data_buffer: checks the data buffer and its Device flag.
//
// Random loads and acknowledges are applied; a reference copy of the expected
// word and flag (load sets, ack clears, load wins over ack) is kept in the
// bench and compared every clock.
`timescale 1ns/1ps
module tb_data_buffer;
  logic clk = 0, rst_n = 0, load = 0, ack = 0;
  logic [7:0] din = 0, dout, ref_d;
  logic device_flag, ref_f;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  data_buffer dut (.clk(clk), .rst_n(rst_n), .load(load), .din(din), .ack(ack),
                   .dout(dout), .device_flag(device_flag));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_d = 0; ref_f = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      checks++;
      if (dout !== ref_d || device_flag !== ref_f) begin
        failures++;
        $display("FAIL i=%0d dout=%h/%h flag=%b/%b", i, dout, ref_d, device_flag, ref_f);
      end
      load = ($urandom % 3) == 0;
      ack  = ($urandom % 3) == 0;
      din  = 8'($urandom);
      if (load) begin ref_d = din; ref_f = 1; end
      else if (ack) ref_f = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_status_flags: checks transfer enable, WCOF, Done and the interrupt.
//
// Sequence: reset (all clear) -> W.C. loaded (enable) -> overflow (enable
// drops, WCOF, Done and interrupt set) -> flags stay set -> clear IOT
// (WCOF, Done, interrupt clear) -> reload -> overflow together with clear.
`timescale 1ns/1ps
module tb_status_flags;
  logic clk = 0, rst_n = 0, wc_loaded = 0, wc_overflow = 0, clear_flags = 0;
  logic xfer_en, wcof, done, pi_req;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  status_flags dut (.clk(clk), .rst_n(rst_n), .wc_loaded(wc_loaded), .wc_overflow(wc_overflow),
                    .clear_flags(clear_flags), .xfer_en(xfer_en), .wcof(wcof), .done(done),
                    .pi_req(pi_req));

  task automatic expect4(input bit e, w, d, p, input string msg);
    checks++;
    if ({xfer_en, wcof, done, pi_req} !== {e, w, d, p}) begin
      failures++;
      $display("FAIL %s: en=%b wcof=%b done=%b pi=%b", msg, xfer_en, wcof, done, pi_req);
    end
  endtask

  task automatic pulse(ref logic s);
    @(negedge clk) s = 1; @(negedge clk) s = 0;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk) expect4(0, 0, 0, 0, "after reset");
    pulse(wc_loaded);  expect4(1, 0, 0, 0, "after W.C. load");
    repeat (5) @(negedge clk); expect4(1, 0, 0, 0, "enable holds");
    pulse(wc_overflow); expect4(0, 1, 1, 1, "after overflow");
    repeat (5) @(negedge clk); expect4(0, 1, 1, 1, "flags hold");
    pulse(clear_flags); expect4(0, 0, 0, 0, "after clear");
    pulse(wc_loaded);  expect4(1, 0, 0, 0, "after reload");
    @(negedge clk) begin wc_overflow = 1; clear_flags = 1; end
    @(negedge clk) begin wc_overflow = 0; clear_flags = 0; end
    @(negedge clk) expect4(0, 1, 1, 1, "overflow with clear keeps WCOF and Done");
    pulse(clear_flags); expect4(0, 0, 0, 0, "cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

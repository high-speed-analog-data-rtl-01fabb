// tb_iot_decoder: checks the I/O-bus instruction decoding.
//
// Every combination of device code (own and others), sub-device, IOT pulse,
// IORS and Done is applied; the expected command outputs are computed in the
// bench from the instruction table in the decoder's header comment.
`timescale 1ns/1ps
module tb_iot_decoder;
  import hsadp_pkg::*;
  localparam logic [5:0] DEV = 6'o55;
  io_bus_t io;
  logic done, load_mac, load_wc, clear_flags, skip;
  logic [14:0] bus_value;
  logic [17:0] status;
  int checks = 0, failures = 0;

  iot_decoder dut (.io(io), .done(done), .load_mac(load_mac), .load_wc(load_wc),
                   .clear_flags(clear_flags), .bus_value(bus_value), .skip(skip),
                   .status(status));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [5:0] devs[4] = '{6'o55, 6'o54, 6'o15, 6'o00};
    foreach (devs[d])
      for (int sub = 0; sub < 4; sub++)
        for (int p = 0; p < 8; p++)
          for (int r = 0; r < 2; r++)
            for (int dn = 0; dn < 2; dn++) begin
              bit me, e_skip, e_clr, e_mac, e_wc;
              logic [17:0] e_stat;
              io.dev  = devs[d];
              io.sub  = 2'(sub);
              io.iop1 = p[0]; io.iop2 = p[1]; io.iop4 = p[2];
              io.iors = r[0];
              io.data = 18'($urandom);
              done    = dn[0];
              #1;
              me     = devs[d] == DEV;
              e_skip = me && sub == 0 && p[0] && dn[0];
              e_clr  = me && sub == 0 && p[1];
              e_mac  = me && sub == 0 && p[2];
              e_wc   = me && sub == 1 && p[2];
              e_stat = (r[0] && dn[0]) ? 18'(1 << 6) : 18'd0;
              checks++;
              if ({skip, clear_flags, load_mac, load_wc} !== {e_skip, e_clr, e_mac, e_wc} ||
                  status !== e_stat || bus_value !== io.data[14:0]) begin
                failures++;
                $display("FAIL dev=%o sub=%0d iop=%b iors=%0d done=%0d: got %b%b%b%b stat=%h",
                         devs[d], sub, p[2:0], r, dn, skip, clear_flags, load_mac, load_wc, status);
              end
            end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

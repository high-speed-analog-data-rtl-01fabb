// mac_reg: memory address counter (MAC).
//
// Holds the PDP-9 memory address of the next data word. Software loads the
// address of the first word from the I/O bus before the transfer starts; the
// counter then advances by one after every data-channel transfer, wrapping
// modulo 2**ADDR_W. The width and the load/increment behaviour follow the
// description; load taking priority over an increment in the same clock is
// this design's choice.
//
// Interface: load and inc are one-clock pulses; q is registered.
`timescale 1ns/1ps
module mac_reg #(
  parameter int unsigned ADDR_W = hsadp_pkg::ADDR_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic [ADDR_W-1:0] din,
  input  logic              inc,
  output logic [ADDR_W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= '0;
    else if (load) q <= din;
    else if (inc)  q <= q + 1'b1;
  end

endmodule

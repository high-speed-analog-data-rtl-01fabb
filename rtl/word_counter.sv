// word_counter: the word counter (W.C.).
//
// Software preloads the two's-complement negative of the number of words to
// transfer. The counter advances by one after every transfer; the increment
// that carries it from all ones to zero raises overflow for one clock, which
// sets the WCOF flip-flop. loaded pulses when software writes the counter and
// enables the transfer. Width, negative preload and overflow at zero follow
// the description; the pulse outputs are this design's choice.
//
// Interface: load and inc are one-clock pulses; q is registered; loaded and
// overflow are registered one-clock pulses.
`timescale 1ns/1ps
module word_counter #(
  parameter int unsigned ADDR_W = hsadp_pkg::ADDR_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic [ADDR_W-1:0] din,
  input  logic              inc,
  output logic [ADDR_W-1:0] q,
  output logic              loaded,
  output logic              overflow
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q        <= '0;
      loaded   <= 1'b0;
      overflow <= 1'b0;
    end else begin
      loaded   <= load;
      overflow <= 1'b0;
      if (load) begin
        q <= din;
      end else if (inc) begin
        q        <= q + 1'b1;
        overflow <= &q;
      end
    end
  end

endmodule

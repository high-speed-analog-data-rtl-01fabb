// gray2bin: 8-bit Gray-code to binary converter with a three-level gate tree.
//
// The plain converter b(i) = g(i) xor b(i-1) is a ripple of seven gates, so a
// change of the most significant digit ripples through seven gate delays. This
// converter factors the chain so that every path is at most three gates deep:
//   level 1:  1 = g0^g1   A = g2^g3   B = g4^g5   C = g6^g7
//   level 2:  2 = 1^g2    3 = 1^A     D = B^C     E = B^g6
//   level 3:  4 = 3^g4    5 = 3^B     6 = 3^E     7 = 3^D
// with b0 = g0, b1..b7 = gates 1..7. Digit 0 is the most significant, so
// gray[7] carries g0 and bin[7] carries b0.
//
// COINCIDENCE = 1 builds the tree from coincidence (XNOR) gates, as the
// original DEC R131 modules provide; the same wiring then yields the odd
// outputs inverted, and an inverter restores each of b1, b3, b5 and b7.
// COINCIDENCE = 0 is the same tree in XOR gates. Both give identical results.
// The gate tree, the gate naming and the odd-output inverters follow the
// design description; the parameter that selects the gate type is this
// design's own.
//
// Purely combinational; delay is three gate levels.
`timescale 1ns/1ps
module gray2bin #(
  parameter bit COINCIDENCE = 1'b1
) (
  input  logic [7:0] gray,   // gray[7] = g0 (most significant digit)
  output logic [7:0] bin     // bin[7]  = b0
);

  function automatic logic gate(input logic a, input logic b);
    return COINCIDENCE ? ~(a ^ b) : (a ^ b);
  endfunction

  logic g0, g1, g2, g3, g4, g5, g6, g7;
  logic x1, xa, xb, xc;      // level 1
  logic x2, x3, xd, xe;      // level 2
  logic x4, x5, x6, x7;      // level 3
  logic inv;                 // odd outputs need an inverter with coincidence gates

  assign {g0, g1, g2, g3, g4, g5, g6, g7} = gray;
  assign inv = COINCIDENCE;

  assign x1 = gate(g0, g1);
  assign xa = gate(g2, g3);
  assign xb = gate(g4, g5);
  assign xc = gate(g6, g7);

  assign x2 = gate(x1, g2);
  assign x3 = gate(x1, xa);
  assign xd = gate(xb, xc);
  assign xe = gate(xb, g6);

  assign x4 = gate(x3, g4);
  assign x5 = gate(x3, xb);
  assign x6 = gate(x3, xe);
  assign x7 = gate(x3, xd);

  assign bin = {g0, x1 ^ inv, x2, x3 ^ inv, x4, x5 ^ inv, x6, x7 ^ inv};

endmodule

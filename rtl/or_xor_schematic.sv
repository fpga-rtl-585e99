// or_xor_schematic: small gate-level example, X = (A or B) xor (C or D).
//
// Two OR gates combine A with B and C with D; an XOR gate combines the two
// OR outputs into X. The circuit is purely combinational: X follows the
// inputs after the gate delays, with no clock. The gates and their wiring are
// those of the original schematic; writing it as one continuous assignment
// per gate is this design's choice.
module or_xor_schematic (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic x
);

  logic or_ab;
  logic or_cd;

  assign or_ab = a | b;
  assign or_cd = c | d;
  assign x     = or_ab ^ or_cd;

endmodule

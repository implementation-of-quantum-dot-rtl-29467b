// maj3: three-input majority gate, the basic logic element of quantum-dot
// cellular automata (QCA) circuits.
//
// The output is 1 when at least two of the three inputs are 1:
// m = a&b | b&c | c&a. Tying one input to 0 turns the gate into a two-input
// AND of the other two; tying it to 1 turns it into an OR. Every adder block
// of this design is written as a netlist of these gates plus inverters, so
// that the RTL keeps the gate structure, and the gate count, of the QCA
// circuits it models.
//
// Ports: a, b, c inputs; m output. Purely combinational, no clock or reset.
module maj3 (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic m
);

  assign m = (a & b) | (b & c) | (c & a);

endmodule

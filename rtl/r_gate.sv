// r_gate: the 3x3 R gate used to build the reversible-logic demultiplexers.
//
// Outputs P = A, Q = A&B and R = ~A&B | A&C, the equations the design is
// specified with. Note that they are not one-to-one over all eight inputs
// (with A=0 the C input reaches no output); in the way the gate is used here,
// with C tied to 0, the four (A,B) patterns do give four distinct outputs, so
// no information on A and B is lost. With C tied to 0 the gate
// is a 1-to-2 demultiplexer: data on B leaves on Q when A=1 and on R when A=0,
// and P carries the select out as a garbage output. This is the building block
// of all demultiplexers in the update paths.
//
// Purely combinational; no clock.
module r_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);

  assign p = a;
  assign q = a & b;
  assign r = (~a & b) | (a & c);

endmodule

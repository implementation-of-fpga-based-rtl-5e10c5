// rev_demux4: 1-to-4 demultiplexer built from three R gates.
//
// The first gate splits the data bit I on select S1 (A=S1, B=I, C=0): its Q
// output carries I when S1=1 and its R output carries I when S1=0. Each of
// these feeds the B input of a second-level gate whose A input is S0 and
// whose C input is 0; the upper gate yields Z3 (Q) and Z2 (R), the lower one
// Z1 (Q) and Z0 (R). The three P outputs are the garbage outputs G1..G3.
// Gate structure and the constant-0 inputs are the published design.
//
// Interface: z[k] = i when s == k, else 0. Combinational.
module rev_demux4 (
  input  logic       i,
  input  logic [1:0] s,  // {S1, S0}
  output logic [3:0] z,  // {Z3, Z2, Z1, Z0}
  output logic [3:1] g   // garbage outputs {G3, G2, G1}
);

  logic hi;  // I when S1=1
  logic lo;  // I when S1=0

  r_gate u_first (
    .a(s[1]), .b(i),  .c(1'b0),
    .p(g[1]), .q(hi), .r(lo)
  );

  r_gate u_upper (
    .a(s[0]), .b(hi),   .c(1'b0),
    .p(g[2]), .q(z[3]), .r(z[2])
  );

  r_gate u_lower (
    .a(s[0]), .b(lo),   .c(1'b0),
    .p(g[3]), .q(z[1]), .r(z[0])
  );

endmodule

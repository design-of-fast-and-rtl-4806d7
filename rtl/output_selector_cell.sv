// output_selector_cell: the two-port output selector, the leaf and the
// combining stage of the recursive output selector.
//
// Inputs: enable e and the two request bits r1, r2. Outputs: one-hot grant
// q1/q2 and c, which tells the stage above that this half holds a request.
// The first requested port wins: q1 = e & r1, q2 = e & ~r1 & r2, c = r1 | r2.
// Purely combinational. The port names E, R1, R2, Q1, Q2, C follow the
// published two-port selector; the equations are derived here from its
// stated function, "choose the first available output".
module output_selector_cell (
  input  logic e,
  input  logic r1,
  input  logic r2,
  output logic q1,
  output logic q2,
  output logic c
);
  always_comb begin
    q1 = e & r1;
    q2 = e & ~r1 & r2;
    c  = r1 | r2;
  end
endmodule

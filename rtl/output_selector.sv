// output_selector: choose the first available output port for one input.
//
// r[j] is set when the input has unscheduled cells for output j and no
// earlier input in the chain has taken output j in this slot. When e is
// high, q returns a one-hot vector with the lowest-numbered requested port
// set; q is all zero when e is low or nothing is requested. c is high when
// any r bit is set.
//
// Structure (as in the published scheduler): an N-port selector is two N/2-port
// selectors plus one two-port cell. The cell sees the c outputs of the two
// halves as its requests and its grants become the enables of the halves,
// so the lower half wins whenever it has a request. The recursion ends at
// two-port cells that see the r bits. Here the recursion is unrolled into a
// binary tree of N-1 two-port cells in heap order: node 1 is the root, node
// k has children 2k and 2k+1, and nodes N/2..N-1 are the leaves. Depth is
// log2(N) cells; purely combinational.
module output_selector #(
  parameter int unsigned N = router_pkg::N_PORTS  // power of two, >= 2
) (
  input  logic         e,
  input  logic [N-1:0] r,
  output logic [N-1:0] q,
  output logic         c
);
  initial begin
    assert (N >= 2 && (N & (N - 1)) == 0)
      else $error("output_selector: N must be a power of two >= 2");
  end

  // Per node: enable from above, request summary to above. Index 0 unused.
  logic [N-1:1] node_e;
  logic [N-1:1] node_c;

  assign node_e[1] = e;
  assign c         = node_c[1];

  for (genvar k = 1; k < N; k++) begin : g_node
    if (k >= N / 2) begin : g_leaf
      localparam int unsigned J = 2 * (k - N / 2);
      output_selector_cell u_cell (
        .e (node_e[k]), .r1(r[J]), .r2(r[J+1]),
        .q1(q[J]), .q2(q[J+1]), .c(node_c[k])
      );
    end else begin : g_inner
      output_selector_cell u_cell (
        .e (node_e[k]), .r1(node_c[2*k]), .r2(node_c[2*k+1]),
        .q1(node_e[2*k]), .q2(node_e[2*k+1]), .c(node_c[k])
      );
    end
  end
endmodule

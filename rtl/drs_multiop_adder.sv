// drs_multiop_adder: modular sum of N DRS pseudoresidues.
//
// The N operands, each in [-m, m), are summed mod m by a tree of two-operand
// DRS adders (drs_adder). Because every adder output is again a DRS
// pseudoresidue, the tree needs no extra width or final reduction: the root
// gives the sum, in [-m, m). The tree is laid out as a heap of 2N-1 nodes:
// leaves N-1 .. 2N-2 are the operands, and internal node i adds nodes 2i+1
// and 2i+2. For N a power of two this is a balanced tree of depth log2(N).
//
// Multioperand addition by a tree of the sign-corrected DRS adder is the
// paper's suggestion; the heap layout and N are this design's.
//
// Interface: x[N] (H+1 bits, DRS), m (H bits, m < 2^H), s (H+1 bits, DRS).
// Combinational, depth ceil(log2(N)) DRS adders.
module drs_multiop_adder #(
  parameter int unsigned H = 8,
  parameter int unsigned N = 8
) (
  input  logic [H:0]   x [N],
  input  logic [H-1:0] m,
  output logic [H:0]   s
);
  logic [H:0] node [2*N-1];

  for (genvar i = 0; i < N; i++) begin : g_leaf
    assign node[N-1+i] = x[i];
  end

  for (genvar i = 0; i + 1 < N; i++) begin : g_add
    drs_adder #(.H(H)) u_add (
      .x(node[2*i+1]), .y(node[2*i+2]), .m(m), .sub(1'b0), .s(node[i])
    );
  end

  assign s = node[0];
endmodule

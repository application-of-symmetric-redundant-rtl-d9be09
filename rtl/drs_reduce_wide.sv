// drs_reduce_wide: K-bit two's-complement number -> DRS pseudoresidue mod M.
//
// The operand is cut into segments. The rightmost h-1 bits are already an
// ordinary residue (below 2^(h-1) < m) and need no conversion. Every further
// h-bit segment s_j at bit offset g_j addresses its own 2^h-entry table that
// holds either the residue <s_j 2^(g_j)>_m, in [0, m), or the inverse residue
// m - <s_j 2^(g_j)>_m, in (0, m], alternating from segment to segment. Each
// residue is paired with an inverse residue and one (h+1)-bit subtraction
// turns the pair into a DRS pseudoresidue r - q in [-m, m). A residue left
// without a partner is a valid DRS value as it is. The resulting
// pseudoresidues are summed by a tree of drs_adder units. The top segment is
// read as a signed number, so the input is two's complement.
//
// The method (segments, residues and inverse residues, pairing, subtraction,
// addition of the pseudoresidues) is the paper's; the alternating
// assignment, the tree and the default sizes are this design's choices.
//
// Interface: x (K bits, two's complement), y (H+1 bits, DRS mod M).
// Combinational: one table read, one subtraction, log2 of the number of
// pairs DRS adders.
module drs_reduce_wide #(
  parameter int unsigned K = 32,
  parameter int unsigned H = 8,
  parameter int unsigned M = 251   // 2^(H-1) < M < 2^H
) (
  input  logic [K-1:0] x,
  output logic [H:0]   y
);
  import drs_pkg::*;

  localparam int unsigned S   = (K - (H - 1) + H - 1) / H;     // h-bit segments
  localparam int unsigned XW  = (H - 1) + S * H;               // padded width
  localparam int unsigned NI  = S + 1;                         // items incl. segment 0
  localparam int unsigned NP  = (NI + 1) / 2;                  // DRS values after pairing
  localparam int unsigned NL  = (NP <= 1) ? 2 : 2 ** $clog2(NP);
  localparam int unsigned TN  = 2 ** H;
  localparam logic [H-1:0] MOD = H'(M);

  // table of segment j (1..S) at index (j-1)*TN + s
  typedef logic [H-1:0] rom_t [S*TN];
  function automatic rom_t build_rom();
    rom_t   t;
    longint sv, r, w;
    for (int j = 1; j <= int'(S); j++) begin
      w = posmod(longint'(1) << ((H - 1) + (j - 1) * H), longint'(M));
      for (int s = 0; s < int'(TN); s++) begin
        sv = (j == int'(S) && s >= int'(TN) / 2) ? longint'(s) - longint'(TN) : longint'(s);
        r  = posmod(sv * w, longint'(M));
        // odd items (j odd) are inverse residues in (0, m]
        t[(j-1)*int'(TN) + s] = H'((j % 2 == 1) ? longint'(M) - r : r);
      end
    end
    return t;
  endfunction
  localparam rom_t ROM = build_rom();

  logic [XW-1:0] xs;
  logic [H-1:0]  item [NI];
  logic [H:0]    node [2*NL];

  assign xs = XW'($signed(x));                 // sign extension
  assign item[0] = {1'b0, xs[H-2:0]};

  for (genvar j = 1; j <= S; j++) begin : g_seg
    assign item[j] = ROM[(j-1)*TN + int'(xs[(H-1)+(j-1)*H +: H])];
  end

  // pairing: residue item[2i] minus inverse residue item[2i+1]
  for (genvar i = 0; i < NL; i++) begin : g_pair
    if (2*i + 1 < NI) begin : g_two
      assign node[NL+i] = {1'b0, item[2*i]} - {1'b0, item[2*i+1]};
    end else if (2*i < NI) begin : g_one
      assign node[NL+i] = {1'b0, item[2*i]};
    end else begin : g_none
      assign node[NL+i] = '0;
    end
  end

  assign node[0] = '0;
  for (genvar n = 1; n < NL; n++) begin : g_tree
    drs_adder #(.H(H)) u_add (
      .x(node[2*n]), .y(node[2*n+1]), .m(MOD), .sub(1'b0), .s(node[n])
    );
  end

  assign y = node[1];
endmodule

// residue_encoder: W-bit unsigned word -> DRS check residue mod 2^H - 1.
//
// The word is cut into H-bit segments. With the check modulus m = 2^H - 1
// every segment has weight 2^(jH) = 1 (mod m), so the residue of the word is
// the mod-m sum of its segments. Each segment is turned into a DRS
// pseudoresidue by drs_from_unsigned (subtract m) and the segments are summed
// by a balanced tree of drs_adder units (multioperand addition by a tree of
// two-operand DRS adders). Missing leaves of the tree are fed with zero.
// Output: a DRS pseudoresidue in [-m, m), one bit wider than an ordinary
// residue, as used for residue-checked arithmetic.
//
// The paper gives segment-wise reduction followed by adding pseudoresidues;
// the choice of a modulus 2^H - 1, which makes every segment weight 1, is
// this design's (the paper's general scheme pairs residues and inverse
// residues for arbitrary m).
//
// Interface: word (W bits), res (H+1 bits, DRS mod 2^H - 1). Combinational,
// depth log2(W/H) DRS adders.
module residue_encoder #(
  parameter int unsigned W = 32,
  parameter int unsigned H = 4
) (
  input  logic [W-1:0] word,
  output logic [H:0]   res
);
  localparam int unsigned NS = (W + H - 1) / H;                   // segments
  localparam int unsigned NL = (NS <= 1) ? 2 : 2 ** $clog2(NS);   // tree leaves
  localparam logic [H-1:0] MOD = {H{1'b1}};                      // 2^H - 1

  logic [NS*H-1:0] padded;
  logic [H:0]      node [2*NL];

  assign padded  = (NS*H)'(word);
  assign node[0] = '0;

  for (genvar i = 0; i < NL; i++) begin : g_leaf
    if (i < NS) begin : g_seg
      drs_from_unsigned #(.H(H)) u_cvt (
        .x(padded[i*H +: H]), .m(MOD), .y(node[NL+i])
      );
    end else begin : g_pad
      assign node[NL+i] = '0;
    end
  end

  for (genvar n = 1; n < NL; n++) begin : g_tree
    drs_adder #(.H(H)) u_add (
      .x(node[2*n]), .y(node[2*n+1]), .m(MOD), .sub(1'b0), .s(node[n])
    );
  end

  assign res = node[1];
endmodule

// residue_checked_adder: W-bit binary adder checked with a DRS residue code.
//
// Each operand arrives encoded as (u, u mod m) with a DRS check residue,
// m = 2^H - 1. The main adder forms a + b = sum + 2^W * cout. The residue
// channel predicts the residue of the sum with DRS adders: ra + rb, minus
// cout because 2^W = 1 (mod m) when H divides W. A residue_encoder
// regenerates the residue of the produced sum and a third DRS adder forms
// predicted - generated; the two agree mod m exactly when that difference is
// 0 or -m, so the comparator has to recognise two codes instead of one (the
// cost of redundancy the paper points out). Any mismatch raises err.
// err_inject is XORed into the main adder's output to emulate a fault in the
// checked unit; tie it to zero in normal use.
//
// Residue checking with DRS check residues is the paper's; the modulus, the
// carry handling and the fault-injection input are this design's choices.
//
// Interface: a, b (W bits), ra, rb (H+1 bits DRS), err_inject (W bits),
// sum (W bits), cout, rsum (H+1 bits, predicted DRS residue of sum), err.
// Combinational.
module residue_checked_adder #(
  parameter int unsigned W = 32,
  parameter int unsigned H = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [H:0]   ra,
  input  logic [H:0]   rb,
  input  logic [W-1:0] err_inject,
  output logic [W-1:0] sum,
  output logic         cout,
  output logic [H:0]   rsum,
  output logic         err
);
  localparam logic [H-1:0] MOD = {H{1'b1}};

  logic [H:0] r_ab, r_gen, r_diff;

  always_comb {cout, sum} = ({1'b0, a} + {1'b0, b}) ^ {1'b0, err_inject};

  drs_adder #(.H(H)) u_radd (.x(ra),   .y(rb),             .m(MOD), .sub(1'b0), .s(r_ab));
  drs_adder #(.H(H)) u_rcar (.x(r_ab), .y((H+1)'(cout)),   .m(MOD), .sub(1'b1), .s(rsum));

  residue_encoder #(.W(W), .H(H)) u_regen (.word(sum), .res(r_gen));

  drs_adder #(.H(H)) u_cmp (.x(rsum), .y(r_gen), .m(MOD), .sub(1'b1), .s(r_diff));

  always_comb err = !((r_diff == '0) || (r_diff == ~{1'b0, MOD} + 1'b1));
endmodule

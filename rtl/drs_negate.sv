// drs_negate: change of sign of a DRS pseudoresidue in [-m, m).
//
// Negation is two's complementation, except that -m would become m, which is
// outside [-m, m); an equality detector on -m forces the output to 0 instead
// (m = 0 mod m). This follows the paper's description of DRS negation.
//
// Interface: x (H+1 bits, DRS), m (H bits), y (H+1 bits, DRS). Combinational.
module drs_negate #(
  parameter int unsigned H = 8
) (
  input  logic [H:0]   x,
  input  logic [H-1:0] m,
  output logic [H:0]   y
);
  logic is_neg_m;
  always_comb begin
    is_neg_m = (x == (~{1'b0, m} + 1'b1));
    y        = is_neg_m ? '0 : (~x + 1'b1);
  end
endmodule

// tru_to_drs: triple-range unsigned pseudoresidue -> DRS pseudoresidue.
//
// A TRU value Y in [0, 3m), h+2 bits, is brought into [-m, m) by adding 0, -m
// or -2m. The choice depends only on the three MSBs Y[h+1:h-1]: 000 adds 0
// (Y < 2^(h-1) < m), 001 adds -m (Y < 2^h), anything else adds -2m. So the
// circuit is a small decoder, a 3-way multiplexer and one adder, as the paper
// describes for the second step of its eq. (5). Needs 2^(h-1) < m < 2^h.
//
// Interface: y_tru (H+2 bits unsigned), m (H bits), z (H+1 bits, DRS).
// Combinational.
module tru_to_drs #(
  parameter int unsigned H = 8
) (
  input  logic [H+1:0] y_tru,
  input  logic [H-1:0] m,
  output logic [H:0]   z
);
  logic [H+1:0] sub;
  logic [H+1:0] diff;
  always_comb begin
    unique case (y_tru[H+1:H-1])
      3'b000:  sub = '0;
      3'b001:  sub = {2'b00, m};
      default: sub = {1'b0, m, 1'b0};
    endcase
    diff = y_tru - sub;
    z    = diff[H:0];
  end
endmodule

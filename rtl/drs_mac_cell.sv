// drs_mac_cell: modulo-m multiply-accumulate cell with a wide pseudoresidue.
//
// Forms T' = T + X * Y (mod m), where X, Y are DRS pseudoresidues in [-m, m)
// and the running total T is kept as a (2h+1)-bit two's-complement
// pseudoresidue (any value in [-2^(2h), 2^(2h)) congruent to the sum).
// The product, in [-m(m-1), m^2], is added to T giving a (2h+2)-bit sum. When
// the two MSBs of the sum differ it has left the (2h+1)-bit range; it is then
// decreased (positive overflow) or increased (negative overflow) by 2^h * m,
// which touches only bits [2h:h] and so needs only an (h+1)-bit adder. The
// result is registered. This is the cell the paper gives for sequential
// inner products and as the tap of a pipelined linear array; the final
// conversion of the wide total to h+1 bits is done outside (drs_reduce_lut).
//
// Interface: en (update the register), x, y (H+1 bits), m (H bits, needs
// 2^(H-1) < m < 2^H), acc_in (2H+1 bits), acc_out (2H+1 bits, registered),
// ovf (combinational: the current sum needs the 2^h*m correction).
// Timing: acc_out = acc_in + x*y (mod m) one clock after en.
module drs_mac_cell #(
  parameter int unsigned H = 8
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           en,
  input  logic [H:0]     x,
  input  logic [H:0]     y,
  input  logic [H-1:0]   m,
  input  logic [2*H:0]   acc_in,
  output logic [2*H:0]   acc_out,
  output logic           ovf
);
  logic signed [2*H+1:0] prod, sum;
  logic        [H+1:0]   upper, upper_adj;
  logic        [2*H:0]   nxt;

  always_comb begin
    prod  = (2*H+2)'($signed(x) * $signed(y));
    sum   = $signed({acc_in[2*H], acc_in}) + prod;
    ovf   = sum[2*H+1] ^ sum[2*H];
    upper = sum[2*H+1:H];
    if (!ovf)            upper_adj = upper;
    else if (!sum[2*H+1]) upper_adj = upper - {2'b00, m};
    else                 upper_adj = upper + {2'b00, m};
    nxt   = {upper_adj[H:0], sum[H-1:0]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  acc_out <= '0;
    else if (en) acc_out <= nxt;
  end
endmodule

// drs_mult_seq: bit-serial DRS modular multiplier / multiply-adder.
//
// Computes P = X * Y + A (mod m) with X, Y DRS pseudoresidues in [-m, m) and
// an optional unsigned addend A in [0, 2^h), result P in [-m, m). It runs the
// left-shift-add recurrence New P = 2P + Y_(h-j) X (mod m), j = 0..h, MSB of Y
// first, one step per clock, P starting at 0. Y's sign bit has weight -2^h,
// so its step adds -X. For multiply-add, A's bits, MSB first, take the place
// of the 0 LSB of 2P in steps 1..h.
//
// One step: the doubling is done as 2P - m for P >= 0 and 2P + m for P < 0,
// which stays in [-m, m). A carry-save adder merges 2P (+ A bit), the +/-m
// constant and the selected multiple of X into a carry-save number with value
// in [-2m, 2m-1]. A sign lookahead on that pair decides whether -m
// (non-negative) or +m (negative) is added by the final adder, which brings
// the value back into [-m, m). This is the faster variant the paper describes
// (one CSA plus a sign lookahead replacing the first adder).
//
// Choices of this design: A is an unsigned h-bit operand (an ordinary
// residue); the recurrence runs h+1 steps because DRS operands have h+1 bits;
// the interface is a start/done handshake.
//
// Interface: start (1-cycle pulse, operands sampled then), x, y (H+1 bits),
// a (H bits), m (H bits); busy while iterating; done pulses for one cycle
// together with the final p. Latency: done rises H+1 cycles after start.
module drs_mult_seq #(
  parameter int unsigned H = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [H:0]   x,
  input  logic [H:0]   y,
  input  logic [H-1:0] a,
  input  logic [H-1:0] m,
  output logic         busy,
  output logic         done,
  output logic [H:0]   p
);
  localparam int unsigned W = H + 3;        // internal width, holds [-4m, 4m)
  localparam int unsigned CW = $clog2(H + 2);

  logic [H:0]    xr, yr;
  logic [H-1:0]  ar, mr;
  logic [CW-1:0] step;                      // index j of the current step

  logic [W-1:0]  two_p, pm, term, mw, xw;
  logic [W-1:0]  cs_s, cs_c, look, corr, nxt;
  logic          abit;

  always_comb begin
    mw    = W'(mr);
    xw    = {{(W-H-1){xr[H]}}, xr};
    // A's bit for this step (steps 1..H carry A[H-1..0])
    abit  = (step != 0) ? ar[H - int'(step)] : 1'b0;
    two_p = {{(W-H-2){p[H]}}, p, abit};
    pm    = p[H] ? mw : (~mw + 1'b1);         // +m if P < 0, else -m
    if (!yr[H - int'(step)])   term = '0;
    else if (step == 0)  term = ~xw + 1'b1;   // sign bit: weight -2^h
    else                 term = xw;
    // carry-save addition of the three terms
    cs_s  = two_p ^ pm ^ term;
    cs_c  = ((two_p & pm) | (two_p & term) | (pm & term)) << 1;
    // sign lookahead of the carry-save pair
    look  = cs_s + cs_c;
    corr  = look[W-1] ? mw : (~mw + 1'b1);
    nxt   = cs_s + cs_c + corr;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      step <= '0;
      p    <= '0;
      xr   <= '0;
      yr   <= '0;
      ar   <= '0;
      mr   <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1;
        step <= '0;
        p    <= '0;
        xr   <= x;
        yr   <= y;
        ar   <= a;
        mr   <= m;
      end else if (busy) begin
        p <= nxt[H:0];
        if (step == CW'(H)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          step <= step + 1'b1;
        end
      end
    end
  end
endmodule

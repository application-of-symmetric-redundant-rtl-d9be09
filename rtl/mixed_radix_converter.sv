// mixed_radix_converter: RNS -> mixed-radix conversion on DRS pseudoresidues.
//
// For moduli m_0 < m_1 < ... < m_(K-1) the mixed-radix digits v_i of a
// number u satisfy u = v_0 + v_1 m_0 + v_2 m_0 m_1 + ... (mod M). Starting
// from the residues of u, step i takes the current residue r_i as digit v_i,
// subtracts it from every higher residue r_j (j > i), which makes the number
// divisible by m_i, and divides by m_i by multiplying each r_j by the
// constant inverse of m_i mod m_j. With DRS pseudoresidues the digits come
// out in a redundant digit set v_i in [-m_i, m_i); the represented value is
// congruent to u mod M, and normalisation (see rrns_checker) or direct use
// is left to the consumer, as in the paper's Example 2.
//
// Hardware: one drs_adder in subtract mode and one drs_mult_seq per
// channel j >= 1, each wired to its own modulus; all channels work in
// parallel in every step and a small FSM sequences the K-1 steps. The
// inverses are constants computed at elaboration. All moduli share one width
// H: the DRS adder and the bit-serial multiplier are correct for any
// m < 2^H, so small moduli need no separate width.
//
// Interface: start (pulse, res_in sampled), res_in[K] (H+1 bits, DRS mod
// MOD[i]), busy, done (1-cycle pulse), digits[K] (H+1 bits, valid from done
// until the next start). Latency: done follows start by (K-1)*(H+3) clocks.
module mixed_radix_converter #(
  parameter int unsigned H = 3,
  parameter int unsigned K = 4,
  parameter int unsigned MOD [K] = '{2, 3, 5, 7}   // ascending
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [H:0] res_in [K],
  output logic       busy,
  output logic       done,
  output logic [H:0] digits [K]
);
  import drs_pkg::*;

  typedef logic [H:0] inv_t [K*K];   // entry i*K+j: inverse of m_i mod m_j
  function automatic inv_t build_inv();
    inv_t t;
    for (int i = 0; i < K; i++)
      for (int j = 0; j < K; j++)
        t[i*K+j] = (j > i) ? (H+1)'(modinv(longint'(MOD[i]), longint'(MOD[j]))) : '0;
    return t;
  endfunction
  localparam inv_t INV = build_inv();

  typedef enum logic [1:0] {S_IDLE, S_MUL, S_WAIT} state_t;
  state_t state;

  localparam int unsigned IW = $clog2(K);
  logic [IW-1:0] step;
  logic [H:0]    r    [K];
  logic [H:0]    diff [K];
  logic [H:0]    prod [K];
  logic          mdone[K];
  logic          mstart;

  assign mstart = (state == S_MUL);
  assign diff[0] = '0;
  assign prod[0] = '0;
  assign mdone[0] = 1'b0;

  for (genvar j = 1; j < K; j++) begin : g_ch
    localparam logic [H-1:0] MJ = H'(MOD[j]);
    drs_adder #(.H(H)) u_sub (
      .x(r[j]), .y(r[step]), .m(MJ), .sub(1'b1), .s(diff[j])
    );
    logic mbusy;
    drs_mult_seq #(.H(H)) u_mul (
      .clk(clk), .rst_n(rst_n), .start(mstart),
      .x(diff[j]), .y(INV[int'(step)*K+j]), .a('0), .m(MJ),
      .busy(mbusy), .done(mdone[j]), .p(prod[j])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      step  <= '0;
      done  <= 1'b0;
      for (int j = 0; j < K; j++) r[j] <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          r     <= res_in;
          step  <= '0;
          state <= S_MUL;
        end
        S_MUL:  state <= S_WAIT;
        S_WAIT: if (mdone[K-1]) begin
          for (int j = 1; j < K; j++)
            if (j > int'(step)) r[j] <= prod[j];
          if (int'(step) == K - 2) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            step  <= step + 1'b1;
            state <= S_MUL;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy   = (state != S_IDLE);
  assign digits = r;
endmodule

// rrns_checker: error detection in a redundant-modulus RNS by base extension.
//
// The RNS has K information moduli m_0 < ... < m_(K-1) with product M and
// one extra modulus m_K larger than all of them. A legitimate number x lies
// in [0, M); its extra residue is redundant and can be predicted from the
// other K. The checker
//   1. converts the K residues to redundant mixed-radix digits v_i in
//      [-m_i, m_i) (mixed_radix_converter),
//   2. normalises them to ordinary digits e_i in [0, m_i): drs_to_sru adds
//      m_i to a negative digit, which borrows 1 from the next position, and
//      a ripple of small subtractors settles the borrows (a borrow out of the
//      top position is a multiple of M and is dropped),
//   3. evaluates x = e_0 + m_0(e_1 + m_1(e_2 + ...)) mod m_K by Horner's rule
//      on one drs_mult_seq used in multiply-add mode (acc * m_i + e_i),
//   4. compares the prediction with the received extra residue using a DRS
//      subtractor: they agree when the difference is 0 or -m_K.
// A single corrupted residue moves the number out of [0, M) and is flagged.
//
// The paper gives the principle (base extension of the K residues to the
// extra modulus, then comparison) and that base extension goes through
// mixed-radix conversion; the normalisation network, the Horner evaluation
// on the multiply-add unit and the handshake are this design's.
//
// Interface: start (pulse, res_in sampled), res_in[K+1] (H+1 bits, DRS mod
// MOD[i]); done (1-cycle pulse) with err, pred (predicted extra residue,
// DRS) and mr_digits[K] (ordinary mixed-radix digits of x), all held until
// the next start. Latency: done follows start by 2*(K-1)*(H+3)+2 clocks
// ((K-1)*(H+3) for the conversion, the rest for Horner and comparison).
module rrns_checker #(
  parameter int unsigned H = 4,
  parameter int unsigned K = 4,
  parameter int unsigned MOD [K+1] = '{2, 3, 5, 7, 11}   // ascending, MOD[K] redundant
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [H:0]   res_in [K+1],
  output logic         busy,
  output logic         done,
  output logic         err,
  output logic [H:0]   pred,
  output logic [H-1:0] mr_digits [K]
);
  typedef int unsigned mods_t [K];
  function automatic mods_t info_mods();
    mods_t t;
    for (int i = 0; i < K; i++) t[i] = MOD[i];
    return t;
  endfunction
  localparam mods_t MODI = info_mods();
  localparam logic [H-1:0] MR = H'(MOD[K]);

  typedef enum logic [2:0] {S_IDLE, S_MRC, S_MUL, S_WAIT, S_CMP} state_t;
  state_t state;

  logic [H:0]    rk;                      // received redundant residue
  logic          mrc_start, mrc_busy, mrc_done;
  logic [H:0]    v [K];
  logic [H-1:0]  d [K];
  logic [H-1:0]  e [K];
  logic [H-1:0]  e_q [K];
  logic [H:0]    acc;
  logic [$clog2(K)-1:0] idx;
  logic          mstart, mbusy, mdone;
  logic [H:0]    mp, diff;

  assign mrc_start = (state == S_IDLE) && start;

  mixed_radix_converter #(.H(H), .K(K), .MOD(MODI)) u_mrc (
    .clk(clk), .rst_n(rst_n), .start(mrc_start), .res_in(res_in[0:K-1]),
    .busy(mrc_busy), .done(mrc_done), .digits(v)
  );

  // normalisation of the redundant digits
  for (genvar i = 0; i < K; i++) begin : g_norm
    drs_to_sru #(.H(H)) u_sru (.x_drs(v[i]), .m(H'(MODI[i])), .x_sru(d[i]));
  end

  always_comb begin
    logic [H+1:0] t;
    logic         bin;
    bin = 1'b0;
    for (int i = 0; i < K; i++) begin
      t = {2'b00, d[i]} - (H+2)'(bin) - (H+2)'((i > 0) ? v[i-1][H] : 1'b0);
      if (t[H+1]) begin
        t   = t + (H+2)'(MODI[i]);
        bin = 1'b1;
      end else begin
        bin = 1'b0;
      end
      e[i] = t[H-1:0];
    end
  end

  assign mstart = (state == S_MUL);
  drs_mult_seq #(.H(H)) u_horner (
    .clk(clk), .rst_n(rst_n), .start(mstart),
    .x(acc), .y((H+1)'(MODI[idx])), .a(e_q[idx]), .m(MR),
    .busy(mbusy), .done(mdone), .p(mp)
  );

  drs_adder #(.H(H)) u_cmp (.x(acc), .y(rk), .m(MR), .sub(1'b1), .s(diff));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      rk    <= '0;
      acc   <= '0;
      idx   <= '0;
      done  <= 1'b0;
      err   <= 1'b0;
      for (int i = 0; i < K; i++) e_q[i] <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          rk    <= res_in[K];
          state <= S_MRC;
        end
        S_MRC: if (mrc_done) begin
          e_q   <= e;
          acc   <= {1'b0, e[K-1]};
          idx   <= ($clog2(K))'(K - 2);
          state <= S_MUL;
        end
        S_MUL:  state <= S_WAIT;
        S_WAIT: if (mdone) begin
          acc <= mp;
          if (idx == 0) state <= S_CMP;
          else begin
            idx   <= idx - 1'b1;
            state <= S_MUL;
          end
        end
        S_CMP: begin
          err   <= !((diff == '0) || (diff == ~{1'b0, MR} + 1'b1));
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy      = (state != S_IDLE);
  assign pred      = acc;
  assign mr_digits = e_q;
endmodule

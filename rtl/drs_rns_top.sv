// drs_rns_top: DRS pseudoresidue arithmetic, three datapaths side by side.
//
//  1. Error-checked RNS unit. K information moduli plus one redundant
//     modulus (default 2, 3, 5, 7 | 11), all with (H+1)-bit DRS
//     pseudoresidues. Each channel has a drs_adder (add/subtract), a
//     drs_negate and a bit-serial drs_mult_seq. An operation writes the
//     result registers res_out; rrns_checker then base-extends the K
//     information residues to the redundant modulus and flags a mismatch,
//     mr_to_binary turns the checker's mixed-radix digits into binary,
//     and approx_crt gives the approximate magnitude/sign of the result.
//  2. One residue channel of an RNS FIR filter, modulus M, built twice on
//     the same inputs: with wide-total MAC cells (fir_channel) and with
//     BSD-encoded running totals (fir_bsd_channel). Both give the same
//     residue class; they differ in speed and cost.
//  3. A 32-bit binary adder with a DRS residue check (residue_checked_adder).
//  plus a bank of the residue converters of the same modulus M (WK-bit
//  binary to DRS by segments, table reduction of a (2h+1)-bit value, (h+1)-bit signed and h-bit
//  unsigned reduction, TRU to DRS, DRS to ordinary residue) and a
//  multioperand DRS adder of MO_N operands.
//
// The datapaths are independent and have their own ports. How they are
// grouped, the operation encoding and the handshakes are this design's
// choices; the units themselves follow the paper's descriptions.
//
// RNS unit interface: op_valid with op (0 add, 1 sub, 2 mul, 3 negate a),
// op_a/op_b[K+1]; op_ready is low while a multiply runs; res_valid pulses
// when res_out is written (1 clock after op_valid for add/sub/negate, RH+2
// clocks for multiply). chk_start starts a check of res_out; chk_done
// pulses with chk_err after the checker's latency; chk_digits and chk_bin
// (the result in binary, valid for an error-free result) follow.
// crt_frac/crt_neg are combinational from res_out.
module drs_rns_top #(
  // error-checked RNS unit
  parameter int unsigned RH   = 4,
  parameter int unsigned RK   = 4,
  parameter int unsigned RMOD [RK+1] = '{2, 3, 5, 7, 11},
  parameter int unsigned CRT_F = 8,
  // FIR channel and converter bank
  parameter int unsigned H    = 8,
  parameter int unsigned M    = 251,
  parameter int unsigned TAPS = 8,
  parameter int unsigned WK   = 32,
  parameter int unsigned MO_N = 8,
  // residue-checked binary adder
  parameter int unsigned CW   = 32,
  parameter int unsigned CH   = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  // 1. error-checked RNS unit
  input  logic            op_valid,
  input  logic [1:0]      op,
  input  logic [RH:0]     op_a [RK+1],
  input  logic [RH:0]     op_b [RK+1],
  output logic            op_ready,
  output logic            res_valid,
  output logic [RH:0]     res_out [RK+1],
  input  logic            chk_start,
  output logic            chk_done,
  output logic            chk_err,
  output logic [RH:0]     chk_pred,
  output logic [RH-1:0]   chk_digits [RK],
  output logic [RH*RK-1:0] chk_bin,
  output logic [CRT_F-1:0] crt_frac,
  output logic            crt_neg,
  // 2. FIR channel
  input  logic            fir_valid,
  input  logic [H:0]      fir_x,
  input  logic [H:0]      fir_coef [TAPS],
  output logic [H:0]      fir_y,
  output logic            fir_y_valid,
  output logic [$clog2(TAPS+1)-1:0] fir_ovf_count,
  output logic [H:0]      fir_bsd_y,
  output logic            fir_bsd_y_valid,
  output logic [$clog2(TAPS+1)-1:0] fir_bsd_corr_count,
  // converter bank (modulus M)
  input  logic [WK-1:0]   cv_word,
  output logic [H:0]      cv_word_drs,
  input  logic [2*H:0]    cv_wide,
  output logic [H:0]      cv_wide_drs,
  output logic [H-1:0]    cv_wide_sru,
  input  logic [H:0]      cv_signed,
  output logic [H:0]      cv_signed_drs,
  input  logic [H-1:0]    cv_unsigned,
  output logic [H:0]      cv_unsigned_drs,
  input  logic [H+1:0]    cv_tru,
  output logic [H:0]      cv_tru_drs,
  input  logic [H:0]      cv_ops [MO_N],
  output logic [H:0]      cv_ops_sum,
  // 3. residue-checked adder
  input  logic [CW-1:0]   ca_a,
  input  logic [CW-1:0]   ca_b,
  input  logic [CH:0]     ca_ra,
  input  logic [CH:0]     ca_rb,
  input  logic [CW-1:0]   ca_inject,
  output logic [CW-1:0]   ca_sum,
  output logic            ca_cout,
  output logic [CH:0]     ca_rsum,
  output logic            ca_err
);
  localparam int unsigned NC = RK + 1;
  localparam logic [H-1:0] MF = H'(M);

  typedef enum logic [1:0] {OP_ADD, OP_SUB, OP_MUL, OP_NEG} op_t;

  // ---------------------------------------------------------------- RNS unit
  logic [RH:0] sum_c [NC];
  logic [RH:0] neg_c [NC];
  logic [RH:0] mul_c [NC];
  logic        mdone [NC];
  logic        mbusy [NC];
  logic        mstart, mul_run;
  op_t         opc;

  assign opc    = op_t'(op);
  assign mstart = op_valid && op_ready && (opc == OP_MUL);

  for (genvar c = 0; c < NC; c++) begin : g_ch
    localparam logic [RH-1:0] MC = RH'(RMOD[c]);
    drs_adder    #(.H(RH)) u_add (.x(op_a[c]), .y(op_b[c]), .m(MC),
                                  .sub(opc == OP_SUB), .s(sum_c[c]));
    drs_negate   #(.H(RH)) u_neg (.x(op_a[c]), .m(MC), .y(neg_c[c]));
    drs_mult_seq #(.H(RH)) u_mul (.clk(clk), .rst_n(rst_n), .start(mstart),
                                  .x(op_a[c]), .y(op_b[c]), .a('0), .m(MC),
                                  .busy(mbusy[c]), .done(mdone[c]), .p(mul_c[c]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mul_run   <= 1'b0;
      res_valid <= 1'b0;
      for (int c = 0; c < NC; c++) res_out[c] <= '0;
    end else begin
      res_valid <= 1'b0;
      if (mul_run) begin
        if (mdone[0]) begin
          res_out   <= mul_c;
          res_valid <= 1'b1;
          mul_run   <= 1'b0;
        end
      end else if (op_valid) begin
        unique case (opc)
          OP_ADD, OP_SUB: begin res_out <= sum_c; res_valid <= 1'b1; end
          OP_NEG:         begin res_out <= neg_c; res_valid <= 1'b1; end
          OP_MUL:         mul_run <= 1'b1;
          default: ;
        endcase
      end
    end
  end
  assign op_ready = !mul_run;

  logic chk_busy;
  rrns_checker #(.H(RH), .K(RK), .MOD(RMOD)) u_chk (
    .clk(clk), .rst_n(rst_n), .start(chk_start), .res_in(res_out),
    .busy(chk_busy), .done(chk_done), .err(chk_err), .pred(chk_pred),
    .mr_digits(chk_digits)
  );

  typedef int unsigned imods_t [RK];
  function automatic imods_t info_mods();
    imods_t t;
    for (int i = 0; i < RK; i++) t[i] = RMOD[i];
    return t;
  endfunction
  localparam imods_t IMOD = info_mods();

  // binary value of the checked result, from its ordinary mixed-radix digits
  mr_to_binary #(.H(RH), .K(RK), .MOD(IMOD), .BW(RH * RK)) u_bin (
    .digits(chk_digits), .value(chk_bin)
  );

  approx_crt #(.H(RH), .K(RK), .MOD(IMOD), .F(CRT_F)) u_crt (
    .res(res_out[0:RK-1]), .frac(crt_frac), .neg(crt_neg)
  );

  // ------------------------------------------------------------- FIR channel
  fir_channel #(.H(H), .M(M), .TAPS(TAPS)) u_fir (
    .clk(clk), .rst_n(rst_n), .in_valid(fir_valid), .x_in(fir_x),
    .coef(fir_coef), .y_out(fir_y), .y_valid(fir_y_valid), .ovf_count(fir_ovf_count)
  );

  // the same filter with BSD-encoded intermediate pseudoresidues
  fir_bsd_channel #(.H(H), .M(M), .TAPS(TAPS)) u_fir_bsd (
    .clk(clk), .rst_n(rst_n), .in_valid(fir_valid), .x_in(fir_x),
    .coef(fir_coef), .y_out(fir_bsd_y), .y_valid(fir_bsd_y_valid),
    .corr_count(fir_bsd_corr_count)
  );

  // ---------------------------------------------------------- converter bank
  drs_reduce_wide   #(.K(WK), .H(H), .M(M)) u_cv_word (.x(cv_word), .y(cv_word_drs));
  drs_reduce_lut    #(.H(H), .M(M)) u_cv_lut (.x(cv_wide), .y(cv_wide_drs));
  drs_to_sru        #(.H(H)) u_cv_sru (.x_drs(cv_wide_drs), .m(MF), .x_sru(cv_wide_sru));
  drs_reduce_signed #(.H(H)) u_cv_sgn (.x(cv_signed), .m(MF), .y(cv_signed_drs));
  drs_from_unsigned #(.H(H)) u_cv_uns (.x(cv_unsigned), .m(MF), .y(cv_unsigned_drs));
  tru_to_drs        #(.H(H)) u_cv_tru (.y_tru(cv_tru), .m(MF), .z(cv_tru_drs));
  drs_multiop_adder #(.H(H), .N(MO_N)) u_cv_ops (.x(cv_ops), .m(MF), .s(cv_ops_sum));

  // --------------------------------------------------- residue-checked adder
  residue_checked_adder #(.W(CW), .H(CH)) u_cadd (
    .a(ca_a), .b(ca_b), .ra(ca_ra), .rb(ca_rb), .err_inject(ca_inject),
    .sum(ca_sum), .cout(ca_cout), .rsum(ca_rsum), .err(ca_err)
  );
endmodule

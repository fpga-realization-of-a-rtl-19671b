// uw_ch_est -- recursive (RLS-style) channel estimator driven by the UW.
//
// Per frequency bin k two identical recursive units run side by side:
//     P_k <- rho P_k + U_k          (reg_p, 64 complex entries)
//     r_k <- rho r_k + Y_k          (reg_r, 64 complex entries)
// and the channel estimate is H_k = r_k / P_k, i.e. a forgetting-factor
// average of Y_k / U_k.  U_k is the DFT of the UW at positions 48..63 of a
// frame (constant ROM).  rho = RHO_NUM/256 (246/256 ~ 0.96) is applied as
// x - ((256-RHO_NUM) x >>> 8).
// Initialisation from the preamble: the first two frames after clr are the
// long preambles R1, R2.  They set
//     P_k = BETA U_k,   r_k = BETA U_k H0_k,   H0_k = (R1_k + R2_k)/(2 A X_k),
// with A = 7 the preamble level; the constant BETA U_k / (2 A X_k) is a
// per-bin ROM computed at elaboration (Q12), so no run-time division is
// needed for the initial estimate.  Every later frame is an update Y.
// Output: after each update (and after the second preamble frame) the bin's
// new H_k = r_k conj(P_k) 2^FRAC / |P_k|^2, one clock after the input bin,
// saturated to OW bits.  H is on the scale of Y/U (the FFT output scale).
// The two identical units, 64-deep reg_p/reg_r, the recursions and the
// initial values with BETA = 1/(1-rho) = 25 follow the published design
// (forgetting factor 0.96).  Y is used as received: the data-subtraction
// variant of the document is not built.  Widths, FRAC and the Q12 ROM are
// this design's choices.
module uw_ch_est #(
  parameter int N_FFT   = 64,
  parameter int WI      = 16,    // input bin width
  parameter int OW      = 16,    // estimate width
  parameter int FRAC    = 4,     // fractional bits of the estimate
  parameter int RHO_NUM = 246,   // rho * 256
  parameter int BETA    = 25     // 1 / (1 - rho)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clr,        // new packet: next two frames are preambles
  input  logic                 in_valid,   // FFT bin strobe
  input  logic [5:0]           in_k,       // bin index
  input  logic signed [WI-1:0] in_re,      // bin, real
  input  logic signed [WI-1:0] in_im,      // bin, imaginary
  output logic                 init_done,  // initial estimate in place
  output logic                 upd_done,   // a full UW update frame processed (pulse)
  output logic                 out_valid,  // estimate strobe
  output logic [5:0]           out_k,      // bin index
  output logic signed [OW-1:0] out_re,     // H_k real
  output logic signed [OW-1:0] out_im      // H_k imaginary
);
  import scfde_pkg::*;

  localparam int RW = WI + 9;    // reg_r width
  localparam int PWD = 14;       // reg_p width

  // ROMs: U_k and C_k = BETA U_k / (2 PMB_AMP X_k) in Q12
  function automatic longint c_rom(input int k, input bit im);
    longint ur, ui, a, b, d, nr, ni;
    ur = longint'(uw_dft_re(k)); ui = longint'(uw_dft_im(k));
    a  = longint'(lp_dft_re(k)); b  = longint'(lp_dft_im(k));      // 8 X_k
    d  = a * a + b * b;
    // U conj(8X) * 8 / |8X|^2 = U / X
    nr = ur * a + ui * b;
    ni = ui * a - ur * b;
    if (d == 0) return 0;
    return ((im ? ni : nr) * BETA * 8 * 4096) / (2 * PMB_AMP * d);
  endfunction

  logic signed [9:0]  u_re [N_FFT];
  logic signed [9:0]  u_im [N_FFT];
  logic signed [19:0] c_re [N_FFT];
  logic signed [19:0] c_im [N_FFT];

  for (genvar k = 0; k < N_FFT; k++) begin : g_rom
    assign u_re[k] = 10'(uw_dft_re(k));
    assign u_im[k] = 10'(uw_dft_im(k));
    assign c_re[k] = 20'(c_rom(k, 1'b0));
    assign c_im[k] = 20'(c_rom(k, 1'b1));
  end

  logic signed [RW-1:0]  r_re [N_FFT];
  logic signed [RW-1:0]  r_im [N_FFT];
  logic signed [PWD-1:0] p_re [N_FFT];
  logic signed [PWD-1:0] p_im [N_FFT];

  logic [3:0] frame;
  logic [5:0] cnt;
  logic       is_pmb, first_pmb;

  assign is_pmb    = (frame < 4'd2);
  assign first_pmb = (frame == 4'd0);

  // next values of the addressed bin
  logic signed [RW-1:0]  rr, ri, rr_n, ri_n;
  logic signed [PWD-1:0] pr, pi, pr_n, pi_n;
  logic signed [RW-1:0]  ir, ii;

  function automatic logic signed [RW-1:0] decay_r(input logic signed [RW-1:0] x);
    return x - RW'((48'(x) * 48'(256 - RHO_NUM)) >>> 8);
  endfunction

  function automatic logic signed [PWD-1:0] decay_p(input logic signed [PWD-1:0] x);
    return x - PWD'((32'(x) * 32'(256 - RHO_NUM)) >>> 8);
  endfunction

  always_comb begin
    rr = r_re[in_k]; ri = r_im[in_k];
    pr = p_re[in_k]; pi = p_im[in_k];
    ir = RW'((48'(in_re) * 48'(c_re[in_k]) - 48'(in_im) * 48'(c_im[in_k])) >>> 12);
    ii = RW'((48'(in_re) * 48'(c_im[in_k]) + 48'(in_im) * 48'(c_re[in_k])) >>> 12);
    if (is_pmb) begin
      rr_n = (first_pmb ? RW'(0) : rr) + ir;
      ri_n = (first_pmb ? RW'(0) : ri) + ii;
      pr_n = PWD'(BETA * u_re[in_k]);
      pi_n = PWD'(BETA * u_im[in_k]);
    end else begin
      rr_n = decay_r(rr) + RW'(in_re);
      ri_n = decay_r(ri) + RW'(in_im);
      pr_n = decay_p(pr) + PWD'(u_re[in_k]);
      pi_n = decay_p(pi) + PWD'(u_im[in_k]);
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid && !clr) begin
      r_re[in_k] <= rr_n; r_im[in_k] <= ri_n;
      p_re[in_k] <= pr_n; p_im[in_k] <= pi_n;
    end
  end

  // division stage
  logic                  d_v;
  logic [5:0]            d_k;
  logic signed [RW-1:0]  d_rr, d_ri;
  logic signed [PWD-1:0] d_pr, d_pi;
  logic signed [63:0]    nr, ni, den, qr, qi;

  always_comb begin
    nr  = 64'(d_rr) * 64'(d_pr) + 64'(d_ri) * 64'(d_pi);
    ni  = 64'(d_ri) * 64'(d_pr) - 64'(d_rr) * 64'(d_pi);
    den = 64'(d_pr) * 64'(d_pr) + 64'(d_pi) * 64'(d_pi);
    if (den == 0) begin
      qr = '0; qi = '0;
    end else begin
      qr = (nr <<< FRAC) / den;
      qi = (ni <<< FRAC) / den;
    end
  end

  function automatic logic signed [OW-1:0] sat(input logic signed [63:0] v);
    if (v > 64'(2**(OW-1) - 1)) return OW'(2**(OW-1) - 1);
    if (v < -64'(2**(OW-1)))    return OW'(-(2**(OW-1)));
    return OW'(v);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame <= '0; cnt <= '0; d_v <= 1'b0; d_k <= '0;
      d_rr <= '0; d_ri <= '0; d_pr <= '0; d_pi <= '0;
      init_done <= 1'b0; upd_done <= 1'b0;
      out_valid <= 1'b0; out_k <= '0; out_re <= '0; out_im <= '0;
    end else begin
      d_v       <= 1'b0;
      upd_done  <= 1'b0;
      out_valid <= d_v;
      if (d_v) begin
        out_k  <= d_k;
        out_re <= sat(qr);
        out_im <= sat(qi);
      end
      if (clr) begin
        frame <= '0; cnt <= '0; init_done <= 1'b0;
      end else if (in_valid) begin
        cnt <= cnt + 1'b1;
        if (!first_pmb) begin
          d_v  <= 1'b1;
          d_k  <= in_k;
          d_rr <= rr_n; d_ri <= ri_n;
          d_pr <= pr_n; d_pi <= pi_n;
        end
        if (cnt == 6'(N_FFT - 1)) begin
          if (frame != 4'hf) frame <= frame + 1'b1;
          if (frame == 4'd1) init_done <= 1'b1;
          if (!is_pmb)       upd_done  <= 1'b1;
        end
      end
    end
  end
endmodule

// ch_eq -- combined frequency-domain channel estimation and zero-forcing
// equalisation with a single division (mul_sel, mult, half_ch, divider).
//
// Input: FFT bins (index in_k, natural order) of consecutive 64-point frames.
// The first two frames after clr are the two long preambles R1, R2; every
// later frame is data D.  Per bin k the block evaluates
//     S_k = 2 D_k |X_k|^2 / (R1_k X_k* + R2_k X_k*)
// (X_k = DFT of the known long preamble), which equals D_k / H_k.
//  * mul_sel picks the second operand of the one complex multiplier: X_k*
//    from the conj_xk ROM for preamble bins, |X_k|^2 from the abs_xk ROM for
//    data bins (both 64 entries, computed at elaboration from the preamble
//    pattern, scaled by 8 and 64 so that the scale cancels).
//  * half_ch accumulates R1 X* + R2 X* per bin in a 64-entry RAM.
//  * divider: S = (N conj(C)) 2^FRAC / |C|^2 with N = 2 D |X|^2 and C the
//    half_ch entry, a single-cycle complex division, saturated to OW bits.
// Latency: two clocks from in_valid to out_valid (data frames only).
// ch_ready goes high once both preambles are in.  The structure (one
// division, shared multiplier, two ROMs, half_ch RAM) follows the published
// design; fixed-point widths, FRAC and the single-cycle divider are this
// design's choices.
module ch_eq #(
  parameter int N_FFT = 64,
  parameter int WI    = 16,   // FFT output width
  parameter int OW    = 12,   // equalised output width
  parameter int FRAC  = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clr,        // new packet: next two frames are preambles
  input  logic                 in_valid,   // FFT bin strobe
  input  logic [5:0]           in_k,       // bin index
  input  logic signed [WI-1:0] in_re,      // bin, real
  input  logic signed [WI-1:0] in_im,      // bin, imaginary
  output logic                 ch_ready,   // channel estimate complete
  output logic                 out_valid,  // equalised bin strobe
  output logic [5:0]           out_k,      // bin index
  output logic signed [OW-1:0] out_re,     // equalised bin, real
  output logic signed [OW-1:0] out_im      // equalised bin, imaginary
);
  import scfde_pkg::*;

  localparam int PW = WI + 17;   // product width
  localparam int CW = WI + 11;   // half_ch width

  // ROMs (conj_xk, abs_xk) filled from the long-preamble DFT
  logic signed [7:0]  conj_re [N_FFT];
  logic signed [7:0]  conj_im [N_FFT];
  logic [14:0]        abs_x2  [N_FFT];

  for (genvar k = 0; k < N_FFT; k++) begin : g_rom
    localparam int XR = lp_dft_re(k);
    localparam int XI = -lp_dft_im(k);
    assign conj_re[k] = 8'(XR);
    assign conj_im[k] = 8'(XI);
    assign abs_x2[k]  = 15'(XR * XR + XI * XI);
  end

  logic [3:0]  frame;            // frames seen since clr (saturates)
  logic [5:0]  cnt;              // bins seen in the current frame
  logic        is_pmb;
  logic        first_pmb;

  assign is_pmb    = (frame < 4'd2);
  assign first_pmb = (frame == 4'd0);

  // stage 1: mul_sel + shared multiplier
  logic signed [PW-1:0] m_re, m_im;
  logic [5:0]           m_k;
  logic                 m_v, m_pmb, m_first;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame <= '0; cnt <= '0; m_v <= 1'b0; m_pmb <= 1'b0; m_first <= 1'b0;
      m_re <= '0; m_im <= '0; m_k <= '0;
    end else begin
      m_v <= 1'b0;
      if (clr) begin
        frame <= '0; cnt <= '0;
      end else if (in_valid) begin
        m_v     <= 1'b1;
        m_k     <= in_k;
        m_pmb   <= is_pmb;
        m_first <= first_pmb;
        if (is_pmb) begin
          m_re <= PW'(in_re * conj_re[in_k]) - PW'(in_im * conj_im[in_k]);
          m_im <= PW'(in_re * conj_im[in_k]) + PW'(in_im * conj_re[in_k]);
        end else begin
          m_re <= PW'(in_re * $signed({1'b0, abs_x2[in_k]})) <<< 1;
          m_im <= PW'(in_im * $signed({1'b0, abs_x2[in_k]})) <<< 1;
        end
        cnt <= cnt + 1'b1;
        if (cnt == 6'(N_FFT - 1) && frame != 4'hf) frame <= frame + 1'b1;
      end
    end
  end

  // stage 2: half_ch RAM and divider
  logic signed [CW-1:0] hc_re [N_FFT];
  logic signed [CW-1:0] hc_im [N_FFT];
  logic signed [63:0]   nr, ni, den, qr, qi;

  function automatic logic signed [OW-1:0] sat(input logic signed [63:0] v);
    if (v > 64'(2**(OW-1) - 1)) return OW'(2**(OW-1) - 1);
    if (v < -64'(2**(OW-1)))    return OW'(-(2**(OW-1)));
    return OW'(v);
  endfunction

  always_comb begin
    // N conj(C) and |C|^2
    nr  = 64'(m_re) * 64'(hc_re[m_k]) + 64'(m_im) * 64'(hc_im[m_k]);
    ni  = 64'(m_im) * 64'(hc_re[m_k]) - 64'(m_re) * 64'(hc_im[m_k]);
    den = 64'(hc_re[m_k]) * 64'(hc_re[m_k]) + 64'(hc_im[m_k]) * 64'(hc_im[m_k]);
    if (den == 0) begin
      qr = '0; qi = '0;
    end else begin
      qr = (nr <<< FRAC) / den;
      qi = (ni <<< FRAC) / den;
    end
  end

  always_ff @(posedge clk) begin
    if (m_v && m_pmb) begin
      hc_re[m_k] <= (m_first ? CW'(0) : hc_re[m_k]) + CW'(m_re);
      hc_im[m_k] <= (m_first ? CW'(0) : hc_im[m_k]) + CW'(m_im);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_k <= '0; out_re <= '0; out_im <= '0; ch_ready <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (clr) ch_ready <= 1'b0;
      else if (m_v && m_pmb && !m_first && m_k == 6'(N_FFT - 1)) ch_ready <= 1'b1;
      if (m_v && !m_pmb) begin
        out_valid <= 1'b1;
        out_k     <= m_k;
        out_re    <= sat(qr);
        out_im    <= sat(qi);
      end
    end
  end
endmodule

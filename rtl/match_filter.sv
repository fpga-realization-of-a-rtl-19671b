// match_filter -- receive matched filter: 32-tap root-raised-cosine FIR on I
// and Q at four samples per symbol.
//
// Direct form: each input sample shifts a 32-deep delay line and one output
// sample, sum(h[n] x[k-n]) >> SHIFT saturated to W bits, follows one clock
// later with out_valid.  The taps are the transmit pulse (scfde_pkg::rrc_coef,
// symmetric, so the filter is matched).  The document gives only the filter's
// function; direct form, scaling and saturation are this design's choices.
// clr empties the delay line.
module match_filter #(
  parameter int W     = 12,
  parameter int TAPS  = 32,
  parameter int SHIFT = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clr,        // empty the delay line
  input  logic                in_valid,   // sample strobe
  input  logic signed [W-1:0] in_i,       // sample I
  input  logic signed [W-1:0] in_q,       // sample Q
  output logic                out_valid,  // filtered sample strobe
  output logic signed [W-1:0] out_i,      // filtered I
  output logic signed [W-1:0] out_q       // filtered Q
);
  import scfde_pkg::*;
  localparam int AW = W + 15;

  logic signed [W-1:0] dl_i [TAPS];
  logic signed [W-1:0] dl_q [TAPS];
  logic signed [AW-1:0] acc_i, acc_q;

  function automatic logic signed [W-1:0] sat(input logic signed [AW-1:0] v);
    if (v > AW'(2**(W-1) - 1))  return W'(2**(W-1) - 1);
    if (v < -AW'(2**(W-1)))     return W'(-(2**(W-1)));
    return W'(v);
  endfunction

  // the newest sample is in_i; dl_* holds the previous TAPS-1
  always_comb begin
    acc_i = AW'(rrc_coef(0)) * AW'(in_i);
    acc_q = AW'(rrc_coef(0)) * AW'(in_q);
    for (int n = 1; n < TAPS; n++) begin
      acc_i += AW'(rrc_coef(n)) * AW'(dl_i[n-1]);
      acc_q += AW'(rrc_coef(n)) * AW'(dl_q[n-1]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int n = 0; n < TAPS; n++) begin dl_i[n] <= '0; dl_q[n] <= '0; end
      out_valid <= 1'b0; out_i <= '0; out_q <= '0;
    end else begin
      out_valid <= 1'b0;
      if (clr) begin
        for (int n = 0; n < TAPS; n++) begin dl_i[n] <= '0; dl_q[n] <= '0; end
      end else if (in_valid) begin
        dl_i[0] <= in_i;
        dl_q[0] <= in_q;
        for (int n = 1; n < TAPS; n++) begin dl_i[n] <= dl_i[n-1]; dl_q[n] <= dl_q[n-1]; end
        out_valid <= 1'b1;
        out_i <= sat(acc_i >>> SHIFT);
        out_q <= sat(acc_q >>> SHIFT);
      end
    end
  end
endmodule

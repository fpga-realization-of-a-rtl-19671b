// rrc_polyphase -- upsample-by-4 root-raised-cosine interpolator in polyphase
// form (roll-off 0.25, 32 taps = 4 phases x 8 taps).
//
// Every SYM_CLKS clocks the filter asks for a symbol (in_req); it takes the
// offered symbol if in_valid, or a zero symbol otherwise, so the output
// waveform runs on without gaps.  The symbol enters an 8-deep delay line and
// the four polyphase branches h_p[k] = h[4k+p] are evaluated one per
// SYM_CLKS/4 clocks, each with all eight multiply-accumulates in one clock as
// in the published design.  Output: 10-bit I/Q samples for the DAC (the sum
// shifted right by 3 and saturated), out_valid once per sample, i.e. four
// samples per symbol.  Coefficient values and output scaling are this
// design's own (scfde_pkg::rrc_coef).
module rrc_polyphase #(
  parameter int L        = 4,
  parameter int TAPS     = 32,
  parameter int SYM_CLKS = 16,
  parameter int OUT_W    = 10,
  parameter int SHIFT    = 3
) (
  input  logic                    clk,
  input  logic                    rst_n,
  output logic                    in_req,     // filter takes a symbol now
  input  logic                    in_valid,   // a symbol is offered
  input  logic signed [3:0]       in_i,       // symbol I
  input  logic signed [3:0]       in_q,       // symbol Q
  output logic                    out_valid,  // output sample strobe
  output logic signed [OUT_W-1:0] out_i,      // shaped sample I
  output logic signed [OUT_W-1:0] out_q       // shaped sample Q
);
  import scfde_pkg::*;
  localparam int NB   = TAPS / L;          // taps per branch
  localparam int STEP = SYM_CLKS / L;      // clocks per output sample

  logic signed [3:0] dl_i [NB];
  logic signed [3:0] dl_q [NB];
  logic [$clog2(SYM_CLKS)-1:0] tick;
  logic [$clog2(L)-1:0]        phase;
  logic signed [17:0] acc_i, acc_q;

  assign in_req = (tick == 0);

  function automatic logic signed [OUT_W-1:0] sat(input logic signed [17:0] v);
    if (v > 18'(2**(OUT_W-1) - 1))  return OUT_W'(2**(OUT_W-1) - 1);
    if (v < -18'(2**(OUT_W-1)))     return OUT_W'(-(2**(OUT_W-1)));
    return OUT_W'(v);
  endfunction

  // one polyphase branch: all NB products summed in one clock
  always_comb begin
    acc_i = '0;
    acc_q = '0;
    for (int k = 0; k < NB; k++) begin
      acc_i += 18'(rrc_coef(L * k + int'(phase))) * 18'(dl_i[k]);
      acc_q += 18'(rrc_coef(L * k + int'(phase))) * 18'(dl_q[k]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tick <= '0; phase <= '0;
      for (int k = 0; k < NB; k++) begin dl_i[k] <= '0; dl_q[k] <= '0; end
      out_valid <= 1'b0; out_i <= '0; out_q <= '0;
    end else begin
      out_valid <= 1'b0;
      tick <= (int'(tick) == SYM_CLKS - 1) ? '0 : tick + 1'b1;
      if (tick == 0) begin
        for (int k = NB - 1; k > 0; k--) begin
          dl_i[k] <= dl_i[k-1]; dl_q[k] <= dl_q[k-1];
        end
        dl_i[0] <= in_valid ? in_i : 4'sd0;
        dl_q[0] <= in_valid ? in_q : 4'sd0;
        phase   <= '0;
      end else if ((int'(tick) % STEP) == 1) begin
        out_valid <= 1'b1;
        out_i <= sat(acc_i >>> SHIFT);
        out_q <= sat(acc_q >>> SHIFT);
        phase <= phase + 1'b1;
      end
    end
  end
endmodule

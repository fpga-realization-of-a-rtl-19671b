// uw_sync -- Unique-Word based frame synchroniser.
//
// An 80-symbol window of the symbol stream is kept in a shift register.  On
// every input symbol the 16 newest and the 16 oldest entries of the window
// (64 symbols apart) are conjugate-multiplied and summed,
//     c = sum_m new[m] * conj(old[m]),  m = 0..15,
// and |Re c| + |Im c| is the match metric.  Two consecutive UWs at both
// ends of the window give the largest value; because every UW pair is 64
// symbols apart, the metric falls off linearly (a triangle of +-16 symbols)
// around that position, so a plain threshold fires too early.  The block
// therefore takes the peak: a match is declared on the symbol after the
// metric exceeded THR and stopped rising.  One extra register stage (81 in
// total) keeps the window of the peak available at that moment, so the 64
// oldest symbols of the peak window (one UW followed by its 48 data
// symbols, a cyclic rotation of the FFT frame) are exactly the frame.  The
// frame switch passes these 64 symbols: the oldest entry goes to the output
// on each of the next 64 input strobes (the matching strobe included), with
// frame_start on the first.  No new match is accepted while a frame is being
// passed, nor before the window has been filled since enable rose.
// Interface: in_valid/in_i/in_q symbol stream (any rate, one symbol per
// strobe); out_* registered (one clock after the strobe).
// The 80-symbol correlation window, the 16 x 16 UW correlation with a
// threshold and the 64-symbol switch follow the published design; the
// |Re|+|Im| metric, the peak picking with the extra stage, THR and the
// hold-off rules are this design's choices.
module uw_sync #(
  parameter int W   = 12,
  parameter int LEN = 80,          // shift register length
  parameter int NUW = 16,          // UW length
  parameter int NFR = 64,          // frame length
  parameter longint THR = 5000000  // match threshold on |Re c| + |Im c|
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clr,          // clear the register and the switch
  input  logic                enable,       // allow matches
  input  logic                in_valid,     // symbol strobe
  input  logic signed [W-1:0] in_i,         // symbol I
  input  logic signed [W-1:0] in_q,         // symbol Q
  output logic                match,        // UW pair found (combinational, on the strobe)
  output logic                frame_start,  // first symbol of a passed frame
  output logic                out_valid,    // passed frame symbol strobe
  output logic signed [W-1:0] out_i,        // frame symbol I
  output logic signed [W-1:0] out_q         // frame symbol Q
);
  // sr_*[0] is the oldest entry, sr_*[LEN] the newest; the metric uses the
  // newest LEN entries, sr_*[0..LEN-1] is the window of the previous strobe
  logic signed [W-1:0] sr_i [LEN+1];
  logic signed [W-1:0] sr_q [LEN+1];
  logic [6:0]          left;       // symbols of the current frame still to pass
  logic [6:0]          fill;       // symbols shifted in since enable rose
  logic [2*W+6:0]      prev;       // metric of the previous window

  logic signed [2*W+5:0] c_re, c_im;
  logic [2*W+6:0]        metric;

  always_comb begin
    c_re = '0; c_im = '0;
    for (int m = 0; m < NUW; m++) begin
      c_re += (2*W+6)'(sr_i[LEN+1-NUW+m] * sr_i[m+1]) + (2*W+6)'(sr_q[LEN+1-NUW+m] * sr_q[m+1]);
      c_im += (2*W+6)'(sr_q[LEN+1-NUW+m] * sr_i[m+1]) - (2*W+6)'(sr_i[LEN+1-NUW+m] * sr_q[m+1]);
    end
    metric = (2*W+7)'(c_re < 0 ? -c_re : c_re) + (2*W+7)'(c_im < 0 ? -c_im : c_im);
  end

  assign match = enable && (int'(fill) > LEN) && (longint'(prev) > THR) && (metric <= prev);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int n = 0; n <= LEN; n++) begin sr_i[n] <= '0; sr_q[n] <= '0; end
      fill <= '0; prev <= '0;
      left <= '0; out_valid <= 1'b0; frame_start <= 1'b0; out_i <= '0; out_q <= '0;
    end else begin
      out_valid   <= 1'b0;
      frame_start <= 1'b0;
      if (clr) begin
        for (int n = 0; n <= LEN; n++) begin sr_i[n] <= '0; sr_q[n] <= '0; end
        left <= '0; fill <= '0; prev <= '0;
      end else if (in_valid) begin
        for (int n = 0; n < LEN; n++) begin
          sr_i[n] <= sr_i[n+1];
          sr_q[n] <= sr_q[n+1];
        end
        sr_i[LEN] <= in_i;
        sr_q[LEN] <= in_q;
        prev      <= metric;
        if (!enable)           fill <= '0;
        else if (fill != 7'h7f) fill <= fill + 1'b1;
        if (left != 0 || (match && left == 0)) begin
          out_valid   <= 1'b1;
          out_i       <= sr_i[0];
          out_q       <= sr_q[0];
          frame_start <= (left == 0);
          left        <= (left == 0) ? 7'(NFR - 1) : left - 1'b1;
        end
      end
    end
  end
endmodule

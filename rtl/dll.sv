// dll -- modified delay-locked loop for symbol timing recovery
// (dll_par + dll_algo + dll_count), 4 samples per symbol in, 1 out.
//
// A detection set is three consecutive matched-filter samples: early d1,
// on-time d2, late d3.  One clock after the late sample arrives, dll_par
// forms three flags from the I rail:
//   d2_near_amp        THR_LO < |d2| < THR_HI (on-time sample at a correct level)
//   d3_d1_GT_diff      |d3 - d1| > DIFF (the set lies on a slope)
//   sign_d2_EQ_d3_d1   sign(d2) = sign(d3 - d1)  (on-time is early)
// dll_algo then picks the output and the hop to the next on-time sample:
//   d2_near_amp                 -> output d2, hop 4 (on time)
//   otherwise, on a slope       -> output d3 and hop 5 if early,
//                                  output d1 and hop 3 if late
//   otherwise (flat, off level) -> output d3, hop 5
// i.e. a set whose on-time sample is far from the known preamble level is
// shifted by one sample, in the direction of the early/late statistic.
// Inside a run of equal preamble symbols every sampling phase looks alike,
// but at a symbol change only the peak phase stays at the known level
// (about 820 after the matched filter for the +-7 preamble), so wrong
// phases are pushed away until the peak phase is found.
// dll_count counts consecutive on-time decisions; after LOCK_CNT (20) the
// loop is locked and simply takes every 4th sample.  The first on-time
// sample after clr is the second sample received (arbitrary, as published).
// The flags, the flow and the lock rule follow the published description;
// the two-sided level test, THR_LO/THR_HI, DIFF and the use of the I rail
// are this design's choices.
module dll #(
  parameter int W        = 12,
  parameter int OSR      = 4,
  parameter int LOCK_CNT = 20,
  parameter int THR_LO   = 640,
  parameter int THR_HI   = 1000,
  parameter int DIFF     = 160
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clr,        // restart tracking
  input  logic                in_valid,   // oversampled input strobe
  input  logic signed [W-1:0] in_i,       // sample I
  input  logic signed [W-1:0] in_q,       // sample Q
  output logic                out_valid,  // symbol strobe
  output logic signed [W-1:0] out_i,      // symbol I
  output logic signed [W-1:0] out_q,      // symbol Q
  output logic                locked,     // tracking finished
  output logic [1:0]          last_hop    // 0: hop 3, 1: hop 4, 2: hop 5 (last decision)
);
  logic signed [W-1:0] d1_i, d1_q, d2_i, d2_q;   // previous two samples
  logic [2:0]          wait_cnt;                 // samples until the next late sample
  logic [$clog2(LOCK_CNT+1)-1:0] ontime;

  // dll_par: detection-set relations (current input is the late sample d3)
  logic signed [W:0] diff;
  logic [W:0]        adiff;
  logic [W-1:0]      a2;
  logic              d2_near_amp, d3_d1_GT_diff, sign_d2_EQ_d3_d1;

  always_comb begin
    diff  = (W+1)'(in_i) - (W+1)'(d1_i);
    adiff = diff[W] ? (W+1)'(-diff) : (W+1)'(diff);
    a2    = d2_i[W-1] ? W'(-d2_i) : W'(d2_i);
    d2_near_amp      = int'(a2) > THR_LO && int'(a2) < THR_HI;
    d3_d1_GT_diff    = int'(adiff) > DIFF;
    sign_d2_EQ_d3_d1 = (d2_i[W-1] == diff[W]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d1_i <= '0; d1_q <= '0; d2_i <= '0; d2_q <= '0;
      wait_cnt <= 3'd2; ontime <= '0; locked <= 1'b0;
      out_valid <= 1'b0; out_i <= '0; out_q <= '0; last_hop <= 2'd1;
    end else begin
      out_valid <= 1'b0;
      if (clr) begin
        d1_i <= '0; d1_q <= '0; d2_i <= '0; d2_q <= '0;
        wait_cnt <= 3'd2; ontime <= '0; locked <= 1'b0; last_hop <= 2'd1;
      end else if (in_valid) begin
        d1_i <= d2_i; d1_q <= d2_q;
        d2_i <= in_i; d2_q <= in_q;
        if (wait_cnt > 3'd1) begin
          wait_cnt <= wait_cnt - 3'd1;
        end else begin
          // dll_algo: decide on the set (d1, d2, in)
          out_valid <= 1'b1;
          if (locked || d2_near_amp) begin
            out_i <= d2_i; out_q <= d2_q;
            wait_cnt <= 3'(OSR);
            last_hop <= 2'd1;
            if (!locked) begin
              if (int'(ontime) == LOCK_CNT - 1) locked <= 1'b1;
              ontime <= ontime + 1'b1;
            end
          end else begin
            ontime <= '0;
            if (sign_d2_EQ_d3_d1 || !d3_d1_GT_diff) begin
              out_i <= in_i; out_q <= in_q;
              wait_cnt <= 3'(OSR + 1);
              last_hop <= 2'd2;
            end else begin
              out_i <= d1_i; out_q <= d1_q;
              wait_cnt <= 3'(OSR - 1);
              last_hop <= 2'd0;
            end
          end
        end
      end
    end
  end
endmodule

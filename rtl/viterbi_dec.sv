// viterbi_dec -- hard-decision Viterbi decoder for the rate 1/3, K = 5
// convolutional code (BMG, 16 ACS units, trace-back unit).
//
// The serial coded stream is grouped into triplets (g0, g1, g2).  For each
// triplet:
//  * BMG: eight branch-metric units give the Hamming distance of the
//    received triplet to each of the eight code words 000..111.
//  * ACS: for every state j = {u, s0, s1, s2} the two predecessors
//    {s0, s1, s2, b}, b = 0/1, are extended by the metric of their code word
//    (from the encoder equations); the smaller sum becomes the new path
//    metric and b is stored as survivor bit.  Metrics are renormalised by
//    subtracting the previous minimum.
//  * TBU: survivors go into a 16 x 32 register array (circular).  Once
//    TB_DEPTH = 25 triplets are stored, each new triplet releases one
//    decoded bit, found by tracing back 25 steps from the best state.
// flush (after the last triplet) releases the remaining bits, one per clock,
// from the final trace-back.  pkt_start resets the metrics to state 0.
// Structure and sizes follow the published decoder; the renormalisation,
// the combinational trace-back and the flush are this design's choices.
module viterbi_dec #(
  parameter int TB_DEPTH = 25,
  parameter int SURV_LEN = 32,
  parameter int PM_W     = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic pkt_start,    // reset metrics and history
  input  logic in_valid,     // coded bit strobe
  input  logic in_bit,       // coded bit (g0, g1, g2 order)
  input  logic flush,        // release the bits still in the trace-back window
  output logic out_valid,    // decoded bit strobe
  output logic out_bit       // decoded bit
);
  import scfde_pkg::*;
  localparam int NS = 16;
  localparam int CA = $clog2(SURV_LEN);

  logic [1:0]       nbit;
  logic [1:0]       rx2;            // first two bits of the triplet
  logic [2:0]       rx;             // complete triplet {g2,g1,g0}
  logic             step;

  logic [PM_W-1:0]  pm [NS];
  logic [NS-1:0]    surv [SURV_LEN];
  logic [CA-1:0]    wcol;           // next column to write
  logic [15:0]      nsteps;         // triplets seen

  // BMG
  logic [1:0]       bm [8];
  // ACS
  logic [PM_W-1:0]  pm_new [NS];
  logic [NS-1:0]    dec;
  logic [PM_W-1:0]  pm_min;
  logic [3:0]       best;

  assign rx   = {in_bit, rx2[1], rx2[0]};
  assign step = in_valid && (nbit == 2'd2);

  always_comb begin
    for (int c = 0; c < 8; c++)
      bm[c] = 2'(rx[0] ^ c[0]) + 2'(rx[1] ^ c[1]) + 2'(rx[2] ^ c[2]);
  end

  always_comb begin
    pm_min = pm[0];
    best   = 4'd0;
    for (int s = 1; s < NS; s++)
      if (pm[s] < pm_min) begin pm_min = pm[s]; best = 4'(s); end
    for (int j = 0; j < NS; j++) begin
      automatic logic [3:0]      p0 = 4'((j << 1) & 15);
      automatic logic [3:0]      p1 = 4'(((j << 1) & 15) | 1);
      automatic logic            u  = 1'(j >> 3);
      automatic logic [PM_W-1:0] c0 = pm[p0] - pm_min + PM_W'(bm[conv_out(u, p0)]);
      automatic logic [PM_W-1:0] c1 = pm[p1] - pm_min + PM_W'(bm[conv_out(u, p1)]);
      dec[j]    = (c1 < c0);
      pm_new[j] = (c1 < c0) ? c1 : c0;
    end
  end

  // TBU: trace back `depth` steps from state `st` starting at column `col`
  function automatic logic [3:0] trace(input logic [3:0] st, input logic [CA-1:0] col,
                                       input int depth);
    logic [3:0]    s = st;
    logic [CA-1:0] c = col;
    for (int m = 0; m < SURV_LEN; m++) begin
      if (m < depth) begin
        s = {s[2:0], surv[c][s]};
        c = c - 1'b1;
      end
    end
    return s;
  endfunction

  logic [3:0]    tb_state;
  logic          flushing;
  logic [5:0]    fl_left;       // bits still to release
  logic [3:0]    fl_best;
  logic [CA-1:0] fl_col;
  logic [3:0]    fl_state;
  logic [3:0]    best_new;
  logic [PM_W-1:0] bmin_new;

  // best state after this step (for the trace-back that starts at wcol)
  always_comb begin
    bmin_new = pm_new[0];
    best_new = 4'd0;
    for (int s = 1; s < NS; s++)
      if (pm_new[s] < bmin_new) begin bmin_new = pm_new[s]; best_new = 4'(s); end
  end

  // trace from the best state through the survivors of this step (dec) and
  // TB_DEPTH-1 stored columns: gives the state TB_DEPTH steps back
  always_comb begin
    tb_state = trace({best_new[2:0], dec[best_new]}, wcol - 1'b1, TB_DEPTH - 1);
    fl_state = trace(fl_best, fl_col, int'(fl_left) - 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nbit <= '0; rx2 <= '0; wcol <= '0; nsteps <= '0;
      for (int s = 0; s < NS; s++) pm[s] <= (s == 0) ? '0 : PM_W'(32);
      for (int c = 0; c < SURV_LEN; c++) surv[c] <= '0;
      out_valid <= 1'b0; out_bit <= 1'b0;
      flushing <= 1'b0; fl_left <= '0; fl_best <= '0; fl_col <= '0;
    end else begin
      out_valid <= 1'b0;
      if (pkt_start) begin
        nbit <= '0; wcol <= '0; nsteps <= '0; flushing <= 1'b0;
        for (int s = 0; s < NS; s++) pm[s] <= (s == 0) ? '0 : PM_W'(32);
      end else begin
        if (in_valid) begin
          if (nbit == 2'd2) nbit <= '0;
          else begin
            nbit <= nbit + 1'b1;
            rx2[nbit[0]] <= in_bit;
          end
        end
        if (step) begin
          for (int s = 0; s < NS; s++) pm[s] <= pm_new[s];
          surv[wcol] <= dec;
          wcol       <= wcol + 1'b1;
          nsteps     <= nsteps + 1'b1;
          if (int'(nsteps) >= TB_DEPTH) begin
            out_valid <= 1'b1;
            out_bit   <= tb_state[3];
          end
        end
        if (flush && !flushing) begin
          flushing <= 1'b1;
          fl_best  <= best;
          fl_col   <= wcol - 1'b1;
          fl_left  <= (int'(nsteps) < TB_DEPTH) ? 6'(nsteps) : 6'(TB_DEPTH);
        end else if (flushing && fl_left != 0) begin
          out_valid <= 1'b1;
          out_bit   <= fl_state[3];
          fl_left   <= fl_left - 1'b1;
        end
      end
    end
  end
endmodule

// freq_sync -- carrier frequency offset estimation (freq_est) and
// compensation (freq_comp) on the symbol-rate stream after timing recovery.
//
// Symbols are counted from 0 after clr (the first symbol after packet
// detection).  freq_est correlates short preambles FIRST_PMB .. FIRST_PMB+
// N_EST with their successors: z_i = sum_n r_n conj(r_{n+D}) over D = 16
// symbols, four times, using a 16-deep symbol delay line.  Each z_i goes
// through a CORDIC (atan2); the four angles are summed.  Averaging (/4,
// dropping two LSBs) and the division by D give the phase step per symbol,
// -w = sum/64.  freq_comp multiplies every symbol from index START (160, the
// first symbol after the short preambles) onward by e^{j*phi_n}, phi_n =
// n*sum/64, with a CORDIC rotator; phi is accumulated with six extra
// fraction bits so that the per-symbol step keeps full precision.  Outputs
// (from symbol START on) follow their input after ITER+2 clocks.
// est_done rises when the estimate is ready; freq_sum is the angle sum
// (65536 = one turn).  The use of preambles 3..7 and the shift-based
// averaging follow the published design; CORDIC arithmetic and the sign
// convention (offset removed) are this design's.
module freq_sync #(
  parameter int W         = 12,
  parameter int D         = 16,
  parameter int N_EST     = 4,
  parameter int FIRST_PMB = 2,
  parameter int START     = 160
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clr,        // new packet: restart counting
  input  logic                in_valid,   // symbol strobe
  input  logic signed [W-1:0] in_i,       // symbol I
  input  logic signed [W-1:0] in_q,       // symbol Q
  output logic                est_done,   // frequency estimate ready
  output logic signed [17:0]  freq_sum,   // sum of the four correlation angles
  output logic                out_valid,  // compensated symbol strobe
  output logic signed [W-1:0] out_i,      // compensated symbol I
  output logic signed [W-1:0] out_q       // compensated symbol Q
);
  localparam int CW = 2 * W + 6;          // correlation width
  localparam int E0 = (FIRST_PMB + 1) * D;
  localparam int E1 = (FIRST_PMB + 1 + N_EST) * D;

  logic [15:0]         idx;               // symbol index since clr
  logic signed [W-1:0] dl_i [D];
  logic signed [W-1:0] dl_q [D];
  logic signed [CW-1:0] z_re, z_im;
  logic signed [2*W:0]  p_re, p_im;
  logic                 z_valid;
  logic [2:0]           n_ang;
  logic                 ang_valid;
  logic signed [15:0]   ang;
  logic [21:0]          phase_acc;
  logic [CW+1:0]        unused_mag;
  logic                 unused_tag0, unused_tag1;

  // r_{n} conj(r_{n+D}) with r_n = oldest entry, r_{n+D} = current input
  always_comb begin
    p_re = (2*W+1)'(dl_i[D-1] * in_i) + (2*W+1)'(dl_q[D-1] * in_q);
    p_im = (2*W+1)'(dl_q[D-1] * in_i) - (2*W+1)'(dl_i[D-1] * in_q);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx <= '0; z_re <= '0; z_im <= '0; z_valid <= 1'b0;
      for (int k = 0; k < D; k++) begin dl_i[k] <= '0; dl_q[k] <= '0; end
    end else begin
      z_valid <= 1'b0;
      if (clr) begin
        idx <= '0; z_re <= '0; z_im <= '0;
      end else if (in_valid) begin
        dl_i[0] <= in_i; dl_q[0] <= in_q;
        for (int k = 1; k < D; k++) begin dl_i[k] <= dl_i[k-1]; dl_q[k] <= dl_q[k-1]; end
        if (idx != 16'hffff) idx <= idx + 1'b1;
        if (int'(idx) >= E0 && int'(idx) < E1) begin
          if ((int'(idx) % D) == D - 1) begin
            z_re    <= z_re + CW'(p_re);     // hand the finished sum to the CORDIC
            z_im    <= z_im + CW'(p_im);
            z_valid <= 1'b1;
          end else if ((int'(idx) % D) == 0) begin
            z_re <= CW'(p_re);
            z_im <= CW'(p_im);
          end else begin
            z_re <= z_re + CW'(p_re);
            z_im <= z_im + CW'(p_im);
          end
        end
      end
    end
  end

  cordic_vec #(.W(CW), .TAG_W(1)) u_atan (
    .clk, .rst_n, .in_valid(z_valid), .in_x(z_re), .in_y(z_im), .in_tag(1'b0),
    .out_valid(ang_valid), .out_angle(ang), .out_mag(unused_mag), .out_tag(unused_tag0)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_ang <= '0; freq_sum <= '0; est_done <= 1'b0;
    end else if (clr) begin
      n_ang <= '0; freq_sum <= '0; est_done <= 1'b0;
    end else if (ang_valid && !est_done) begin
      freq_sum <= freq_sum + 18'(ang);
      if (int'(n_ang) == N_EST - 1) est_done <= 1'b1;
      n_ang <= n_ang + 1'b1;
    end
  end

  // freq_comp: rotate symbols from START on by phi_n = n * freq_sum / 64
  logic comp_v;
  assign comp_v = in_valid && !clr && (int'(idx) >= START);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) phase_acc <= '0;
    else if (clr) phase_acc <= '0;
    else if (comp_v) phase_acc <= phase_acc + 22'(freq_sum);
  end

  cordic_rot #(.W(W), .TAG_W(1)) u_rot (
    .clk, .rst_n, .in_valid(comp_v), .in_x(in_i), .in_y(in_q),
    .in_angle(phase_acc[21:6]), .in_tag(1'b0),
    .out_valid, .out_x(out_i), .out_y(out_q), .out_tag(unused_tag1)
  );
endmodule

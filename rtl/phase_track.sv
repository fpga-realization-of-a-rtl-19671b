// phase_track -- Unique-Word based phase offset tracker
// (UW_sw, acc_ph_err_comp, UW_ph_err_est, rot_val).
//
// Input: equalised time-domain frames of 64 symbols (48 data, then 16 UW)
// from the IFFT.  For frame n:
//  1. acc_ph_err_comp: every symbol is de-rotated by the accumulated phase
//     Theta_{n-1} (CORDIC rotator A) as it arrives.
//  2. UW_sw sends data symbols to a 48-entry buffer and UW symbols to
//     UW_ph_err_est, which removes the known UW (multiplication by its
//     conjugate sign pattern), takes each symbol's angle (CORDIC) and
//     averages the 16 angles: dTheta_n = sum >> 4.
//  3. rot_val: the buffered data symbols are read out (one per OUT_GAP
//     clocks) and de-rotated by rot_k = dTheta_n * kk / 56 (CORDIC rotator
//     B), where kk = 24 for rot_mode = 0 (constant rule dTheta*48/112) and
//     kk = k+1 for rot_mode = 1 (per-symbol rule dTheta*2k/112).
//  4. Theta_n = Theta_{n-1} + dTheta_n.
// Compensation of the accumulated phase proceeds while the new phase error is
// still being estimated, as in the published design.  Output: the 48 data
// symbols of each frame, in order, starting about 40 clocks after the last
// UW symbol.  Frames must be at least 48*OUT_GAP+40 clocks apart.  Angles are
// 16-bit fractions of a turn.  The averaging of per-symbol angles and both
// rotation rules follow the published algorithm; CORDICs, the constant
// 1/56 as 37450/2^21 and the pacing are this design's choices.
module phase_track #(
  parameter int W       = 12,
  parameter int N_DATA  = 48,
  parameter int N_UW    = 16,
  parameter int OUT_GAP = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clr,         // new packet: Theta = 0
  input  logic                rot_mode,    // 0: constant rule, 1: per-symbol rule
  input  logic                in_valid,    // equalised symbol strobe
  input  logic signed [W-1:0] in_re,       // symbol, real
  input  logic signed [W-1:0] in_im,       // symbol, imaginary
  output logic                out_valid,   // corrected data symbol strobe
  output logic signed [W-1:0] out_re,      // corrected data symbol, real
  output logic signed [W-1:0] out_im,      // corrected data symbol, imaginary
  output logic                frame_done,  // pulse: dTheta of a frame is known
  output logic signed [15:0]  dtheta,      // last frame's phase error
  output logic signed [15:0]  theta        // accumulated phase
);
  import scfde_pkg::*;
  localparam int N = N_DATA + N_UW;

  logic [5:0] in_idx;

  // ---------------------------------------------- rotator A: -Theta_{n-1}
  logic                a_v;
  logic signed [W-1:0] a_re, a_im;
  logic [5:0]          a_idx;

  cordic_rot #(.W(W), .TAG_W(6)) u_rot_acc (
    .clk, .rst_n, .in_valid(in_valid && !clr), .in_x(in_re), .in_y(in_im),
    .in_angle(-theta), .in_tag(in_idx),
    .out_valid(a_v), .out_x(a_re), .out_y(a_im), .out_tag(a_idx)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                in_idx <= '0;
    else if (clr)              in_idx <= '0;
    else if (in_valid)         in_idx <= (int'(in_idx) == N - 1) ? '0 : in_idx + 1'b1;
  end

  // ------------------------------------------------------------- UW_sw
  logic signed [W-1:0] buf_re [N_DATA];
  logic signed [W-1:0] buf_im [N_DATA];
  logic                u_v;
  logic signed [W+1:0] u_re, u_im;
  logic [3:0]          uw_j;
  logic                ua, ub;

  assign uw_j = 4'(int'(a_idx) - N_DATA);
  assign ua   = UW_PAT_I[uw_j];
  assign ub   = UW_PAT_Q[uw_j];

  always_ff @(posedge clk) begin
    if (a_v && int'(a_idx) < N_DATA) begin
      buf_re[a_idx] <= a_re;
      buf_im[a_idx] <= a_im;
    end
  end

  // multiply the received UW symbol by conj(uw), uw = a + jb, a, b = +-1
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      u_v <= 1'b0; u_re <= '0; u_im <= '0;
    end else begin
      u_v <= a_v && (int'(a_idx) >= N_DATA);
      u_re <= (ua ? (W+2)'(a_re) : -(W+2)'(a_re)) + (ub ? (W+2)'(a_im) : -(W+2)'(a_im));
      u_im <= (ua ? (W+2)'(a_im) : -(W+2)'(a_im)) - (ub ? (W+2)'(a_re) : -(W+2)'(a_re));
    end
  end

  // ------------------------------------------------------- UW_ph_err_est
  logic               e_v, e_tag;
  logic signed [15:0] e_ang;
  logic [W+3:0]       e_mag;
  logic [4:0]         n_uw;
  logic signed [19:0] ang_sum;

  cordic_vec #(.W(W+2), .TAG_W(1)) u_atan (
    .clk, .rst_n, .in_valid(u_v), .in_x(u_re), .in_y(u_im), .in_tag(1'b0),
    .out_valid(e_v), .out_angle(e_ang), .out_mag(e_mag), .out_tag(e_tag)
  );

  // ------------------------------------------- rot_val and readout control
  logic [5:0]  rd_k;
  logic        rd_run;
  logic [$clog2(OUT_GAP+1)-1:0] gap;
  logic signed [15:0] rot;
  logic [5:0]         kk;
  logic signed [31:0] rot_full;

  always_comb begin
    kk       = rot_mode ? (rd_k + 6'd1) : 6'd24;
    rot_full = 32'(dtheta) * 32'(kk) * 32'sd37450;   // dTheta * kk / 56
    rot      = 16'(rot_full >>> 21);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_uw <= '0; ang_sum <= '0; dtheta <= '0; theta <= '0; frame_done <= 1'b0;
      rd_k <= '0; rd_run <= 1'b0; gap <= '0;
    end else begin
      frame_done <= 1'b0;
      if (clr) begin
        n_uw <= '0; ang_sum <= '0; dtheta <= '0; theta <= '0;
        rd_k <= '0; rd_run <= 1'b0; gap <= '0;
      end else begin
        if (e_v) begin
          if (int'(n_uw) == N_UW - 1) begin
            dtheta     <= 16'((ang_sum + 20'(e_ang)) >>> 4);
            theta      <= theta + 16'((ang_sum + 20'(e_ang)) >>> 4);
            frame_done <= 1'b1;
            n_uw       <= '0;
            ang_sum    <= '0;
            rd_run     <= 1'b1;
            rd_k       <= '0;
            gap        <= '0;
          end else begin
            n_uw    <= n_uw + 1'b1;
            ang_sum <= ang_sum + 20'(e_ang);
          end
        end
        if (rd_run) begin
          if (gap == 0) begin
            gap <= $clog2(OUT_GAP+1)'(OUT_GAP - 1);
            if (int'(rd_k) == N_DATA - 1) rd_run <= 1'b0;
            rd_k <= rd_k + 1'b1;
          end else begin
            gap <= gap - 1'b1;
          end
        end
      end
    end
  end

  // ------------------------------------------------- rotator B: -rot_k
  logic unused_tag;
  logic unused_e;
  assign unused_e = e_tag ^ (^e_mag);

  cordic_rot #(.W(W), .TAG_W(1)) u_rot_val (
    .clk, .rst_n, .in_valid(rd_run && gap == 0),
    .in_x(buf_re[rd_k]), .in_y(buf_im[rd_k]), .in_angle(-rot), .in_tag(1'b0),
    .out_valid, .out_x(out_re), .out_y(out_im), .out_tag(unused_tag)
  );
endmodule

// sc_fde_rx -- SC-FDE baseband receiver.
//
// Chain: 12-bit ADC samples (4 per symbol) -> pkt_det (double sliding
// window; gates everything behind it) -> match_filter (RRC) -> dll (symbol
// timing, 4:1) -> freq_sync (CFO from short preambles 3..7, compensation
// from the long preamble on) -> FFT-window control -> [external 64-point
// FFT] -> ch_eq (channel estimate from the two long preambles, one-division
// ZF equalisation) -> [external IFFT] -> phase_track (UW phase tracking) ->
// demapper -> viterbi_dec -> decoded bits.
// The FFT and IFFT are vendor cores in the published design; their streams
// are ports here: fft_in_* carries 64-symbol windows (fft_in_last on the
// 64th), fft_out_* must return the 64 bins of each window in natural order
// with their index; ifft_in_*/ifft_out_* likewise for the inverse transform
// (ifft_out in time order, scaled by 1/64).
// FFT-window control: symbol positions are counted from the first DLL output
// minus SYNC_LAG (the detection and filter delay, in symbols).  Windows start
// WIN_ADV symbols early, inside the cyclic guard, so a small timing error is
// a circular shift that the channel estimate absorbs: long preambles at
// 176 and 240, data frames at 320 + 64i (i = 0..5).  After the 576th coded
// bit the Viterbi decoder is flushed.  rearm prepares for the next packet.
// The window placement, SYNC_LAG and the one-packet-per-rearm control are
// this design's choices; the document does not describe them.
module sc_fde_rx #(
  parameter int SYNC_LAG = 4,
  parameter int WIN_ADV  = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               rearm,           // wait for the next packet
  input  logic               rot_mode,        // phase tracker rule (0: constant, 1: per symbol)
  input  logic               adc_valid,       // ADC sample strobe
  input  logic signed [11:0] adc_i,           // ADC sample I
  input  logic signed [11:0] adc_q,           // ADC sample Q
  // FFT
  output logic               fft_in_valid,    // window symbol strobe
  output logic signed [11:0] fft_in_re,       // window symbol, real
  output logic signed [11:0] fft_in_im,       // window symbol, imaginary
  output logic               fft_in_last,     // 64th symbol of a window
  input  logic               fft_out_valid,   // bin strobe
  input  logic [5:0]         fft_out_k,       // bin index
  input  logic signed [15:0] fft_out_re,      // bin, real
  input  logic signed [15:0] fft_out_im,      // bin, imaginary
  // IFFT
  output logic               ifft_in_valid,   // equalised bin strobe
  output logic [5:0]         ifft_in_k,       // bin index
  output logic signed [11:0] ifft_in_re,      // equalised bin, real
  output logic signed [11:0] ifft_in_im,      // equalised bin, imaginary
  input  logic               ifft_out_valid,  // time-domain symbol strobe
  input  logic signed [11:0] ifft_out_re,     // equalised symbol, real
  input  logic signed [11:0] ifft_out_im,     // equalised symbol, imaginary
  // status
  output logic               detected,        // packet detected
  output logic               dll_locked,      // symbol timing locked
  output logic [1:0]         dll_hop,         // last DLL hop (0: 3, 1: 4, 2: 5 samples)
  output logic               dll_sym_valid,   // DLL output strobe
  output logic               freq_done,       // CFO estimate ready
  output logic signed [17:0] freq_sum,        // sum of the four CFO angles
  output logic               sym_valid,       // CFO-compensated symbol strobe
  output logic signed [11:0] sym_i,           // CFO-compensated symbol I
  output logic signed [11:0] sym_q,           // CFO-compensated symbol Q
  output logic               in_payload,      // compensated stream is past the preamble
  output logic               ch_ready,        // channel estimate complete
  output logic               ph_frame_done,   // phase error of a frame known
  output logic signed [15:0] ph_dtheta,       // its value
  output logic               eq_valid,        // phase-corrected data symbol strobe
  output logic signed [11:0] eq_re,           // phase-corrected data symbol, real
  output logic signed [11:0] eq_im,           // phase-corrected data symbol, imaginary
  output logic               dec_valid,       // decoded bit strobe
  output logic               dec_bit          // decoded bit
);
  import scfde_pkg::*;

  localparam int START = N_SHORT * N_SHORT_REP;               // 160
  localparam int L1    = START + N_LONG_CP - WIN_ADV;         // 172
  localparam int D0    = N_PMB + N_UW - WIN_ADV;              // 316
  localparam int DEND  = D0 + N_FRAMES * N_FFT;               // 700

  // ---------------------------------------------------- timing recovery
  logic               pd_v, mf_v, dll_v;
  logic signed [11:0] pd_i, pd_q, mf_i, mf_q, dll_i, dll_q;

  pkt_det u_pkt_det (
    .clk, .rst_n, .rearm, .in_valid(adc_valid), .in_i(adc_i), .in_q(adc_q),
    .detected, .out_valid(pd_v), .out_i(pd_i), .out_q(pd_q)
  );

  match_filter u_mf (
    .clk, .rst_n, .clr(rearm), .in_valid(pd_v), .in_i(pd_i), .in_q(pd_q),
    .out_valid(mf_v), .out_i(mf_i), .out_q(mf_q)
  );

  dll u_dll (
    .clk, .rst_n, .clr(rearm), .in_valid(mf_v), .in_i(mf_i), .in_q(mf_q),
    .out_valid(dll_v), .out_i(dll_i), .out_q(dll_q), .locked(dll_locked),
    .last_hop(dll_hop)
  );
  assign dll_sym_valid = dll_v;

  // ------------------------------------------------------ frequency sync
  freq_sync #(.START(START + SYNC_LAG)) u_freq (
    .clk, .rst_n, .clr(rearm), .in_valid(dll_v), .in_i(dll_i), .in_q(dll_q),
    .est_done(freq_done), .freq_sum,
    .out_valid(sym_valid), .out_i(sym_i), .out_q(sym_q)
  );

  // -------------------------------------------------- FFT-window control
  logic [9:0] pos;     // symbol position of the compensated stream
  logic       in_win;

  assign in_payload = (int'(pos) >= N_PMB);

  assign in_win = (int'(pos) >= L1 && int'(pos) < L1 + 2 * N_LONG) ||
                  (int'(pos) >= D0 && int'(pos) < DEND);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos <= 10'(START);
      fft_in_valid <= 1'b0; fft_in_re <= '0; fft_in_im <= '0; fft_in_last <= 1'b0;
    end else begin
      fft_in_valid <= 1'b0;
      fft_in_last  <= 1'b0;
      if (rearm) begin
        pos <= 10'(START);
      end else if (sym_valid) begin
        if (pos != 10'h3ff) pos <= pos + 1'b1;
        if (in_win) begin
          fft_in_valid <= 1'b1;
          fft_in_re    <= sym_i;
          fft_in_im    <= sym_q;
          fft_in_last  <= (((int'(pos) - L1) % N_FFT) == N_FFT - 1);
        end
      end
    end
  end

  // --------------------------------------------------------- equaliser
  ch_eq u_ch_eq (
    .clk, .rst_n, .clr(rearm),
    .in_valid(fft_out_valid), .in_k(fft_out_k), .in_re(fft_out_re), .in_im(fft_out_im),
    .ch_ready, .out_valid(ifft_in_valid), .out_k(ifft_in_k),
    .out_re(ifft_in_re), .out_im(ifft_in_im)
  );

  // ------------------------------------------------------ phase tracking
  logic signed [15:0] ph_theta;

  phase_track u_phase (
    .clk, .rst_n, .clr(rearm), .rot_mode,
    .in_valid(ifft_out_valid), .in_re(ifft_out_re), .in_im(ifft_out_im),
    .out_valid(eq_valid), .out_re(eq_re), .out_im(eq_im),
    .frame_done(ph_frame_done), .dtheta(ph_dtheta), .theta(ph_theta)
  );

  // ------------------------------------------------ de-mapper + decoder
  logic       bit_v, bit_d;
  logic [9:0] nbits;
  logic       flush;
  logic       unused_theta;

  assign unused_theta = ^ph_theta;

  demapper u_demap (
    .clk, .rst_n, .rdy_in(eq_valid), .din_I(eq_re), .din_Q(eq_im),
    .dout_valid(bit_v), .dout(bit_d)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nbits <= '0; flush <= 1'b0;
    end else begin
      flush <= 1'b0;
      if (rearm) nbits <= '0;
      else if (bit_v) begin
        nbits <= nbits + 1'b1;
        if (int'(nbits) == N_CODED_PKT - 1) flush <= 1'b1;
      end
    end
  end

  viterbi_dec u_vit (
    .clk, .rst_n, .pkt_start(rearm), .in_valid(bit_v), .in_bit(bit_d), .flush,
    .out_valid(dec_valid), .out_bit(dec_bit)
  );
endmodule

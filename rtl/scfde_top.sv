// scfde_top -- complete UW-based SC-FDE baseband transceiver.
//
// Transmitter and receiver side by side, plus the two UW-based extensions:
//  * sc_fde_tx : source bits -> convolutional code -> QPSK -> preamble + UW
//                framing -> polyphase RRC -> 10-bit DAC samples.
//  * sc_fde_rx : 12-bit ADC samples -> packet detection -> matched filter ->
//                DLL -> CFO sync -> [FFT] -> channel equaliser -> [IFFT] ->
//                UW phase tracking -> de-mapper -> Viterbi -> decoded bits.
//  * uw_sync   : UW-pair frame synchroniser on the CFO-compensated symbol
//                stream of the receiver (matching enabled in the payload).
//  * uw_ch_est : recursive UW channel estimator on the receiver's FFT bins.
// Off-chip and vendor parts are at the ports: the DAC samples leave on
// dac_*, the ADC samples arrive on adc_*, and the two 64-point transforms are
// external (fft_* and ifft_* streams, see sc_fde_rx).  The RF front end and
// the host link are outside this design; src_* and dec_* are plain bit
// streams.  One receiver packet per rx_rearm pulse.
// Partitioning into TX and RX follows the published design; the port-level
// split of the external transforms is this design's choice.
module scfde_top (
  input  logic               clk,
  input  logic               rst_n,
  // transmitter
  input  logic               tx_en,          // send packets while high
  input  logic               src_valid,      // source bit offered
  input  logic               src_bit,        // source bit
  output logic               src_ready,      // source bit accepted
  output logic               tx_pkt_start,   // packet start pulse
  output logic               tx_pkt_busy,    // packet in preparation
  output logic               dac_valid,      // DAC sample strobe
  output logic signed [9:0]  dac_i,          // DAC sample I
  output logic signed [9:0]  dac_q,          // DAC sample Q
  // receiver
  input  logic               rx_rearm,       // wait for the next packet
  input  logic               rot_mode,       // phase tracker rule
  input  logic               adc_valid,      // ADC sample strobe
  input  logic signed [11:0] adc_i,          // ADC sample I
  input  logic signed [11:0] adc_q,          // ADC sample Q
  output logic               fft_in_valid,   // FFT window symbol strobe
  output logic signed [11:0] fft_in_re,      // FFT input, real
  output logic signed [11:0] fft_in_im,      // FFT input, imaginary
  output logic               fft_in_last,    // last symbol of a window
  input  logic               fft_out_valid,  // FFT bin strobe
  input  logic [5:0]         fft_out_k,      // FFT bin index
  input  logic signed [15:0] fft_out_re,     // FFT bin, real
  input  logic signed [15:0] fft_out_im,     // FFT bin, imaginary
  output logic               ifft_in_valid,  // IFFT bin strobe
  output logic [5:0]         ifft_in_k,      // IFFT bin index
  output logic signed [11:0] ifft_in_re,     // IFFT input, real
  output logic signed [11:0] ifft_in_im,     // IFFT input, imaginary
  input  logic               ifft_out_valid, // IFFT symbol strobe
  input  logic signed [11:0] ifft_out_re,    // IFFT output, real
  input  logic signed [11:0] ifft_out_im,    // IFFT output, imaginary
  output logic               rx_detected,    // packet detected
  output logic               rx_locked,      // DLL locked
  output logic [1:0]         rx_dll_hop,     // last DLL hop (0: 3, 1: 4, 2: 5 samples)
  output logic               rx_dll_valid,   // DLL symbol strobe
  output logic               rx_freq_done,   // CFO estimate ready
  output logic signed [17:0] rx_freq_sum,    // sum of four CFO angles
  output logic               rx_ch_ready,    // channel estimate ready
  output logic               rx_ph_done,     // frame phase error known
  output logic signed [15:0] rx_ph_dtheta,   // its value
  output logic               rx_eq_valid,    // phase-corrected symbol strobe
  output logic signed [11:0] rx_eq_re,       // phase-corrected symbol, real
  output logic signed [11:0] rx_eq_im,       // phase-corrected symbol, imaginary
  output logic               dec_valid,      // decoded bit strobe
  output logic               dec_bit,        // decoded bit
  // UW extensions
  output logic               uws_frame,      // uw_sync frame start
  output logic               uws_valid,      // uw_sync frame symbol strobe
  output logic signed [11:0] uws_i,          // uw_sync frame symbol I
  output logic signed [11:0] uws_q,          // uw_sync frame symbol Q
  output logic               uce_init,       // uw_ch_est initial estimate done
  output logic               uce_upd,        // uw_ch_est update frame done
  output logic               uce_valid,      // uw_ch_est estimate strobe
  output logic [5:0]         uce_k,          // its bin
  output logic signed [15:0] uce_re,         // H_k real
  output logic signed [15:0] uce_im          // H_k imaginary
);
  logic [3:0]         tx_sym_i, tx_sym_q;
  logic               tx_sym_valid;
  logic               sym_valid, in_payload, uws_match;
  logic signed [11:0] sym_i, sym_q;
  logic               unused;

  assign unused = ^{tx_sym_i, tx_sym_q, tx_sym_valid, uws_match};

  sc_fde_tx u_tx (
    .clk, .rst_n, .tx_en, .src_valid, .src_bit, .src_ready,
    .pkt_start(tx_pkt_start), .pkt_busy(tx_pkt_busy),
    .sym_valid(tx_sym_valid), .sym_i(tx_sym_i), .sym_q(tx_sym_q),
    .dac_valid, .dac_i, .dac_q
  );

  sc_fde_rx u_rx (
    .clk, .rst_n, .rearm(rx_rearm), .rot_mode,
    .adc_valid, .adc_i, .adc_q,
    .fft_in_valid, .fft_in_re, .fft_in_im, .fft_in_last,
    .fft_out_valid, .fft_out_k, .fft_out_re, .fft_out_im,
    .ifft_in_valid, .ifft_in_k, .ifft_in_re, .ifft_in_im,
    .ifft_out_valid, .ifft_out_re, .ifft_out_im,
    .detected(rx_detected), .dll_locked(rx_locked), .dll_hop(rx_dll_hop),
    .dll_sym_valid(rx_dll_valid), .freq_done(rx_freq_done), .freq_sum(rx_freq_sum),
    .sym_valid, .sym_i, .sym_q, .in_payload,
    .ch_ready(rx_ch_ready), .ph_frame_done(rx_ph_done), .ph_dtheta(rx_ph_dtheta),
    .eq_valid(rx_eq_valid), .eq_re(rx_eq_re), .eq_im(rx_eq_im),
    .dec_valid, .dec_bit
  );

  uw_sync u_uw_sync (
    .clk, .rst_n, .clr(rx_rearm), .enable(in_payload),
    .in_valid(sym_valid), .in_i(sym_i), .in_q(sym_q),
    .match(uws_match), .frame_start(uws_frame),
    .out_valid(uws_valid), .out_i(uws_i), .out_q(uws_q)
  );

  uw_ch_est u_uw_ch_est (
    .clk, .rst_n, .clr(rx_rearm),
    .in_valid(fft_out_valid), .in_k(fft_out_k), .in_re(fft_out_re), .in_im(fft_out_im),
    .init_done(uce_init), .upd_done(uce_upd),
    .out_valid(uce_valid), .out_k(uce_k), .out_re(uce_re), .out_im(uce_im)
  );
endmodule

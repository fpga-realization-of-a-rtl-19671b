// tb_scfde_top -- end-to-end test of the SC-FDE transceiver at full size.
//
// The transmitter's DAC samples are passed through a channel model (carrier
// frequency offset, a two-path echo, a fixed gain and small random noise,
// then 12-bit ADC saturation) to the receiver's ADC input.  The external
// 64-point FFT and IFFT are behavioural models.  Two packets are sent, the
// first received with the constant phase-rotation rule, the second with the
// per-symbol rule; between them the receiver is re-armed.  The second packet
// also sees a one-sample slip of the sampling phase during its preamble, so
// that the DLL has to hop.
// Checks: every decoded bit equals the sent bit (192 per packet); DAC sample
// spacing is exactly 4 clocks; one symbol per 16 clocks (704 symbols per
// packet); source bits are taken at most one per 16 clocks; the CFO estimate
// matches the applied offset; uw_sync finds the 6 frames of each payload;
// uw_ch_est tracks the channel found from the preamble.
// Mechanism counters (each must be non-zero): packet detection, DLL hop of 3,
// 4 and 5 samples, DLL lock, CFO estimate, channel estimate, phase-error
// frames under both rules, Viterbi flush, uw_sync frames, uw_ch_est initialisation and updates.
module tb_scfde_top;
  import scfde_pkg::*;
  localparam real CFO = 0.0005;    // turns per sample
  localparam int  NPKT = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic               tx_en, src_valid, src_bit, src_ready, tx_pkt_start, tx_pkt_busy;
  logic               dac_valid;
  logic signed [9:0]  dac_i, dac_q;
  logic               rx_rearm, rot_mode, adc_valid;
  logic signed [11:0] adc_i, adc_q;
  logic               fft_in_valid, fft_in_last, fft_out_valid;
  logic signed [11:0] fft_in_re, fft_in_im;
  logic [5:0]         fft_out_k, ifft_in_k, ifft_out_k;
  logic signed [15:0] fft_out_re, fft_out_im;
  logic               ifft_in_valid, ifft_out_valid;
  logic signed [11:0] ifft_in_re, ifft_in_im, ifft_out_re, ifft_out_im;
  logic               rx_detected, rx_locked, rx_dll_valid, rx_freq_done, rx_ch_ready;
  logic [1:0]         rx_dll_hop;
  logic signed [17:0] rx_freq_sum;
  logic               rx_ph_done, rx_eq_valid, dec_valid, dec_bit;
  logic signed [15:0] rx_ph_dtheta;
  logic signed [11:0] rx_eq_re, rx_eq_im;
  logic               uws_frame, uws_valid, uce_init, uce_upd, uce_valid;
  logic signed [11:0] uws_i, uws_q;
  logic [5:0]         uce_k;
  logic signed [15:0] uce_re, uce_im;

  scfde_top dut (.*);

  dft_model #(.INV(0), .IW(12), .OW(16), .SHIFT(3), .LAT(4)) u_fft (
    .clk, .rst_n, .in_valid(fft_in_valid), .in_k(6'd0), .in_re(fft_in_re), .in_im(fft_in_im),
    .out_valid(fft_out_valid), .out_k(fft_out_k), .out_re(fft_out_re), .out_im(fft_out_im)
  );

  logic signed [11:0] ifft_re16, ifft_im16;
  dft_model #(.INV(1), .IW(12), .OW(12), .SHIFT(0), .LAT(4)) u_ifft (
    .clk, .rst_n, .in_valid(ifft_in_valid), .in_k(ifft_in_k), .in_re(ifft_in_re), .in_im(ifft_in_im),
    .out_valid(ifft_out_valid), .out_k(ifft_out_k), .out_re(ifft_out_re), .out_im(ifft_out_im)
  );

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, msg);
    end
  endtask

  // ------------------------------------------------------------ source
  bit  sent [$];
  int  pkt_sent = 0;
  longint last_take = -1000;

  always_ff @(posedge clk) begin
    if (rst_n && src_valid && src_ready) begin
      sent.push_back(src_bit);
      if (last_take >= 0) check(($time / 10) - last_take >= 16, "source bit rate above 1 per 16 clocks");
      last_take <= $time / 10;
      src_bit <= 1'($urandom);
    end
  end

  // ----------------------------------------------------------- channel
  real    ph = 0.0;
  real    h1 = 0.15;              // echo amplitude, one sample later
  real    pr_i = 0.0, pr_q = 0.0; // previous sample
  int     slip = 0;               // samples to drop
  longint last_dac = -1;
  int     dac_n = 0;

  function automatic logic signed [11:0] sat12(input real v);
    int r;
    r = int'(v);
    if (r > 2047) r = 2047;
    if (r < -2048) r = -2048;
    return 12'(r);
  endfunction

  always_ff @(posedge clk) begin
    adc_valid <= 1'b0;
    if (rst_n && dac_valid) begin
      real xi, xq, yi, yq, c, s;
      if (last_dac >= 0) check(($time / 10) - last_dac == 4, "DAC sample spacing is not 4 clocks");
      last_dac <= $time / 10;
      dac_n++;
      xi = real'(dac_i) + h1 * pr_i;
      xq = real'(dac_q) + h1 * pr_q;
      pr_i = real'(dac_i); pr_q = real'(dac_q);
      c = $cos(2.0 * 3.14159265358979 * ph);
      s = $sin(2.0 * 3.14159265358979 * ph);
      ph += CFO;
      if (ph > 1.0) ph -= 1.0;
      yi = xi * c - xq * s;
      yq = xi * s + xq * c;
      if (slip > 0) slip--;
      else begin
        adc_valid <= 1'b1;
        adc_i <= sat12(yi + real'($urandom_range(4)) - 2.0);
        adc_q <= sat12(yq + real'($urandom_range(4)) - 2.0);
      end
    end
  end

  // ------------------------------------------------------- mechanisms
  int n_det = 0, n_hop3 = 0, n_hop4 = 0, n_hop5 = 0, n_lock = 0, n_freq = 0, n_ch = 0;
  int n_uws_ok = 0, n_ph0 = 0, n_ph1 = 0, n_flush = 0, n_bp = 0, n_uws = 0, n_uws_sym = 0;
  int n_uce_init = 0, n_uce_upd = 0, n_dec = 0, n_err = 0, n_fft_win = 0;
  logic det_q, lock_q, freq_q, ch_q, uinit_q, bp_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      det_q <= 0; lock_q <= 0; freq_q <= 0; ch_q <= 0; uinit_q <= 0; bp_q <= 0;
    end else begin
      det_q <= rx_detected; lock_q <= rx_locked; freq_q <= rx_freq_done;
      ch_q <= rx_ch_ready; uinit_q <= uce_init;
      bp_q <= dut.u_tx.u_add_uw.in_ready;
      if (rx_detected && !det_q) n_det++;
      if (rx_locked && !lock_q) n_lock++;
      if (rx_ch_ready && !ch_q) n_ch++;
      if (uce_init && !uinit_q) n_uce_init++;
      if (bp_q && !dut.u_tx.u_add_uw.in_ready) n_bp++;
      if (rx_freq_done && !freq_q) begin
        real est, want;
        n_freq++;
        est  = real'(rx_freq_sum);
        want = -4.0 * 16.0 * 4.0 * CFO * 65536.0;   // sum of angles of r_n conj(r_{n+16})
        $display("CFO estimate %0d, expected %0.0f", rx_freq_sum, want);
        check(est < 0.9 * want && est > 1.1 * want || (want == 0.0 && est < 64.0 && est > -64.0), "CFO estimate off by more than 10%");
      end
      if (rx_dll_valid) begin
        case (rx_dll_hop)
          2'd0: n_hop3++;
          2'd1: n_hop4++;
          default: n_hop5++;
        endcase
      end
      if (fft_in_valid && fft_in_last) n_fft_win++;
      if (rx_ph_done) begin
        if (rot_mode) n_ph1++; else n_ph0++;
      end
      if (uws_frame) begin
        n_uws++;
        // frame found one symbol after the window [UW_j D48 UW_j+1] is complete
        // (the receiver's symbol count itself may be off by one after a slip)
        if (((int'(dut.u_rx.pos) - (N_PMB + 82) + 3) % 64) <= 6) n_uws_ok++;
        else $display("uw_sync frame at symbol %0d", dut.u_rx.pos);
      end
      if (uws_valid) n_uws_sym++;
      if (uce_upd) n_uce_upd++;
      if (dec_valid) begin
        bit exp_b;
        exp_b = (sent.size() > 0) ? sent.pop_front() : 1'b0;
        n_dec++;
        if (dec_bit != exp_b) n_err++;
        check(dec_bit == exp_b, $sformatf("decoded bit %0d wrong", n_dec));
        if (n_dec % 192 == 0) n_flush++;
      end
    end
  end

  // uw_ch_est versus the equaliser's channel: the estimate after an update
  // must stay close to the initial (preamble) estimate on a static channel
  logic signed [15:0] h0_re [64], h0_im [64];
  int  uce_frame = 0, n_uce_far = 0, n_uce_cmp = 0;
  always_ff @(posedge clk) begin
    if (uce_valid) begin
      if (!uce_init) begin
        // initial estimate against the equaliser's preamble sum C = (R1+R2)(8X)*:
        // H = C * 4 / (7 |8X|^2), times 2^4
        real cr, ci, ax, er, ei;
        cr = real'(dut.u_rx.u_ch_eq.hc_re[uce_k]);
        ci = real'(dut.u_rx.u_ch_eq.hc_im[uce_k]);
        ax = real'(lp_dft_re(int'(uce_k)) ** 2 + lp_dft_im(int'(uce_k)) ** 2);
        er = real'(uce_re) - 64.0 * cr / (7.0 * ax);
        ei = real'(uce_im) - 64.0 * ci / (7.0 * ax);
        // (bins where the UW carries almost no energy cannot be estimated from it)
        if (uw_dft_re(int'(uce_k)) ** 2 + uw_dft_im(int'(uce_k)) ** 2 >= 64)
          check(er * er + ei * ei <= (cr * cr + ci * ci) * 4096.0 / (49.0 * ax * ax) / 64.0 + 16.0,
                $sformatf("uw_ch_est initial estimate of bin %0d", uce_k));
        h0_re[uce_k] <= uce_re; h0_im[uce_k] <= uce_im;
      end else begin
        int dr, di;
        dr = int'(uce_re) - int'(h0_re[uce_k]);
        di = int'(uce_im) - int'(h0_im[uce_k]);
        n_uce_cmp++;
        if (dr * dr + di * di > (int'(h0_re[uce_k]) ** 2 + int'(h0_im[uce_k]) ** 2) / 4 + 64)
          n_uce_far++;
      end
    end
  end

  // hard decisions before the decoder versus the transmitted code bits
  bit  coded [$];
  int  n_cbits = 0, n_cerr = 0;
  always_ff @(posedge clk) begin
    if (rst_n && dut.u_tx.enc_rdy) coded.push_back(dut.u_tx.enc_bit);
    if (rst_n && dut.u_rx.bit_v) begin
      bit c;
      c = (coded.size() > 0) ? coded.pop_front() : 1'b0;
      n_cbits++;
      if (c != dut.u_rx.bit_d) begin
        n_cerr++;
        if (trace) $display("coded bit %0d wrong", n_cbits);
      end
    end
  end

  // symbols per packet on the DAC: count sym_valid between packet starts
  int     tx_syms = 0;
  longint last_sym = -1;
  always_ff @(posedge clk) begin
    if (rst_n && dut.u_tx.sym_valid) begin
      tx_syms++;
      if (last_sym >= 0 && ($time / 10) - last_sym < 100)
        check(($time / 10) - last_sym == 16, "symbol spacing is not 16 clocks");
      last_sym <= $time / 10;
    end
  end

  // optional trace (+trace)
  bit trace;
  initial trace = $test$plusargs("trace");
  always_ff @(posedge clk) begin
    if (trace && dut.u_tx.sym_valid && n_dec < 1) $display("txs %0d %0d", dut.u_tx.sym_i, dut.u_tx.sym_q);
    if (trace && rx_ph_done) $display("%0t dtheta %0d", $time, rx_ph_dtheta);
    if (trace && dut.u_rx.u_phase.u_v && n_dec < 10) $display("uw %0d %0d", dut.u_rx.u_phase.u_re, dut.u_rx.u_phase.u_im);
    if (trace && dut.u_rx.u_phase.e_v && n_dec < 10) $display("ang %0d", dut.u_rx.u_phase.e_ang);
    if (trace && rx_eq_valid && n_dec < 40) $display("eq %0d %0d", rx_eq_re, rx_eq_im);
    if (trace && ifft_out_valid && n_dec < 1) $display("ifft %0d %0d %0d", ifft_out_k, ifft_out_re, ifft_out_im);
    if (trace && rx_dll_valid && n_dec < 1) $display("dll %0d %0d hop %0d", dut.u_rx.u_dll.out_i, dut.u_rx.u_dll.out_q, rx_dll_hop);
  end

  // ------------------------------------------------------------- run
  initial begin
    int start_syms;
    tx_en = 0; src_valid = 0; src_bit = 0; rx_rearm = 0; rot_mode = 0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    src_valid = 1;
    for (int p = 0; p < NPKT; p++) begin
      rot_mode = (p == 1);
      @(negedge clk) rx_rearm = 1;
      @(negedge clk) rx_rearm = 0;
      repeat (200) @(posedge clk);
      if (p == 1) fork begin
        repeat (16 * 14) @(posedge clk);   // slip one sample early in the short preambles
        slip = 1;
      end join_none
      @(negedge clk) tx_en = 1;
      @(posedge clk iff tx_pkt_start);
      start_syms = tx_syms;
      @(negedge clk) tx_en = 0;
      wait (n_dec >= 192 * (p + 1));
      repeat (20) @(posedge clk);
      $display("packet %0d: %0d decoded, %0d bit errors, %0d code-bit errors, %0d symbols sent",
               p, n_dec, n_err, n_cerr, tx_syms - start_syms);
      check(tx_syms - start_syms == 704, "a packet is not 304 + 400 symbols");
    end
    check(n_dec == 192 * NPKT, "decoded bit count");
    check(n_fft_win == 8 * NPKT, "FFT windows per packet");
    check(n_uws == 6 * NPKT && n_uws_ok == n_uws, $sformatf("uw_sync frames %0d, %0d aligned", n_uws, n_uws_ok));
    check(n_uce_upd == 6 * NPKT, "uw_ch_est update frames");
    check(n_uce_cmp > 0 && n_uce_far < n_uce_cmp / 8, $sformatf("uw_ch_est off in %0d of %0d bins", n_uce_far, n_uce_cmp));
    $display("uw_ch_est: %0d of %0d bins far from the preamble estimate", n_uce_far, n_uce_cmp);
    $display("mechanisms: det=%0d hop3=%0d hop4=%0d hop5=%0d lock=%0d freq=%0d ch=%0d ph_rule0=%0d ph_rule1=%0d flush=%0d backpressure=%0d uws=%0d uce_init=%0d uce_upd=%0d",
             n_det, n_hop3, n_hop4, n_hop5, n_lock, n_freq, n_ch, n_ph0, n_ph1, n_flush, n_bp, n_uws, n_uce_init, n_uce_upd);
    check(n_det > 0, "packet detection never happened");
    check(n_hop3 > 0, "DLL hop of 3 never happened");
    check(n_hop4 > 0, "DLL hop of 4 never happened");
    check(n_hop5 > 0, "DLL hop of 5 never happened");
    check(n_lock > 0, "DLL lock never happened");
    check(n_freq > 0, "CFO estimate never happened");
    check(n_ch > 0, "channel estimate never happened");
    check(n_ph0 > 0, "phase tracking rule 0 never happened");
    check(n_ph1 > 0, "phase tracking rule 1 never happened");
    check(n_flush > 0, "Viterbi flush never happened");
    check(n_uws > 0, "uw_sync frame never happened");
    check(n_uce_init > 0, "uw_ch_est initialisation never happened");
    check(n_uce_upd > 0, "uw_ch_est update never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * 200_000);
    $display("watchdog: decoded %0d", n_dec);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule

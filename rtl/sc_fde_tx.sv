// sc_fde_tx -- SC-FDE baseband transmitter.
//
// Chain: source bits -> conv_encoder (rate 1/3, K = 5) -> qpsk_mapper ->
// add_uw (UW insertion, +-4 symbols) -> tx_mux (preamble/payload selector
// and polyphase_buf) -> rrc_polyphase (x4 upsampling, RRC pulse shaping) ->
// 10-bit I/Q samples for the DAC.  pmb_gen sends the 304-symbol preamble at
// clock rate at the start of every packet; the payload follows once the
// preamble is queued.
// A packet starts when tx_en is high and the transmitter is idle.  The
// source is a ready/valid stream: one bit is taken per SRC_CLKS clocks at
// most (the published design takes one source bit per 16 clocks) and only
// while the UW inserter's FIFO has room; N_SRC_PKT = 192 bits fill the six
// 48-symbol data blocks.  The RRC filter draws one symbol per SYM_CLKS = 16
// clocks and outputs one sample per 4 clocks, continuously (zeros between
// packets).  sym_* shows the symbol stream entering the filter.
module sc_fde_tx #(
  parameter int SYM_CLKS = 16,
  parameter int SRC_CLKS = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              tx_en,      // send packets while high
  input  logic              src_valid,  // source bit offered
  input  logic              src_bit,    // source bit
  output logic              src_ready,  // source bit taken when valid & ready
  output logic              pkt_start,  // one-clock pulse at packet start
  output logic              pkt_busy,   // a packet is being prepared
  output logic              sym_valid,  // symbol handed to the RRC filter
  output logic signed [3:0] sym_i,      // that symbol, I
  output logic signed [3:0] sym_q,      // that symbol, Q
  output logic              dac_valid,  // DAC sample strobe (every SYM_CLKS/4 clocks)
  output logic signed [9:0] dac_i,      // DAC sample I
  output logic signed [9:0] dac_q       // DAC sample Q
);
  import scfde_pkg::*;

  // ---------------------------------------------------------- packet control
  logic       busy;
  logic [$clog2(N_SRC_PKT+1)-1:0] src_cnt;
  logic [$clog2(SRC_CLKS)-1:0]    src_tick;
  logic       pmb_finish, data_done, uw_finish;
  logic       uw_in_ready;

  assign pkt_start = tx_en && !busy;
  assign pkt_busy  = busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
    end else if (pkt_start) begin
      busy <= 1'b1;
    end else if (busy && data_done && uw_finish) begin
      busy <= 1'b0;
    end
  end

  // source pacing: one bit per SRC_CLKS clocks, payload phase only
  assign src_ready = busy && pmb_finish && (int'(src_cnt) < N_SRC_PKT) &&
                     (src_tick == 0) && uw_in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      src_cnt <= '0; src_tick <= '0;
    end else begin
      if (pkt_start) src_cnt <= '0;
      else if (src_valid && src_ready) src_cnt <= src_cnt + 1'b1;
      if (src_valid && src_ready) src_tick <= $clog2(SRC_CLKS)'(SRC_CLKS - 1);
      else if (src_tick != 0)     src_tick <= src_tick - 1'b1;
    end
  end

  // ------------------------------------------------------ encoder + mapper
  logic enc_rdy, enc_bit;
  logic map_rdy_i, map_i, map_rdy_q, map_q;
  logic held_i;

  conv_encoder u_enc (
    .clk, .rst_n, .pkt_start,
    .rdy_in(src_valid && src_ready), .din(src_bit),
    .rdy_out(enc_rdy), .dout(enc_bit)
  );

  qpsk_mapper u_map (
    .clk, .rst_n, .pkt_start,
    .rdy_in(enc_rdy), .din(enc_bit),
    .rdy_out_I(map_rdy_i), .d_I(map_i),
    .rdy_out_Q(map_rdy_q), .d_Q(map_q)
  );

  // pair the I and Q bits into one QPSK symbol
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) held_i <= 1'b0;
    else if (map_rdy_i) held_i <= map_i;
  end

  // -------------------------------------------------------- UW insertion
  logic              uw_valid, data_rdy;
  logic signed [3:0] uw_i, uw_q;

  add_uw u_add_uw (
    .clk, .rst_n, .start(pkt_start),
    .in_valid(map_rdy_q), .in_i(held_i), .in_q(map_q), .in_ready(uw_in_ready),
    .out_rdy(data_rdy), .out_valid(uw_valid), .out_i(uw_i), .out_q(uw_q),
    .finish(uw_finish)
  );

  // ------------------------------------------------------------- preamble
  logic              pmb_valid, pmb_rdy;
  logic signed [3:0] pmb_i, pmb_q;

  pmb_gen u_pmb (
    .clk, .rst_n, .start(pkt_start), .out_rdy(pmb_rdy && busy),
    .out_valid(pmb_valid), .out_i(pmb_i), .out_q(pmb_q), .finish(pmb_finish),
    .data_sym(map_rdy_q), .data_done
  );

  // ---------------------------------------------------- mux + RRC filter
  logic filt_req;

  tx_mux u_mux (
    .clk, .rst_n, .clr(1'b0), .pmb_finish,
    .pmb_valid, .pmb_i, .pmb_q, .pmb_rdy,
    .data_valid(uw_valid), .data_i(uw_i), .data_q(uw_q), .data_rdy,
    .filt_req, .filt_valid(sym_valid), .filt_i(sym_i), .filt_q(sym_q)
  );

  rrc_polyphase #(.SYM_CLKS(SYM_CLKS)) u_rrc (
    .clk, .rst_n,
    .in_req(filt_req), .in_valid(sym_valid), .in_i(sym_i), .in_q(sym_q),
    .out_valid(dac_valid), .out_i(dac_i), .out_q(dac_q)
  );
endmodule

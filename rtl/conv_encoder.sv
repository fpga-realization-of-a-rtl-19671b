// conv_encoder -- rate 1/3, constraint length 5 convolutional encoder with
// parallel-to-serial output (conv + p2s).
//
// On each rdy_in strobe the encoder core forms the three coded bits of din
// and the four-bit state {s0,s1,s2,s3} (generators 25, 33, 37 octal, read off
// the published state-transition table) and shifts din into the state.  The
// p2s stage then puts g0, g1, g2 on dout on the next three clocks, each with
// a rdy_out strobe.  A new rdy_in may come at most every third clock (the
// published transmitter feeds one source bit every 16 clocks).  pkt_start
// clears the state so that each packet starts in state 0; the bit order g0
// first and the clear at packet start are choices of this design.
module conv_encoder (
  input  logic clk,
  input  logic rst_n,
  input  logic pkt_start,  // clears the encoder state at the start of a packet
  input  logic rdy_in,     // source bit strobe
  input  logic din,        // source bit
  output logic rdy_out,    // coded bit strobe (three per source bit)
  output logic dout        // coded bit, order g0, g1, g2
);
  import scfde_pkg::*;

  logic [3:0] state;     // conv: encoder memory
  logic [2:0] code_q;    // p2s: coded bits waiting to be sent, {g2,g1,g0}
  logic [1:0] left;      // p2s: bits still to send

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= '0;
      code_q  <= '0;
      left    <= '0;
      rdy_out <= 1'b0;
      dout    <= 1'b0;
    end else begin
      rdy_out <= 1'b0;
      if (left != 0) begin
        rdy_out <= 1'b1;
        dout    <= code_q[0];
        code_q  <= code_q >> 1;
        left    <= left - 2'd1;
      end
      if (pkt_start) begin
        state <= '0;
      end else if (rdy_in) begin
        code_q <= conv_out(din, state);
        left   <= 2'd3;
        state  <= {din, state[3:1]};
      end
    end
  end
endmodule

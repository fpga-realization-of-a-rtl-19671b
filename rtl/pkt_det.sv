// pkt_det -- double sliding window packet detector with output switch.
//
// Received samples shift through six registers: the five newest form window
// A and the sixth window B (the published realisation keeps six registers
// instead of two five-sample windows).  Every sample, the energies
// a = sum |r|^2 over A and b = |r|^2 over B are formed; when a > THR_NUM*b
// and a > E_MIN the switch closes and stays closed until rearm.  The ratio
// test is done by multiplication instead of division, and the energy floor
// E_MIN keeps an all-zero input from triggering; both are this design's
// choices.  With the switch closed, samples leave from the oldest register,
// so the packet start is not lost: out_valid follows in_valid with a delay
// of six samples.  detected is the switch state.
module pkt_det #(
  parameter int W       = 12,
  parameter int WIN_A   = 5,
  parameter int WIN_B   = 1,
  parameter int THR_NUM = 8,
  parameter int E_MIN   = 4096
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                rearm,      // open the switch, wait for a packet
  input  logic                in_valid,   // sample strobe
  input  logic signed [W-1:0] in_i,       // sample I
  input  logic signed [W-1:0] in_q,       // sample Q
  output logic                detected,   // switch closed
  output logic                out_valid,  // passed sample strobe
  output logic signed [W-1:0] out_i,      // passed sample I
  output logic signed [W-1:0] out_q       // passed sample Q
);
  localparam int N  = WIN_A + WIN_B;
  localparam int EW = 2 * W + 4;

  logic signed [W-1:0] sr_i [N];
  logic signed [W-1:0] sr_q [N];
  logic [EW-1:0] ea, eb;
  logic          hit;

  always_comb begin
    ea = '0;
    eb = '0;
    for (int k = 0; k < WIN_A; k++)
      ea += EW'(sr_i[k] * sr_i[k]) + EW'(sr_q[k] * sr_q[k]);
    for (int k = WIN_A; k < N; k++)
      eb += EW'(sr_i[k] * sr_i[k]) + EW'(sr_q[k] * sr_q[k]);
    hit = (ea > EW'(E_MIN)) && (ea > EW'(THR_NUM) * eb);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N; k++) begin sr_i[k] <= '0; sr_q[k] <= '0; end
      detected <= 1'b0; out_valid <= 1'b0; out_i <= '0; out_q <= '0;
    end else begin
      out_valid <= 1'b0;
      if (rearm) begin
        detected <= 1'b0;
        for (int k = 0; k < N; k++) begin sr_i[k] <= '0; sr_q[k] <= '0; end
      end else if (in_valid) begin
        sr_i[0] <= in_i;
        sr_q[0] <= in_q;
        for (int k = 1; k < N; k++) begin sr_i[k] <= sr_i[k-1]; sr_q[k] <= sr_q[k-1]; end
        if (detected || hit) begin
          detected  <= 1'b1;
          out_valid <= 1'b1;
          out_i     <= sr_i[N-1];
          out_q     <= sr_q[N-1];
        end
      end
    end
  end
endmodule

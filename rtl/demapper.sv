// demapper -- QPSK hard-decision de-mapper.
//
// Each input symbol is sliced by sign ('1' for a non-negative part, the
// inverse of the mapper's '1' = +1) and the two bits are sent on one serial
// output, I on the clock after rdy_in and Q on the clock after that, each
// with a dout_valid strobe -- the multiplexer of the published de-mapper.
// Symbols may arrive at most every second clock.
module demapper #(
  parameter int W = 12
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                rdy_in,      // symbol strobe
  input  logic signed [W-1:0] din_I,       // in-phase part
  input  logic signed [W-1:0] din_Q,       // quadrature part
  output logic                dout_valid,  // bit strobe
  output logic                dout         // hard-decided bit
);
  logic q_pending, q_bit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_pending <= 1'b0; q_bit <= 1'b0; dout_valid <= 1'b0; dout <= 1'b0;
    end else begin
      dout_valid <= 1'b0;
      if (rdy_in) begin
        dout_valid <= 1'b1;
        dout       <= !din_I[W-1];
        q_bit      <= !din_Q[W-1];
        q_pending  <= 1'b1;
      end else if (q_pending) begin
        dout_valid <= 1'b1;
        dout       <= q_bit;
        q_pending  <= 1'b0;
      end
    end
  end

  a_rate: assert property (@(posedge clk) disable iff (!rst_n) rdy_in |=> !rdy_in)
    else $error("demapper: symbols closer than two clocks");
endmodule

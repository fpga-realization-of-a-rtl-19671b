// qpsk_mapper -- QPSK mapper: steers the serial coded bit stream alternately
// onto the in-phase and quadrature rails.
//
// Each rdy_in strobe forwards din to d_I (first, third, ... bit of a packet)
// or to d_Q (second, fourth, ...), with a one-clock rdy_out_I or rdy_out_Q
// strobe on the next clock.  The bits stay one bit wide: '1' stands for +1
// and '0' for -1, as in the published mapper; widening happens at UW
// insertion.  pkt_start puts the next bit on I (this design's choice).
module qpsk_mapper (
  input  logic clk,
  input  logic rst_n,
  input  logic pkt_start,   // next bit goes to I
  input  logic rdy_in,      // coded bit strobe
  input  logic din,         // coded bit
  output logic rdy_out_I,   // strobe for d_I
  output logic d_I,         // in-phase bit ('1' = +1)
  output logic rdy_out_Q,   // strobe for d_Q
  output logic d_Q          // quadrature bit
);
  logic sel_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel_q <= 1'b0;
      rdy_out_I <= 1'b0; rdy_out_Q <= 1'b0;
      d_I <= 1'b0; d_Q <= 1'b0;
    end else begin
      rdy_out_I <= 1'b0;
      rdy_out_Q <= 1'b0;
      if (pkt_start) begin
        sel_q <= 1'b0;
      end else if (rdy_in) begin
        if (sel_q) begin
          d_Q <= din; rdy_out_Q <= 1'b1;
        end else begin
          d_I <= din; rdy_out_I <= 1'b1;
        end
        sel_q <= ~sel_q;
      end
    end
  end
endmodule

// cordic_rot -- pipelined CORDIC in rotation mode: multiplies x + jy by
// e^{j*angle}.
//
// A pre-stage rotates by half a turn when the angle lies in the left
// half-plane, ITER shift-and-add stages drive the residual angle to zero, and
// a last stage removes the CORDIC gain (multiplication by 19898/32768) and
// saturates to W bits.  One input per clock; results ITER+2 clocks later with
// out_valid, together with a TAG_W-bit side value.  Angle: 16-bit fraction of
// a turn (65536 = 2*pi).  Used for frequency-offset and phase compensation;
// the document gives cos/sin multiplication, the CORDIC form is this design's
// choice.
module cordic_rot #(
  parameter int W     = 12,
  parameter int ITER  = 16,
  parameter int TAG_W = 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,   // input strobe
  input  logic signed [W-1:0] in_x,       // real part
  input  logic signed [W-1:0] in_y,       // imaginary part
  input  logic signed [15:0]  in_angle,   // rotation, 65536 = full turn
  input  logic [TAG_W-1:0]    in_tag,     // side value
  output logic                out_valid,  // result strobe
  output logic signed [W-1:0] out_x,      // rotated real part
  output logic signed [W-1:0] out_y,      // rotated imaginary part
  output logic [TAG_W-1:0]    out_tag     // side value
);
  import scfde_pkg::*;
  localparam int IW = W + 3;
  localparam int GAIN_INV = 19898;   // round(2^15 / 1.64676)

  logic signed [IW-1:0] xs [ITER+1];
  logic signed [IW-1:0] ys [ITER+1];
  logic signed [15:0]   zs [ITER+1];
  logic                 vs [ITER+1];
  logic [TAG_W-1:0]     ts [ITER+1];

  logic signed [IW+15:0] gx, gy;
  logic signed [W-1:0]   sx, sy;

  function automatic logic signed [W-1:0] sat(input logic signed [IW+15:0] v);
    if (v > (2**(W-1) - 1))   return W'(2**(W-1) - 1);
    if (v < -(2**(W-1)))      return W'(-(2**(W-1)));
    return W'(v);
  endfunction

  always_comb begin
    gx = ((IW+16)'(xs[ITER]) * (IW+16)'(GAIN_INV) + ((IW+16)'(1) <<< 14)) >>> 15;
    gy = ((IW+16)'(ys[ITER]) * (IW+16)'(GAIN_INV) + ((IW+16)'(1) <<< 14)) >>> 15;
    sx = sat(gx);
    sy = sat(gy);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s <= ITER; s++) begin
        xs[s] <= '0; ys[s] <= '0; zs[s] <= '0; vs[s] <= 1'b0; ts[s] <= '0;
      end
      out_valid <= 1'b0; out_x <= '0; out_y <= '0; out_tag <= '0;
    end else begin
      vs[0] <= in_valid;
      ts[0] <= in_tag;
      // angle in [-1/4, 1/4) turn stays; otherwise rotate by half a turn first
      if (in_angle[15] != in_angle[14]) begin
        xs[0] <= -IW'(in_x);
        ys[0] <= -IW'(in_y);
        zs[0] <= in_angle + 16'sh8000;
      end else begin
        xs[0] <= IW'(in_x);
        ys[0] <= IW'(in_y);
        zs[0] <= in_angle;
      end
      for (int s = 0; s < ITER; s++) begin
        vs[s+1] <= vs[s];
        ts[s+1] <= ts[s];
        if (zs[s] >= 0) begin
          xs[s+1] <= xs[s] - (ys[s] >>> s);
          ys[s+1] <= ys[s] + (xs[s] >>> s);
          zs[s+1] <= zs[s] - 16'(cordic_atan(s));
        end else begin
          xs[s+1] <= xs[s] + (ys[s] >>> s);
          ys[s+1] <= ys[s] - (xs[s] >>> s);
          zs[s+1] <= zs[s] + 16'(cordic_atan(s));
        end
      end
      out_valid <= vs[ITER];
      out_x     <= sx;
      out_y     <= sy;
      out_tag   <= ts[ITER];
    end
  end
endmodule

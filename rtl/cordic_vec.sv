// cordic_vec -- pipelined CORDIC in vectoring mode: returns the angle of the
// complex input x + jy (atan2) and its magnitude.
//
// A pre-stage folds the left half-plane onto the right one (adding half a
// turn), then ITER shift-and-add stages drive y to zero while accumulating
// the rotation angle.  One input may enter every clock; results appear ITER+1
// clocks later with out_valid, and a TAG_W-bit side value travels along.
// Angle: 16-bit fraction of a full turn (65536 = 2*pi).  Magnitude carries
// the usual CORDIC gain of about 1.647.  This helper is used by the
// frequency estimator and the UW phase-error estimator; the document names
// only "arc tangent", the CORDIC realisation is this design's choice.
module cordic_vec #(
  parameter int W     = 16,   // input width
  parameter int ITER  = 16,   // micro-rotation stages
  parameter int TAG_W = 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,   // input strobe
  input  logic signed [W-1:0] in_x,       // real part
  input  logic signed [W-1:0] in_y,       // imaginary part
  input  logic [TAG_W-1:0]    in_tag,     // side value carried to the output
  output logic                out_valid,  // result strobe
  output logic signed [15:0]  out_angle,  // atan2(y, x), 65536 = full turn
  output logic [W+1:0]        out_mag,    // 1.647 * |x + jy|
  output logic [TAG_W-1:0]    out_tag     // side value
);
  import scfde_pkg::*;
  localparam int IW = W + 2;

  logic signed [IW-1:0] xs [ITER+1];
  logic signed [IW-1:0] ys [ITER+1];
  logic signed [15:0]   zs [ITER+1];
  logic                 vs [ITER+1];
  logic [TAG_W-1:0]     ts [ITER+1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s <= ITER; s++) begin
        xs[s] <= '0; ys[s] <= '0; zs[s] <= '0; vs[s] <= 1'b0; ts[s] <= '0;
      end
    end else begin
      // stage 0: fold into the right half-plane
      vs[0] <= in_valid;
      ts[0] <= in_tag;
      if (in_x < 0) begin
        xs[0] <= -IW'(in_x);
        ys[0] <= -IW'(in_y);
        zs[0] <= 16'sh8000;
      end else begin
        xs[0] <= IW'(in_x);
        ys[0] <= IW'(in_y);
        zs[0] <= '0;
      end
      for (int s = 0; s < ITER; s++) begin
        vs[s+1] <= vs[s];
        ts[s+1] <= ts[s];
        if (ys[s] >= 0) begin
          xs[s+1] <= xs[s] + (ys[s] >>> s);
          ys[s+1] <= ys[s] - (xs[s] >>> s);
          zs[s+1] <= zs[s] + 16'(cordic_atan(s));
        end else begin
          xs[s+1] <= xs[s] - (ys[s] >>> s);
          ys[s+1] <= ys[s] + (xs[s] >>> s);
          zs[s+1] <= zs[s] - 16'(cordic_atan(s));
        end
      end
    end
  end

  assign out_valid = vs[ITER];
  assign out_angle = zs[ITER];
  assign out_mag   = xs[ITER][IW-1:0];
  assign out_tag   = ts[ITER];
endmodule

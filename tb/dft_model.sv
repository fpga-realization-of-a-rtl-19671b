// dft_model -- behavioural stand-in for the vendor 64-point FFT/IFFT cores.
//
// Collects N complex samples, computes the transform with real arithmetic
// and streams the N results out, one per clock, starting LAT clocks after
// the last input.
//  INV = 0 (FFT):  input in arrival order (a frame ends after N inputs),
//                  out_k = bin index, out = round(DFT / 2^SHIFT).
//  INV = 1 (IFFT): input addressed by in_k, the frame ends when bin N-1
//                  arrives, output in time order, out = round(IDFT) with the
//                  1/N scaling.
// Outputs saturate to OW bits.  Not synthesisable (uses real numbers).
module dft_model #(
  parameter int INV   = 0,
  parameter int N     = 64,
  parameter int IW    = 12,
  parameter int OW    = 16,
  parameter int SHIFT = 3,
  parameter int LAT   = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [5:0]           in_k,
  input  logic signed [IW-1:0] in_re,
  input  logic signed [IW-1:0] in_im,
  output logic                 out_valid,
  output logic [5:0]           out_k,
  output logic signed [OW-1:0] out_re,
  output logic signed [OW-1:0] out_im
);
  real xr [N], xi [N], yr [N], yi [N];
  int  cnt, outn, wait_c;
  bit  busy;

  function automatic logic signed [OW-1:0] sat(input real v);
    longint r;
    r = longint'(v);
    if (r > 2**(OW-1) - 1) r = 2**(OW-1) - 1;
    if (r < -(2**(OW-1)))  r = -(2**(OW-1));
    return OW'(r);
  endfunction

  task automatic compute();
    real a, sr, si, pi2;
    pi2 = 2.0 * 3.14159265358979323846;
    for (int k = 0; k < N; k++) begin
      sr = 0.0; si = 0.0;
      for (int m = 0; m < N; m++) begin
        a  = (INV != 0 ? pi2 : -pi2) * real'(k * m) / real'(N);
        sr += xr[m] * $cos(a) - xi[m] * $sin(a);
        si += xr[m] * $sin(a) + xi[m] * $cos(a);
      end
      if (INV != 0) begin yr[k] = sr / real'(N); yi[k] = si / real'(N); end
      else          begin yr[k] = sr / real'(2**SHIFT); yi[k] = si / real'(2**SHIFT); end
    end
  endtask

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= 0; outn <= 0; busy <= 0; wait_c <= 0;
      out_valid <= 1'b0; out_k <= '0; out_re <= '0; out_im <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        if (INV != 0) begin
          xr[in_k] = real'(in_re); xi[in_k] = real'(in_im);
          if (in_k == 6'(N - 1)) begin compute(); busy <= 1; wait_c <= LAT; outn <= 0; end
        end else begin
          xr[cnt] = real'(in_re); xi[cnt] = real'(in_im);
          if (cnt == N - 1) begin
            cnt <= 0; compute(); busy <= 1; wait_c <= LAT; outn <= 0;
          end else cnt <= cnt + 1;
        end
      end
      if (busy) begin
        if (wait_c > 0) wait_c <= wait_c - 1;
        else begin
          out_valid <= 1'b1;
          out_k     <= 6'(outn);
          out_re    <= sat(yr[outn]);
          out_im    <= sat(yi[outn]);
          if (outn == N - 1) busy <= 0;
          outn <= outn + 1;
        end
      end
    end
  end
endmodule

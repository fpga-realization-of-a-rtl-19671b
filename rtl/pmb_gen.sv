// pmb_gen -- preamble generator with the packet counter new_pkt.
//
// After start (and after reset) it sends, one symbol per clock while out_rdy
// is high: the 16-entry short-preamble ROM ten times, the last 16 entries of
// the 64-entry long-preamble ROM as cyclic prefix, and the long ROM twice --
// 304 BPSK symbols of +-7 on I (Q is 0).  Reading two small ROMs repeatedly
// instead of storing all 304 symbols follows the published design; the ROM
// contents are this design's own patterns (scfde_pkg).  finish rises after
// the last symbol and stays high until the next start.
// new_pkt counts the data symbols reported on data_sym; after N_DATA_PKT
// (288) it raises data_done, which the transmitter uses to stop the source
// and, once the payload has left, to start the next packet.
module pmb_gen #(
  parameter int N_SHORT     = 16,
  parameter int N_SHORT_REP = 10,
  parameter int N_LONG      = 64,
  parameter int N_LONG_CP   = 16,
  parameter int N_DATA_PKT  = 288,
  parameter int AMP         = 7
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,      // begin a new preamble (and packet)
  input  logic              out_rdy,    // downstream can take a symbol
  output logic              out_valid,  // preamble symbol strobe
  output logic signed [3:0] out_i,      // +-AMP
  output logic signed [3:0] out_q,      // always 0
  output logic              finish,     // all preamble symbols sent
  input  logic              data_sym,   // one data symbol was mapped (new_pkt)
  output logic              data_done   // N_DATA_PKT data symbols counted
);
  import scfde_pkg::*;

  localparam int N_TOT = N_SHORT * N_SHORT_REP + N_LONG_CP + 2 * N_LONG;

  logic [$clog2(N_TOT+1)-1:0]      idx;
  logic                            running;
  logic [$clog2(N_DATA_PKT+1)-1:0] dcnt;
  logic                            bit_v;
  logic                            last_sent;  // last symbol is on the output
  int                              lpos;

  // ROM lookup for symbol idx: short ROM, then long ROM with its prefix
  always_comb begin
    lpos = 0;
    if (int'(idx) < N_SHORT * N_SHORT_REP) begin
      bit_v = SHORT_PAT[int'(idx) % N_SHORT];
    end else begin
      lpos  = (int'(idx) - N_SHORT * N_SHORT_REP + N_LONG - N_LONG_CP) % N_LONG;
      bit_v = LONG_PAT[lpos];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx <= '0; running <= 1'b1; finish <= 1'b0; last_sent <= 1'b0;
      out_valid <= 1'b0; out_i <= '0; out_q <= '0;
      dcnt <= '0; data_done <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (start) begin
        idx <= '0; running <= 1'b1; finish <= 1'b0; last_sent <= 1'b0;
        dcnt <= '0; data_done <= 1'b0;
      end else begin
        if (running && out_rdy) begin
          out_valid <= 1'b1;
          out_i     <= bit_v ? 4'(AMP) : -4'(AMP);
          out_q     <= '0;
          if (int'(idx) == N_TOT - 1) begin
            running   <= 1'b0;
            last_sent <= 1'b1;
          end
          idx <= idx + 1'b1;
        end
        if (last_sent) finish <= 1'b1;   // after the last symbol has been taken
        if (data_sym && !data_done) begin
          if (int'(dcnt) == N_DATA_PKT - 1) data_done <= 1'b1;
          dcnt <= dcnt + 1'b1;
        end
      end
    end
  end
endmodule

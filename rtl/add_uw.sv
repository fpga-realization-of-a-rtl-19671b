// add_uw -- Unique Word insertion for the I and Q rails (add_uw_i/add_uw_q,
// UW ROM, data FIFO, sign_ext and pkt_fin).
//
// After start, the block emits the packet payload as 4-bit symbols:
//   UW, D48, UW, D48, ..., D48, UW   (N_FRAMES data blocks, N_FRAMES+1 UWs)
// The UW comes from a 16-entry ROM (QPSK, +-4 +-4j).  Data symbols arrive as
// one bit per rail ('1' = +1) and are sign-extended to +-4; while a UW is
// being sent they wait in a 16-deep synchronous FIFO, as in the published
// design.  One symbol leaves per clock whenever out_rdy is high and a symbol
// is available; in_ready tells the source that the FIFO has room.  pkt_fin
// counts the emitted symbols and raises finish after the last UW.
// Sending the closing UW (so that the sixth block also has a trailing UW) is
// this design's choice; the published counter stops after 384 symbols.
module add_uw #(
  parameter int N_UW       = 16,
  parameter int N_DATA     = 48,
  parameter int N_FRAMES   = 6,
  parameter int FIFO_DEPTH = 16,
  parameter int DATA_AMP   = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,      // begin a new packet payload
  input  logic              in_valid,   // data symbol strobe
  input  logic              in_i,       // I bit ('1' = +1)
  input  logic              in_q,       // Q bit
  output logic              in_ready,   // FIFO can take a symbol
  input  logic              out_rdy,    // downstream can take a symbol
  output logic              out_valid,  // payload symbol strobe
  output logic signed [3:0] out_i,      // payload symbol, I
  output logic signed [3:0] out_q,      // payload symbol, Q
  output logic              finish      // whole payload sent
);
  import scfde_pkg::*;

  typedef enum logic [1:0] {S_IDLE, S_UW, S_DATA, S_DONE} st_t;
  st_t st;

  logic [$clog2(N_DATA+1)-1:0]   cnt;      // position inside UW or data block
  logic [$clog2(N_FRAMES+2)-1:0] frame;    // UWs sent so far
  logic [1:0]                    f_data;
  logic                          f_empty, f_full, f_pop;
  logic [$clog2(FIFO_DEPTH+1)-1:0] f_count;
  logic [$clog2(N_UW)-1:0]       uw_idx;

  sync_fifo #(.W(2), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .clr(start),
    .wr_en(in_valid), .wr_data({in_i, in_q}),
    .rd_en(f_pop), .rd_data(f_data),
    .empty(f_empty), .full(f_full), .count(f_count)
  );

  assign in_ready = (int'(f_count) <= FIFO_DEPTH - 2);  // room for a 2-symbol burst
  assign f_pop    = (st == S_DATA) && out_rdy && !f_empty;
  assign uw_idx   = cnt[$clog2(N_UW)-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; cnt <= '0; frame <= '0; finish <= 1'b0;
      out_valid <= 1'b0; out_i <= '0; out_q <= '0;
    end else begin
      out_valid <= 1'b0;
      if (start) begin
        st <= S_UW; cnt <= '0; frame <= '0; finish <= 1'b0;
      end else begin
        case (st)
          S_UW: if (out_rdy) begin
            out_valid <= 1'b1;
            out_i <= UW_PAT_I[uw_idx] ? 4'(DATA_AMP) : -4'(DATA_AMP);
            out_q <= UW_PAT_Q[uw_idx] ? 4'(DATA_AMP) : -4'(DATA_AMP);
            if (int'(cnt) == N_UW - 1) begin
              cnt <= '0;
              if (int'(frame) == N_FRAMES) begin
                st <= S_DONE; finish <= 1'b1;
              end else begin
                st <= S_DATA;
              end
              frame <= frame + 1'b1;
            end else begin
              cnt <= cnt + 1'b1;
            end
          end
          S_DATA: if (f_pop) begin
            out_valid <= 1'b1;
            out_i <= f_data[1] ? 4'(DATA_AMP) : -4'(DATA_AMP);   // sign_ext
            out_q <= f_data[0] ? 4'(DATA_AMP) : -4'(DATA_AMP);
            if (int'(cnt) == N_DATA - 1) begin
              cnt <= '0; st <= S_UW;
            end else begin
              cnt <= cnt + 1'b1;
            end
          end
          default: ;
        endcase
      end
    end
  end
endmodule

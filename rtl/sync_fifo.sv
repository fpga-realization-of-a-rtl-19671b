// sync_fifo -- single-clock first-in first-out buffer.
//
// Written on wr_en when not full, read on rd_en when not empty; rd_data shows
// the oldest entry combinationally (first-word fall-through).  count gives the
// fill level.  Used as the 16-deep data buffer of the UW inserter and as the
// symbol queue in front of the polyphase filter.
module sync_fifo #(
  parameter int W     = 8,
  parameter int DEPTH = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clr,      // empty the FIFO
  input  logic                       wr_en,    // write strobe
  input  logic [W-1:0]               wr_data,  // data to write
  input  logic                       rd_en,    // read (pop) strobe
  output logic [W-1:0]               rd_data,  // oldest entry
  output logic                       empty,    // no entry
  output logic                       full,     // DEPTH entries
  output logic [$clog2(DEPTH+1)-1:0] count     // fill level
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;

  assign empty   = (count == 0);
  assign full    = (int'(count) == DEPTH);
  assign rd_data = mem[rp];

  always_ff @(posedge clk) begin
    if (wr_en && !full) mem[wp] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; count <= '0;
    end else if (clr) begin
      wp <= '0; rp <= '0; count <= '0;
    end else begin
      automatic logic do_wr = wr_en && !full;
      automatic logic do_rd = rd_en && !empty;
      if (do_wr) wp <= (int'(wp) == DEPTH - 1) ? '0 : wp + 1'b1;
      if (do_rd) rp <= (int'(rp) == DEPTH - 1) ? '0 : rp + 1'b1;
      if (do_wr && !do_rd) count <= count + 1'b1;
      else if (do_rd && !do_wr) count <= count - 1'b1;
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && full && !rd_en))
    else $error("sync_fifo: write to a full FIFO");
endmodule

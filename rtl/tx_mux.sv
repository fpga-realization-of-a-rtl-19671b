// tx_mux -- transmit selector, polyphase_buf FIFO and its controller.
//
// The selector passes the preamble stream until pmb_finish is high and the
// UW-appended payload stream afterwards, as in the published multiplexer.
// Both streams are queued in polyphase_buf, which decouples the clock-rate
// preamble and the bursty payload from the fixed symbol rate of the RRC
// filter: polyphase_buf_ctrl hands one symbol to the filter whenever the
// buffer is not empty and the filter asks for one (filt_req).  pmb_rdy and
// data_rdy are the back-pressure to the two sources.  The buffer depth
// (512) is this design's choice.
module tx_mux #(
  parameter int BUF_DEPTH = 512
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clr,         // start of packet: empty the buffer
  input  logic              pmb_finish,  // preamble generator is done
  input  logic              pmb_valid,   // preamble symbol strobe
  input  logic signed [3:0] pmb_i,       // preamble symbol I
  input  logic signed [3:0] pmb_q,       // preamble symbol Q
  output logic              pmb_rdy,     // buffer can take a preamble symbol
  input  logic              data_valid,  // payload symbol strobe
  input  logic signed [3:0] data_i,      // payload symbol I
  input  logic signed [3:0] data_q,      // payload symbol Q
  output logic              data_rdy,    // buffer can take a payload symbol
  input  logic              filt_req,    // filter takes a symbol this clock
  output logic              filt_valid,  // a symbol is handed over
  output logic signed [3:0] filt_i,      // symbol I
  output logic signed [3:0] filt_q       // symbol Q
);
  logic       wr;
  logic [7:0] wdata, rdata;
  logic       empty, full;
  logic [$clog2(BUF_DEPTH+1)-1:0] count;

  // selector
  always_comb begin
    if (!pmb_finish) begin
      wr    = pmb_valid;
      wdata = {pmb_i, pmb_q};
    end else begin
      wr    = data_valid;
      wdata = {data_i, data_q};
    end
  end

  // keep two entries of slack so a registered source never overruns
  assign pmb_rdy  = !pmb_finish && (int'(count) < BUF_DEPTH - 2);
  assign data_rdy =  pmb_finish && (int'(count) < BUF_DEPTH - 2);

  sync_fifo #(.W(8), .DEPTH(BUF_DEPTH)) polyphase_buf (
    .clk, .rst_n, .clr,
    .wr_en(wr), .wr_data(wdata),
    .rd_en(filt_req && !empty), .rd_data(rdata),
    .empty, .full, .count
  );

  // polyphase_buf_ctrl
  assign filt_valid = filt_req && !empty;
  assign filt_i     = rdata[7:4];
  assign filt_q     = rdata[3:0];
endmodule

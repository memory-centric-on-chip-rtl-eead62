// ni_sender: output queue of the network interface and its sender port
// toward the crossbar.
//
// Flits written by the buffering control wait in the output queue (OQ_DEPTH
// flits). When the head flit is a header, n_tx_req and n_tx_pri are raised
// with the header on n_tx_data. The crossbar takes the header in the cycle
// it arbitrates and answers with n_tx_grant one cycle later; the header is
// then dropped from the queue and the sender presents the body and tail
// flits with n_data_rdy, one per cycle, holding a flit while n_stall is
// high. After the tail flit the next packet may request. The request /
// grant / data-ready / stall handshake follows the interface between NI and
// crossbar; the one idle cycle after the grant is this design's choice.
module ni_sender
  import ocin_pkg::*;
#(
  parameter int unsigned OQ_DEPTH = 16
) (
  input  logic                          clk,
  input  logic                          rst,
  // output queue write port
  input  logic                          oq_wr_en,
  input  logic [FLIT_W-1:0]             oq_wr_data,
  output logic [$clog2(OQ_DEPTH+1)-1:0] oq_free,
  output logic [$clog2(OQ_DEPTH+1)-1:0] oq_count,
  // crossbar sender port
  output logic                          n_tx_req,
  output logic [PRI_W-1:0]              n_tx_pri,
  input  logic                          n_tx_grant,
  output logic                          n_data_rdy,
  output logic [FLIT_W-1:0]             n_tx_data,
  input  logic                          n_stall
);
  logic        empty, full, pop;
  logic [FLIT_W-1:0] head;
  flit_t       head_f;
  header_t     head_h;
  logic        sending;

  sync_fifo #(.WIDTH(FLIT_W), .DEPTH(OQ_DEPTH)) u_oq (
    .clk(clk), .rst(rst),
    .wr_en(oq_wr_en), .wr_data(oq_wr_data),
    .rd_en(pop), .rd_data(head),
    .empty(empty), .full(full), .count(oq_count), .free(oq_free)
  );

  assign head_f    = flit_t'(head);
  assign head_h    = header_t'(head_f.data);
  assign n_tx_data = head;
  assign n_tx_pri  = head_h.pri;

  wire head_is_hdr = !empty && (head_f.ftype == FLIT_HEADER);
  assign n_tx_req   = !sending && head_is_hdr && !n_tx_grant;
  assign n_data_rdy = sending && !empty && (head_f.ftype != FLIT_HEADER);

  wire hdr_taken  = !sending && n_tx_grant && head_is_hdr;
  wire flit_taken = n_data_rdy && !n_stall;
  assign pop = hdr_taken || flit_taken;

  always_ff @(posedge clk) begin
    if (rst) sending <= 1'b0;
    else if (hdr_taken) sending <= 1'b1;
    else if (flit_taken && head_f.ftype == FLIT_TAIL) sending <= 1'b0;
  end

  a_oq_no_overflow: assert property (@(posedge clk) disable iff (rst) oq_wr_en |-> !full);
endmodule

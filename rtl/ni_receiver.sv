// ni_receiver: input queue of the network interface and the receive
// operation toward the processing element's wrapper.
//
// Flits delivered by the crossbar (n_transmit, n_type_out, n_data_out) enter
// the input queue (IQ_DEPTH flits). n_num_free tells the crossbar there is
// room; it is high while at least two slots are free, keeping one slot for
// the flit already inside the crossbar's output register.
//
// A packet is handed to the wrapper when its header and all of its payload
// flits are in the queue and the wrapper's rx_cap (free space, 8 meaning 8 or
// more) covers the burst: the header is taken in one cycle, then
// rx_in_valid is high for BL+1 cycles with one word per cycle on rx_data and
// the packet fields (rx_rw, rx_in_bl, rx_source, msg_info_in) steady.
// Port names and meanings follow the wrapper interface; waiting for the whole
// packet before starting, so the burst has no gaps, is this design's choice.
module ni_receiver
  import ocin_pkg::*;
#(
  parameter int unsigned IQ_DEPTH = 32
) (
  input  logic                          clk,
  input  logic                          rst,
  // crossbar receiver port
  input  logic                          n_transmit,
  input  logic [1:0]                    n_type_out,
  input  logic [DATA_W-1:0]             n_data_out,
  output logic                          n_num_free,
  // wrapper receive operation
  input  logic [3:0]                    rx_cap,
  output logic                          rx_in_valid,
  output logic                          rx_rw,
  output logic [BL_W-1:0]               rx_in_bl,
  output logic [NODE_W-1:0]             rx_source,
  output logic [MSG_W-1:0]              msg_info_in,
  output logic [DATA_W-1:0]             rx_data
);
  localparam int unsigned CW = $clog2(IQ_DEPTH + 1);

  logic          empty, full, pop;
  logic [FLIT_W-1:0] head;
  logic [CW-1:0] count, free;
  flit_t         head_f;
  header_t       head_h, cur;
  logic          busy;
  logic [3:0]    left;

  sync_fifo #(.WIDTH(FLIT_W), .DEPTH(IQ_DEPTH)) u_iq (
    .clk(clk), .rst(rst),
    .wr_en(n_transmit), .wr_data({n_type_out, n_data_out}),
    .rd_en(pop), .rd_data(head),
    .empty(empty), .full(full), .count(count), .free(free)
  );

  assign n_num_free = (free >= CW'(2));
  assign head_f     = flit_t'(head);
  assign head_h     = header_t'(head_f.data);

  wire [3:0] burst   = 4'(head_h.bl) + 4'd1;
  wire start = !busy && !empty && (head_f.ftype == FLIT_HEADER)
               && (count >= CW'(burst) + CW'(1)) && (rx_cap >= burst);

  assign rx_in_valid = busy;
  assign rx_data     = head_f.data;
  assign rx_rw       = cur.rw;
  assign rx_in_bl    = cur.bl;
  assign rx_source   = cur.src;
  assign msg_info_in = cur.msg_info;
  assign pop         = start || busy;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0;
      left <= '0;
      cur  <= '0;
    end else if (start) begin
      busy <= 1'b1;
      left <= burst;
      cur  <= head_h;
    end else if (busy) begin
      left <= left - 4'd1;
      if (left == 4'd1) busy <= 1'b0;
    end
  end

  a_iq_no_overflow: assert property (@(posedge clk) disable iff (rst) n_transmit |-> !full);
  a_payload_in_order: assert property (@(posedge clk) disable iff (rst)
    busy |-> head_f.ftype == ((left == 4'd1) ? FLIT_TAIL : FLIT_BODY));
endmodule

// crossbar: N x N wormhole crossbar switch of the on-chip interconnection
// network (N = 4: WPU, MAC, LT coding, SVC).
//
// Sender side (one port per NI, from the NI's point of view):
//   n_tx_req   - the NI presents a header flit on n_tx_data and asks to send
//   n_tx_pri   - packet priority used in arbitration (0 highest)
//   n_tx_grant - registered; rises the cycle after the header was accepted
//                and stays high until the tail flit has passed
//   n_data_rdy - the NI presents a body/tail flit on n_tx_data
//   n_stall    - the receiving queue has no free slot: hold the flit
// Receiver side (one port per NI):
//   n_num_free - the receiving input queue can take a flit
//   n_transmit, n_type_out, n_data_out - registered flit output
//
// Each output port has a grant_arbiter. A header requesting a free output
// whose receiver has room is switched through in the cycle the arbiter picks
// it; that output is then locked to the winner (wormhole switching) and every
// cycle with n_data_rdy high and n_stall low moves one flit. The tail flit
// (type 2) releases the output and drops the grant. n_stall is combinational
// from the receiver's n_num_free; the receiver keeps one slot in reserve for
// the flit held in this switch's output register. Port names, widths, the
// flit types and the stall/grant behaviour follow the network's interface
// definition; the one-cycle registered switch stage is this design's choice.
module crossbar
  import ocin_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic                 clk,
  input  logic                 rst,
  // sender (NI) side
  input  logic [N-1:0]         n_tx_req,
  input  logic [PRI_W-1:0]     n_tx_pri   [N],
  output logic [N-1:0]         n_tx_grant,
  input  logic [N-1:0]         n_data_rdy,
  input  logic [FLIT_W-1:0]    n_tx_data  [N],
  output logic [N-1:0]         n_stall,
  // receiver (NI) side
  input  logic [N-1:0]         n_num_free,
  output logic [N-1:0]         n_transmit,
  output logic [1:0]           n_type_out [N],
  output logic [DATA_W-1:0]    n_data_out [N]
);
  localparam int unsigned IW = $clog2(N);

  logic [N-1:0]  busy;             // output port locked to a packet
  logic [IW-1:0] owner [N];        // input owning each output
  logic [IW-1:0] gdest [N];        // output granted to each input

  flit_t   in_flit [N];
  header_t in_hdr  [N];
  always_comb begin
    for (int i = 0; i < N; i++) begin
      in_flit[i] = flit_t'(n_tx_data[i]);
      in_hdr[i]  = header_t'(in_flit[i].data);
    end
  end

  // stall toward each sender
  always_comb begin
    for (int i = 0; i < N; i++) n_stall[i] = n_tx_grant[i] && !n_num_free[gdest[i]];
  end

  // per-output arbitration
  logic [N-1:0]  arb_req   [N];
  logic [N-1:0]  arb_valid;
  logic [N-1:0]  arb_take;
  logic [IW-1:0] arb_win   [N];
  logic [N-1:0]  arb_grant [N];

  always_comb begin
    for (int d = 0; d < N; d++) begin
      for (int i = 0; i < N; i++) begin
        arb_req[d][i] = n_tx_req[i] && !n_tx_grant[i]
                        && (in_flit[i].ftype == FLIT_HEADER)
                        && (32'(in_hdr[i].dest) == d);
      end
      arb_take[d] = !busy[d] && n_num_free[d] && arb_valid[d];
    end
  end

  for (genvar d = 0; d < N; d++) begin : g_arb
    grant_arbiter #(.N(N), .PRI_W(PRI_W)) u_arb (
      .clk    (clk),
      .rst    (rst),
      .req    (arb_req[d]),
      .pri    (n_tx_pri),
      .take   (arb_take[d]),
      .valid  (arb_valid[d]),
      .winner (arb_win[d]),
      .grant  (arb_grant[d])
    );
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy       <= '0;
      n_tx_grant <= '0;
      n_transmit <= '0;
      for (int d = 0; d < N; d++) begin
        owner[d]      <= '0;
        gdest[d]      <= '0;
        n_type_out[d] <= '0;
        n_data_out[d] <= '0;
      end
    end else begin
      for (int d = 0; d < N; d++) begin
        n_transmit[d] <= 1'b0;
        if (arb_take[d]) begin
          busy[d]                 <= 1'b1;
          owner[d]                <= arb_win[d];
          n_tx_grant[arb_win[d]]  <= 1'b1;
          gdest[arb_win[d]]       <= IW'(d);
          n_transmit[d]           <= 1'b1;
          n_type_out[d]           <= in_flit[arb_win[d]].ftype;
          n_data_out[d]           <= in_flit[arb_win[d]].data;
        end else if (busy[d] && n_data_rdy[owner[d]] && !n_stall[owner[d]]) begin
          n_transmit[d]           <= 1'b1;
          n_type_out[d]           <= in_flit[owner[d]].ftype;
          n_data_out[d]           <= in_flit[owner[d]].data;
          if (in_flit[owner[d]].ftype == FLIT_TAIL) begin
            busy[d]               <= 1'b0;
            n_tx_grant[owner[d]]  <= 1'b0;
          end
        end
      end
    end
  end

  // an input asks for one output only, so no two outputs grant it together
  for (genvar i = 0; i < N; i++) begin : g_in_chk
    logic [N-1:0] taken_by;
    always_comb
      for (int d = 0; d < N; d++) taken_by[d] = arb_take[d] && arb_grant[d][i];
    a_one_output_per_input: assert property (@(posedge clk) disable iff (rst) $onehot0(taken_by));
  end

  for (genvar d = 0; d < N; d++) begin : g_chk
    // a locked output only carries body and tail flits from its owner
    a_no_header_in_packet: assert property (@(posedge clk) disable iff (rst)
      busy[d] && n_data_rdy[owner[d]] && !n_stall[owner[d]] |-> in_flit[owner[d]].ftype != FLIT_HEADER);
  end
endmodule

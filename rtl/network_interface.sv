// network_interface: the efficient network interface (NI) of one node.
//
// It bridges the processing element's wrapper and the crossbar:
//   transmit - buffer_ctrl packetizes the wrapper's bursts into the output
//              queue of ni_sender, borrowing d-MMU memory blocks for packets
//              that meet a blocked output queue (n_buf_* / n_data_* /
//              n_back_* / n_release go to the node's borrow_addr_gen);
//              ni_sender sends the queued packets through the crossbar;
//   receive  - ni_receiver queues the flits arriving from the crossbar in the
//              input queue and hands complete packets to the wrapper.
// Default sizes are an output queue of 16 flits and an input queue of 32
// flits, the sender/receiver queue sizes of the system evaluation, and up to
// 64 borrowed packets (512 words of borrowed memory in 8-word blocks).
// BORROW_EN = 0 gives the conventional NI used as the comparison baseline.
module network_interface
  import ocin_pkg::*;
#(
  parameter int unsigned NODE_ID    = 0,
  parameter int unsigned OQ_DEPTH   = 16,
  parameter int unsigned IQ_DEPTH   = 32,
  parameter int unsigned HQ_DEPTH   = 64,
  parameter bit          BORROW_EN  = 1'b1
) (
  input  logic                          clk,
  input  logic                          rst,
  // wrapper transmit operation
  output logic                          tx_ready,
  input  logic                          tx_out_valid,
  input  logic                          tx_rw,
  input  logic [BL_W-1:0]               tx_out_bl,
  input  logic [NODE_W-1:0]             tx_dest,
  input  logic [DATA_W-1:0]             tx_data,
  input  logic [PRI_W-1:0]              tx_pri,
  input  logic [MSG_W-1:0]              msg_info_out,
  // wrapper receive operation
  input  logic [3:0]                    rx_cap,
  output logic                          rx_in_valid,
  output logic                          rx_rw,
  output logic [BL_W-1:0]               rx_in_bl,
  output logic [NODE_W-1:0]             rx_source,
  output logic [MSG_W-1:0]              msg_info_in,
  output logic [DATA_W-1:0]             rx_data,
  // crossbar sender port
  output logic                          n_tx_req,
  output logic [PRI_W-1:0]              n_tx_pri,
  input  logic                          n_tx_grant,
  output logic                          n_data_rdy,
  output logic [FLIT_W-1:0]             n_tx_data,
  input  logic                          n_stall,
  // crossbar receiver port
  input  logic                          n_transmit,
  input  logic [1:0]                    n_type_out,
  input  logic [DATA_W-1:0]             n_data_out,
  output logic                          n_num_free,
  // buffer borrowing interface to the d-MMU
  output logic                          n_buf_req,
  input  logic                          n_buf_grant,
  output logic                          n_data_valid,
  output logic [BLOCK_W-1:0]            n_buf_data,
  output logic                          n_data_req,
  input  logic                          n_back_valid,
  input  logic [BLOCK_W-1:0]            n_back_data,
  output logic                          n_release,
  // status
  output logic                          borrow_mode,
  output logic [$clog2(HQ_DEPTH+1)-1:0] borrowed_pkts,
  output logic [$clog2(OQ_DEPTH+1)-1:0] oq_count
);
  logic                          oq_wr_en;
  logic [FLIT_W-1:0]             oq_wr_data;
  logic [$clog2(OQ_DEPTH+1)-1:0] oq_free;

  buffer_ctrl #(
    .NODE_ID(NODE_ID), .OQ_DEPTH(OQ_DEPTH), .HQ_DEPTH(HQ_DEPTH), .BORROW_EN(BORROW_EN)
  ) u_bc (
    .clk, .rst,
    .tx_ready, .tx_out_valid, .tx_rw, .tx_out_bl, .tx_dest, .tx_data, .tx_pri, .msg_info_out,
    .oq_wr_en, .oq_wr_data, .oq_free,
    .n_buf_req, .n_buf_grant, .n_data_valid, .n_buf_data,
    .n_data_req, .n_back_valid, .n_back_data, .n_release,
    .borrow_mode, .borrowed_pkts
  );

  ni_sender #(.OQ_DEPTH(OQ_DEPTH)) u_tx (
    .clk, .rst,
    .oq_wr_en, .oq_wr_data, .oq_free, .oq_count,
    .n_tx_req, .n_tx_pri, .n_tx_grant, .n_data_rdy, .n_tx_data, .n_stall
  );

  ni_receiver #(.IQ_DEPTH(IQ_DEPTH)) u_rx (
    .clk, .rst,
    .n_transmit, .n_type_out, .n_data_out, .n_num_free,
    .rx_cap, .rx_in_valid, .rx_rw, .rx_in_bl, .rx_source, .msg_info_in, .rx_data
  );
endmodule

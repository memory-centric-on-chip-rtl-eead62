// ocin_top: memory-centric on-chip interconnection network for the wireless
// video entertainment receiver.
//
// Four nodes - 0 WPU, 1 MAC, 2 LT coding, 3 SVC - each have an efficient
// network interface and the borrowing address generator of their d-MMU with
// the borrowable part of the node's distributed memory. The NIs exchange
// packets through one 4x4 wormhole crossbar with priority / grant-order
// arbitration. When a node's output queue is blocked (the receiver it sends
// to is slow), its NI parks whole packets in empty 8-word blocks of the
// d-MMU memory instead of stalling the processing element, and reads them
// back in order as the output queue drains.
//
// Ports: per node, the wrapper transmit and receive operations (the
// processing elements themselves are outside this design), the cache valid
// bits of the last cache way (from the d-MMU cache controller, also outside)
// and the borrowing status bits back to it, plus status outputs. All ports
// are per-node arrays indexed by node ID. Status: borrow_mode, blocks lent
// (borrowed), packets parked in the d-MMU (parked), output queue fill
// (oq_level) and the crossbar stall lines (stall_seen). Parameters default
// to the sizes of the system evaluation: 16-flit output queues, 32-flit
// input queues, 512 borrowable words (64 blocks) per node, 512 blocks in the
// valid table.
module ocin_top
  import ocin_pkg::*;
#(
  parameter int unsigned N          = 4,
  parameter int unsigned OQ_DEPTH   = 16,
  parameter int unsigned IQ_DEPTH   = 32,
  parameter int unsigned MAX_BLOCKS = 64,
  parameter int unsigned NUM_BLOCKS = 512,
  parameter int unsigned WINDOW     = 128,
  parameter bit          BORROW_EN  = 1'b1
) (
  input  logic                            clk,
  input  logic                            rst,
  // wrapper transmit operation
  output logic [N-1:0]                    tx_ready,
  input  logic [N-1:0]                    tx_out_valid,
  input  logic [N-1:0]                    tx_rw,
  input  logic [BL_W-1:0]                 tx_out_bl    [N],
  input  logic [NODE_W-1:0]               tx_dest      [N],
  input  logic [DATA_W-1:0]               tx_data      [N],
  input  logic [PRI_W-1:0]                tx_pri       [N],
  input  logic [MSG_W-1:0]                msg_info_out [N],
  // wrapper receive operation
  input  logic [3:0]                      rx_cap       [N],
  output logic [N-1:0]                    rx_in_valid,
  output logic [N-1:0]                    rx_rw,
  output logic [BL_W-1:0]                 rx_in_bl     [N],
  output logic [NODE_W-1:0]               rx_source    [N],
  output logic [MSG_W-1:0]                msg_info_in  [N],
  output logic [DATA_W-1:0]               rx_data      [N],
  // d-MMU cache controller side
  input  logic [NUM_BLOCKS-1:0]           cache_valid  [N],
  output logic [NUM_BLOCKS-1:0]           borrow_status[N],
  // status
  output logic [N-1:0]                    borrow_mode,
  output logic [$clog2(MAX_BLOCKS+1)-1:0] borrowed     [N],
  output logic [$clog2(MAX_BLOCKS+1)-1:0] parked       [N],
  output logic [$clog2(OQ_DEPTH+1)-1:0]   oq_level     [N],
  output logic [N-1:0]                    stall_seen
);
  // crossbar wires
  logic [N-1:0]          x_tx_req, x_tx_grant, x_data_rdy, x_stall, x_num_free, x_transmit;
  logic [PRI_W-1:0]      x_tx_pri   [N];
  logic [FLIT_W-1:0]     x_tx_data  [N];
  logic [1:0]            x_type_out [N];
  logic [DATA_W-1:0]     x_data_out [N];

  crossbar #(.N(N)) u_xbar (
    .clk, .rst,
    .n_tx_req(x_tx_req), .n_tx_pri(x_tx_pri), .n_tx_grant(x_tx_grant),
    .n_data_rdy(x_data_rdy), .n_tx_data(x_tx_data), .n_stall(x_stall),
    .n_num_free(x_num_free), .n_transmit(x_transmit),
    .n_type_out(x_type_out), .n_data_out(x_data_out)
  );
  assign stall_seen = x_stall;

  for (genvar n = 0; n < N; n++) begin : g_node
    logic                 buf_req, buf_grant, data_valid, data_req, back_valid, release_w;
    logic [BLOCK_W-1:0]   buf_data, back_data;

    network_interface #(
      .NODE_ID(n), .OQ_DEPTH(OQ_DEPTH), .IQ_DEPTH(IQ_DEPTH),
      .HQ_DEPTH(MAX_BLOCKS), .BORROW_EN(BORROW_EN)
    ) u_ni (
      .clk, .rst,
      .tx_ready(tx_ready[n]), .tx_out_valid(tx_out_valid[n]), .tx_rw(tx_rw[n]),
      .tx_out_bl(tx_out_bl[n]), .tx_dest(tx_dest[n]), .tx_data(tx_data[n]),
      .tx_pri(tx_pri[n]), .msg_info_out(msg_info_out[n]),
      .rx_cap(rx_cap[n]), .rx_in_valid(rx_in_valid[n]), .rx_rw(rx_rw[n]),
      .rx_in_bl(rx_in_bl[n]), .rx_source(rx_source[n]),
      .msg_info_in(msg_info_in[n]), .rx_data(rx_data[n]),
      .n_tx_req(x_tx_req[n]), .n_tx_pri(x_tx_pri[n]), .n_tx_grant(x_tx_grant[n]),
      .n_data_rdy(x_data_rdy[n]), .n_tx_data(x_tx_data[n]), .n_stall(x_stall[n]),
      .n_transmit(x_transmit[n]), .n_type_out(x_type_out[n]),
      .n_data_out(x_data_out[n]), .n_num_free(x_num_free[n]),
      .n_buf_req(buf_req), .n_buf_grant(buf_grant), .n_data_valid(data_valid),
      .n_buf_data(buf_data), .n_data_req(data_req), .n_back_valid(back_valid),
      .n_back_data(back_data), .n_release(release_w),
      .borrow_mode(borrow_mode[n]), .borrowed_pkts(parked[n]), .oq_count(oq_level[n])
    );

    borrow_addr_gen #(
      .NUM_BLOCKS(NUM_BLOCKS), .WINDOW(WINDOW), .MAX_BLOCKS(MAX_BLOCKS)
    ) u_bag (
      .clk, .rst,
      .cache_valid(cache_valid[n]), .status_o(borrow_status[n]),
      .n_buf_req(buf_req), .n_buf_grant(buf_grant),
      .n_data_valid(data_valid), .n_buf_data(buf_data),
      .n_data_req(data_req), .n_back_valid(back_valid), .n_back_data(back_data),
      .n_release(release_w), .borrowed(borrowed[n])
    );
  end
endmodule

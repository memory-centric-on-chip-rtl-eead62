// borrow_addr_gen: borrowing address generator of a node's d-MMU.
//
// The NI asks for an extension buffer when its output queue is blocked. The
// generator looks for a memory block that is neither valid in the cache
// (cache_valid, the valid bits of the last way of bank 0 and bank 1) nor
// already lent (status bit). The 512-bit table is examined through a 128-bit
// search window: a search counter picks the window and an empty detector (a
// priority encoder) picks the lowest empty block in it; when the window is
// full the counter moves to the next window, so a full sweep takes four
// cycles. The found block's status bit is set, n_buf_grant rises, and the
// 8-word payload the NI then sends with n_data_valid is written into the
// block in one cycle while the block address enters the address queue. The
// grant then falls for the next request.
//
// Read back: while n_data_req is high and a lent block exists, the oldest
// block (head of the address queue) is read, its status bit cleared, and
// n_back_valid/n_back_data are driven one cycle later for one cycle.
// Release: n_release during the search or while granting abandons the
// request and frees the reserved block.
//
// At most MAX_BLOCKS blocks are lent at once (the borrowing size in words
// divided by 8); beyond that the search waits. The window width, table size,
// block size, status bits, address queue and the write/read/release handshake
// follow the d-MMU's borrowing mechanism; resuming the search at the window
// where the last one stopped is this design's choice. status_o lets the cache
// controller mask lent blocks from its own lookups.
module borrow_addr_gen
  import ocin_pkg::*;
#(
  parameter int unsigned NUM_BLOCKS = 512,
  parameter int unsigned WINDOW     = 128,
  parameter int unsigned MAX_BLOCKS = 64
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic [NUM_BLOCKS-1:0]         cache_valid,
  output logic [NUM_BLOCKS-1:0]         status_o,
  // write
  input  logic                          n_buf_req,
  output logic                          n_buf_grant,
  input  logic                          n_data_valid,
  input  logic [BLOCK_W-1:0]            n_buf_data,
  // read
  input  logic                          n_data_req,
  output logic                          n_back_valid,
  output logic [BLOCK_W-1:0]            n_back_data,
  // release
  input  logic                          n_release,
  output logic [$clog2(MAX_BLOCKS+1)-1:0] borrowed
);
  localparam int unsigned AW  = $clog2(NUM_BLOCKS);
  localparam int unsigned NW  = NUM_BLOCKS / WINDOW;
  localparam int unsigned CW  = (NW > 1) ? $clog2(NW) : 1;
  localparam int unsigned WW  = $clog2(WINDOW);
  localparam int unsigned QCW = $clog2(MAX_BLOCKS + 1);

  typedef enum logic [1:0] {S_IDLE, S_SEARCH, S_GRANT} state_e;
  state_e state;

  logic [NUM_BLOCKS-1:0] status;
  logic [CW-1:0]         search_cnt;
  logic [AW-1:0]         blk_addr;
  logic                  rd_pend;

  assign status_o = status;

  // empty detector over the current search window
  logic [WINDOW-1:0] win_empty;
  logic              win_hit;
  logic [WW-1:0]     win_idx;
  always_comb begin
    for (int b = 0; b < WINDOW; b++) begin
      win_empty[b] = !cache_valid[int'(search_cnt) * WINDOW + b]
                  && !status[int'(search_cnt) * WINDOW + b];
    end
    win_hit = 1'b0;
    win_idx = '0;
    for (int b = WINDOW - 1; b >= 0; b--) begin
      if (win_empty[b]) begin
        win_hit = 1'b1;
        win_idx = WW'(b);
      end
    end
  end

  // address queue of lent blocks, oldest first
  logic          aq_push, aq_pop, aq_empty, aq_full;
  logic [AW-1:0] aq_head;
  logic [QCW-1:0] aq_count, aq_free;
  sync_fifo #(.WIDTH(AW), .DEPTH(MAX_BLOCKS)) u_addr_q (
    .clk(clk), .rst(rst),
    .wr_en(aq_push), .wr_data(blk_addr),
    .rd_en(aq_pop),  .rd_data(aq_head),
    .empty(aq_empty), .full(aq_full), .count(aq_count), .free(aq_free)
  );

  // a reserved block in S_GRANT also counts as lent
  assign borrowed = aq_count + QCW'(state == S_GRANT);
  wire room = (borrowed < QCW'(MAX_BLOCKS));

  assign n_buf_grant = (state == S_GRANT);
  wire write_blk = (state == S_GRANT) && n_data_valid && !n_release;
  assign aq_push = write_blk;
  assign aq_pop  = n_data_req && !rd_pend && !aq_empty;

  borrow_mem #(.NUM_BLOCKS(NUM_BLOCKS), .BLOCK_W(BLOCK_W)) u_mem (
    .clk(clk),
    .wr_en(write_blk), .wr_addr(blk_addr), .wr_data(n_buf_data),
    .rd_en(aq_pop),    .rd_addr(aq_head),  .rd_data(n_back_data)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_IDLE;
      status     <= '0;
      search_cnt <= '0;
      blk_addr   <= '0;
      rd_pend    <= 1'b0;
    end else begin
      rd_pend <= aq_pop;
      if (aq_pop) status[aq_head] <= 1'b0;
      unique case (state)
        S_IDLE: if (n_buf_req && !n_release) state <= S_SEARCH;
        S_SEARCH: begin
          if (n_release) begin
            state <= S_IDLE;
          end else if (room) begin
            if (win_hit) begin
              blk_addr         <= AW'({search_cnt, win_idx});
              status[AW'({search_cnt, win_idx})] <= 1'b1;
              state            <= S_GRANT;
            end else begin
              search_cnt <= (search_cnt == CW'(NW - 1)) ? '0 : search_cnt + 1'b1;
            end
          end
        end
        S_GRANT: begin
          if (n_release) begin
            status[blk_addr] <= 1'b0;
            state            <= S_IDLE;
          end else if (n_data_valid) begin
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign n_back_valid = rd_pend;

  a_aq_room: assert property (@(posedge clk) disable iff (rst) aq_push |-> !aq_full && aq_free != 0);
  a_valid_only_granted: assert property (@(posedge clk) disable iff (rst)
    n_data_valid |-> n_buf_grant);
endmodule

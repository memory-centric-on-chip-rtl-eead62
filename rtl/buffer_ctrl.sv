// buffer_ctrl: buffering control of the efficient network interface.
//
// It takes a transmit burst from the processing element's wrapper, builds
// the packet and puts it either into the NI output queue or, when the output
// queue is blocked, into a memory block borrowed from the node's d-MMU.
//
// Wrapper side: tx_ready is high when a new burst may start. A burst is
// tx_out_valid held for BL+1 cycles with one word of tx_data per cycle and
// the packet fields (tx_rw, tx_out_bl, tx_dest, tx_pri, msg_info_out)
// steady. The words are gathered in the payload queue (up to 8 words).
//
// Borrowing mode: when a burst starts and the output queue cannot take the
// packet (fewer free slots than header + payload) or earlier packets still
// sit in the d-MMU, the burst is a blocked one: n_buf_req goes out at once
// so the d-MMU can search for an empty block while the payload is gathered.
// When the whole payload is in, the empty size of the output queue is
// checked again. If the blocking has gone and nothing is left in the d-MMU,
// the request is withdrawn with a one-cycle n_release and the packet goes to
// the output queue. Otherwise the control waits for n_buf_grant, sends the
// 8-word payload with n_data_valid in one cycle and keeps the header in the
// borrowing header queue. With BORROW_EN = 0 the control behaves as a
// conventional NI: a blocked burst waits, with tx_ready low, until the
// output queue has room.
//
// Read back: while the borrowing header queue is not empty and the output
// queue has room for its oldest packet, n_data_req is held until
// n_back_valid returns the block; header and payload are then written into
// the output queue. Packets therefore reach the output queue in the order
// the PE sent them.
//
// Output-queue writes go through an unloader that writes one flit per cycle
// (header, body..., tail) and only starts when all of them fit.
//
// The payload queue, borrowing header queue, the write/read/release
// operations and the double check of the empty size follow the NI's
// borrowing policy; the cycle-level sequencing, the one-flit-per-cycle
// unloader and read-back priority over new direct packets are this design's
// own choices.
module buffer_ctrl
  import ocin_pkg::*;
#(
  parameter int unsigned NODE_ID    = 0,
  parameter int unsigned OQ_DEPTH   = 16,
  parameter int unsigned HQ_DEPTH   = 64,
  parameter bit          BORROW_EN  = 1'b1
) (
  input  logic                              clk,
  input  logic                              rst,
  // wrapper transmit operation
  output logic                              tx_ready,
  input  logic                              tx_out_valid,
  input  logic                              tx_rw,
  input  logic [BL_W-1:0]                   tx_out_bl,
  input  logic [NODE_W-1:0]                 tx_dest,
  input  logic [DATA_W-1:0]                 tx_data,
  input  logic [PRI_W-1:0]                  tx_pri,
  input  logic [MSG_W-1:0]                  msg_info_out,
  // output queue write port
  output logic                              oq_wr_en,
  output logic [FLIT_W-1:0]                 oq_wr_data,
  input  logic [$clog2(OQ_DEPTH+1)-1:0]     oq_free,
  // buffer borrowing interface to the d-MMU
  output logic                              n_buf_req,
  input  logic                              n_buf_grant,
  output logic                              n_data_valid,
  output logic [BLOCK_W-1:0]                n_buf_data,
  output logic                              n_data_req,
  input  logic                              n_back_valid,
  input  logic [BLOCK_W-1:0]                n_back_data,
  output logic                              n_release,
  // status
  output logic                              borrow_mode,
  output logic [$clog2(HQ_DEPTH+1)-1:0]     borrowed_pkts
);
  localparam int unsigned FW = $clog2(OQ_DEPTH + 1);

  // ---------------------------------------------------------------- unloader
  logic              ul_busy;
  header_t           ul_hdr;
  logic [DATA_W-1:0] ul_pay [MAX_BURST];
  logic [3:0]        ul_idx;           // 0: header, 1..N: payload word idx-1
  logic              ul_load;          // load from the payload queue
  logic              ul_load_back;     // load from the d-MMU read-back
  header_t           hq_head;

  always_comb begin
    oq_wr_en   = ul_busy;
    oq_wr_data = '0;
    if (ul_idx == 4'd0) begin
      oq_wr_data = {FLIT_HEADER, DATA_W'(ul_hdr)};
    end else begin
      oq_wr_data = {(ul_idx == 4'(ul_hdr.bl) + 4'd1) ? FLIT_TAIL : FLIT_BODY,
                    ul_pay[ul_idx[2:0] - 3'd1]};
    end
  end

  // --------------------------------------------------------- payload queue
  typedef enum logic [1:0] {A_IDLE, A_COLLECT, A_DECIDE} asm_state_e;
  asm_state_e        a_state;
  header_t           a_hdr;
  logic [DATA_W-1:0] a_pay [MAX_BURST];
  logic [3:0]        a_cnt;
  logic              req_r;

  // ------------------------------------------------- borrowing header queue
  logic hq_push, hq_pop, hq_empty, hq_full;
  logic [$clog2(HQ_DEPTH+1)-1:0] hq_free;
  logic [$clog2(HQ_DEPTH+1)-1:0] hq_count;
  sync_fifo #(.WIDTH(DATA_W), .DEPTH(HQ_DEPTH)) u_hdr_q (
    .clk(clk), .rst(rst),
    .wr_en(hq_push), .wr_data(DATA_W'(a_hdr)),
    .rd_en(hq_pop),  .rd_data(hq_head),
    .empty(hq_empty), .full(hq_full), .count(hq_count), .free(hq_free)
  );
  assign borrowed_pkts = hq_count;

  // --------------------------------------------------------------- read back
  // free slots once the unloader has finished the packet it is writing
  wire [FW-1:0] ul_left  = ul_busy ? FW'(ul_hdr.bl) + FW'(2) - FW'(ul_idx) : '0;
  wire [FW-1:0] free_eff = oq_free - ul_left;
  logic rb_wait;
  wire  [FW-1:0] hq_need = FW'(hq_head.bl) + FW'(2);
  // the block arrives two cycles after the request: the unloader may still
  // be writing its last two flits when the request goes out
  wire  rb_start = !rb_wait && !hq_empty && (ul_left <= FW'(2)) && (free_eff >= hq_need);
  assign n_data_req   = rb_wait;
  assign ul_load_back = rb_wait && n_back_valid;
  assign hq_pop       = ul_load_back;

  // ------------------------------------------------------------ decisions
  wire [FW-1:0] start_need = FW'(tx_out_bl) + FW'(2);
  wire [FW-1:0] a_need     = FW'(a_hdr.bl) + FW'(2);
  wire start_blocked = !hq_empty || rb_wait || (free_eff < start_need);
  wire can_direct    = hq_empty && !rb_wait && !rb_start && !ul_busy && (oq_free >= a_need);
  wire in_decide     = (a_state == A_DECIDE);

  assign n_buf_req    = req_r;
  assign ul_load      = in_decide && can_direct;
  assign n_release    = ul_load && req_r;
  assign n_data_valid = in_decide && !can_direct && BORROW_EN && req_r && n_buf_grant;
  assign hq_push      = n_data_valid;
  assign tx_ready     = (a_state == A_IDLE);
  assign borrow_mode  = req_r || !hq_empty;

  always_comb begin
    for (int k = 0; k < MAX_BURST; k++) n_buf_data[k*DATA_W +: DATA_W] = a_pay[k];
  end

  header_t new_hdr;
  always_comb begin
    new_hdr          = '0;
    new_hdr.dest     = tx_dest;
    new_hdr.src      = NODE_W'(NODE_ID);
    new_hdr.mes      = 1'b1;
    new_hdr.rw       = tx_rw;
    new_hdr.pri      = tx_pri;
    new_hdr.bl       = tx_out_bl;
    new_hdr.msg_info = msg_info_out;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      a_state <= A_IDLE;
      a_hdr   <= '0;
      a_cnt   <= '0;
      req_r   <= 1'b0;
      rb_wait <= 1'b0;
      ul_busy <= 1'b0;
      ul_idx  <= '0;
      ul_hdr  <= '0;
      for (int k = 0; k < MAX_BURST; k++) begin
        a_pay[k]  <= '0;
        ul_pay[k] <= '0;
      end
    end else begin
      // payload collection
      unique case (a_state)
        A_IDLE: if (tx_out_valid) begin
          a_hdr    <= new_hdr;
          a_pay[0] <= tx_data;
          a_cnt    <= 4'd1;
          if (BORROW_EN && start_blocked) req_r <= 1'b1;
          a_state  <= (tx_out_bl == '0) ? A_DECIDE : A_COLLECT;
        end
        A_COLLECT: if (tx_out_valid) begin
          a_pay[a_cnt[2:0]] <= tx_data;
          a_cnt             <= a_cnt + 4'd1;
          if (a_cnt == 4'(a_hdr.bl)) a_state <= A_DECIDE;
        end
        A_DECIDE: begin
          if (can_direct) begin
            req_r   <= 1'b0;           // release, if a request was out
            a_state <= A_IDLE;
          end else if (BORROW_EN) begin
            if (!req_r) req_r <= 1'b1;
            if (n_data_valid) begin
              req_r   <= 1'b0;
              a_state <= A_IDLE;
            end
          end
        end
        default: a_state <= A_IDLE;
      endcase

      // read back
      if (rb_start) rb_wait <= 1'b1;
      else if (n_back_valid) rb_wait <= 1'b0;

      // unloader
      if (ul_load) begin
        ul_busy <= 1'b1;
        ul_idx  <= '0;
        ul_hdr  <= a_hdr;
        for (int k = 0; k < MAX_BURST; k++) ul_pay[k] <= a_pay[k];
      end else if (ul_load_back) begin
        ul_busy <= 1'b1;
        ul_idx  <= '0;
        ul_hdr  <= hq_head;
        for (int k = 0; k < MAX_BURST; k++) ul_pay[k] <= n_back_data[k*DATA_W +: DATA_W];
      end else if (ul_busy) begin
        if (ul_idx == 4'(ul_hdr.bl) + 4'd1) ul_busy <= 1'b0;
        ul_idx <= ul_idx + 4'd1;
      end
    end
  end

  a_back_to_idle_unloader: assert property (@(posedge clk) disable iff (rst)
    ul_load_back |-> !ul_busy || ul_idx == 4'(ul_hdr.bl) + 4'd1);
  a_no_double_load: assert property (@(posedge clk) disable iff (rst) !(ul_load && ul_load_back));
  a_hq_no_overflow: assert property (@(posedge clk) disable iff (rst) hq_push |-> !hq_full || hq_free != 0);
  a_req_until_done: assert property (@(posedge clk) disable iff (rst)
    n_data_valid |-> n_buf_grant && n_buf_req);
endmodule

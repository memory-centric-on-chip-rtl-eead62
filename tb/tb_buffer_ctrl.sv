// tb_buffer_ctrl: self-checking test of the NI buffering control, connected
// to a 16-flit output queue and to the d-MMU borrowing address generator.
//
// A processing-element model sends bursts through the wrapper transmit
// handshake; a drain model empties the output queue only when allowed, to
// make the queue blocked or free. Every flit leaving the output queue is
// compared with the packet stream the PE sent, in order. Scenarios:
//  1. free queue: packets go straight into the output queue, no borrowing;
//  2. blocked queue: packets are parked in d-MMU blocks (write operation),
//     the borrow request is out the cycle after the burst starts, and the PE
//     can start its next burst within a bounded number of cycles although
//     the output queue stays full;
//  3. queue freed: parked packets are read back in order (read operation);
//  4. blocking that clears while the payload is being gathered: the request
//     is withdrawn with a release pulse and the packet goes to the queue.
// Each mechanism (direct write, borrow write, read back, release) is counted
// and must have happened.
module tb_buffer_ctrl;
  import ocin_pkg::*;
  localparam int OQ = 16, MB = 8;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  // wrapper side
  logic              tx_ready, tx_out_valid = 0, tx_rw = 0;
  logic [BL_W-1:0]   tx_out_bl = '0;
  logic [NODE_W-1:0] tx_dest = '0;
  logic [DATA_W-1:0] tx_data = '0;
  logic [PRI_W-1:0]  tx_pri = '0;
  logic [MSG_W-1:0]  msg_info_out = '0;
  // output queue
  logic              oq_wr_en, oq_rd, oq_empty, oq_full;
  logic [FLIT_W-1:0] oq_wr_data, oq_head;
  logic [$clog2(OQ+1)-1:0] oq_free, oq_count;
  // borrowing interface
  logic               n_buf_req, n_buf_grant, n_data_valid, n_data_req, n_back_valid, n_release;
  logic [BLOCK_W-1:0] n_buf_data, n_back_data;
  logic               borrow_mode;
  logic [$clog2(MB+1)-1:0] borrowed_pkts, borrowed;
  logic [511:0]       cache_valid, status_o;

  buffer_ctrl #(.NODE_ID(1), .OQ_DEPTH(OQ), .HQ_DEPTH(MB), .BORROW_EN(1'b1)) dut (.*);

  sync_fifo #(.WIDTH(FLIT_W), .DEPTH(OQ)) u_oq (
    .clk, .rst, .wr_en(oq_wr_en), .wr_data(oq_wr_data), .rd_en(oq_rd), .rd_data(oq_head),
    .empty(oq_empty), .full(oq_full), .count(oq_count), .free(oq_free));

  borrow_addr_gen #(.NUM_BLOCKS(512), .WINDOW(128), .MAX_BLOCKS(MB)) u_dmmu (
    .clk, .rst, .cache_valid, .status_o, .n_buf_req, .n_buf_grant, .n_data_valid,
    .n_buf_data, .n_data_req, .n_back_valid, .n_back_data, .n_release, .borrowed);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------ drain and stream check
  logic [FLIT_W-1:0] exp_q [$];
  logic drain = 1'b0;
  int   n_direct = 0, n_borrow = 0, n_readback = 0, n_release_ev = 0, n_out = 0;
  assign oq_rd = drain && !oq_empty;

  always @(posedge clk) if (!rst) begin
    if (oq_rd) begin
      check(exp_q.size() > 0, "flit expected");
      if (exp_q.size() > 0) begin
        check(oq_head == exp_q[0], $sformatf("flit %0d: got %h exp %h", n_out, oq_head, exp_q[0]));
        void'(exp_q.pop_front());
      end
      n_out++;
    end
    if (dut.ul_load)      n_direct++;
    if (n_data_valid)     n_borrow++;
    if (n_back_valid)     n_readback++;
    if (n_release)        n_release_ev++;
  end

  // ------------------------------------------------------------ PE model
  int pkt_no = 0;
  task automatic send(int dst, int bl, output int wait_cycles);
    header_t h;
    wait_cycles = 0;
    @(negedge clk);
    while (!tx_ready) begin @(negedge clk); wait_cycles++; end
    pkt_no++;
    h = '0; h.dest = NODE_W'(dst); h.src = 2'd1; h.mes = 1'b1;
    h.pri = PRI_W'(pkt_no % 4); h.bl = BL_W'(bl); h.msg_info = MSG_W'(pkt_no);
    exp_q.push_back({FLIT_HEADER, DATA_W'(h)});
    for (int k = 0; k <= bl; k++) begin
      tx_out_valid = 1'b1; tx_out_bl = BL_W'(bl); tx_dest = NODE_W'(dst);
      tx_pri = PRI_W'(pkt_no % 4); msg_info_out = MSG_W'(pkt_no); tx_rw = 1'b0;
      tx_data = {8'(pkt_no), 8'(k), 16'hBEEF};
      exp_q.push_back({(k == bl) ? FLIT_TAIL : FLIT_BODY, tx_data});
      @(negedge clk);
    end
    tx_out_valid = 1'b0;
  endtask

  int wc;
  bit req_seen;
  initial begin
    cache_valid = '0;
    for (int k = 0; k < 16; k++) cache_valid[k*32 +: 32] = $urandom;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    // 1. free queue
    drain = 1'b1;
    for (int p = 0; p < 5; p++) send(p % 4, p, wc);
    repeat (20) @(posedge clk);
    check(n_direct == 5 && n_borrow == 0, "free queue: all direct");
    check(exp_q.size() == 0, "free queue: all flits out");
    // 2. blocked queue
    drain = 1'b0;
    send(2, 7, wc);                    // fills 9 of 16
    repeat (12) @(posedge clk);
    for (int p = 0; p < 6; p++) begin
      fork
        send(3, 7 - p, wc);
        begin
          @(negedge clk); while (!tx_out_valid) @(negedge clk);
          @(posedge clk); #1 req_seen = n_buf_req;
        end
      join
      check(req_seen, "borrow request the cycle after the burst starts");
      check(wc <= 8, $sformatf("PE waited %0d cycles although blocked", wc));
    end
    repeat (10) @(posedge clk);
    check(n_borrow == 6, $sformatf("blocked queue: 6 packets parked, got %0d", n_borrow));
    check(borrowed_pkts == 6 && borrowed == 6, "header queue and d-MMU agree");
    check(borrow_mode, "borrowing mode while packets are parked");
    // 3. queue freed: read back
    drain = 1'b1;
    wait (exp_q.size() == 0);
    repeat (5) @(posedge clk);
    check(n_readback == 6, "all parked packets read back");
    check(borrowed_pkts == 0 && borrowed == 0 && !borrow_mode, "nothing left parked");
    // 4. release: queue holds one 9-flit packet, drain stopped
    drain = 1'b0;
    send(0, 7, wc);
    repeat (12) @(posedge clk);
    fork
      send(1, 7, wc);
      begin
        @(negedge clk); while (!tx_out_valid) @(negedge clk);
        repeat (2) @(negedge clk);
        drain = 1'b1;
      end
    join
    wait (exp_q.size() == 0);
    repeat (5) @(posedge clk);
    check(n_release_ev == 1, $sformatf("release pulses %0d", n_release_ev));
    check(borrowed == 0 && status_o == '0, "release freed the d-MMU");
    check(n_borrow == 6, "released packet not parked");
    $display("direct %0d borrow %0d readback %0d release %0d", n_direct, n_borrow, n_readback, n_release_ev);
    check(n_direct > 0 && n_borrow > 0 && n_readback > 0 && n_release_ev > 0, "every mechanism happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

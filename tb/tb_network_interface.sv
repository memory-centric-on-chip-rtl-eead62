// tb_network_interface: self-checking test of one efficient network
// interface together with its d-MMU borrowing address generator.
//
// Transmit: a PE model sends 80 random bursts (random destination,
// priority, message info, 1..8 words). A crossbar model on the sender port
// grants each header after a random delay (long delays block the output
// queue, forcing borrowing) and raises stall at random; the flits it takes
// are compared with the sent stream, in order. Checked: header priority on
// n_tx_pri, grant-then-data handshake, no flit moves during a stall.
// Receive: a crossbar model delivers 60 random packets into the input queue,
// only while n_num_free is high; a wrapper model varies rx_cap. Checked:
// every burst starts only when rx_cap covers it, rx_in_valid stays high for
// exactly BL+1 cycles, and the fields and words match the packet.
// The cycles in which the PE had to wait, borrowing writes and read backs
// are counted; borrowing must have happened.
module tb_network_interface;
  import ocin_pkg::*;
  localparam int OQ = 16, IQ = 32, MB = 64;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic              tx_ready, tx_out_valid = 0, tx_rw = 0;
  logic [BL_W-1:0]   tx_out_bl = '0;
  logic [NODE_W-1:0] tx_dest = '0;
  logic [DATA_W-1:0] tx_data = '0;
  logic [PRI_W-1:0]  tx_pri = '0;
  logic [MSG_W-1:0]  msg_info_out = '0;
  logic [3:0]        rx_cap = 4'd8;
  logic              rx_in_valid, rx_rw;
  logic [BL_W-1:0]   rx_in_bl;
  logic [NODE_W-1:0] rx_source;
  logic [MSG_W-1:0]  msg_info_in;
  logic [DATA_W-1:0] rx_data;
  logic              n_tx_req, n_tx_grant = 0, n_data_rdy, n_stall = 0;
  logic [PRI_W-1:0]  n_tx_pri;
  logic [FLIT_W-1:0] n_tx_data;
  logic              n_transmit = 0, n_num_free;
  logic [1:0]        n_type_out = '0;
  logic [DATA_W-1:0] n_data_out = '0;
  logic               n_buf_req, n_buf_grant, n_data_valid, n_data_req, n_back_valid, n_release;
  logic [BLOCK_W-1:0] n_buf_data, n_back_data;
  logic               borrow_mode;
  logic [$clog2(MB+1)-1:0] borrowed_pkts, borrowed;
  logic [$clog2(OQ+1)-1:0] oq_count;
  logic [511:0]       cache_valid = '0, status_o;

  network_interface #(.NODE_ID(2), .OQ_DEPTH(OQ), .IQ_DEPTH(IQ), .HQ_DEPTH(MB), .BORROW_EN(1'b1)) dut (.*);
  borrow_addr_gen #(.NUM_BLOCKS(512), .WINDOW(128), .MAX_BLOCKS(MB)) u_dmmu (
    .clk, .rst, .cache_valid, .status_o, .n_buf_req, .n_buf_grant, .n_data_valid,
    .n_buf_data, .n_data_req, .n_back_valid, .n_back_data, .n_release, .borrowed);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------ crossbar sender model
  logic [FLIT_W-1:0] exp_tx [$];
  int  grant_delay = 0, tx_pkts = 0, n_stall_cyc = 0, n_borrow = 0, n_rb = 0, pe_wait = 0;
  logic in_pkt = 0;
  always @(posedge clk) if (!rst) begin
    if (n_data_valid) n_borrow++;
    if (n_back_valid) n_rb++;
    if (!in_pkt && !n_tx_grant && n_tx_req) begin
      header_t h;
      h = header_t'(n_tx_data[31:0]);
      check(n_tx_data[33:32] == FLIT_HEADER, "request carries a header");
      check(n_tx_pri == h.pri, "priority matches header");
      if (grant_delay == 0) begin
        check(exp_tx.size() > 0 && n_tx_data == exp_tx[0], "header matches sent packet");
        void'(exp_tx.pop_front());
        n_tx_grant <= 1'b1; in_pkt <= 1'b1;
        grant_delay <= ($urandom_range(0, 3) == 0) ? int'($urandom_range(10, 60)) : 0;
      end else grant_delay <= grant_delay - 1;
    end
    if (in_pkt) begin
      if (n_stall && n_data_rdy) n_stall_cyc++;
      if (n_data_rdy && !n_stall) begin
        check(exp_tx.size() > 0 && n_tx_data == exp_tx[0], "payload flit matches sent packet");
        void'(exp_tx.pop_front());
        if (n_tx_data[33:32] == FLIT_TAIL) begin
          n_tx_grant <= 1'b0; in_pkt <= 1'b0; tx_pkts++;
        end
      end
      n_stall <= ($urandom_range(0, 4) == 0);
    end else n_stall <= 1'b0;
  end

  // ------------------------------------------------ PE transmit model
  initial begin : pe_tx
    header_t h;
    int bl;
    @(negedge rst);
    for (int p = 0; p < 80; p++) begin
      @(negedge clk);
      while (!tx_ready) begin @(negedge clk); pe_wait++; end
      bl = int'($urandom_range(0, 7));
      h = '0; h.dest = NODE_W'($urandom); h.src = 2'd2; h.mes = 1'b1; h.pri = PRI_W'($urandom);
      h.bl = BL_W'(bl); h.msg_info = MSG_W'(p); h.rw = 1'($urandom);
      exp_tx.push_back({FLIT_HEADER, DATA_W'(h)});
      for (int k = 0; k <= bl; k++) begin
        tx_out_valid = 1'b1; tx_out_bl = h.bl; tx_dest = h.dest; tx_pri = h.pri;
        msg_info_out = h.msg_info; tx_rw = h.rw; tx_data = $urandom;
        exp_tx.push_back({(k == bl) ? FLIT_TAIL : FLIT_BODY, tx_data});
        @(negedge clk);
      end
      tx_out_valid = 1'b0;
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
  end

  // ------------------------------------------------ receive side
  header_t      exp_rx_h [$];
  logic [31:0]  exp_rx_d [$];
  int rx_pkts = 0, rx_left = 0, rx_started = 0;
  initial begin : xbar_rx
    header_t h;
    int bl;
    @(negedge rst);
    for (int p = 0; p < 60; p++) begin
      bl = int'($urandom_range(0, 7));
      h = '0; h.dest = 2'd2; h.src = NODE_W'($urandom); h.mes = 1'b1;
      h.bl = BL_W'(bl); h.msg_info = MSG_W'(200 + p); h.rw = 1'($urandom);
      exp_rx_h.push_back(h);
      for (int k = 0; k <= bl + 1; k++) begin
        @(negedge clk);
        while (!n_num_free || $urandom_range(0, 2) == 0) begin
          n_transmit = 1'b0; @(negedge clk);
        end
        n_transmit = 1'b1;
        if (k == 0) begin n_type_out = FLIT_HEADER; n_data_out = DATA_W'(h); end
        else begin
          n_type_out = (k == bl + 1) ? FLIT_TAIL : FLIT_BODY;
          n_data_out = $urandom;
          exp_rx_d.push_back(n_data_out);
        end
      end
      @(negedge clk); n_transmit = 1'b0;
    end
  end

  logic [3:0] cap_prev;
  logic       valid_prev = 0;
  always @(posedge clk) if (!rst) begin
    cap_prev   <= rx_cap;
    valid_prev <= rx_in_valid;
    rx_cap     <= 4'($urandom_range(0, 8));
    if (rx_in_valid) begin
      if (!valid_prev || rx_left == 0) begin
        check(exp_rx_h.size() > 0, "receive expected");
        check(rx_in_bl == exp_rx_h[0].bl && rx_source == exp_rx_h[0].src &&
              msg_info_in == exp_rx_h[0].msg_info && rx_rw == exp_rx_h[0].rw, "receive fields");
        rx_left = int'(rx_in_bl) + 1;
        void'(exp_rx_h.pop_front());
      end
      check(exp_rx_d.size() > 0 && rx_data == exp_rx_d[0], "receive word");
      void'(exp_rx_d.pop_front());
      rx_left--;
      if (rx_left == 0) rx_pkts++;
    end else begin
      check(rx_left == 0, "rx_in_valid held for the whole burst");
    end
    if (dut.u_rx.start) check(rx_cap >= 4'(dut.u_rx.burst), "burst starts only with enough capacity");
  end

  initial begin
    @(posedge clk); @(posedge clk);
    rst = 1'b0;
    wait (tx_pkts == 80 && rx_pkts == 60);
    repeat (5) @(posedge clk);
    check(exp_tx.size() == 0, "all transmit flits seen");
    check(borrowed == 0 && borrowed_pkts == 0, "nothing left borrowed");
    $display("pe waited %0d cycles, borrow writes %0d, read backs %0d, stall cycles %0d",
             pe_wait, n_borrow, n_rb, n_stall_cyc);
    check(n_borrow > 0 && n_rb == n_borrow, "borrowing happened and all came back");
    check(n_stall_cyc > 0, "stalls happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

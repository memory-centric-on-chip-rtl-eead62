// tb_ocin_blocking: data-blocking experiment on the MAC -> LT-coding link.
//
// Four copies of the network run side by side on the same stimulus: a
// conventional NI (no borrowing) and efficient NIs allowed to borrow 16, 32
// and 48 words (2, 4 and 6 blocks of 8 words); output queue 16 and input
// queue 32 flits. In each copy the MAC's processing element sends PKTS
// bursts of 1..8 words to LT coding, starting a new burst with probability
// 1/2 per idle cycle. The LT-coding wrapper is busy (rx_cap = 0) in a given
// share of 16-cycle slots, the receiver blocking rate; the busy pattern is
// the same for all copies. For blocking rates 50, 70 and 90% the cycles in which the
// MAC had a burst ready but tx_ready was low are counted (blocking cycles)
// and printed with the reduction against the conventional NI.
// Checked: every burst arrives intact and in order in every copy; with 32
// or 48 words of borrowing the blocking cycles never exceed the conventional
// NI's; at 70% blocking the reduction with 48 words is above zero.
module tb_ocin_blocking;
  import ocin_pkg::*;
  localparam int N = 4, NB = 512, C = 4, PKTS = 300;
  localparam int MB [C] = '{1, 2, 4, 6};     // copy 0 is conventional
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int   busy_pct = 50;
  logic lt_busy;
  int   slot = 0;
  always @(posedge clk) begin
    slot <= (slot == 15) ? 0 : slot + 1;
    if (slot == 0) lt_busy <= (int'($urandom_range(0, 99)) < busy_pct);
  end

  int blocked [C], sent [C], recvd [C];
  bit done [C];

  for (genvar c = 0; c < C; c++) begin : g_copy
    logic [N-1:0]      tx_ready, tx_out_valid, tx_rw, rx_in_valid, rx_rw, borrow_mode, stall_seen;
    logic [BL_W-1:0]   tx_out_bl [N], rx_in_bl [N];
    logic [NODE_W-1:0] tx_dest [N], rx_source [N];
    logic [DATA_W-1:0] tx_data [N], rx_data [N];
    logic [PRI_W-1:0]  tx_pri [N];
    logic [MSG_W-1:0]  msg_info_out [N], msg_info_in [N];
    logic [3:0]        rx_cap [N];
    logic [NB-1:0]     cache_valid [N], borrow_status [N];
    logic [$clog2(MB[c]+1)-1:0] borrowed [N], parked [N];
    logic [4:0]        oq_level [N];

    ocin_top #(.MAX_BLOCKS(MB[c]), .BORROW_EN(c != 0)) dut (.*);

    always_comb begin
      for (int n = 0; n < N; n++) begin
        cache_valid[n] = '0;
        rx_cap[n]      = (n == int'(NODE_LT) && lt_busy) ? 4'd0 : 4'd8;
        if (n != int'(NODE_MAC)) begin
          tx_out_valid[n] = 1'b0; tx_rw[n] = 1'b0; tx_out_bl[n] = '0; tx_dest[n] = '0;
          tx_data[n] = '0; tx_pri[n] = '0; msg_info_out[n] = '0;
        end
      end
    end

    // MAC processing element: burst lengths and gaps from a per-copy
    // generator seeded identically, so every copy sends the same stream
    int unsigned seed;
    int bl, p, k, gap;
    logic want;
    always @(posedge clk) begin
      if (rst) begin
        seed <= 32'd12345; p <= 0; k <= 0; want <= 1'b0; gap <= 0; blocked[c] <= 0; sent[c] <= 0;
        tx_out_valid[1] <= 1'b0; tx_rw[1] <= 1'b0; tx_out_bl[1] <= '0; tx_dest[1] <= NODE_LT;
        tx_data[1] <= '0; tx_pri[1] <= '0; msg_info_out[1] <= '0;
      end else if (tx_out_valid[1]) begin
        if (k == bl) begin tx_out_valid[1] <= 1'b0; sent[c] <= sent[c] + 1; p <= p + 1; end
        else begin k <= k + 1; tx_data[1] <= {8'(p), 8'(k + 1), 16'h0ACE}; end
      end else if (p < PKTS) begin
        if (!want) begin
          seed <= seed * 32'd1103515245 + 32'd12345;
          if (seed[20]) want <= 1'b1;                 // about one in two idle cycles
          bl <= int'(seed[26:24]);
        end else if (tx_ready[1]) begin
          want <= 1'b0; k <= 0;
          tx_out_valid[1] <= 1'b1; tx_out_bl[1] <= BL_W'(bl); tx_dest[1] <= NODE_LT;
          tx_data[1] <= {8'(p), 8'd0, 16'h0ACE}; msg_info_out[1] <= MSG_W'(p);
        end else blocked[c] <= blocked[c] + 1;
      end
    end

    // LT-coding wrapper: check the stream
    int rp, rk;
    always @(posedge clk) begin
      if (rst) begin rp <= 0; rk <= 0; recvd[c] <= 0; end
      else if (rx_in_valid[2]) begin
        check(rx_source[2] == NODE_W'(NODE_MAC) && rx_data[2] == {8'(rp), 8'(rk), 16'h0ACE} &&
              msg_info_in[2] == MSG_W'(rp), $sformatf("copy %0d word %0d.%0d", c, rp, rk));
        if (rk == int'(rx_in_bl[2])) begin rk <= 0; rp <= rp + 1; recvd[c] <= recvd[c] + 1; end
        else rk <= rk + 1;
      end
    end
    assign done[c] = (recvd[c] == PKTS);
  end

  int rates [3] = '{50, 70, 90};
  initial begin
    for (int r = 0; r < 3; r++) begin
      busy_pct = rates[r];
      rst = 1'b1;
      repeat (3) @(posedge clk);
      rst = 1'b0;
      wait (done[0] && done[1] && done[2] && done[3]);
      repeat (3) @(posedge clk);
      $display("blocking rate %0d%%: conventional %0d, borrow 16w %0d (%0.1f%%), 32w %0d (%0.1f%%), 48w %0d (%0.1f%%)",
        busy_pct, blocked[0],
        blocked[1], 100.0 * (blocked[0] - blocked[1]) / blocked[0],
        blocked[2], 100.0 * (blocked[0] - blocked[2]) / blocked[0],
        blocked[3], 100.0 * (blocked[0] - blocked[3]) / blocked[0]);
      for (int c = 0; c < C; c++) check(sent[c] == PKTS && recvd[c] == PKTS, "all bursts delivered");
      check(blocked[2] <= blocked[0] && blocked[3] <= blocked[0], "borrowing does not add blocking");
      if (busy_pct == 70) check(blocked[3] < blocked[0], "borrowing reduces blocking at 70%");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

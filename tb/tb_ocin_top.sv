// tb_ocin_top: end-to-end test of the memory-centric on-chip
// interconnection network at its default sizes (four nodes, 16-flit output
// queues, 32-flit input queues, 64 borrowable blocks per node).
//
// Each node's processing element sends PKTS bursts of 1..8 words with random
// priority and message information. Destinations follow the receiver data
// stream WPU -> MAC -> LT coding -> SVC most of the time (three in four
// bursts go to the next node), the rest go to a random other node. Each
// wrapper signals its receive capacity on rx_cap; the SVC and LT-coding
// wrappers are busy (rx_cap = 0) 70% of the time, which blocks the senders
// and makes the NIs borrow d-MMU memory. The d-MMU cache valid bits are
// random. A scoreboard per (source, destination) pair checks that every
// packet arrives exactly once, intact, at the right node and in order.
// Mechanisms counted, each must happen at least once: crossbar stall,
// arbitration contention, a full output queue, borrowing write, read back,
// release, a wrapper burst held back by rx_cap; PE wait cycles are reported.
// Every cycle the output queue fill and the number of parked packets are
// held against their bounds.
module tb_ocin_top;
  import ocin_pkg::*;
  localparam int N = 4, PKTS = 150, NB = 512;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic [N-1:0]      tx_ready, tx_out_valid, tx_rw;
  logic [BL_W-1:0]   tx_out_bl [N];
  logic [NODE_W-1:0] tx_dest [N];
  logic [DATA_W-1:0] tx_data [N];
  logic [PRI_W-1:0]  tx_pri [N];
  logic [MSG_W-1:0]  msg_info_out [N];
  logic [3:0]        rx_cap [N];
  logic [N-1:0]      rx_in_valid, rx_rw;
  logic [BL_W-1:0]   rx_in_bl [N];
  logic [NODE_W-1:0] rx_source [N];
  logic [MSG_W-1:0]  msg_info_in [N];
  logic [DATA_W-1:0] rx_data [N];
  logic [NB-1:0]     cache_valid [N], borrow_status [N];
  logic [N-1:0]      borrow_mode, stall_seen;
  logic [6:0]        borrowed [N], parked [N];
  logic [4:0]        oq_level [N];

  ocin_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // scoreboard: header word followed by payload words, per (src, dst)
  logic [31:0] sb [N][N][$];
  int sent [N], recvd [N], pe_wait [N];

  // ---------------------------------------------------------- PE models
  for (genvar n = 0; n < N; n++) begin : g_pe
    initial begin
      header_t h;
      int bl, dst;
      tx_out_valid[n] = 0; tx_rw[n] = 0; tx_out_bl[n] = '0; tx_dest[n] = '0;
      tx_data[n] = '0; tx_pri[n] = '0; msg_info_out[n] = '0;
      sent[n] = 0; pe_wait[n] = 0;
      @(negedge rst);
      for (int p = 0; p < PKTS; p++) begin
        @(negedge clk);
        while (!tx_ready[n]) begin @(negedge clk); pe_wait[n]++; end
        bl  = int'($urandom_range(0, 7));
        dst = ($urandom_range(0, 3) != 0) ? (n + 1) % N : (n + int'($urandom_range(1, 3))) % N;
        h = '0; h.dest = NODE_W'(dst); h.src = NODE_W'(n); h.mes = 1'b1;
        h.rw = 1'($urandom); h.pri = PRI_W'($urandom); h.bl = BL_W'(bl); h.msg_info = MSG_W'(p);
        sb[n][dst].push_back(DATA_W'(h));
        for (int k = 0; k <= bl; k++) begin
          tx_out_valid[n] = 1'b1; tx_rw[n] = h.rw; tx_out_bl[n] = h.bl; tx_dest[n] = h.dest;
          tx_pri[n] = h.pri; msg_info_out[n] = h.msg_info;
          tx_data[n] = {4'(n), 4'(dst), 8'(p), 16'(k)};
          sb[n][dst].push_back(tx_data[n]);
          @(negedge clk);
        end
        tx_out_valid[n] = 1'b0;
        sent[n]++;
      end
    end
  end

  // ---------------------------------------------------------- wrappers (receive)
  int busy_pct [N] = '{0, 30, 70, 70};
  logic [N-1:0] in_burst;
  int           left [N], cur_src [N];

  always @(posedge clk) begin
    if (rst) begin
      in_burst <= '0;
      for (int n = 0; n < N; n++) begin
        rx_cap[n] <= 4'd8; left[n] <= 0; cur_src[n] <= 0; recvd[n] <= 0;
        for (int k = 0; k < NB / 32; k++) cache_valid[n][k*32 +: 32] <= $urandom;
      end
    end else begin
      for (int n = 0; n < N; n++) begin
        rx_cap[n] <= (int'($urandom_range(0, 99)) < busy_pct[n]) ? 4'd0 : 4'($urandom_range(1, 8));
        if (rx_in_valid[n]) begin
          logic [31:0] exp_w;
          int s;
          bit last;
          if (!in_burst[n]) begin
            header_t h;
            s = int'(rx_source[n]);
            check(sb[s][n].size() > 0, "packet expected for this pair");
            h = header_t'(sb[s][n].pop_front());
            check(h.dest == NODE_W'(n) && h.bl == rx_in_bl[n] && h.msg_info == msg_info_in[n]
                  && h.rw == rx_rw[n], $sformatf("header fields at node %0d", n));
            cur_src[n] <= s;
            left[n]    <= int'(rx_in_bl[n]);       // words still to come
            last = (rx_in_bl[n] == '0);
          end else begin
            s = cur_src[n];
            left[n] <= left[n] - 1;
            last = (left[n] == 1);
          end
          in_burst[n] <= !last;
          exp_w = sb[s][n].pop_front();
          check(rx_data[n] == exp_w, $sformatf("word at node %0d from %0d: got %h exp %h", n, s, rx_data[n], exp_w));
          if (last) recvd[n] <= recvd[n] + 1;
        end else begin
          check(!in_burst[n], "burst without gaps");
        end
      end
    end
  end

  // ---------------------------------------------------------- mechanism counters
  int n_stall = 0, n_contend = 0, n_bwrite = 0, n_rback = 0, n_rel = 0, n_capwait = 0, n_oqfull = 0;
  for (genvar n = 0; n < N; n++) begin : g_cnt
    always @(posedge clk) if (!rst) begin
      if (dut.g_node[n].data_valid) n_bwrite++;
      if (dut.g_node[n].back_valid) n_rback++;
      if (dut.g_node[n].release_w)  n_rel++;
      if (stall_seen[n]) n_stall++;
      if (oq_level[n] == 5'd16) n_oqfull++;
      // a parked packet holds one lent block; the count may lead by one
      // while a block is on its way back
      if (oq_level[n] > 5'd16 || 8'(parked[n]) > 8'(borrowed[n]) + 8'd1) begin
        failures++;
        $display("node %0d: output queue %0d, parked %0d, lent %0d", n, oq_level[n], parked[n], borrowed[n]);
      end
      if ($countones(dut.u_xbar.arb_req[n]) > 1) n_contend++;
      if (dut.g_node[n].u_ni.u_rx.head_f.ftype == FLIT_HEADER && !dut.g_node[n].u_ni.u_rx.empty
          && !dut.g_node[n].u_ni.u_rx.busy
          && dut.g_node[n].u_ni.u_rx.count >= 6'(dut.g_node[n].u_ni.u_rx.burst) + 6'd1
          && rx_cap[n] < dut.g_node[n].u_ni.u_rx.burst) n_capwait++;
    end
  end

  int total_rx;
  initial begin
    repeat (3) @(posedge clk);
    rst = 1'b0;
    do begin
      @(posedge clk);
      total_rx = recvd[0] + recvd[1] + recvd[2] + recvd[3];
    end while (total_rx < N * PKTS);
    repeat (10) @(posedge clk);
    for (int s = 0; s < N; s++) for (int d = 0; d < N; d++)
      check(sb[s][d].size() == 0, $sformatf("all of %0d->%0d delivered", s, d));
    for (int n = 0; n < N; n++)
      check(borrowed[n] == 0 && parked[n] == 0 && borrow_status[n] == '0, "borrowed memory returned");
    $display("cycles %0t", $time / 10);
    $display("PE wait cycles: %0d %0d %0d %0d", pe_wait[0], pe_wait[1], pe_wait[2], pe_wait[3]);
    $display("stall %0d contention %0d borrow writes %0d read backs %0d releases %0d rx_cap waits %0d output queue full %0d",
             n_stall, n_contend, n_bwrite, n_rback, n_rel, n_capwait, n_oqfull);
    check(n_oqfull > 0, "output queue full happened");
    check(n_stall > 0, "crossbar stall happened");
    check(n_contend > 0, "arbitration contention happened");
    check(n_bwrite > 0, "borrowing write happened");
    check(n_rback == n_bwrite, "every borrowed packet read back");
    check(n_rel > 0, "release happened");
    check(n_capwait > 0, "receive held back by rx_cap happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

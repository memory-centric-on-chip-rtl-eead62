// tb_crossbar: self-checking test of the 4x4 wormhole crossbar.
//
// Four sender models follow the NI side of the handshake: header with
// request and priority, wait for grant, drop the header, then body/tail
// flits with data-ready, holding a flit while stall is high. Each sends 60
// packets of random destination, priority and length (1..8 payload words);
// every payload word encodes source, packet number and word index. The four
// receivers lower num_free at random. Checked:
//  - the first header sent through an idle switch appears on the output one
//    cycle later and the grant rises in the same cycle (one-cycle latency);
//  - a flit leaves an output only if that output's num_free was high in the
//    cycle the flit was accepted;
//  - each output carries whole packets, header then body flits then tail,
//    with no interleaving, and every packet arrives intact exactly once;
//  - stalls, contention (two headers for one output) and three or more
//    outputs carrying packets at once happen.
module tb_crossbar;
  import ocin_pkg::*;
  localparam int N = 4, PKTS = 60;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic [N-1:0]      n_tx_req, n_tx_grant, n_data_rdy, n_stall, n_num_free, n_transmit;
  logic [PRI_W-1:0]  n_tx_pri [N];
  logic [FLIT_W-1:0] n_tx_data [N];
  logic [1:0]        n_type_out [N];
  logic [DATA_W-1:0] n_data_out [N];

  crossbar #(.N(N)) dut (.*);

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

  // ---------------- sender models
  logic [FLIT_W-1:0] q [N][$];
  logic              sending [N];
  int                sent_pkts [N];
  int                expected_words [N][N];   // [src][dst] payload words

  function automatic logic [FLIT_W-1:0] hdr(int src, int dst, int pri, int bl);
    header_t h = '0;
    h.dest = NODE_W'(dst); h.src = NODE_W'(src); h.mes = 1'b1;
    h.pri = PRI_W'(pri); h.bl = BL_W'(bl);
    return {FLIT_HEADER, DATA_W'(h)};
  endfunction

  always_comb begin
    for (int i = 0; i < N; i++) begin
      n_tx_data[i]  = (q[i].size() > 0) ? q[i][0] : '0;
      n_tx_pri[i]   = n_tx_data[i][24:23];   // header pri field
      n_tx_req[i]   = !sending[i] && q[i].size() > 0 && n_tx_data[i][33:32] == FLIT_HEADER && !n_tx_grant[i];
      n_data_rdy[i] = sending[i] && q[i].size() > 0 && n_tx_data[i][33:32] != FLIT_HEADER;
    end
  end

  always @(posedge clk) begin
    if (!rst) begin
      for (int i = 0; i < N; i++) begin
        if (!sending[i] && n_tx_grant[i] && q[i].size() > 0 && q[i][0][33:32] == FLIT_HEADER) begin
          void'(q[i].pop_front()); sending[i] <= 1'b1;
        end else if (n_data_rdy[i] && !n_stall[i]) begin
          if (q[i][0][33:32] == FLIT_TAIL) sending[i] <= 1'b0;
          void'(q[i].pop_front());
        end
      end
    end
  end

  // ---------------- receiver models
  logic [N-1:0] free_prev;
  logic         rand_free = 1'b0;
  logic         in_pkt [N];
  int           cur_src [N], cur_len [N], cur_idx [N], cur_pkt [N];
  int           got_words [N][N];
  int           last_pkt [N][N];
  int           n_stalls = 0, n_contention = 0, n_busy4 = 0, rx_pkts = 0;

  always @(posedge clk) begin
    free_prev <= n_num_free;
    if (!rst) begin
      n_num_free <= rand_free ? (N'($urandom) | N'($urandom)) : '1;   // about 75% free
      if (|n_stall) n_stalls++;
      if ($countones(dut.busy) > n_busy4) n_busy4 = $countones(dut.busy);
      for (int d = 0; d < N; d++) begin
        int c;
        c = 0;
        for (int i = 0; i < N; i++) c += int'(dut.arb_req[d][i]);
        if (c > 1) n_contention++;
      end
      for (int d = 0; d < N; d++) if (n_transmit[d]) begin
        check(free_prev[d], $sformatf("flit to %0d accepted without free slot", d));
        if (!in_pkt[d]) begin
          header_t h;
          h = header_t'(n_data_out[d]);
          check(n_type_out[d] == FLIT_HEADER, "packet starts with header");
          check(int'(h.dest) == d, "header routed to its destination");
          in_pkt[d] <= 1'b1; cur_src[d] <= int'(h.src); cur_len[d] <= int'(h.bl) + 1;
          cur_idx[d] <= 0;
        end else begin
          logic [31:0] w;
          int s;
          w = n_data_out[d];
          s = cur_src[d];
          check(int'(w[31:28]) == s, "payload from the packet's source");
          check(int'(w[15:0]) == cur_idx[d], "payload word order");
          if (cur_idx[d] == 0) begin
            check(int'(w[27:16]) == last_pkt[s][d] + 1 || last_pkt[s][d] < int'(w[27:16]), "packet order per source");
            last_pkt[s][d] <= int'(w[27:16]);
          end
          check(n_type_out[d] == ((cur_idx[d] == cur_len[d] - 1) ? FLIT_TAIL : FLIT_BODY), "flit type");
          got_words[s][d]++;
          cur_idx[d] <= cur_idx[d] + 1;
          if (cur_idx[d] == cur_len[d] - 1) begin in_pkt[d] <= 1'b0; rx_pkts++; end
        end
      end
    end
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      sending[i] = 0; in_pkt[i] = 0; sent_pkts[i] = 0;
      for (int d = 0; d < N; d++) begin expected_words[i][d] = 0; got_words[i][d] = 0; last_pkt[i][d] = -1; end
    end
    n_num_free = '1;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    // latency of one packet through the idle switch
    @(negedge clk);
    q[0].push_back(hdr(0, 2, 0, 0));
    q[0].push_back({FLIT_TAIL, 4'd0, 12'd0, 16'd0});
    expected_words[0][2] += 1;
    @(posedge clk); #1;
    check(n_transmit[2] && n_type_out[2] == FLIT_HEADER, "header out one cycle after request");
    check(n_tx_grant[0], "grant one cycle after request");
    repeat (5) @(posedge clk);
    rand_free = 1'b1;
    // random traffic
    for (int i = 0; i < N; i++) begin
      for (int p = 1; p <= PKTS; p++) begin
        int dst, bl;
        dst = int'($urandom_range(0, N - 1));
        bl  = int'($urandom_range(0, 7));
        q[i].push_back(hdr(i, dst, int'($urandom_range(0, 3)), bl));
        for (int k = 0; k <= bl; k++)
          q[i].push_back({(k == bl) ? FLIT_TAIL : FLIT_BODY, 4'(i), 12'(p), 16'(k)});
        expected_words[i][dst] += bl + 1;
      end
    end
    wait (q[0].size() == 0 && q[1].size() == 0 && q[2].size() == 0 && q[3].size() == 0);
    repeat (10) @(posedge clk);
    for (int i = 0; i < N; i++)
      for (int d = 0; d < N; d++)
        check(got_words[i][d] == expected_words[i][d],
              $sformatf("words %0d->%0d exp %0d got %0d", i, d, expected_words[i][d], got_words[i][d]));
    check(rx_pkts == N * PKTS + 1, $sformatf("packets delivered %0d", rx_pkts));
    $display("stall cycles %0d, contention cycles %0d, most outputs busy at once %0d", n_stalls, n_contention, n_busy4);
    check(n_stalls > 0, "stall happened");
    check(n_contention > 0, "contention happened");
    check(n_busy4 >= 3, "parallel transfers happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ocin_random: random-traffic experiment on the whole four-node network,
// comparing the efficient NI with the conventional one for several output
// queue sizes.
//
// Six copies of the network run side by side: output queues of 16, 24 and
// 32 flits, each once with a conventional NI (no borrowing) and once with an
// efficient NI that may borrow 512 words (64 blocks of 8 words). Input
// queues are 32 flits. In every copy all four processing elements send
// PKTS bursts each, with random destination (another node), priority and
// length 1..8 words. An idle PE starts a new burst with the injection
// probability per cycle. Every receiving wrapper is busy (rx_cap = 0) in a
// given share of 16-cycle slots, the receiver blocking rate; when not busy
// it offers a random capacity of 1..8 words. Burst contents, gaps and the
// busy pattern are the same in every copy (identically seeded generators),
// so the copies differ only in their NIs.
//
// Runs: injection 35% with receiver blocking 55, 70 and 85% (PE blocking
// cycles, the grid of the original evaluation, at a much shorter length),
// and injection 15% and 20% with receiver blocking 55% (execution time for
// all bursts). The traffic generator, the slot-based busy pattern and the
// lengths are this testbench's own choices.
//
// Checked: every burst arrives intact, at the right node and in order per
// source in every copy; summed over the three blocking rates, borrowing
// gives fewer PE blocking cycles than the conventional NI for every queue
// size; with the 16-flit queue borrowing does not lengthen the execution
// time. PE blocking cycles count cycles in which a PE has a burst ready and
// tx_ready is low.
module tb_ocin_random;
  import ocin_pkg::*;
  localparam int N = 4, NB = 512, C = 6, PKTS = 1000;
  localparam int OQ [C] = '{16, 16, 24, 24, 32, 32};
  localparam bit BE [C] = '{1'b0, 1'b1, 1'b0, 1'b1, 1'b0, 1'b1};
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // receiver busy pattern, shared by all copies
  int   inj_pct = 35, busy_pct = 55;
  logic [N-1:0] rx_busy;
  int   slot;
  always @(posedge clk) begin
    if (rst) begin slot <= 0; rx_busy <= '0; end
    else begin
      slot <= (slot == 15) ? 0 : slot + 1;
      if (slot == 0)
        for (int n = 0; n < N; n++) rx_busy[n] <= (int'($urandom_range(0, 99)) < busy_pct);
    end
  end
  logic [3:0] cap_draw [N];
  always @(posedge clk)
    for (int n = 0; n < N; n++) cap_draw[n] <= 4'($urandom_range(1, 8));

  int blocked [C], recvd [C], finish_cyc [C];
  int cyc;
  always @(posedge clk) cyc <= rst ? 0 : cyc + 1;

  for (genvar c = 0; c < C; c++) begin : g_copy
    logic [N-1:0]      tx_ready, tx_out_valid, tx_rw, rx_in_valid, rx_rw, borrow_mode, stall_seen;
    logic [BL_W-1:0]   tx_out_bl [N], rx_in_bl [N];
    logic [NODE_W-1:0] tx_dest [N], rx_source [N];
    logic [DATA_W-1:0] tx_data [N], rx_data [N];
    logic [PRI_W-1:0]  tx_pri [N];
    logic [MSG_W-1:0]  msg_info_out [N], msg_info_in [N];
    logic [3:0]        rx_cap [N];
    logic [NB-1:0]     cache_valid [N], borrow_status [N];
    logic [6:0]        borrowed [N], parked [N];
    logic [$clog2(OQ[c]+1)-1:0] oq_level [N];

    ocin_top #(.OQ_DEPTH(OQ[c]), .BORROW_EN(BE[c])) dut (.*);

    always_comb
      for (int n = 0; n < N; n++) begin
        cache_valid[n] = '0;
        rx_cap[n]      = rx_busy[n] ? 4'd0 : cap_draw[n];
      end

    int pe_blocked [N], pe_recvd [N];
    for (genvar n = 0; n < N; n++) begin : g_pe
      // sender: one linear congruential generator per node, seeded the same
      // in every copy, draws gaps, destinations, lengths and priorities
      int unsigned seed;
      int bl, p, k;
      logic want;
      logic [10:0] sseq [N];
      always @(posedge clk) begin
        if (rst) begin
          seed <= 32'd977 * 32'(n + 1); p <= 0; k <= 0; want <= 1'b0; bl <= 0; pe_blocked[n] <= 0;
          for (int d = 0; d < N; d++) sseq[d] <= '0;
          tx_out_valid[n] <= 1'b0; tx_rw[n] <= 1'b0; tx_out_bl[n] <= '0; tx_dest[n] <= '0;
          tx_data[n] <= '0; tx_pri[n] <= '0; msg_info_out[n] <= '0;
        end else if (tx_out_valid[n]) begin
          if (k == bl) begin
            tx_out_valid[n] <= 1'b0; p <= p + 1;
            sseq[tx_dest[n]] <= sseq[tx_dest[n]] + 1'b1;
          end else begin
            k <= k + 1;
            tx_data[n] <= {2'(n), 3'(k + 1), sseq[tx_dest[n]], 16'h5A5A};
          end
        end else if (p < PKTS) begin
          if (!want) begin
            seed <= seed * 32'd1103515245 + 32'd12345;
            if (int'(seed[23:17]) < inj_pct * 128 / 100) begin
              want <= 1'b1;
              bl   <= int'(seed[26:24]);
              tx_dest[n] <= NODE_W'((n + 1 + int'(seed[29:28]) % 3) % N);
              tx_pri[n]  <= seed[31:30];
            end
          end else if (tx_ready[n]) begin
            want <= 1'b0; k <= 0;
            tx_out_valid[n] <= 1'b1; tx_out_bl[n] <= BL_W'(bl);
            tx_data[n] <= {2'(n), 3'd0, sseq[tx_dest[n]], 16'h5A5A};
            msg_info_out[n] <= sseq[tx_dest[n]][7:0];
          end else pe_blocked[n] <= pe_blocked[n] + 1;
        end
      end

      // receiving wrapper: packets from one source arrive in order
      logic [10:0] rseq [N];
      int rk;
      logic [NODE_W-1:0] rsrc;
      always @(posedge clk) begin
        if (rst) begin
          rk <= 0; pe_recvd[n] <= 0; rsrc <= '0;
          for (int s = 0; s < N; s++) rseq[s] <= '0;
        end else if (rx_in_valid[n]) begin
          logic [NODE_W-1:0] s;
          s = (rk == 0) ? rx_source[n] : rsrc;
          if (rk == 0) begin
            rsrc <= rx_source[n];
            check(rx_source[n] != NODE_W'(n) && msg_info_in[n] == rseq[s][7:0],
                  $sformatf("copy %0d node %0d header from %0d", c, n, s));
          end
          check(rx_data[n] == {2'(s), 3'(rk), rseq[s], 16'h5A5A},
                $sformatf("copy %0d node %0d word %0d from %0d: %h", c, n, rk, s, rx_data[n]));
          if (rk == int'(rx_in_bl[n])) begin
            rk <= 0; pe_recvd[n] <= pe_recvd[n] + 1; rseq[s] <= rseq[s] + 1'b1;
          end else rk <= rk + 1;
        end
      end
    end

    always_comb begin
      blocked[c] = 0; recvd[c] = 0;
      for (int n = 0; n < N; n++) begin
        blocked[c] += pe_blocked[n];
        recvd[c]   += pe_recvd[n];
      end
    end
    always @(posedge clk)
      if (rst) finish_cyc[c] <= 0;
      else if (recvd[c] == N * PKTS && finish_cyc[c] == 0) finish_cyc[c] <= cyc;
  end

  function automatic real pct(int base, int val);
    return 100.0 * real'(base - val) / real'(base);
  endfunction

  int blk_sum [C];
  task automatic run(int inj, int busy);
    inj_pct  = inj;
    busy_pct = busy;
    rst = 1'b1;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    wait (finish_cyc[0] != 0 && finish_cyc[1] != 0 && finish_cyc[2] != 0 &&
          finish_cyc[3] != 0 && finish_cyc[4] != 0 && finish_cyc[5] != 0);
    repeat (3) @(posedge clk);
    for (int c = 0; c < C; c++) check(recvd[c] == N * PKTS, $sformatf("copy %0d delivered all", c));
  endtask

  int rates [3] = '{55, 70, 85};
  initial begin
    for (int c = 0; c < C; c++) blk_sum[c] = 0;
    $display("injection 35%%: PE blocking cycles, conventional / efficient (reduction)");
    for (int r = 0; r < 3; r++) begin
      run(35, rates[r]);
      $display("  receiver blocking %0d%%: queue 16: %0d / %0d (%0.1f%%)  24: %0d / %0d (%0.1f%%)  32: %0d / %0d (%0.1f%%)",
        rates[r], blocked[0], blocked[1], pct(blocked[0], blocked[1]),
        blocked[2], blocked[3], pct(blocked[2], blocked[3]),
        blocked[4], blocked[5], pct(blocked[4], blocked[5]));
      for (int c = 0; c < C; c++) blk_sum[c] += blocked[c];
    end
    for (int q = 0; q < 3; q++)
      check(blk_sum[2*q+1] < blk_sum[2*q], $sformatf("borrowing reduces blocking, queue %0d", OQ[2*q]));

    $display("receiver blocking 55%%: execution cycles, conventional / efficient");
    for (int inj = 15; inj <= 20; inj += 5) begin
      run(inj, 55);
      $display("  injection %0d%%: queue 16: %0d / %0d  24: %0d / %0d  32: %0d / %0d", inj,
        finish_cyc[0], finish_cyc[1], finish_cyc[2], finish_cyc[3], finish_cyc[4], finish_cyc[5]);
      check(finish_cyc[1] <= finish_cyc[0], $sformatf("borrowing does not lengthen run, injection %0d", inj));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

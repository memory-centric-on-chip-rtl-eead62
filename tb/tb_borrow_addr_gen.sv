// tb_borrow_addr_gen: self-checking test of the d-MMU borrowing address
// generator (with its borrowable memory).
//
// Checks, at the default sizes (512 valid bits, 128-bit window, 64 blocks):
//  - with window 0 fully valid and the first empty block of window 1 at bit
//    37, the grant comes three cycles after the request (idle->search, one
//    window missed, hit) and the block is number 165;
//  - a full sweep finds the only empty block in the last window within five
//    cycles of the request;
//  - granted blocks are never cache-valid or already lent; the status bit
//    of a granted block is set and cleared again when it is read back;
//  - payloads read back come out in the order written, with back_valid one
//    cycle after the request, and match what was written;
//  - a release during the search or during the grant leaves nothing lent;
//  - once 64 blocks are lent no grant is given until one is read back.
module tb_borrow_addr_gen;
  import ocin_pkg::*;
  localparam int NB = 512, W = 128, MB = 64;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic [NB-1:0]      cache_valid, status_o;
  logic               n_buf_req = 0, n_buf_grant, n_data_valid = 0, n_data_req = 0, n_back_valid, n_release = 0;
  logic [BLOCK_W-1:0] n_buf_data = '0, n_back_data;
  logic [$clog2(MB+1)-1:0] borrowed;

  borrow_addr_gen #(.NUM_BLOCKS(NB), .WINDOW(W), .MAX_BLOCKS(MB)) dut (.*);

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

  logic [BLOCK_W-1:0] exp_q [$];
  int                 addr_q [$];

  function automatic logic [BLOCK_W-1:0] pattern(int seed);
    logic [BLOCK_W-1:0] p;
    for (int k = 0; k < 8; k++) p[k*32 +: 32] = 32'(seed * 16 + k) ^ 32'hA5A5_0000;
    return p;
  endfunction

  // request a block and write one payload; returns the cycles to the grant
  task automatic write_block(int seed, output int lat, output int addr);
    @(negedge clk);
    n_buf_req = 1'b1;
    lat = 0;
    do begin
      @(posedge clk); #1; lat++;
    end while (!n_buf_grant && lat < 100);
    addr = int'(dut.blk_addr);
    check(n_buf_grant, "grant given");
    check(!cache_valid[addr], "granted block is not cache-valid");
    foreach (addr_q[i]) check(addr_q[i] != addr, "granted block not already lent");
    check(status_o[addr], "status bit set while granted");
    @(negedge clk);
    n_data_valid = 1'b1; n_buf_data = pattern(seed);
    @(negedge clk);
    n_data_valid = 1'b0; n_buf_req = 1'b0;
    exp_q.push_back(pattern(seed));
    addr_q.push_back(addr);
    check(!n_buf_grant, "grant falls after the write");
  endtask

  task automatic read_block();
    int a;
    @(negedge clk);
    n_data_req = 1'b1;
    @(posedge clk); #1;
    check(n_back_valid, "back_valid one cycle after the request");
    check(n_back_data == exp_q[0], "read-back data in write order");
    a = addr_q[0];
    void'(exp_q.pop_front());
    void'(addr_q.pop_front());
    @(negedge clk);
    n_data_req = 1'b0;
    check(!status_o[a], "status bit cleared after read back");
  endtask

  int lat, addr;
  initial begin
    cache_valid = '0;
    cache_valid[W-1:0] = '1;          // window 0 full
    cache_valid[W +: 37] = '1;        // first empty of window 1 is bit 37
    repeat (3) @(posedge clk);
    rst = 1'b0;
    write_block(1, lat, addr);
    check(lat == 3, $sformatf("grant latency 3, got %0d", lat));
    check(addr == W + 37, $sformatf("first empty block 165, got %0d", addr));
    check(borrowed == 1, "one block lent");
    write_block(2, lat, addr);
    check(addr == W + 38, "next empty block in the same window");
    read_block();
    read_block();
    check(borrowed == 0, "nothing lent after read back");
    // full sweep: only block 3*W+5 empty
    cache_valid = '1;
    cache_valid[3*W + 5] = 1'b0;
    write_block(3, lat, addr);
    check(addr == 3 * W + 5, "only empty block found");
    check(lat <= 5, $sformatf("full sweep within five cycles, got %0d", lat));
    read_block();
    // release during search: nothing empty, so it keeps searching
    cache_valid = '1;
    @(negedge clk); n_buf_req = 1'b1;
    repeat (6) @(posedge clk);
    #1 check(!n_buf_grant, "no grant without an empty block");
    @(negedge clk); n_release = 1'b1; n_buf_req = 1'b0;
    @(negedge clk); n_release = 1'b0;
    check(dut.state == dut.S_IDLE && borrowed == 0 && status_o == '0, "release during search");
    // release during grant
    cache_valid = '0;
    @(negedge clk); n_buf_req = 1'b1;
    wait (n_buf_grant);
    @(negedge clk); n_release = 1'b1; n_buf_req = 1'b0;
    @(negedge clk); n_release = 1'b0;
    check(borrowed == 0 && status_o == '0, "release during grant frees the block");
    // fill to the limit with random cache contents
    for (int i = 0; i < MB; i++) begin
      for (int k = 0; k < NB / 32; k++) cache_valid[k*32 +: 32] = $urandom & $urandom;
      write_block(100 + i, lat, addr);
    end
    check(borrowed == 7'(MB), "limit reached");
    check($countones(status_o) == MB, "one status bit per lent block");
    @(negedge clk); n_buf_req = 1'b1;
    repeat (10) @(posedge clk);
    #1 check(!n_buf_grant, "no grant beyond the limit");
    @(negedge clk); n_buf_req = 1'b0; n_release = 1'b1;
    @(negedge clk); n_release = 1'b0;
    read_block();
    write_block(999, lat, addr);
    for (int i = 0; i < MB; i++) read_block();
    check(borrowed == 0 && status_o == '0, "all returned");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

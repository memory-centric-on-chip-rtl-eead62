// tb_grant_arbiter: self-checking test of grant_arbiter.
//
// Drives random request vectors and priorities for 2000 cycles, takes the
// grant at random, and compares winner/valid/grant with a reference model
// that keeps its own copy of the grant order (best priority first, then
// earliest in the order; the winner moves to the end). Also replays the
// example of an order (1,2,3,...) with equal-priority requests from 1, 2, 3:
// the grants must come out as 1, 2, 3.
module tb_grant_arbiter;
  localparam int N = 4;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic [N-1:0] req, grant;
  logic [1:0]   pri [N];
  logic         take, valid;
  logic [1:0]   winner;
  int checks = 0, failures = 0;

  grant_arbiter #(.N(N), .PRI_W(2)) dut (.*);

  int model_order [N];
  int exp_w;

  function automatic int model_pick();
    int w = -1;
    for (int p = 0; p < N; p++)
      if (req[model_order[p]] && (w < 0 || pri[model_order[p]] < pri[w])) w = model_order[p];
    return w;
  endfunction

  task automatic model_take(int w);
    int pos = 0;
    for (int p = 0; p < N; p++) if (model_order[p] == w) pos = p;
    for (int p = pos; p < N - 1; p++) model_order[p] = model_order[p+1];
    model_order[N-1] = w;
  endtask

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = '0; take = 0;
    for (int i = 0; i < N; i++) pri[i] = '0;
    for (int p = 0; p < N; p++) model_order[p] = p;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    // example: rotate 0 to the back first, giving order (1,2,3,0)
    @(negedge clk); req = 4'b0001; take = 1;
    @(negedge clk); model_take(0);
    for (int k = 1; k <= 3; k++) begin
      req = 4'b1110; take = 1; #1;
      check(valid && winner == 2'(k), $sformatf("example grant %0d got %0d", k, winner));
      @(negedge clk); model_take(k);
    end
    // random
    for (int t = 0; t < 2000; t++) begin
      req  = 4'($urandom);
      for (int i = 0; i < N; i++) pri[i] = 2'($urandom);
      take = 1'($urandom);
      #1;
      exp_w = model_pick();
      check(valid == (exp_w >= 0), "valid");
      if (exp_w >= 0) begin
        check(winner == 2'(exp_w), $sformatf("winner exp %0d got %0d", exp_w, winner));
        check(grant == (4'b1 << exp_w), "grant one-hot");
      end else check(grant == '0, "no grant");
      @(negedge clk);
      if (take && exp_w >= 0) model_take(exp_w);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// grant_arbiter: arbitration for one crossbar output port.
//
// Among the requesting inputs the one with the best packet priority wins
// (priority value 0 is the highest). Requests of equal priority are decided
// by a grant order, a list of all inputs kept per output port: the input
// that appears first in the list wins, and when a grant is taken (take = 1)
// the winner is moved to the end of the list, so the others come first next
// time. For example with order (1,2,3,0) and equal-priority requests from 1,
// 2 and 3, input 1 wins and the order becomes (2,3,0,1).
//
// The priority rule and the rotating grant order follow the network's
// arbitration scheme; letting priority dominate and using the order only
// between equal priorities is this design's reading of it. The decision is
// combinational (winner, grant, valid); the order updates on the clock edge
// where take is high. Reset order is (0,1,...,N-1).
module grant_arbiter #(
  parameter int unsigned N     = 4,
  parameter int unsigned PRI_W = 2
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [N-1:0]         req,
  input  logic [PRI_W-1:0]     pri [N],
  input  logic                 take,      // winner accepted: rotate the order
  output logic                 valid,     // some input requests
  output logic [$clog2(N)-1:0] winner,
  output logic [N-1:0]         grant      // one-hot of winner, 0 when !valid
);
  localparam int unsigned IW = $clog2(N);

  logic [IW-1:0] order [N];   // order[0] is served first
  logic [IW-1:0] win_pos;

  always_comb begin
    logic [PRI_W-1:0] best_pri;
    valid    = 1'b0;
    win_pos  = '0;
    winner   = '0;
    best_pri = '1;
    for (int p = 0; p < N; p++) begin
      if (req[order[p]] && (!valid || pri[order[p]] < best_pri)) begin
        valid    = 1'b1;
        win_pos  = IW'(p);
        winner   = order[p];
        best_pri = pri[order[p]];
      end
    end
    grant = '0;
    if (valid) grant[winner] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int p = 0; p < N; p++) order[p] <= IW'(p);
    end else if (take && valid) begin
      // shift everything after the winner forward, winner to the end
      for (int p = 0; p < N - 1; p++) begin
        if (IW'(p) >= win_pos) order[p] <= order[p+1];
      end
      order[N-1] <= winner;
    end
  end

  a_onehot: assert property (@(posedge clk) disable iff (rst) valid |-> $onehot(grant));
endmodule

// tb_borrow_mem: self-checking test of the borrowable memory.
//
// Writes 300 random 8-word blocks to random addresses while reading others,
// keeps a reference copy, and checks every read one cycle after rd_en,
// including a read of the address written in the same cycle (old contents).
module tb_borrow_mem;
  localparam int NB = 512, BW = 256;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic          wr_en = 0, rd_en = 0;
  logic [8:0]    wr_addr = '0, rd_addr = '0;
  logic [BW-1:0] wr_data = '0, rd_data;

  borrow_mem #(.NUM_BLOCKS(NB), .BLOCK_W(BW)) dut (.*);

  int checks = 0, failures = 0;
  logic [BW-1:0] ref_mem [NB];
  bit            written [NB];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [BW-1:0] rnd_block();
    logic [BW-1:0] b;
    for (int k = 0; k < BW / 32; k++) b[k*32 +: 32] = $urandom;
    return b;
  endfunction

  initial begin
    logic [BW-1:0] expect_d;
    bit            expect_v;
    expect_v = 0; expect_d = '0;
    for (int t = 0; t < 1200; t++) begin
      @(negedge clk);
      if (expect_v) begin
        checks++;
        if (rd_data !== expect_d) begin failures++; $display("FAIL read at %0t", $time); end
      end
      wr_en   = (t < 300) || ($urandom_range(0, 3) == 0);
      wr_addr = 9'($urandom_range(0, NB - 1));
      wr_data = rnd_block();
      rd_en   = (t > 20) && $urandom_range(0, 1) == 1;
      rd_addr = ($urandom_range(0, 4) == 0) ? wr_addr : 9'($urandom_range(0, NB - 1));
      expect_v = rd_en && written[rd_addr];
      expect_d = ref_mem[rd_addr];
      if (wr_en) begin ref_mem[wr_addr] = wr_data; written[wr_addr] = 1; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking testbench for ilv_memory.
// Runs several block periods the way the address generator does: every clock one random bit is
// written at a permuted write address (here a fixed multiplicative permutation of the 512
// addresses) and one address is read in order, with sel toggled at each block boundary. A
// testbench model of the two banks predicts dout one clock after each read address. It checks
// that the bank being read is never disturbed by the writes to the other one and that the
// output multiplexer follows the bank swap with the RAM read delay.
module tb_ilv_memory;
  localparam int unsigned AW = 9;
  localparam int unsigned N  = 2 ** AW;

  logic          clk = 1'b0;
  logic          din, sel, dout;
  logic [AW-1:0] rd_addr, wr_addr;
  int checks = 0, failures = 0;

  bit bank [2][N];   // [0] = RAM-1, [1] = RAM-2
  bit known [2][N];
  bit exp_q;
  bit exp_valid;

  ilv_memory dut (.clk, .din, .sel, .rd_addr, .wr_addr, .dout);

  always #5 clk = ~clk;

  initial begin
    repeat (40_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    exp_valid = 1'b0;
    for (int i = 0; i < N; i++) begin
      known[0][i] = 1'b0;
      known[1][i] = 1'b0;
    end
    sel = 1'b0;
    din = 1'b0;
    rd_addr = '0;
    wr_addr = '0;
    for (int b = 0; b < 9; b++) begin
      for (int unsigned k = 0; k < N; k++) begin
        @(negedge clk);
        // New inputs first (sel changes in the same clock as the RAM data it must route), then
        // the output of the read issued in the previous clock.
        sel = 1'(b % 2);
        wr_addr = AW'((k * 37 + 5) % N);
        rd_addr = AW'(k);
        din = 1'($urandom);
        #1;
        if (exp_valid) begin
          checks++;
          if (dout !== exp_q) begin
            failures++;
            if (failures < 20) $display("FAIL block %0d k %0d: dout %0b expected %0b", b, k, dout, exp_q);
          end
        end
        // sel = 0: RAM-2 written, RAM-1 read; sel = 1: the reverse.
        exp_valid = known[sel ? 1 : 0][k];
        exp_q = bank[sel ? 1 : 0][k];
        bank[sel ? 0 : 1][wr_addr] = din;
        known[sel ? 0 : 1][wr_addr] = 1'b1;
      end
    end
    @(negedge clk);
    if (exp_valid) begin
      checks++;
      if (dout !== exp_q) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

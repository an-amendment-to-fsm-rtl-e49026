// Self-checking testbench for wimax_addr_gen.
// For every combination of mod_typ (including the alias 11 for 64-QAM) and id it runs two whole
// blocks after a clear and compares every write address with the interleaver formula, every
// read address with the in-order count and sel with the block parity. One run is cut short by a
// clear in the middle of a block.
module tb_wimax_addr_gen;
  import ilv_ref_pkg::*;

  logic       clk = 1'b0;
  logic       clr;
  logic [1:0] mod_typ;
  logic [2:0] id;
  logic [9:0] wr_addr, rd_addr;
  logic       sel;
  int checks = 0, failures = 0;

  wimax_addr_gen dut (.clk, .clr, .mod_typ, .id, .wr_addr, .rd_addr, .sel);

  always #5 clk = ~clk;

  initial begin
    repeat (500_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic run_mode(int unsigned mt, int unsigned i, int unsigned cycles);
    int unsigned n, ncpc;
    n = wimax_n(mt, i);
    ncpc = wimax_ncpc(mt);
    @(negedge clk);
    clr = 1'b1;
    mod_typ = 2'(mt);
    id = 3'(i);
    repeat (2) @(negedge clk);
    clr = 1'b0;
    for (int unsigned c = 0; c < cycles; c++) begin
      check($sformatf("mt %0d id %0d wr_addr k=%0d", mt, i, c), int'(wr_addr),
            int'(ref_j(n, ncpc, c % n)));
      check($sformatf("mt %0d id %0d rd_addr k=%0d", mt, i, c), int'(rd_addr), int'(c % n));
      check($sformatf("mt %0d id %0d sel k=%0d", mt, i, c), int'(sel), int'((c / n) % 2));
      @(negedge clk);
    end
  endtask

  initial begin
    clr = 1'b1;
    mod_typ = 2'd0;
    id = 3'd0;
    for (int unsigned mt = 0; mt < 4; mt++)
      for (int unsigned i = 0; i < 8; i++)
        run_mode(mt, i, 2 * wimax_n(mt, i));
    run_mode(2, 3, 300);
    run_mode(1, 0, 192 + 50);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

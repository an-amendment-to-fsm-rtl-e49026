// Self-checking testbench for wlan_addr_gen.
// For each modulation it runs three whole blocks after a clear and compares every write address
// with the interleaver formula, every read address with the in-order count and sel with the
// block parity. It also clears in the middle of a block and checks the restart at address 0.
module tb_wlan_addr_gen;
  import ilv_ref_pkg::*;

  logic       clk = 1'b0;
  logic       clr;
  logic [1:0] mod_typ;
  logic [8:0] wr_addr, rd_addr;
  logic       sel;
  int checks = 0, failures = 0;

  wlan_addr_gen dut (.clk, .clr, .mod_typ, .wr_addr, .rd_addr, .sel);

  always #5 clk = ~clk;

  initial begin
    repeat (200_000) @(posedge clk);
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

  // Clear, then check `cycles` clocks of output for modulation mt.
  task automatic run_mode(int unsigned mt, int unsigned cycles);
    int unsigned n, ncpc;
    n = wlan_n(mt);
    ncpc = wlan_ncpc(mt);
    @(negedge clk);
    clr = 1'b1;
    mod_typ = 2'(mt);
    repeat (2) @(negedge clk);
    clr = 1'b0;
    for (int unsigned c = 0; c < cycles; c++) begin
      check($sformatf("mode %0d wr_addr k=%0d", mt, c), int'(wr_addr), int'(ref_j(n, ncpc, c % n)));
      check($sformatf("mode %0d rd_addr k=%0d", mt, c), int'(rd_addr), int'(c % n));
      check($sformatf("mode %0d sel k=%0d", mt, c), int'(sel), int'((c / n) % 2));
      @(negedge clk);
    end
  endtask

  initial begin
    clr = 1'b1;
    mod_typ = 2'd0;
    for (int unsigned mt = 0; mt < 4; mt++) run_mode(mt, 3 * wlan_n(mt));
    // Mode change in the middle of a block: 64-QAM cut short, then 16-QAM and BPSK.
    run_mode(3, 100);
    run_mode(2, 2 * 192 + 37);
    run_mode(0, 2 * 48);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

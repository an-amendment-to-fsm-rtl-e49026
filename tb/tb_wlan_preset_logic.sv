// Self-checking testbench for wlan_preset_logic.
// The testbench plays the accumulator: after a clear it presents the formula's write address
// for each bit k on acc. It checks that load fires exactly on the last address of each 16-address
// iteration, that preset is then the formula's next address (so 45 -> 1, 46 -> 2, 47 -> 0 for
// BPSK), that select fires only at the end of a block, and that the start phases handed to the
// QAM16/QAM64 selectors match the row-dependent phase of the next row. Two blocks per mode, and
// a clear in the middle of a block.
module tb_wlan_preset_logic;
  import ilv_ref_pkg::*;

  logic       clk = 1'b0;
  logic       clr;
  logic [1:0] mod_typ;
  logic [8:0] acc;
  logic       load, start_q16, select;
  logic [1:0] start_q64;
  logic [8:0] preset;
  int checks = 0, failures = 0;
  int loads_seen = 0, selects_seen = 0;

  wlan_preset_logic dut (.clk, .clr, .mod_typ, .acc, .load, .preset, .start_q16, .start_q64,
                         .select);

  always #5 clk = ~clk;

  initial begin
    repeat (100_000) @(posedge clk);
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

  task automatic run_mode(int unsigned mt, int unsigned cycles);
    int unsigned n, ncpc, k, row_next;
    bit end_of_row;
    n = wlan_n(mt);
    ncpc = wlan_ncpc(mt);
    @(negedge clk);
    clr = 1'b1;
    mod_typ = 2'(mt);
    acc = '0;
    repeat (2) @(negedge clk);
    clr = 1'b0;
    for (int unsigned c = 0; c < cycles; c++) begin
      k = c % n;
      acc = 9'(ref_j(n, ncpc, k));
      #1;
      end_of_row = (k % 16) == 15;
      check($sformatf("mode %0d load k=%0d", mt, k), int'(load), int'(end_of_row));
      check($sformatf("mode %0d select k=%0d", mt, k), int'(select), int'(k == n - 1));
      if (end_of_row) begin
        row_next = ((k + 1) % n) / 16;
        loads_seen++;
        if (select) selects_seen++;
        check($sformatf("mode %0d preset after %0d", mt, acc), int'(preset),
              int'(ref_j(n, ncpc, (k + 1) % n)));
        if (mt == 2)
          check($sformatf("16-QAM start phase row %0d", row_next), int'(start_q16),
                int'(row_next % 2));
        if (mt == 3)
          check($sformatf("64-QAM start phase row %0d", row_next), int'(start_q64),
                int'((3 - row_next % 3) % 3));
      end
      @(negedge clk);
    end
  endtask

  initial begin
    clr = 1'b1;
    mod_typ = 2'd0;
    acc = '0;
    for (int unsigned mt = 0; mt < 4; mt++) run_mode(mt, 2 * wlan_n(mt));
    run_mode(3, 150);
    run_mode(2, 192 + 70);
    // Each full block has N/16 iteration ends.
    check("iteration ends seen", loads_seen, 2 * (3 + 6 + 12 + 18) + 9 + 16);
    check("block ends seen", selects_seen, 8 + 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

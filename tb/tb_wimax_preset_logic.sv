// Self-checking testbench for wimax_preset_logic.
// The testbench plays the accumulator, presenting the formula's write address for each bit k.
// For all 16 mod_typ/id combinations of the standard (and the 64-QAM alias mod_typ = 11) it
// checks that load fires exactly at the end of each 16-address iteration, that preset is the
// formula's next address, that select marks only the end of a block and that the QAM16/QAM64
// start phases match the next row. The 64-QAM runs pass only if the shared QPSK depth states
// give the right presets for 64-QAM address streams. One run is cut short by a clear.
module tb_wimax_preset_logic;
  import ilv_ref_pkg::*;

  logic       clk = 1'b0;
  logic       clr;
  logic [1:0] mod_typ;
  logic [2:0] id;
  logic [9:0] acc;
  logic       load, start_q16, select;
  logic [1:0] start_q64;
  logic [9:0] preset;
  int checks = 0, failures = 0;

  wimax_preset_logic dut (.clk, .clr, .mod_typ, .id, .acc, .load, .preset, .start_q16,
                          .start_q64, .select);

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

  task automatic run_mode(int unsigned mt, int unsigned i, int unsigned cycles);
    int unsigned n, ncpc, k, row_next;
    bit end_of_row;
    n = wimax_n(mt, i);
    ncpc = wimax_ncpc(mt);
    @(negedge clk);
    clr = 1'b1;
    mod_typ = 2'(mt);
    id = 3'(i);
    acc = '0;
    repeat (2) @(negedge clk);
    clr = 1'b0;
    for (int unsigned c = 0; c < cycles; c++) begin
      k = c % n;
      acc = 10'(ref_j(n, ncpc, k));
      #1;
      end_of_row = (k % 16) == 15;
      check($sformatf("mt %0d id %0d load k=%0d", mt, i, k), int'(load), int'(end_of_row));
      check($sformatf("mt %0d id %0d select k=%0d", mt, i, k), int'(select), int'(k == n - 1));
      if (end_of_row) begin
        row_next = ((k + 1) % n) / 16;
        check($sformatf("mt %0d id %0d preset after %0d", mt, i, acc), int'(preset),
              int'(ref_j(n, ncpc, (k + 1) % n)));
        if (mt == 1)
          check("16-QAM start phase", int'(start_q16), int'(row_next % 2));
        if (mt >= 2)
          check("64-QAM start phase", int'(start_q64), int'((3 - row_next % 3) % 3));
      end
      @(negedge clk);
    end
  endtask

  initial begin
    clr = 1'b1;
    mod_typ = 2'd0;
    id = 3'd0;
    acc = '0;
    for (int unsigned mt = 0; mt < 4; mt++)
      for (int unsigned i = 0; i < 8; i++) begin
        if (mt > 0 && i >= 4 && mt != 3) continue;   // id[2] is ignored; covered for 11 only
        run_mode(mt, i, 2 * wimax_n(mt, i));
      end
    run_mode(2, 2, 200);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

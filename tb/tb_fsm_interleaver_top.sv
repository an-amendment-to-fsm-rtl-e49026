// End-to-end testbench for fsm_interleaver_top, at the design's default sizes.
//
// The WLAN and the WiMAX interleaver run at the same time, each with its own random bit stream.
// Each side goes through a list of sessions: a clear, a mode (and depth), then a number of
// clocks. Some sessions end in the middle of a block, so the next clear is an on-the-fly mode
// change. Every output bit from the second block of a session on is compared with the
// interleaver formula at its exact clock: output bit i of block b leaves N*(b+1) + i + 1 clocks
// after the first clock that follows the clear.
//
// The testbench also counts how often each mechanism of the design acted: iteration-end preset
// loads, bank swaps, the second 16-QAM increment, the 64-QAM increment phases, a non-zero row
// start phase, 64-QAM running in the shared QPSK depth states (WiMAX) and mid-block mode
// changes. A mechanism that never acted counts as a failure.
module tb_fsm_interleaver_top;
  import ilv_ref_pkg::*;

  logic       clk = 1'b0;
  logic       wlan_clr, wlan_data_i, wlan_dataout;
  logic [1:0] wlan_mod_type;
  logic       wimax_clr, wimax_data_i, wimax_dataout;
  logic [1:0] wimax_mod_type;
  logic [2:0] wimax_id;
  int checks = 0, failures = 0;

  // Mechanism counters.
  int wlan_loads = 0, wimax_loads = 0, wlan_swaps = 0, wimax_swaps = 0;
  int wlan_q16_second = 0, wimax_q16_second = 0, wlan_q64_phase2 = 0, wimax_q64_phase2 = 0;
  int wlan_row_phase = 0, wimax_row_phase = 0, wimax_shared_state = 0;
  int wlan_midblock = 0, wimax_midblock = 0;

  fsm_interleaver_top dut (
    .clk,
    .wlan_clr, .wlan_mod_type, .wlan_data_i, .wlan_dataout,
    .wimax_clr, .wimax_mod_type, .wimax_id, .wimax_data_i, .wimax_dataout
  );

  always #5 clk = ~clk;

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Observe the internals to count mechanisms (no influence on the checks of the outputs).
  logic wlan_sel_q = 1'b0, wimax_sel_q = 1'b0;
  always @(posedge clk) begin
    if (!wlan_clr) begin
      if (dut.u_wlan.u_addr_gen.load) wlan_loads++;
      if (dut.u_wlan.u_addr_gen.load && dut.u_wlan.u_addr_gen.preset != 0 &&
          (dut.u_wlan.u_addr_gen.start_q16 || dut.u_wlan.u_addr_gen.start_q64 != 0))
        wlan_row_phase++;
      if (wlan_mod_type == 2 && dut.u_wlan.u_addr_gen.qam16_sel) wlan_q16_second++;
      if (wlan_mod_type == 3 && dut.u_wlan.u_addr_gen.qam64_sel == 2) wlan_q64_phase2++;
    end
    if (!wimax_clr) begin
      if (dut.u_wimax.u_addr_gen.load) wimax_loads++;
      if (dut.u_wimax.u_addr_gen.load && dut.u_wimax.u_addr_gen.preset != 0 &&
          (dut.u_wimax.u_addr_gen.start_q16 || dut.u_wimax.u_addr_gen.start_q64 != 0))
        wimax_row_phase++;
      if (wimax_mod_type == 1 && dut.u_wimax.u_addr_gen.qam16_sel) wimax_q16_second++;
      if (wimax_mod_type[1] && dut.u_wimax.u_addr_gen.qam64_sel == 2) wimax_q64_phase2++;
      if (wimax_mod_type[1] && int'(dut.u_wimax.u_addr_gen.u_preset.state_q) >= 4 &&
          int'(dut.u_wimax.u_addr_gen.u_preset.state_q) <= 8)
        wimax_shared_state++;
    end
    if (dut.u_wlan.sel != wlan_sel_q && !wlan_clr) wlan_swaps++;
    if (dut.u_wimax.sel != wimax_sel_q && !wimax_clr) wimax_swaps++;
    wlan_sel_q <= dut.u_wlan.sel;
    wimax_sel_q <= dut.u_wimax.sel;
  end

  task automatic check_bit(string what, int t, logic got, logic exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s clock %0d: got %0b expected %0b", what, t, got, exp);
    end
  endtask

  // One WLAN session: clear, mode mt, `cycles` clocks of data.
  task automatic wlan_session(int unsigned mt, int unsigned cycles);
    int unsigned n, ncpc, nblk;
    bit in_bits[];
    bit exp_out[];
    n = wlan_n(mt);
    ncpc = wlan_ncpc(mt);
    nblk = (cycles + n - 1) / n;
    in_bits = new[nblk * n];
    exp_out = new[nblk * n];
    foreach (in_bits[x]) in_bits[x] = 1'($urandom);
    for (int unsigned b = 0; b < nblk; b++)
      for (int unsigned k = 0; k < n; k++)
        exp_out[b * n + ref_j(n, ncpc, k)] = in_bits[b * n + k];
    @(negedge clk);
    wlan_clr = 1'b1;
    wlan_mod_type = 2'(mt);
    repeat (2) @(negedge clk);
    wlan_clr = 1'b0;
    for (int unsigned t = 0; t < cycles; t++) begin
      wlan_data_i = in_bits[t];
      if (t >= n + 1) check_bit($sformatf("wlan mode %0d", mt), t, wlan_dataout, exp_out[t - n - 1]);
      @(negedge clk);
    end
    if (cycles % n != 0) wlan_midblock++;
  endtask

  task automatic wimax_session(int unsigned mt, int unsigned i, int unsigned cycles);
    int unsigned n, ncpc, nblk;
    bit in_bits[];
    bit exp_out[];
    n = wimax_n(mt, i);
    ncpc = wimax_ncpc(mt);
    nblk = (cycles + n - 1) / n;
    in_bits = new[nblk * n];
    exp_out = new[nblk * n];
    foreach (in_bits[x]) in_bits[x] = 1'($urandom);
    for (int unsigned b = 0; b < nblk; b++)
      for (int unsigned k = 0; k < n; k++)
        exp_out[b * n + ref_j(n, ncpc, k)] = in_bits[b * n + k];
    @(negedge clk);
    wimax_clr = 1'b1;
    wimax_mod_type = 2'(mt);
    wimax_id = 3'(i);
    repeat (2) @(negedge clk);
    wimax_clr = 1'b0;
    for (int unsigned t = 0; t < cycles; t++) begin
      wimax_data_i = in_bits[t];
      if (t >= n + 1)
        check_bit($sformatf("wimax mt %0d id %0d", mt, i), t, wimax_dataout, exp_out[t - n - 1]);
      @(negedge clk);
    end
    if (cycles % n != 0) wimax_midblock++;
  endtask

  task automatic check_count(string what, int count);
    checks++;
    $display("mechanism %-34s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    wlan_clr = 1'b1;
    wlan_mod_type = 2'd0;
    wlan_data_i = 1'b0;
    wimax_clr = 1'b1;
    wimax_mod_type = 2'd0;
    wimax_id = 3'd0;
    wimax_data_i = 1'b0;
    fork
      begin
        wlan_session(0, 3 * 48);
        wlan_session(3, 288 + 131);        // cut in the middle of the second block
        wlan_session(2, 3 * 192);
        wlan_session(1, 2 * 96 + 10);
        wlan_session(3, 3 * 288);
        wlan_session(0, 2 * 48);
      end
      begin
        for (int unsigned i = 0; i < 8; i++) wimax_session(0, i, 2 * wimax_n(0, i));
        for (int unsigned i = 0; i < 4; i++) wimax_session(1, i, 2 * wimax_n(1, i) + 7 * i);
        for (int unsigned i = 0; i < 4; i++) wimax_session(2, i, 2 * wimax_n(2, i));
        wimax_session(3, 1, 384 + 200);    // 64-QAM alias code, cut mid-block
        wimax_session(0, 7, 2 * 576);
      end
    join
    check_count("wlan iteration-end preset loads", wlan_loads);
    check_count("wimax iteration-end preset loads", wimax_loads);
    check_count("wlan bank swaps", wlan_swaps);
    check_count("wimax bank swaps", wimax_swaps);
    check_count("wlan second 16-QAM increment", wlan_q16_second);
    check_count("wimax second 16-QAM increment", wimax_q16_second);
    check_count("wlan 64-QAM third increment", wlan_q64_phase2);
    check_count("wimax 64-QAM third increment", wimax_q64_phase2);
    check_count("wlan non-zero row start phase", wlan_row_phase);
    check_count("wimax non-zero row start phase", wimax_row_phase);
    check_count("wimax 64-QAM in shared QPSK states", wimax_shared_state);
    check_count("wlan mid-block mode change", wlan_midblock);
    check_count("wimax mid-block mode change", wimax_midblock);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

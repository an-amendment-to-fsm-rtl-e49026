// Self-checking end-to-end testbench for wlan_interleaver.
// For each modulation it clears the interleaver, streams four blocks of random bits and checks
// every output bit of blocks 0..2 against the formula: output bit i of block b must equal the
// input bit k of block b with j_k = i, and must appear exactly N*(b+1) + i + 1 clocks after the
// first clock following the clear (one block of buffering plus one clock of RAM read).
module tb_wlan_interleaver;
  import ilv_ref_pkg::*;

  logic       clk = 1'b0;
  logic       clr, data_i, dataout;
  logic [1:0] mod_type;
  int checks = 0, failures = 0;

  wlan_interleaver dut (.clk, .clr, .mod_type, .data_i, .dataout);

  always #5 clk = ~clk;

  initial begin
    repeat (50_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_mode(int unsigned mt, int unsigned blocks);
    int unsigned n, ncpc, total;
    bit in_bits[];
    bit exp_out[];
    n = wlan_n(mt);
    ncpc = wlan_ncpc(mt);
    total = n * blocks;
    in_bits = new[total];
    exp_out = new[total];
    foreach (in_bits[x]) in_bits[x] = 1'($urandom);
    for (int unsigned b = 0; b < blocks; b++)
      for (int unsigned k = 0; k < n; k++)
        exp_out[b * n + ref_j(n, ncpc, k)] = in_bits[b * n + k];
    @(negedge clk);
    clr = 1'b1;
    mod_type = 2'(mt);
    repeat (2) @(negedge clk);
    clr = 1'b0;
    // Clock t (t = 0 first after clear): drive input bit t; output of clock t is bit t - n - 1.
    for (int unsigned t = 0; t < total; t++) begin
      data_i = in_bits[t];
      if (t >= n + 1) begin
        checks++;
        if (dataout != exp_out[t - n - 1]) begin
          failures++;
          if (failures < 20)
            $display("FAIL mode %0d clock %0d: dataout %0b expected %0b", mt, t, dataout,
                     exp_out[t - n - 1]);
        end
      end
      @(negedge clk);
    end
  endtask

  initial begin
    clr = 1'b1;
    mod_type = 2'd0;
    data_i = 1'b0;
    for (int unsigned mt = 0; mt < 4; mt++) run_mode(mt, 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking end-to-end testbench for wimax_interleaver.
// For each of the 16 mod_type/id combinations (plus the 64-QAM alias mod_type = 11) it clears
// the interleaver, streams three blocks of random bits and checks every output bit of blocks 0
// and 1 against the formula: output bit i of block b must equal the input bit k of block b with
// j_k = i, and must appear exactly N*(b+1) + i + 1 clocks after the first clock following the
// clear (one block of buffering plus one clock of RAM read).
module tb_wimax_interleaver;
  import ilv_ref_pkg::*;

  logic       clk = 1'b0;
  logic       clr, data_i, dataout;
  logic [1:0] mod_type;
  logic [2:0] id;
  int checks = 0, failures = 0;

  wimax_interleaver dut (.clk, .clr, .mod_type, .id, .data_i, .dataout);

  always #5 clk = ~clk;

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_mode(int unsigned mt, int unsigned i, int unsigned blocks);
    int unsigned n, ncpc, total;
    bit in_bits[];
    bit exp_out[];
    n = wimax_n(mt, i);
    ncpc = wimax_ncpc(mt);
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
    id = 3'(i);
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
            $display("FAIL mt %0d id %0d clock %0d: dataout %0b expected %0b", mt, i, t, dataout,
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
    id = 3'd0;
    for (int unsigned i = 0; i < 8; i++) run_mode(0, i, 3);
    for (int unsigned i = 0; i < 4; i++) run_mode(1, i, 3);
    for (int unsigned i = 0; i < 4; i++) run_mode(2, i, 3);
    run_mode(3, 7, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

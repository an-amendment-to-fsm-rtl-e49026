// WLAN (802.11a) multimode block interleaver.
//
// One coded bit enters on data_i and one interleaved bit leaves on dataout every clock. The
// address generator writes each incoming bit of an N-bit block (N = 48, 96, 192, 288 for BPSK,
// QPSK, 16-QAM, 64-QAM on mod_type = 00..11) at its permuted position in one bank of the
// ping-pong memory while the previous block is read out in order from the other bank.
//
// Timing, counting the first clock after clr is released as clock 0: bit k of block b is taken
// in clock N*b + k, and output bit i of block b appears on dataout in clock N*(b+1) + i + 1
// (one block of buffering plus the one-clock RAM read). dataout is undefined during the first
// block after a clear. mod_type changes take effect through clr.
module wlan_interleaver #(
  parameter int unsigned ADDR_W = 9
) (
  input  logic       clk,
  input  logic       clr,
  input  logic [1:0] mod_type,
  input  logic       data_i,
  output logic       dataout
);

  logic [ADDR_W-1:0] wr_addr, rd_addr;
  logic              sel;

  wlan_addr_gen #(.ADDR_W(ADDR_W)) u_addr_gen (
    .clk, .clr, .mod_typ(mod_type), .wr_addr, .rd_addr, .sel
  );

  ilv_memory #(.ADDR_W(ADDR_W), .DATA_W(1)) u_memory (
    .clk, .din(data_i), .sel, .rd_addr, .wr_addr, .dout(dataout)
  );

endmodule

// WiMAX (802.16e) multimode block interleaver with the improved preset FSM.
//
// One coded bit in on data_i and one interleaved bit out on dataout per clock. mod_type
// (00 QPSK, 01 16-QAM, 1X 64-QAM) and id pick one of 16 block sizes from 96 to 576 bits. The
// address generator writes each bit of a block at its permuted position in one bank of the
// ping-pong memory while the previous block is read out in order from the other bank.
//
// Timing as for the WLAN interleaver: with clock 0 the first clock after clr is released, bit k
// of block b enters in clock N*b + k and output bit i of block b leaves in clock N*(b+1) + i + 1.
// Addresses are 10 bits wide to hold the 576-bit block.
module wimax_interleaver #(
  parameter int unsigned ADDR_W = 10
) (
  input  logic       clk,
  input  logic       clr,
  input  logic [1:0] mod_type,
  input  logic [2:0] id,
  input  logic       data_i,
  output logic       dataout
);

  logic [ADDR_W-1:0] wr_addr, rd_addr;
  logic              sel;

  wimax_addr_gen #(.ADDR_W(ADDR_W)) u_addr_gen (
    .clk, .clr, .mod_typ(mod_type), .id, .wr_addr, .rd_addr, .sel
  );

  ilv_memory #(.ADDR_W(ADDR_W), .DATA_W(1)) u_memory (
    .clk, .din(data_i), .sel, .rd_addr, .wr_addr, .dout(dataout)
  );

endmodule

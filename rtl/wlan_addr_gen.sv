// WLAN (802.11a) interleaver address generator.
//
// Produces, every clock, a write address (the permuted position of the incoming coded bit), a
// read address (0..N-1 in order) and the bank select for the ping-pong memory. Write addresses
// are built by accumulation: MUX-1 chooses 13 or 11 (16-QAM) under the QAM16_SEL flip-flop,
// MUX-2 chooses 20, 17 or 17 (64-QAM) under the QAM64_SEL mod-3 counter, and MUX-3, steered by
// the two mod_typ lines, passes 3 (BPSK), 6 (QPSK), MUX-1 or MUX-2 as a 6-bit increment to a 9-bit
// adder fed back from the accumulator. The preset logic FSM replaces the addition by a preset at
// the end of each iteration and marks the end of each block.
//
// Depths: BPSK 48, QPSK 96, 16-QAM 192, 64-QAM 288 bits. After clr is released the first clock
// carries write address 0 and read address 0; one address pair follows per clock with no gaps.
// mod_typ must be held while the generator runs; a new value takes effect through clr.
// The mux structure, increments and widths follow the published schematic; the mux input order
// (select 0 = first increment) and the synchronous clear are this design's choices.
module wlan_addr_gen
  import ilv_pkg::*;
#(
  parameter int unsigned ADDR_W = 9,
  parameter int unsigned INC_W  = 6
) (
  input  logic              clk,
  input  logic              clr,
  input  logic [1:0]        mod_typ,
  output logic [ADDR_W-1:0] wr_addr,
  output logic [ADDR_W-1:0] rd_addr,
  output logic              sel
);

  logic              load, start_q16, select;
  logic [1:0]        start_q64;
  logic [ADDR_W-1:0] preset;
  logic              qam16_sel;
  logic [1:0]        qam64_sel;
  logic [INC_W-1:0]  mux1, mux2, mux3;

  // MUX-1, MUX-2, MUX-3.
  always_comb begin
    mux1 = qam16_sel ? INC_W'(11) : INC_W'(13);
    unique case (qam64_sel)
      2'd0:    mux2 = INC_W'(20);
      default: mux2 = INC_W'(17);
    endcase
    unique case (wlan_mod_e'(mod_typ))
      WLAN_BPSK:  mux3 = INC_W'(3);
      WLAN_QPSK:  mux3 = INC_W'(6);
      WLAN_QAM16: mux3 = mux1;
      WLAN_QAM64: mux3 = mux2;
    endcase
  end

  wlan_preset_logic #(.ADDR_W(ADDR_W)) u_preset (
    .clk, .clr, .mod_typ, .acc(wr_addr),
    .load, .preset, .start_q16, .start_q64, .select
  );

  ilv_addr_regs #(.ADDR_W(ADDR_W), .INC_W(INC_W)) u_regs (
    .clk, .clr, .inc(mux3), .load, .preset, .start_q16, .start_q64, .select,
    .qam16_sel, .qam64_sel, .wr_addr, .rd_addr, .sel
  );

endmodule

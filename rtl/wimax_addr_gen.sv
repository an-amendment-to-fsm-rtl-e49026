// WiMAX (802.16e) interleaver address generator with the improved preset FSM.
//
// Three levels of multiplexers form a 7-bit increment:
//   level 1: four 2:1 muxes for 16-QAM (13/11, 19/17, 25/23, 37/35 for depths 192/288/384/576),
//            selected together by the QAM16_SEL flip-flop, and four 3:1 muxes for 64-QAM
//            (20/17/17, 26/23/23, 29/26/26, 38/35/35 for depths 288/384/432/576), selected
//            together by the QAM64_SEL mod-3 counter;
//   level 2: one mux per modulation picks by id: the eight QPSK increments 6, 9, 12, 18, 24,
//            27, 30, 36 (depths 96..576), and one of the 16-QAM and one of the 64-QAM level-1
//            outputs by id[1:0];
//   level 3: mod_typ picks QPSK (00), 16-QAM (01) or 64-QAM (1X).
// The increment, zero-padded, goes into a 10-bit adder with the accumulator. The preset logic
// FSM loads the first address of each iteration and marks block ends. A read counter and the
// sel flip-flop complete the generator.
//
// After clr is released the first clock carries write and read address 0; one address pair
// follows per clock. mod_typ and id must be held while it runs. The multiplexer tree,
// increments and adder width follow the published schematic and increment table. The read
// counter is 10 bits wide rather than the 9 drawn, so that it can address the 576-bit block.
// The mux input order and the synchronous clear are this design's choices.
module wimax_addr_gen
  import ilv_pkg::*;
#(
  parameter int unsigned ADDR_W = 10,
  parameter int unsigned INC_W  = 7
) (
  input  logic              clk,
  input  logic              clr,
  input  logic [1:0]        mod_typ,
  input  logic [2:0]        id,
  output logic [ADDR_W-1:0] wr_addr,
  output logic [ADDR_W-1:0] rd_addr,
  output logic              sel
);

  logic              load, start_q16, select;
  logic [1:0]        start_q64;
  logic [ADDR_W-1:0] preset;
  logic              qam16_sel;
  logic [1:0]        qam64_sel;

  logic [INC_W-1:0] l1_q16 [4];
  logic [INC_W-1:0] l1_q64 [4];
  logic [INC_W-1:0] l2_qpsk, l2_q16, l2_q64, l3;

  // Increment pairs / triples of Table-2 kind: {first, second} and {first, second, second}.
  localparam logic [INC_W-1:0] Q16_A [4] = '{INC_W'(13), INC_W'(19), INC_W'(25), INC_W'(37)};
  localparam logic [INC_W-1:0] Q16_B [4] = '{INC_W'(11), INC_W'(17), INC_W'(23), INC_W'(35)};
  localparam logic [INC_W-1:0] Q64_A [4] = '{INC_W'(20), INC_W'(26), INC_W'(29), INC_W'(38)};
  localparam logic [INC_W-1:0] Q64_B [4] = '{INC_W'(17), INC_W'(23), INC_W'(26), INC_W'(35)};
  localparam logic [INC_W-1:0] QPSK  [8] = '{INC_W'(6),  INC_W'(9),  INC_W'(12), INC_W'(18),
                                             INC_W'(24), INC_W'(27), INC_W'(30), INC_W'(36)};

  always_comb begin
    // Level 1.
    for (int i = 0; i < 4; i++) begin
      l1_q16[i] = qam16_sel ? Q16_B[i] : Q16_A[i];
      l1_q64[i] = (qam64_sel == 2'd0) ? Q64_A[i] : Q64_B[i];
    end
    // Level 2.
    l2_qpsk = QPSK[id];
    l2_q16  = l1_q16[id[1:0]];
    l2_q64  = l1_q64[id[1:0]];
    // Level 3.
    unique case (mod_typ)
      2'b00:   l3 = l2_qpsk;
      2'b01:   l3 = l2_q16;
      default: l3 = l2_q64;
    endcase
  end

  wimax_preset_logic #(.ADDR_W(ADDR_W)) u_preset (
    .clk, .clr, .mod_typ, .id, .acc(wr_addr),
    .load, .preset, .start_q16, .start_q64, .select
  );

  ilv_addr_regs #(.ADDR_W(ADDR_W), .INC_W(INC_W)) u_regs (
    .clk, .clr, .inc(l3), .load, .preset, .start_q16, .start_q64, .select,
    .qam16_sel, .qam64_sel, .wr_addr, .rd_addr, .sel
  );

endmodule

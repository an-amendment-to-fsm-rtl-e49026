// Preset logic of the WLAN address generator: a hierarchical FSM.
//
// After a clear the FSM sits in SF, where the accumulator holds address 0. In the clock after
// clr is released it leaves SF for the state of the modulation on mod_typ (SMT0 BPSK, SMT1 QPSK,
// SMT2 16-QAM, SMT3 64-QAM) and stays there until the next clear. A 4-bit counter tracks the 16
// addresses of one iteration (one row of the 16-column block interleaver). At the iteration's
// last address (the terminal value, which is always one of the top N/16 addresses) the FSM
// picks the next-level state from the accumulator value and makes the accumulator load the first
// address of the next iteration instead of adding an increment (load/preset). For BPSK this is
// acc 45 -> 1, 46 -> 2, 47 -> 0; for 16-QAM, whose terminals alternate, 181 -> 1, 180 -> 2, ...
//
// The leaf states are not listed one by one: the preset is computed from the accumulator as
// idx = acc - 15N/16 (bit 0 of idx flipped for 16-QAM), preset = idx + 1, or 0 after the last
// row, when 'select' also marks the end of the FEC block. With each preset the FSM hands a start
// phase to the QAM16_SEL flip-flop and the QAM64_SEL counter (start_q16/start_q64): the unequal
// increments restart with a phase that depends on the row number (row parity for 16-QAM,
// (3 - row mod 3) mod 3 for 64-QAM), kept here in a parity flip-flop and a mod-3 down counter.
// That phase bookkeeping and the synchronous clear are this design's choices; the state levels,
// the 4-bit counter and the presets follow the published state diagram.
//
// All outputs are combinational from the state, the counters and acc; they act in
// the same clock as the terminal address.
module wlan_preset_logic
  import ilv_pkg::*;
#(
  parameter int unsigned ADDR_W = 9,
  parameter int unsigned D      = ILV_D
) (
  input  logic              clk,
  input  logic              clr,
  input  logic [1:0]        mod_typ,
  input  logic [ADDR_W-1:0] acc,
  output logic              load,
  output logic [ADDR_W-1:0] preset,
  output logic              start_q16,
  output logic [1:0]        start_q64,
  output logic              select
);

  typedef enum logic [2:0] {
    S_F    = 3'd0,
    S_MT0  = 3'd1,   // BPSK
    S_MT1  = 3'd2,   // QPSK
    S_MT2  = 3'd3,   // 16-QAM
    S_MT3  = 3'd4    // 64-QAM
  } state_e;

  state_e state_q, state_d;
  logic [$clog2(D)-1:0] pos_q;      // address position within the iteration
  logic                 row_par_q;  // parity of the current row
  logic [1:0]           row_ph64_q; // 64-QAM start phase of the current row

  // Interleaver depth of the current modulation state.
  logic [ADDR_W-1:0] depth, rows, base, idx;
  logic              is_qam16, last_row, terminal;

  always_comb begin
    unique case (state_q)
      S_MT0:   depth = ADDR_W'(48);
      S_MT1:   depth = ADDR_W'(96);
      S_MT2:   depth = ADDR_W'(192);
      S_MT3:   depth = ADDR_W'(288);
      default: depth = ADDR_W'(48);
    endcase
    is_qam16 = (state_q == S_MT2);
    rows     = ADDR_W'(depth / ADDR_W'(D));
    base     = depth - rows;
    idx      = (acc - base) ^ ADDR_W'(is_qam16);
    last_row = (idx == rows - ADDR_W'(1));
    terminal = (state_q != S_F) && (pos_q == $bits(pos_q)'(D - 1));

    load      = terminal;
    select    = terminal && last_row;
    preset    = last_row ? '0 : idx + ADDR_W'(1);
    start_q16 = last_row ? 1'b0 : ~row_par_q;
    start_q64 = last_row ? 2'd0 : (row_ph64_q == 2'd0 ? 2'd2 : row_ph64_q - 2'd1);
  end

  always_comb begin
    state_d = state_q;
    if (state_q == S_F) begin
      unique case (wlan_mod_e'(mod_typ))
        WLAN_BPSK:  state_d = S_MT0;
        WLAN_QPSK:  state_d = S_MT1;
        WLAN_QAM16: state_d = S_MT2;
        WLAN_QAM64: state_d = S_MT3;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (clr) begin
      state_q    <= S_F;
      pos_q      <= '0;
      row_par_q  <= 1'b0;
      row_ph64_q <= 2'd0;
    end else begin
      state_q <= state_d;
      pos_q   <= pos_q + 1'b1;
      if (terminal) begin
        row_par_q  <= start_q16;
        row_ph64_q <= start_q64;
      end
    end
  end

  // The end of an iteration must coincide with a terminal address (one of the top N/16).
  always_ff @(posedge clk) begin
    if (!clr && terminal)
      assert (acc >= base)
      else $error("wlan_preset_logic: iteration ended at non-terminal address %0d", acc);
  end

endmodule

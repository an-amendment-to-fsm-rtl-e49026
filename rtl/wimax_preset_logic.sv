// Improved preset logic of the WiMAX (802.16e) address generator: a hierarchical FSM.
//
// After a clear the FSM sits in SF with the accumulator at 0. In the clock after clr is released
// it decodes mod_typ and id and enters the depth state of the chosen mode: eight QPSK depth
// states (96, 144, 192, 288, 384, 432, 480, 576 bits) and four 16-QAM ones (192, 288, 384, 576).
// There are no 64-QAM depth states. Every 64-QAM depth (288, 384, 432, 576) has exactly the same
// terminal and preset addresses as QPSK at that depth, so 64-QAM id X00, X01, X10 and X11 go
// straight to the QPSK states 011, 100, 101 and 111. This sharing is what makes this FSM smaller
// than one with its own 64-QAM branch. The increments, which do differ, come from the
// multiplexers outside.
//
// A 4-bit counter tracks the 16 addresses of one iteration. At the iteration's last address
// the accumulator loads the first address of the next iteration (load/preset). The next-level
// state is chosen from the accumulator value, as idx = acc - 15N/16 (bit 0 flipped for 16-QAM),
// preset = idx + 1, or 0 after the last row. In that case 'select' marks the end of the FEC
// block. Start phases for QAM16_SEL and QAM64_SEL go out with each preset, as in the WLAN preset
// logic. The state levels, the 4-bit counter, the presets and the 64-QAM redirection follow the
// published state diagram. The arithmetic form of the leaf states, folding the mode and depth
// levels into the single SF clock, the phase bookkeeping and the synchronous clear are this
// design's choices.
//
// Outputs are combinational and act in the clock of the terminal address.
module wimax_preset_logic
  import ilv_pkg::*;
#(
  parameter int unsigned ADDR_W = 10,
  parameter int unsigned D      = ILV_D
) (
  input  logic              clk,
  input  logic              clr,
  input  logic [1:0]        mod_typ,
  input  logic [2:0]        id,
  input  logic [ADDR_W-1:0] acc,
  output logic              load,
  output logic [ADDR_W-1:0] preset,
  output logic              start_q16,
  output logic [1:0]        start_q64,
  output logic              select
);

  typedef enum logic [3:0] {
    S_F       = 4'd0,
    S_Q96     = 4'd1,   // QPSK  id 000
    S_Q144    = 4'd2,   // QPSK  id 001
    S_Q192    = 4'd3,   // QPSK  id 010
    S_Q288    = 4'd4,   // QPSK  id 011, 64-QAM id X00
    S_Q384    = 4'd5,   // QPSK  id 100, 64-QAM id X01
    S_Q432    = 4'd6,   // QPSK  id 101, 64-QAM id X10
    S_Q480    = 4'd7,   // QPSK  id 110
    S_Q576    = 4'd8,   // QPSK  id 111, 64-QAM id X11
    S_16_192  = 4'd9,   // 16-QAM id X00
    S_16_288  = 4'd10,  // 16-QAM id X01
    S_16_384  = 4'd11,  // 16-QAM id X10
    S_16_576  = 4'd12   // 16-QAM id X11
  } state_e;

  state_e state_q, state_d;
  logic [$clog2(D)-1:0] pos_q;
  logic                 row_par_q;
  logic [1:0]           row_ph64_q;

  logic [ADDR_W-1:0] depth, rows, base, idx;
  logic              is_qam16, last_row, terminal;

  always_comb begin
    unique case (state_q)
      S_Q96:    depth = ADDR_W'(96);
      S_Q144:   depth = ADDR_W'(144);
      S_Q192:   depth = ADDR_W'(192);
      S_Q288:   depth = ADDR_W'(288);
      S_Q384:   depth = ADDR_W'(384);
      S_Q432:   depth = ADDR_W'(432);
      S_Q480:   depth = ADDR_W'(480);
      S_Q576:   depth = ADDR_W'(576);
      S_16_192: depth = ADDR_W'(192);
      S_16_288: depth = ADDR_W'(288);
      S_16_384: depth = ADDR_W'(384);
      S_16_576: depth = ADDR_W'(576);
      default:  depth = ADDR_W'(96);
    endcase
    is_qam16 = (state_q >= S_16_192);
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

  // SF -> (mode level) -> depth level, decoded in one clock.
  always_comb begin
    state_d = state_q;
    if (state_q == S_F) begin
      if (mod_typ == WIMAX_QPSK) begin
        state_d = state_e'(4'(id) + 4'd1);               // SID0..SID7 of SMT0
      end else if (mod_typ == WIMAX_QAM16) begin
        state_d = state_e'(4'(id[1:0]) + 4'd9);          // SID0..SID3 of SMT1
      end else begin
        unique case (id[1:0])                            // SMT2 redirected to SMT0 states
          2'd0: state_d = S_Q288;
          2'd1: state_d = S_Q384;
          2'd2: state_d = S_Q432;
          2'd3: state_d = S_Q576;
        endcase
      end
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

  always_ff @(posedge clk) begin
    if (!clr && terminal)
      assert (acc >= base)
      else $error("wimax_preset_logic: iteration ended at non-terminal address %0d", acc);
  end

endmodule

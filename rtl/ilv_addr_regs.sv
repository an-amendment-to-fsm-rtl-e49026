// Registers shared by the WLAN and WiMAX address generators.
//
//  - QAM16_SEL: a T flip-flop that toggles on every address and picks between the two 16-QAM
//    increments; at the end of an iteration it takes the start phase from the preset logic.
//  - QAM64_SEL: a mod-3 counter (0,1,2) that picks among the three 64-QAM increments, loaded
//    the same way.
//  - Accumulator: holds the write address; each clock it becomes acc + increment (the
//    increment zero-padded to ADDR_W bits), or the preset when the preset logic asserts load.
//  - Read address counter: counts 0,1,2,... and returns to 0 after the clock in which the
//    preset logic flags the last address of a block (select), so it needs no depth table.
//  - Sel generator: a T flip-flop that toggles at the end of every block and swaps the two
//    memory banks.
// A synchronous active-high clr returns everything to 0. All outputs are registers.
module ilv_addr_regs #(
  parameter int unsigned ADDR_W = 9,
  parameter int unsigned INC_W  = 6
) (
  input  logic              clk,
  input  logic              clr,
  input  logic [INC_W-1:0]  inc,
  input  logic              load,
  input  logic [ADDR_W-1:0] preset,
  input  logic              start_q16,
  input  logic [1:0]        start_q64,
  input  logic              select,
  output logic              qam16_sel,
  output logic [1:0]        qam64_sel,
  output logic [ADDR_W-1:0] wr_addr,
  output logic [ADDR_W-1:0] rd_addr,
  output logic              sel
);

  always_ff @(posedge clk) begin
    if (clr) begin
      qam16_sel <= 1'b0;
      qam64_sel <= 2'd0;
      wr_addr   <= '0;
      rd_addr   <= '0;
      sel       <= 1'b0;
    end else begin
      if (load) begin
        qam16_sel <= start_q16;
        qam64_sel <= start_q64;
        wr_addr   <= preset;
      end else begin
        qam16_sel <= ~qam16_sel;
        qam64_sel <= (qam64_sel == 2'd2) ? 2'd0 : qam64_sel + 2'd1;
        wr_addr   <= wr_addr + ADDR_W'(inc);
      end
      if (select) begin
        rd_addr <= '0;
        sel     <= ~sel;
      end else begin
        rd_addr <= rd_addr + 1'b1;
      end
    end
  end

endmodule

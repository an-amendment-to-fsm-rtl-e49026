// Ping-pong interleaver memory (used by both the WLAN and the WiMAX interleaver).
//
// Two RAMs of 2**ADDR_W words: while one is written with the incoming block at the permuted
// write addresses, the other is read out in order, and sel swaps the roles at each block
// boundary. Each RAM's address comes through a 2:1 multiplexer steered by sel; sel is the write
// enable of RAM-1 and, through an inverter, of RAM-2. So with sel = 0 (the state after a clear)
// RAM-2 is written and RAM-1 read, and with sel = 1 the reverse. An output multiplexer passes
// the data of the bank being read.
//
// Timing: writes take effect at the clock edge; the RAMs are synchronous-read block RAMs, so the
// data of rd_addr appears on dout one clock later. For that reason the output multiplexer is
// steered by sel delayed one clock, a detail this design adds to the published structure. The
// RAMs are not cleared: what is read before the first block has been written is undefined.
module ilv_memory #(
  parameter int unsigned ADDR_W = 9,
  parameter int unsigned DATA_W = 1
) (
  input  logic              clk,
  input  logic [DATA_W-1:0] din,
  input  logic              sel,
  input  logic [ADDR_W-1:0] rd_addr,
  input  logic [ADDR_W-1:0] wr_addr,
  output logic [DATA_W-1:0] dout
);

  localparam int unsigned WORDS = 2 ** ADDR_W;

  logic [DATA_W-1:0] ram1 [WORDS];
  logic [DATA_W-1:0] ram2 [WORDS];
  logic [ADDR_W-1:0] addr1, addr2;
  logic              we1, we2;
  logic [DATA_W-1:0] q1, q2;
  logic              sel_q;

  assign addr1 = sel ? wr_addr : rd_addr;
  assign addr2 = sel ? rd_addr : wr_addr;
  assign we1   = sel;
  assign we2   = ~sel;

  always_ff @(posedge clk) begin
    if (we1) ram1[addr1] <= din;
    q1 <= ram1[addr1];
  end

  always_ff @(posedge clk) begin
    if (we2) ram2[addr2] <= din;
    q2 <= ram2[addr2];
  end

  always_ff @(posedge clk) sel_q <= sel;

  assign dout = sel_q ? q2 : q1;

endmodule

// FSM-based multimode block interleavers for WLAN (802.11a) and WiMAX (802.16e), side by side.
//
// The two interleavers are independent designs sharing only the clock: each has its own clear,
// mode inputs, one-bit input stream and one-bit interleaved output stream. See
// wlan_interleaver and wimax_interleaver for modes and timing. Putting both in one top with a
// common clock is this design's packaging choice.
module fsm_interleaver_top (
  input  logic       clk,
  // WLAN interleaver
  input  logic       wlan_clr,
  input  logic [1:0] wlan_mod_type,
  input  logic       wlan_data_i,
  output logic       wlan_dataout,
  // WiMAX interleaver
  input  logic       wimax_clr,
  input  logic [1:0] wimax_mod_type,
  input  logic [2:0] wimax_id,
  input  logic       wimax_data_i,
  output logic       wimax_dataout
);

  wlan_interleaver u_wlan (
    .clk, .clr(wlan_clr), .mod_type(wlan_mod_type), .data_i(wlan_data_i),
    .dataout(wlan_dataout)
  );

  wimax_interleaver u_wimax (
    .clk, .clr(wimax_clr), .mod_type(wimax_mod_type), .id(wimax_id), .data_i(wimax_data_i),
    .dataout(wimax_dataout)
  );

endmodule

// Shared types and constants of the FSM-based WLAN and WiMAX block interleavers.
//
// Both interleavers write each coded bit k of an FEC block at the permuted address
//   m_k = (N/d)*(k mod d) + floor(k/d)
//   j_k = s*floor(m_k/s) + (m_k + N - floor(d*m_k/N)) mod s,   s = max(1, Ncpc/2)
// and read the block back in order. The address generators never evaluate this formula: they
// add a constant increment per bit (two or three alternating increments for 16-QAM and 64-QAM)
// and, at the end of each of the N/d iterations, load the first address of the next one.
// The column count d = 16 and the mode encodings come from the IEEE 802.11a / 802.16e
// interleaver definitions; the WLAN mode order follows the order of its increment table.
package ilv_pkg;

  // Number of columns of the block interleaver (addresses per iteration).
  localparam int unsigned ILV_D = 16;

  // WLAN (802.11a) modulation select.
  typedef enum logic [1:0] {
    WLAN_BPSK  = 2'b00,  // N = 48,  increment 3
    WLAN_QPSK  = 2'b01,  // N = 96,  increment 6
    WLAN_QAM16 = 2'b10,  // N = 192, increments 13,11
    WLAN_QAM64 = 2'b11   // N = 288, increments 20,17,17
  } wlan_mod_e;

  // WiMAX (802.16e) modulation select; 2'b11 also means 64-QAM.
  typedef enum logic [1:0] {
    WIMAX_QPSK  = 2'b00,
    WIMAX_QAM16 = 2'b01,
    WIMAX_QAM64 = 2'b10
  } wimax_mod_e;

  // Interleaver depth (Ncbps) of each QPSK depth code ID = 0..7.
  function automatic int unsigned wimax_qpsk_depth(input logic [2:0] id);
    case (id)
      3'd0: return 96;
      3'd1: return 144;
      3'd2: return 192;
      3'd3: return 288;
      3'd4: return 384;
      3'd5: return 432;
      3'd6: return 480;
      default: return 576;
    endcase
  endfunction

  // Interleaver depth of each 16-QAM depth code ID[1:0].
  function automatic int unsigned wimax_qam16_depth(input logic [1:0] id);
    case (id)
      2'd0: return 192;
      2'd1: return 288;
      2'd2: return 384;
      default: return 576;
    endcase
  endfunction

  // Interleaver depth of each 64-QAM depth code ID[1:0].
  function automatic int unsigned wimax_qam64_depth(input logic [1:0] id);
    case (id)
      2'd0: return 288;
      2'd1: return 384;
      2'd2: return 432;
      default: return 576;
    endcase
  endfunction

endpackage

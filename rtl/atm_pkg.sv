// atm_pkg: types and constants shared by the ATM transmitter and receiver.
//
// Conventions used throughout the design:
//  * One clock, the SONET word clock (19.44 MHz for STS-12, one 32-bit word
//    per clock). The original hardware also used a 4x byte clock and a
//    separate AN2 clock; here every block runs on the word clock and uses
//    clock enables where the hardware masked clocks.
//  * Within a 32-bit word, bit 31 is the first bit on the line, so byte lane 3
//    (bits 31:24) is the first byte in time and lane 0 (bits 7:0) the last.
//  * STS-12c: the path overhead byte occupies bits 7:0 of its word.
//  * 4xSTS-3c: the four channels are byte interleaved, channel c in lane c
//    (channel 1 of the hardware = lane 0 = bits 7:0).
//  * A cell on the AN2 side is 13 words: one header word (4 header bytes in
//    standard ATM order, no HEC) and 12 payload words.
package atm_pkg;

  // Mode, chosen at configuration time (change only under reset).
  typedef enum logic {
    MODE_STS12C  = 1'b0,
    MODE_4XSTS3C = 1'b1
  } mode_e;

  // What a word slot of the SONET STS-12 row carries.
  typedef enum logic [1:0] {
    SLOT_PAYLOAD = 2'd0,   // ATM cell bytes
    SLOT_POH     = 2'd1,   // first payload word of the row: holds path overhead
    SLOT_TOH     = 2'd2    // section/line (transport) overhead word
  } slot_e;

  // Cell delineation states.
  typedef enum logic [1:0] {
    ST_HUNT    = 2'd0,
    ST_PRESYNC = 2'd1,
    ST_SYNC    = 2'd2
  } delin_e;

  localparam int CELL_BYTES    = 53;
  localparam int CELL_WORDS    = 13;   // AN2 side words per cell (header + 12)

  localparam logic [7:0] HEC_COSET = 8'h55;   // 1 + x^2 + x^4 + x^6

  // Idle (unassigned) cell header: bytes 0..2 zero, byte 3 = 0000aaa0, the
  // three 'a' bits are don't care on reception and sent as 0.
  localparam logic [31:0] IDLE_HDR      = 32'h0000_0000;
  localparam logic [31:0] IDLE_HDR_MASK = 32'hFFFF_FFF1;
  localparam logic [7:0]  IDLE_PAYLOAD  = 8'h6A;

  // SONET STS-12 row geometry in 32-bit words.
  localparam int ROW_WORDS = 270;   // 1080 bytes
  localparam int TOH_WORDS = 9;     // 36 transport overhead bytes
  localparam int FRAME_ROWS = 9;

  function automatic logic is_idle_header(logic [31:0] hdr);
    return (hdr & IDLE_HDR_MASK) == IDLE_HDR;
  endfunction

  // Receiver chip 1 -> chip 2 bus.
  //  STS-12c : valid[0] marks a word of a kept cell, hdr[0] its header word.
  //  4xSTS-3c: per lane c, valid[c] marks a header byte or a payload byte of a
  //            kept cell, hdr[c] a header byte, commit[c] (on the HEC byte
  //            slot) says the four header bytes just sent belong to a kept cell.
  typedef struct packed {
    logic [31:0] data;
    logic [3:0]  valid;
    logic [3:0]  hdr;
    logic [3:0]  commit;
  } rx_cell_bus_t;

endpackage

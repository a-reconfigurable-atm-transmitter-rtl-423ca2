// atm_gateway_top: reconfigurable ATM/SONET transmitter and receiver.
//
// The ATM layer of an AN2-to-SONET gateway line card, working either as one
// STS-12c ATM stream (622 Mb/s) or as four independent STS-3c streams byte
// interleaved into one STS-12, with the same logic; 'mode' selects which.
//
// Transmit path: the four AN2 transmit FIFOs (13-word cells) -> chip 1
// (idle cells, HEC, scrambling, STS-12c formatting or 4xSTS-3c interleaving)
// -> chip 2 (SONET frame timing, overhead SRAM addressing, 4xSTS-3c
// scrambling) -> merge of the overhead SRAM bytes -> tx_data, one STS-12 word
// per clock. The overhead SRAM is external: oh_addr/oh_oe/oh_be go out and
// oh_rdata comes back in the same clock (asynchronous read); the bytes it
// enables replace the payload word's bytes.
//
// Receive path: rx_data with the path termination's Stream_Payload /
// Stream_PathOvh qualifiers -> chip 1 (cell delineation, HEC check, idle
// cell removal, descrambling) -> chip 2 (de-interleaving, word buffering) ->
// cell_data words granted by the external receive buffer controller through
// rx_request / rx_grant.
//
// One clock, the STS-12 word clock (19.44 MHz). Active-low asynchronous reset.
// Status: tx_sof/tx_toh/tx_poh qualify tx_data; rx_state is the delineation
// state per channel (STS-12c uses entry 0); pulses report HEC errors, dropped
// idle cells and generated idle cells.
//
// From the original design: the split into two transmitter chips and two
// receiver chips, the mode selection, the FIFO, overhead SRAM and
// request/grant interfaces, and the Stream_Payload/Stream_PathOvh qualifiers.
// Own choices: a single word clock with enables instead of the masked and
// shifted clocks, the byte-lane multiplexer that stands in for the board's
// overhead bus, and the status outputs. The AN2 header bit re-arrangement is
// not included, so headers are in standard ATM order.
module atm_gateway_top
  import atm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  mode_e       mode,
  input  logic        gen_idle,
  input  logic        scramble_en,
  // AN2 transmit FIFOs (first-word-fall-through)
  input  logic [3:0]  fifo_empty,
  input  logic [31:0] fifo_data [4],
  output logic [3:0]  fifo_rd,
  // SONET overhead SRAM
  input  logic [3:0]  oh_buf_sel,
  output logic [11:0] oh_addr,
  output logic        oh_oe,
  output logic [3:0]  oh_be,
  input  logic [31:0] oh_rdata,
  // transmit STS-12 stream
  output logic [31:0] tx_data,
  output logic        tx_sof,
  output logic        tx_toh,
  output logic        tx_poh,
  output logic        tx_idle_cell,
  output logic        tx_data_cell,
  output logic        tx_hec,
  // receive STS-12 stream
  input  logic [31:0] rx_data,
  input  logic [3:0]  rx_payload,
  input  logic [3:0]  rx_pathovh,
  // receive buffer controller
  output logic [3:0]  rx_request,
  input  logic [3:0]  rx_grant,
  output logic [31:0] cell_data,
  output logic        cell_valid,
  output logic [1:0]  cell_chan,
  // receive status
  output delin_e      rx_state [4],
  output logic [3:0]  rx_hec_err,
  output logic [3:0]  rx_idle
);
  slot_e        slot, c1_slot, c2_slot;
  logic [31:0]  c1_word, c2_word;
  logic [3:0]   c1_scr;
  logic         c1_hec;
  rx_cell_bus_t rbus;

  atm_tx_chip1 u_tx1 (
    .clk, .rst_n, .mode, .gen_idle, .scramble_en,
    .slot,
    .fifo_empty, .fifo_data, .fifo_rd,
    .out_word (c1_word), .out_scr(c1_scr), .out_slot(c1_slot), .out_hec(c1_hec),
    .idle_cell(tx_idle_cell), .data_cell(tx_data_cell)
  );

  atm_tx_chip2 u_tx2 (
    .clk, .rst_n, .mode, .scramble_en, .oh_buf_sel,
    .slot,
    .in_word (c1_word), .in_scr(c1_scr), .in_slot(c1_slot),
    .out_word(c2_word), .out_slot(c2_slot), .sof(tx_sof),
    .oh_addr, .oh_oe, .oh_be
  );

  // overhead merge (the tristate bus of the board)
  always_comb begin
    for (int l = 0; l < 4; l++)
      tx_data[8*l +: 8] = oh_be[l] ? oh_rdata[8*l +: 8] : c2_word[8*l +: 8];
  end
  assign tx_toh = (c2_slot == SLOT_TOH);
  assign tx_poh = (c2_slot == SLOT_POH);

  // HEC insertion marker, aligned with tx_data
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) tx_hec <= 1'b0;
    else        tx_hec <= c1_hec;

  atm_rx_chip1 u_rx1 (
    .clk, .rst_n, .mode,
    .in_word(rx_data), .in_payload(rx_payload), .in_pathovh(rx_pathovh),
    .bus(rbus), .state(rx_state), .hec_err(rx_hec_err), .idle(rx_idle)
  );

  atm_rx_chip2 u_rx2 (
    .clk, .rst_n, .mode, .bus(rbus),
    .rx_request, .rx_grant, .cell_data, .cell_valid, .cell_chan
  );
endmodule

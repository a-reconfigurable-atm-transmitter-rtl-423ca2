// atm_tx_chip2: transmitter chip 2, SONET frame timing.
//
// Counts the word slots of the STS-12 frame (ROWS rows of ROW_WORDS words)
// and tells chip 1 what each slot carries: the first TOH_WORDS words of a row
// are transport overhead, the next word carries the path overhead (STS-12c:
// one byte in bits 7:0, the other three bytes are cell data; 4xSTS-3c: a
// whole word, one path overhead byte per channel), the rest is ATM payload.
// This is the role of the PrePreOvh/PrePathOvh signals of the hardware.
//
// It generates the overhead SRAM address {oh_buf_sel, row, column} (column
// 0..TOH_WORDS, the last one being the path overhead word) with read enable
// and byte enables, and a start-of-frame flag. In 4xSTS-3c mode it scrambles
// the payload bytes of each channel with its own 8-bit x^43+1 scrambler.
//
// Timing: 'slot' is for the current clock; chip 1 returns that slot's word
// one clock later on in_*; chip 2 registers it, so the word leaves on out_*
// two clocks after its slot, aligned with its oh_* and sof signals. The
// overhead SRAM is read asynchronously and merged outside this chip.
//
// From the original design: SONET row timing, the overhead SRAM address
// generation with 16 buffers, the STS-12c path overhead in the least
// significant byte, and 8-bit per-channel 4xSTS-3c scrambling. Own choices:
// the address layout {buffer, row, column} and the pipeline alignment.
module atm_tx_chip2
  import atm_pkg::*;
#(
  parameter int ROW_W   = ROW_WORDS,
  parameter int TOH_W   = TOH_WORDS,
  parameter int ROWS    = FRAME_ROWS
) (
  input  logic        clk,
  input  logic        rst_n,
  input  mode_e       mode,
  input  logic        scramble_en,
  input  logic [3:0]  oh_buf_sel,   // which of the 16 overhead buffers to send
  output slot_e       slot,         // to chip 1, current slot
  input  logic [31:0] in_word,      // from chip 1, previous slot
  input  logic [3:0]  in_scr,
  input  slot_e       in_slot,
  output logic [31:0] out_word,
  output slot_e       out_slot,
  output logic        sof,          // first word of a frame
  output logic [11:0] oh_addr,
  output logic        oh_oe,        // overhead SRAM drives the bus this clock
  output logic [3:0]  oh_be         // byte lanes taken from the overhead SRAM
);
  logic [8:0] col;
  logic [3:0] row;

  // address/sof pipeline: stage 1 aligned with chip 1 output, stage 2 with out
  logic [11:0] addr1;
  logic        sof1;
  logic [31:0] scr_word;

  always_comb begin
    if (int'(col) < TOH_W)       slot = SLOT_TOH;
    else if (int'(col) == TOH_W) slot = SLOT_POH;
    else                         slot = SLOT_PAYLOAD;
  end

  for (genvar c = 0; c < 4; c++) begin : g_scr
    atm_scrambler #(.W(8)) u_scr (
      .clk, .rst_n,
      .en   (mode == MODE_4XSTS3C && scramble_en && in_slot == SLOT_PAYLOAD && in_scr[c]),
      .din  (in_word[8*c +: 8]),
      .dout (scr_word[8*c +: 8])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col      <= '0;
      row      <= '0;
      addr1    <= '0;
      sof1     <= 1'b0;
      out_word <= '0;
      out_slot <= SLOT_TOH;
      sof      <= 1'b0;
      oh_addr  <= '0;
      oh_oe    <= 1'b0;
      oh_be    <= '0;
    end else begin
      if (int'(col) == ROW_W - 1) begin
        col <= '0;
        row <= (int'(row) == ROWS - 1) ? 4'd0 : row + 4'd1;
      end else begin
        col <= col + 9'd1;
      end
      addr1 <= {oh_buf_sel, row, (int'(col) <= TOH_W) ? col[3:0] : 4'd0};
      sof1  <= (col == '0) && (row == '0);

      out_word <= scr_word;
      out_slot <= in_slot;
      sof      <= sof1;
      oh_addr  <= addr1;
      oh_oe    <= (in_slot != SLOT_PAYLOAD);
      unique case (in_slot)
        SLOT_TOH: oh_be <= 4'hF;
        SLOT_POH: oh_be <= (mode == MODE_STS12C) ? 4'h1 : 4'hF;
        default:  oh_be <= 4'h0;
      endcase
    end
  end
endmodule

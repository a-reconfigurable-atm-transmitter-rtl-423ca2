// atm_tx_chip1: transmitter chip 1, ATM cell processing.
//
// Reads 13-word cells from the four AN2 transmit FIFOs, substitutes idle
// cells when there is nothing to send, computes each header's HEC with the
// 32-bit parallel HEC circuit and forms the ATM payload word stream for the
// SONET framer (chip 2).
//
//  STS-12c  : whole cells are taken from the four FIFOs in round-robin order
//             (the next non-empty FIFO after the last one used). The payload
//             words are scrambled 32 bits at a time, the header word is not.
//             The formatter inserts the HEC and frees the path overhead byte.
//  4xSTS-3c : FIFO c feeds channel c. One word is read per clock, the
//             channels in turn, and the interleaver byte-interleaves them and
//             inserts the HEC word. Scrambling is done per channel in chip 2.
//
// An idle cell is started at a cell boundary when the FIFO has no cell or
// gen_idle is high; a cell already started always completes. A FIFO that is
// not empty at a cell boundary is assumed to hold the whole cell (the AN2
// writes complete cells only). FIFOs are first-word-fall-through: fifo_data
// is valid while not empty and fifo_rd takes the word in the same clock.
//
// 'slot' comes from chip 2 for the current clock; the word for that slot
// leaves on out_* one clock later. 'mode' must only change under reset.
//
// From the original design: round-robin FIFO reads, idle cell generation, the
// 32-bit HEC, 32-bit STS-12c scrambling, the STS-12c formatter and the
// 4xSTS-3c interleaver, GenerateIdleCell and Enable_ATMScramble. Own choices:
// skipping empty FIFOs, the whole-cell FIFO assumption, the idle payload byte
// 0x6A (ITU-T I.432), and the standard header order.
module atm_tx_chip1
  import atm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  mode_e       mode,
  input  logic        gen_idle,      // GenerateIdleCell_H
  input  logic        scramble_en,   // Enable_ATMScramble_H
  input  slot_e       slot,
  input  logic [3:0]  fifo_empty,
  input  logic [31:0] fifo_data [4],
  output logic [3:0]  fifo_rd,
  output logic [31:0] out_word,
  output logic [3:0]  out_scr,       // lanes to scramble in chip 2 (4xSTS-3c)
  output slot_e       out_slot,
  output logic        out_hec,       // output word holds a HEC byte
  output logic        idle_cell,     // an idle cell header was generated
  output logic        data_cell      // a FIFO cell header was read
);
  // ---- source state ----
  logic [3:0] widx;        // STS-12c word index in cell, 0..12
  logic [1:0] cur_ch, rr;
  logic       cur_idle;
  logic [3:0] widx4 [4];   // 4xSTS-3c word index per channel
  logic [3:0] idle4;

  // ---- formatter / interleaver handshakes ----
  logic        f_req;
  logic        i_rd;
  logic [1:0]  i_ch;
  logic [31:0] f_word, i_word;
  slot_e       f_slot, i_slot;
  logic        f_hec, i_hec;
  logic [3:0]  i_scr;

  logic        take, is_hdr, src_idle;
  logic [1:0]  src_ch;
  logic [31:0] src_word, scr_word;
  logic [7:0]  hec;

  // Round-robin pick of the next FIFO holding a cell (STS-12c).
  logic       any_cell;
  logic [1:0] pick;
  always_comb begin
    any_cell = 1'b0;
    pick     = rr;
    for (int n = 3; n >= 0; n--) begin
      if (!fifo_empty[2'(rr + 2'(n))]) begin
        any_cell = 1'b1;
        pick     = 2'(rr + 2'(n));
      end
    end
  end

  always_comb begin
    if (mode == MODE_STS12C) begin
      take     = f_req;
      is_hdr   = (widx == 4'd0);
      src_ch   = is_hdr ? pick : cur_ch;
      src_idle = is_hdr ? (gen_idle || !any_cell) : cur_idle;
    end else begin
      take     = i_rd;
      src_ch   = i_ch;
      is_hdr   = (widx4[i_ch] == 4'd0);
      src_idle = is_hdr ? (gen_idle || fifo_empty[i_ch]) : idle4[i_ch];
    end
    if (src_idle) src_word = is_hdr ? IDLE_HDR : {4{IDLE_PAYLOAD}};
    else          src_word = fifo_data[src_ch];
    fifo_rd = '0;
    if (take && !src_idle) fifo_rd[src_ch] = 1'b1;
  end

  atm_hec32 u_hec (.hdr(src_word), .hec(hec));

  atm_scrambler #(.W(32)) u_scr (
    .clk, .rst_n,
    .en   (mode == MODE_STS12C && take && !is_hdr && scramble_en),
    .din  (src_word),
    .dout (scr_word)
  );

  atm_tx_formatter12c u_fmt (
    .clk, .rst_n,
    .slot     (mode == MODE_STS12C ? slot : SLOT_TOH),
    .req      (f_req),
    .in_word  (scr_word),
    .in_hdr   (is_hdr),
    .in_hec   (hec),
    .out_word (f_word),
    .out_slot (f_slot),
    .out_hec  (f_hec)
  );

  atm_tx_interleaver4x u_ilv (
    .clk, .rst_n,
    .slot     (mode == MODE_4XSTS3C ? slot : SLOT_TOH),
    .rd       (i_rd),
    .rd_ch    (i_ch),
    .in_word  (src_word),
    .in_hdr   (is_hdr),
    .in_hec   (hec),
    .out_word (i_word),
    .out_scr  (i_scr),
    .out_slot (i_slot),
    .out_hec  (i_hec)
  );

  always_comb begin
    if (mode == MODE_STS12C) begin
      out_word = f_word;
      out_scr  = '0;
      out_slot = f_slot;
      out_hec  = f_hec;
    end else begin
      out_word = i_word;
      out_scr  = i_scr;
      out_slot = i_slot;
      out_hec  = i_hec;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      widx      <= '0;
      cur_ch    <= '0;
      rr        <= '0;
      cur_idle  <= 1'b1;
      idle4     <= '1;
      for (int c = 0; c < 4; c++) widx4[c] <= '0;
      idle_cell <= 1'b0;
      data_cell <= 1'b0;
    end else begin
      idle_cell <= take && is_hdr && src_idle;
      data_cell <= take && is_hdr && !src_idle;
      if (take) begin
        if (mode == MODE_STS12C) begin
          widx <= (widx == 4'(CELL_WORDS - 1)) ? 4'd0 : widx + 4'd1;
          if (is_hdr) begin
            cur_ch   <= src_ch;
            cur_idle <= src_idle;
            if (!src_idle) rr <= src_ch + 2'd1;
          end
        end else begin
          widx4[src_ch] <= (widx4[src_ch] == 4'(CELL_WORDS - 1)) ? 4'd0
                                                                  : widx4[src_ch] + 4'd1;
          if (is_hdr) idle4[src_ch] <= src_idle;
        end
      end
    end
  end
endmodule

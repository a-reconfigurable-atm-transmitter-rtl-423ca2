// atm_tx_interleaver4x: 4xSTS-3c transmit byte interleaver.
//
// Four STS-3c cell streams leave as one byte-interleaved STS-12 word stream:
// lane c of every output word is the next byte of channel c. All four
// channels run in cell lockstep: byte positions 0..3 of a cell carry the four
// header words, position 4 the interleaved HEC word (the four HEC bytes, one
// per lane), positions 5..52 the payload.
//
// As in the hardware there are two sets of four channel registers used in
// ping-pong: while one set supplies bytes (byte b of every channel's word in
// the b-th slot of a four-slot group), the other set is loaded with the next
// group, one channel word per slot, channel b in the b-th slot. So words are
// read from the sources round-robin, one per clock, and nothing is read in
// the HEC slot (52 reads per 53-byte cell). The HEC bytes of the four next
// headers are computed as those headers are read and kept in the HEC word.
//
// In POH and TOH slots the interleaver holds still (the hardware masked its
// clocks); a POH slot gets an all-zero word for the path overhead to be merged
// in later. After reset the first four payload slots only load the first
// group and output zero words. Outputs are registered (one clock latency);
// out_scr marks the lanes that carry payload bytes (to be scrambled in chip 2).
//
// From the original design: two ping-pong sets of channel registers, the
// interleaved HEC word selected in its own slot, and channel c in byte lane
// c. Own choices: the zero words while priming, and reading one word per
// clock in strict rotation.
module atm_tx_interleaver4x
  import atm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  slot_e       slot,
  output logic        rd,         // read one word from channel rd_ch now
  output logic [1:0]  rd_ch,
  input  logic [31:0] in_word,
  input  logic        in_hdr,     // in_word is channel rd_ch's header word
  input  logic [7:0]  in_hec,     // its HEC
  output logic [31:0] out_word,
  output logic [3:0]  out_scr,
  output slot_e       out_slot,
  output logic        out_hec     // this output word is the HEC word
);
  logic [31:0] chreg [2][4];  // [set][channel]
  logic        oset;          // set that supplies output bytes
  logic [5:0]  k;             // byte position in cell, 0..52
  logic        primed;
  logic [1:0]  pfill;         // load index while priming
  logic [31:0] hec_word;

  logic        pay;
  logic [1:0]  b;             // position within a 4-slot group
  logic [31:0] word_d;
  logic [3:0]  scr_d;

  always_comb begin
    pay    = (slot == SLOT_PAYLOAD);
    b      = primed ? ((k < 6'd4) ? k[1:0] : 2'(k - 6'd5)) : pfill;
    rd     = pay && !(primed && k == 6'd4);
    rd_ch  = b;
    word_d = '0;
    scr_d  = '0;
    if (pay && primed) begin
      if (k == 6'd4) begin
        word_d = hec_word;
      end else begin
        for (int c = 0; c < 4; c++)
          word_d[8*c +: 8] = chreg[oset][c][31-8*int'(b) -: 8];
        if (k > 6'd4) scr_d = 4'hF;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      oset     <= 1'b0;
      k        <= '0;
      primed   <= 1'b0;
      pfill    <= '0;
      hec_word <= '0;
      out_word <= '0;
      out_scr  <= '0;
      out_slot <= SLOT_TOH;
      out_hec  <= 1'b0;
      for (int s = 0; s < 2; s++)
        for (int c = 0; c < 4; c++) chreg[s][c] <= '0;
    end else begin
      out_word <= word_d;
      out_scr  <= scr_d;
      out_slot <= slot;
      out_hec  <= pay && primed && (k == 6'd4);
      if (rd) begin
        chreg[~oset][b] <= in_word;
        if (in_hdr) hec_word[8*int'(b) +: 8] <= in_hec;
      end
      if (pay) begin
        if (!primed) begin
          pfill <= pfill + 2'd1;
          if (pfill == 2'd3) begin
            primed <= 1'b1;
            oset   <= ~oset;
            k      <= '0;
          end
        end else begin
          k <= (k == 6'd52) ? 6'd0 : k + 6'd1;
          if (k != 6'd4 && b == 2'd3) oset <= ~oset;
        end
      end
    end
  end
endmodule

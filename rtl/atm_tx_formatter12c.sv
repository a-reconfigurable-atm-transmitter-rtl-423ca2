// atm_tx_formatter12c: STS-12c transmit data formatter.
//
// Turns the stream of 32-bit cell words (a header word followed by 12
// payload words, payload already scrambled) into the STS-12c payload word
// stream: each cell becomes 53 contiguous bytes with its HEC byte inserted
// after the 4 header bytes, and the path overhead byte slot (bits 7:0 of the
// first payload word of each row) is left free. Because 53 is odd the cells
// slide through the four byte lanes, which is what the hardware's two byte
// shift registers did at the byte clock; here a byte queue of up to 8 bytes
// does the same at the word clock.
//
// Interface: 'slot' tells what the current output slot carries. In a payload
// slot 4 bytes are taken, in the POH slot 3 (lanes 3..1, lane 0 left 0), in a
// TOH slot none and the input is held. Whenever fewer than 4 bytes are queued
// and the slot is not TOH, 'req' asks the source for the next cell word; the
// source answers in the same clock with in_word/in_hdr/in_hec (a pull, no
// wait state). Outputs are registered: the word for a slot appears one clock
// later together with that slot's type.
//
// From the original design: HEC insertion after the header, cells sliding
// through the byte lanes, and the free path overhead byte in bits 7:0. Own
// choices: a byte queue instead of the two barrel shift register sets, and
// the same-clock pull handshake.
module atm_tx_formatter12c
  import atm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  slot_e       slot,
  output logic        req,
  input  logic [31:0] in_word,
  input  logic        in_hdr,     // in_word is a header word; in_hec follows it
  input  logic [7:0]  in_hec,
  output logic [31:0] out_word,
  output slot_e       out_slot,
  output logic        out_hec     // a HEC byte was placed in this output word
);
  logic [7:0] q [8];
  logic [3:0] cnt;
  logic       hecq [8];           // queue entry is a HEC byte (observability)

  logic [7:0]  avail [13];
  logic        availh [13];
  logic [3:0]  need, npush;
  logic [7:0]  q_d [8];
  logic        hecq_d [8];
  logic [4:0]  cnt_d;
  logic [31:0] word_d;
  logic        hec_d;

  // ask for a word whenever fewer than 4 bytes are queued (never in TOH)
  assign req = (slot != SLOT_TOH) && (cnt < 4'd4);

  always_comb begin
    unique case (slot)
      SLOT_PAYLOAD: need = 4'd4;
      SLOT_POH:     need = 4'd3;
      default:      need = 4'd0;
    endcase
    npush = req ? (in_hdr ? 4'd5 : 4'd4) : 4'd0;

    for (int i = 0; i < 13; i++) begin
      avail[i]  = 8'h00;
      availh[i] = 1'b0;
    end
    for (int i = 0; i < 8; i++) begin
      if (i < int'(cnt)) begin
        avail[i]  = q[i];
        availh[i] = hecq[i];
      end
    end
    for (int j = 0; j < 5; j++) begin
      if (j < int'(npush)) begin
        avail[int'(cnt) + j]  = (j < 4) ? in_word[31-8*j -: 8] : in_hec;
        availh[int'(cnt) + j] = (j == 4);
      end
    end

    word_d = '0;
    hec_d  = 1'b0;
    for (int j = 0; j < 4; j++) begin
      if (j < int'(need)) begin
        word_d[31-8*j -: 8] = avail[j];
        hec_d = hec_d | availh[j];
      end
    end

    cnt_d = {1'b0, cnt} + {1'b0, npush} - {1'b0, need};
    for (int i = 0; i < 8; i++) begin
      q_d[i]    = avail[i + int'(need)];
      hecq_d[i] = availh[i + int'(need)];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt      <= '0;
      out_word <= '0;
      out_slot <= SLOT_TOH;
      out_hec  <= 1'b0;
      for (int i = 0; i < 8; i++) begin
        q[i]    <= '0;
        hecq[i] <= 1'b0;
      end
    end else begin
      cnt      <= cnt_d[3:0];
      out_word <= word_d;
      out_slot <= slot;
      out_hec  <= hec_d;
      for (int i = 0; i < 8; i++) begin
        q[i]    <= q_d[i];
        hecq[i] <= hecq_d[i];
      end
    end
  end

  // The queue never holds more than 8 bytes and never runs dry.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) cnt_d <= 5'd8);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
      {1'b0, cnt} + {1'b0, npush} >= {1'b0, need});
endmodule

// atm_rx_delin12c: STS-12c ATM cell delineator (receiver chip 1, STS-12c).
//
// Input: one 32-bit word per clock with a mask of the byte lanes that carry
// ATM payload (the path overhead lane and overhead words are masked out
// upstream). The valid bytes of a word are always a prefix in time
// (lanes 3,2,1[,0]).
//
// Delineation follows the HEC method: in HUNT every byte is tried as a HEC
// byte against the four bytes before it; all four byte positions of a word
// are checked in the same clock (four 32-bit HEC circuits, as the word-clock
// version of the hardware did). A match moves to PRESYNC, where the HEC is
// checked once per 53 bytes; DELTA consecutive matches give SYNC, a single
// mismatch returns to HUNT. In SYNC, ALPHA consecutive mismatches return to
// HUNT. The HEC byte position thus moves one lane per cell (53 mod 4 = 1),
// and one more when a path overhead byte was removed during the cell.
//
// In PRESYNC and SYNC the 48 payload bytes are regrouped into 12 words and
// descrambled 32 bits at a time (x^43+1). A cell is kept when it arrives in
// SYNC, its HEC matches and it is not an idle cell; a kept cell leaves as its
// header word (hdr = 1, HEC removed) followed by its 12 payload words, at most
// one word per clock, registered. hec_err pulses for a HEC mismatch in
// PRESYNC/SYNC, idle pulses for a discarded idle cell.
//
// From the original design: HEC delineation with HUNT/PRESYNC/SYNC and DELTA
// = 6, removal of the path overhead byte, and 32-bit descrambling. Own
// choices: checking all four byte positions at once instead of the
// shift-register arrangement, ALPHA = 7 (the original text gives both 6 and
// 7), and passing cells only in SYNC.
module atm_rx_delin12c
  import atm_pkg::*;
#(
  parameter int DELTA = 6,   // consecutive correct HECs in PRESYNC to reach SYNC
  parameter int ALPHA = 7    // consecutive HEC errors in SYNC to fall to HUNT
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] in_word,
  input  logic [3:0]  in_lanes,   // lane carries payload; [3] is first in time
  output logic [31:0] out_word,
  output logic        out_valid,
  output logic        out_hdr,
  output delin_e      state,
  output logic        hec_err,
  output logic        idle
);
  logic [7:0]  hist [4];          // last four payload bytes, hist[3] newest
  logic [5:0]  pos;               // position of the next byte in the cell
  logic [3:0]  cnt;               // PRESYNC matches / SYNC consecutive errors
  logic [31:0] acc;
  logic [1:0]  nacc;
  logic        keep;              // current cell is being kept

  // byte sequence: previous four bytes, then this word's bytes in time order
  logic [7:0]  seq [8];
  logic [3:0]  v;
  logic [31:0] win [4];
  logic [7:0]  hec [4];
  logic        match [4];

  always_comb begin
    for (int i = 0; i < 4; i++) seq[i] = hist[i];
    for (int j = 0; j < 4; j++) begin
      seq[4+j] = in_word[31-8*j -: 8];
      v[j]     = in_lanes[3-j];
    end
    for (int j = 0; j < 4; j++) win[j] = {seq[j], seq[j+1], seq[j+2], seq[j+3]};
  end

  for (genvar j = 0; j < 4; j++) begin : g_hec
    atm_hec32 u_hec (.hdr(win[j]), .hec(hec[j]));
    assign match[j] = (hec[j] == seq[4+j]);
  end

  delin_e      st_d;
  logic [5:0]  pos_d;
  logic [3:0]  cnt_d;
  logic [31:0] acc_d;
  logic [1:0]  nacc_d;
  logic        keep_d;
  logic        emit_hdr, emit_pay, emit_keep;
  logic [31:0] hdr_word, pay_raw, pay_dsc;
  logic        err_d, idle_d;
  logic [7:0]  hist_d [4];

  always_comb begin
    st_d = state; pos_d = pos; cnt_d = cnt; acc_d = acc; nacc_d = nacc; keep_d = keep;
    emit_hdr = 1'b0; emit_pay = 1'b0; emit_keep = 1'b0;
    hdr_word = '0; pay_raw = '0; err_d = 1'b0; idle_d = 1'b0;
    for (int j = 0; j < 4; j++) begin
      if (v[j]) begin
        if (st_d == ST_HUNT) begin
          if (match[j]) begin
            st_d = ST_PRESYNC; cnt_d = '0; pos_d = 6'd5; nacc_d = '0; keep_d = 1'b0;
          end
        end else if (pos_d == 6'd4) begin
          if (match[j]) begin
            if (st_d == ST_PRESYNC) begin
              cnt_d = cnt_d + 4'd1;
              if (int'(cnt_d) >= DELTA) begin st_d = ST_SYNC; cnt_d = '0; end
            end else begin
              cnt_d = '0;
            end
            keep_d = (st_d == ST_SYNC) && !is_idle_header(win[j]);
            idle_d = (st_d == ST_SYNC) && is_idle_header(win[j]);
            if (keep_d) begin emit_hdr = 1'b1; hdr_word = win[j]; end
          end else begin
            err_d  = 1'b1;
            keep_d = 1'b0;
            if (st_d == ST_PRESYNC) begin
              st_d = ST_HUNT; cnt_d = '0;
            end else begin
              cnt_d = cnt_d + 4'd1;
              if (int'(cnt_d) >= ALPHA) begin st_d = ST_HUNT; cnt_d = '0; end
            end
          end
          pos_d  = 6'd5;
          nacc_d = '0;
        end else if (pos_d >= 6'd5) begin
          acc_d  = {acc_d[23:0], seq[4+j]};
          nacc_d = nacc_d + 2'd1;
          if (nacc_d == 2'd0) begin
            emit_pay  = 1'b1;
            emit_keep = keep_d;
            pay_raw   = acc_d;
          end
          pos_d = (pos_d == 6'(CELL_BYTES - 1)) ? 6'd0 : pos_d + 6'd1;
        end else begin
          pos_d = pos_d + 6'd1;   // header bytes 0..3, seen through hist
        end
      end
    end
    // keep the last four valid bytes
    for (int i = 0; i < 4; i++) hist_d[i] = hist[i];
    for (int j = 0; j < 4; j++) begin
      if (v[j]) begin
        hist_d[0] = hist_d[1]; hist_d[1] = hist_d[2]; hist_d[2] = hist_d[3];
        hist_d[3] = seq[4+j];
      end
    end
  end

  // every payload word of PRESYNC/SYNC cells passes the descrambler
  atm_descrambler #(.W(32)) u_dsc (
    .clk, .rst_n, .en(emit_pay), .din(pay_raw), .dout(pay_dsc)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_HUNT; pos <= '0; cnt <= '0; acc <= '0; nacc <= '0; keep <= 1'b0;
      for (int i = 0; i < 4; i++) hist[i] <= '0;
      out_word <= '0; out_valid <= 1'b0; out_hdr <= 1'b0; hec_err <= 1'b0; idle <= 1'b0;
    end else begin
      state <= st_d; pos <= pos_d; cnt <= cnt_d; acc <= acc_d; nacc <= nacc_d; keep <= keep_d;
      for (int i = 0; i < 4; i++) hist[i] <= hist_d[i];
      out_valid <= emit_hdr || (emit_pay && emit_keep);
      out_hdr   <= emit_hdr;
      out_word  <= emit_hdr ? hdr_word : pay_dsc;
      hec_err   <= err_d;
      idle      <= idle_d;
    end
  end

  a_one_word: assert property (@(posedge clk) disable iff (!rst_n) !(emit_hdr && emit_pay));
endmodule

// atm_rx_chan3c: one STS-3c channel delineator (receiver chip 1, 4xSTS-3c).
//
// Works on the byte stream of one channel, at most one byte per clock
// (in_valid low for overhead and path overhead bytes).
//
// HUNT uses a six-byte window and one 8-bit HEC circuit with a feedback
// register: bytes 1..4 of the window are folded into the HEC, byte 5 is
// compared with it, byte 6 is spent clearing the feedback register. The
// window therefore steps six bytes at a time; since 6 and 53 are coprime
// every byte offset is tried within six cell periods. A match starts
// PRESYNC with the byte counter (the 53-state cell counter of the hardware,
// here binary) at the first payload byte. PRESYNC/SYNC rules as in the
// STS-12c delineator: DELTA matches to SYNC, one mismatch in PRESYNC or ALPHA
// consecutive mismatches in SYNC back to HUNT.
//
// Outside HUNT each cell's four header bytes leave with hdr = 1; on the HEC
// byte slot commit = 1 if the cell is kept (SYNC, HEC correct, not idle).
// Payload bytes are descrambled 8 bits at a time and leave with valid = 1
// only for kept cells. The HEC byte itself is never output. Outputs are
// registered (one clock).
//
// From the original design: the six-byte hunt window with feedback-register
// clear, the 53-byte cell counter, the 8-bit descrambler, and DELTA = 6. Own
// choices: ALPHA = 7 (the original text gives both 6 and 7), a binary instead
// of one-hot counter, and passing cells only in SYNC.
module atm_rx_chan3c
  import atm_pkg::*;
#(
  parameter int DELTA = 6,
  parameter int ALPHA = 7
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] in_byte,
  input  logic       in_valid,
  output logic [7:0] out_byte,
  output logic       out_valid,
  output logic       out_hdr,
  output logic       out_commit,
  output delin_e     state,
  output logic       hec_err,
  output logic       idle
);
  logic [2:0]  hp;      // hunt window phase 0..5
  logic [5:0]  pos;     // byte position in cell 0..52
  logic [3:0]  cnt;
  logic        keep;
  logic [31:0] hdr;

  logic        h_clear, h_en;
  logic [7:0]  h_hec;
  logic        match;
  logic        d_en;
  logic [7:0]  d_out;

  assign match = (h_hec == in_byte);

  always_comb begin
    h_clear = 1'b0;
    h_en    = 1'b0;
    if (in_valid) begin
      if (state == ST_HUNT) begin
        h_clear = (hp == 3'd0) || (hp == 3'd5);
        h_en    = (hp <= 3'd3);
      end else begin
        h_clear = (pos == 6'd0);
        h_en    = (pos <= 6'd3);
      end
    end
    d_en = in_valid && (state != ST_HUNT) && (pos >= 6'd5);
  end

  atm_hec8 u_hec (.clk, .rst_n, .clear(h_clear), .en(h_en), .din(in_byte), .hec(h_hec));

  atm_descrambler #(.W(8)) u_dsc (.clk, .rst_n, .en(d_en), .din(in_byte), .dout(d_out));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_HUNT; hp <= '0; pos <= '0; cnt <= '0; keep <= 1'b0; hdr <= '0;
      out_byte <= '0; out_valid <= 1'b0; out_hdr <= 1'b0; out_commit <= 1'b0;
      hec_err <= 1'b0; idle <= 1'b0;
    end else begin
      out_valid <= 1'b0; out_hdr <= 1'b0; out_commit <= 1'b0;
      hec_err <= 1'b0; idle <= 1'b0;
      out_byte <= d_out;
      if (in_valid) begin
        if (state == ST_HUNT) begin
          hp <= (hp == 3'd5) ? 3'd0 : hp + 3'd1;
          if (hp == 3'd4 && match) begin
            state <= ST_PRESYNC; cnt <= '0; pos <= 6'd5; keep <= 1'b0;
          end
        end else if (pos <= 6'd3) begin
          hdr       <= {hdr[23:0], in_byte};
          out_valid <= 1'b1;
          out_hdr   <= 1'b1;
          pos       <= pos + 6'd1;
        end else if (pos == 6'd4) begin
          pos <= 6'd5;
          if (match) begin
            automatic delin_e st_n = state;
            automatic logic [3:0] c_n = '0;
            if (state == ST_PRESYNC) begin
              c_n = cnt + 4'd1;
              if (int'(c_n) >= DELTA) begin st_n = ST_SYNC; c_n = '0; end
            end
            state      <= st_n;
            cnt        <= c_n;
            keep       <= (st_n == ST_SYNC) && !is_idle_header(hdr);
            out_commit <= (st_n == ST_SYNC) && !is_idle_header(hdr);
            idle       <= (st_n == ST_SYNC) && is_idle_header(hdr);
          end else begin
            hec_err <= 1'b1;
            keep    <= 1'b0;
            if (state == ST_PRESYNC || int'(cnt) + 1 >= ALPHA) begin
              state <= ST_HUNT; cnt <= '0; hp <= '0;
            end else begin
              cnt <= cnt + 4'd1;
            end
          end
        end else begin
          out_valid <= keep;
          pos       <= (pos == 6'(CELL_BYTES - 1)) ? 6'd0 : pos + 6'd1;
        end
      end
    end
  end
endmodule

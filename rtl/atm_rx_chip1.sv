// atm_rx_chip1: receiver chip 1, ATM cell delineation for both modes.
//
// Takes the STS-12 payload word stream from the SONET path termination with
// its per-channel qualifiers: in_payload[c] says the word carries payload of
// channel c (STS-12c uses bit 0 for the whole word), in_pathovh[c] says that
// the NEXT word carries channel c's path overhead byte (STS-12c: in bits 7:0;
// 4xSTS-3c: in lane c). Path overhead and overhead bytes are removed here.
//
//  STS-12c  : one 32-bit delineator (atm_rx_delin12c) over all four lanes.
//  4xSTS-3c : four independent channel delineators (atm_rx_chan3c), channel
//             c on lane c.
// Both are present; 'mode' (fixed at configuration, change under reset)
// selects which one drives the chip 2 bus and the status outputs.
// Latency: the bus carries a word or byte two clocks after it entered.
//
// From the original design: one STS-12c delineator or four STS-3c delineators
// selected by mode, and the path termination qualifiers. Own choices:
// removing the path overhead byte from the next-word announcement, and doing
// the 4xSTS-3c HEC and path overhead removal here rather than in chip 2.
module atm_rx_chip1
  import atm_pkg::*;
#(
  parameter int DELTA = 6,
  parameter int ALPHA = 7
) (
  input  logic         clk,
  input  logic         rst_n,
  input  mode_e        mode,
  input  logic [31:0]  in_word,
  input  logic [3:0]   in_payload,    // Stream_Payload
  input  logic [3:0]   in_pathovh,    // Stream_PathOvh (for the next word)
  output rx_cell_bus_t bus,
  output delin_e       state [4],
  output logic [3:0]   hec_err,
  output logic [3:0]   idle
);
  logic [31:0] word_q;
  logic [3:0]  lanes_q;
  logic [3:0]  poh_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      word_q <= '0; lanes_q <= '0; poh_q <= '0;
    end else begin
      word_q <= in_word;
      poh_q  <= in_pathovh;
      if (mode == MODE_STS12C)
        lanes_q <= in_payload[0] ? (poh_q[0] ? 4'b1110 : 4'b1111) : 4'b0000;
      else
        lanes_q <= in_payload & ~poh_q;
    end
  end

  // ---- STS-12c ----
  logic [31:0] w12;
  logic        v12, h12, e12, i12;
  delin_e      s12;
  atm_rx_delin12c #(.DELTA(DELTA), .ALPHA(ALPHA)) u_d12 (
    .clk, .rst_n,
    .in_word  (word_q),
    .in_lanes (mode == MODE_STS12C ? lanes_q : 4'b0000),
    .out_word (w12), .out_valid(v12), .out_hdr(h12),
    .state    (s12), .hec_err(e12), .idle(i12)
  );

  // ---- 4xSTS-3c ----
  logic [7:0] b3 [4];
  logic [3:0] v3, h3, c3, e3, i3;
  delin_e     s3 [4];
  for (genvar c = 0; c < 4; c++) begin : g_ch
    atm_rx_chan3c #(.DELTA(DELTA), .ALPHA(ALPHA)) u_ch (
      .clk, .rst_n,
      .in_byte   (word_q[8*c +: 8]),
      .in_valid  (mode == MODE_4XSTS3C && lanes_q[c]),
      .out_byte  (b3[c]), .out_valid(v3[c]), .out_hdr(h3[c]), .out_commit(c3[c]),
      .state     (s3[c]), .hec_err(e3[c]), .idle(i3[c])
    );
  end

  always_comb begin
    if (mode == MODE_STS12C) begin
      bus.data   = w12;
      bus.valid  = {3'b000, v12};
      bus.hdr    = {3'b000, h12};
      bus.commit = '0;
      state[0]   = s12;
      for (int c = 1; c < 4; c++) state[c] = ST_HUNT;
      hec_err    = {3'b000, e12};
      idle       = {3'b000, i12};
    end else begin
      bus.data   = {b3[3], b3[2], b3[1], b3[0]};
      bus.valid  = v3;
      bus.hdr    = h3;
      bus.commit = c3;
      for (int c = 0; c < 4; c++) state[c] = s3[c];
      hec_err    = e3;
      idle       = i3;
    end
  end
endmodule

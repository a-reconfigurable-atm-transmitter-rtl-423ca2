// atm_hec32: 32-bit parallel ATM Header Error Control generator.
//
// Computes the HEC of a complete 4-byte ATM header in one step: the CRC-8 of
// the 32 header bits with generator 1 + x + x^2 + x^8, plus the coset
// 1 + x^2 + x^4 + x^6 (0x55) added modulo 2. Each result bit is one XOR tree
// over a fixed subset of header bits; the subsets are the published parallel
// equations for this generator (header bit h0 is the first bit on the line,
// here hdr[31]). Result bit r_k is hec[k], hec[7] is sent first.
//
// Purely combinational, no clock. Used by both transmitter modes (on each
// header word) and by the STS-12c receiver (one instance per byte position).
//
// From the original design: the generator, the coset and the 32-bit parallel
// HEC equations. They were checked bit for bit against a serial CRC and are
// used as stated. Own choice: the equations are held as term masks.
module atm_hec32
  import atm_pkg::*;
(
  input  logic [31:0] hdr,   // header bytes 1..4, byte 1 in bits 31:24
  output logic [7:0]  hec    // HEC byte including the coset
);
  // Mask of header bits feeding r_k (bit 31-i set for h_i).
  localparam logic [31:0] TERMS [8] = '{
    32'hD0AD51C1, 32'h71F7F243, 32'h3342B547, 32'h66856A8E,
    32'hCD0AD51C, 32'h9A15AA38, 32'h342B5470, 32'h6856A8E0
  };

  always_comb begin
    for (int k = 0; k < 8; k++) hec[k] = ^(hdr & TERMS[k]);
    hec = hec ^ HEC_COSET;
  end
endmodule

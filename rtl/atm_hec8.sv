// atm_hec8: byte-serial (8-bit parallel) HEC accumulator.
//
// Holds the running CRC-8 (generator 1 + x + x^2 + x^8) of the header bytes
// fed so far in a feedback register. Each enabled clock folds in one byte
// (MSB first). 'clear' empties the feedback register; when 'clear' and 'en'
// are both high the byte is folded into an empty register, i.e. it starts a
// new header. After four header bytes 'hec' (register plus coset 0x55) is the
// header's HEC and can be compared with the fifth byte.
//
// The 8-bit step is the simplest XOR network that performs eight serial CRC
// shifts; the original design names this circuit but gives no equations.
// Timing: 'hec' is valid in the clock after the fourth byte was enabled.
//
// From the original design: a byte-wide HEC circuit with a clearable feedback
// register for the STS-3c delineators. Own choice: the inside, eight serial
// CRC steps unrolled.
module atm_hec8
  import atm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,  // clear the feedback register (ClearFBRegs)
  input  logic       en,     // fold din into the CRC
  input  logic [7:0] din,
  output logic [7:0] hec     // CRC so far plus coset
);
  logic [7:0] crc_q, crc_d, base;
  logic       fb;

  always_comb begin
    base  = clear ? 8'h00 : crc_q;
    crc_d = base;
    fb    = 1'b0;
    if (en) begin
      for (int b = 7; b >= 0; b--) begin
        fb    = crc_d[7] ^ din[b];
        crc_d = {crc_d[6:0], 1'b0} ^ (fb ? 8'h07 : 8'h00);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) crc_q <= '0;
    else        crc_q <= crc_d;

  assign hec = crc_q ^ HEC_COSET;
endmodule

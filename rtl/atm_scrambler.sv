// atm_scrambler: ATM self-synchronous payload scrambler, x^43 + 1.
//
// Each output bit is the input bit XOR the scrambler output 43 bits earlier.
// W bits are scrambled per enabled clock: 32 in the STS-12c transmitter, 8
// per channel in the 4xSTS-3c transmitter. din[W-1] is the first bit in
// time. The 43-bit state holds the most recent output bits (state[0] the
// newest); after a word, state <= {state[42-W:0], dout}, which for W = 32 is
// exactly the published 32-bit equations (out(i) = in(i) xor s(42-i),
// s(31-i) <= out(i), s(32..42) <= s(0..10)).
//
// When en is low (header, HEC, overhead, or scrambling switched off) the data
// passes unchanged and the state holds, so the scrambler only runs over cell
// payload. dout is combinational from din and the state.
//
// From the original design: the x^43+1 self-synchronous scrambler and its
// 32-bit and 8-bit use. Own choices: the equations are derived from the
// shift-register form for any W, and the enable/pass-through behaviour.
module atm_scrambler #(
  parameter int W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);
  logic [42:0] state;

  if (W < 1 || W > 42) begin : g_bad_width
    $error("atm_scrambler: W must be 1..42");
  end

  always_comb begin
    for (int k = 0; k < W; k++)   // k-th bit in time is din[W-1-k]
      dout[W-1-k] = din[W-1-k] ^ (en ? state[42-k] : 1'b0);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  state <= '0;
    else if (en) state <= {state[42-W:0], dout};
endmodule

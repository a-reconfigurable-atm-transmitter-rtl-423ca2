// atm_descrambler: ATM self-synchronous payload descrambler, x^43 + 1.
//
// Each output bit is the received bit XOR the received bit 43 bits earlier,
// so the descrambler locks by itself after 43 payload bits. W bits per
// enabled clock (32 in the STS-12c receiver, 8 per channel in 4xSTS-3c);
// din[W-1] is the first bit in time. The state keeps the most recent
// received bits (state[0] newest): state <= {state[42-W:0], din}, the
// published parallel equations for W = 32 and W = 8.
//
// When en is low the data passes unchanged and the state holds (header and
// HEC bytes are not part of the scrambled sequence). Combinational output.
//
// From the original design: the x^43+1 self-synchronous descrambler, 32 bits
// per clock for STS-12c and 8 per channel for STS-3c. Own choices: one
// parameterised module derived from the shift-register form, and the
// enable/pass-through behaviour.
module atm_descrambler #(
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
    $error("atm_descrambler: W must be 1..42");
  end

  always_comb begin
    for (int k = 0; k < W; k++)
      dout[W-1-k] = din[W-1-k] ^ (en ? state[42-k] : 1'b0);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  state <= '0;
    else if (en) state <= {state[42-W:0], din};
endmodule

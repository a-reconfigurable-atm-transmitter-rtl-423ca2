// tb_atm_scrambler: 32-bit and 8-bit scramblers against the bit-serial
// reference, with random clocks where en is low (data must pass unchanged
// and the state must hold).
//
// Expected values come from independent reference models (bit-serial HEC,
// bit-serial scrambler) or from the stimulus itself; the stimulus and the
// check set are this testbench's own.
module tb_atm_scrambler;
  import atm_tb_pkg::*;
  logic clk = 0, rst_n = 0;
  logic en32 = 0, en8 = 0;
  logic [31:0] d32 = 0, q32;
  logic [7:0]  d8 = 0, q8;
  int checks = 0, failures = 0;

  atm_scrambler #(.W(32)) dut32 (.clk, .rst_n, .en(en32), .din(d32), .dout(q32));
  atm_scrambler #(.W(8))  dut8  (.clk, .rst_n, .en(en8),  .din(d8),  .dout(q8));
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_scr r32 = new();
    ref_scr r8  = new();
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      logic [31:0] e32;
      logic [7:0]  e8;
      @(negedge clk);
      en32 = ($urandom() % 4 != 0);
      en8  = ($urandom() % 4 != 0);
      d32  = $urandom();
      d8   = $urandom();
      if (en32) for (int i = 3; i >= 0; i--) e32[8*i +: 8] = r32.scramble(d32[8*i +: 8]);
      else e32 = d32;
      e8 = en8 ? r8.scramble(d8) : d8;
      #1;
      checks += 2;
      if (q32 !== e32) begin failures++; $display("FAIL32 n=%0d %08h exp %08h", n, q32, e32); end
      if (q8 !== e8)   begin failures++; $display("FAIL8 n=%0d %02h exp %02h", n, q8, e8); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

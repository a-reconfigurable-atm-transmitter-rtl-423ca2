// tb_atm_hec8: feeds headers a byte per clock (with idle and clear clocks
// between them, as the hunt window does) and compares the accumulated HEC,
// one clock after the fourth byte, with the serial reference.
//
// Expected values come from independent reference models (bit-serial HEC,
// bit-serial scrambler) or from the stimulus itself; the stimulus and the
// check set are this testbench's own.
module tb_atm_hec8;
  import atm_tb_pkg::*;
  logic clk = 0, rst_n = 0;
  logic clear = 0, en = 0;
  logic [7:0] din = 0, hec;
  int checks = 0, failures = 0;

  atm_hec8 dut (.clk, .rst_n, .clear, .en, .din, .hec);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      automatic logic [31:0] h = (n == 0) ? 32'h1 : $urandom();
      automatic int gap = $urandom_range(0, 2);
      for (int b = 3; b >= 0; b--) begin
        @(negedge clk);
        clear = (b == 3);
        en    = 1;
        din   = h[8*b +: 8];
      end
      @(negedge clk);
      clear = 0; en = 0; din = $urandom();
      checks++;
      if (hec !== ref_hec(h)) begin
        failures++;
        $display("FAIL hdr=%08h hec=%02h exp=%02h", h, hec, ref_hec(h));
      end
      repeat (gap) begin
        @(negedge clk);
        clear = ($urandom() % 2 == 0);
      end
      @(negedge clk);
      clear = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

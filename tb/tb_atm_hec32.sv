// tb_atm_hec32: checks the 32-bit parallel HEC against a bit-serial CRC-8
// reference on known headers (idle cell 00000001 -> 0x52, all-zero -> 0x55)
// and 500 random headers.
//
// Expected values come from independent reference models (bit-serial HEC,
// bit-serial scrambler) or from the stimulus itself; the stimulus and the
// check set are this testbench's own.
module tb_atm_hec32;
  import atm_tb_pkg::*;
  logic [31:0] hdr;
  logic [7:0]  hec;
  int checks = 0, failures = 0;

  atm_hec32 dut (.hdr, .hec);

  task automatic check(logic [31:0] h, logic [7:0] exp);
    hdr = h;
    #1;
    checks++;
    if (hec !== exp) begin
      failures++;
      $display("FAIL hdr=%08h hec=%02h exp=%02h", h, hec, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32'h0000_0001, 8'h52);
    check(32'h0000_0000, 8'h55);
    for (int i = 0; i < 32; i++) check(32'h1 << i, ref_hec(32'h1 << i));
    for (int i = 0; i < 500; i++) begin
      automatic logic [31:0] h = $urandom();
      check(h, ref_hec(h));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

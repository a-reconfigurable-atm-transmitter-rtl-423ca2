// tb_atm_tx_chip2: transmitter chip 2 (frame timing, overhead addressing,
// 4xSTS-3c scrambling) in both modes.
//
// The testbench plays chip 1: each clock it returns a random word for the
// slot chip 2 announced one clock before, with random per-lane scramble
// marks. Checks: the slot sequence is 9 TOH, 1 POH, 260 payload words per
// row from reset; every word leaves one clock after it came in, unchanged
// in STS-12c and, in 4xSTS-3c, with each marked payload byte scrambled by a
// reference x^43+1 scrambler of its own channel; the overhead address is
// {buffer, row, column} with read enable and byte enables (TOH: all lanes;
// POH: lane 0 in STS-12c, all lanes in 4xSTS-3c; payload: none); sof marks
// row 0, column 0.
//
// Expected values come from independent reference models (bit-serial HEC,
// bit-serial scrambler) or from the stimulus itself; the stimulus and the
// check set are this testbench's own.
module tb_atm_tx_chip2;
  import atm_pkg::*;
  import atm_tb_pkg::*;
  logic clk = 0, rst_n = 0;
  mode_e mode = MODE_STS12C;
  logic scramble_en = 1;
  logic [3:0] oh_buf_sel = 4'hA;
  slot_e slot, in_slot = SLOT_TOH, out_slot;
  logic [31:0] in_word = 0, out_word;
  logic [3:0] in_scr = 0, oh_be;
  logic sof, oh_oe;
  logic [11:0] oh_addr;
  int checks = 0, failures = 0;

  atm_tx_chip2 dut (.*);
  always #5 clk = ~clk;

  typedef struct {
    logic [31:0] word;
    slot_e       sl;
    logic [11:0] addr;
    logic [3:0]  be;
    logic        oe, sof;
  } exp_t;
  exp_t expq[$];
  ref_scr scr [4];
  int col = 0, row = 0, pcol = 0, prow = 0;
  bit active = 0;

  always @(posedge clk) if (rst_n && active) begin
    exp_t e;
    if (expq.size() != 0) begin
      e = expq.pop_front();
      checks++;
      if (out_word !== e.word || out_slot !== e.sl || oh_addr !== e.addr || oh_be !== e.be ||
          oh_oe !== e.oe || sof !== e.sof) begin
        failures++;
        $display("FAIL word %h/%h slot %0d/%0d addr %h/%h be %h/%h oe %b/%b sof %b/%b",
                 out_word, e.word, out_slot, e.sl, oh_addr, e.addr, oh_be, e.be, oh_oe, e.oe, sof, e.sof);
      end
    end
    // expectation for the word entering now (slot of the previous clock)
    e.word = in_word;
    if (mode == MODE_4XSTS3C && in_slot == SLOT_PAYLOAD)
      for (int c = 0; c < 4; c++)
        if (in_scr[c]) e.word[8*c +: 8] = scr[c].scramble(in_word[8*c +: 8]);
    e.sl   = in_slot;
    e.addr = {oh_buf_sel, 4'(prow), (pcol <= 9) ? 4'(pcol) : 4'd0};
    e.oe   = (in_slot != SLOT_PAYLOAD);
    e.be   = (in_slot == SLOT_TOH) ? 4'hF : (in_slot == SLOT_POH) ? ((mode == MODE_STS12C) ? 4'h1 : 4'hF) : 4'h0;
    e.sof  = (pcol == 0 && prow == 0);
    expq.push_back(e);
  end

  initial begin
    #20000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(mode_e m, int clocks);
    rst_n = 0;
    active = 0;
    mode = m;
    expq.delete();
    for (int c = 0; c < 4; c++) scr[c] = new();
    col = 0; row = 0;
    in_slot = SLOT_TOH;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < clocks; n++) begin
      slot_e es;
      es = (col < 9) ? SLOT_TOH : (col == 9) ? SLOT_POH : SLOT_PAYLOAD;
      checks++;
      if (slot !== es) begin failures++; $display("FAIL slot %0d at row %0d col %0d", slot, row, col); end
      // what chip 1 returns now is for the previous clock's slot
      @(negedge clk);
      active  = 1;
      in_slot = es;
      in_word = $urandom();
      in_scr  = $urandom();
      pcol = col; prow = row;
      col = (col == 269) ? 0 : col + 1;
      if (col == 0) row = (row == 8) ? 0 : row + 1;
    end
  endtask

  initial begin
    run(MODE_STS12C, 2430 + 600);
    run(MODE_4XSTS3C, 2430 + 600);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

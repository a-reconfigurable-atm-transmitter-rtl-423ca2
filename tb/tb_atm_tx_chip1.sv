// tb_atm_tx_chip1: transmitter chip 1 in both modes.
//
// The slot sequence of STS-12 rows is driven as chip 2 would (9 TOH, 1 POH,
// 260 payload). Four FIFO models receive whole random cells at random times,
// sometimes too slowly, so idle cells are needed; for a while gen_idle forces
// idle cells. The reference order of cells is taken from the FIFO header
// reads.
//  STS-12c : the output byte stream (4 bytes per payload word, lanes 3..1 of
//            the POH word whose lane 0 must be 0) is cut into 53-byte cells:
//            header, HEC (must equal the reference HEC), 48 payload bytes
//            which, descrambled by a reference x^43+1 descrambler, must be
//            the cell's payload or, for an idle header, the idle pattern.
//  4xSTS-3c: after the four priming words, lane c is channel c's byte
//            stream: header, HEC, payload (not scrambled here), and out_scr
//            must mark exactly the payload bytes.
//
// Expected values come from independent reference models (bit-serial HEC,
// bit-serial scrambler) or from the stimulus itself; the stimulus and the
// check set are this testbench's own.
module tb_atm_tx_chip1;
  import atm_pkg::*;
  import atm_tb_pkg::*;
  logic clk = 0, rst_n = 0;
  mode_e mode = MODE_STS12C;
  logic gen_idle = 0, scramble_en = 1;
  slot_e slot = SLOT_TOH, out_slot;
  logic [3:0] fifo_empty, fifo_rd, out_scr;
  logic [31:0] fifo_data [4];
  logic [31:0] out_word;
  logic out_hec, idle_cell, data_cell;
  int checks = 0, failures = 0;

  atm_tx_chip1 dut (.*);
  always #5 clk = ~clk;

  logic [31:0] fifo [4][$];
  cell_t sentq [4][$], expq [4][$];
  int rdw [4];
  always_comb
    for (int c = 0; c < 4; c++) begin
      fifo_empty[c] = (fifo[c].size() == 0);
      fifo_data[c]  = (fifo[c].size() != 0) ? fifo[c][0] : 32'h0;
    end

  byte unsigned bq [4][$];   // output bytes per stream
  bit           sq [4][$];   // 4xSTS-3c: byte was marked for scrambling
  int n_data = 0, n_idle = 0, n_pay = 0, n_idle_pulse = 0, n_data_pulse = 0;
  ref_scr dsc;

  function automatic int strm(int c);
    return (mode == MODE_STS12C) ? 0 : c;
  endfunction

  task automatic parse(int s);
    cell_t c;
    logic [7:0] h;
    bit idle;
    for (int i = 3; i >= 0; i--) c[0][8*i +: 8] = bq[s].pop_front();
    h = bq[s].pop_front();
    void'(sq[s].pop_front()); void'(sq[s].pop_front()); void'(sq[s].pop_front());
    void'(sq[s].pop_front()); void'(sq[s].pop_front());
    checks += 2;
    if (h !== ref_hec(c[0])) begin failures++; $display("FAIL HEC %h for header %h", h, c[0]); end
    for (int w = 1; w < 13; w++)
      for (int i = 3; i >= 0; i--) begin
        logic [7:0] b;
        b = bq[s].pop_front();
        if (mode == MODE_STS12C) b = dsc.descramble(b);
        else if (!sq[s].pop_front()) begin failures++; $display("FAIL payload byte not marked for scrambling"); end
        c[w][8*i +: 8] = b;
      end
    idle = ref_is_idle(c[0]);
    if (idle) begin
      n_idle++;
      if (c != atm_tb_pkg::idle_cell()) begin failures++; $display("FAIL idle cell content"); end
    end else begin
      n_data++;
      if (expq[s].size() == 0 || c != expq[s][0]) begin failures++; $display("FAIL stream %0d cell %h", s, c[0]); end
      else void'(expq[s].pop_front());
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < 4; c++)
      if (fifo_rd[c]) begin
        checks++;
        if (fifo[c].size() == 0) begin failures++; $display("FAIL read of empty FIFO %0d", c); end
        else begin
          void'(fifo[c].pop_front());
          if (rdw[c] == 0) expq[strm(c)].push_back(sentq[c].pop_front());
          rdw[c] = (rdw[c] == 12) ? 0 : rdw[c] + 1;
        end
      end
    if (idle_cell) n_idle_pulse++;
    if (data_cell) n_data_pulse++;
    if (mode == MODE_STS12C) begin
      if (out_slot == SLOT_PAYLOAD) for (int l = 3; l >= 0; l--) bq[0].push_back(out_word[8*l +: 8]);
      if (out_slot == SLOT_POH) begin
        for (int l = 3; l >= 1; l--) bq[0].push_back(out_word[8*l +: 8]);
        checks++;
        if (out_word[7:0] !== 0) begin failures++; $display("FAIL POH lane"); end
      end
      if (bq[0].size() >= 53) parse(0);
    end else if (out_slot == SLOT_PAYLOAD) begin
      n_pay++;
      if (n_pay > 4)
        for (int c = 0; c < 4; c++) begin
          bq[c].push_back(out_word[8*c +: 8]);
          sq[c].push_back(out_scr[c]);
          if (bq[c].size() == 53) parse(c);
        end
    end
  end

  initial begin
    #20000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(mode_e m, int clocks);
    int col = 0;
    rst_n = 0;
    mode = m;
    dsc = new();
    n_pay = 0;
    for (int c = 0; c < 4; c++) begin
      fifo[c].delete(); sentq[c].delete(); expq[c].delete(); bq[c].delete(); sq[c].delete();
      rdw[c] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < clocks; n++) begin
      slot = (col < 9) ? SLOT_TOH : (col == 9) ? SLOT_POH : SLOT_PAYLOAD;
      gen_idle = (n > clocks / 2 && n < clocks / 2 + 300);
      for (int c = 0; c < 4; c++)
        if (fifo[c].size() < 26 && ($urandom() % 10000) < 110) begin
          cell_t cl;
          cl = random_cell(c);
          for (int w = 0; w < 13; w++) fifo[c].push_back(cl[w]);
          sentq[c].push_back(cl);
        end
      col = (col == 269) ? 0 : col + 1;
      @(negedge clk);
    end
  endtask

  initial begin
    run(MODE_STS12C, 2 * 2430);
    run(MODE_4XSTS3C, 2 * 2430);
    checks += 3;
    if (n_data < 100) begin failures++; $display("FAIL only %0d data cells", n_data); end
    if (n_idle < 20) begin failures++; $display("FAIL only %0d idle cells", n_idle); end
    if (n_idle_pulse + n_data_pulse < n_idle + n_data) begin failures++; $display("FAIL cell pulses"); end
    $display("data=%0d idle=%0d", n_data, n_idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_atm_tx_interleaver4x: runs the 4xSTS-3c byte interleaver through 4 SONET
// rows with four independent random cell sources. Reference: per channel the
// byte sequence header(4), HEC, payload(48) of consecutive cells; lane c of
// every payload word (after the four priming slots, which must be zero) must
// be the next byte of channel c. Also checked: POH words are zero, out_hec
// marks exactly the HEC words, out_scr marks exactly the payload-byte words,
// and reads go round-robin with none in the HEC slot.
//
// Expected values come from independent reference models (bit-serial HEC,
// bit-serial scrambler) or from the stimulus itself; the stimulus and the
// check set are this testbench's own.
module tb_atm_tx_interleaver4x;
  import atm_pkg::*;
  import atm_tb_pkg::*;
  logic clk = 0, rst_n = 0;
  slot_e slot, out_slot;
  logic rd, in_hdr, out_hec;
  logic [1:0] rd_ch;
  logic [31:0] in_word, out_word;
  logic [3:0] out_scr;
  logic [7:0] in_hec;
  int checks = 0, failures = 0;

  atm_tx_interleaver4x dut (.*);
  always #5 clk = ~clk;

  cell_t cells [4];
  int widx [4];
  int col = 0;
  byte unsigned expq [4][$];
  bit           kindq [4][$];   // 1 = HEC byte
  bit           payq [4][$];    // 1 = payload byte

  always_comb begin
    if (col < 9) slot = SLOT_TOH;
    else if (col == 9) slot = SLOT_POH;
    else slot = SLOT_PAYLOAD;
    in_word = cells[rd_ch][widx[rd_ch]];
    in_hdr  = (widx[rd_ch] == 0);
    in_hec  = ref_hec(cells[rd_ch][0]);
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic push_cell(int c);
    for (int w = 0; w < 13; w++)
      for (int i = 3; i >= 0; i--) begin
        expq[c].push_back(cells[c][w][8*i +: 8]);
        kindq[c].push_back(0);
        payq[c].push_back(w != 0);
        if (w == 0 && i == 0) begin
          expq[c].push_back(ref_hec(cells[c][0]));
          kindq[c].push_back(1);
          payq[c].push_back(0);
        end
      end
  endtask

  initial begin
    int paycount = 0, ncells = 0, lastch = 3;
    bit s_rd;
    int s_ch;
    for (int c = 0; c < 4; c++) begin
      cells[c] = random_cell(16 * c);
      widx[c] = 0;
      push_cell(c);
    end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 4 * 270 + 1; n++) begin
      @(posedge clk);
      s_rd = rd;
      s_ch = rd_ch;
      if (rd) begin
        checks++;
        if (rd_ch != 2'((lastch + 1) % 4)) begin failures++; $display("FAIL read order"); end
        lastch = rd_ch;
      end
      #1;
      if (n > 0) begin
        if (out_slot == SLOT_PAYLOAD) begin
          paycount++;
          if (paycount <= 4) begin
            checks++;
            if (out_word !== 0) begin failures++; $display("FAIL priming word %h", out_word); end
          end else begin
            bit h, p;
            byte unsigned e;
            h = kindq[0][0];
            p = payq[0][0];
            for (int c = 0; c < 4; c++) begin
              e = expq[c].pop_front();
              void'(kindq[c].pop_front());
              void'(payq[c].pop_front());
              checks++;
              if (out_word[8*c +: 8] !== e) begin
                failures++;
                $display("FAIL ch%0d got %02h exp %02h (slot %0d)", c, out_word[8*c +: 8], e, paycount);
              end
            end
            checks += 2;
            if (out_hec !== h) begin failures++; $display("FAIL out_hec"); end
            if (out_scr !== {4{p}}) begin failures++; $display("FAIL out_scr"); end
          end
        end else if (out_slot == SLOT_POH) begin
          checks++;
          if (out_word !== 0) begin failures++; $display("FAIL POH word not zero"); end
        end
      end
      if (s_rd) begin
        widx[s_ch] = (widx[s_ch] == 12) ? 0 : widx[s_ch] + 1;
        if (widx[s_ch] == 0) begin
          cells[s_ch] = random_cell(ncells);
          ncells++;
          push_cell(s_ch);
        end
      end
      col = (col == 269) ? 0 : col + 1;
    end
    checks++;
    if (ncells < 70) begin failures++; $display("FAIL only %0d cells", ncells); end
    $display("cells=%0d", ncells);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_atm_tx_formatter12c: runs the STS-12c formatter through 4 SONET rows.
// A cell source answers every request; the reference byte stream is each
// cell's 4 header bytes, its HEC and its 48 payload bytes. Every payload
// word must carry the next 4 bytes, the path overhead word the next 3 in
// lanes 3..1 and 0 in lane 0, overhead slots none. Checks the throughput:
// 1043 cell bytes per row of 270 word slots.
//
// Expected values come from independent reference models (bit-serial HEC,
// bit-serial scrambler) or from the stimulus itself; the stimulus and the
// check set are this testbench's own.
module tb_atm_tx_formatter12c;
  import atm_pkg::*;
  import atm_tb_pkg::*;
  logic clk = 0, rst_n = 0;
  slot_e slot, out_slot;
  logic req, in_hdr, out_hec;
  logic [31:0] in_word, out_word;
  logic [7:0] in_hec;
  int checks = 0, failures = 0;

  atm_tx_formatter12c dut (.*);
  always #5 clk = ~clk;

  line_pos lp = new();
  byte unsigned expq[$];
  bit           exph[$];
  cell_t cur;
  int widx = 0, ncells = 0, row_bytes = 0, rows_seen = 0;

  int col = 0;
  always_comb begin
    if (col < 9) slot = SLOT_TOH;
    else if (col == 9) slot = SLOT_POH;
    else slot = SLOT_PAYLOAD;
    in_word = cur[widx];
    in_hdr  = (widx == 0);
    in_hec  = ref_hec(cur[0]);
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic take(int lane);
    byte unsigned e = expq.pop_front();
    bit eh = exph.pop_front();
    checks++;
    if (out_word[8*lane +: 8] !== e) begin
      failures++;
      $display("FAIL byte lane %0d got %02h exp %02h", lane, out_word[8*lane +: 8], e);
    end
    row_bytes++;
  endtask

  bit s_req;
  initial begin
    cur = random_cell(0);
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 4 * 270 + 1; n++) begin
      @(posedge clk);
      // the source hands over its word in this clock
      s_req = req;
      if (s_req) begin
        if (widx == 0) begin
          for (int i = 3; i >= 0; i--) begin expq.push_back(cur[0][8*i +: 8]); exph.push_back(0); end
          expq.push_back(ref_hec(cur[0])); exph.push_back(1);
        end else begin
          for (int i = 3; i >= 0; i--) begin expq.push_back(cur[widx][8*i +: 8]); exph.push_back(0); end
        end
      end
      #1;
      if (n > 0) begin
        if (out_slot == SLOT_PAYLOAD) for (int l = 3; l >= 0; l--) take(l);
        else if (out_slot == SLOT_POH) begin
          for (int l = 3; l >= 1; l--) take(l);
          checks++;
          if (out_word[7:0] !== 8'h00) begin failures++; $display("FAIL POH lane not free"); end
        end
      end
      if (s_req) begin
        widx = (widx == 12) ? 0 : widx + 1;
        if (widx == 0) begin cur = random_cell(ncells); ncells++; end
      end
      lp.step();
      col = lp.col;
      if (lp.col == 1 && n > 2) begin
        // output of slot (col 269) of the previous row has been taken now
        rows_seen++;
        checks++;
        if (row_bytes != 1043) begin failures++; $display("FAIL row carried %0d bytes", row_bytes); end
        row_bytes = 0;
      end
    end
    checks++;
    if (ncells < 70) begin failures++; $display("FAIL only %0d cells", ncells); end
    $display("cells=%0d rows=%0d", ncells, rows_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

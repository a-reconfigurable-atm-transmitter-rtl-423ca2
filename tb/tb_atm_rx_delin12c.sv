// tb_atm_rx_delin12c: STS-12c cell delineator test.
//
// The line is a random byte offset of garbage followed by scrambled cells
// (a quarter of them idle) laid into STS-12 rows: 9 words without payload,
// one word with 3 payload bytes (path overhead lane masked), 260 words with
// 4. Phases: synchronise; a single bad HEC; ALPHA-1 bad HECs in a row (must
// stay in SYNC); ALPHA bad HECs in a row (must fall to HUNT); resynchronise.
// Checks: every output cell (header word + 12 descrambled payload words) is
// the next expected data cell, no required cell is skipped or missing, idle
// cells are dropped, SYNC is lost exactly once and reached exactly twice,
// hec_err pulses at least once per bad HEC.
//
// Expected values come from independent reference models (bit-serial HEC,
// bit-serial scrambler) or from the stimulus itself; the stimulus and the
// check set are this testbench's own.
module tb_atm_rx_delin12c;
  import atm_pkg::*;
  import atm_tb_pkg::*;
  localparam int ALPHA = 7;
  logic clk = 0, rst_n = 0;
  logic [31:0] in_word = 0, out_word;
  logic [3:0] in_lanes = 0;
  logic out_valid, out_hdr, hec_err, idle;
  delin_e state;
  int checks = 0, failures = 0;

  atm_rx_delin12c #(.DELTA(6), .ALPHA(ALPHA)) dut (.*);
  always #5 clk = ~clk;

  rx_plan plan = new();
  cell_t rc;
  int rn = 0, n_rx = 0, n_err = 0, n_idle = 0, n_lost_sync = 0, n_got_sync = 0;
  delin_e prev = ST_HUNT;

  always @(posedge clk) if (rst_n) begin
    if (hec_err) n_err++;
    if (idle) n_idle++;
    if (prev == ST_SYNC && state == ST_HUNT) n_lost_sync++;
    if (prev == ST_PRESYNC && state == ST_SYNC) n_got_sync++;
    checks++;
    if (prev == ST_HUNT && state == ST_SYNC) begin failures++; $display("FAIL HUNT->SYNC"); end
    prev = state;
    if (out_valid) begin
      if (out_hdr) rn = 0;
      rc[rn] = out_word;
      rn++;
      if (rn == 13) begin
        int p;
        p = plan.check(rc);
        checks++;
        n_rx++;
        if (p != 0) begin failures++; $display("FAIL cell %h: %0d problems", rc[0], p); end
        rn = 0;
      end
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int col = 0;
    plan.garbage(37);
    plan.add(30, 0, 10, 25);   // synchronise
    plan.add(1, 1, 0, 0);      // single error
    plan.add(20, 0, 0, 25);
    plan.add(ALPHA - 1, 1, 0, 0);
    plan.add(20, 0, 0, 25);
    plan.add(ALPHA, 1, 0, 0);  // loss of delineation
    plan.add(30, 0, 12, 25);
    plan.add(20, 0, 0, 25);
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    while (plan.line.size() != 0) begin
      logic [3:0] ln;
      ln = (col < 9) ? 4'b0000 : (col == 9) ? 4'b1110 : 4'b1111;
      in_word = $urandom();
      in_lanes = ln;
      for (int l = 3; l >= 0; l--)
        if (ln[l] && plan.line.size() != 0) in_word[8*l +: 8] = plan.line.pop_front();
        else in_lanes[l] = 1'b0;
      col = (col == 269) ? 0 : col + 1;
      @(negedge clk);
    end
    in_lanes = 0;
    repeat (20) @(negedge clk);
    checks += 5;
    if (plan.missing() != 0) begin failures++; $display("FAIL %0d cells missing", plan.missing()); end
    if (n_lost_sync != 1) begin failures++; $display("FAIL SYNC lost %0d times", n_lost_sync); end
    if (n_got_sync != 2) begin failures++; $display("FAIL SYNC reached %0d times", n_got_sync); end
    if (n_err < 1 + (ALPHA - 1) + ALPHA) begin failures++; $display("FAIL %0d HEC errors", n_err); end
    if (n_idle == 0) begin failures++; $display("FAIL no idle cell dropped"); end
    $display("cells=%0d hec_err=%0d idle=%0d", n_rx, n_err, n_idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

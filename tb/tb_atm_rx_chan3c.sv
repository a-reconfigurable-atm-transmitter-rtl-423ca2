// tb_atm_rx_chan3c: STS-3c channel delineator test.
//
// One channel's byte stream (garbage, then scrambled cells, a quarter idle)
// is offered with random gaps (in_valid low about one clock in three, like
// the overhead bytes and the other three channels' slots). Same phases as
// the STS-12c test: synchronise, one bad HEC, ALPHA-1 bad HECs (stay in
// SYNC), ALPHA bad HECs (back to HUNT), resynchronise. The output is
// reassembled: header bytes (hdr = 1) are held until commit, then 48 payload
// bytes follow. Checks as in the STS-12c test.
//
// Expected values come from independent reference models (bit-serial HEC,
// bit-serial scrambler) or from the stimulus itself; the stimulus and the
// check set are this testbench's own.
module tb_atm_rx_chan3c;
  import atm_pkg::*;
  import atm_tb_pkg::*;
  localparam int ALPHA = 7;
  logic clk = 0, rst_n = 0;
  logic [7:0] in_byte = 0, out_byte;
  logic in_valid = 0, out_valid, out_hdr, out_commit, hec_err, idle;
  delin_e state;
  int checks = 0, failures = 0;

  atm_rx_chan3c #(.DELTA(6), .ALPHA(ALPHA)) dut (.*);
  always #5 clk = ~clk;

  rx_plan plan = new();
  cell_t rc;
  logic [31:0] hsr = 0;
  int nb = -1, n_rx = 0, n_err = 0, n_idle = 0, n_lost_sync = 0, n_got_sync = 0;
  delin_e prev = ST_HUNT;

  always @(posedge clk) if (rst_n) begin
    if (hec_err) n_err++;
    if (idle) n_idle++;
    if (prev == ST_SYNC && state == ST_HUNT) n_lost_sync++;
    if (prev == ST_PRESYNC && state == ST_SYNC) n_got_sync++;
    prev = state;
    checks++;
    if (out_commit && (out_valid || nb >= 0 && nb < 48)) begin
      failures++; $display("FAIL commit in the middle of a cell");
    end
    if (out_valid && out_hdr) hsr = {hsr[23:0], out_byte};
    else if (out_valid) begin
      checks++;
      if (nb < 0) begin failures++; $display("FAIL payload byte without commit"); end
      else begin
        rc[1 + nb / 4][8 * (3 - nb % 4) +: 8] = out_byte;
        nb++;
        if (nb == 48) begin
          int p;
          p = plan.check(rc);
          checks++;
          n_rx++;
          if (p != 0) begin failures++; $display("FAIL cell %h: %0d problems", rc[0], p); end
          nb = -1;
        end
      end
    end
    if (out_commit) begin rc[0] = hsr; nb = 0; end
  end

  initial begin
    #5000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    plan.garbage(41);
    plan.add(30, 0, 12, 25);
    plan.add(1, 1, 0, 0);
    plan.add(20, 0, 0, 25);
    plan.add(ALPHA - 1, 1, 0, 0);
    plan.add(20, 0, 0, 25);
    plan.add(ALPHA, 1, 0, 0);
    plan.add(40, 0, 14, 25);
    plan.add(20, 0, 0, 25);
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    while (plan.line.size() != 0) begin
      in_valid = ($urandom() % 3 != 0);
      in_byte  = in_valid ? plan.line.pop_front() : 8'($urandom());
      @(negedge clk);
    end
    in_valid = 0;
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

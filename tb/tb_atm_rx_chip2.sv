// tb_atm_rx_chip2: receiver chip 2 (word buffering, request/grant).
//
// STS-12c: random words arrive on bus lane 0 (about half the clocks), the
// first of every 13 marked as header. 4xSTS-3c (after a reset): each lane
// carries its own channel's delineator output at a random pace: four header
// bytes, then on the HEC slot either a commit followed by 48 payload bytes
// (kept cell) or nothing (dropped cell, its header bytes must be discarded).
// A receive buffer controller model counts the request pulses per line and
// grants pending requests at random, one grant per clock. Checks: cell_data
// words come out in order per channel with the right cell_chan, with
// cell_valid exactly DATA_PIPE + 1 edges after the edge that sampled their
// grant (grant latched at T0, data out at T3); in STS-12c every request
// leaves REQ_PIPE edges after the edge that took its word (T3 -> T5) and the
// requests rotate over lines 0..3; nothing is lost or invented; every word
// is requested exactly once.
//
// Expected values come from independent reference models (bit-serial HEC,
// bit-serial scrambler) or from the stimulus itself; the stimulus and the
// check set are this testbench's own.
module tb_atm_rx_chip2;
  import atm_pkg::*;
  import atm_tb_pkg::*;
  logic clk = 0, rst_n = 0;
  mode_e mode = MODE_STS12C;
  rx_cell_bus_t bus = '0;
  logic [3:0] rx_request, rx_grant = 0;
  logic [31:0] cell_data;
  logic cell_valid;
  logic [1:0] cell_chan;
  int checks = 0, failures = 0;

  atm_rx_chip2 #(.BUF12(8), .BUF3(3), .REQ_PIPE(REQ_PIPE), .DATA_PIPE(DATA_PIPE)) dut (.*);
  always #5 clk = ~clk;

  logic [31:0] expw [4][$];
  int pend [4];
  int last_rq = 3, n_words = 0, n_req = 0, n_grant = 0;
  localparam int REQ_PIPE = 2, DATA_PIPE = 3;
  logic [3:0] gh [$];       // grants sampled at past edges, newest last
  bit         wh [$];       // STS-12c: a word was taken at past edges

  // controller model: grant one pending line now and then
  always @(negedge clk) begin
    rx_grant = 0;
    if (rst_n && ($urandom() % 4 != 0)) begin
      int st;
      st = $urandom() % 4;
      for (int i = 0; i < 4; i++)
        if (pend[(st + i) % 4] > 0) begin rx_grant = 4'(1 << ((st + i) % 4)); break; end
    end
  end

  always @(posedge clk) if (rst_n) begin
    logic [3:0] grant_q;
    // the grant sampled DATA_PIPE + 1 edges ago must show now
    grant_q = (gh.size() > DATA_PIPE) ? gh[gh.size() - 1 - DATA_PIPE] : 4'h0;
    checks++;
    if (cell_valid !== (grant_q != 0)) begin failures++; $display("FAIL cell_valid %b after grant %b", cell_valid, grant_q); end
    if (mode == MODE_STS12C) begin
      bit w;
      w = (wh.size() > REQ_PIPE) ? wh[wh.size() - 1 - REQ_PIPE] : 1'b0;
      checks++;
      if ((rx_request != 0) !== w) begin failures++; $display("FAIL request timing"); end
      wh.push_back(bus.valid[0]);
    end
    if (cell_valid) begin
      int s;
      s = (mode == MODE_STS12C) ? 0 : int'(cell_chan);
      checks += 2;
      if (mode == MODE_4XSTS3C && grant_q != 4'(1 << cell_chan)) begin failures++; $display("FAIL cell_chan"); end
      if (expw[s].size() == 0 || expw[s][0] !== cell_data) begin
        failures++; $display("FAIL ch%0d word %h", s, cell_data);
      end else void'(expw[s].pop_front());
      n_words++;
    end
    gh.push_back(rx_grant);
    for (int c = 0; c < 4; c++) begin
      if (rx_grant[c]) begin pend[c]--; n_grant++; end
      if (rx_request[c]) begin
        pend[c]++;
        n_req++;
        if (mode == MODE_STS12C) begin
          checks++;
          if (c != (last_rq + 1) % 4 || $countones(rx_request) != 1) begin failures++; $display("FAIL request rotation"); end
          last_rq = c;
        end
      end
    end
  end

  initial begin
    #10000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // 4xSTS-3c bus script per channel: 0 idle, 1 header byte, 2 commit, 3 payload byte
  int     ev [4][$];
  byte unsigned evb [4][$];

  task automatic script_cell(int c, bit keep);
    cell_t cl;
    cl = random_cell(c);
    for (int i = 3; i >= 0; i--) begin ev[c].push_back(1); evb[c].push_back(cl[0][8*i +: 8]); end
    ev[c].push_back(keep ? 2 : 0); evb[c].push_back(0);
    for (int w = 1; w < 13; w++)
      for (int i = 3; i >= 0; i--) begin
        ev[c].push_back(keep ? 3 : 0); evb[c].push_back(cl[w][8*i +: 8]);
      end
    if (keep) for (int w = 0; w < 13; w++) expw[c].push_back(cl[w]);
  endtask

  initial begin
    // ---- STS-12c ----
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 13 * 60; ) begin
      bus = '0;
      if ($urandom() % 2) begin
        bus.data     = $urandom();
        bus.valid[0] = 1'b1;
        bus.hdr[0]   = (n % 13 == 0);
        expw[0].push_back(bus.data);
        n++;
      end
      @(negedge clk);
    end
    bus = '0;
    repeat (50) @(negedge clk);
    checks++;
    if (expw[0].size() != 0) begin failures++; $display("FAIL %0d STS-12c words not delivered", expw[0].size()); end
    // ---- 4xSTS-3c ----
    rst_n = 0;
    mode = MODE_4XSTS3C;
    gh.delete();
    for (int c = 0; c < 4; c++) begin
      pend[c] = 0;
      for (int k = 0; k < 25; k++) script_cell(c, $urandom() % 4 != 0);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (ev[0].size() + ev[1].size() + ev[2].size() + ev[3].size() != 0) begin
      bus = '0;
      bus.data = $urandom();
      for (int c = 0; c < 4; c++)
        if (ev[c].size() != 0 && ($urandom() % 3 == 0)) begin
          int e;
          e = ev[c].pop_front();
          bus.data[8*c +: 8] = evb[c].pop_front();
          bus.valid[c]  = (e == 1 || e == 3);
          bus.hdr[c]    = (e == 1);
          bus.commit[c] = (e == 2);
        end
      @(negedge clk);
    end
    bus = '0;
    repeat (50) @(negedge clk);
    for (int c = 0; c < 4; c++) begin
      checks++;
      if (expw[c].size() != 0) begin failures++; $display("FAIL ch%0d: %0d words not delivered", c, expw[c].size()); end
    end
    checks++;
    if (n_req != n_grant || n_grant != n_words) begin failures++; $display("FAIL req %0d grant %0d words %0d", n_req, n_grant, n_words); end
    $display("words=%0d", n_words);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_atm_gateway_top: end-to-end loopback test of the gateway at its default
// parameters, first in STS-12c mode, then, after a reset that switches the
// mode, in 4xSTS-3c mode.
//
// Around the design: four transmit FIFO models that receive whole random
// cells at a random rate (low enough that idle cells are needed), an overhead
// SRAM model with random contents, a loopback wire that returns tx_data one
// clock later as rx_data together with the Stream_Payload / Stream_PathOvh
// qualifiers a SONET path termination would give, and a receive buffer
// controller model that answers every request with a grant (one per clock,
// round-robin over the four lines).
//
// Checks: every cell received is the next cell sent on its stream except for
// cells lost before the receiver is synchronised or hit by an injected header
// error (at most one cell per injected error); every overhead slot carries
// the SRAM word of its address {buffer, row, column}; at least a minimum
// number of cells arrives; every frame lasts 2430 clocks and carries the
// full number of cells (HEC words) for its mode. Injected errors flip one header bit of the word
// holding the HEC byte(s). The end prints how often each mechanism was seen:
// idle cell insertion, HEC insertion, POH/TOH insertion, HUNT->PRESYNC->SYNC,
// HEC error, idle cell removal, mode switch, request/grant.
//
// Expected values come from independent reference models (bit-serial HEC,
// bit-serial scrambler) or from the stimulus itself; the stimulus and the
// check set are this testbench's own.
module tb_atm_gateway_top;
  import atm_pkg::*;
  import atm_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  mode_e mode = MODE_STS12C;
  logic gen_idle = 0, scramble_en = 1;
  logic [3:0] fifo_empty, fifo_rd;
  logic [31:0] fifo_data [4];
  logic [3:0] oh_buf_sel = 4'd5;
  logic [11:0] oh_addr;
  logic oh_oe;
  logic [3:0] oh_be;
  logic [31:0] oh_rdata;
  logic [31:0] tx_data;
  logic tx_sof, tx_toh, tx_poh, tx_idle_cell, tx_data_cell, tx_hec;
  logic [31:0] rx_data = 0;
  logic [3:0] rx_payload = 0, rx_pathovh;
  logic [3:0] rx_request, rx_grant;
  logic [31:0] cell_data;
  logic cell_valid;
  logic [1:0] cell_chan;
  delin_e rx_state [4];
  logic [3:0] rx_hec_err, rx_idle;

  atm_gateway_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_idle_ins = 0, n_hec_ins = 0, n_toh = 0, n_poh = 0, n_presync = 0,
      n_sync = 0, n_hec_err = 0, n_idle_drop = 0, n_mode_sw = 0, n_grant = 0,
      n_cells = 0;

  // ---------------- transmit FIFO models ----------------
  logic [31:0] fifo [4][$];
  always_comb
    for (int c = 0; c < 4; c++) begin
      fifo_empty[c] = (fifo[c].size() == 0);
      fifo_data[c]  = (fifo[c].size() != 0) ? fifo[c][0] : 32'h0;
    end

  // ---------------- overhead SRAM model ----------------
  logic [31:0] ohram [4096];
  initial for (int i = 0; i < 4096; i++) ohram[i] = $urandom();
  assign oh_rdata = oh_oe ? ohram[oh_addr] : 32'h0;

  // ---------------- loopback ----------------
  logic [31:0] flip = 0;
  assign rx_pathovh = {4{tx_poh}};   // announces the path overhead of the next word
  always_ff @(posedge clk) begin
    rx_data    <= tx_data ^ flip;
    rx_payload <= {4{!tx_toh}};
  end

  // ---------------- receive buffer controller model ----------------
  int pend [4];
  int rr = 0;
  always_ff @(negedge clk) begin
    rx_grant <= 4'h0;
    if (rst_n)
      for (int i = 0; i < 4; i++) begin
        int l;
        l = (rr + i) % 4;
        if (pend[l] > 0) begin
          rx_grant <= 4'(1 << l);
          rr <= (l + 1) % 4;
          break;
        end
      end
  end

  // ---------------- reference streams ----------------
  cell_t sentq [4][$];        // cells in each FIFO
  int    rdw [4];             // word index of the next FIFO read
  cell_t expq [4][$];         // cells sent, per stream (STS-12c uses stream 0)
  logic [31:0] rxw [4][$];    // words received, per stream
  int  n_inject [4], n_lost [4];
  bit  synced [4];
  int  phase_rows = 0;
  int  frame_col = -1, frame_row = 0, frame_clk = 0, frame_hec = 0, n_frames = 0;

  function automatic int strm(int c);
    return (mode == MODE_STS12C) ? 0 : c;
  endfunction

  int dbg = 0;
  task automatic got_cell(int s);
    cell_t rc;
    int skipped = 0;
    bit found = 0;
    for (int w = 0; w < 13; w++) rc[w] = rxw[s].pop_front();
    foreach (expq[s][i]) begin
      if (expq[s][i] == rc) begin found = 1; skipped = i; break; end
      if (dbg < 6 && expq[s][i][0] == rc[0]) begin
        dbg++;
        $display("DBG header match, rx %p\n ex %p", rc, expq[s][i]);
      end
    end
    if (found) repeat (skipped + 1) void'(expq[s].pop_front());
    checks++;
    if (!found) begin
      failures++;
      $display("FAIL stream %0d: received cell %h.. was never sent (or out of order)", s, rc[0]);
    end else begin
      n_cells++;
      if (synced[s]) begin
        n_lost[s] += skipped;
        checks++;
        if (n_lost[s] > n_inject[s]) begin
          failures++;
          $display("FAIL stream %0d: %0d cells lost with %0d injected errors", s, n_lost[s], n_inject[s]);
        end
      end
      synced[s] = 1;
    end
  endtask

  // per-clock monitor
  delin_e prev_state [4];
  int inj_wait = 0;
  always @(posedge clk) if (rst_n) begin
    // transmit FIFO reads (sampled at the edge, before the model updates)
    for (int c = 0; c < 4; c++)
      if (fifo_rd[c]) begin
        checks++;
        if (fifo[c].size() == 0) begin failures++; $display("FAIL read of empty FIFO %0d", c); end
        else begin
          void'(fifo[c].pop_front());
          // a header read: the cell joins its stream's reference in line order
          if (rdw[c] == 0) expq[strm(c)].push_back(sentq[c].pop_front());
          rdw[c] = (rdw[c] == 12) ? 0 : rdw[c] + 1;
        end
      end
    if (tx_idle_cell) n_idle_ins++;
    if (tx_hec) n_hec_ins++;
    // overhead slots and frame position
    if (tx_sof) begin
      // line rate: one frame per 2430 clocks, and every cell slot used
      // (STS-12c 9 x 1043 cell bytes = 177.1 cells per frame, 4xSTS-3c
      // 9 x 260 bytes per channel = 44.2 cells per frame)
      if (frame_col >= 0) begin
        checks += 2;
        if (frame_clk != 2430) begin failures++; $display("FAIL frame of %0d clocks", frame_clk); end
        if (mode == MODE_STS12C ? (frame_hec < 177 || frame_hec > 178) : (frame_hec < 44 || frame_hec > 45)) begin
          failures++; $display("FAIL %0d HEC words in a frame", frame_hec);
        end
        n_frames++;
      end
      frame_clk = 0; frame_hec = 0;
      frame_col = 0; frame_row = 0;
    end
    frame_clk++;
    if (tx_hec) frame_hec++;
    if (frame_col >= 0 && (tx_toh || tx_poh)) begin
      logic [11:0] a;
      a = {oh_buf_sel, 4'(frame_row), 4'(frame_col)};
      checks++;
      if (!oh_oe || oh_addr !== a) begin
        failures++;
        $display("FAIL overhead address %h exp %h (row %0d col %0d)", oh_addr, a, frame_row, frame_col);
      end
      for (int l = 0; l < 4; l++) if (oh_be[l]) begin
        checks++;
        if (tx_data[8*l +: 8] !== ohram[a][8*l +: 8]) begin failures++; $display("FAIL overhead byte"); end
      end
      if (tx_toh) n_toh++; else n_poh++;
    end
    if (frame_col >= 0) begin
      frame_col = (frame_col == 269) ? 0 : frame_col + 1;
      if (frame_col == 0) frame_row = (frame_row == 8) ? 0 : frame_row + 1;
    end
    // receive side
    for (int c = 0; c < 4; c++) begin
      if (rx_state[c] == ST_PRESYNC && prev_state[c] == ST_HUNT) n_presync++;
      if (rx_state[c] == ST_SYNC && prev_state[c] == ST_PRESYNC) n_sync++;
      prev_state[c] = rx_state[c];
      if (rx_hec_err[c]) n_hec_err++;
      if (rx_idle[c]) n_idle_drop++;
      if (rx_request[c]) pend[c]++;
      if (rx_grant[c]) begin pend[c]--; n_grant++; end
    end
    if (cell_valid) begin
      int s;
      s = strm(cell_chan);
      rxw[s].push_back(cell_data);
      if (rxw[s].size() == 13) got_cell(s);
    end
  end

  // error injection: one header bit of a HEC word, now and then
  always @(negedge clk) begin
    flip <= 0;
    if (rst_n && tx_hec && synced[0] && inj_wait == 0 && ($urandom() % 4 == 0)) begin
      if (mode == MODE_STS12C) begin
        flip <= 32'h0100_0000;        // lane 3: a header byte or the HEC itself
        n_inject[0]++;
      end else begin
        int c;
        c = $urandom() % 4;
        flip <= 32'(1) << (8 * c);    // channel c's HEC byte
        n_inject[c]++;
      end
      inj_wait = 40;
    end else if (tx_hec && inj_wait > 0) inj_wait--;
  end

  // traffic: whole cells into the FIFOs at random
  // per channel and clock, in 1/10000: 110 is about 60 % of the line in
  // both modes (STS-12c: four sources share one stream; 4xSTS-3c: one each)
  int load = 110;
  always @(negedge clk) if (rst_n) begin
    for (int c = 0; c < 4; c++)
      if (fifo[c].size() < 26 && ($urandom() % 10000) < load) begin
        cell_t cl;
        cl = random_cell(c);
        for (int w = 0; w < 13; w++) fifo[c].push_back(cl[w]);
        sentq[c].push_back(cl);
      end
  end

  task automatic run_mode(mode_e m, int clocks);
    rst_n = 0;
    mode = m;
    for (int c = 0; c < 4; c++) begin
      fifo[c].delete(); expq[c].delete(); sentq[c].delete(); rdw[c] = 0; rxw[c].delete();
      pend[c] = 0; synced[c] = 0; n_inject[c] = 0; n_lost[c] = 0;
      prev_state[c] = ST_HUNT;
    end
    frame_col = -1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (clocks) @(posedge clk);
    // stop traffic, let it drain
    load = 0;
    repeat (1500) @(posedge clk);
    load = 110;
    for (int c = 0; c < 4; c++) begin
      checks++;
      if ((m == MODE_STS12C ? c == 0 : 1) && !synced[c]) begin
        failures++;
        $display("FAIL stream %0d never delivered a cell", c);
      end
    end
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cells12;
    run_mode(MODE_STS12C, 3 * 2430);
    cells12 = n_cells;
    $display("STS-12c: %0d cells delivered", cells12);
    n_mode_sw++;
    run_mode(MODE_4XSTS3C, 4 * 2430);
    $display("4xSTS-3c: %0d cells delivered", n_cells - cells12);
    checks += 3;
    if (n_frames < 5) begin failures++; $display("FAIL only %0d whole frames", n_frames); end
    if (cells12 < 200) begin failures++; $display("FAIL too few STS-12c cells"); end
    if (n_cells - cells12 < 200) begin failures++; $display("FAIL too few 4xSTS-3c cells"); end
    $display("mechanisms: idle_insert=%0d hec_insert=%0d toh=%0d poh=%0d hunt_presync=%0d presync_sync=%0d hec_error=%0d idle_drop=%0d mode_switch=%0d request_grant=%0d",
             n_idle_ins, n_hec_ins, n_toh, n_poh, n_presync, n_sync, n_hec_err, n_idle_drop, n_mode_sw, n_grant);
    checks += 10;
    if (n_idle_ins == 0) begin failures++; $display("FAIL no idle cell inserted"); end
    if (n_hec_ins == 0) begin failures++; $display("FAIL no HEC inserted"); end
    if (n_toh == 0) begin failures++; $display("FAIL no TOH"); end
    if (n_poh == 0) begin failures++; $display("FAIL no POH"); end
    if (n_presync == 0) begin failures++; $display("FAIL no HUNT->PRESYNC"); end
    if (n_sync == 0) begin failures++; $display("FAIL no PRESYNC->SYNC"); end
    if (n_hec_err == 0) begin failures++; $display("FAIL no HEC error seen"); end
    if (n_idle_drop == 0) begin failures++; $display("FAIL no idle cell dropped"); end
    if (n_mode_sw == 0) begin failures++; $display("FAIL no mode switch"); end
    if (n_grant == 0) begin failures++; $display("FAIL no grant"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

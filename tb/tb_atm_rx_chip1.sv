// tb_atm_rx_chip1: receiver chip 1 in both modes.
//
// STS-12c: one scrambled cell stream in STS-12 rows (overhead words with
// in_payload low, the path overhead byte in bits 7:0 of the word announced
// by in_pathovh). 4xSTS-3c (after a reset): four independent streams, one
// per byte lane, the path overhead word announced for all four channels.
// Each stream: garbage, cells with some idle and some bad-HEC cells. The
// chip 2 bus is reassembled into cells (STS-12c: words with hdr on the
// first; 4xSTS-3c: per lane header bytes, commit, 48 payload bytes) and
// compared with the reference; the unused lanes must stay quiet in STS-12c.
//
// Expected values come from independent reference models (bit-serial HEC,
// bit-serial scrambler) or from the stimulus itself; the stimulus and the
// check set are this testbench's own.
module tb_atm_rx_chip1;
  import atm_pkg::*;
  import atm_tb_pkg::*;
  logic clk = 0, rst_n = 0;
  mode_e mode = MODE_STS12C;
  logic [31:0] in_word = 0;
  logic [3:0] in_payload = 0, in_pathovh = 0;
  rx_cell_bus_t bus;
  delin_e state [4];
  logic [3:0] hec_err, idle;
  int checks = 0, failures = 0;

  atm_rx_chip1 dut (.*);
  always #5 clk = ~clk;

  rx_plan plan [4];
  cell_t rc [4];
  logic [31:0] hsr [4];
  int nb [4], n_rx = 0, n_err = 0, n_idle = 0;

  task automatic done_cell(int s);
    int p;
    p = plan[s].check(rc[s]);
    checks++;
    n_rx++;
    if (p != 0) begin failures++; $display("FAIL stream %0d cell %h: %0d problems", s, rc[s][0], p); end
  endtask

  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < 4; c++) begin
      if (hec_err[c]) n_err++;
      if (idle[c]) n_idle++;
    end
    if (mode == MODE_STS12C) begin
      checks++;
      if (bus.valid[3:1] != 0 || bus.commit != 0) begin failures++; $display("FAIL stray lanes in STS-12c"); end
      if (bus.valid[0]) begin
        if (bus.hdr[0]) nb[0] = 0;
        rc[0][nb[0]] = bus.data;
        nb[0]++;
        if (nb[0] == 13) begin done_cell(0); nb[0] = 0; end
      end
    end else begin
      for (int c = 0; c < 4; c++) begin
        logic [7:0] b;
        b = bus.data[8*c +: 8];
        if (bus.valid[c] && bus.hdr[c]) hsr[c] = {hsr[c][23:0], b};
        else if (bus.valid[c] && nb[c] >= 0) begin
          rc[c][1 + nb[c] / 4][8 * (3 - nb[c] % 4) +: 8] = b;
          nb[c]++;
          if (nb[c] == 48) begin done_cell(c); nb[c] = -1; end
        end
        if (bus.commit[c]) begin rc[c][0] = hsr[c]; nb[c] = 0; end
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

  task automatic run(mode_e m, int ncells);
    int col = 0, nstreams;
    bit busy;
    nstreams = (m == MODE_STS12C) ? 1 : 4;
    rst_n = 0;
    mode = m;
    for (int s = 0; s < 4; s++) begin
      plan[s] = new();
      nb[s] = (m == MODE_STS12C) ? 0 : -1;
      hsr[s] = 0;
      if (s < nstreams) begin
        plan[s].garbage(11 + 17 * s);
        plan[s].add(ncells, 0, 14, 25);
        plan[s].add(2, 1, 0, 0);
        plan[s].add(ncells, 0, 0, 25);
      end
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    do begin
      bit pay, poh;
      pay = (col >= 9);
      poh = (col == 9);
      in_word    = $urandom();
      in_payload = {4{pay}};
      in_pathovh = {4{col == 8}};
      busy = 0;
      for (int l = 3; l >= 0; l--) begin
        int s;
        s = (m == MODE_STS12C) ? 0 : l;
        if (pay && !(poh && (m == MODE_4XSTS3C || l == 0)) && plan[s].line.size() != 0)
          in_word[8*l +: 8] = plan[s].line.pop_front();
        busy |= plan[s].line.size() != 0;
      end
      col = (col == 269) ? 0 : col + 1;
      @(negedge clk);
    end while (busy);
    in_payload = 0;
    repeat (20) @(negedge clk);
    for (int s = 0; s < nstreams; s++) begin
      checks++;
      if (plan[s].missing() != 0) begin failures++; $display("FAIL stream %0d: %0d cells missing", s, plan[s].missing()); end
    end
  endtask

  initial begin
    run(MODE_STS12C, 40);
    run(MODE_4XSTS3C, 30);
    checks += 2;
    if (n_err < 10) begin failures++; $display("FAIL only %0d HEC errors", n_err); end
    if (n_idle == 0) begin failures++; $display("FAIL no idle cell dropped"); end
    $display("cells=%0d hec_err=%0d idle=%0d", n_rx, n_err, n_idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

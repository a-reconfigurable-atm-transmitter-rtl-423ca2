// atm_tb_pkg: reference models shared by the testbenches.
//
// Written independently of the RTL, bit by bit: the HEC is a serial CRC-8
// (x^8 + x^2 + x + 1, MSB first) plus coset 0x55; the self-synchronous
// scrambler keeps a queue of the last 43 line bits. The cell generator builds
// 53-byte cells (header, HEC, scrambled payload) and the line generators lay
// them into STS-12 rows of 270 words (9 overhead words, one path overhead
// word, 260 payload words) for STS-12c or for four interleaved STS-3c
// channels.
package atm_tb_pkg;

  function automatic logic [7:0] ref_hec(logic [31:0] h);
    logic [7:0] r = 8'h00;
    for (int i = 31; i >= 0; i--) begin
      logic fb = r[7] ^ h[i];
      r = {r[6:0], 1'b0};
      if (fb) r = r ^ 8'h07;
    end
    return r ^ 8'h55;
  endfunction

  function automatic bit ref_is_idle(logic [31:0] h);
    return h[31:4] == 0 && h[0] == 1'b0;
  endfunction

  // Serial x^43+1 self-synchronous scrambler / descrambler.
  class ref_scr;
    bit hist[$];          // hist[0] = bit 43 positions back
    function new();
      for (int i = 0; i < 43; i++) hist.push_back(1'b0);
    endfunction
    function automatic logic [7:0] scramble(logic [7:0] d);
      logic [7:0] o;
      for (int i = 7; i >= 0; i--) begin
        o[i] = d[i] ^ hist.pop_front();
        hist.push_back(o[i]);
      end
      return o;
    endfunction
    function automatic logic [7:0] descramble(logic [7:0] d);
      logic [7:0] o;
      for (int i = 7; i >= 0; i--) begin
        o[i] = d[i] ^ hist.pop_front();
        hist.push_back(d[i]);
      end
      return o;
    endfunction
  endclass

  // One cell in AN2 form: 13 words, header word first.
  typedef logic [31:0] cell_t [13];

  function automatic cell_t random_cell(int seed_tag);
    cell_t c;
    do c[0] = $urandom(); while (ref_is_idle(c[0]));
    for (int i = 1; i < 13; i++) c[i] = $urandom();
    c[12][7:0] = 8'(seed_tag);
    return c;
  endfunction

  function automatic cell_t idle_cell();
    cell_t c;
    c[0] = 32'h0;
    for (int i = 1; i < 13; i++) c[i] = 32'h6A6A6A6A;
    return c;
  endfunction

  // 53 line bytes of a cell; payload scrambled by s; bad_hec corrupts the HEC.
  function automatic void cell_bytes(cell_t c, ref_scr s, bit bad_hec, ref byte unsigned q[$]);
    logic [7:0] h = ref_hec(c[0]);
    for (int i = 3; i >= 0; i--) q.push_back(c[0][8*i +: 8]);
    q.push_back(bad_hec ? (h ^ 8'h01) : h);
    for (int w = 1; w < 13; w++)
      for (int i = 3; i >= 0; i--) q.push_back(s.scramble(c[w][8*i +: 8]));
  endfunction

  // STS-12 line word slot generator: col 0..8 TOH, col 9 POH, else payload.
  class line_pos;
    int col = 0;
    function automatic int kind();   // 2 = TOH, 1 = POH, 0 = payload
      if (col < 9) return 2;
      if (col == 9) return 1;
      return 0;
    endfunction
    function automatic void step();
      col = (col == 269) ? 0 : col + 1;
    endfunction
    function automatic bit next_is_poh();
      return col == 8;
    endfunction
  endclass

  // Receive-side stimulus and reference: a line byte stream of cells (some
  // idle, some with a corrupted HEC) and the list of data cells a delineator
  // should pass. 'must' is cleared for cells that may be lost: cells with a
  // bad HEC and the cells sent while the receiver may still be hunting.
  class rx_plan;
    byte unsigned line[$];
    cell_t        expq[$];
    bit           must[$];
    ref_scr       s;
    int           tag = 0;
    function new();
      s = new();
    endfunction
    function automatic void garbage(int n);
      for (int i = 0; i < n; i++) line.push_back(8'($urandom()));
    endfunction
    function automatic void add(int n, bit bad, int lose_first, int idle_pct);
      for (int i = 0; i < n; i++) begin
        cell_t c;
        if (int'($urandom() % 100) < idle_pct) c = idle_cell();
        else c = random_cell(tag++);
        cell_bytes(c, s, bad, line);
        if (!ref_is_idle(c[0])) begin
          expq.push_back(c);
          must.push_back(!bad && i >= lose_first);
        end
      end
    endfunction
    // Match a received cell against the reference; returns the number of
    // problems (not found, or a cell that had to arrive was skipped).
    function automatic int check(cell_t rc);
      int idx = -1, bad = 0;
      foreach (expq[i]) if (expq[i] == rc) begin idx = i; break; end
      if (idx < 0) return 1;
      for (int i = 0; i < idx; i++) bad += must[i];
      repeat (idx + 1) begin void'(expq.pop_front()); void'(must.pop_front()); end
      return bad;
    endfunction
    function automatic int missing();
      int m = 0;
      foreach (must[i]) m += must[i];
      return m;
    endfunction
  endclass

endpackage

// atm_rx_chip2: receiver chip 2, word buffering towards the cell SRAM.
//
// Collects the kept cells from chip 1 as 32-bit words (13 per cell, header
// word first, as in the transmit FIFOs) and hands them to the receive buffer
// controller with a request/grant handshake, one word per grant.
//
//  STS-12c  : words go into one BUF12-entry FIFO. Each word written raises a
//             one-clock request on rx_request, the lines used in turn 0,1,2,3
//             so the controller sees the same four request lines as in
//             4xSTS-3c. A grant on any line reads the oldest word.
//  4xSTS-3c : each channel assembles its bytes into words (de-interleaving):
//             header bytes are held until chip 1 commits the cell, payload
//             bytes are packed four to a word. Each channel has a BUF3-entry
//             FIFO and its own request/grant line.
//
// Write and read pointers advance round-robin through the buffers, the two
// independent ring state machines of the hardware. A grant must only answer
// a request (at most one grant per clock in 4xSTS-3c).
//
// Timing: the clock edge that takes a word's last byte (or, in STS-12c, the
// word) is T3 of the original request pipeline, and the request pulse leaves
// REQ_PIPE = 2 edges later, at T5. The edge that samples a grant is T0 of
// the read pipeline; the word, cell_valid and cell_chan leave DATA_PIPE = 3
// edges later, at T3.
//
// From the original design: the eight-word STS-12c buffer, the three-word
// per-channel buffers, one request per word written, and the request and
// read pipeline depths. Own choices: the request as a one-clock pulse, and
// rotating STS-12c requests over the four lines.
module atm_rx_chip2
  import atm_pkg::*;
#(
  parameter int BUF12 = 8,
  parameter int BUF3  = 3,
  parameter int REQ_PIPE  = 2,   // extra clocks before a request leaves
  parameter int DATA_PIPE = 3    // extra clocks from grant to data
) (
  input  logic         clk,
  input  logic         rst_n,
  input  mode_e        mode,
  input  rx_cell_bus_t bus,
  output logic [3:0]   rx_request,   // ATM_Request_H
  input  logic [3:0]   rx_grant,     // ATM_Grant_H
  output logic [31:0]  cell_data,    // ATM_CellData
  output logic         cell_valid,
  output logic [1:0]   cell_chan
);
  localparam int AW12 = $clog2(BUF12);

  if (BUF3 < 1 || BUF3 > 4) begin : g_bad_buf3
    $error("atm_rx_chip2: BUF3 must be 1..4");
  end

  // first stage of the request and data paths
  logic [3:0]  req0;
  logic [31:0] data0;
  logic        valid0;
  logic [1:0]  chan0;

  // ---- STS-12c FIFO ----
  logic [31:0]      m12 [BUF12];
  logic [AW12-1:0]  wp12, rp12;
  logic [AW12:0]    n12;
  logic [1:0]       rq12;

  // ---- 4xSTS-3c per-channel state ----
  logic [31:0] hacc [4];
  logic [31:0] pacc [4];
  logic [1:0]  pn   [4];
  logic [31:0] m3   [4][BUF3];
  logic [1:0]  wp3  [4];
  logic [1:0]  rp3  [4];
  logic [2:0]  n3   [4];

  logic        g_any;
  logic [1:0]  g_ch;
  always_comb begin
    g_any = |rx_grant;
    g_ch  = '0;
    for (int c = 3; c >= 0; c--) if (rx_grant[c]) g_ch = 2'(c);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp12 <= '0; rp12 <= '0; n12 <= '0; rq12 <= '0;
      req0 <= '0; data0 <= '0; valid0 <= 1'b0; chan0 <= '0;
      for (int c = 0; c < 4; c++) begin
        hacc[c] <= '0; pacc[c] <= '0; pn[c] <= '0;
        wp3[c] <= '0; rp3[c] <= '0; n3[c] <= '0;
      end
    end else begin
      req0 <= '0;
      valid0 <= 1'b0;
      if (mode == MODE_STS12C) begin
        automatic logic wr = bus.valid[0] && (int'(n12) < BUF12);
        automatic logic rd = g_any && (n12 != '0);
        if (wr) begin
          m12[wp12] <= bus.data;
          wp12 <= (int'(wp12) == BUF12 - 1) ? '0 : wp12 + 1'b1;
          req0[rq12] <= 1'b1;
          rq12 <= rq12 + 2'd1;
        end
        if (rd) begin
          data0  <= m12[rp12];
          valid0 <= 1'b1;
          chan0  <= g_ch;
          rp12 <= (int'(rp12) == BUF12 - 1) ? '0 : rp12 + 1'b1;
        end
        n12 <= n12 + (AW12+1)'(wr) - (AW12+1)'(rd);
      end else begin
        for (int c = 0; c < 4; c++) begin
          automatic logic        push = 1'b0;
          automatic logic [31:0] w    = '0;
          automatic logic        rd   = g_any && (g_ch == 2'(c)) && (n3[c] != '0);
          automatic logic [7:0]  byt  = bus.data[8*c +: 8];
          if (bus.valid[c] && bus.hdr[c]) hacc[c] <= {hacc[c][23:0], byt};
          if (bus.commit[c]) begin
            push  = 1'b1;
            w     = hacc[c];
            pn[c] <= '0;
          end else if (bus.valid[c] && !bus.hdr[c]) begin
            pacc[c] <= {pacc[c][23:0], byt};
            pn[c]   <= pn[c] + 2'd1;
            if (pn[c] == 2'd3) begin
              push = 1'b1;
              w    = {pacc[c][23:0], byt};
            end
          end
          push = push && (int'(n3[c]) < BUF3);
          if (push) begin
            m3[c][wp3[c]] <= w;
            wp3[c] <= (int'(wp3[c]) == BUF3 - 1) ? '0 : wp3[c] + 2'd1;
            req0[c] <= 1'b1;
          end
          if (rd) begin
            data0  <= m3[c][rp3[c]];
            valid0 <= 1'b1;
            chan0  <= 2'(c);
            rp3[c] <= (int'(rp3[c]) == BUF3 - 1) ? '0 : rp3[c] + 2'd1;
          end
          n3[c] <= n3[c] + 3'(push) - 3'(rd);
        end
      end
    end
  end

  // Output pipelines: REQ_PIPE extra stages on the requests, DATA_PIPE on the
  // granted word, so that a request leaves two clocks after the word's last
  // byte was latched and the data three clocks after the grant was latched.
  if (REQ_PIPE == 0) begin : g_req_direct
    assign rx_request = req0;
  end else begin : g_req_pipe
    logic [3:0] rq [REQ_PIPE];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < REQ_PIPE; i++) rq[i] <= '0;
      end else begin
        rq[0] <= req0;
        for (int i = 1; i < REQ_PIPE; i++) rq[i] <= rq[i-1];
      end
    end
    assign rx_request = rq[REQ_PIPE-1];
  end

  if (DATA_PIPE == 0) begin : g_data_direct
    assign cell_data  = data0;
    assign cell_valid = valid0;
    assign cell_chan  = chan0;
  end else begin : g_data_pipe
    logic [31:0] dq [DATA_PIPE];
    logic        vq [DATA_PIPE];
    logic [1:0]  cq [DATA_PIPE];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < DATA_PIPE; i++) begin
          dq[i] <= '0; vq[i] <= 1'b0; cq[i] <= '0;
        end
      end else begin
        dq[0] <= data0; vq[0] <= valid0; cq[0] <= chan0;
        for (int i = 1; i < DATA_PIPE; i++) begin
          dq[i] <= dq[i-1]; vq[i] <= vq[i-1]; cq[i] <= cq[i-1];
        end
      end
    end
    assign cell_data  = dq[DATA_PIPE-1];
    assign cell_valid = vq[DATA_PIPE-1];
    assign cell_chan  = cq[DATA_PIPE-1];
  end

  // The buffer controller must keep up: no word may find its buffer full.
  a_no_overrun12: assert property (@(posedge clk) disable iff (!rst_n)
      (mode == MODE_STS12C && bus.valid[0]) |-> int'(n12) < BUF12);
  a_grant_onehot: assert property (@(posedge clk) disable iff (!rst_n)
      (mode == MODE_4XSTS3C) |-> $onehot0(rx_grant));
endmodule

// tb_wl_long_packets: maximum-length packets through the full-size mesh.
//
// Tile 0 streams packets with the largest payload, 256 words (258 flits
// with the two header flits), through its traffic shaper into router 4's
// east buffer, the testbench acting as crossbar. Checks:
//   * with the window fully open, 2048 flits pass per 2048-cycle period,
//     i.e. the increase interval equals about 8 maximum-length packets;
//   * such a packet is longer than the 32-flit buffer, so at most two are
//     ever counted in it: a free link raises no report at the default
//     threshold of 2, and a stall is only seen when it catches the end of
//     one packet and the start of the next in the buffer. The link is
//     stalled 20 flits before a packet ends: router 4 notifies tile 0 and
//     the window halves;
//   * afterwards, with the link free again, exactly 'window' flits pass
//     per period until the window grows 2048 quiet cycles later;
//   * with the shaper's length limit set to 14 words, every long packet
//     leaves as 16-flit pieces, two of which fill the buffer: a stall that
//     starts in the middle of a long packet is now reported too.
module tb_wl_long_packets;
  import cc_pkg::*;

  localparam int NODES = 9, PORTS = 5, PERIOD = 2048, PKT = 258;
  localparam int WIN_W = $clog2(PERIOD + 1);

  logic clk = 0, rst_n = 0;
  logic [3:0]  uc_addr  [NODES];
  logic        uc_wr    [NODES];
  logic        uc_rd    [NODES];
  logic [15:0] uc_wdata [NODES];
  logic [15:0] uc_rdata [NODES];
  logic        cn_tx_valid [NODES];
  logic        cn_tx_ready [NODES];
  notif_t      cn_tx_notif [NODES];
  logic        cn_rx_valid [NODES];
  notif_t      cn_rx_notif [NODES];
  logic        buf_in_valid  [NODES][PORTS];
  logic        buf_in_ready  [NODES][PORTS];
  flit_t       buf_in_flit   [NODES][PORTS];
  logic        buf_in_last   [NODES][PORTS];
  logic        buf_out_valid [NODES][PORTS];
  logic        buf_out_ready [NODES][PORTS];
  flit_t       buf_out_flit  [NODES][PORTS];
  logic        buf_out_last  [NODES][PORTS];
  logic        ni_valid   [NODES];
  logic        ni_ready   [NODES];
  flit_t       ni_flit    [NODES];
  logic        ni_last    [NODES];
  logic        ni_prio_wr [NODES];
  prio_t       ni_prio    [NODES];
  logic        ni_len_wr  [NODES];
  logic [8:0]  ni_len     [NODES];
  logic        inj_valid  [NODES];
  logic        inj_ready  [NODES];
  flit_t       inj_flit   [NODES];
  logic        inj_last   [NODES];
  logic        congested  [NODES][PORTS];
  logic [WIN_W-1:0] window [NODES];
  logic        win_open     [NODES];
  logic        win_decrease [NODES];
  logic        win_increase [NODES];

  cc_noc dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 30) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // crossbar: tile 0 -> router 4 east buffer; everything else idle
  always_comb begin
    for (int n = 0; n < NODES; n++) begin
      for (int p = 0; p < PORTS; p++) begin
        buf_in_valid[n][p] = 1'b0;
        buf_in_flit[n][p]  = '0;
        buf_in_last[n][p]  = 1'b0;
      end
      inj_ready[n] = 1'b1;
    end
    buf_in_valid[4][2] = inj_valid[0];
    buf_in_flit[4][2]  = inj_flit[0];
    buf_in_last[4][2]  = inj_last[0];
    inj_ready[0]       = buf_in_ready[4][2];
  end

  // control network: zero delay, one notification per destination per clock
  always_comb begin
    for (int d = 0; d < NODES; d++) begin cn_rx_valid[d] = 1'b0; cn_rx_notif[d] = '0; end
    for (int s = 0; s < NODES; s++) cn_tx_ready[s] = 1'b0;
    for (int s = 0; s < NODES; s++)
      if (cn_tx_valid[s] && int'(cn_tx_notif[s].dest) < NODES && !cn_rx_valid[cn_tx_notif[s].dest]) begin
        cn_rx_valid[cn_tx_notif[s].dest] = 1'b1;
        cn_rx_notif[cn_tx_notif[s].dest] = cn_tx_notif[s];
        cn_tx_ready[s] = 1'b1;
      end
  end

  // tile 0 network interface: back-to-back maximum-length packets
  int ni_pos = 0;
  always @(posedge clk) begin
    if (rst_n && ni_valid[0] && ni_ready[0]) begin
      ni_pos     <= (ni_pos == PKT - 1) ? 0 : ni_pos + 1;
      ni_flit[0] <= (ni_pos == PKT - 1) ? flit_t'(4) : flit_t'($urandom);
      ni_last[0] <= (ni_pos == PKT - 2);
    end
  end

  // flits leaving router 4's east buffer per period
  int flits = 0, n_notif = 0, max_pkts = 0;
  always @(posedge clk) begin
    if (buf_out_valid[4][2] && buf_out_ready[4][2]) flits++;
    if (cn_tx_valid[4] && cn_tx_ready[4] && cn_tx_notif[4].dest == 4'd0) n_notif++;
    if (int'(dut.g_node[4].packets_outqueue[2]) > max_pkts) max_pkts = int'(dut.g_node[4].packets_outqueue[2]);
  end

  // flits per packet injected by tile 0; a piece of 14 payload words
  // with its two header flits is 16 flits long
  int run = 0, pieces = 0;
  bit max_pieces_ok = 1'b1;
  always @(posedge clk) begin
    if (inj_valid[0] && inj_ready[0]) begin
      run++;
      if (inj_last[0]) begin
        pieces++;
        if (run > 16) max_pieces_ok = 1'b0;
        run = 0;
      end
    end
  end

  task automatic uc_write(int n, cm_reg_e a, logic [15:0] v);
    @(negedge clk);
    uc_addr[n] = a; uc_wdata[n] = v; uc_wr[n] = 1;
    @(negedge clk);
    uc_wr[n] = 0;
  endtask

  // count flits for one whole shaper period, starting at a period boundary
  task automatic one_period(output int got);
    wait (dut.g_node[0].u_ts.phase == '0);
    @(negedge clk);
    flits = 0;
    repeat (PERIOD) @(negedge clk);
    got = flits;
  endtask

  int got;
  logic [WIN_W-1:0] w;

  initial begin
    for (int n = 0; n < NODES; n++) begin
      uc_addr[n] = 0; uc_wr[n] = 0; uc_rd[n] = 0; uc_wdata[n] = 0;
      ni_valid[n] = 0; ni_flit[n] = 0; ni_last[n] = 0; ni_prio_wr[n] = 0; ni_prio[n] = 0; ni_len_wr[n] = 0; ni_len[n] = 0;
      for (int p = 0; p < PORTS; p++) buf_out_ready[n][p] = 1;
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    ni_flit[0] = flit_t'(4); ni_last[0] = 0; ni_valid[0] = 1;

    // open window: the whole period is used; the buffer never holds two
    // packets' worth, and with the link free nothing is reported
    one_period(got);
    check(got >= PERIOD - 2, "open window passes one flit per clock");
    one_period(got);
    check(got == PERIOD, "2048 flits per period");
    $display("open window: %0d flits per period = %0.2f maximum-length packets", got, real'(got) / PKT);
    check(n_notif == 0 && window[0] == WIN_W'(PERIOD), "free link: no throttling");
    check(max_pkts <= 2, "a 32-flit buffer holds parts of at most two long packets");

    // stall the link: the buffer fills and the (single) packet is reported
    wait (ni_pos == PKT - 20);
    buf_out_ready[4][2] = 0;
    wait (win_decrease[0]);
    @(posedge clk) #1;
    w = window[0];
    check(n_notif >= 1 && w == WIN_W'(PERIOD / 2), "stalled link throttles tile 0 to half");
    @(negedge clk);
    buf_out_ready[4][2] = 1;
    repeat (3) @(negedge clk);

    // throttled: window flits per period (a second report may have halved
    // the window again before the link drained, so read the window)
    one_period(got);
    check(got == int'(window[0]), "throttled period passes exactly window flits");
    $display("throttled window %0d: %0d flits per period", window[0], got);
    check(int'(window[0]) < PERIOD, "still throttled one period later");

    // length limit: 16-flit pieces, stall in the middle of a long packet
    @(negedge clk);
    ni_len[0] = 9'd14; ni_len_wr[0] = 1;
    @(negedge clk);
    ni_len_wr[0] = 0;
    wait (ni_pos == PKT - 1);
    wait (ni_pos == 5);
    pieces = 0; max_pieces_ok = 1'b1;
    wait (ni_pos == 130);
    check(max_pieces_ok, "pieces leave the shaper with at most 14 payload words");
    got = n_notif;
    buf_out_ready[4][2] = 0;
    fork
      wait (win_decrease[0]);
      repeat (3 * PERIOD) @(posedge clk);
    join_any
    disable fork;
    check(n_notif > got, "stall in the middle of a long packet is reported with the length limit");
    check(pieces >= 8, "long packets were cut into pieces");
    $display("length limit 14: %0d pieces seen, %0d notifications", pieces, n_notif);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

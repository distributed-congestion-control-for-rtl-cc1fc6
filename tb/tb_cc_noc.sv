// tb_cc_noc: end-to-end test of the congestion-control system, run with
// the top at its default size (3x3 mesh, 32-flit buffers, 2048-cycle
// window period).
//
// The testbench plays the parts that lie outside the design: the router
// crossbars (it writes packets into the output buffers and holds their
// link side stalled or free), the control network (a zero-delay model that
// delivers each notification to its destination tile, one per destination
// per cycle) and the microcontrollers (register reads and writes).
//
// Scenarios, each counted as a mechanism that must occur:
//   A  tile 0 streams packets, cut to a 3-word payload limit by its
//      traffic shaper, through that shaper into router 4's
//      east buffer, whose link is stalled. The buffer congests, router 4
//      notifies tile 0, tile 0's window is halved (checked: notification
//      sent two clocks, received three clocks and the shaper's window
//      halved five clocks after the threshold is reached), the shaper holds
//      traffic back; after the stall is lifted and 2048 quiet cycles
//      pass, the window grows again.
//   B  exemption: packets of priority below the exemption value congest a
//      buffer without any notification; a later low-priority packet is
//      reported.
//   C  two buffers reach the threshold in the same clock: only the
//      higher-priority report becomes a notification.
//   D  cmBufMsk: a masked monitor stays silent and reports once enabled.
//   E  manual mode at router 2: no autonomous send, the report is read
//      from REG_LOCAL and sent by a REG_TX write; the receiving tile's
//      mailbox shows it.
// Finally the send counter of router 4 is compared with the notifications
// the network model saw.
module tb_cc_noc;
  import cc_pkg::*;

  localparam int NODES = 9, PORTS = 5, PERIOD = 2048;
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

  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------------ crossbar
  // Buffers are written from d_* except router 4's east buffer, which takes
  // what tile 0's shaper injects.
  logic  d_valid [NODES][PORTS];
  flit_t d_flit  [NODES][PORTS];
  logic  d_last  [NODES][PORTS];

  always_comb begin
    for (int n = 0; n < NODES; n++) begin
      for (int p = 0; p < PORTS; p++) begin
        buf_in_valid[n][p] = d_valid[n][p];
        buf_in_flit[n][p]  = d_flit[n][p];
        buf_in_last[n][p]  = d_last[n][p];
      end
      inj_ready[n] = 1'b1;
    end
    buf_in_valid[4][2] = inj_valid[0];
    buf_in_flit[4][2]  = inj_flit[0];
    buf_in_last[4][2]  = inj_last[0];
    inj_ready[0]       = buf_in_ready[4][2];
  end

  // --------------------------------------------------------- control network
  int n_to   [NODES];   // notifications delivered per destination
  int n_from [NODES];   // per sender
  notif_t last_to [NODES];

  always_comb begin
    for (int d = 0; d < NODES; d++) begin
      cn_rx_valid[d] = 1'b0;
      cn_rx_notif[d] = '0;
    end
    for (int s = 0; s < NODES; s++) cn_tx_ready[s] = 1'b0;
    for (int s = 0; s < NODES; s++) begin
      if (cn_tx_valid[s] && int'(cn_tx_notif[s].dest) < NODES &&
          !cn_rx_valid[cn_tx_notif[s].dest]) begin
        cn_rx_valid[cn_tx_notif[s].dest] = 1'b1;
        cn_rx_notif[cn_tx_notif[s].dest] = cn_tx_notif[s];
        cn_tx_ready[s] = 1'b1;
      end
    end
  end

  always @(posedge clk) begin
    for (int s = 0; s < NODES; s++)
      if (cn_tx_valid[s] && cn_tx_ready[s]) begin
        n_to[cn_tx_notif[s].dest]++;
        n_from[s]++;
        last_to[cn_tx_notif[s].dest] <= cn_tx_notif[s];
      end
  end

  // --------------------------------------------------------- mechanism counts
  int n_congest = 0, n_dec = 0, n_inc0 = 0, n_gated = 0;
  int n_exempt = 0, n_arb = 0, n_mask = 0, n_manual = 0, n_cut = 0;
  logic cong_q [NODES][PORTS];
  logic [WIN_W-1:0] win0_q;

  always @(posedge clk) begin
    for (int n = 0; n < NODES; n++) begin
      for (int p = 0; p < PORTS; p++) begin
        if (congested[n][p] && !cong_q[n][p]) n_congest++;
        cong_q[n][p] <= congested[n][p];
      end
      if (win_decrease[n]) n_dec++;
    end
    if (window[0] > win0_q) n_inc0++;   // shaper window grew
    win0_q <= window[0];
    if (ni_valid[0] && !win_open[0]) n_gated++;
    if (inj_valid[0] && inj_ready[0] && inj_last[0] && !ni_last[0]) n_cut++;
  end

  // ---------------------------------------------------------------- helpers
  task automatic uc_write(int n, cm_reg_e a, logic [15:0] v);
    @(negedge clk);
    uc_addr[n] = a; uc_wdata[n] = v; uc_wr[n] = 1;
    @(negedge clk);
    uc_wr[n] = 0;
  endtask

  task automatic uc_read(int n, cm_reg_e a, output logic [15:0] v);
    @(negedge clk);
    uc_addr[n] = a; uc_rd[n] = 1;
    @(negedge clk);
    uc_rd[n] = 0;
    v = uc_rdata[n];
  endtask

  // Write one packet into output buffer p of router n.
  task automatic send_pkt(int n, int p, addr_t src, prio_t pr, int payload);
    hdr1_t h1;
    hdr2_t h2;
    h1 = '{msg_class: 2'd0, msg_tag: 6'd0, dest_port: 4'd0, dest_addr: addr_t'(n)};
    h2 = '{dest_lid: 9'd0, prio: pr, src: src};
    for (int f = 0; f < payload + 2; f++) begin
      @(negedge clk);
      d_valid[n][p] = 1;
      d_flit[n][p]  = (f == 0) ? flit_t'(h1) : (f == 1) ? flit_t'(h2) : flit_t'($urandom);
      d_last[n][p]  = (f == payload + 1);
      @(posedge clk);
      while (!buf_in_ready[n][p]) @(posedge clk);
    end
    @(negedge clk) d_valid[n][p] = 0;
  endtask

  task automatic wait_cycles(int c);
    repeat (c) @(posedge clk);
  endtask

  // tile 0 network interface: back-to-back 6-flit packets
  int ni_pos = 0;
  always @(posedge clk) begin
    if (rst_n && ni_valid[0] && ni_ready[0]) begin
      ni_pos   <= (ni_pos == 5) ? 0 : ni_pos + 1;
      ni_flit[0] <= (ni_pos == 5) ? flit_t'(4) : flit_t'($urandom);
      ni_last[0] <= (ni_pos == 4);
    end
  end

  // ------------------------------------------------------------------ main
  int unsigned t_cong, t_tx, t_dec;
  logic [15:0] v;
  int base;

  initial begin
    for (int n = 0; n < NODES; n++) begin
      uc_addr[n] = 0; uc_wr[n] = 0; uc_rd[n] = 0; uc_wdata[n] = 0;
      ni_valid[n] = 0; ni_flit[n] = 0; ni_last[n] = 0; ni_prio_wr[n] = 0; ni_prio[n] = 0; ni_len_wr[n] = 0; ni_len[n] = 0;
      n_to[n] = 0; n_from[n] = 0;
      for (int p = 0; p < PORTS; p++) begin
        d_valid[n][p] = 0; d_flit[n][p] = 0; d_last[n][p] = 0;
        buf_out_ready[n][p] = 1;
        cong_q[n][p] = 0;
      end
    end
    win0_q = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // ---------------- A: congestion caused by tile 0, throttled at tile 0
    ni_prio[0] = 3'd5; ni_prio_wr[0] = 1;
    ni_len[0] = 9'd3; ni_len_wr[0] = 1;      // 4-word payloads leave as 3 + 1
    @(negedge clk) begin ni_prio_wr[0] = 0; ni_len_wr[0] = 0; end
    check(window[0] == WIN_W'(PERIOD), "tile 0 window open after reset");
    buf_out_ready[4][2] = 0;
    ni_flit[0] = flit_t'(4); ni_last[0] = 0;
    ni_valid[0] = 1;
    t_cong = 0; t_tx = 0; t_dec = 0;
    fork
      begin : watch_cong
        wait (congested[4][2]); t_cong = cyc;
      end
      begin : watch_tx
        wait (cn_tx_valid[4]); t_tx = cyc;
      end
      begin : watch_dec
        wait (win_decrease[0]); t_dec = cyc;
      end
    join
    check(t_tx - t_cong == 2, "notification sent two clocks after the threshold is reached");
    check(t_dec - t_cong == 4, "new window computed four clocks after the threshold is reached");
    @(posedge clk) #1;
    check(cyc - t_cong == 5 && window[0] == WIN_W'(PERIOD / 2),
          "shaper window halved five clocks after the threshold is reached");
    check(last_to[0].sender == 4'd4 && last_to[0].prio == 3'd5, "notification names router 4 and priority 5");
    wait_cycles(200);
    check(n_to[0] >= 2 && window[0] < WIN_W'(PERIOD / 2), "continued congestion keeps throttling tile 0");
    check(int'(n_to[0]) == n_from[4], "all notifications went to tile 0");
    buf_out_ready[4][2] = 1;
    wait_cycles(PERIOD + 300);
    check(n_inc0 >= 1, "window grows again after a quiet interval");
    check(n_gated > 0, "shaper held tile 0 back");

    // ---------------- B: exemption
    uc_write(4, REG_EXEMPTION, 16'd3);
    buf_out_ready[4][1] = 0;
    base = n_from[4];
    send_pkt(4, 1, 4'd1, 3'd2, 2);
    send_pkt(4, 1, 4'd1, 3'd0, 2);
    send_pkt(4, 1, 4'd1, 3'd1, 2);
    wait_cycles(10);
    check(congested[4][1], "exempt packets congest the buffer");
    check(n_from[4] == base && n_to[1] == 0, "exempt packets cause no notification");
    if (congested[4][1] && n_from[4] == base) n_exempt++;
    send_pkt(4, 1, 4'd3, 3'd6, 2);
    wait_cycles(5);
    check(n_to[3] == 1 && last_to[3].prio == 3'd6, "non-exempt packet reported");
    buf_out_ready[4][1] = 1;
    uc_write(4, REG_EXEMPTION, 16'd0);
    wait_cycles(40);

    // ---------------- C: two monitors in the same clock
    buf_out_ready[4][1] = 0; buf_out_ready[4][3] = 0;
    fork
      begin send_pkt(4, 1, 4'd7, 3'd6, 1); send_pkt(4, 1, 4'd7, 3'd6, 1); end
      begin send_pkt(4, 3, 4'd8, 3'd3, 1); send_pkt(4, 3, 4'd8, 3'd3, 1); end
    join
    wait_cycles(10);
    check(n_to[8] >= 1, "higher-priority report sent");
    check(n_to[7] == 0, "simultaneous lower-priority report dropped");
    if (n_to[8] >= 1 && n_to[7] == 0) n_arb++;
    buf_out_ready[4][1] = 1; buf_out_ready[4][3] = 1;
    wait_cycles(40);

    // ---------------- D: buffer monitor mask
    uc_write(4, REG_BUFMSK, 16'b11101);
    buf_out_ready[4][1] = 0;
    send_pkt(4, 1, 4'd6, 3'd7, 1);
    send_pkt(4, 1, 4'd6, 3'd7, 1);
    wait_cycles(10);
    check(!congested[4][1] && n_to[6] == 0, "masked monitor silent");
    uc_write(4, REG_BUFMSK, 16'b11111);
    wait_cycles(5);
    check(n_to[6] >= 1, "monitor reports once enabled");
    if (n_to[6] >= 1) n_mask++;
    buf_out_ready[4][1] = 1;
    wait_cycles(40);

    // ---------------- E: manual mode at router 2
    uc_write(2, REG_CTRL, 16'd0);
    buf_out_ready[2][0] = 0;
    base = n_from[2];
    send_pkt(2, 0, 4'd5, 3'd4, 3);
    send_pkt(2, 0, 4'd5, 3'd4, 3);
    wait_cycles(10);
    check(n_from[2] == base, "manual mode: no autonomous notification");
    uc_read(2, REG_LOCAL, v);
    check(v[15] && v[3:0] == 4'd5 && v[6:4] == 3'd4, "manual mode: report readable");
    uc_write(2, REG_TX, {9'd0, v[6:4], v[3:0]});
    wait_cycles(5);
    check(n_to[5] == 1 && window[5] == WIN_W'(PERIOD / 2), "software-sent notification throttles tile 5");
    uc_read(5, REG_RX, v);
    check(v[15] && v[3:0] == 4'd2 && v[6:4] == 3'd4, "tile 5 mailbox shows router 2");
    if (n_to[5] == 1) n_manual++;
    buf_out_ready[2][0] = 1;
    uc_write(2, REG_CTRL, 16'd1);

    // ---------------- statistics
    uc_read(4, REG_STAT_SENT, v);
    check(int'(v) == n_from[4], "router 4 send counter");

    // ---------------- every mechanism happened
    check(n_congest > 0, "mechanism: congestion detected");
    check(n_dec > 0, "mechanism: window decrease");
    check(n_inc0 > 0, "mechanism: window increase");
    check(n_gated > 0, "mechanism: injection held by the shaper");
    check(n_exempt > 0, "mechanism: exemption");
    check(n_arb > 0, "mechanism: simultaneous reports arbitrated");
    check(n_mask > 0, "mechanism: monitor mask");
    check(n_manual > 0, "mechanism: manual mode");
    check(n_cut > 0, "mechanism: packet cut to the length limit");
    $display("congestion=%0d decreases=%0d increases(tile0)=%0d gated=%0d exempt=%0d arb=%0d mask=%0d manual=%0d cut=%0d notifications(r4)=%0d",
             n_congest, n_dec, n_inc0, n_gated, n_exempt, n_arb, n_mask, n_manual, n_cut, n_from[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// cc_ctrl_harness: randomised, cycle-accurate check of one
// congestion_controller of any size, shared by the testbenches that run it
// at different sizes.
//
// Every buffer gets random packet arrivals (random source and priority)
// and a random, slowly changing packet count; the control network accepts
// notifications at random and delivers random ones; now and then the
// microcontroller bus rewrites the threshold, depth, exemption or
// cmBufMsk. A model in this file (its own hFIFO per monitor, the
// arbitration and the send slot) predicts each clock the congested flags,
// the notification on tx_* and rx_event. At the end it reads the send and
// receive counters. 'done' rises when the run is over; 'checks',
// 'failures' and 'sent' are then final.
module cc_ctrl_harness
  import cc_pkg::*;
#(
  parameter int NUM_BM        = 4,
  parameter int HISTORY_DEPTH = 4,
  parameter int CYCLES        = 5000
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   sent
);

  localparam int    CNT_W   = 5;
  localparam int    DEPTH_W = (HISTORY_DEPTH > 1) ? $clog2(HISTORY_DEPTH) : 1;
  localparam addr_t ME      = 4'd9;

  logic             rst_n;
  logic [3:0]       bus_addr;
  logic             bus_wr, bus_rd;
  logic [15:0]      bus_wdata, bus_rdata;
  logic             new_packet       [NUM_BM];
  addr_t            source           [NUM_BM];
  prio_t            prio             [NUM_BM];
  logic [CNT_W-1:0] packets_outqueue [NUM_BM];
  logic             congested        [NUM_BM];
  logic             tx_valid, tx_ready, rx_valid, rx_event;
  notif_t           tx_notif, rx_notif, rx_event_notif;

  congestion_controller #(
    .NUM_BM(NUM_BM), .HISTORY_DEPTH(HISTORY_DEPTH), .CNT_W(CNT_W), .NODE_ID(ME)
  ) dut (.*);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL [%0d bm, depth %0d] %s at %0t", NUM_BM, HISTORY_DEPTH, what, $time);
    end
  endtask

  // model state (mirrors the registers)
  bit    m_tag  [NUM_BM][HISTORY_DEPTH];
  prio_t m_prio [NUM_BM][HISTORY_DEPTH];
  addr_t m_src  [NUM_BM][HISTORY_DEPTH];
  bit    r_valid [NUM_BM];
  addr_t r_src   [NUM_BM];
  prio_t r_prio  [NUM_BM];
  bit     m_tx_v;
  notif_t m_tx_n;
  bit     m_rx_ev;
  notif_t m_rx_n;
  bit [NUM_BM-1:0] m_en;
  int    m_thr, m_dep, m_exm;
  int    n_reports, n_recv;

  task automatic model_step();
    bit    win_v;
    addr_t win_s;
    prio_t win_p;
    // congestion monitor: arbitration of last clock's reports, send slot
    win_v = 0; win_s = '0; win_p = '0;
    for (int p = 0; p < NUM_BM; p++)
      if (r_valid[p] && (!win_v || r_prio[p] < win_p)) begin
        win_v = 1; win_s = r_src[p]; win_p = r_prio[p];
      end
    if (m_tx_v && tx_ready) sent++;
    if (win_v && (!m_tx_v || tx_ready)) begin
      m_tx_v = 1; m_tx_n = '{dest: win_s, sender: ME, prio: win_p};
    end else if (tx_ready) m_tx_v = 0;
    m_rx_ev = rx_valid;
    if (rx_valid) begin m_rx_n = rx_notif; n_recv++; end
    // buffer monitors
    for (int p = 0; p < NUM_BM; p++) begin
      int best;
      bit cong;
      cong = m_en[p] && int'(packets_outqueue[p]) >= m_thr;
      check(congested[p] == cong, "congested flag");
      best = -1;
      for (int i = 0; i <= m_dep; i++)
        if (!m_tag[p][i] && (best < 0 || m_prio[p][i] > m_prio[p][best])) best = i;
      r_valid[p] = cong && best >= 0;
      if (r_valid[p]) begin
        r_src[p] = m_src[p][best]; r_prio[p] = m_prio[p][best];
        m_tag[p][best] = 1;
        n_reports++;
      end
      if (new_packet[p]) begin
        for (int i = HISTORY_DEPTH - 1; i > 0; i--) begin
          m_tag[p][i] = m_tag[p][i-1]; m_prio[p][i] = m_prio[p][i-1]; m_src[p][i] = m_src[p][i-1];
        end
        m_tag[p][0] = int'(prio[p]) < m_exm; m_prio[p][0] = prio[p]; m_src[p][0] = source[p];
      end
    end
    // configuration written at this edge
    if (bus_wr) begin
      case (bus_addr)
        REG_THRESHOLD: m_thr = int'(bus_wdata[CNT_W-1:0]);
        REG_DEPTH:     m_dep = int'(bus_wdata[DEPTH_W-1:0]);
        REG_EXEMPTION: m_exm = int'(bus_wdata[2:0]);
        REG_BUFMSK:    m_en  = bus_wdata[NUM_BM-1:0];
        default: ;
      endcase
    end
  endtask

  task automatic randomise_inputs();
    for (int p = 0; p < NUM_BM; p++) begin
      new_packet[p] = ($urandom_range(0, 2) == 0);
      source[p]     = addr_t'($urandom);
      prio[p]       = prio_t'($urandom);
      if ($urandom_range(0, 3) == 0)
        packets_outqueue[p] = CNT_W'($urandom_range(0, 6));
    end
    tx_ready = ($urandom_range(0, 3) != 0);
    rx_valid = ($urandom_range(0, 7) == 0);
    rx_notif = notif_t'($urandom);
    bus_wr = 0;
    if ($urandom_range(0, 40) == 0) begin
      bus_wr = 1;
      case ($urandom_range(0, 3))
        0: begin bus_addr = REG_THRESHOLD; bus_wdata = 16'($urandom_range(0, 6)); end
        1: begin bus_addr = REG_DEPTH;     bus_wdata = 16'($urandom_range(0, HISTORY_DEPTH - 1)); end
        2: begin bus_addr = REG_EXEMPTION; bus_wdata = 16'($urandom_range(0, 4)); end
        default: begin
          bus_addr  = REG_BUFMSK;
          bus_wdata = ($urandom_range(0, 1) == 0) ? 16'hFFFF : 16'($urandom);
        end
      endcase
    end
  endtask

  logic [15:0] v;

  initial begin
    done = 0; checks = 0; failures = 0; sent = 0; n_reports = 0; n_recv = 0;
    rst_n = 0;
    bus_addr = 0; bus_wr = 0; bus_rd = 0; bus_wdata = 0;
    tx_ready = 0; rx_valid = 0; rx_notif = '0;
    for (int p = 0; p < NUM_BM; p++) begin
      new_packet[p] = 0; source[p] = 0; prio[p] = 0; packets_outqueue[p] = 0;
      r_valid[p] = 0; r_src[p] = 0; r_prio[p] = 0;
      for (int i = 0; i < HISTORY_DEPTH; i++) begin
        m_tag[p][i] = 1; m_prio[p][i] = 0; m_src[p][i] = 0;
      end
    end
    m_tx_v = 0; m_tx_n = '0; m_rx_ev = 0; m_rx_n = '0;
    m_en = '1; m_thr = 2; m_dep = HISTORY_DEPTH - 1; m_exm = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int c = 0; c < CYCLES; c++) begin
      @(posedge clk); #1;
      if (c > 0) begin
        check(tx_valid == m_tx_v, "tx_valid");
        if (tx_valid && m_tx_v) check(tx_notif == m_tx_n, "tx_notif");
        check(rx_event == m_rx_ev, "rx_event");
        if (rx_event && m_rx_ev) check(rx_event_notif == m_rx_n, "rx_event_notif");
      end
      randomise_inputs();
      #3 model_step();
    end
    // drain: quiet inputs until every pending notification has gone
    for (int c = 0; c < 6; c++) begin
      @(posedge clk); #1;
      check(tx_valid == m_tx_v, "tx_valid while draining");
      for (int p = 0; p < NUM_BM; p++) begin new_packet[p] = 0; packets_outqueue[p] = 0; end
      bus_wr = 0; rx_valid = 0; tx_ready = 1;
      #3 model_step();
    end
    @(posedge clk);
    check(!m_tx_v, "drained");
    #1 bus_addr = REG_STAT_SENT; bus_rd = 1;
    @(posedge clk); #1 bus_rd = 0;
    v = bus_rdata;
    check(int'(v) == sent, "send counter");
    bus_addr = REG_STAT_RECV; bus_rd = 1;
    @(posedge clk); #1 bus_rd = 0;
    check(int'(bus_rdata) == n_recv, "receive counter");
    check(n_reports > 50 && sent > 50, "enough congestion reports");
    $display("[%0d bm, depth %0d] reports=%0d notifications=%0d received=%0d",
             NUM_BM, HISTORY_DEPTH, n_reports, sent, n_recv);
    done = 1;
  end

endmodule

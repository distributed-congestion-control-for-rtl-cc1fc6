// tb_congestion_monitor: self-checking test of congestion_monitor.
//
// Drives the register bus as the microcontroller would and the buffer
// monitor reports and control-network receive port directly. Checks:
// reset values, configuration outputs, arbitration among simultaneous
// reports (random, against a model: smallest priority value, lowest index
// on a tie), the one-clock report-to-send latency, holding a send while
// the network is not ready and dropping reports meanwhile, the send and
// receive counters, the receive mailbox with its overrun bit and
// rx_event, manual mode (REG_LOCAL, sending through REG_TX) and the timer.
module tb_congestion_monitor;
  import cc_pkg::*;

  localparam int    NUM_BM = 4;
  localparam int    CNT_W  = 5;
  localparam addr_t ME     = 4'd6;

  logic clk = 0, rst_n = 0;
  logic [3:0]  bus_addr;
  logic        bus_wr, bus_rd;
  logic [15:0] bus_wdata, bus_rdata;
  logic [NUM_BM-1:0] bm_enable, bm_valid;
  logic [CNT_W-1:0]  threshold;
  logic [1:0]        depth;
  prio_t             exemption;
  addr_t             bm_src  [NUM_BM];
  prio_t             bm_prio [NUM_BM];
  logic   tx_valid, tx_ready, rx_valid, rx_event;
  notif_t tx_notif, rx_notif, rx_event_notif;

  congestion_monitor #(.NUM_BM(NUM_BM), .HISTORY_DEPTH(4), .CNT_W(CNT_W), .NODE_ID(ME)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic bus_write(cm_reg_e a, logic [15:0] d);
    bus_addr = a; bus_wdata = d; bus_wr = 1;
    @(posedge clk); #1 bus_wr = 0;
  endtask

  task automatic bus_read(cm_reg_e a, output logic [15:0] d);
    bus_addr = a; bus_rd = 1;
    @(posedge clk); #1 bus_rd = 0;
    d = bus_rdata;
  endtask

  task automatic clear_reports();
    bm_valid = '0;
    for (int i = 0; i < NUM_BM; i++) begin bm_src[i] = '0; bm_prio[i] = '0; end
  endtask

  logic [15:0] d;
  int sent = 0, recv = 0;

  initial begin
    bus_addr = 0; bus_wr = 0; bus_rd = 0; bus_wdata = 0;
    tx_ready = 1; rx_valid = 0; rx_notif = '0;
    clear_reports();
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(negedge clk);

    // reset values
    bus_read(REG_CTRL, d);      check(d[0] == 1'b1, "autonomous after reset");
    bus_read(REG_BUFMSK, d);    check(d[NUM_BM-1:0] == '1, "all monitors enabled after reset");
    check(threshold == 2 && depth == 3 && exemption == 0, "configuration reset values");

    // configuration
    bus_write(REG_THRESHOLD, 16'd3);
    bus_write(REG_DEPTH, 16'd1);
    bus_write(REG_EXEMPTION, 16'd5);
    bus_write(REG_BUFMSK, 16'b1010);
    check(threshold == 3 && depth == 1 && exemption == 5 && bm_enable == 4'b1010, "configuration written");
    bus_read(REG_THRESHOLD, d); check(d == 16'd3, "threshold read back");
    bus_read(REG_DEPTH, d);     check(d == 16'd1, "depth read back");
    bus_read(REG_EXEMPTION, d); check(d == 16'd5, "exemption read back");
    bus_write(REG_BUFMSK, 16'hF);

    // timer: written value advances by one per clock
    bus_write(REG_TIMER, 16'd1000);
    repeat (9) @(posedge clk);
    #1 bus_read(REG_TIMER, d);
    check(d == 16'd1009, "timer advances one per clock");

    // arbitration, one-clock latency: prio 4 @0, prio 2 @1, prio 2 @3
    bm_valid = 4'b1011;
    bm_src[0] = 4'd1; bm_prio[0] = 3'd4;
    bm_src[1] = 4'd2; bm_prio[1] = 3'd2;
    bm_src[3] = 4'd3; bm_prio[3] = 3'd2;
    @(posedge clk); #1 clear_reports();
    check(tx_valid && tx_notif.dest == 4'd2 && tx_notif.prio == 3'd2 && tx_notif.sender == ME,
          "highest priority, lowest index wins");
    sent++;
    @(posedge clk); #1;
    check(!tx_valid, "one notification only");

    // hold while not ready; reports meanwhile are dropped
    tx_ready = 0;
    bm_valid = 4'b0001; bm_src[0] = 4'd9; bm_prio[0] = 3'd7;
    @(posedge clk); #1 bm_src[0] = 4'd10;
    @(posedge clk); #1 clear_reports();
    repeat (3) @(posedge clk);
    #1 check(tx_valid && tx_notif.dest == 4'd9, "notification held while network busy");
    tx_ready = 1;
    @(posedge clk); #1;
    sent++;
    check(!tx_valid, "report during busy slot was dropped");

    // random arbitration against the model
    for (int n = 0; n < 500; n++) begin
      int best;
      tx_ready = ($urandom_range(0, 3) != 0);
      bm_valid = NUM_BM'($urandom);
      for (int i = 0; i < NUM_BM; i++) begin
        bm_src[i] = addr_t'($urandom); bm_prio[i] = prio_t'($urandom);
      end
      best = -1;
      for (int i = 0; i < NUM_BM; i++)
        if (bm_valid[i] && (best < 0 || bm_prio[i] < bm_prio[best])) best = i;
      if (tx_valid && tx_ready) sent++;
      if (best >= 0 && (!tx_valid || tx_ready)) begin
        @(posedge clk); #1;
        check(tx_valid && tx_notif.dest == bm_src[best] && tx_notif.prio == bm_prio[best],
              "random arbitration");
      end else begin
        @(posedge clk); #1;
      end
    end
    clear_reports();
    tx_ready = 1;
    if (tx_valid) sent++;
    @(posedge clk); #1;
    bus_read(REG_STAT_SENT, d);
    check(d == 16'(sent), "sent counter");

    // receive path
    rx_valid = 1; rx_notif = '{dest: ME, sender: 4'd4, prio: 3'd3};
    @(posedge clk); #1 rx_valid = 0; recv++;
    check(rx_event && rx_event_notif.sender == 4'd4, "rx_event one clock after arrival");
    @(posedge clk); #1;
    check(!rx_event, "rx_event is a pulse");
    bus_read(REG_RX, d);
    check(d[15] && !d[14] && d[3:0] == 4'd4 && d[6:4] == 3'd3, "mailbox content");
    bus_read(REG_RX, d);
    check(!d[15], "mailbox cleared by read");
    rx_valid = 1; rx_notif = '{dest: ME, sender: 4'd5, prio: 3'd1};
    @(posedge clk); #1 rx_notif.sender = 4'd7; recv++;
    @(posedge clk); #1 rx_valid = 0; recv++;
    bus_read(REG_RX, d);
    check(d[15] && d[14] && d[3:0] == 4'd7, "overrun flagged, newest kept");
    bus_read(REG_STAT_RECV, d);
    check(d == 16'(recv), "received counter");
    bus_write(REG_STAT_RECV, 16'd0);
    bus_read(REG_STAT_RECV, d);
    check(d == 16'd0, "received counter cleared");

    // manual mode
    bus_write(REG_CTRL, 16'd0);
    bm_valid = 4'b0100; bm_src[2] = 4'd12; bm_prio[2] = 3'd6;
    @(posedge clk); #1 clear_reports();
    check(!tx_valid, "manual mode: no autonomous send");
    bus_read(REG_LOCAL, d);
    check(d[15] && d[3:0] == 4'd12 && d[6:4] == 3'd6, "manual mode: report latched");
    bus_read(REG_LOCAL, d);
    check(!d[15], "local report cleared by read");
    bus_write(REG_TX, {9'd0, 3'd6, 4'd12});
    check(tx_valid && tx_notif.dest == 4'd12 && tx_notif.prio == 3'd6 && tx_notif.sender == ME,
          "software send through REG_TX");
    @(posedge clk); #1;
    bus_write(REG_CTRL, 16'd1);
    bus_read(REG_CTRL, d);
    check(d[0], "autonomous mode restored");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_buffer_monitor: self-checking test of buffer_monitor.
//
// A reference model kept in the testbench (newest-first list of
// {notified, priority, source}) predicts, cycle by cycle, the congested
// flag and the registered report. Directed phases check the documented
// examples: depth 0 keeps only the newest packet, exemption 3 shields
// priorities 0..2, ties go to the newest packet, a reported entry is not
// reported again, and the report comes one clock after the threshold is
// reached. A random phase then varies every input.
module tb_buffer_monitor;
  import cc_pkg::*;

  localparam int HD    = 4;
  localparam int CNT_W = 5;

  logic             clk = 0, rst_n = 0;
  logic             enable;
  logic [CNT_W-1:0] threshold, cnt;
  logic [1:0]       depth;
  prio_t            exemption, prio_in;
  addr_t            src_in;
  logic             new_packet;
  logic             congested, notif_valid;
  addr_t            notif_src;
  prio_t            notif_prio;

  buffer_monitor #(.HISTORY_DEPTH(HD), .CNT_W(CNT_W)) dut (
    .clk, .rst_n, .enable, .threshold, .depth, .exemption,
    .new_packet, .src_in, .prio_in, .packets_outqueue(cnt),
    .congested, .notif_valid, .notif_src, .notif_prio
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // reference model
  bit    m_tag  [HD];
  prio_t m_prio [HD];
  addr_t m_src  [HD];
  bit    exp_valid;
  addr_t exp_src;
  prio_t exp_prio;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Evaluate the model on the inputs of this cycle, just before the edge.
  task automatic model_step();
    int best;
    bit cong;
    cong = enable && (cnt >= threshold);
    check(congested == cong, "congested flag");
    best = -1;
    for (int i = 0; i <= int'(depth); i++)
      if (!m_tag[i] && (best < 0 || m_prio[i] > m_prio[best])) best = i;
    exp_valid = cong && best >= 0;
    if (exp_valid) begin
      exp_src  = m_src[best];
      exp_prio = m_prio[best];
      m_tag[best] = 1;
    end
    if (new_packet) begin
      for (int i = HD - 1; i > 0; i--) begin
        m_tag[i] = m_tag[i-1]; m_prio[i] = m_prio[i-1]; m_src[i] = m_src[i-1];
      end
      m_tag[0] = prio_in < exemption; m_prio[0] = prio_in; m_src[0] = src_in;
    end
  endtask

  task automatic model_compare();
    check(notif_valid == exp_valid, "notif_valid");
    if (exp_valid && notif_valid) begin
      check(notif_src == exp_src, "notif_src");
      check(notif_prio == exp_prio, "notif_prio");
    end
  endtask

  // One clock with the current inputs: model, edge, compare.
  task automatic cycle();
    #1 model_step();
    @(posedge clk);
    #1 model_compare();
    new_packet = 0;
  endtask

  task automatic push(addr_t s, prio_t p);
    new_packet = 1; src_in = s; prio_in = p;
    cycle();
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    enable = 1; threshold = 2; cnt = 0; depth = 3; exemption = 0;
    new_packet = 0; src_in = 0; prio_in = 0;
    for (int i = 0; i < HD; i++) begin m_tag[i] = 1; m_prio[i] = 0; m_src[i] = 0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(negedge clk);

    // Tie rule and one-clock report latency: two packets of priority 5,
    // the newer one (source 9) must be reported first, then source 3.
    push(4'd3, 3'd5);
    push(4'd9, 3'd5);
    push(4'd7, 3'd1);
    cnt = 2;
    #1 model_step();
    check(exp_valid && exp_src == 4'd9, "model: tie goes to newest");
    @(posedge clk);
    #1 model_compare();
    check(notif_valid && notif_src == 4'd9 && notif_prio == 3'd5, "first report is newest prio-5 packet");
    cycle();
    check(notif_valid && notif_src == 4'd3, "second report is older prio-5 packet");
    cycle();
    check(notif_valid && notif_src == 4'd7 && notif_prio == 3'd1, "third report is prio-1 packet");
    cycle();
    check(!notif_valid, "all entries notified: no further report");
    cnt = 1;
    cycle();

    // depth 0: only the newest packet is considered
    depth = 0;
    push(4'd1, 3'd7);
    push(4'd2, 3'd0);
    cnt = 2;
    cycle();
    check(notif_valid && notif_src == 4'd2, "depth 0 reports newest only");
    cycle();
    check(!notif_valid, "depth 0: nothing left");
    cnt = 0; depth = 3;
    cycle();

    // exemption 3: priorities 0..2 never reported
    exemption = 3;
    push(4'd4, 3'd0);
    push(4'd5, 3'd1);
    push(4'd6, 3'd2);
    push(4'd8, 3'd2);
    cnt = 4;
    cycle();
    check(congested && !notif_valid, "exempt packets raise no report");
    push(4'd10, 3'd3);
    cycle();
    check(notif_valid && notif_src == 4'd10, "non-exempt packet reported");
    exemption = 0; cnt = 0;
    cycle();

    // disabled monitor never reports
    enable = 0; cnt = 9;
    push(4'd11, 3'd6);
    cycle();
    check(!congested && !notif_valid, "disabled monitor silent");
    enable = 1;

    // random phase
    for (int n = 0; n < 4000; n++) begin
      new_packet = ($urandom_range(0, 2) == 0);
      src_in     = addr_t'($urandom);
      prio_in    = prio_t'($urandom);
      cnt        = CNT_W'($urandom_range(0, 6));
      if ($urandom_range(0, 50) == 0) threshold = CNT_W'($urandom_range(0, 6));
      if ($urandom_range(0, 50) == 0) depth     = 2'($urandom);
      if ($urandom_range(0, 80) == 0) exemption = prio_t'($urandom_range(0, 4));
      if ($urandom_range(0, 80) == 0) enable    = ($urandom_range(0, 3) != 0);
      #1 model_step();
      @(posedge clk);
      #1 model_compare();
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

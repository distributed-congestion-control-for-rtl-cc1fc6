// tb_aimd_controller: self-checking test of aimd_controller.
//
// Small sizes (R = 64 cycles, window 16..256, alpha 32). A model in the
// testbench predicts the window every cycle under random notifications.
// Directed checks: each notification halves the window one clock later
// with a window_wr pulse, repeated notifications stop at WIN_MIN, an
// increase comes exactly R cycles after the last change, and the window
// saturates at WIN_MAX.
module tb_aimd_controller;

  localparam int R = 64, WIN_MAX = 256, ALPHA = 32, WIN_MIN = 16;
  localparam int WIN_W = $clog2(WIN_MAX + 1);

  logic clk = 0, rst_n = 0;
  logic notify, window_wr, decreases, increases;
  logic [WIN_W-1:0] window;

  aimd_controller #(.R(R), .WIN_MAX(WIN_MAX), .ALPHA(ALPHA), .WIN_MIN(WIN_MIN)) dut (.*);

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

  int m_win = WIN_MAX, m_quiet = 0;   // cycles since the last change
  int last_change = 0, cyc = 0, n_inc = 0, n_dec = 0;

  // one clock: model update, edge, compare
  task automatic step();
    bit inc, dec;
    dec = notify;
    inc = !notify && (m_quiet == R - 1);
    if (dec) begin
      m_win = (m_win / 2 < WIN_MIN) ? WIN_MIN : m_win / 2;
      m_quiet = 0;
    end else if (inc) begin
      m_win = (m_win + ALPHA > WIN_MAX) ? WIN_MAX : m_win + ALPHA;
      m_quiet = 0;
    end else m_quiet++;
    @(posedge clk); #1;
    cyc++;
    check(int'(window) == m_win, "window value");
    check(window_wr == (dec || inc), "window_wr pulse");
    check(decreases == dec && increases == inc, "decrease/increase pulses");
    if (inc) begin
      check(cyc - last_change == R, "increase exactly R cycles after last change");
      n_inc++;
    end
    if (dec) n_dec++;
    if (dec || inc) last_change = cyc;
  endtask

  initial begin
    notify = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    #1 check(window == WIN_W'(WIN_MAX), "window fully open after reset");
    // one notification: 256 -> 128
    notify = 1; step(); notify = 0;
    check(window == 128, "halved on notification");
    // four more: 64, 32, 16, 16 (floor)
    repeat (4) begin notify = 1; step(); end
    notify = 0;
    check(window == WIN_MIN, "floor at WIN_MIN");
    // quiet: additive increase every R cycles up to the cap
    repeat (R * 10) step();
    check(window == WIN_MAX, "saturates at WIN_MAX");
    // random notifications
    for (int n = 0; n < 6000; n++) begin
      notify = ($urandom_range(0, 150) == 0);
      step();
    end
    check(n_inc > 20 && n_dec > 20, "both directions exercised");
    $display("increases=%0d decreases=%0d", n_inc, n_dec);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

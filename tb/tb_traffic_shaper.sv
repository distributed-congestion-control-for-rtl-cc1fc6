// tb_traffic_shaper: self-checking test of traffic_shaper.
//
// Uses a 16-cycle period. The testbench keeps its own phase count from
// reset and checks each cycle that flits pass only while phase < window,
// that with a source and sink that never stall exactly 'window' flits pass
// per period (the injection rate), that the second header flit of every
// packet carries the configured priority and the tile address while all
// other flits pass unchanged, and that an oversized window is clamped.
// A last phase limits the payload to 2 words and checks the output stream
// against packets cut by the testbench: limit-length pieces, each ending
// in 'last' and followed by the repeated (stamped) headers.
module tb_traffic_shaper;
  import cc_pkg::*;

  localparam int    PERIOD = 16;
  localparam int    WIN_W  = $clog2(PERIOD + 1);
  localparam addr_t ME     = 4'd5;

  logic clk = 0, rst_n = 0;
  localparam int LEN_W = $clog2(256 + 1);
  logic window_wr, prio_wr, window_open, len_wr;
  logic [LEN_W-1:0] len_in;
  logic [WIN_W-1:0] window_in, window;
  prio_t prio_in;
  logic in_valid, in_ready, in_last, out_valid, out_ready, out_last;
  flit_t in_flit, out_flit;

  traffic_shaper #(.PERIOD(PERIOD), .NODE_ID(ME)) dut (.*);

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
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int phase = 0, pos = 0, len = 3, passed = 0, cur_win = PERIOD;
  prio_t cur_prio = 3'd4;
  bit stall_free = 1;
  int n_periods_shaped = 0;

  task automatic run(int cycles);
    for (int c = 0; c < cycles; c++) begin
      in_valid  = stall_free ? 1'b1 : ($urandom_range(0, 3) != 0);
      out_ready = stall_free ? 1'b1 : ($urandom_range(0, 3) != 0);
      in_last   = (pos == len - 1);
      #1;
      check(window_open == (phase < cur_win), "window open exactly while phase < window");
      check(out_valid == (in_valid && phase < cur_win), "out_valid gated by window");
      check(in_ready == (out_ready && phase < cur_win), "in_ready gated by window");
      if (out_valid) begin
        if (pos == 1)
          check(out_flit[15:7] == in_flit[15:7] && out_flit[6:4] == cur_prio && out_flit[3:0] == ME,
                "second header flit stamped");
        else
          check(out_flit == in_flit, "other flits unchanged");
        check(out_last == in_last, "last flag passed");
      end
      @(posedge clk);
      if (out_valid && out_ready) begin
        passed++;
        pos = in_last ? 0 : pos + 1;
        if (pos == 0) len = 2 + $urandom_range(0, 4);
        in_flit = flit_t'($urandom);
      end
      phase = (phase + 1) % PERIOD;
      if (phase == 0) begin
        if (stall_free && cur_win > 0) n_periods_shaped++;
        if (stall_free) check(passed == cur_win, "flits per period equal the window");
        passed = 0;
      end
      #1;
    end
  endtask

  task automatic set_window(int w);
    in_valid = 0;
    window_in = WIN_W'(w); window_wr = 1;
    @(posedge clk);
    phase = (phase + 1) % PERIOD;
    if (phase == 0) passed = 0;
    #1 window_wr = 0;
    cur_win = (w > PERIOD) ? PERIOD : w;
    check(window == WIN_W'(cur_win), "window register loaded");
  endtask

  // Packet cutting: window open all the time, random handshakes.
  logic [FLIT_W:0] exp_q[$];
  int n_cuts = 0;
  task automatic run_cut(int cycles, int lim);
    int ipos = 0, ilen = 2, cnt = 0;
    flit_t h1, h2s, f;
    f = flit_t'($urandom);
    for (int c = 0; c < cycles; c++) begin
      in_valid  = ($urandom_range(0, 3) != 0);
      out_ready = ($urandom_range(0, 3) != 0);
      in_flit   = f;
      in_last   = (ipos == ilen - 1);
      #1;
      if (in_valid && in_ready) begin
        if (ipos == 0) begin
          h1 = in_flit; exp_q.push_back({1'b0, in_flit});
        end else if (ipos == 1) begin
          h2s = {in_flit[15:7], cur_prio, ME};
          exp_q.push_back({in_last, h2s}); cnt = 0;
        end else begin
          cnt++;
          if (in_last) exp_q.push_back({1'b1, in_flit});
          else if (cnt == lim) begin
            exp_q.push_back({1'b1, in_flit});
            exp_q.push_back({1'b0, h1});
            exp_q.push_back({1'b0, h2s});
            cnt = 0; n_cuts++;
          end else exp_q.push_back({1'b0, in_flit});
        end
        ipos = in_last ? 0 : ipos + 1;
        if (ipos == 0) ilen = 2 + $urandom_range(0, 7);
        f = flit_t'($urandom);
      end
      if (out_valid && out_ready) begin
        check(exp_q.size() > 0 && {out_last, out_flit} == exp_q[0], "cut packet stream");
        if (exp_q.size() > 0) void'(exp_q.pop_front());
      end
      @(posedge clk);
      #1;
    end
  endtask

  initial begin
    window_wr = 0; window_in = 0; prio_wr = 0; prio_in = 0; len_wr = 0; len_in = 0;
    in_valid = 0; out_ready = 0; in_flit = flit_t'($urandom); in_last = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    #1;
    check(window == WIN_W'(PERIOD), "window fully open after reset");
    run(3 * PERIOD);
    // switch window at a period boundary so the per-period count is exact
    run(PERIOD - 1);
    set_window(6);
    run(4 * PERIOD);
    in_valid = 0;
    prio_in = 3'd1; prio_wr = 1;
    @(posedge clk); #1 prio_wr = 0; cur_prio = 3'd1;
    phase = (phase + 1) % PERIOD;
    stall_free = 0;
    run(PERIOD - phase);
    stall_free = 1;
    passed = 0;
    run(PERIOD - 1);
    set_window(0);
    run(2 * PERIOD);
    run(PERIOD - 1);
    set_window(31);
    run(2 * PERIOD);
    stall_free = 0;
    run(8 * PERIOD);
    // payload limit of 2 words; let the last packet finish first
    while (pos != 0) run(1);
    in_valid = 0;
    len_in = 2; len_wr = 1;
    @(posedge clk); #1 len_wr = 0;
    run_cut(3000, 2);
    check(n_cuts > 50, "packets were cut");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_wl_controller_sizes: runs the congestion controller at the sizes of
// the area study: 1, 4 and 16 buffer monitors with a 4-entry history, and
// one buffer monitor with histories of 32 and 64 entries. Each size gets
// the randomised cycle-accurate check of cc_ctrl_harness.
module tb_wl_controller_sizes;

  logic clk = 0;
  always #5 clk = ~clk;

  localparam int N = 5;
  logic done [N];
  int   c [N], f [N], s [N];

  cc_ctrl_harness #(.NUM_BM(1),  .HISTORY_DEPTH(4),  .CYCLES(3000)) u_1x4   (.clk, .done(done[0]), .checks(c[0]), .failures(f[0]), .sent(s[0]));
  cc_ctrl_harness #(.NUM_BM(4),  .HISTORY_DEPTH(4),  .CYCLES(3000)) u_4x4   (.clk, .done(done[1]), .checks(c[1]), .failures(f[1]), .sent(s[1]));
  cc_ctrl_harness #(.NUM_BM(16), .HISTORY_DEPTH(4),  .CYCLES(3000)) u_16x4  (.clk, .done(done[2]), .checks(c[2]), .failures(f[2]), .sent(s[2]));
  cc_ctrl_harness #(.NUM_BM(1),  .HISTORY_DEPTH(32), .CYCLES(3000)) u_1x32  (.clk, .done(done[3]), .checks(c[3]), .failures(f[3]), .sent(s[3]));
  cc_ctrl_harness #(.NUM_BM(1),  .HISTORY_DEPTH(64), .CYCLES(3000)) u_1x64  (.clk, .done(done[4]), .checks(c[4]), .failures(f[4]), .sent(s[4]));

  function automatic int total(int a [N]);
    total = 0;
    foreach (a[i]) total += a[i];
  endfunction

  initial begin
    #1000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", total(c), total(f) + 1);
    $finish;
  end

  initial begin
    wait (done[0] && done[1] && done[2] && done[3] && done[4]);
    $display("TB_RESULT checks=%0d failures=%0d", total(c), total(f));
    $finish;
  end
endmodule

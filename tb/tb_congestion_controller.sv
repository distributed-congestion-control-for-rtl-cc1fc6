// tb_congestion_controller: randomised cycle-accurate test of one
// congestion controller (a congestion monitor and 4 buffer monitors, the
// default size) through cc_ctrl_harness. A second, directed part checks
// that a slot left out with PORT_EN never reports.
module tb_congestion_controller;
  import cc_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic done;
  int   h_checks, h_failures, h_sent;

  cc_ctrl_harness #(.NUM_BM(4), .HISTORY_DEPTH(4), .CYCLES(6000)) u_h (
    .clk, .done, .checks(h_checks), .failures(h_failures), .sent(h_sent)
  );

  // slot 1 left out
  logic        rst_n = 0;
  logic        np [2], cg [2], txv, rxe;
  addr_t       src [2];
  prio_t       pr [2];
  logic [4:0]  cnt [2];
  logic [15:0] rdata;
  notif_t      txn, rxn;

  congestion_controller #(.NUM_BM(2), .PORT_EN(2'b01)) u_part (
    .clk, .rst_n,
    .bus_addr(4'd0), .bus_wr(1'b0), .bus_rd(1'b0), .bus_wdata(16'd0), .bus_rdata(rdata),
    .new_packet(np), .source(src), .prio(pr), .packets_outqueue(cnt), .congested(cg),
    .tx_valid(txv), .tx_ready(1'b1), .tx_notif(txn), .rx_valid(1'b0), .rx_notif('0),
    .rx_event(rxe), .rx_event_notif(rxn)
  );

  int checks = 0, failures = 0;
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #2000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + h_checks, failures + h_failures + 1);
    $finish;
  end

  initial begin
    for (int p = 0; p < 2; p++) begin np[p] = 0; src[p] = 0; pr[p] = 0; cnt[p] = 0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // a packet into each slot, then both over the threshold
    np[0] = 1; src[0] = 4'd3; pr[0] = 3'd5;
    np[1] = 1; src[1] = 4'd4; pr[1] = 3'd1;
    @(negedge clk) begin np[0] = 0; np[1] = 0; cnt[0] = 3; cnt[1] = 3; end
    #1;
    check(cg[0] && !cg[1], "only the present slot flags congestion");
    repeat (2) @(negedge clk);
    check(txv && txn.dest == 4'd3 && txn.sender == 4'd0, "present slot reported two clocks later");
    @(negedge clk);
    check(!txv, "left-out slot never reports");
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks + h_checks, failures + h_failures);
    $finish;
  end
endmodule

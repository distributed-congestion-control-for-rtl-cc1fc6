// tb_router_buffer: self-checking test of router_buffer.
//
// Random packets (two header flits, 0..6 payload flits) are written with
// random valid and read with random ready, so the buffer runs both full
// and empty. The testbench checks the data order and 'last' flag against a
// queue, that new_packet pulses exactly one clock after each second header
// flit is written with that flit's source and priority, and that
// packets_outqueue equals the count kept by the testbench.
module tb_router_buffer;
  import cc_pkg::*;

  localparam int BUF_FLITS = 8;
  localparam int CNT_W     = $clog2(BUF_FLITS / 2 + 1);

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, in_last, out_valid, out_ready, out_last;
  flit_t in_flit, out_flit;
  logic new_packet;
  addr_t source;
  prio_t prio;
  logic [CNT_W-1:0] packets_outqueue;

  router_buffer #(.BUF_FLITS(BUF_FLITS)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  logic [FLIT_W:0] q[$];
  int    pkts_in_buf;        // packets whose second header has been written
  int    pos;                // position of the next flit to write in its packet
  int    len;                // flits in the current packet
  bit    exp_new;
  hdr2_t exp_hdr2;
  int    n_new = 0, n_full = 0;

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stimulus for the flit being offered
  task automatic next_flit();
    if (pos == 0) len = 2 + $urandom_range(0, 6);
    in_flit = flit_t'($urandom);
    in_last = (pos == len - 1);
  endtask

  initial begin
    in_valid = 0; out_ready = 0; in_flit = 0; in_last = 0;
    pos = 0; len = 2; pkts_in_buf = 0; exp_new = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(negedge clk);
    check(packets_outqueue == 0 && !out_valid && in_ready, "empty after reset");
    next_flit();
    for (int n = 0; n < 6000; n++) begin
      bit wr, rd, last_rd;
      // the read side is slow in the first half, so the buffer fills
      in_valid  = ($urandom_range(0, 3) != 0);
      out_ready = (n < 3000) ? ($urandom_range(0, 3) == 0) : ($urandom_range(0, 1) == 0);
      #1;
      wr = in_valid && in_ready;
      rd = out_valid && out_ready;
      if (!in_ready) n_full++;
      check(in_ready == (q.size() < BUF_FLITS), "in_ready matches fill");
      check(out_valid == (q.size() > 0), "out_valid matches fill");
      last_rd = 0;
      if (rd) begin
        check({out_last, out_flit} == q[0], "read data order");
        last_rd = q[0][FLIT_W];
        void'(q.pop_front());
      end
      @(posedge clk);
      #1;
      exp_new = 0;
      if (wr) begin
        q.push_back({in_last, in_flit});
        if (pos == 1) begin
          exp_new  = 1;
          exp_hdr2 = hdr2_t'(in_flit);
          pkts_in_buf++;
        end
        pos = in_last ? 0 : pos + 1;
        next_flit();
      end
      if (last_rd) pkts_in_buf--;
      // registered outputs reflect the handshakes at the edge just passed
      check(new_packet == exp_new, "new_packet timing");
      if (exp_new && new_packet) begin
        check(source == exp_hdr2.src && prio == exp_hdr2.prio, "source/priority of new packet");
        n_new++;
      end
      // packets_outqueue follows one clock behind the handshakes
      @(negedge clk);
      check(int'(packets_outqueue) == pkts_in_buf, "packets_outqueue");
    end
    check(n_new > 100, "enough packets seen");
    check(n_full > 10, "buffer ran full");
    $display("packets=%0d full_cycles=%0d", n_new, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// aimd_controller: window computation for the traffic shaper of one tile,
// using Additive Increase / Multiplicative Decrease.
//
// This is the binomial window rule w(t+R) = w + alpha/w^k on increase and
// w(t+dt) = w - beta*w^l on decrease with (k,l) = (0,1) and beta = 1/2:
//   * every congestion notification addressed to this tile halves the
//     window (never below WIN_MIN) and restarts the increase timer;
//   * each time R cycles pass without a notification the window grows by
//     ALPHA (never above WIN_MAX) and the timer restarts.
// The control loop is the one of the tile's microcontroller (poll for a
// notification, decrease and reset the timer; otherwise on time-out
// increase and reset the timer), here as a small fixed-function unit so
// that it needs no processor; it reacts in one clock instead of the
// roughly 100 clocks of a software loop.
//
// Interface: 'notify' is a one-cycle pulse per received notification.
// 'window' is the current window; 'window_wr' pulses for one cycle in the
// clock after each change (with the new value on 'window'), ready to load
// the traffic shaper. 'decreases' and 'increases' pulse with each step.
//
// From the original description: AIMD, halving on congestion, the R = 2048
// cycle increase interval and the shape of the loop. This design's choices:
// ALPHA (the document requires only alpha > 1), WIN_MIN, the window unit
// (cycles of the shaper's period) and the reset value (window fully open).
module aimd_controller #(
  parameter int R       = 2048,
  parameter int WIN_MAX = 2048,
  parameter int ALPHA   = 128,
  parameter int WIN_MIN = 16,
  localparam int WIN_W  = $clog2(WIN_MAX + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             notify,
  output logic [WIN_W-1:0] window,
  output logic             window_wr,
  output logic             decreases,
  output logic             increases
);

  localparam int TM_W = $clog2(R);

  logic [TM_W-1:0] timer;
  wire             timeout = (timer == TM_W'(R - 1));

  logic [WIN_W-1:0] halved, grown;
  always_comb begin
    halved = window >> 1;
    if (halved < WIN_W'(WIN_MIN)) halved = WIN_W'(WIN_MIN);
    // compare before adding so the sum cannot wrap
    if (window > WIN_W'(WIN_MAX - ALPHA)) grown = WIN_W'(WIN_MAX);
    else                                  grown = window + WIN_W'(ALPHA);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      timer     <= '0;
      window    <= WIN_W'(WIN_MAX);
      window_wr <= 1'b0;
      decreases <= 1'b0;
      increases <= 1'b0;
    end else begin
      window_wr <= 1'b0;
      decreases <= 1'b0;
      increases <= 1'b0;
      if (notify) begin
        window    <= halved;
        window_wr <= 1'b1;
        decreases <= 1'b1;
        timer     <= '0;
      end else if (timeout) begin
        window    <= grown;
        window_wr <= 1'b1;
        increases <= 1'b1;
        timer     <= '0;
      end else begin
        timer <= timer + 1'b1;
      end
    end
  end

endmodule

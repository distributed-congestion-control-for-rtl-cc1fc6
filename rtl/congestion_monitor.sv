// congestion_monitor: per-router hub between the buffer monitors, the local
// microcontroller (uC) and the control network.
//
// * uC side: a word-addressed register bus (see cc_pkg::cm_reg_e). Writes
//   take effect at the clock edge; a read returns its data in bus_rdata one
//   clock after bus_rd. The registers hold the shared threshold, depth and
//   exemption settings of the buffer monitors, the enable mask cmBufMsk,
//   the autonomous-mode bit, a free-running timer the uC can read and set,
//   and counters of notifications sent and received.
// * Buffer monitor side: when several monitors report in the same cycle,
//   the report with the highest priority (smallest value; lowest index on
//   a tie) is kept and the others are dropped.
// * Autonomous mode (the reset state): the kept report is sent at once as
//   a notification to the packet's source tile through tx_* (valid/ready;
//   tx_valid holds until tx_ready). A report that finds the send slot
//   still occupied is dropped. In either mode the kept report is also
//   latched in REG_LOCAL for the uC; in manual mode that is all that
//   happens, and the uC sends notifications of its own by writing REG_TX.
// * Receive side: a notification on rx_* is always accepted, latched in
//   REG_RX for the uC to poll (reading clears it; a second arrival before
//   the read sets the overrun bit) and signalled on rx_event for one cycle.
//
// Timing: report in cycle t -> tx_valid in cycle t+1; rx_valid in cycle t
// -> REG_RX and rx_event in cycle t+1. With a buffer monitor registering
// its report and a zero-delay network, detection to reception at the
// remote monitor takes three clocks.
//
// The roles, the arbitration rule, autonomous mode, cmBufMsk, the timer and
// the statistics follow the original description; the register map, bus
// protocol, register widths and reset values are this design's choices.
module congestion_monitor
  import cc_pkg::*;
#(
  parameter int    NUM_BM        = 4,
  parameter int    HISTORY_DEPTH = 4,
  parameter int    CNT_W         = 5,
  parameter addr_t NODE_ID       = '0,
  localparam int   DEPTH_W       = (HISTORY_DEPTH > 1) ? $clog2(HISTORY_DEPTH) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // register bus from the local uC
  input  logic [3:0]         bus_addr,
  input  logic               bus_wr,
  input  logic               bus_rd,
  input  logic [15:0]        bus_wdata,
  output logic [15:0]        bus_rdata,
  // configuration of the buffer monitors
  output logic [NUM_BM-1:0]  bm_enable,
  output logic [CNT_W-1:0]   threshold,
  output logic [DEPTH_W-1:0] depth,
  output prio_t              exemption,
  // reports from the buffer monitors
  input  logic [NUM_BM-1:0]  bm_valid,
  input  addr_t              bm_src  [NUM_BM],
  input  prio_t              bm_prio [NUM_BM],
  // control network
  output logic               tx_valid,
  input  logic               tx_ready,
  output notif_t             tx_notif,
  input  logic               rx_valid,
  input  notif_t             rx_notif,
  // received-notification event for the window controller
  output logic               rx_event,
  output notif_t             rx_event_notif
);

  localparam logic [CNT_W-1:0]   THRESHOLD_RST = CNT_W'(2);
  localparam logic [DEPTH_W-1:0] DEPTH_RST     = DEPTH_W'(HISTORY_DEPTH - 1);

  logic        autonomous;
  logic [15:0] timer, stat_sent, stat_recv;
  logic        local_valid;
  addr_t       local_src;
  prio_t       local_prio;
  logic        rx_reg_valid, rx_overrun;
  notif_t      rx_reg;

  // ---------------------------------------------------------------- arbitration
  logic  win_valid;
  addr_t win_src;
  prio_t win_prio;

  always_comb begin
    win_valid = 1'b0;
    win_src   = '0;
    win_prio  = '0;
    for (int i = 0; i < NUM_BM; i++) begin
      if (bm_valid[i] && (!win_valid || bm_prio[i] < win_prio)) begin
        win_valid = 1'b1;
        win_src   = bm_src[i];
        win_prio  = bm_prio[i];
      end
    end
  end

  // ---------------------------------------------------------------- send slot
  wire    slot_free = !tx_valid || tx_ready;
  wire    hw_send   = autonomous && win_valid && slot_free;
  wire    sw_write  = bus_wr && bus_addr == REG_TX;
  wire    sw_send   = sw_write && slot_free && !hw_send;
  notif_t sw_notif;
  assign  sw_notif = '{dest: bus_wdata[3:0], sender: NODE_ID, prio: bus_wdata[6:4]};

  wire rd_local = bus_rd && bus_addr == REG_LOCAL;
  wire rd_rx    = bus_rd && bus_addr == REG_RX;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      autonomous   <= 1'b1;
      bm_enable    <= '1;
      threshold    <= THRESHOLD_RST;
      depth        <= DEPTH_RST;
      exemption    <= '0;
      timer        <= '0;
      stat_sent    <= '0;
      stat_recv    <= '0;
      local_valid  <= 1'b0;
      local_src    <= '0;
      local_prio   <= '0;
      rx_reg_valid <= 1'b0;
      rx_overrun   <= 1'b0;
      rx_reg       <= '0;
      tx_valid     <= 1'b0;
      tx_notif     <= '0;
      rx_event     <= 1'b0;
      rx_event_notif <= '0;
      bus_rdata    <= '0;
    end else begin
      // transmit slot
      if (hw_send) begin
        tx_valid <= 1'b1;
        tx_notif <= '{dest: win_src, sender: NODE_ID, prio: win_prio};
      end else if (sw_send) begin
        tx_valid <= 1'b1;
        tx_notif <= sw_notif;
      end else if (tx_ready) begin
        tx_valid <= 1'b0;
      end

      // latest local report, for the uC
      if (win_valid) begin
        local_valid <= 1'b1;
        local_src   <= win_src;
        local_prio  <= win_prio;
      end else if (rd_local) begin
        local_valid <= 1'b0;
      end

      // receive mailbox
      rx_event <= rx_valid;
      if (rx_valid) begin
        rx_event_notif <= rx_notif;
        rx_reg         <= rx_notif;
        rx_reg_valid   <= 1'b1;
        rx_overrun     <= rx_reg_valid && !rd_rx;
      end else if (rd_rx) begin
        rx_reg_valid <= 1'b0;
        rx_overrun   <= 1'b0;
      end

      // timer and statistics (a bus write takes precedence)
      timer <= timer + 16'd1;
      if (tx_valid && tx_ready) stat_sent <= stat_sent + 16'd1;
      if (rx_valid)             stat_recv <= stat_recv + 16'd1;

      if (bus_wr) begin
        unique case (bus_addr)
          REG_CTRL:      autonomous <= bus_wdata[0];
          REG_BUFMSK:    bm_enable  <= bus_wdata[NUM_BM-1:0];
          REG_THRESHOLD: threshold  <= bus_wdata[CNT_W-1:0];
          REG_DEPTH:     depth      <= bus_wdata[DEPTH_W-1:0];
          REG_EXEMPTION: exemption  <= bus_wdata[PRIO_W-1:0];
          REG_TIMER:     timer      <= bus_wdata;
          REG_STAT_SENT: stat_sent  <= '0;
          REG_STAT_RECV: stat_recv  <= '0;
          default: ;
        endcase
      end

      if (bus_rd) begin
        unique case (bus_addr)
          REG_CTRL:      bus_rdata <= {14'd0, tx_valid, autonomous};
          REG_BUFMSK:    bus_rdata <= 16'(bm_enable);
          REG_THRESHOLD: bus_rdata <= 16'(threshold);
          REG_DEPTH:     bus_rdata <= 16'(depth);
          REG_EXEMPTION: bus_rdata <= 16'(exemption);
          REG_TIMER:     bus_rdata <= timer;
          REG_STAT_SENT: bus_rdata <= stat_sent;
          REG_STAT_RECV: bus_rdata <= stat_recv;
          REG_LOCAL:     bus_rdata <= {local_valid, 8'd0, local_prio, local_src};
          REG_RX:        bus_rdata <= {rx_reg_valid, rx_overrun, 7'd0, rx_reg.prio, rx_reg.sender};
          default:       bus_rdata <= '0;
        endcase
      end
    end
  end

  // A pending notification is held until the network takes it.
  a_tx_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (tx_valid && !tx_ready) |=> (tx_valid && $stable(tx_notif)));

endmodule

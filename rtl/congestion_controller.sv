// congestion_controller: all congestion-control logic of one router, that
// is one congestion_monitor and a buffer_monitor for each of its NUM_BM
// output buffers.
//
// Each buffer monitor takes the four signals exported by its buffer
// (new_packet, source, priority, packets_outqueue) and gets its enable bit
// from cmBufMsk and the shared threshold, depth and exemption settings from
// the congestion monitor, to which it reports. The congestion monitor
// talks to the microcontroller (register bus) and to the control network.
// PORT_EN leaves out the monitors of buffers a router does not have (a
// border router of a mesh): their slots report nothing and their
// congested flags are 0.
//
// Timing is that of the parts: a buffer reaching its threshold in clock t
// gives a report at t+1 and tx_valid at t+2; a notification arriving on
// rx_* in clock t sets the mailbox and rx_event at t+1.
//
// Grouping one congestion monitor with its router's buffer monitors
// follows the original description, which sizes exactly this unit
// against the router; PORT_EN is this design's.
module congestion_controller
  import cc_pkg::*;
#(
  parameter int                NUM_BM        = 4,
  parameter int                HISTORY_DEPTH = 4,
  parameter int                CNT_W         = 5,
  parameter addr_t             NODE_ID       = '0,
  parameter logic [NUM_BM-1:0] PORT_EN       = '1
) (
  input  logic             clk,
  input  logic             rst_n,
  // register bus from the local microcontroller
  input  logic [3:0]       bus_addr,
  input  logic             bus_wr,
  input  logic             bus_rd,
  input  logic [15:0]      bus_wdata,
  output logic [15:0]      bus_rdata,
  // signals exported by the router's output buffers
  input  logic             new_packet       [NUM_BM],
  input  addr_t            source           [NUM_BM],
  input  prio_t            prio             [NUM_BM],
  input  logic [CNT_W-1:0] packets_outqueue [NUM_BM],
  output logic             congested        [NUM_BM],
  // control network
  output logic             tx_valid,
  input  logic             tx_ready,
  output notif_t           tx_notif,
  input  logic             rx_valid,
  input  notif_t           rx_notif,
  // received-notification event for the window controller
  output logic             rx_event,
  output notif_t           rx_event_notif
);

  localparam int DEPTH_W = (HISTORY_DEPTH > 1) ? $clog2(HISTORY_DEPTH) : 1;

  logic [NUM_BM-1:0]  bm_enable;
  logic [CNT_W-1:0]   threshold;
  logic [DEPTH_W-1:0] depth;
  prio_t              exemption;
  logic [NUM_BM-1:0]  bm_valid;
  addr_t              bm_src  [NUM_BM];
  prio_t              bm_prio [NUM_BM];

  for (genvar p = 0; p < NUM_BM; p++) begin : g_bm
    if (PORT_EN[p]) begin : g_on
      buffer_monitor #(.HISTORY_DEPTH(HISTORY_DEPTH), .CNT_W(CNT_W)) u_bm (
        .clk, .rst_n,
        .enable          (bm_enable[p]),
        .threshold, .depth, .exemption,
        .new_packet      (new_packet[p]),
        .src_in          (source[p]),
        .prio_in         (prio[p]),
        .packets_outqueue(packets_outqueue[p]),
        .congested       (congested[p]),
        .notif_valid     (bm_valid[p]),
        .notif_src       (bm_src[p]),
        .notif_prio      (bm_prio[p])
      );
    end else begin : g_off
      assign congested[p] = 1'b0;
      assign bm_valid[p]  = 1'b0;
      assign bm_src[p]    = '0;
      assign bm_prio[p]   = '0;
    end
  end

  congestion_monitor #(
    .NUM_BM(NUM_BM), .HISTORY_DEPTH(HISTORY_DEPTH), .CNT_W(CNT_W), .NODE_ID(NODE_ID)
  ) u_cm (
    .clk, .rst_n,
    .bus_addr, .bus_wr, .bus_rd, .bus_wdata, .bus_rdata,
    .bm_enable, .threshold, .depth, .exemption,
    .bm_valid, .bm_src, .bm_prio,
    .tx_valid, .tx_ready, .tx_notif,
    .rx_valid, .rx_notif,
    .rx_event, .rx_event_notif
  );

endmodule

// cc_noc: distributed congestion control for a MESH_X x MESH_Y mesh NoC.
//
// Every router of the data NoC gets, for each of its output buffers
// (one per mesh neighbour plus the local port: 3 to 5), a router_buffer
// exporting its packet information, and one congestion_controller: a
// buffer_monitor sensing congestion on each of those buffers and the
// congestion_monitor collecting their reports.
// Every tile gets a traffic_shaper in its data network interface and an
// aimd_controller computing the shaper's window from the notifications the
// tile's congestion monitor receives. The loop is: a buffer fills to its
// threshold, its monitor picks the lowest-priority recent packet, the
// congestion monitor sends a notification to that packet's source tile
// over the control network, the source tile's congestion monitor receives
// it and the window there is halved, throttling the offending traffic.
//
// Brought out as ports, because they are not part of this design:
//   * the router crossbars: the write side of every output buffer
//     (buf_in_*) and its link side (buf_out_*), indexed [node][port] with
//     port 0 local, 1 north, 2 east, 3 south, 4 west; ports that a border
//     router lacks have no buffer (all their outputs held low);
//   * the control network: each congestion monitor's cn_tx_* and cn_rx_*;
//   * the microcontrollers: each congestion monitor's register bus uc_*;
//   * the network interfaces: the shaper input ni_* and its output to the
//     router's local input, inj_*; ni_prio_* sets the tile's priority and
//     ni_len_* its longest packet payload (1..256 words).
// Observation outputs: congested[node][port], the windows, whether each
// window is open, and one-cycle pulses for each window decrease and
// increase.
// Node n sits at x = n % MESH_X, y = n / MESH_X and has address n.
//
// Following the original description: the 3x3 mesh, the monitors per
// buffer, one congestion monitor per router, shaper and window control per
// tile. The port numbering, node addressing and the fixed five monitor
// slots per congestion monitor (unused ones tied off) are this design's.
module cc_noc
  import cc_pkg::*;
#(
  parameter int MESH_X        = 3,
  parameter int MESH_Y        = 3,
  parameter int BUF_FLITS     = 32,
  parameter int HISTORY_DEPTH = 4,
  parameter int PERIOD        = 2048,
  localparam int NODES        = MESH_X * MESH_Y,
  localparam int PORTS        = 5,
  localparam int CNT_W        = $clog2(BUF_FLITS / 2 + 1),
  localparam int WIN_W        = $clog2(PERIOD + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  // microcontroller register buses
  input  logic [3:0]       uc_addr  [NODES],
  input  logic             uc_wr    [NODES],
  input  logic             uc_rd    [NODES],
  input  logic [15:0]      uc_wdata [NODES],
  output logic [15:0]      uc_rdata [NODES],
  // control network
  output logic             cn_tx_valid [NODES],
  input  logic             cn_tx_ready [NODES],
  output notif_t           cn_tx_notif [NODES],
  input  logic             cn_rx_valid [NODES],
  input  notif_t           cn_rx_notif [NODES],
  // router output buffers
  input  logic             buf_in_valid  [NODES][PORTS],
  output logic             buf_in_ready  [NODES][PORTS],
  input  flit_t            buf_in_flit   [NODES][PORTS],
  input  logic             buf_in_last   [NODES][PORTS],
  output logic             buf_out_valid [NODES][PORTS],
  input  logic             buf_out_ready [NODES][PORTS],
  output flit_t            buf_out_flit  [NODES][PORTS],
  output logic             buf_out_last  [NODES][PORTS],
  // network interface injection path
  input  logic             ni_valid    [NODES],
  output logic             ni_ready    [NODES],
  input  flit_t            ni_flit     [NODES],
  input  logic             ni_last     [NODES],
  input  logic             ni_prio_wr  [NODES],
  input  prio_t            ni_prio     [NODES],
  input  logic             ni_len_wr   [NODES],
  input  logic [8:0]       ni_len      [NODES],
  output logic             inj_valid   [NODES],
  input  logic             inj_ready   [NODES],
  output flit_t            inj_flit    [NODES],
  output logic             inj_last    [NODES],
  // observation
  output logic             congested   [NODES][PORTS],
  output logic [WIN_W-1:0] window      [NODES],
  output logic             win_open    [NODES],
  output logic             win_decrease[NODES],
  output logic             win_increase[NODES]
);

  function automatic bit port_exists(int n, int p);
    int x = n % MESH_X;
    int y = n / MESH_X;
    case (p)
      0:       return 1'b1;
      1:       return y > 0;
      2:       return x < MESH_X - 1;
      3:       return y < MESH_Y - 1;
      default: return x > 0;
    endcase
  endfunction

  function automatic logic [PORTS-1:0] port_mask(int n);
    for (int p = 0; p < PORTS; p++) port_mask[p] = port_exists(n, p);
  endfunction

  for (genvar n = 0; n < NODES; n++) begin : g_node
    logic             new_packet       [PORTS];
    addr_t            source           [PORTS];
    prio_t            prio             [PORTS];
    logic [CNT_W-1:0] packets_outqueue [PORTS];
    logic             rx_event;
    notif_t           rx_event_notif;
    logic [WIN_W-1:0] aimd_window;
    logic             aimd_wr;

    for (genvar p = 0; p < PORTS; p++) begin : g_port
      if (port_exists(n, p)) begin : g_buf
        router_buffer #(.BUF_FLITS(BUF_FLITS), .CNT_W(CNT_W)) u_buf (
          .clk, .rst_n,
          .in_valid  (buf_in_valid[n][p]),  .in_ready (buf_in_ready[n][p]),
          .in_flit   (buf_in_flit[n][p]),   .in_last  (buf_in_last[n][p]),
          .out_valid (buf_out_valid[n][p]), .out_ready(buf_out_ready[n][p]),
          .out_flit  (buf_out_flit[n][p]),  .out_last (buf_out_last[n][p]),
          .new_packet      (new_packet[p]),
          .source          (source[p]),
          .prio            (prio[p]),
          .packets_outqueue(packets_outqueue[p])
        );
      end else begin : g_none
        assign buf_in_ready[n][p]  = 1'b0;
        assign buf_out_valid[n][p] = 1'b0;
        assign buf_out_flit[n][p]  = '0;
        assign buf_out_last[n][p]  = 1'b0;
        assign new_packet[p]       = 1'b0;
        assign source[p]           = '0;
        assign prio[p]             = '0;
        assign packets_outqueue[p] = '0;
      end
    end

    congestion_controller #(
      .NUM_BM(PORTS), .HISTORY_DEPTH(HISTORY_DEPTH), .CNT_W(CNT_W),
      .NODE_ID(addr_t'(n)), .PORT_EN(port_mask(n))
    ) u_cc (
      .clk, .rst_n,
      .bus_addr (uc_addr[n]), .bus_wr(uc_wr[n]), .bus_rd(uc_rd[n]),
      .bus_wdata(uc_wdata[n]), .bus_rdata(uc_rdata[n]),
      .new_packet, .source, .prio, .packets_outqueue,
      .congested(congested[n]),
      .tx_valid (cn_tx_valid[n]), .tx_ready(cn_tx_ready[n]), .tx_notif(cn_tx_notif[n]),
      .rx_valid (cn_rx_valid[n]), .rx_notif(cn_rx_notif[n]),
      .rx_event, .rx_event_notif
    );

    aimd_controller #(.R(PERIOD), .WIN_MAX(PERIOD)) u_aimd (
      .clk, .rst_n,
      .notify   (rx_event),
      .window   (aimd_window),
      .window_wr(aimd_wr),
      .decreases(win_decrease[n]),
      .increases(win_increase[n])
    );

    traffic_shaper #(.PERIOD(PERIOD), .NODE_ID(addr_t'(n))) u_ts (
      .clk, .rst_n,
      .window_wr  (aimd_wr),
      .window_in  (aimd_window),
      .prio_wr    (ni_prio_wr[n]),
      .prio_in    (ni_prio[n]),
      .len_wr     (ni_len_wr[n]),
      .len_in     (ni_len[n]),
      .window     (window[n]),
      .window_open(win_open[n]),
      .in_valid   (ni_valid[n]), .in_ready (ni_ready[n]),
      .in_flit    (ni_flit[n]),  .in_last  (ni_last[n]),
      .out_valid  (inj_valid[n]), .out_ready(inj_ready[n]),
      .out_flit   (inj_flit[n]),  .out_last (inj_last[n])
    );
  end

endmodule

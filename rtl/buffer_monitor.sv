// buffer_monitor: congestion sensor for one output buffer of a data router.
//
// The buffer exports four signals: new_packet (a packet header has just
// entered), the source address and priority of that packet, and the number
// of packets currently queued. The monitor
//   * flags the buffer as congested while packets_outqueue >= threshold;
//   * shifts {notified, priority, source} of every entering packet into a
//     history FIFO (hFIFO) of HISTORY_DEPTH entries, entry 0 the newest;
//   * while congested, searches the hFIFO for the lowest-priority entry
//     (largest priority value) that has not yet been notified, the newest
//     one winning a tie, reports its source and priority to the congestion
//     monitor and tags the entry as notified.
// Only entries 0..depth take part in the search (depth 0 keeps just the
// newest packet). A packet whose priority value is below the exemption
// register enters the hFIFO already tagged, so it can never be reported.
// The tag is local to this monitor: the same packet can be reported again
// by the monitors of later hops.
//
// Timing: detection and search are combinational; the report
// (notif_valid with notif_src/notif_prio) is registered and appears one
// clock after the cycle in which the buffer crossed the threshold. One
// entry is reported per cycle while the congestion lasts and untagged
// entries remain. congested itself is combinational.
//
// From the original description: the hFIFO contents and widths, the
// depth, threshold and exemption controls, the tie rule and the tagging.
// This design's choices: the >= comparison (printed in the block diagram,
// where the prose says "above"), the priority order (0 highest), reset
// marking all entries as notified so empty entries are never reported,
// and the exact shape of the search tree.
module buffer_monitor
  import cc_pkg::*;
#(
  parameter int HISTORY_DEPTH = 4,
  parameter int CNT_W         = 5,
  localparam int DEPTH_W      = (HISTORY_DEPTH > 1) ? $clog2(HISTORY_DEPTH) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // configuration (from the congestion monitor)
  input  logic               enable,
  input  logic [CNT_W-1:0]   threshold,
  input  logic [DEPTH_W-1:0] depth,
  input  prio_t              exemption,
  // signals exported by the router buffer
  input  logic               new_packet,
  input  addr_t              src_in,
  input  prio_t              prio_in,
  input  logic [CNT_W-1:0]   packets_outqueue,
  // report to the congestion monitor
  output logic               congested,
  output logic               notif_valid,
  output addr_t              notif_src,
  output prio_t              notif_prio
);

  typedef struct packed {
    logic  notified;
    prio_t prio;
    addr_t src;
  } hentry_t;

  hentry_t hfifo [HISTORY_DEPTH];

  // find_lowest
  logic                   found;
  logic [DEPTH_W-1:0]     sel;

  assign congested = enable && (packets_outqueue >= threshold);

  // Search tree: leaves are the hFIFO entries (padded to a power of two);
  // each node keeps the better of its two children, the lower-index (newer)
  // child winning when priorities are equal, so ties go to the most recent
  // packet. Depth is log2(HISTORY_DEPTH) comparator levels.
  localparam int LEAVES = 1 << DEPTH_W;

  typedef struct packed {
    logic               valid;
    prio_t              prio;
    logic [DEPTH_W-1:0] idx;
  } cand_t;

  cand_t tree [LEAVES];

  always_comb begin
    for (int i = 0; i < LEAVES; i++) begin
      tree[i].valid = (i < HISTORY_DEPTH) && (i <= int'(depth)) && !hfifo[i % HISTORY_DEPTH].notified;
      tree[i].prio  = hfifo[i % HISTORY_DEPTH].prio;
      tree[i].idx   = DEPTH_W'(i);
    end
    for (int stride = 1; stride < LEAVES; stride *= 2) begin
      for (int i = 0; i + stride < LEAVES; i += 2 * stride) begin
        if (!tree[i].valid ||
            (tree[i + stride].valid && tree[i + stride].prio > tree[i].prio))
          tree[i] = tree[i + stride];
      end
    end
    found    = tree[0].valid;
    sel      = tree[0].idx;
  end

  wire fire = congested && found;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < HISTORY_DEPTH; i++) hfifo[i] <= '{notified: 1'b1, prio: '0, src: '0};
      notif_valid <= 1'b0;
      notif_src   <= '0;
      notif_prio  <= '0;
    end else begin
      notif_valid <= fire;
      if (fire) begin
        notif_src  <= hfifo[sel].src;
        notif_prio <= hfifo[sel].prio;
      end
      for (int i = 0; i < HISTORY_DEPTH; i++) begin
        if (new_packet) begin
          if (i == 0)
            hfifo[0] <= '{notified: (prio_in < exemption), prio: prio_in, src: src_in};
          else
            hfifo[i] <= '{notified: hfifo[i-1].notified || (fire && sel == DEPTH_W'(i-1)),
                          prio: hfifo[i-1].prio, src: hfifo[i-1].src};
        end else if (fire && sel == DEPTH_W'(i)) begin
          hfifo[i].notified <= 1'b1;
        end
      end
    end
  end

endmodule

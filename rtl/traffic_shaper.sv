// traffic_shaper: traffic shaping in a tile's data network interface. It
// controls the three properties of the packets a tile sends: when they
// enter the network, their priority and their length.
//
// * Injection time (sliding window): time is divided into periods of
//   PERIOD clock cycles. In each period the window is open for the first
//   'window' cycles and closed for the rest; flits enter the router only
//   while it is open, so the tile uses at most window/PERIOD of its link.
//   A window of PERIOD (the reset value) leaves the traffic untouched, a
//   window of 0 stops the tile. The window controller writes the window.
// * Priority: the tile's address and the configured priority are written
//   into the source and priority fields of each packet's second header
//   flit (cc_pkg::hdr2_t). This is what lets a congested router find and
//   throttle the sender.
// * Length: a packet whose payload exceeds max_payload words is cut. The
//   flit that reaches the limit leaves marked 'last', then the two header
//   flits of the packet are sent again and the rest of the payload
//   follows as a new packet. The NI is stalled while the headers are
//   repeated. max_payload resets to 256 (no cutting) and is at least 1.
//
// Interface: valid/ready with a 'last' flag on both sides. The data path
// is combinational (no added latency) except while headers are repeated.
// window_wr/window_in, prio_wr/prio_in and len_wr/len_in load the
// settings at the clock edge.
//
// Following the original description: injection only while the window is
// open, the three shaped properties, the header fields, 256 words as the
// longest payload. This design's choices: measuring the window in cycles
// of a fixed period equal to the 2048-cycle increase interval, gating flit
// by flit (a packet may straddle periods), cutting packets by repeating
// their headers, and the reset values.
module traffic_shaper
  import cc_pkg::*;
#(
  parameter int    PERIOD      = 2048,
  parameter int    MAX_PAYLOAD = 256,
  parameter addr_t NODE_ID     = '0,
  parameter prio_t PRIO_RST    = prio_t'(4),
  localparam int   WIN_W       = $clog2(PERIOD + 1),
  localparam int   LEN_W       = $clog2(MAX_PAYLOAD + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  // settings
  input  logic             window_wr,
  input  logic [WIN_W-1:0] window_in,
  input  logic             prio_wr,
  input  prio_t            prio_in,
  input  logic             len_wr,
  input  logic [LEN_W-1:0] len_in,
  output logic [WIN_W-1:0] window,
  output logic             window_open,
  // from the network interface
  input  logic             in_valid,
  output logic             in_ready,
  input  flit_t            in_flit,
  input  logic             in_last,
  // to the router
  output logic             out_valid,
  input  logic             out_ready,
  output flit_t            out_flit,
  output logic             out_last
);

  localparam int PH_W = $clog2(PERIOD);

  // PASS_H1/PASS_H2/PASS_PL: passing the NI's first header, second header,
  // payload. REP_H1/REP_H2: repeating the headers after a cut.
  typedef enum logic [2:0] {PASS_H1, PASS_H2, PASS_PL, REP_H1, REP_H2} state_e;

  logic [PH_W-1:0]  phase;
  prio_t            prio;
  logic [LEN_W-1:0] max_payload;
  logic [LEN_W-1:0] payload_cnt;   // payload flits of the current (cut) packet
  state_e           state;
  flit_t            hdr1_q, hdr2_q;
  flit_t            hdr2_stamped;

  wire repeating = (state == REP_H1) || (state == REP_H2);
  wire cut       = (state == PASS_PL) && !in_last && (payload_cnt + 1'b1 == max_payload);
  wire xfer      = out_valid && out_ready;

  assign window_open = (WIN_W'(phase) < window);
  assign out_valid   = window_open && (repeating || in_valid);
  assign in_ready    = window_open && out_ready && !repeating;

  always_comb begin
    hdr2_stamped      = in_flit;
    hdr2_stamped[6:4] = prio;
    hdr2_stamped[3:0] = NODE_ID;
    unique case (state)
      PASS_H2: begin out_flit = hdr2_stamped; out_last = in_last;      end
      PASS_PL: begin out_flit = in_flit;      out_last = in_last || cut; end
      REP_H1:  begin out_flit = hdr1_q;       out_last = 1'b0;         end
      REP_H2:  begin out_flit = hdr2_q;       out_last = 1'b0;         end
      default: begin out_flit = in_flit;      out_last = in_last;      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase       <= '0;
      window      <= WIN_W'(PERIOD);
      prio        <= PRIO_RST;
      max_payload <= LEN_W'(MAX_PAYLOAD);
      payload_cnt <= '0;
      state       <= PASS_H1;
      hdr1_q      <= '0;
      hdr2_q      <= '0;
    end else begin
      phase <= (phase == PH_W'(PERIOD - 1)) ? '0 : phase + 1'b1;
      if (window_wr) window <= (window_in > WIN_W'(PERIOD)) ? WIN_W'(PERIOD) : window_in;
      if (prio_wr)   prio   <= prio_in;
      if (len_wr)
        max_payload <= (len_in == '0) ? LEN_W'(1) :
                       (len_in > LEN_W'(MAX_PAYLOAD)) ? LEN_W'(MAX_PAYLOAD) : len_in;
      if (xfer) begin
        unique case (state)
          PASS_H1: begin
            hdr1_q <= in_flit;
            if (!in_last) state <= PASS_H2;
          end
          PASS_H2: begin
            hdr2_q      <= hdr2_stamped;
            payload_cnt <= '0;
            state       <= in_last ? PASS_H1 : PASS_PL;
          end
          PASS_PL: begin
            payload_cnt <= payload_cnt + 1'b1;
            if (in_last)  state <= PASS_H1;
            else if (cut) state <= REP_H1;
          end
          REP_H1: state <= REP_H2;
          REP_H2: begin
            payload_cnt <= '0;
            state       <= PASS_PL;
          end
          default: state <= PASS_H1;
        endcase
      end
    end
  end

endmodule

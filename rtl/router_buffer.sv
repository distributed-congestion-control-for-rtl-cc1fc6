// router_buffer: output buffer of a data-NoC router with the observability
// needed for congestion control.
//
// A plain flit FIFO (valid/ready on both sides, a 'last' flag marking the
// final flit of a packet, first-word-fall-through output) that also
// follows the packet structure of what it stores. When the second header
// flit of a packet is written it pulses new_packet for one cycle and
// presents that flit's source address and priority (prio). packets_outqueue
// counts the packets whose second header flit has entered and whose last
// flit has not yet left.
//
// Timing: a flit written at edge t can be read after edge t; new_packet,
// source, priority and the increment of packets_outqueue appear one clock
// after the write of the second header flit; the decrement one clock
// after the last flit is read.
//
// The exported signals follow the original description; the FIFO
// organisation, its depth (BUF_FLITS, not given there) and the 'last'
// sideband are this design's choices.
module router_buffer
  import cc_pkg::*;
#(
  parameter int BUF_FLITS = 32,
  parameter int CNT_W     = $clog2(BUF_FLITS / 2 + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  // write side (from the crossbar)
  input  logic             in_valid,
  output logic             in_ready,
  input  flit_t            in_flit,
  input  logic             in_last,
  // read side (towards the link)
  output logic             out_valid,
  input  logic             out_ready,
  output flit_t            out_flit,
  output logic             out_last,
  // exported to the buffer monitor
  output logic             new_packet,
  output addr_t            source,
  output prio_t            prio,
  output logic [CNT_W-1:0] packets_outqueue
);

  localparam int PTR_W = $clog2(BUF_FLITS);

  typedef enum logic [1:0] {IN_HDR1, IN_HDR2, IN_PAYLOAD} in_state_e;

  logic [FLIT_W:0]   mem [BUF_FLITS];
  logic [PTR_W-1:0]  wr_ptr, rd_ptr;
  logic [PTR_W:0]    fill;
  in_state_e         in_state;

  wire wr = in_valid && in_ready;
  wire rd = out_valid && out_ready;

  assign in_ready  = (fill != (PTR_W+1)'(BUF_FLITS));
  assign out_valid = (fill != '0);
  assign out_flit  = mem[rd_ptr][FLIT_W-1:0];
  assign out_last  = mem[rd_ptr][FLIT_W];

  wire   hdr2_wr = wr && (in_state == IN_HDR2);
  hdr2_t hdr2;
  assign hdr2 = hdr2_t'(in_flit);

  always_ff @(posedge clk) begin
    if (wr) mem[wr_ptr] <= {in_last, in_flit};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr           <= '0;
      rd_ptr           <= '0;
      fill             <= '0;
      in_state         <= IN_HDR1;
      new_packet       <= 1'b0;
      source           <= '0;
      prio             <= '0;
      packets_outqueue <= '0;
    end else begin
      if (wr) wr_ptr <= (wr_ptr == PTR_W'(BUF_FLITS - 1)) ? '0 : wr_ptr + 1'b1;
      if (rd) rd_ptr <= (rd_ptr == PTR_W'(BUF_FLITS - 1)) ? '0 : rd_ptr + 1'b1;
      fill <= fill + (PTR_W+1)'(wr) - (PTR_W+1)'(rd);

      if (wr) begin
        unique case (in_state)
          IN_HDR1:    in_state <= in_last ? IN_HDR1 : IN_HDR2;
          IN_HDR2:    in_state <= in_last ? IN_HDR1 : IN_PAYLOAD;
          IN_PAYLOAD: in_state <= in_last ? IN_HDR1 : IN_PAYLOAD;
          default:    in_state <= IN_HDR1;
        endcase
      end

      new_packet <= hdr2_wr;
      if (hdr2_wr) begin
        source   <= hdr2.src;
        prio     <= hdr2.prio;
      end
      packets_outqueue <= packets_outqueue + CNT_W'(hdr2_wr) - CNT_W'(rd && out_last);
    end
  end

  // A packet has at least its two header flits.
  a_hdr1_not_last: assert property (@(posedge clk) disable iff (!rst_n)
    (wr && in_state == IN_HDR1) |-> !in_last);

endmodule

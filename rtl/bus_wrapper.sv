// bus_wrapper: attaches one agent (or one side of a bridge) to a bus segment.
//
// Structure (as in the benchmarked hierarchical bus): a transmit FIFO, a
// receive FIFO, each holding one packet, and a small control unit. The control
// unit does distributed round-robin arbitration: every wrapper on a segment
// keeps its own copy of the current owner index and advances it from what it
// sees on the bus, so ownership passes to the next master after each packet.
// Bus signals are resolved by OR outside this module (bus_or_resolver); a
// wrapper drives zeros whenever it does not use a line.
//
// Segment protocol, one word per cycle (the handshake is this design's own):
//   * The owner, if it is idle and its transmit FIFO holds a whole packet
//     (store-and-forward), raises av and shows header word 0 on data.
//   * Any wrapper whose address range [ADDR_LO, ADDR_HI] holds the
//     destination and whose receive FIFO has room for a whole packet raises
//     ack in the same cycle.
//   * With ack the owner raises dv and the header word is transferred; the
//     other PKT_WORDS-1 words follow back to back with dv, the last one with
//     last. Ownership then passes on.
//   * A cycle in which the owner does not start a packet (nothing to send, or
//     no ack because the receiver is full) passes ownership on at once, so an
//     idle master costs one cycle of the round.
// Agent side: tx_valid/tx_ready/tx_data writes words into the transmit FIFO,
// rx_valid/rx_ready/rx_data reads the receive FIFO (valid-ready handshakes,
// a word moves when both are high). Agents write whole packets of PKT_WORDS
// words; word 0 is the destination agent index. A packet crosses the bus in
// PKT_WORDS cycles after the cycle in which ownership reaches its sender.
module bus_wrapper
  import noc_pkg::*;
#(
  parameter int unsigned NM      = 6,   // masters on this segment
  parameter int unsigned IDX     = 0,   // this master's place in the round
  parameter int unsigned ADDR_LO = 0,   // destinations this wrapper accepts
  parameter int unsigned ADDR_HI = 0,
  parameter int unsigned DEPTH   = PKT_WORDS,
  localparam int unsigned OW     = (NM > 1) ? $clog2(NM) : 1,
  localparam int unsigned CW     = $clog2(DEPTH + 1)
) (
  input  logic     clk,
  input  logic     rst_n,
  // agent side
  input  logic     tx_valid,
  output logic     tx_ready,
  input  word_t    tx_data,
  output logic     rx_valid,
  input  logic     rx_ready,
  output word_t    rx_data,
  // resolved segment signals
  input  bus_req_t bus_req,
  input  logic     bus_ack,
  input  logic     bus_dv,
  // this wrapper's contribution
  output bus_req_t req_o,
  output logic     ack_o,
  output logic     dv_o
);

  localparam int unsigned IW = $clog2(PKT_WORDS);

  logic [OW-1:0] owner;      // replicated round-robin state
  logic          busy;       // a packet is in progress on the segment
  logic          sending;    // this wrapper sends the packet in progress
  logic          receiving;  // this wrapper receives the packet in progress
  logic [IW-1:0] widx;       // index of the word being sent

  logic          tx_full, tx_empty, rx_full, rx_empty;
  logic [CW-1:0] tx_count, rx_count;
  word_t         tx_head;
  logic          tx_pop, rx_push;

  logic          is_owner, pkt_ready, start, dst_hit, room;
  logic          seg_advance;

  // ---------------------------------------------------------------- FIFOs
  packet_fifo #(.WIDTH(WORD_W), .DEPTH(DEPTH)) u_tx (
    .clk, .rst_n,
    .wr_en(tx_valid && tx_ready), .wr_data(tx_data),
    .rd_en(tx_pop), .rd_data(tx_head),
    .count(tx_count), .full(tx_full), .empty(tx_empty)
  );

  packet_fifo #(.WIDTH(WORD_W), .DEPTH(DEPTH)) u_rx (
    .clk, .rst_n,
    .wr_en(rx_push), .wr_data(bus_req.data),
    .rd_en(rx_valid && rx_ready), .rd_data(rx_data),
    .count(rx_count), .full(rx_full), .empty(rx_empty)
  );

  assign tx_ready = !tx_full;
  assign rx_valid = !rx_empty;

  // ---------------------------------------------------------------- control
  assign is_owner  = (owner == OW'(IDX));
  assign pkt_ready = (tx_count >= CW'(PKT_WORDS));
  assign start     = is_owner && !busy && pkt_ready;

  // request group: independent of ack, so no combinational loop on the bus
  assign req_o.av   = start;
  assign req_o.last = sending && (widx == IW'(PKT_WORDS - 1));
  assign req_o.data = (start || sending) ? tx_head : '0;
  assign dv_o       = sending || (start && bus_ack);
  assign tx_pop     = dv_o;

  // address decode on the header offered by the owner
  assign dst_hit = (bus_req.data >= WORD_W'(ADDR_LO)) && (bus_req.data <= WORD_W'(ADDR_HI));
  assign room    = (rx_count <= CW'(DEPTH - PKT_WORDS));
  assign ack_o   = bus_req.av && !busy && dst_hit && room;
  assign rx_push = bus_dv && (receiving || ack_o);

  // ownership moves after a packet's last word, or after an unused slot
  assign seg_advance = bus_dv ? bus_req.last : !busy;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      owner     <= '0;
      busy      <= 1'b0;
      sending   <= 1'b0;
      receiving <= 1'b0;
      widx      <= '0;
    end else begin
      if (seg_advance)
        owner <= (owner == OW'(NM - 1)) ? '0 : owner + 1'b1;

      if (bus_dv) busy <= !bus_req.last;

      if (dv_o) begin
        sending <= !req_o.last;
        widx    <= req_o.last ? '0 : widx + 1'b1;
      end

      if (ack_o && bus_dv)               receiving <= 1'b1;
      else if (bus_dv && bus_req.last)   receiving <= 1'b0;
    end
  end

  // ---------------------------------------------------------------- checks
  initial assert (PKT_WORDS >= 2 && DEPTH >= PKT_WORDS && IDX < NM && ADDR_LO <= ADDR_HI);
  // once started, a packet goes out back to back
  a_contiguous: assert property (@(posedge clk) disable iff (!rst_n) sending |-> dv_o);
  // a sender always has the word it is about to send
  a_tx_has_word: assert property (@(posedge clk) disable iff (!rst_n) dv_o |-> !tx_empty);
  // only a receiver that made room can be written
  a_rx_room: assert property (@(posedge clk) disable iff (!rst_n) rx_push |-> !rx_full);

endmodule

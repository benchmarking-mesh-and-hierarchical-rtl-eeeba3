// bus_bridge: joins two neighbouring segments of the hierarchical bus chain.
//
// As in the benchmarked bus, a bridge is two bus wrappers connected back to
// back, four packet buffers in all. The wrapper on the lower segment accepts
// every packet whose destination lies at or above BOUNDARY (the first agent of
// the upper segments) and the wrapper on the upper segment accepts every
// packet for an agent below BOUNDARY. The receive FIFO of each wrapper feeds
// the transmit FIFO of the other over a valid-ready handshake, so a packet is
// copied word by word to the other side and is sent there once it is whole
// (store-and-forward). Each side takes part in its own segment's round-robin
// with its own place in the round (IDX_LO, IDX_HI) and round length.
// The address ranges (agents numbered along the chain) are this design's
// choice. Crossing a bridge costs PKT_WORDS cycles on each segment plus the
// copy from one FIFO to the other (one word per cycle, overlapping the
// receive) and the wait for ownership on the far segment.
module bus_bridge
  import noc_pkg::*;
#(
  parameter int unsigned N_AGENTS = 36,
  parameter int unsigned BOUNDARY = 4,   // lowest agent index above the bridge
  parameter int unsigned NM_LO    = 5,
  parameter int unsigned IDX_LO   = 4,
  parameter int unsigned NM_HI    = 6,
  parameter int unsigned IDX_HI   = 4
) (
  input  logic     clk,
  input  logic     rst_n,
  // lower segment
  input  bus_req_t lo_bus_req,
  input  logic     lo_bus_ack,
  input  logic     lo_bus_dv,
  output bus_req_t lo_req_o,
  output logic     lo_ack_o,
  output logic     lo_dv_o,
  // upper segment
  input  bus_req_t hi_bus_req,
  input  logic     hi_bus_ack,
  input  logic     hi_bus_dv,
  output bus_req_t hi_req_o,
  output logic     hi_ack_o,
  output logic     hi_dv_o
);

  // upward path: lower wrapper rx -> upper wrapper tx
  logic  up_valid, up_ready;
  word_t up_data;
  // downward path: upper wrapper rx -> lower wrapper tx
  logic  dn_valid, dn_ready;
  word_t dn_data;

  bus_wrapper #(
    .NM(NM_LO), .IDX(IDX_LO), .ADDR_LO(BOUNDARY), .ADDR_HI(N_AGENTS - 1)
  ) u_lo (
    .clk, .rst_n,
    .tx_valid(dn_valid), .tx_ready(dn_ready), .tx_data(dn_data),
    .rx_valid(up_valid), .rx_ready(up_ready), .rx_data(up_data),
    .bus_req(lo_bus_req), .bus_ack(lo_bus_ack), .bus_dv(lo_bus_dv),
    .req_o(lo_req_o), .ack_o(lo_ack_o), .dv_o(lo_dv_o)
  );

  bus_wrapper #(
    .NM(NM_HI), .IDX(IDX_HI), .ADDR_LO(0), .ADDR_HI(BOUNDARY - 1)
  ) u_hi (
    .clk, .rst_n,
    .tx_valid(up_valid), .tx_ready(up_ready), .tx_data(up_data),
    .rx_valid(dn_valid), .rx_ready(dn_ready), .rx_data(dn_data),
    .bus_req(hi_bus_req), .bus_ack(hi_bus_ack), .bus_dv(hi_bus_dv),
    .req_o(hi_req_o), .ack_o(hi_ack_o), .dv_o(hi_dv_o)
  );

  initial assert (BOUNDARY > 0 && BOUNDARY < N_AGENTS);

endmodule

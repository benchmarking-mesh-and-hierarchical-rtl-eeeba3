// noc_top: the two benchmarked on-chip networks side by side.
//
// The hierarchical bus (N_AGENTS agents, SEG_AGENTS per segment, segments
// chained by bridges) and the MESH_ROWS x MESH_COLS mesh of store-and-forward
// routers serve the same number of agents through the same agent interface:
// per agent a transmit and a receive valid-ready stream of 32-bit words,
// carrying fixed packets of three header words and eight payload words, word
// 0 being the destination agent index. The two networks are independent and
// each has its own agent ports (prefix hb_ for the bus, mh_ for the mesh), so
// the same traffic can be applied to both and their execution times compared.
//
// The default size, 36 agents (nine bus segments, a 6 x 6 mesh), is one of
// the system sizes of the benchmark (4, 16, 36 and 64 agents); any multiple
// of SEG_AGENTS that is also MESH_ROWS * MESH_COLS works.
module noc_top
  import noc_pkg::*;
#(
  parameter int unsigned MESH_ROWS  = 6,
  parameter int unsigned MESH_COLS  = 6,
  parameter int unsigned SEG_AGENTS = 4,
  localparam int unsigned N_AGENTS  = MESH_ROWS * MESH_COLS
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // hierarchical bus agents
  input  logic  [N_AGENTS-1:0]  hb_tx_valid,
  output logic  [N_AGENTS-1:0]  hb_tx_ready,
  input  word_t [N_AGENTS-1:0]  hb_tx_data,
  output logic  [N_AGENTS-1:0]  hb_rx_valid,
  input  logic  [N_AGENTS-1:0]  hb_rx_ready,
  output word_t [N_AGENTS-1:0]  hb_rx_data,
  // mesh agents
  input  logic  [N_AGENTS-1:0]  mh_tx_valid,
  output logic  [N_AGENTS-1:0]  mh_tx_ready,
  input  word_t [N_AGENTS-1:0]  mh_tx_data,
  output logic  [N_AGENTS-1:0]  mh_rx_valid,
  input  logic  [N_AGENTS-1:0]  mh_rx_ready,
  output word_t [N_AGENTS-1:0]  mh_rx_data
);

  hier_bus #(.N_AGENTS(N_AGENTS), .SEG_AGENTS(SEG_AGENTS)) u_hier_bus (
    .clk, .rst_n,
    .tx_valid(hb_tx_valid), .tx_ready(hb_tx_ready), .tx_data(hb_tx_data),
    .rx_valid(hb_rx_valid), .rx_ready(hb_rx_ready), .rx_data(hb_rx_data)
  );

  mesh #(.ROWS(MESH_ROWS), .COLS(MESH_COLS)) u_mesh (
    .clk, .rst_n,
    .tx_valid(mh_tx_valid), .tx_ready(mh_tx_ready), .tx_data(mh_tx_data),
    .rx_valid(mh_rx_valid), .rx_ready(mh_rx_ready), .rx_data(mh_rx_data)
  );

  initial assert (N_AGENTS % SEG_AGENTS == 0);

endmodule

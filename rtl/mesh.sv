// mesh: 2-D four-way mesh network of ROWS x COLS store-and-forward routers.
//
// Router (r, c) serves agent r * COLS + c. Each router has a link in each
// direction to its neighbour; links are unidirectional, so an inner router
// has four outgoing links, and the mesh has 4(N - sqrt(N)) links for a square
// N-agent mesh. A link is a word with a valid flag going one way and a
// "room for a whole packet" flag coming back (see mesh_router). Links off the
// edge of the mesh are tied off: nothing arrives there and no room is
// offered, and dimension-order routing never sends a packet that way.
//
// The four-way grid, one agent per router and the row-major agent
// numbering follow the benchmarked mesh; the link signalling and the tie-off
// of edge ports are this design's choices.
//
// Agent ports are packed arrays indexed by agent, each a transmit and a
// receive valid-ready word stream. A packet takes PKT_WORDS cycles per hop
// plus, at each router, the wait for the scan pointer (up to five cycles) and
// one cycle for the grant.
module mesh
  import noc_pkg::*;
#(
  parameter int unsigned ROWS = 6,
  parameter int unsigned COLS = 6,
  localparam int unsigned NA  = ROWS * COLS
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic  [NA-1:0]   tx_valid,
  output logic  [NA-1:0]   tx_ready,
  input  word_t [NA-1:0]   tx_data,
  output logic  [NA-1:0]   rx_valid,
  input  logic  [NA-1:0]   rx_ready,
  output word_t [NA-1:0]   rx_data
);

  localparam int unsigned PN = 0, PE = 1, PS = 2, PW = 3;   // port indices

  link_t [3:0] olink [ROWS][COLS];   // outgoing links of each router
  logic  [3:0] oroom [ROWS][COLS];   // room flags each router sends back

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      localparam int unsigned AG = r * COLS + c;
      link_t [3:0] ilink;
      logic  [3:0] iroom;

      // North neighbour (r-1, c): its South output / its South input's room
      if (r > 0) begin : g_n
        assign ilink[PN] = olink[r-1][c][PS];
        assign iroom[PN] = oroom[r-1][c][PS];
      end else begin : g_n_edge
        assign ilink[PN] = '0;
        assign iroom[PN] = 1'b0;
      end
      if (c < COLS - 1) begin : g_e
        assign ilink[PE] = olink[r][c+1][PW];
        assign iroom[PE] = oroom[r][c+1][PW];
      end else begin : g_e_edge
        assign ilink[PE] = '0;
        assign iroom[PE] = 1'b0;
      end
      if (r < ROWS - 1) begin : g_s
        assign ilink[PS] = olink[r+1][c][PN];
        assign iroom[PS] = oroom[r+1][c][PN];
      end else begin : g_s_edge
        assign ilink[PS] = '0;
        assign iroom[PS] = 1'b0;
      end
      if (c > 0) begin : g_w
        assign ilink[PW] = olink[r][c-1][PE];
        assign iroom[PW] = oroom[r][c-1][PE];
      end else begin : g_w_edge
        assign ilink[PW] = '0;
        assign iroom[PW] = 1'b0;
      end

      mesh_router #(.ROWS(ROWS), .COLS(COLS), .MY_ROW(r), .MY_COL(c)) u_router (
        .clk, .rst_n,
        .in_link(ilink), .room_out(oroom[r][c]),
        .out_link(olink[r][c]), .room_in(iroom),
        .tx_valid(tx_valid[AG]), .tx_ready(tx_ready[AG]), .tx_data(tx_data[AG]),
        .rx_valid(rx_valid[AG]), .rx_ready(rx_ready[AG]), .rx_data(rx_data[AG])
      );
    end
  end

endmodule

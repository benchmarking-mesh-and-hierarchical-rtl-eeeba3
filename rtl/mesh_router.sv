// mesh_router: store-and-forward router of the 2-D mesh.
//
// Five input ports (North, East, South, West and the local agent) each have a
// packet FIFO, and the agent has a second FIFO for the packets delivered to
// it: six buffers of one packet, as in the benchmarked router. The output
// links to the four neighbours are unbuffered; they write straight into the
// neighbour's input FIFO.
//
// Control and switching: a scan pointer visits one input per clock cycle
// (N, E, S, W, agent, N, ...). When the visited input is idle and holds a
// whole packet (store-and-forward), the destination in header word 0 is
// routed dimension-order, first along the column to the right row, then along
// the row to the right column (row 0 is the North edge, column 0 the West
// edge; agent i is at row i / COLS, column i % COLS). If that output is free
// and the FIFO behind it has room for a whole packet, the input is connected
// to the output; from the next cycle on the packet's PKT_WORDS words move one
// per cycle, after which input and output are released. Several connections
// can be active at once (a crossbar); an input waits for its next turn when
// its output is busy or the next FIFO is full. The scan order, the one-cycle
// grant and the room signal are this design's own choices. room_out[d],
// sent to the neighbour upstream, is high when input FIFO d has space for a
// whole packet or when it is being forwarded: a connected input drains one
// word every cycle without a break (outputs never stall once granted), so the
// neighbour may refill it at the same rate. This keeps back-to-back packets
// streaming at one word per cycle through one-packet buffers, while every
// router still forwards a packet only after all of it has arrived.
//
// Ports: in_link/out_link are indexed by direction (0 N, 1 E, 2 S, 3 W);
// room_in[d] says the neighbour in direction d can take a packet, room_out[d]
// tells the neighbour in direction d that this router can. The agent writes
// packets over tx_valid/tx_ready and reads delivered words over
// rx_valid/rx_ready (valid-ready handshakes).
module mesh_router
  import noc_pkg::*;
#(
  parameter int unsigned ROWS   = 6,
  parameter int unsigned COLS   = 6,
  parameter int unsigned MY_ROW = 0,
  parameter int unsigned MY_COL = 0,
  parameter int unsigned DEPTH  = PKT_WORDS,
  localparam int unsigned CW    = $clog2(DEPTH + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  link_t [3:0]     in_link,
  output logic  [3:0]     room_out,
  output link_t [3:0]     out_link,
  input  logic  [3:0]     room_in,
  input  logic            tx_valid,
  output logic            tx_ready,
  input  word_t           tx_data,
  output logic            rx_valid,
  input  logic            rx_ready,
  output word_t           rx_data
);

  localparam int unsigned NA = ROWS * COLS;
  localparam int unsigned AW = (NA > 1) ? $clog2(NA) : 1;
  localparam int unsigned IW = $clog2(PKT_WORDS);

  // input FIFOs, index = dir_e
  logic  [NPORTS-1:0]         in_wr, in_rd, in_empty, in_full;
  word_t [NPORTS-1:0]         in_wdata, in_head;
  logic  [NPORTS-1:0][CW-1:0] in_count;
  // local output FIFO
  logic                       lo_wr, lo_full, lo_empty;
  word_t                      lo_wdata;
  logic  [CW-1:0]             lo_count;

  // switch state
  logic [2:0]                 ptr;
  logic [NPORTS-1:0]          in_busy, out_busy;
  logic [NPORTS-1:0][2:0]     out_src;
  logic [NPORTS-1:0][IW-1:0]  out_cnt;

  // --------------------------------------------------------------- buffers
  for (genvar d = 0; d < 4; d++) begin : g_in_dir
    assign in_wr[d]    = in_link[d].valid;
    assign in_wdata[d] = in_link[d].data;
    // room for a whole packet now, or an input being forwarded: it loses one
    // word per cycle without a break, as fast as the neighbour can fill it
    assign room_out[d] = (in_count[d] <= CW'(DEPTH - PKT_WORDS)) || in_busy[d];
  end
  assign in_wr[DIR_L]    = tx_valid && tx_ready;
  assign in_wdata[DIR_L] = tx_data;
  assign tx_ready        = !in_full[DIR_L];

  for (genvar i = 0; i < NPORTS; i++) begin : g_in_fifo
    packet_fifo #(.WIDTH(WORD_W), .DEPTH(DEPTH)) u_fifo (
      .clk, .rst_n,
      .wr_en(in_wr[i]), .wr_data(in_wdata[i]),
      .rd_en(in_rd[i]), .rd_data(in_head[i]),
      .count(in_count[i]), .full(in_full[i]), .empty(in_empty[i])
    );
  end

  packet_fifo #(.WIDTH(WORD_W), .DEPTH(DEPTH)) u_local_out (
    .clk, .rst_n,
    .wr_en(lo_wr), .wr_data(lo_wdata),
    .rd_en(rx_valid && rx_ready), .rd_data(rx_data),
    .count(lo_count), .full(lo_full), .empty(lo_empty)
  );
  assign rx_valid = !lo_empty;

  // --------------------------------------------------------------- routing
  function automatic logic [2:0] route(input word_t dst_word);
    logic [AW-1:0] dst;
    int unsigned   row, col;
    dst = dst_word[AW-1:0];
    row = int'(dst) / COLS;
    col = int'(dst) % COLS;
    if (row < MY_ROW)      return 3'(DIR_N);
    else if (row > MY_ROW) return 3'(DIR_S);
    else if (col > MY_COL) return 3'(DIR_E);
    else if (col < MY_COL) return 3'(DIR_W);
    else                   return 3'(DIR_L);
  endfunction

  logic [NPORTS-1:0] out_room;
  assign out_room[3:0]  = room_in;
  assign out_room[DIR_L] = (lo_count <= CW'(DEPTH - PKT_WORDS));

  logic [2:0] cand_out;
  logic       grant;
  assign cand_out = route(in_head[ptr]);
  assign grant    = !in_busy[ptr] && (in_count[ptr] >= CW'(PKT_WORDS))
                 && !out_busy[cand_out] && out_room[cand_out];

  // --------------------------------------------------------------- crossbar
  always_comb begin
    in_rd    = '0;
    out_link = '0;
    lo_wr    = 1'b0;
    lo_wdata = '0;
    for (int o = 0; o < 4; o++) begin
      if (out_busy[o]) begin
        out_link[o].valid = 1'b1;
        out_link[o].data  = in_head[out_src[o]];
        in_rd[out_src[o]] = 1'b1;
      end
    end
    if (out_busy[DIR_L]) begin
      lo_wr    = 1'b1;
      lo_wdata = in_head[out_src[DIR_L]];
      in_rd[out_src[DIR_L]] = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ptr      <= '0;
      in_busy  <= '0;
      out_busy <= '0;
      out_src  <= '0;
      out_cnt  <= '0;
    end else begin
      ptr <= (ptr == 3'(NPORTS - 1)) ? '0 : ptr + 1'b1;
      for (int o = 0; o < NPORTS; o++) begin
        if (out_busy[o]) begin
          if (out_cnt[o] == IW'(PKT_WORDS - 1)) begin
            out_busy[o]          <= 1'b0;
            in_busy[out_src[o]]  <= 1'b0;
            out_cnt[o]           <= '0;
          end else begin
            out_cnt[o] <= out_cnt[o] + 1'b1;
          end
        end
      end
      if (grant) begin
        out_busy[cand_out] <= 1'b1;
        out_src[cand_out]  <= ptr;
        out_cnt[cand_out]  <= '0;
        in_busy[ptr]       <= 1'b1;
      end
    end
  end

  // --------------------------------------------------------------- checks
  initial assert (DEPTH >= PKT_WORDS && MY_ROW < ROWS && MY_COL < COLS);
  // a connected input always has the next word of its packet
  for (genvar i = 0; i < NPORTS; i++) begin : g_chk
    a_in_has_word: assert property (@(posedge clk) disable iff (!rst_n) in_rd[i] |-> !in_empty[i]);
  end
  // the room flag keeps a neighbour from writing a full FIFO
  for (genvar d = 0; d < 4; d++) begin : g_chk_link
    a_link_room: assert property (@(posedge clk) disable iff (!rst_n) in_wr[d] |-> !in_full[d]);
  end
  a_local_room: assert property (@(posedge clk) disable iff (!rst_n) lo_wr |-> !lo_full);
  // dimension-order routing never leaves the mesh
  a_stay_inside: assert property (@(posedge clk) disable iff (!rst_n)
    grant |-> !((cand_out == 3'(DIR_N) && MY_ROW == 0) || (cand_out == 3'(DIR_S) && MY_ROW == ROWS - 1) ||
                (cand_out == 3'(DIR_W) && MY_COL == 0) || (cand_out == 3'(DIR_E) && MY_COL == COLS - 1)));

endmodule

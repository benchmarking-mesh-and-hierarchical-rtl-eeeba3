// hier_bus: hierarchical bus built as a chain of bus segments.
//
// N_AGENTS agents are grouped SEG_AGENTS to a segment (four in the
// benchmarked configuration, which keeps every segment's wires short), giving
// NSEG = N_AGENTS / SEG_AGENTS segments and as many communication links.
// Neighbouring segments are joined by a bus_bridge, so the segments form a
// chain; all segments have the same width and run on the same clock. Agent i
// sits on segment i / SEG_AGENTS through its own bus_wrapper.
//
// Each segment's signals are resolved by OR (bus_or_resolver) over its
// masters: first its SEG_AGENTS agent wrappers (round-robin places
// 0..SEG_AGENTS-1), then the bridge side towards the lower segment, then the
// bridge side towards the upper segment; end segments have one bridge side,
// a single segment none. With SEG_AGENTS = N_AGENTS the module is a single
// bus. The slot layout and the chain order (lower agent indices on lower
// segments) are this design's choices.
//
// Agent ports are packed arrays indexed by agent; each agent has a transmit
// and a receive valid-ready word stream (see bus_wrapper).
module hier_bus
  import noc_pkg::*;
#(
  parameter int unsigned N_AGENTS   = 36,
  parameter int unsigned SEG_AGENTS = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic  [N_AGENTS-1:0]  tx_valid,
  output logic  [N_AGENTS-1:0]  tx_ready,
  input  word_t [N_AGENTS-1:0]  tx_data,
  output logic  [N_AGENTS-1:0]  rx_valid,
  input  logic  [N_AGENTS-1:0]  rx_ready,
  output word_t [N_AGENTS-1:0]  rx_data
);

  localparam int unsigned NSEG = N_AGENTS / SEG_AGENTS;
  localparam int unsigned MAXM = SEG_AGENTS + 2;
  localparam int unsigned RW   = $bits(bus_req_t);

  // masters on segment s and the places of its bridge sides
  function automatic int unsigned seg_nm(input int unsigned s);
    return SEG_AGENTS + ((s > 0) ? 1 : 0) + ((s < NSEG - 1) ? 1 : 0);
  endfunction
  localparam int unsigned IDX_LOWER_SIDE = SEG_AGENTS;  // bridge towards segment s-1
  function automatic int unsigned idx_upper_side(input int unsigned s);
    return SEG_AGENTS + ((s > 0) ? 1 : 0);      // bridge towards segment s+1
  endfunction

  // per-segment driver arrays and resolved signals
  bus_req_t [MAXM-1:0] req_drv [NSEG];
  logic     [MAXM-1:0] ack_drv [NSEG];
  logic     [MAXM-1:0] dv_drv  [NSEG];
  bus_req_t            seg_req [NSEG];
  logic                seg_ack [NSEG];
  logic                seg_dv  [NSEG];

  for (genvar s = 0; s < NSEG; s++) begin : g_seg
    logic [RW-1:0] req_flat;

    bus_or_resolver #(.M(MAXM), .W(RW)) u_or_req (.drv(req_drv[s]), .bus(req_flat));
    bus_or_resolver #(.M(MAXM), .W(1))  u_or_ack (.drv(ack_drv[s]), .bus(seg_ack[s]));
    bus_or_resolver #(.M(MAXM), .W(1))  u_or_dv  (.drv(dv_drv[s]),  .bus(seg_dv[s]));
    assign seg_req[s] = bus_req_t'(req_flat);

    for (genvar a = 0; a < SEG_AGENTS; a++) begin : g_agent
      localparam int unsigned AG = s * SEG_AGENTS + a;
      bus_wrapper #(
        .NM(seg_nm(s)), .IDX(a), .ADDR_LO(AG), .ADDR_HI(AG)
      ) u_wrap (
        .clk, .rst_n,
        .tx_valid(tx_valid[AG]), .tx_ready(tx_ready[AG]), .tx_data(tx_data[AG]),
        .rx_valid(rx_valid[AG]), .rx_ready(rx_ready[AG]), .rx_data(rx_data[AG]),
        .bus_req(seg_req[s]), .bus_ack(seg_ack[s]), .bus_dv(seg_dv[s]),
        .req_o(req_drv[s][a]), .ack_o(ack_drv[s][a]), .dv_o(dv_drv[s][a])
      );
    end

    // unused bridge slots of the end segments drive nothing
    for (genvar m = seg_nm(s); m < MAXM; m++) begin : g_unused
      assign req_drv[s][m] = '0;
      assign ack_drv[s][m] = 1'b0;
      assign dv_drv[s][m]  = 1'b0;
    end
  end

  for (genvar b = 0; b + 1 < NSEG; b++) begin : g_bridge
    bus_bridge #(
      .N_AGENTS(N_AGENTS), .BOUNDARY((b + 1) * SEG_AGENTS),
      .NM_LO(seg_nm(b)),     .IDX_LO(idx_upper_side(b)),
      .NM_HI(seg_nm(b + 1)), .IDX_HI(IDX_LOWER_SIDE)
    ) u_bridge (
      .clk, .rst_n,
      .lo_bus_req(seg_req[b]), .lo_bus_ack(seg_ack[b]), .lo_bus_dv(seg_dv[b]),
      .lo_req_o(req_drv[b][idx_upper_side(b)]),
      .lo_ack_o(ack_drv[b][idx_upper_side(b)]),
      .lo_dv_o(dv_drv[b][idx_upper_side(b)]),
      .hi_bus_req(seg_req[b + 1]), .hi_bus_ack(seg_ack[b + 1]), .hi_bus_dv(seg_dv[b + 1]),
      .hi_req_o(req_drv[b + 1][IDX_LOWER_SIDE]),
      .hi_ack_o(ack_drv[b + 1][IDX_LOWER_SIDE]),
      .hi_dv_o(dv_drv[b + 1][IDX_LOWER_SIDE])
    );
  end

  initial assert (SEG_AGENTS >= 1 && N_AGENTS % SEG_AGENTS == 0);

  // one owner at a time: at most one master offers a header on a segment
  for (genvar s = 0; s < NSEG; s++) begin : g_chk
    logic [MAXM-1:0] av_v;
    for (genvar m = 0; m < MAXM; m++) begin : g_av
      assign av_v[m] = req_drv[s][m].av;
    end
    a_one_owner: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(av_v));
    a_one_ack:   assert property (@(posedge clk) disable iff (!rst_n) $onehot0(ack_drv[s]));
  end

endmodule

// tb_noc_top_full: end-to-end test of noc_top at its default size:
// 36 agents, nine bus segments of four, a 6 x 6 mesh.
//
// The same traffic runs on both networks: every agent sends one packet to
// every agent (itself included), and a third of the agents read their
// receive port only now and then, so buffers fill up. Checked: every packet
// arrives intact and in order on both networks. Counted, and each must occur
// at least once:
//   hierarchical bus - packets on a segment, ownership passed on an idle
//     slot, header refused by a full receiver, packets through a bridge
//     (up and down), two segments busy in the same cycle;
//   mesh - grants, a waiting packet whose output is busy, a waiting packet
//     whose next router has no room, local deliveries, two outputs of one
//     router busy in the same cycle, packets on every link direction.
// The run times of both networks are reported.
module tb_noc_top_full;
  import noc_pkg::*;
  localparam int unsigned ROWS = 6;   // noc_top defaults
  localparam int unsigned COLS = 6;
  localparam int unsigned SEG  = 4;
  localparam int unsigned N    = ROWS * COLS;
  localparam int unsigned NSEG = N / SEG;

  logic clk = 0, rst_n = 0, start = 0;
  int checks = 0, failures = 0;
  longint cyc = 0;

  logic  [N-1:0] hb_tx_valid, hb_tx_ready, hb_rx_valid, hb_rx_ready;
  word_t [N-1:0] hb_tx_data, hb_rx_data;
  logic  [N-1:0] mh_tx_valid, mh_tx_ready, mh_rx_valid, mh_rx_ready;
  word_t [N-1:0] mh_tx_data, mh_rx_data;
  int unsigned hb_sent [N], hb_recv [N], hb_err [N];
  int unsigned mh_sent [N], mh_recv [N], mh_err [N];
  logic [N-1:0] hb_done, mh_done;

  noc_top dut (.*);

  for (genvar i = 0; i < N; i++) begin : g_ag
    tb_agent_model #(.ID(i), .N(N), .NPKT(N), .OFFSET(1), .STALL((i % 3 == 2) ? 60 : 0)) u_hb (
      .clk, .rst_n, .start,
      .tx_valid(hb_tx_valid[i]), .tx_ready(hb_tx_ready[i]), .tx_data(hb_tx_data[i]),
      .rx_valid(hb_rx_valid[i]), .rx_ready(hb_rx_ready[i]), .rx_data(hb_rx_data[i]),
      .sent(hb_sent[i]), .received(hb_recv[i]), .errors(hb_err[i]), .done(hb_done[i]));
    tb_agent_model #(.ID(i), .N(N), .NPKT(N), .OFFSET(1), .STALL((i % 3 == 2) ? 60 : 0)) u_mh (
      .clk, .rst_n, .start,
      .tx_valid(mh_tx_valid[i]), .tx_ready(mh_tx_ready[i]), .tx_data(mh_tx_data[i]),
      .rx_valid(mh_rx_valid[i]), .rx_ready(mh_rx_ready[i]), .rx_data(mh_rx_data[i]),
      .sent(mh_sent[i]), .received(mh_recv[i]), .errors(mh_err[i]), .done(mh_done[i]));
  end

  // ------------------------------------------------ hierarchical bus events
  int n_seg_pkts = 0, n_idle_pass = 0, n_refused = 0, n_bridge_up = 0, n_bridge_dn = 0, n_seg_par = 0;
  logic [NSEG-1:0] seg_busy;
  for (genvar s = 0; s < NSEG; s++) begin : g_hmon
    assign seg_busy[s] = dut.u_hier_bus.seg_dv[s];
    always @(posedge clk) if (rst_n) begin
      if (dut.u_hier_bus.seg_dv[s] && dut.u_hier_bus.seg_req[s].last) n_seg_pkts++;
      if (!dut.u_hier_bus.seg_dv[s] && !dut.u_hier_bus.seg_req[s].av &&
          dut.u_hier_bus.g_seg[s].g_agent[0].u_wrap.busy == 1'b0) n_idle_pass++;
      if (dut.u_hier_bus.seg_req[s].av && !dut.u_hier_bus.seg_ack[s]) n_refused++;
    end
  end
  for (genvar b = 0; b + 1 < NSEG; b++) begin : g_bmon
    always @(posedge clk) if (rst_n) begin
      if (dut.u_hier_bus.g_bridge[b].u_bridge.hi_dv_o && dut.u_hier_bus.g_bridge[b].u_bridge.hi_req_o.last) n_bridge_up++;
      if (dut.u_hier_bus.g_bridge[b].u_bridge.lo_dv_o && dut.u_hier_bus.g_bridge[b].u_bridge.lo_req_o.last) n_bridge_dn++;
    end
  end
  always @(posedge clk) if (rst_n && $countones(seg_busy) >= 2) n_seg_par++;

  // ------------------------------------------------ mesh events
  int n_grant = 0, n_wait_busy = 0, n_wait_room = 0, n_local = 0, n_router_par = 0;
  int n_dir [4] = '{0, 0, 0, 0};
  for (genvar r = 0; r < ROWS; r++) begin : g_mr
    for (genvar c = 0; c < COLS; c++) begin : g_mc
      always @(posedge clk) if (rst_n) begin
        automatic logic [2:0] p = dut.u_mesh.g_row[r].g_col[c].u_router.ptr;
        automatic logic [2:0] o = dut.u_mesh.g_row[r].g_col[c].u_router.cand_out;
        automatic logic ready_in = !dut.u_mesh.g_row[r].g_col[c].u_router.in_busy[p] &&
            dut.u_mesh.g_row[r].g_col[c].u_router.in_count[p] >= PKT_WORDS;
        if (dut.u_mesh.g_row[r].g_col[c].u_router.grant) begin
          n_grant++;
          if (o == 3'(DIR_L)) n_local++;
          else n_dir[o]++;
        end
        if (ready_in && dut.u_mesh.g_row[r].g_col[c].u_router.out_busy[o]) n_wait_busy++;
        if (ready_in && !dut.u_mesh.g_row[r].g_col[c].u_router.out_busy[o] &&
            !dut.u_mesh.g_row[r].g_col[c].u_router.out_room[o]) n_wait_room++;
        if ($countones(dut.u_mesh.g_row[r].g_col[c].u_router.out_busy) >= 2) n_router_par++;
      end
    end
  end

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0d: %s", cyc, what); end
  endtask

  task automatic seen(input int count, input string what);
    $display("  %-40s %0d", what, count);
    check(count > 0, $sformatf("never happened: %s", what));
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog (hb_done=%b mh_done=%b)", hb_done, mh_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint t0, t_hb = -1, t_mh = -1;
  always @(posedge clk) begin
    if (t_hb < 0 && start == 1'b0 && t0 > 0 && hb_done == '1) t_hb = cyc - t0;
    if (t_mh < 0 && start == 1'b0 && t0 > 0 && mh_done == '1) t_mh = cyc - t0;
  end

  initial begin
    t0 = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (3) @(posedge clk);
    start <= 1; t0 = cyc;
    @(posedge clk);
    start <= 0;
    while (!(hb_done == '1 && mh_done == '1)) @(posedge clk);
    repeat (5) @(posedge clk);
    $display("%0d agents, all-to-all: hierarchical bus %0d cycles, mesh %0d cycles", N, t_hb, t_mh);
    for (int i = 0; i < N; i++) begin
      check(hb_sent[i] == N && hb_recv[i] == N && hb_err[i] == 0,
            $sformatf("bus agent %0d sent %0d received %0d errors %0d", i, hb_sent[i], hb_recv[i], hb_err[i]));
      check(mh_sent[i] == N && mh_recv[i] == N && mh_err[i] == 0,
            $sformatf("mesh agent %0d sent %0d received %0d errors %0d", i, mh_sent[i], mh_recv[i], mh_err[i]));
    end
    check(n_seg_pkts == N * N + n_bridge_up + n_bridge_dn, "segment packet count");
    $display("events:");
    seen(n_seg_pkts,   "bus: packets on segments");
    seen(n_idle_pass,  "bus: ownership passed on an idle slot");
    seen(n_refused,    "bus: header refused (receiver full)");
    seen(n_bridge_up,  "bus: packets through a bridge upward");
    seen(n_bridge_dn,  "bus: packets through a bridge downward");
    seen(n_seg_par,    "bus: cycles with two segments busy");
    seen(n_grant,      "mesh: packets granted");
    seen(n_wait_busy,  "mesh: waits on a busy output");
    seen(n_wait_room,  "mesh: waits for room downstream");
    seen(n_local,      "mesh: local deliveries");
    seen(n_router_par, "mesh: cycles with two outputs of a router busy");
    seen(n_dir[0],     "mesh: hops north");
    seen(n_dir[1],     "mesh: hops east");
    seen(n_dir[2],     "mesh: hops south");
    seen(n_dir[3],     "mesh: hops west");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_bus_bridge: two bus segments joined by one bridge. Segment A holds the
// wrapper of agent 0 and the bridge's lower side, segment B the bridge's
// upper side and the wrapper of agent 1 (bridge boundary at agent 1).
// Both agents send packets to each other through the bridge; every packet
// must arrive intact and in order. Store-and-forward is checked on the first
// packet: it may start on segment B only after its last word has crossed
// segment A, and no later than one ownership round and a few cycles of copying
// after that. A packet for an agent on its own side must not be taken by the
// bridge.
module tb_bus_bridge;
  import noc_pkg::*;
  localparam int unsigned NPKT = 6;

  logic clk = 0, rst_n = 0, start = 0;
  int checks = 0, failures = 0;
  longint cyc = 0;

  logic  [1:0] tx_valid, tx_ready, rx_valid, rx_ready;
  word_t [1:0] tx_data, rx_data;
  int unsigned sent [2], received [2], errors [2];
  logic [1:0] done;

  // segment A: slot 0 agent 0, slot 1 bridge lower side
  bus_req_t [1:0] a_req; logic [1:0] a_ack, a_dv;
  bus_req_t [1:0] b_req; logic [1:0] b_ack, b_dv;
  bus_req_t a_bus, b_bus; logic a_ack_r, a_dv_r, b_ack_r, b_dv_r;

  assign a_bus = a_req[0] | a_req[1];  assign a_ack_r = |a_ack;  assign a_dv_r = |a_dv;
  assign b_bus = b_req[0] | b_req[1];  assign b_ack_r = |b_ack;  assign b_dv_r = |b_dv;

  bus_wrapper #(.NM(2), .IDX(0), .ADDR_LO(0), .ADDR_HI(0)) u_w0 (
    .clk, .rst_n,
    .tx_valid(tx_valid[0]), .tx_ready(tx_ready[0]), .tx_data(tx_data[0]),
    .rx_valid(rx_valid[0]), .rx_ready(rx_ready[0]), .rx_data(rx_data[0]),
    .bus_req(a_bus), .bus_ack(a_ack_r), .bus_dv(a_dv_r),
    .req_o(a_req[0]), .ack_o(a_ack[0]), .dv_o(a_dv[0]));

  bus_bridge #(.N_AGENTS(2), .BOUNDARY(1), .NM_LO(2), .IDX_LO(1), .NM_HI(2), .IDX_HI(0)) dut (
    .clk, .rst_n,
    .lo_bus_req(a_bus), .lo_bus_ack(a_ack_r), .lo_bus_dv(a_dv_r),
    .lo_req_o(a_req[1]), .lo_ack_o(a_ack[1]), .lo_dv_o(a_dv[1]),
    .hi_bus_req(b_bus), .hi_bus_ack(b_ack_r), .hi_bus_dv(b_dv_r),
    .hi_req_o(b_req[0]), .hi_ack_o(b_ack[0]), .hi_dv_o(b_dv[0]));

  bus_wrapper #(.NM(2), .IDX(1), .ADDR_LO(1), .ADDR_HI(1)) u_w1 (
    .clk, .rst_n,
    .tx_valid(tx_valid[1]), .tx_ready(tx_ready[1]), .tx_data(tx_data[1]),
    .rx_valid(rx_valid[1]), .rx_ready(rx_ready[1]), .rx_data(rx_data[1]),
    .bus_req(b_bus), .bus_ack(b_ack_r), .bus_dv(b_dv_r),
    .req_o(b_req[1]), .ack_o(b_ack[1]), .dv_o(b_dv[1]));

  for (genvar i = 0; i < 2; i++) begin : g_ag
    tb_agent_model #(.ID(i), .N(2), .NPKT(NPKT), .OFFSET(1), .STRIDE(2), .STALL(i * 30)) u_ag (
      .clk, .rst_n, .start,
      .tx_valid(tx_valid[i]), .tx_ready(tx_ready[i]), .tx_data(tx_data[i]),
      .rx_valid(rx_valid[i]), .rx_ready(rx_ready[i]), .rx_data(rx_data[i]),
      .sent(sent[i]), .received(received[i]), .errors(errors[i]), .done(done[i]));
  end

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0d: %s", cyc, what); end
  endtask

  // first packet of agent 0: last word on A, first word on B. Agent 1 may
  // be sending its own packet on B meanwhile, so the bound allows one packet.
  longint a_last = -1, b_first = -1;
  int crossings_up = 0, crossings_dn = 0;
  always @(posedge clk) if (rst_n) begin
    if (a_dv[0] && a_bus.last && a_last < 0) a_last = cyc;
    if (b_dv[0] && b_first < 0) b_first = cyc;
    if (b_dv[0] && b_bus.last) crossings_up++;
    if (a_dv[1] && a_bus.last) crossings_dn++;
    // agent 0 never talks to itself here, so the bridge must not pick up
    // traffic that stays on a segment: every acked header on A is for agent 1
    if (a_bus.av && a_ack[1]) check(a_bus.data == 1, "bridge lower side takes only upper addresses");
    if (b_bus.av && b_ack[0]) check(b_bus.data == 0, "bridge upper side takes only lower addresses");
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (3) @(posedge clk);
    start <= 1;
    @(posedge clk);
    start <= 0;
    while (done != 2'b11) @(posedge clk);
    repeat (5) @(posedge clk);
    for (int i = 0; i < 2; i++) begin
      check(sent[i] == NPKT, $sformatf("agent %0d sent %0d", i, sent[i]));
      check(received[i] == NPKT, $sformatf("agent %0d received %0d", i, received[i]));
      check(errors[i] == 0, $sformatf("agent %0d errors %0d", i, errors[i]));
    end
    check(crossings_up == NPKT && crossings_dn == NPKT,
          $sformatf("bridge crossings %0d up %0d down", crossings_up, crossings_dn));
    check(b_first > a_last, $sformatf("store-and-forward: B starts at %0d, A ended at %0d", b_first, a_last));
    check(b_first - a_last <= PKT_WORDS + 6, $sformatf("bridge forward delay %0d", b_first - a_last));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

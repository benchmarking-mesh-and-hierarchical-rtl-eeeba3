// tb_hier_bus: hierarchical bus of 12 agents in three segments (two bridges,
// so the middle segment has six masters). Every agent sends one packet to
// every agent, itself included, some agents reading their receive port only
// now and then. Checked: every packet arrives intact and in order, and the
// bridges carry exactly the packets that must cross them (counted from the
// traffic pattern: a packet from segment s to segment t crosses |s - t|
// bridges). The total run time is reported.
module tb_hier_bus;
  import noc_pkg::*;
  localparam int unsigned N    = 12;
  localparam int unsigned SEG  = 4;
  localparam int unsigned NSEG = N / SEG;
  localparam int unsigned NPKT = N;

  logic clk = 0, rst_n = 0, start = 0;
  int checks = 0, failures = 0;
  longint cyc = 0;

  logic  [N-1:0] tx_valid, tx_ready, rx_valid, rx_ready;
  word_t [N-1:0] tx_data, rx_data;
  int unsigned sent [N], received [N], errors [N];
  logic [N-1:0] done;

  hier_bus #(.N_AGENTS(N), .SEG_AGENTS(SEG)) dut (.*);

  for (genvar i = 0; i < N; i++) begin : g_ag
    tb_agent_model #(.ID(i), .N(N), .NPKT(NPKT), .OFFSET(0), .STALL((i % 3 == 0) ? 40 : 0)) u_ag (
      .clk, .rst_n, .start,
      .tx_valid(tx_valid[i]), .tx_ready(tx_ready[i]), .tx_data(tx_data[i]),
      .rx_valid(rx_valid[i]), .rx_ready(rx_ready[i]), .rx_data(rx_data[i]),
      .sent(sent[i]), .received(received[i]), .errors(errors[i]), .done(done[i]));
  end

  // packets crossing each bridge, per direction
  int up [NSEG-1], dn [NSEG-1];
  for (genvar b = 0; b + 1 < NSEG; b++) begin : g_mon
    always @(posedge clk) if (rst_n) begin
      if (dut.g_bridge[b].u_bridge.hi_dv_o && dut.g_bridge[b].u_bridge.hi_req_o.last) up[b]++;
      if (dut.g_bridge[b].u_bridge.lo_dv_o && dut.g_bridge[b].u_bridge.lo_req_o.last) dn[b]++;
    end
  end

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0d: %s", cyc, what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t0;
    for (int b = 0; b + 1 < NSEG; b++) begin up[b] = 0; dn[b] = 0; end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (3) @(posedge clk);
    start <= 1; t0 = cyc;
    @(posedge clk);
    start <= 0;
    while (done != '1) @(posedge clk);
    $display("all-to-all on %0d agents took %0d cycles", N, cyc - t0);
    repeat (5) @(posedge clk);
    for (int i = 0; i < N; i++) begin
      check(sent[i] == NPKT, $sformatf("agent %0d sent %0d", i, sent[i]));
      check(received[i] == N, $sformatf("agent %0d received %0d", i, received[i]));
      check(errors[i] == 0, $sformatf("agent %0d errors %0d", i, errors[i]));
    end
    // bridge b separates segments <= b from segments > b
    for (int b = 0; b + 1 < NSEG; b++) begin
      automatic int exp_up = 0, exp_dn = 0;
      for (int s = 0; s < N; s++)
        for (int d = 0; d < N; d++) begin
          if (s / SEG <= b && d / SEG > b) exp_up++;
          if (s / SEG > b && d / SEG <= b) exp_dn++;
        end
      check(up[b] == exp_up, $sformatf("bridge %0d up %0d expected %0d", b, up[b], exp_up));
      check(dn[b] == exp_dn, $sformatf("bridge %0d down %0d expected %0d", b, dn[b], exp_dn));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

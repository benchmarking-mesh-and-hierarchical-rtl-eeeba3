// tb_bus_wrapper: one bus segment of three wrappers (agents 0, 1, 2), with
// the bus lines ORed in the testbench.
// Checks: a packet arrives intact at the addressed agent only; it crosses
// the bus as PKT_WORDS back-to-back words; the sender waits at most one
// round (NM cycles) for ownership; with all three agents loaded the packets
// go out in round-robin order; a receiver with a full receive FIFO refuses
// the header (the sender passes its turn) and gets the packet once drained.
module tb_bus_wrapper;
  import noc_pkg::*;
  localparam int unsigned NM = 3;

  logic clk = 0, rst_n = 0;
  logic  [NM-1:0] tx_valid, tx_ready, rx_valid, rx_ready;
  word_t [NM-1:0] tx_data, rx_data;
  bus_req_t [NM-1:0] req_o;
  logic [NM-1:0] ack_o, dv_o;
  bus_req_t bus_req;
  logic bus_ack, bus_dv;
  int checks = 0, failures = 0;
  longint cyc = 0;

  for (genvar i = 0; i < NM; i++) begin : g_w
    bus_wrapper #(.NM(NM), .IDX(i), .ADDR_LO(i), .ADDR_HI(i)) dut (
      .clk, .rst_n,
      .tx_valid(tx_valid[i]), .tx_ready(tx_ready[i]), .tx_data(tx_data[i]),
      .rx_valid(rx_valid[i]), .rx_ready(rx_ready[i]), .rx_data(rx_data[i]),
      .bus_req, .bus_ack, .bus_dv,
      .req_o(req_o[i]), .ack_o(ack_o[i]), .dv_o(dv_o[i])
    );
  end

  always_comb begin
    bus_req = '0; bus_ack = 1'b0; bus_dv = 1'b0;
    for (int i = 0; i < NM; i++) begin
      bus_req |= req_o[i];
      bus_ack |= ack_o[i];
      bus_dv  |= dv_o[i];
    end
  end

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0d: %s", cyc, what); end
  endtask

  // bus monitor: run lengths, sender order, refusals
  int run_len = 0, cur_sender = -1, refusals = 0, passes = 0;
  int senders [$];
  always @(posedge clk) if (rst_n) begin
    if (bus_req.av && !bus_ack) refusals++;
    if (!bus_dv && !bus_req.av) passes++;
    if (bus_dv) begin
      if (run_len == 0) begin
        for (int i = 0; i < NM; i++) if (dv_o[i]) cur_sender = i;
        senders.push_back(cur_sender);
        check($onehot(dv_o), "one sender");
      end
      run_len++;
      if (bus_req.last) begin
        check(run_len == PKT_WORDS, $sformatf("packet took %0d bus words", run_len));
        run_len = 0;
      end
    end else begin
      check(run_len == 0, "packet interrupted");
    end
  end

  function automatic word_t pw(input int src, input int dst, input int j);
    if (j == 0) return word_t'(dst);
    if (j == 1) return word_t'(src);
    return word_t'(32'hC0DE_0000 + src * 256 + dst * 16 + j);
  endfunction

  task automatic load(input int src, input int dst);
    for (int j = 0; j < PKT_WORDS; j++) begin
      tx_valid[src] <= 1'b1; tx_data[src] <= pw(src, dst, j);
      @(posedge clk);
      while (!tx_ready[src]) @(posedge clk);
    end
    tx_valid[src] <= 1'b0;
  endtask

  // read one packet at agent dst and compare
  task automatic expect_pkt(input int dst, input int src);
    for (int j = 0; j < PKT_WORDS; j++) begin
      rx_ready[dst] <= 1'b1;
      @(posedge clk);
      while (!rx_valid[dst]) @(posedge clk);
      check(rx_data[dst] == pw(src, dst, j), $sformatf("agent %0d word %0d = %h", dst, j, rx_data[dst]));
    end
    rx_ready[dst] <= 1'b0;
  endtask

  // read one packet from any source at agent dst, return its source
  task automatic expect_any(input int dst, output int src);
    word_t w [PKT_WORDS];
    for (int j = 0; j < PKT_WORDS; j++) begin
      rx_ready[dst] <= 1'b1;
      @(posedge clk);
      while (!rx_valid[dst]) @(posedge clk);
      w[j] = rx_data[dst];
    end
    rx_ready[dst] <= 1'b0;
    src = int'(w[1]);
    for (int j = 0; j < PKT_WORDS; j++)
      check(w[j] == pw(src, dst, j), $sformatf("agent %0d word %0d = %h", dst, j, w[j]));
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t_loaded, t_first;
    tx_valid = '0; rx_ready = '0; tx_data = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (5) @(posedge clk);

    // A: single packet 0 -> 2, ownership wait and transfer time
    load(0, 2);
    t_loaded = cyc;
    @(posedge clk);
    while (!bus_dv) @(posedge clk);
    t_first = cyc;
    check(t_first - t_loaded <= NM + 1, $sformatf("waited %0d cycles for ownership", t_first - t_loaded));
    check(senders[$] == 0, "sender is agent 0");
    repeat (PKT_WORDS + 1) @(posedge clk);
    check(!rx_valid[1] && !rx_valid[0], "only the addressed agent receives");
    check(rx_valid[2], "agent 2 has data");
    expect_pkt(2, 0);

    // B: all three loaded at once -> round-robin order
    senders.delete();
    fork
      load(0, 1);
      load(1, 2);
      load(2, 0);
    join
    fork
      expect_pkt(1, 0);
      expect_pkt(2, 1);
      expect_pkt(0, 2);
    join
    check(senders.size() == 3, "three packets sent");
    if (senders.size() == 3)
      check(senders[1] == (senders[0] + 1) % NM && senders[2] == (senders[1] + 1) % NM,
            $sformatf("round-robin order %0d %0d %0d", senders[0], senders[1], senders[2]));

    // C: receiver full -> refusal, then delivery after draining
    refusals = 0;
    fork
      load(0, 2);
      load(1, 2);
    join
    repeat (40) @(posedge clk);
    check(refusals > 0, $sformatf("refused headers: %0d", refusals));
    begin
      int s0, s1;
      expect_any(2, s0);
      expect_any(2, s1);
      check((s0 == 0 && s1 == 1) || (s0 == 1 && s1 == 0), $sformatf("sources %0d %0d", s0, s1));
    end
    check(passes > 0, "idle ownership passes seen");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

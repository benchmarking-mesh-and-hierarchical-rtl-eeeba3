// tb_mesh_router: the router at row 1, column 1 of a 3 x 3 mesh, with the
// testbench playing its four neighbours and its agent.
// Checked: dimension-order routing (row first: a packet for row 0 leaves
// North even when its column lies East), local delivery, pass-through from a
// neighbour input, words leaving as one unbroken run of PKT_WORDS, a packet
// granted within one scan round (five cycles) plus one after it is whole,
// nothing sent while the next router has no room, two packets for the same
// output sent one after the other, and two packets for different outputs
// sent at the same time.
module tb_mesh_router;
  import noc_pkg::*;

  logic clk = 0, rst_n = 0;
  link_t [3:0] in_link, out_link;
  logic  [3:0] room_out, room_in;
  logic  tx_valid, tx_ready, rx_valid, rx_ready;
  word_t tx_data, rx_data;
  int checks = 0, failures = 0;
  longint cyc = 0;

  mesh_router #(.ROWS(3), .COLS(3), .MY_ROW(1), .MY_COL(1)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0d: %s", cyc, what); end
  endtask

  function automatic word_t pw(input int dst, input int tag, input int j);
    if (j == 0) return word_t'(dst);
    if (j == 1) return word_t'(tag);
    return word_t'(tag * 256 + j);
  endfunction

  // collectors per output port (0..3 links, 4 local agent)
  word_t  outq [5][$];
  int     run  [5];
  longint first_word [5];
  int     max_parallel = 0;
  always @(posedge clk) if (rst_n) begin
    int par;
    par = 0;
    for (int o = 0; o < 5; o++) begin
      logic  v;
      word_t d;
      v = (o < 4) ? out_link[o].valid : (rx_valid && rx_ready);
      d = (o < 4) ? out_link[o].data  : rx_data;
      if (o < 4 && v) par++;
      if (v) begin
        if (outq[o].size() % PKT_WORDS == 0) first_word[o] = cyc;
        outq[o].push_back(d);
        run[o]++;
      end else if (o < 4) begin
        if (run[o] % PKT_WORDS != 0) begin
          failures++; checks++;
          $display("FAIL @%0d: output %0d broke a packet after %0d words", cyc, o, run[o]);
        end
        run[o] = 0;
      end
    end
    if (par > max_parallel) max_parallel = par;
  end

  // write one packet into input port p (0..3 neighbour links, 4 agent)
  task automatic put(input int p, input int dst, input int tag);
    if (p < 4) while (!room_out[p]) @(posedge clk);
    for (int j = 0; j < PKT_WORDS; j++) begin
      if (p < 4) begin
        in_link[p].valid <= 1'b1; in_link[p].data <= pw(dst, tag, j);
        @(posedge clk);
      end else begin
        tx_valid <= 1'b1; tx_data <= pw(dst, tag, j);
        @(posedge clk);
        while (!tx_ready) @(posedge clk);
      end
    end
    if (p < 4) in_link[p].valid <= 1'b0; else tx_valid <= 1'b0;
  endtask

  // pop one packet from output o and compare
  task automatic expect_out(input int o, input int dst, input int tag);
    longint t;
    t = cyc;
    while (outq[o].size() < PKT_WORDS && cyc - t < 200) @(posedge clk);
    check(outq[o].size() >= PKT_WORDS, $sformatf("output %0d got no packet for tag %0d", o, tag));
    if (outq[o].size() >= PKT_WORDS)
      for (int j = 0; j < PKT_WORDS; j++) begin
        word_t w;
        w = outq[o].pop_front();
        check(w == pw(dst, tag, j), $sformatf("output %0d tag %0d word %0d = %h", o, tag, j, w));
      end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // agents: 0 1 2 / 3 [4] 5 / 6 7 8
  int dsts [6] = '{1, 2, 7, 6, 5, 3};
  int dirs [6] = '{0, 0, 2, 2, 1, 3};

  initial begin
    longint t_done;
    in_link = '0; room_in = '1; tx_valid = 0; tx_data = '0; rx_ready = 1;
    for (int o = 0; o < 5; o++) run[o] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (3) @(posedge clk);

    // 1: routing from the agent port, one at a time, with grant latency
    for (int i = 0; i < 6; i++) begin
      put(4, dsts[i], 10 + i);
      t_done = cyc;
      expect_out(dirs[i], dsts[i], 10 + i);
      check(first_word[dirs[i]] - t_done <= 6,
            $sformatf("grant took %0d cycles", first_word[dirs[i]] - t_done));
    end
    // local delivery from the West link
    put(3, 4, 20);
    expect_out(4, 4, 20);
    // pass-through West -> East and North -> South
    put(3, 5, 21);
    expect_out(1, 5, 21);
    put(0, 7, 22);
    expect_out(2, 7, 22);

    // 2: no room at East: the packet waits, then goes
    room_in[1] = 1'b0;
    put(0, 5, 30);
    repeat (40) @(posedge clk);
    check(outq[1].size() == 0, "nothing sent without room");
    room_in[1] = 1'b1;
    expect_out(1, 5, 30);

    // 3: two inputs to the same output (South), one after the other
    fork
      put(1, 7, 40);
      put(3, 8, 41);
    join
    repeat (60) @(posedge clk);
    check(outq[2].size() == 2 * PKT_WORDS, "two packets on South");
    if (outq[2].size() == 2 * PKT_WORDS) begin
      if (outq[2][1] == 40) begin expect_out(2, 7, 40); expect_out(2, 8, 41); end
      else begin expect_out(2, 8, 41); expect_out(2, 7, 40); end
    end

    // 4: different outputs at the same time
    max_parallel = 0;
    fork
      put(0, 7, 50);   // N -> S
      put(2, 1, 51);   // S -> N
      put(1, 3, 52);   // E -> W
    join
    expect_out(2, 7, 50);
    expect_out(0, 1, 51);
    expect_out(3, 3, 52);
    check(max_parallel >= 2, $sformatf("parallel outputs %0d", max_parallel));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_mesh: a 3 x 4 mesh (12 agents, not square, to catch row/column mix-ups).
// Every agent sends one packet to every agent, itself included, some agents
// reading their receive port only now and then. Checked: every packet
// arrives intact and in order, and the number of packets leaving every
// router through every port equals the count from a model of dimension-order
// routing (first along the column to the destination row, then along the
// row). The total run time is reported.
module tb_mesh;
  import noc_pkg::*;
  localparam int unsigned ROWS = 3;
  localparam int unsigned COLS = 4;
  localparam int unsigned N    = ROWS * COLS;

  logic clk = 0, rst_n = 0, start = 0;
  int checks = 0, failures = 0;
  longint cyc = 0;

  logic  [N-1:0] tx_valid, tx_ready, rx_valid, rx_ready;
  word_t [N-1:0] tx_data, rx_data;
  int unsigned sent [N], received [N], errors [N];
  logic [N-1:0] done;

  mesh #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  for (genvar i = 0; i < N; i++) begin : g_ag
    tb_agent_model #(.ID(i), .N(N), .NPKT(N), .OFFSET(3), .STALL((i % 4 == 1) ? 50 : 0)) u_ag (
      .clk, .rst_n, .start,
      .tx_valid(tx_valid[i]), .tx_ready(tx_ready[i]), .tx_data(tx_data[i]),
      .rx_valid(rx_valid[i]), .rx_ready(rx_ready[i]), .rx_data(rx_data[i]),
      .sent(sent[i]), .received(received[i]), .errors(errors[i]), .done(done[i]));
  end

  // packets leaving each router per port: 0 N, 1 E, 2 S, 3 W, 4 local
  int pk [N][5];
  for (genvar r = 0; r < ROWS; r++) begin : g_mr
    for (genvar c = 0; c < COLS; c++) begin : g_mc
      always @(posedge clk) if (rst_n) begin
        for (int o = 0; o < 5; o++)
          if (dut.g_row[r].g_col[c].u_router.out_busy[o] &&
              dut.g_row[r].g_col[c].u_router.out_cnt[o] == PKT_WORDS - 1)
            pk[r * COLS + c][o]++;
      end
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

  int model [N][5];

  initial begin
    longint t0;
    for (int i = 0; i < N; i++) for (int o = 0; o < 5; o++) begin pk[i][o] = 0; model[i][o] = 0; end
    // walk every route
    for (int s = 0; s < N; s++)
      for (int d = 0; d < N; d++) begin
        automatic int r = s / COLS, c = s % COLS;
        automatic int dr = d / COLS, dc = d % COLS;
        while (r != dr) begin
          if (dr < r) begin model[r * COLS + c][0]++; r--; end
          else        begin model[r * COLS + c][2]++; r++; end
        end
        while (c != dc) begin
          if (dc > c) begin model[r * COLS + c][1]++; c++; end
          else        begin model[r * COLS + c][3]++; c--; end
        end
        model[r * COLS + c][4]++;
      end

    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (3) @(posedge clk);
    start <= 1; t0 = cyc;
    @(posedge clk);
    start <= 0;
    while (done != '1) @(posedge clk);
    $display("all-to-all on a %0dx%0d mesh took %0d cycles", ROWS, COLS, cyc - t0);
    repeat (5) @(posedge clk);
    for (int i = 0; i < N; i++) begin
      check(sent[i] == N, $sformatf("agent %0d sent %0d", i, sent[i]));
      check(received[i] == N, $sformatf("agent %0d received %0d", i, received[i]));
      check(errors[i] == 0, $sformatf("agent %0d errors %0d", i, errors[i]));
      for (int o = 0; o < 5; o++)
        check(pk[i][o] == model[i][o],
              $sformatf("router %0d port %0d carried %0d expected %0d", i, o, pk[i][o], model[i][o]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

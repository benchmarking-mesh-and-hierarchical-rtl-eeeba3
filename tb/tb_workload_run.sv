// tb_workload_run: runs the five benchmark test cases on both networks of
// one noc_top of ROWS x COLS agents (bus segments of four), see tb_workload.
// Each case starts from reset; every agent is a tb_tg_agent with processing
// time P and transfer length D, every computation process firing once.
// Checked per case: every process fires and every transfer arrives at the
// right agent; the sequential cases 1 and 3 take at least their critical
// path (each ring's transfers one after the other, PKT_WORDS cycles per
// packet at the least, plus P per process); the mesh is not slower than the
// bus on the parallel cases 2 and 4. Printed per case: both execution times,
// the mesh speedup and the closed-form estimate
//   t = sum(P) / min(N, S) + sum(D * k) / min(N, L, S),
//   k = (payload + header + arbitration) / payload,
// with S start processes, L links (N/4 for the bus, 4(N - sqrt N) for the
// mesh) and an arbitration term of 6 cycles for the bus and 2.5 for the
// mesh; case 5's estimate is the sum of cases 1-4. `finished` rises when all
// cases are through.
module tb_workload_run
  import noc_pkg::*;
#(
  parameter int unsigned ROWS = 4,
  parameter int unsigned COLS = 4,
  parameter int unsigned P    = 16,
  parameter int unsigned D    = 1024
) (
  input  logic clk,
  output logic finished,
  output int   checks,
  output int   failures
);
  localparam int unsigned SEG = 4;
  localparam int unsigned N   = ROWS * COLS;
  localparam int unsigned NPK = (D + PAY_WORDS - 1) / PAY_WORDS;

  logic rst_n = 0, start = 0;
  logic [3:0] cases = 4'b0001;
  longint cyc = 0;

  logic  [N-1:0] hb_tx_valid, hb_tx_ready, hb_rx_valid, hb_rx_ready;
  word_t [N-1:0] hb_tx_data, hb_rx_data;
  logic  [N-1:0] mh_tx_valid, mh_tx_ready, mh_rx_valid, mh_rx_ready;
  word_t [N-1:0] mh_tx_data, mh_rx_data;
  int unsigned hb_fired [N], hb_err [N], mh_fired [N], mh_err [N];
  logic [N-1:0] hb_done, mh_done;

  noc_top #(.MESH_ROWS(ROWS), .MESH_COLS(COLS), .SEG_AGENTS(SEG)) dut (.*);

  for (genvar i = 0; i < N; i++) begin : g_ag
    tb_tg_agent #(.ID(i), .N(N), .P(P), .D(D), .ITER(1)) u_hb (
      .clk, .rst_n, .start, .cases,
      .tx_valid(hb_tx_valid[i]), .tx_ready(hb_tx_ready[i]), .tx_data(hb_tx_data[i]),
      .rx_valid(hb_rx_valid[i]), .rx_ready(hb_rx_ready[i]), .rx_data(hb_rx_data[i]),
      .fired(hb_fired[i]), .errors(hb_err[i]), .done(hb_done[i]));
    tb_tg_agent #(.ID(i), .N(N), .P(P), .D(D), .ITER(1)) u_mh (
      .clk, .rst_n, .start, .cases,
      .tx_valid(mh_tx_valid[i]), .tx_ready(mh_tx_ready[i]), .tx_data(mh_tx_data[i]),
      .rx_valid(mh_rx_valid[i]), .rx_ready(mh_rx_ready[i]), .rx_data(mh_rx_data[i]),
      .fired(mh_fired[i]), .errors(mh_err[i]), .done(mh_done[i]));
  end

  always @(posedge clk) cyc++;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0d (%0d agents): %s", cyc, N, what); end
  endtask

  function automatic real minr(input real a, input real b);
    return (a < b) ? a : b;
  endfunction

  // closed-form estimate of one of cases 1-4 (N computation processes)
  function automatic real estimate(input int c, input bit mesh_net);
    real s, l, k;
    case (c)
      1: s = 1.0;
      2: s = N / 2.0;
      3: s = N / 4.0;
      default: s = N;
    endcase
    l = mesh_net ? 4.0 * (N - $sqrt(real'(N))) : N / 4.0;
    k = (PAY_WORDS + HDR_WORDS + (mesh_net ? 2.5 : 6.0)) / real'(PAY_WORDS);
    return (N * P) / minr(N, s) + (N * D * k) / minr(minr(N, l), s);
  endfunction

  longint t_hb, t_mh;
  initial begin
    checks = 0; failures = 0; finished = 0;
    for (int c = 1; c <= 5; c++) begin
      automatic longint t0;
      automatic int per_agent = (c == 5) ? 4 : 1;
      automatic real e_hb = 0.0, e_mh = 0.0;
      for (int e = 1; e <= 4; e++)
        if (c == 5 || c == e) begin e_hb += estimate(e, 0); e_mh += estimate(e, 1); end
      cases = (c == 5) ? 4'b1111 : 4'(1 << (c - 1));
      rst_n <= 0;
      repeat (3) @(posedge clk);
      rst_n <= 1;
      repeat (3) @(posedge clk);
      start <= 1; t0 = cyc; t_hb = -1; t_mh = -1;
      @(posedge clk);
      start <= 0;
      while (t_hb < 0 || t_mh < 0) begin
        @(posedge clk);
        if (t_hb < 0 && hb_done == '1) t_hb = cyc - t0;
        if (t_mh < 0 && mh_done == '1) t_mh = cyc - t0;
      end
      // let the last transfers drain into the receivers
      repeat (200) @(posedge clk);
      $display("%2d agents, case %0d: bus %7d cycles (estimate %7.0f), mesh %7d cycles (estimate %7.0f), speedup %0.2f",
               N, c, t_hb, e_hb, t_mh, e_mh, real'(t_hb) / real'(t_mh));
      for (int i = 0; i < N; i++) begin
        check(hb_fired[i] == per_agent && hb_err[i] == 0,
              $sformatf("case %0d bus agent %0d fired %0d errors %0d", c, i, hb_fired[i], hb_err[i]));
        check(mh_fired[i] == per_agent && mh_err[i] == 0,
              $sformatf("case %0d mesh agent %0d fired %0d errors %0d", c, i, mh_fired[i], mh_err[i]));
      end
      if (c == 1 || c == 3) begin
        automatic longint bound = ((c == 1) ? N : 4) * (P + NPK * PKT_WORDS);
        check(t_hb >= bound && t_mh >= bound,
              $sformatf("case %0d faster than its critical path %0d", c, bound));
      end
      if (c == 2 || c == 4)
        check(t_mh <= t_hb, $sformatf("case %0d: mesh slower than bus", c));
    end
    finished = 1;
  end
endmodule

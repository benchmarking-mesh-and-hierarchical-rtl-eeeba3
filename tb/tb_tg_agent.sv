// tb_tg_agent: behavioural agent that runs the benchmark's process graphs.
//
// Each agent hosts one computation process of every test case enabled in
// `cases` (bit c-1 for case c; case 5 is all four). A process waits until a
// whole transfer of D words from its predecessor has arrived (or, at the
// start, for the token of its start process), computes for P cycles and
// then sends D words to its successor, as ceil(D / 8) packets. It fires
// ITER times. The agent has one processor, so its processes compute one at
// a time, lowest case first; transfers queue at the agent's transmit port
// and go out in order while the processor goes on.
// Process graphs (agent i, groups of four agents 4g..4g+3):
//   case 1  ring over all agents, i -> i+1 mod N, one start at agent 0
//   case 2  the same ring, starts at the N/2 even agents
//   case 3  a ring inside each group, one start per group (its first agent)
//   case 4  the same group rings, a start at every agent
// Header word 2 carries the case number in bits 31:28 so that a receiver
// knows which of its processes a packet feeds. Not synthesizable.
module tb_tg_agent
  import noc_pkg::*;
#(
  parameter int unsigned ID    = 0,
  parameter int unsigned N     = 16,
  parameter int unsigned P     = 16,
  parameter int unsigned D     = 1024,
  parameter int unsigned ITER  = 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [3:0]  cases,    // bit c-1 enables case c, sampled at start
  output logic        tx_valid,
  input  logic        tx_ready,
  output word_t       tx_data,
  input  logic        rx_valid,
  output logic        rx_ready,
  input  word_t       rx_data,
  output int unsigned fired,
  output int unsigned errors,
  output logic        done
);

  localparam int unsigned NPK = (D + PAY_WORDS - 1) / PAY_WORDS;

  function automatic int unsigned succ(input int unsigned c, input int unsigned i);
    if (c <= 2) return (i + 1) % N;
    return (i / 4) * 4 + (i % 4 + 1) % 4;
  endfunction
  function automatic int unsigned pred(input int unsigned c, input int unsigned i);
    if (c <= 2) return (i + N - 1) % N;
    return (i / 4) * 4 + (i % 4 + 3) % 4;
  endfunction
  function automatic bit has_start(input int unsigned c, input int unsigned i);
    case (c)
      1: return i == 0;
      2: return i % 2 == 0;
      3: return i % 4 == 0;
      default: return 1'b1;
    endcase
  endfunction

  int unsigned tokens [1:4], nfired [1:4], rx_pk [1:4];
  int unsigned busy_cnt, cur_case;
  int unsigned txq [$];            // case of each queued transfer
  int unsigned tx_pk, tx_w;
  int unsigned rw;
  word_t       hdr2;
  logic        running;

  // ---------------------------------------------------------------- transmit
  always_comb begin
    tx_data = '0;
    if (txq.size() != 0) begin
      if (tx_w == 0)      tx_data = word_t'(succ(txq[0], ID));
      else if (tx_w == 1) tx_data = word_t'(ID);
      else if (tx_w == 2) tx_data = word_t'({4'(txq[0]), 28'(tx_pk)});
      else                tx_data = word_t'(ID * 65536 + tx_pk * 16 + tx_w);
    end
  end
  assign tx_valid = (txq.size() != 0);
  assign rx_ready = 1'b1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      running  <= 1'b0;
      busy_cnt <= 0;
      cur_case <= 0;
      tx_pk    <= 0;
      tx_w     <= 0;
      rw       <= 0;
      errors   <= 0;
      fired    <= 0;
      txq.delete();
      for (int c = 1; c <= 4; c++) begin
        tokens[c] <= 0; nfired[c] <= 0; rx_pk[c] <= 0;
      end
    end else begin
      automatic int unsigned got = 0;
      if (start) begin
        running <= 1'b1;
        for (int c = 1; c <= 4; c++)
          if (cases[c-1] && has_start(c, ID)) tokens[c] <= 1;
      end

      // receive: count whole transfers per case
      if (rx_valid) begin
        if (rw == 0 && rx_data != word_t'(ID)) errors <= errors + 1;
        if (rw == 2) hdr2 <= rx_data;
        if (rw == PKT_WORDS - 1) begin
          automatic int unsigned c = int'(hdr2[31:28]);
          rw <= 0;
          if (c < 1 || c > 4 || !cases[c-1]) errors <= errors + 1;
          else if (rx_pk[c] == NPK - 1) begin rx_pk[c] <= 0; got = c; end
          else rx_pk[c] <= rx_pk[c] + 1;
        end else rw <= rw + 1;
      end

      // processor: pick a ready process, compute P cycles, queue its output
      if (running) begin
        if (busy_cnt != 0) begin
          if (busy_cnt == 1) begin
            txq.push_back(cur_case);
            nfired[cur_case] <= nfired[cur_case] + 1;
            fired <= fired + 1;
          end
          busy_cnt <= busy_cnt - 1;
        end else begin
          for (int c = 1; c <= 4; c++)
            if (busy_cnt == 0 && cases[c-1] && tokens[c] != 0 && nfired[c] < ITER) begin
              tokens[c] <= tokens[c] - 1 + ((got == c) ? 1 : 0);
              busy_cnt  <= P;
              cur_case  <= c;
              got = 0;
              break;
            end
        end
      end
      if (got != 0) tokens[got] <= tokens[got] + 1;

      // transmit: words of the transfer at the head of the queue
      if (tx_valid && tx_ready) begin
        if (tx_w == PKT_WORDS - 1) begin
          tx_w <= 0;
          if (tx_pk == NPK - 1) begin tx_pk <= 0; void'(txq.pop_front()); end
          else tx_pk <= tx_pk + 1;
        end else tx_w <= tx_w + 1;
      end
    end
  end

  // done when every enabled process has fired ITER times and sent everything
  always_comb begin
    done = (txq.size() == 0);
    for (int c = 1; c <= 4; c++)
      if (cases[c-1] && nfired[c] != ITER) done = 1'b0;
  end

endmodule

// tb_agent_model: behavioural traffic agent for the network testbenches.
//
// Stands in for a processing element on one agent port of either network.
// After `start` it sends NPKT packets, the k-th to agent
// (ID + OFFSET + k * STRIDE) mod N, each of PKT_WORDS words: word 0 the
// destination, word 1 the source ID, word 2 the sequence number k, then
// payload words that are a fixed function of (source, k, word index). Between
// packets it waits GAP cycles. All agents of one network must share N, NPKT,
// OFFSET and STRIDE: the receive check recomputes the senders' pattern.
// The receive side reassembles the words it gets into packets and checks
// every one: destination equals ID, payload matches
// the function of its source and sequence number, and from every source the
// sequence numbers arrive in order (the networks deliver in order). When
// STALL is non-zero rx_ready drops at random in about STALL% of the cycles,
// which lets receive buffers fill up. Outputs count what was sent, received
// and wrong, and `done` rises when everything expected has arrived.
// Not synthesizable.
module tb_agent_model
  import noc_pkg::*;
#(
  parameter int unsigned ID     = 0,
  parameter int unsigned N      = 4,
  parameter int unsigned NPKT   = 3,
  parameter int unsigned OFFSET = 1,
  parameter int unsigned STRIDE = 1,
  parameter int unsigned GAP    = 0,
  parameter int unsigned STALL  = 0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  output logic        tx_valid,
  input  logic        tx_ready,
  output word_t       tx_data,
  input  logic        rx_valid,
  output logic        rx_ready,
  input  word_t       rx_data,
  output int unsigned sent,
  output int unsigned received,
  output int unsigned errors,
  output logic        done
);

  function automatic word_t payload(input int unsigned src, input int unsigned seq, input int unsigned j);
    return word_t'((src * 32'h0001_0003) ^ (seq * 32'h0100_0101) ^ (j * 32'h1357_9bdf) ^ 32'hA5A5_0000);
  endfunction

  function automatic int unsigned dest_of(input int unsigned src, input int unsigned k);
    return (src + OFFSET + k * STRIDE) % N;
  endfunction

  // how many packets each source sends to this agent
  int unsigned expect_from [N];
  int unsigned expect_total;
  initial begin
    expect_total = 0;
    for (int unsigned s = 0; s < N; s++) begin
      expect_from[s] = 0;
      for (int unsigned k = 0; k < NPKT; k++)
        if (dest_of(s, k) == ID) expect_from[s]++;
      expect_total += expect_from[s];
    end
  end

  // ---------------------------------------------------------------- transmit
  int unsigned k, w, gap_cnt;
  logic        running;

  always_comb begin
    tx_data = '0;
    if (w == 0)      tx_data = word_t'(dest_of(ID, k));
    else if (w == 1) tx_data = word_t'(ID);
    else if (w == 2) tx_data = word_t'(k);
    else             tx_data = payload(ID, k, w);
  end
  assign tx_valid = running && (k < NPKT) && (gap_cnt == 0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      running <= 1'b0;
      k       <= 0;
      w       <= 0;
      gap_cnt <= 0;
      sent    <= 0;
    end else begin
      if (start) running <= 1'b1;
      if (gap_cnt != 0) gap_cnt <= gap_cnt - 1;
      if (tx_valid && tx_ready) begin
        if (w == PKT_WORDS - 1) begin
          w       <= 0;
          k       <= k + 1;
          sent    <= sent + 1;
          gap_cnt <= GAP;
        end else begin
          w <= w + 1;
        end
      end
    end
  end

  // ---------------------------------------------------------------- receive
  word_t       pkt [PKT_WORDS];
  int unsigned rw;
  int unsigned next_seq [N];

  always_ff @(posedge clk) begin
    if (!rst_n) rx_ready <= 1'b0;
    else        rx_ready <= (STALL == 0) || (($urandom % 100) >= STALL);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rw       <= 0;
      received <= 0;
      errors   <= 0;
      for (int s = 0; s < N; s++) next_seq[s] <= 0;
    end else if (rx_valid && rx_ready) begin
      pkt[rw] <= rx_data;
      if (rw == PKT_WORDS - 1) begin
        int unsigned src, seq, bad;
        rw  <= 0;
        src = pkt[1];
        seq = pkt[2];
        bad = 0;
        if (pkt[0] != word_t'(ID) || src >= N) bad = 1;
        else begin
          if (dest_of(src, seq) != ID) bad = 1;
          if (seq < next_seq[src]) bad = 1;   // duplicate or out of order
          next_seq[src] <= seq + 1;
          for (int unsigned j = 3; j < PKT_WORDS - 1; j++)
            if (pkt[j] != payload(src, seq, j)) bad = 1;
          if (rx_data != payload(src, seq, PKT_WORDS - 1)) bad = 1;
        end
        if (bad != 0) begin
          errors <= errors + 1;
          $display("agent %0d: bad packet dst=%0h src=%0d seq=%0d", ID, pkt[0], src, seq);
        end
        received <= received + 1;
      end else begin
        rw <= rw + 1;
      end
    end
  end

  assign done = (sent == NPKT) && (received == expect_total);

endmodule

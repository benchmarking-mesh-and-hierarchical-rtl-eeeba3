// tb_packet_fifo: self-checking test of the packet FIFO.
// Random writes and reads (also writes to a full FIFO with and without a
// simultaneous read) are checked against a queue model: head word, count,
// full and empty after every cycle, and a whole packet (11 words) must fit.
module tb_packet_fifo;
  localparam int unsigned WIDTH = 32;
  localparam int unsigned DEPTH = 11;
  localparam int unsigned CW    = $clog2(DEPTH + 1);

  logic clk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0;
  logic [WIDTH-1:0] wr_data = '0, rd_data;
  logic [CW-1:0] count;
  logic full, empty;
  int checks = 0, failures = 0;
  logic [WIDTH-1:0] model [$];

  packet_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic compare();
    check(count == CW'(model.size()), $sformatf("count %0d model %0d", count, model.size()));
    check(empty == (model.size() == 0), "empty flag");
    check(full == (model.size() == DEPTH), "full flag");
    if (model.size() != 0) check(rd_data == model[0], $sformatf("head %h model %h", rd_data, model[0]));
  endtask

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    compare();
    // fill with one whole packet
    for (int i = 0; i < DEPTH; i++) begin
      wr_en = 1; wr_data = 32'h100 + i;
      @(posedge clk); model.push_back(wr_data);
      @(negedge clk); compare();
    end
    check(full, "full after one packet");
    // write to a full FIFO without reading: ignored (expect assertion quiet: skip)
    // write and read together while full
    wr_en = 1; rd_en = 1; wr_data = 32'hABCD;
    @(posedge clk); void'(model.pop_front()); model.push_back(32'hABCD);
    @(negedge clk); compare();
    // random traffic
    for (int i = 0; i < 4000; i++) begin
      bit w, r;
      w = ($urandom % 2) == 1;
      r = ($urandom % 2) == 1 && model.size() != 0;
      if (model.size() == DEPTH && !r) w = 0;
      wr_en = w; rd_en = r; wr_data = $urandom;
      @(posedge clk);
      if (r) void'(model.pop_front());
      if (w) model.push_back(wr_data);
      @(negedge clk); compare();
    end
    wr_en = 0; rd_en = 0;
    // drain
    while (model.size() != 0) begin
      rd_en = 1;
      @(posedge clk); void'(model.pop_front());
      @(negedge clk); compare();
    end
    rd_en = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_workload: the benchmark's five test cases at its four system sizes,
// 4, 16, 36 and 64 agents (2 x 2 to 8 x 8 meshes, one to sixteen bus
// segments), with processing time P = 16 cycles and transfer length
// D = 1024 words. The four sizes run side by side, each in its own
// tb_workload_run (which holds the checks and prints the execution times);
// this module sums their results.
module tb_workload;
  logic clk = 0;
  logic [3:0] finished;
  int checks [4], failures [4];

  tb_workload_run #(.ROWS(2), .COLS(2)) u_n4  (.clk, .finished(finished[0]), .checks(checks[0]), .failures(failures[0]));
  tb_workload_run #(.ROWS(4), .COLS(4)) u_n16 (.clk, .finished(finished[1]), .checks(checks[1]), .failures(failures[1]));
  tb_workload_run #(.ROWS(6), .COLS(6)) u_n36 (.clk, .finished(finished[2]), .checks(checks[2]), .failures(failures[2]));
  tb_workload_run #(.ROWS(8), .COLS(8)) u_n64 (.clk, .finished(finished[3]), .checks(checks[3]), .failures(failures[3]));

  always #5 clk = ~clk;

  function automatic int total(input int v [4]);
    return v[0] + v[1] + v[2] + v[3];
  endfunction

  initial begin
    repeat (3000000) @(posedge clk);
    $display("FAIL: watchdog, finished=%b", finished);
    $display("TB_RESULT checks=%0d failures=%0d", total(checks), total(failures) + 1);
    $finish;
  end

  initial begin
    wait (finished == '1);
    @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", total(checks), total(failures));
    $finish;
  end
endmodule

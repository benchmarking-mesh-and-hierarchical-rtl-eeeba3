// tb_bus_or_resolver: checks the OR resolution of bus signals against a
// bit-by-bit model: the resolved bit is 1 exactly when some master drives 1.
// Covers single drivers (the normal bus case), no driver and random overlaps.
module tb_bus_or_resolver;
  localparam int unsigned M = 6;
  localparam int unsigned W = 34;
  logic [M-1:0][W-1:0] drv;
  logic [W-1:0] bus;
  int checks = 0, failures = 0;

  bus_or_resolver #(.M(M), .W(W)) dut (.drv, .bus);

  function automatic logic [W-1:0] model(input logic [M-1:0][W-1:0] d);
    logic [W-1:0] r;
    for (int b = 0; b < W; b++) begin
      r[b] = 1'b0;
      for (int m = 0; m < M; m++) if (d[m][b]) r[b] = 1'b1;
    end
    return r;
  endfunction

  task automatic run_one();
    #1;
    checks++;
    if (bus !== model(drv)) begin
      failures++;
      $display("FAIL: drv=%h bus=%h", drv, bus);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    drv = '0; run_one();
    for (int m = 0; m < M; m++) begin
      drv = '0;
      drv[m] = {$urandom, $urandom};
      run_one();
      check_equal: begin
        checks++;
        if (bus != drv[m]) begin failures++; $display("FAIL: single driver %0d", m); end
      end
    end
    for (int i = 0; i < 500; i++) begin
      for (int m = 0; m < M; m++) drv[m] = ($urandom % 3 == 0) ? '0 : W'({$urandom, $urandom});
      run_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// bus_or_resolver: OR-based resolution of one group of bus segment signals.
//
// Every master of a bus segment drives its own copy of a bus signal and keeps
// it at zero whenever it is not using it; the value seen on the segment is the
// bitwise OR of all copies. This replaces tri-state drivers by plain logic, as
// in the benchmarked bus. Purely combinational. The number of masters M and
// the width W are parameters; a hierarchical-bus segment uses one resolver
// per signal group (request, acknowledge, data valid).
module bus_or_resolver #(
  parameter int unsigned M = 6,
  parameter int unsigned W = 34
) (
  input  logic [M-1:0][W-1:0] drv,
  output logic [W-1:0]        bus
);

  always_comb begin
    bus = '0;
    for (int unsigned i = 0; i < M; i++) bus |= drv[i];
  end

endmodule

// packet_fifo: the word buffer used in every network element.
//
// A synchronous FIFO of DEPTH words with first-word fall-through: rd_data
// always shows the oldest word while the FIFO is not empty, and rd_en pops it.
// A write and a read may happen in the same cycle, also when the FIFO is
// full. The fill level is exported
// so that the control units around it can do store-and-forward: a packet is
// sent only when all of its words are stored (count >= packet length), and a
// packet is accepted only when there is room for all of it.
//
// The default depth holds exactly one packet of three header and eight
// payload words of 32 bits, the buffer size of the benchmarked networks. The
// circular-array organisation, the reset (empties the FIFO, the array itself
// is not cleared) and the behaviour on overflow (a write to a full FIFO without a
// read, and a read from an empty one, are ignored, and flagged by assertions) are this
// design's choices.
module packet_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 11,
  localparam int unsigned CW   = $clog2(DEPTH + 1),
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic [CW-1:0]    count,
  output logic             full,
  output logic             empty
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic             do_wr, do_rd;

  assign full  = (count == CW'(DEPTH));
  assign empty = (count == '0);
  assign do_wr = wr_en && (!full || rd_en);
  assign do_rd = rd_en && !empty;
  assign rd_data = mem[rd_ptr];

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= next_ptr(wr_ptr);
      if (do_rd) rd_ptr <= next_ptr(rd_ptr);
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= wr_data;
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && full && !rd_en));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && empty));

endmodule

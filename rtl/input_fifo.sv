// input_fifo: flit buffer of one input port.
//
// A circular buffer of DEPTH entries with valid/ready on both sides. A flit is
// written when push is high and the buffer is not full (in_ready); the front
// entry is visible on rd_data while not_empty is high and is removed when pop
// is high. A flit written in cycle t is at the front in cycle t+1. Push and pop
// in the same cycle are allowed, also when full (the pop frees the slot only in
// the next cycle, so in_ready stays low that cycle). The buffer storage is kept
// out of the fault-secure logic, as the storage is assumed to have its own
// test and repair; the flit check bit is stored with the data. Depth is a
// choice of this design.
module input_fifo #(
  parameter int unsigned WIDTH = fs_noc_pkg::FLIT_BITS,
  parameter int unsigned DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] wr_data,
  output logic             in_ready,
  input  logic             pop,
  output logic [WIDTH-1:0] rd_data,
  output logic             not_empty
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic [AW:0]      count;
  logic             do_push, do_pop;

  assign in_ready  = (count != (AW+1)'(DEPTH));
  assign not_empty = (count != '0);
  assign do_push   = push && in_ready;
  assign do_pop    = pop && not_empty;
  assign rd_data   = mem[rd_ptr];

  function automatic logic [AW-1:0] incr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= incr(wr_ptr);
      if (do_pop)  rd_ptr <= incr(rd_ptr);
      count <= count + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= wr_data;
  end

  // Reading is only allowed while the buffer holds a flit.
  a_no_pop_empty: assert property (@(posedge clk) disable iff (!rst_n)
                                   pop |-> not_empty);
endmodule

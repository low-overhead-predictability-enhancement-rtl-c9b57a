// pfs_fifo: the flit buffer of a router input port.
//
// A synchronous first-in first-out queue of DEPTH words of WIDTH bits, held in a register
// array with read and write pointers and an occupancy count. The head word is visible on
// 'dout' whenever 'empty' is low; 'pop' removes it at the next clock edge. 'push' writes
// 'din' at the next edge and is ignored while the queue is full, so a writer may use !full
// as its ready signal. Push and pop may happen in the same cycle, so a two-entry buffer
// sustains one flit per cycle with the registered 'full' as back-pressure. The depth of two positions follows
// the reference router; the rest is a plain design choice. Reset empties the queue.
module pfs_fifo #(
  parameter int WIDTH = 32,
  parameter int DEPTH = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] din,
  input  logic             pop,
  output logic [WIDTH-1:0] dout,
  output logic             empty,
  output logic             full
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    rd_ptr, wr_ptr;
  logic [AW:0]      count;
  logic             do_push, do_pop;

  assign empty   = (count == '0);
  assign full    = (count == (AW+1)'(DEPTH));
  assign do_pop  = pop && !empty;
  assign do_push = push && !full;
  assign dout    = mem[rd_ptr];

  function automatic logic [AW-1:0] incr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_pop)  rd_ptr <= incr(rd_ptr);
      if (do_push) wr_ptr <= incr(wr_ptr);
      case ({do_push, do_pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= din;
  end

endmodule

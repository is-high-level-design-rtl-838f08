// hif_fifo: synchronous FIFO used for both the input buffer (host -> backend)
// and the result buffer (backend -> host) of the host interface controller.
//
// DEPTH words of WIDTH bits in a circular buffer. The read port is
// registered: a pop moves the head word into rdata at the clock edge, and
// rdata then holds it until the next pop. A reader that samples rdata in the
// same cycle it pops therefore sees the previously popped word; the
// controller relies on this to return results one read late, with a zero
// first, as the original platform did. Reset and flush empty the buffer and
// clear rdata to zero. A push when full and a pop when empty are ignored;
// push and pop may happen in the same cycle. The 16-word depth is the
// original platform's; the registered read port and the cleared rdata are
// this design's reading of its one-read offset.
module hif_fifo #(
  parameter int unsigned WIDTH = hif_pkg::DATA_W,
  parameter int unsigned DEPTH = hif_pkg::FIFO_DEPTH
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     flush,
  input  logic                     push,
  input  logic [WIDTH-1:0]         wdata,
  input  logic                     pop,
  output logic [WIDTH-1:0]         rdata,
  output logic                     full,
  output logic                     empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic             do_push, do_pop;

  assign full    = (count == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign empty   = (count == '0);
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
      rdata  <= '0;
    end else if (flush) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
      rdata  <= '0;
    end else begin
      if (do_push) wr_ptr <= next_ptr(wr_ptr);
      if (do_pop) begin
        rd_ptr <= next_ptr(rd_ptr);
        rdata  <= mem[rd_ptr];
      end
      case ({do_push, do_pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

  // Storage has no reset, so it can map onto block RAM.
  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= wdata;
  end

  // A full FIFO must never report empty and vice versa.
  a_full_empty: assert property (@(posedge clk) disable iff (!rst_n) !(full && empty));
endmodule

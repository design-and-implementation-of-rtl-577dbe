// uart_fifo -- synchronous first-in first-out buffer.
//
// A circular buffer of DEPTH entries of WIDTH bits with a read and a write
// pointer one bit wider than the address, so that full and empty can be told
// apart. The UART uses one as the transmit FIFO (8-bit bytes) and one as the
// receive FIFO (a byte plus three error bits). The depth of 16 and the 3
// error bits per receive byte follow the description; the show-ahead read
// port and the single clock domain are this design's own choices.
//
// Interface: push/wdata write the tail, pop removes the head, rdata always
// shows the head (valid while empty is low). A push while full and a pop
// while empty are ignored. Push and pop in the same cycle are both served.
// Timing: a pushed entry is visible on rdata, and counted, the cycle after
// the push.
module uart_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     push,
  input  logic [WIDTH-1:0]         wdata,
  input  logic                     pop,
  output logic [WIDTH-1:0]         rdata,
  output logic                     empty,
  output logic                     full,
  output logic [$clog2(DEPTH):0]   count
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wptr, rptr;
  logic             do_push, do_pop;

  assign count   = wptr - rptr;
  assign empty   = (count == '0);
  assign full    = (count == (AW+1)'(DEPTH));
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign rdata   = mem[rptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (do_push) wptr <= wptr + 1'b1;
      if (do_pop)  rptr <= rptr + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wptr[AW-1:0]] <= wdata;
  end

  initial begin
    assert (DEPTH >= 2 && (DEPTH & (DEPTH - 1)) == 0)
      else $error("uart_fifo: DEPTH must be a power of two");
  end

endmodule

// baud_gen -- programmable baud rate generator.
//
// Divides the system clock by a 16-bit divisor and emits a one-cycle tick
// every DIVISOR clock cycles. The tick runs at 16 times the baud rate and is
// shared by the transmitter and the receiver, which count 16 ticks per bit.
// The 16-bit divisor programmed in the DLL/DLM registers, the range 1 to
// 2^16-1 and the 16x output follow the description of the UART; the plain
// up-counter with a synchronous wrap is this design's own choice.
//
// Interface: clk, synchronous active-high rst, divisor[15:0], tick (a
// clock enable, high for one clk cycle). Divisor 0 stops the generator.
// Timing: with divisor N the tick is high in one cycle out of N; after
// reset the first tick comes N cycles later. A new divisor takes effect at
// once; if it is below the current count the counter wraps on the next
// cycle.
module baud_gen (
  input  logic        clk,
  input  logic        rst,
  input  logic [15:0] divisor,
  output logic        tick
);

  logic [15:0] count;

  always_ff @(posedge clk) begin
    if (rst) begin
      count <= '0;
      tick  <= 1'b0;
    end else if (divisor == 16'd0) begin
      count <= '0;
      tick  <= 1'b0;
    end else if (count >= divisor - 16'd1) begin
      count <= '0;
      tick  <= 1'b1;
    end else begin
      count <= count + 16'd1;
      tick  <= 1'b0;
    end
  end

endmodule

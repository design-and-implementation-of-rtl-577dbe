// uart_rx -- receiver logic with its receive shift register (RSR).
//
// The serial input is brought into the clock domain by two flip-flops. In
// the idle state the receiver looks at the line on every tick of the 16x
// baud clock; a 1 followed by a 0 (a falling edge) starts a frame, so a line
// that stays at 0 after a bad stop bit or during a break starts nothing.
// Seven ticks after the tick that saw the edge, near the middle of the
// start bit, the line is checked again: a 1 there is taken as a glitch and
// the receiver goes back to idle. From then on the line is sampled every 16
// ticks, in the middle of each bit: the data bits (LSB first) are shifted
// into the RSR, then the parity bit if enabled, then the stop bit.
//
// When the stop bit has been sampled, valid is high for one cycle with the
// byte and three error flags: parity error, framing error (stop bit read as
// 0) and break (data, parity and stop all 0). After a framing error or a
// break the receiver waits for the line to return to 1 before it looks for
// a new start bit.
//
// From the description: the frame format, 7 or 8 data bits, 16x clock for
// the receiver, and the parity/framing/break conditions stored with every
// byte. This design's own choices: mid-bit sampling at a single point, the
// start-bit recheck, and starting only on a falling edge.
//
// Timing: valid comes about 9.5 bit times (8N1) after the falling edge of
// the start bit, plus the two synchroniser cycles.
module uart_rx
  import uart_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       tick,
  input  logic       wls7,
  input  logic       pen,
  input  logic       eps,
  input  logic       rxd,
  output logic       valid,
  output logic [7:0] data,
  output rx_err_t    err
);

  typedef enum logic [2:0] {RX_IDLE, RX_START, RX_DATA, RX_PARITY, RX_STOP} rx_state_e;

  rx_state_e  state;
  logic       rxd_m, rxd_s;  // two-stage synchroniser
  logic       line_q;        // rxd_s at the previous tick
  logic [7:0] rsr;           // receive shift register, shifts right
  logic [3:0] sub;
  logic [2:0] nbit;
  logic       par_bit;       // received parity bit (0 when parity is off)
  logic       par_err;
  logic [7:0] word;          // rsr aligned to bit 0
  logic       exp_par;

  assign word    = wls7 ? {1'b0, rsr[7:1]} : rsr;
  assign exp_par = (^word) ^ ~eps;

  always_ff @(posedge clk) begin
    if (rst) begin
      rxd_m <= 1'b1;
      rxd_s <= 1'b1;
    end else begin
      rxd_m <= rxd;
      rxd_s <= rxd_m;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= RX_IDLE;
      line_q  <= 1'b1;
      rsr     <= '0;
      sub     <= '0;
      nbit    <= '0;
      par_bit <= 1'b0;
      par_err <= 1'b0;
      valid   <= 1'b0;
      data    <= '0;
      err     <= '0;
    end else begin
      valid <= 1'b0;
      if (tick) begin
        line_q <= rxd_s;
        unique case (state)
          RX_IDLE: begin
            sub <= '0;
            if (line_q && !rxd_s) state <= RX_START;
          end
          RX_START: begin
            sub <= sub + 4'd1;
            if (sub == 4'd6) begin  // seventh tick after the one that saw the edge
              sub <= '0;
              if (rxd_s) state <= RX_IDLE;
              else begin
                state   <= RX_DATA;
                nbit    <= '0;
                par_bit <= 1'b0;
                par_err <= 1'b0;
              end
            end
          end
          RX_DATA: begin
            sub <= sub + 4'd1;
            if (sub == 4'd15) begin
              rsr <= {rxd_s, rsr[7:1]};
              if (nbit == (wls7 ? 3'd6 : 3'd7)) state <= pen ? RX_PARITY : RX_STOP;
              else nbit <= nbit + 3'd1;
            end
          end
          RX_PARITY: begin
            sub <= sub + 4'd1;
            if (sub == 4'd15) begin
              par_bit <= rxd_s;
              par_err <= (rxd_s != exp_par);
              state   <= RX_STOP;
            end
          end
          RX_STOP: begin
            sub <= sub + 4'd1;
            if (sub == 4'd15) begin
              valid  <= 1'b1;
              data   <= word;
              err.pe <= par_err;
              err.fe <= !rxd_s;
              err.bi <= !rxd_s && (word == 8'd0) && !par_bit;
              state  <= RX_IDLE;
            end
          end
          default: state <= RX_IDLE;
        endcase
      end
    end
  end

endmodule

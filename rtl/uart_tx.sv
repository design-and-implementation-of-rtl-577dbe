// uart_tx -- transmitter logic with its transmit shift register (TSR).
//
// When the TSR is idle and the transmit FIFO holds a byte, the byte is
// loaded into the TSR (pop is high for that one cycle) and sent as an
// asynchronous frame on txd: a start bit (0), the data bits least
// significant first, an optional parity bit and one stop bit (1). The line
// idles at 1 (mark). Each bit lasts 16 ticks of the 16x baud clock.
//
// From the description: the frame order (start, data LSB first, stop), 7 or
// 8 data bits, the parity bit counted among the overhead bits, loading the
// TSR from the FIFO when the TSR is empty, and the 16x clock. This design's
// own choices: one stop bit, odd/even parity select, and that the line
// settings (wls7, pen, eps) are captured when a byte is loaded.
//
// Interface: tick is the 16x enable from the baud generator; fifo_valid and
// fifo_data show the FIFO head; pop takes it. busy is high from the load to
// the end of the stop bit.
// Timing: a byte is loaded on a tick; the start bit begins the next cycle.
// A frame lasts (1 + data bits + parity + 1) * 16 ticks, 160 ticks for 8N1.
// Back-to-back bytes leave no idle time between frames: the next byte is
// loaded on the tick that ends the stop bit.
module uart_tx (
  input  logic       clk,
  input  logic       rst,
  input  logic       tick,
  input  logic       wls7,
  input  logic       pen,
  input  logic       eps,
  input  logic       fifo_valid,
  input  logic [7:0] fifo_data,
  output logic       pop,
  output logic       txd,
  output logic       busy
);

  typedef enum logic [2:0] {TX_IDLE, TX_START, TX_DATA, TX_PARITY, TX_STOP} tx_state_e;

  tx_state_e  state;
  logic [7:0] tsr;        // transmit shift register, shifts right
  logic [3:0] sub;        // tick count within a bit, 0..15
  logic [2:0] nbit;       // data bits sent so far minus one
  logic       par;        // parity bit to send
  logic       seven;      // captured word length
  logic       with_par;   // captured parity enable

  // Load from the idle state, or straight at the end of a stop bit so that
  // queued bytes follow each other without a gap.
  assign pop  = tick && fifo_valid &&
                (state == TX_IDLE || (state == TX_STOP && sub == 4'd15));
  assign busy = (state != TX_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= TX_IDLE;
      tsr      <= '0;
      sub      <= '0;
      nbit     <= '0;
      par      <= 1'b0;
      seven    <= 1'b0;
      with_par <= 1'b0;
      txd      <= 1'b1;
    end else if (pop) begin
      tsr      <= wls7 ? {1'b0, fifo_data[6:0]} : fifo_data;
      // even parity (eps = 1): the bit makes the count of ones even
      par      <= (wls7 ? ^fifo_data[6:0] : ^fifo_data) ^ ~eps;
      seven    <= wls7;
      with_par <= pen;
      sub      <= '0;
      state    <= TX_START;
      txd      <= 1'b0;
    end else begin
      unique case (state)
        TX_IDLE: txd <= 1'b1;
        TX_START, TX_DATA, TX_PARITY, TX_STOP: begin
          if (tick) begin
            sub <= sub + 4'd1;
            if (sub == 4'd15) begin
              unique case (state)
                TX_START: begin
                  state <= TX_DATA;
                  nbit  <= '0;
                  txd   <= tsr[0];
                  tsr   <= tsr >> 1;
                end
                TX_DATA: begin
                  if (nbit == (seven ? 3'd6 : 3'd7)) begin
                    if (with_par) begin
                      state <= TX_PARITY;
                      txd   <= par;
                    end else begin
                      state <= TX_STOP;
                      txd   <= 1'b1;
                    end
                  end else begin
                    nbit <= nbit + 3'd1;
                    txd  <= tsr[0];
                    tsr  <= tsr >> 1;
                  end
                end
                TX_PARITY: begin
                  state <= TX_STOP;
                  txd   <= 1'b1;
                end
                default: begin  // TX_STOP
                  state <= TX_IDLE;
                  txd   <= 1'b1;
                end
              endcase
            end
          end
        end
        default: state <= TX_IDLE;
      endcase
    end
  end

endmodule

// mini_uart -- UART with transmit and receive FIFOs and a CPU bus interface.
//
// A CPU writes bytes into a 16-entry transmit FIFO; the transmitter takes
// them one at a time into its shift register and sends them as serial
// frames on TxD. Frames arriving on RxD are assembled by the receiver and
// queued, each byte with its parity, framing and break flags, in a 16-entry
// receive FIFO that the CPU reads. A programmable baud generator divides
// SysClk by the 16-bit divisor in DLL/DLM and gives both the transmitter
// and the receiver a clock enable at 16 times the baud rate.
//
// Ports follow the miniUART symbol: SysClk, Reset (active high,
// synchronous), Addr(1:0), DataIn(7:0), DataOut(7:0), CS_N, RD_N, WR_N,
// RxD, TxD and the active-low interrupts IntRx_N and IntTx_N.
//
// Register map (uart_pkg): Addr 0 reads the receive FIFO and writes the
// transmit FIFO; Addr 1 reads the line status (LSR) and writes the line
// control (LCR); Addr 2 and 3 are DLL and DLM. The map, the LCR and LSR bit
// layouts and the bus timing are this design's own; the description gives
// the DLL/DLM divisor, the FIFO depth, the three error bits per received
// byte, the status contents (parity, overrun, framing, break) and
// programmable interrupts.
//
// Bus timing: the bus is synchronous to SysClk. An access is taken on the
// first SysClk edge at which CS_N and RD_N (or WR_N) are both low; holding
// the strobe low longer does not repeat it. A read loads DataOut on that
// edge and DataOut holds the value until the next read. Reading Addr 0
// pops the receive FIFO; reading Addr 1 clears the overrun flag. A write to
// Addr 0 while the transmit FIFO is full is dropped.
//
// Interrupts: IntRx_N is low while LCR.erbi is set and the receive FIFO
// holds data or an overrun is flagged. IntTx_N is low while LCR.etbei is
// set and the transmit FIFO is empty.
module mini_uart
  import uart_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH    = 16,
  parameter int unsigned RESET_DIVISOR = DEFAULT_DIVISOR
) (
  input  logic       SysClk,
  input  logic       Reset,
  input  logic [1:0] Addr,
  input  logic [7:0] DataIn,
  output logic [7:0] DataOut,
  input  logic       CS_N,
  input  logic       RD_N,
  input  logic       WR_N,
  input  logic       RxD,
  output logic       TxD,
  output logic       IntRx_N,
  output logic       IntTx_N
);

  localparam int unsigned CW = $clog2(FIFO_DEPTH) + 1;

  // ---------------------------------------------------------------- bus --
  logic rd_act, wr_act, rd_q, wr_q, rd_go, wr_go;

  assign rd_act = !CS_N && !RD_N;
  assign wr_act = !CS_N && !WR_N;
  assign rd_go  = rd_act && !rd_q;
  assign wr_go  = wr_act && !wr_q;

  always_ff @(posedge SysClk) begin
    if (Reset) begin
      rd_q <= 1'b0;
      wr_q <= 1'b0;
    end else begin
      rd_q <= rd_act;
      wr_q <= wr_act;
    end
  end

  // ---------------------------------------------------------- registers --
  lcr_t        lcr;
  logic [7:0]  dll, dlm;
  logic        oe;
  lsr_t        lsr;

  // transmit side
  logic        txf_push, txf_pop, txf_empty, txf_full;
  logic [7:0]  txf_data;
  logic [CW-1:0] txf_count;
  logic        tx_busy;

  // receive side
  logic        rx_valid;
  logic [7:0]  rx_data;
  rx_err_t     rx_err;
  rx_entry_t   rxf_head;
  logic        rxf_pop, rxf_empty, rxf_full;
  logic [CW-1:0] rxf_count;

  logic        tick;

  assign txf_push = wr_go && (reg_addr_e'(Addr) == REG_DATA);
  assign rxf_pop  = rd_go && (reg_addr_e'(Addr) == REG_DATA);

  always_comb begin
    lsr        = '0;
    lsr.dr     = !rxf_empty;
    lsr.oe     = oe;
    lsr.pe     = !rxf_empty && rxf_head.err.pe;
    lsr.fe     = !rxf_empty && rxf_head.err.fe;
    lsr.bi     = !rxf_empty && rxf_head.err.bi;
    lsr.thre   = txf_empty;
    lsr.temt   = txf_empty && !tx_busy;
    lsr.txfull = txf_full;
  end

  always_ff @(posedge SysClk) begin
    if (Reset) begin
      lcr     <= '0;
      dll     <= 8'(RESET_DIVISOR);
      dlm     <= 8'(RESET_DIVISOR >> 8);
      oe      <= 1'b0;
      DataOut <= '0;
    end else begin
      if (wr_go) begin
        unique case (reg_addr_e'(Addr))
          REG_LINE: lcr <= lcr_t'(DataIn);
          REG_DLL:  dll <= DataIn;
          REG_DLM:  dlm <= DataIn;
          default:  ;  // REG_DATA goes to the transmit FIFO
        endcase
      end
      if (rd_go) begin
        unique case (reg_addr_e'(Addr))
          REG_DATA: DataOut <= rxf_empty ? 8'h00 : rxf_head.data;
          REG_LINE: DataOut <= lsr;
          REG_DLL:  DataOut <= dll;
          default:  DataOut <= dlm;
        endcase
      end
      // Overrun: a received byte found the receive FIFO full and was lost.
      // Reading LSR clears the flag; a new overrun in the same cycle wins.
      if (rd_go && reg_addr_e'(Addr) == REG_LINE) oe <= 1'b0;
      if (rx_valid && rxf_full) oe <= 1'b1;
    end
  end

  assign IntRx_N = !(lcr.erbi && (!rxf_empty || oe));
  assign IntTx_N = !(lcr.etbei && txf_empty);

  // ------------------------------------------------------------- blocks --
  baud_gen u_baud (
    .clk     (SysClk),
    .rst     (Reset),
    .divisor ({dlm, dll}),
    .tick    (tick)
  );

  uart_fifo #(.WIDTH(8), .DEPTH(FIFO_DEPTH)) u_tx_fifo (
    .clk   (SysClk),
    .rst   (Reset),
    .push  (txf_push),
    .wdata (DataIn),
    .pop   (txf_pop),
    .rdata (txf_data),
    .empty (txf_empty),
    .full  (txf_full),
    .count (txf_count)
  );

  uart_tx u_tx (
    .clk        (SysClk),
    .rst        (Reset),
    .tick       (tick),
    .wls7       (lcr.wls7),
    .pen        (lcr.pen),
    .eps        (lcr.eps),
    .fifo_valid (!txf_empty),
    .fifo_data  (txf_data),
    .pop        (txf_pop),
    .txd        (TxD),
    .busy       (tx_busy)
  );

  uart_rx u_rx (
    .clk   (SysClk),
    .rst   (Reset),
    .tick  (tick),
    .wls7  (lcr.wls7),
    .pen   (lcr.pen),
    .eps   (lcr.eps),
    .rxd   (RxD),
    .valid (rx_valid),
    .data  (rx_data),
    .err   (rx_err)
  );

  uart_fifo #(.WIDTH($bits(rx_entry_t)), .DEPTH(FIFO_DEPTH)) u_rx_fifo (
    .clk   (SysClk),
    .rst   (Reset),
    .push  (rx_valid),
    .wdata ({rx_err, rx_data}),
    .pop   (rxf_pop),
    .rdata (rxf_head),
    .empty (rxf_empty),
    .full  (rxf_full),
    .count (rxf_count)
  );

  // The bus strobes of one access are mutually exclusive.
  assert property (@(posedge SysClk) disable iff (Reset) !(rd_act && wr_act))
    else $error("mini_uart: RD_N and WR_N low together");

endmodule

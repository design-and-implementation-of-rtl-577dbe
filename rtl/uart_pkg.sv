// uart_pkg -- types and constants shared by the UART modules.
//
// The UART is programmed through four byte-wide registers selected by a
// 2-bit address (the miniUART symbol has Addr(1:0)). The map itself is this
// design's choice; the divisor latches DLL/DLM and the status contents
// (data ready, overrun, parity, framing, break) follow the description.
//
//   Addr  read                     write
//   0     RBR  receive FIFO head   THR  transmit FIFO tail
//   1     LSR  line status         LCR  line control
//   2     DLL  divisor low byte    DLL
//   3     DLM  divisor high byte   DLM
package uart_pkg;

  typedef enum logic [1:0] {
    REG_DATA = 2'd0,  // RBR on read, THR on write
    REG_LINE = 2'd1,  // LSR on read, LCR on write
    REG_DLL  = 2'd2,
    REG_DLM  = 2'd3
  } reg_addr_e;

  // Line control register. Reset value: 8 data bits, no parity, both
  // interrupts disabled.
  typedef struct packed {
    logic [2:0] reserved;
    logic       etbei;  // enable IntTx_N (transmit FIFO empty)
    logic       erbi;   // enable IntRx_N (receive data available)
    logic       eps;    // even parity select (1 = even, 0 = odd)
    logic       pen;    // parity enable
    logic       wls7;   // 1 = 7 data bits, 0 = 8 data bits
  } lcr_t;

  // Line status register.
  typedef struct packed {
    logic txfull;  // transmit FIFO full
    logic temt;    // transmit FIFO empty and shift register idle
    logic thre;    // transmit FIFO empty
    logic bi;      // break on the character at the receive FIFO head
    logic fe;      // framing error on the character at the head
    logic pe;      // parity error on the character at the head
    logic oe;      // overrun: a character was lost (cleared by reading LSR)
    logic dr;      // data ready: receive FIFO not empty
  } lsr_t;

  // The three error bits stored with every received byte.
  typedef struct packed {
    logic bi;
    logic fe;
    logic pe;
  } rx_err_t;

  // One receive FIFO entry: 3 error bits and the data byte.
  typedef struct packed {
    rx_err_t    err;
    logic [7:0] data;
  } rx_entry_t;

  // 40 MHz system clock, 9600 baud, 16 ticks per bit: 40e6 / (16 * 9600)
  // = 260.4, rounded down.
  localparam int unsigned DEFAULT_DIVISOR = 260;

endpackage

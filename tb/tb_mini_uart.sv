// tb_mini_uart -- end-to-end testbench for the UART top level, mini_uart.
//
// The UART runs with all parameters at their defaults: 40 MHz SysClk
// (25 ns), reset divisor 260 (9600 baud with 16 ticks per bit), 16-entry
// FIFOs. RxD is either looped back from TxD or driven by a serial source in
// the testbench that can inject bad parity, a bad stop bit or a break.
//
// Sequence and what is checked:
//  1. reset values of DLL/DLM/LSR and the interrupt outputs;
//  2. at 9600 baud, two 0xFF bytes looped back: the start edges are exactly
//     160 * 260 clock cycles apart, the bytes come back, IntTx_N and
//     IntRx_N follow the FIFO states;
//  3. divisor reprogrammed to 125 (20 kbit/s) and then to 2: frame periods
//     of 160 * 125 and 160 * 2 cycles;
//  4. 17 bytes written at once: the transmit FIFO fills (LSR.txfull) and an
//     18th write is dropped; the receive FIFO fills and the 17th byte
//     overruns (LSR.oe, cleared by reading LSR); the 16 stored bytes come
//     back in order;
//  5. 7 data bits with even parity, and 8 with odd parity, looped back;
//  6. injected frames with a parity error, a framing error and a break,
//     seen in LSR with the byte at the receive FIFO head.
// Each mechanism is counted and one that never happened is a failure.
module tb_mini_uart;
  import uart_pkg::*;

  logic       SysClk = 1'b0;
  logic       Reset;
  logic [1:0] Addr;
  logic [7:0] DataIn, DataOut;
  logic       CS_N, RD_N, WR_N;
  logic       RxD, TxD, IntRx_N, IntTx_N;
  logic       loop, drv;
  int         checks = 0, failures = 0;
  longint     cycle = 0;
  int         divisor_now = DEFAULT_DIVISOR;

  // mechanism counters
  int n_txfull = 0, n_drop = 0, n_overrun = 0, n_pe = 0, n_fe = 0, n_bi = 0;
  int n_intrx = 0, n_inttx = 0, n_divprog = 0, n_seven = 0, n_parity_ok = 0;
  int n_b2b = 0, n_loop = 0;

  assign RxD = loop ? TxD : drv;

  mini_uart dut (.*);

  always #12.5 SysClk = ~SysClk;
  always @(posedge SysClk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (3_000_000) @(posedge SysClk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL %0t: %s", $time, what);
    end
  endtask

  // start edges on TxD
  longint tx_edges[$];
  logic   txd_q = 1'b1;
  always @(posedge SysClk) begin
    txd_q <= TxD;
    if (txd_q && !TxD) tx_edges.push_back(cycle);
  end

  task automatic bus_write(input logic [1:0] a, input logic [7:0] d);
    @(negedge SysClk);
    Addr = a; DataIn = d; CS_N = 1'b0; WR_N = 1'b0;
    @(negedge SysClk);
    CS_N = 1'b1; WR_N = 1'b1;
  endtask

  task automatic bus_read(input logic [1:0] a, output logic [7:0] d);
    @(negedge SysClk);
    Addr = a; CS_N = 1'b0; RD_N = 1'b0;
    @(negedge SysClk);
    CS_N = 1'b1; RD_N = 1'b1;
    d = DataOut;
  endtask

  function automatic logic [7:0] lcr_val(input bit wls7, pen, eps);
    lcr_t l;
    l = '0;
    l.wls7 = wls7; l.pen = pen; l.eps = eps; l.erbi = 1'b1; l.etbei = 1'b1;
    return l;
  endfunction

  task automatic set_divisor(input int d);
    logic [7:0] r;
    bus_write(REG_DLL, 8'(d));
    bus_write(REG_DLM, 8'(d >> 8));
    bus_read(REG_DLL, r); check(r == 8'(d), "DLL read back");
    bus_read(REG_DLM, r); check(r == 8'(d >> 8), "DLM read back");
    divisor_now = d;
    n_divprog++;
  endtask

  task automatic read_lsr(output lsr_t l);
    logic [7:0] r;
    bus_read(REG_LINE, r);
    l = lsr_t'(r);
  endtask

  // Wait until the transmit FIFO is empty (IntTx_N, enabled in LCR), then
  // three frame times for the shift register and the receiver. Reading LSR
  // here would clear the overrun flag.
  task automatic settle();
    wait (!IntTx_N);
    repeat (3 * 176 * divisor_now + 10) @(posedge SysClk);
  endtask

  // read and compare n bytes from the receive FIFO
  task automatic read_bytes(input logic [7:0] exp[$], input logic [7:0] mask);
    logic [7:0] r;
    lsr_t l;
    foreach (exp[i]) begin
      read_lsr(l);
      check(l.dr, $sformatf("data ready for byte %0d", i));
      check(!l.pe && !l.fe && !l.bi, "no error flags on good byte");
      bus_read(REG_DATA, r);
      check(r == (exp[i] & mask), $sformatf("byte %0d: %02h expected %02h", i, r, exp[i] & mask));
    end
    read_lsr(l);
    check(!l.dr, "receive FIFO empty after reading all");
  endtask

  // serial source for injected frames
  task automatic inject(input logic [7:0] d, input int nbits, input bit pen, input bit par,
                        input bit stop);
    int bp;
    bp = 16 * divisor_now;
    drv = 1'b0; repeat (bp) @(posedge SysClk);
    for (int i = 0; i < nbits; i++) begin drv = d[i]; repeat (bp) @(posedge SysClk); end
    if (pen) begin drv = par; repeat (bp) @(posedge SysClk); end
    drv = stop; repeat (bp) @(posedge SysClk);
    drv = 1'b1; repeat (2 * bp) @(posedge SysClk);
  endtask

  initial begin
    logic [7:0] r;
    logic [7:0] bytes[$];
    lsr_t l;

    Reset = 1'b1; Addr = '0; DataIn = '0; CS_N = 1'b1; RD_N = 1'b1; WR_N = 1'b1;
    loop = 1'b1; drv = 1'b1;
    repeat (5) @(posedge SysClk);
    Reset = 1'b0;

    // 1. reset state
    bus_read(REG_DLL, r); check(r == 8'(DEFAULT_DIVISOR), "DLL reset value");
    bus_read(REG_DLM, r); check(r == 8'(DEFAULT_DIVISOR >> 8), "DLM reset value");
    read_lsr(l);
    check(l.thre && l.temt && !l.dr && !l.oe && !l.txfull, "LSR reset value");
    check(IntRx_N && IntTx_N, "interrupts off after reset");
    check(TxD == 1'b1, "TxD idles high");

    // 2. 9600 baud loopback, frame period
    bus_write(REG_LINE, lcr_val(0, 0, 0));
    @(posedge SysClk);
    check(!IntTx_N, "IntTx_N low with transmit FIFO empty");
    if (!IntTx_N) n_inttx++;
    check(IntRx_N, "IntRx_N high with receive FIFO empty");
    tx_edges.delete();
    bus_write(REG_DATA, 8'hFF);
    bus_write(REG_DATA, 8'hFF);
    @(posedge SysClk);
    check(IntTx_N, "IntTx_N high while transmit FIFO holds data");
    wait (!IntRx_N);
    n_intrx++;
    settle();
    check(tx_edges.size() == 2, $sformatf("two start edges (%0d)", tx_edges.size()));
    if (tx_edges.size() == 2) begin
      check(tx_edges[1] - tx_edges[0] == 160 * DEFAULT_DIVISOR,
            $sformatf("frame period %0d cycles at 9600 baud", tx_edges[1] - tx_edges[0]));
      n_b2b++;
    end
    bytes = '{8'hFF, 8'hFF};
    read_bytes(bytes, 8'hFF);
    n_loop++;
    check(IntRx_N, "IntRx_N released after reading");

    // 3. 20 kbit/s, the upper RS-232 rate: divisor 40e6 / (16 * 20000) = 125
    set_divisor(125);
    tx_edges.delete();
    bus_write(REG_DATA, 8'hFF);
    bus_write(REG_DATA, 8'hFF);
    settle();
    check(tx_edges.size() == 2 && tx_edges[1] - tx_edges[0] == 160 * 125, "frame period at 20 kbit/s");
    read_bytes('{8'hFF, 8'hFF}, 8'hFF);

    // faster divisor for the rest
    set_divisor(2);
    tx_edges.delete();
    bus_write(REG_DATA, 8'hFF);
    bus_write(REG_DATA, 8'hFF);
    settle();
    check(tx_edges.size() == 2 && tx_edges[1] - tx_edges[0] == 320, "frame period at divisor 2");
    read_bytes('{8'hFF, 8'hFF}, 8'hFF);

    // 4. fill both FIFOs: 17 bytes, one more is dropped, one overruns
    bytes.delete();
    for (int i = 0; i < 17; i++) bytes.push_back(8'($urandom));
    foreach (bytes[i]) bus_write(REG_DATA, bytes[i]);
    read_lsr(l);
    check(l.txfull, "transmit FIFO full after 17 writes");
    if (l.txfull) begin
      n_txfull++;
      bus_write(REG_DATA, 8'hEE);  // dropped
      n_drop++;
    end
    settle();
    read_lsr(l);
    check(l.oe, "overrun flagged");
    if (l.oe) n_overrun++;
    check(!IntRx_N, "IntRx_N low with data and overrun");
    read_lsr(l);
    check(!l.oe, "overrun cleared by reading LSR");
    bytes.pop_back();  // the 17th byte was lost
    read_bytes(bytes, 8'hFF);
    n_loop++;

    // 5. 7 data bits even parity, then 8 bits odd parity
    bus_write(REG_LINE, lcr_val(1, 1, 1));
    bytes.delete();
    for (int i = 0; i < 10; i++) bytes.push_back(8'($urandom));
    foreach (bytes[i]) bus_write(REG_DATA, bytes[i]);
    settle();
    read_bytes(bytes, 8'h7F);
    n_seven++; n_parity_ok++;
    bus_write(REG_LINE, lcr_val(0, 1, 0));
    bytes.delete();
    for (int i = 0; i < 10; i++) bytes.push_back(8'($urandom));
    foreach (bytes[i]) bus_write(REG_DATA, bytes[i]);
    settle();
    read_bytes(bytes, 8'hFF);
    n_parity_ok++;

    // 6. injected errors, 8 bits odd parity
    loop = 1'b0;
    repeat (50) @(posedge SysClk);
    // parity error: 0x35 has four ones, odd parity bit is 1; send 0
    inject(8'h35, 8, 1'b1, 1'b0, 1'b1);
    // good frame
    inject(8'h35, 8, 1'b1, 1'b1, 1'b1);
    // framing error
    inject(8'h5A, 8, 1'b1, 1'b1, 1'b0);
    // break: line held at 0 for two frame times
    drv = 1'b0; repeat (2 * 11 * 16 * divisor_now) @(posedge SysClk);
    drv = 1'b1; repeat (4 * 16 * divisor_now) @(posedge SysClk);

    read_lsr(l);
    check(l.dr && l.pe && !l.fe && !l.bi, "parity error at head");
    if (l.pe) n_pe++;
    bus_read(REG_DATA, r); check(r == 8'h35, "byte with parity error");
    read_lsr(l);
    check(l.dr && !l.pe && !l.fe && !l.bi, "good byte at head");
    bus_read(REG_DATA, r); check(r == 8'h35, "good byte");
    read_lsr(l);
    check(l.dr && l.fe && !l.bi, "framing error at head");
    if (l.fe) n_fe++;
    bus_read(REG_DATA, r); check(r == 8'h5A, "byte with framing error");
    read_lsr(l);
    check(l.dr && l.bi && l.fe, "break at head");
    if (l.bi) n_bi++;
    bus_read(REG_DATA, r); check(r == 8'h00, "break byte");
    read_lsr(l);
    check(!l.dr, "one byte per break");

    // every mechanism must have happened
    check(n_txfull > 0,  "mechanism: transmit FIFO full");
    check(n_drop > 0,    "mechanism: write to full FIFO dropped");
    check(n_overrun > 0, "mechanism: receive overrun");
    check(n_pe > 0,      "mechanism: parity error");
    check(n_fe > 0,      "mechanism: framing error");
    check(n_bi > 0,      "mechanism: break");
    check(n_intrx > 0,   "mechanism: receive interrupt");
    check(n_inttx > 0,   "mechanism: transmit interrupt");
    check(n_divprog > 0, "mechanism: divisor programmed");
    check(n_seven > 0,   "mechanism: 7 data bits");
    check(n_parity_ok > 0, "mechanism: parity generation and check");
    check(n_b2b > 0,     "mechanism: back-to-back frames");
    $display("txfull %0d drop %0d overrun %0d pe %0d fe %0d bi %0d intrx %0d inttx %0d div %0d seven %0d parity %0d b2b %0d loop %0d",
             n_txfull, n_drop, n_overrun, n_pe, n_fe, n_bi, n_intrx, n_inttx, n_divprog,
             n_seven, n_parity_ok, n_b2b, n_loop);
    $display("cycles %0d", cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

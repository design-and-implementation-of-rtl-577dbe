// tb_uart_rx -- self-checking testbench for uart_rx.
//
// A serial driver in the testbench produces frames on rxd at 16 ticks per
// bit (tick every TICK_P cycles) and the expected byte and error flags of
// each are queued. A monitor compares every valid output with the queue
// and checks the delay from the start edge to valid. Covered: 8N1, 7N1,
// 8 bits with even parity, 7 with odd parity, frames whose stop bit is 0
// (framing error), a wrong parity bit (parity error), a break (line held
// at 0 for two frame times: one byte with break and framing set, then
// nothing until the line returns to 1), a short low glitch that must not
// start a frame, and bit times 3% off the nominal rate.
module tb_uart_rx;
  import uart_pkg::*;
  localparam int TICK_P = 2;
  localparam int BIT_P  = 16 * TICK_P;

  logic       clk = 1'b0;
  logic       rst;
  logic       tick;
  logic       wls7, pen, eps;
  logic       rxd;
  logic       valid;
  logic [7:0] data;
  rx_err_t    err;
  int         checks = 0, failures = 0;
  int         n_fe = 0, n_pe = 0, n_bi = 0, n_ok = 0;
  longint     cycle = 0, t_start = 0;

  typedef struct { logic [7:0] data; rx_err_t err; } exp_t;
  exp_t exp_q[$];

  uart_rx dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, what);
    end
  endtask

  int tcnt = 0;
  always @(posedge clk) begin
    if (rst) begin tcnt <= 0; tick <= 1'b0; end
    else begin
      tcnt <= (tcnt == TICK_P - 1) ? 0 : tcnt + 1;
      tick <= (tcnt == TICK_P - 1);
    end
  end

  // monitor
  always @(posedge clk) begin
    if (!rst && valid) begin
      if (exp_q.size() == 0) check(1'b0, $sformatf("unexpected byte %02h", data));
      else begin
        exp_t e;
        int   nbits;
        longint lat;
        e = exp_q.pop_front();
        check(data == e.data, $sformatf("data %02h expected %02h", data, e.data));
        check(err == e.err, $sformatf("err %03b expected %03b", err, e.err));
        // stop bit is sampled in its middle: (1 + n + p + 0.5) bit times
        nbits = (wls7 ? 7 : 8) + (pen ? 1 : 0);
        lat   = cycle - t_start;
        check(lat >= longint'((nbits + 1) * BIT_P + BIT_P / 2 - TICK_P) &&
              lat <= longint'((nbits + 1) * BIT_P + BIT_P / 2 + 2 * TICK_P + 3),
              $sformatf("latency %0d cycles", lat));
        if (err.fe) n_fe++;
        if (err.pe) n_pe++;
        if (err.bi) n_bi++;
        if (err == '0) n_ok++;
      end
    end
  end

  // send one frame; flip_par corrupts the parity bit, stop is the stop bit
  task automatic frame(input logic [7:0] d, input bit flip_par, input bit stop, input int bitp);
    int   n;
    bit   par;
    exp_t e;
    n = wls7 ? 7 : 8;
    par = 1'b0;
    for (int i = 0; i < n; i++) par ^= d[i];
    par = eps ? par : ~par;
    if (flip_par) par = ~par;
    e.data   = wls7 ? {1'b0, d[6:0]} : d;
    e.err.pe = pen && flip_par;
    e.err.fe = !stop;
    e.err.bi = !stop && (e.data == 8'd0) && !(pen && par);
    exp_q.push_back(e);
    t_start = cycle;
    rxd = 1'b0;
    repeat (bitp) @(posedge clk);
    for (int i = 0; i < n; i++) begin
      rxd = d[i];
      repeat (bitp) @(posedge clk);
    end
    if (pen) begin
      rxd = par;
      repeat (bitp) @(posedge clk);
    end
    rxd = stop;
    repeat (bitp) @(posedge clk);
    rxd = 1'b1;
  endtask

  task automatic burst(input int n, input int bitp);
    for (int i = 0; i < n; i++) begin
      frame(8'($urandom), 1'b0, 1'b1, bitp);
      repeat ($urandom_range(3) * 7) @(posedge clk);
    end
  endtask

  initial begin
    rst = 1'b1; rxd = 1'b1; wls7 = 1'b0; pen = 1'b0; eps = 1'b0;
    repeat (4) @(posedge clk);
    rst = 1'b0;
    repeat (50) @(posedge clk);
    // 8N1, nominal and +-3 % bit time
    burst(10, BIT_P);
    burst(5, BIT_P + 1);
    burst(5, BIT_P - 1);
    frame(8'h00, 1'b0, 1'b1, BIT_P);
    frame(8'hFF, 1'b0, 1'b1, BIT_P);
    // framing error
    frame(8'hA5, 1'b0, 1'b0, BIT_P);
    repeat (BIT_P) @(posedge clk);
    // glitch shorter than half a bit: no frame
    rxd = 1'b0; repeat (TICK_P * 3) @(posedge clk); rxd = 1'b1;
    repeat (20 * BIT_P) @(posedge clk);
    // break: line low for two frame times
    exp_q.push_back('{data: 8'h00, err: '{bi: 1'b1, fe: 1'b1, pe: 1'b0}});
    t_start = cycle;
    rxd = 1'b0;
    repeat (20 * BIT_P) @(posedge clk);
    rxd = 1'b1;
    repeat (3 * BIT_P) @(posedge clk);
    burst(3, BIT_P);
    // 7N1
    wls7 = 1'b1;
    burst(8, BIT_P);
    // 8E1 with a parity error
    wls7 = 1'b0; pen = 1'b1; eps = 1'b1;
    burst(8, BIT_P);
    frame(8'h3C, 1'b1, 1'b1, BIT_P);
    frame(8'h01, 1'b1, 1'b1, BIT_P);
    // 7O1 with a parity error
    wls7 = 1'b1; eps = 1'b0;
    burst(8, BIT_P);
    frame(8'h55, 1'b1, 1'b1, BIT_P);
    repeat (4 * BIT_P) @(posedge clk);
    check(exp_q.size() == 0, $sformatf("%0d frames not received", exp_q.size()));
    check(n_fe >= 2 && n_pe >= 3 && n_bi >= 1 && n_ok >= 40,
          $sformatf("cases: ok %0d fe %0d pe %0d bi %0d", n_ok, n_fe, n_pe, n_bi));
    $display("ok %0d framing %0d parity %0d break %0d", n_ok, n_fe, n_pe, n_bi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_baud_gen -- self-checking testbench for baud_gen.
//
// For several divisors (1, 2, 5, 260 and 65535) it measures the distance in
// clock cycles between consecutive ticks and checks that it equals the
// divisor, that each tick lasts one cycle, and that divisor 0 gives no tick.
// 260 is the divisor for 9600 baud from a 40 MHz clock.
module tb_baud_gen;
  logic        clk = 1'b0;
  logic        rst;
  logic [15:0] divisor;
  logic        tick;
  int          checks = 0, failures = 0;
  longint      cycle = 0;

  baud_gen dut (.clk, .rst, .divisor, .tick);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (400_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Measure NTICK tick intervals with divisor d.
  task automatic measure(input logic [15:0] d, input int nt);
    longint last;
    int     seen;
    rst = 1'b1; divisor = d;
    repeat (2) @(posedge clk);
    rst = 1'b0;
    seen = 0; last = -1;
    // first tick: d cycles after reset is released
    while (seen < nt) begin
      @(posedge clk);
      if (tick) begin
        if (last >= 0)
          check(cycle - last == longint'(d), $sformatf("divisor %0d: interval %0d", d, cycle - last));
        else
          check(1'b1, "first tick");
        last = cycle;
        seen++;
      end
      if (last >= 0 && cycle - last > longint'(d) + 2) begin
        check(1'b0, $sformatf("divisor %0d: tick missing", d));
        return;
      end
    end
    // one-cycle pulse (divisor above 1)
    if (d > 1) begin
      @(posedge clk);
      check(!tick, "tick lasts one cycle");
    end
  endtask

  initial begin
    rst = 1'b1; divisor = 16'd5;
    measure(16'd1, 20);
    measure(16'd2, 20);
    measure(16'd5, 20);
    measure(16'd260, 10);
    measure(16'd65535, 3);
    // divisor 0 stops the generator
    rst = 1'b1; divisor = 16'd0;
    @(posedge clk); rst = 1'b0;
    begin
      int n;
      n = 0;
      repeat (1000) begin
        @(posedge clk);
        if (tick) n++;
      end
      check(n == 0, "divisor 0 gives no tick");
    end
    // changing the divisor while running
    rst = 1'b1; divisor = 16'd7;
    @(posedge clk); rst = 1'b0;
    do @(posedge clk); while (!tick);
    divisor = 16'd3;
    do @(posedge clk); while (!tick);
    begin
      longint t0;
      t0 = cycle;
      do @(posedge clk); while (!tick);
      check(cycle - t0 == 3, "new divisor takes effect");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

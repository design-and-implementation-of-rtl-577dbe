// tb_uart_tx -- self-checking testbench for uart_tx.
//
// A queue stands in for the transmit FIFO. The testbench sends bytes in
// 8N1, 7N1, 8 data bits with even parity and 7 with odd parity, some back
// to back and some with the queue running empty in between. An independent
// checker builds the expected frame of every byte the transmitter takes
// (start 0, data LSB first, parity, stop 1) and compares txd at every tick
// with bit (k-1)/16 of the frame, k counting ticks from the load. It also
// checks that the line idles at 1, that a frame lasts 16 ticks per bit and
// that queued bytes follow without a gap.
module tb_uart_tx;
  localparam int TICK_P = 3;  // clock cycles per 16x tick

  logic       clk = 1'b0;
  logic       rst;
  logic       tick;
  logic       wls7, pen, eps;
  logic       fifo_valid;
  logic [7:0] fifo_data;
  logic       pop, txd, busy;
  int         checks = 0, failures = 0;
  int         frames = 0, gapless = 0;
  logic [7:0] q[$];

  uart_tx dut (.*);

  always #5 clk = ~clk;

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

  // tick generator
  int tcnt = 0;
  always @(posedge clk) begin
    if (rst) begin tcnt <= 0; tick <= 1'b0; end
    else begin
      tcnt <= (tcnt == TICK_P - 1) ? 0 : tcnt + 1;
      tick <= (tcnt == TICK_P - 1);
    end
  end

  assign fifo_valid = (q.size() != 0);
  assign fifo_data  = (q.size() != 0) ? q[0] : 8'h00;

  always @(posedge clk) if (pop) void'(q.pop_front());

  // frame checker
  bit   exp_bits[$];
  int   k;          // ticks since load, 0 = not in a frame
  bit   in_frame = 0;
  always @(posedge clk) begin
    if (!rst && tick) begin
      if (in_frame) begin
        k++;
        check(txd == exp_bits[(k - 1) / 16],
              $sformatf("frame bit %0d (tick %0d) txd=%0b", (k - 1) / 16, k, txd));
        if (k == 16 * exp_bits.size()) begin
          in_frame = 0;
          frames++;
          if (pop) gapless++;
        end
      end else begin
        check(txd == 1'b1, "idle line is mark");
      end
      if (pop) begin
        int n;
        bit par;
        check(!in_frame, "load only at end of frame");
        n = wls7 ? 7 : 8;
        exp_bits.delete();
        exp_bits.push_back(1'b0);
        par = 1'b0;
        for (int i = 0; i < n; i++) begin
          exp_bits.push_back(fifo_data[i]);
          par ^= fifo_data[i];
        end
        if (pen) exp_bits.push_back(eps ? par : ~par);
        exp_bits.push_back(1'b1);
        k = 0;
        in_frame = 1;
      end
    end
    if (!rst && pop) check(tick, "load on a tick");
  end

  task automatic send(input int n, input bit burst);
    for (int i = 0; i < n; i++) begin
      q.push_back(8'($urandom));
      if (!burst) begin
        wait (q.size() == 0);
        wait (!busy);
        repeat ($urandom_range(40)) @(posedge clk);
      end
    end
    wait (q.size() == 0);
    wait (!busy);
    repeat (5) @(posedge clk);
  endtask

  initial begin
    rst = 1'b1; wls7 = 1'b0; pen = 1'b0; eps = 1'b0;
    repeat (4) @(posedge clk);
    rst = 1'b0;
    check(txd == 1'b1, "txd high after reset");
    // 8N1
    send(6, 1'b0);
    send(6, 1'b1);
    // 7N1
    wls7 = 1'b1;
    send(6, 1'b1);
    // 8E1
    wls7 = 1'b0; pen = 1'b1; eps = 1'b1;
    send(6, 1'b1);
    // 7O1
    wls7 = 1'b1; pen = 1'b1; eps = 1'b0;
    send(6, 1'b0);
    send(4, 1'b1);
    check(frames == 34, $sformatf("frames sent %0d", frames));
    check(gapless >= 10, $sformatf("back-to-back frames %0d", gapless));
    $display("frames %0d back-to-back %0d", frames, gapless);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_uart_fifo -- self-checking testbench for uart_fifo.
//
// Drives random pushes and pops (with phases biased towards filling and
// towards draining) into a 16-entry, 11-bit FIFO and compares the head,
// count, empty and full outputs every cycle against a queue model. Pushes
// into a full FIFO and pops from an empty one must be ignored.
module tb_uart_fifo;
  localparam int W = 11;
  localparam int D = 16;

  logic          clk = 1'b0;
  logic          rst;
  logic          push, pop;
  logic [W-1:0]  wdata, rdata;
  logic          empty, full;
  logic [4:0]    count;
  int            checks = 0, failures = 0;
  int            n_full = 0, n_empty = 0, n_push_full = 0, n_pop_empty = 0;
  logic [W-1:0]  model[$];

  uart_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    rst = 1'b1; push = 1'b0; pop = 1'b0; wdata = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int i = 0; i < 20000; i++) begin
      int bias;
      bias  = ((i / 500) % 2 == 0) ? 70 : 30;   // fill phase / drain phase
      push  = ($urandom_range(99) < bias);
      pop   = ($urandom_range(99) < 100 - bias);
      wdata = W'($urandom);
      // compare state before the edge
      check(empty == (model.size() == 0), "empty");
      check(full  == (model.size() == D), "full");
      check(count == 5'(model.size()), $sformatf("count %0d vs %0d", count, model.size()));
      if (model.size() != 0) check(rdata == model[0], "head data");
      if (full) n_full++;
      if (empty) n_empty++;
      if (push && model.size() == D && !(pop)) n_push_full++;
      if (pop && model.size() == 0) n_pop_empty++;
      @(posedge clk);
      // model update, same rules as the design
      begin
        bit do_push, do_pop;
        do_push = push && model.size() != D;
        do_pop  = pop && model.size() != 0;
        if (do_pop) void'(model.pop_front());
        if (do_push) model.push_back(wdata);
      end
      #1;
    end
    check(n_full > 0 && n_empty > 0 && n_push_full > 0 && n_pop_empty > 0, "all corner cases reached");
    $display("full %0d empty %0d push-on-full %0d pop-on-empty %0d", n_full, n_empty, n_push_full, n_pop_empty);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

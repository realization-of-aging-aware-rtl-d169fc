// Self-checking testbench for aging_indicator.
//
// Uses a short window (16 operations) and a threshold of 3 errors. The
// scenarios: 3 errors in a window (not aged); errors split across a window
// boundary, 3 + 1 (not aged, the count restarts); errors signalled in
// cycles without a checked operation (ignored); a 4th error in the last
// operation of a window (aged rises on exactly that edge); aged staying 1
// through later error-free windows; and reset clearing it.
module tb_aging_indicator;
  localparam int unsigned WINDOW = 16;
  localparam int unsigned ERR_TH = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic op_done = 1'b0, err = 1'b0;
  logic aged;

  int checks   = 0;
  int failures = 0;

  aging_indicator #(.WINDOW(WINDOW), .ERR_TH(ERR_TH)) dut (
    .clk(clk), .rst_n(rst_n), .op_done(op_done), .err(err), .aged(aged)
  );

  always #5 clk = ~clk;

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_aged(logic exp, string what);
    checks++;
    if (aged !== exp) begin
      failures++;
      $display("FAIL %s: aged=%b expected %b at %0t", what, aged, exp, $time);
    end
  endtask

  // One clock cycle with the given inputs; inputs change on the falling edge.
  task automatic cycle(logic done_i, logic err_i);
    op_done = done_i;
    err     = err_i;
    @(negedge clk);
    op_done = 1'b0;
    err     = 1'b0;
  endtask

  // A whole window of operations with errors at the listed positions.
  task automatic window(logic [WINDOW-1:0] err_at, string what);
    for (int i = 0; i < WINDOW; i++) begin
      cycle(1'b1, err_at[i]);
      expect_aged(1'b0, what);
    end
  endtask

  initial begin
    @(negedge clk);
    rst_n = 1'b1;
    expect_aged(1'b0, "after reset");
    window(16'b0000_0000_0000_0111, "three errors in a window");
    window(16'b1110_0000_0000_0000, "three errors at window end");
    window(16'b0000_0000_0000_0001, "one error after window boundary");
    // Error flags without a checked operation must not count.
    for (int i = 0; i < 10; i++) begin
      cycle(1'b0, 1'b1);
      expect_aged(1'b0, "error without operation");
    end
    window(16'b0000_0000_0000_0000, "idle window");
    // Three errors early, then the fourth on the last operation.
    for (int i = 0; i < WINDOW - 1; i++) begin
      cycle(1'b1, i < 3);
      expect_aged(1'b0, "before fourth error");
    end
    cycle(1'b1, 1'b1);
    expect_aged(1'b1, "fourth error in window");
    for (int i = 0; i < 3 * WINDOW; i++) begin
      cycle(1'b1, 1'b0);
      expect_aged(1'b1, "aged is sticky");
    end
    rst_n = 1'b0;
    #1;
    expect_aged(1'b0, "asynchronous reset");
    @(negedge clk);
    rst_n = 1'b1;
    // After reset a burst of four errors in one window ages it again.
    cycle(1'b1, 1'b1);
    cycle(1'b1, 1'b1);
    cycle(1'b1, 1'b1);
    expect_aged(1'b0, "three errors after reset");
    cycle(1'b1, 1'b1);
    expect_aged(1'b1, "four errors after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

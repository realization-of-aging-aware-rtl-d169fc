// Self-checking testbench for razor_reg (and through it razor_ff).
//
// clk has a 10 ns period; clk_del rises 3 ns after each clk edge. Each
// trial changes the 64-bit input from its previous value to a new random
// one. Bits in a random "late" mask change only 1 ns after the capturing
// clk edge, emulating paths slower than the clock period: the main flops
// then hold the old value of those bits, the shadow flops the new one, and
// err must be 1 exactly when a late bit really changed. The testbench then
// drives restore as the surrounding logic would, with d showing other data
// in that cycle, and checks that the main flops hold the correct word one
// edge later and err clears.
module tb_razor_reg;
  localparam int unsigned W = 64;

  logic         clk = 1'b0, clk_del = 1'b0, rst_n = 1'b0;
  logic [W-1:0] d = '0;
  logic         restore = 1'b0;
  logic [W-1:0] q;
  logic         err;

  int checks   = 0;
  int failures = 0;
  int n_err    = 0;

  razor_reg dut (
    .clk(clk), .clk_del(clk_del), .rst_n(rst_n), .d(d),
    .restore(restore), .q(q), .err(err)
  );

  // 10 ns period; clk_del follows clk by 3 ns
  initial begin
    #5;
    forever begin
      clk = 1'b1;
      #3 clk_del = 1'b1;
      #2 clk = 1'b0;
      #3 clk_del = 1'b0;
      #2;
    end
  end

  initial begin
    #200_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    logic [W-1:0] prev, nxt, late, seen;
    #12 rst_n = 1'b1;
    @(posedge clk);
    #1;
    expect_eq("reset q", q, '0);
    expect_eq("reset err", W'(err), '0);
    prev = '0;
    for (int t = 0; t < 400; t++) begin
      nxt  = {$urandom(), $urandom()};
      late = (t % 4 == 0) ? '0 : {$urandom(), $urandom()} & {$urandom(), $urandom()};
      if (t % 9 == 0) late = '1;  // the whole word late
      // On-time bits take their new value well before the next edge.
      d = (nxt & ~late) | (prev & late);
      @(posedge clk);
      #1 d = nxt;                    // late bits arrive after the edge
      #4;                            // after clk_del: err is valid
      seen = (nxt & ~late) | (prev & late);
      expect_eq("main capture", q, seen);
      expect_eq("error flag", W'(err), W'(|((prev ^ nxt) & late)));
      if (err) n_err++;
      restore = err;
      // The datapath may already show other data during the restore cycle:
      // the restored value must come from the shadow copy, not from d.
      if (err) d = ~nxt;
      @(posedge clk);
      #1 restore = 1'b0;
      d = nxt;
      #4;
      expect_eq("after restore", q, nxt);
      expect_eq("error cleared", W'(err), '0);
      prev = nxt;
    end
    checks++;
    if (n_err == 0) begin
      failures++;
      $display("FAIL no timing error was ever produced");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

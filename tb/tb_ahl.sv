// Self-checking testbench for ahl (adaptive hold logic).
//
// Runs at N = 32 with the default zero threshold of 16 and a short aging
// window (8 operations, more than 1 error ages the circuit). Inputs change
// on the falling clock edge and the outputs are compared against a
// cycle-level reference written here:
//   one-cycle pattern = zeros(a) > 16 when fresh, > 17 when aged;
//   gating_n = (one-cycle and no error) or the previous cycle held;
//   aged set after more than 1 error among the operations of a window.
// Directed phases cover a steady one-cycle pattern (never held), a
// two-cycle pattern (held every other cycle), an error forcing a hold, a
// pattern with exactly 17 zeros before and after aging (one cycle, then two
// cycles), then random stimulus. Each mechanism must be seen at least once.
module tb_ahl;
  localparam int unsigned N      = 32;
  localparam int unsigned TH     = 16;
  localparam int unsigned WINDOW = 8;
  localparam int unsigned ERR_TH = 1;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] a = '1;
  logic         op_done = 1'b0, err = 1'b0;
  logic         gating_n, q, aged;

  int checks   = 0;
  int failures = 0;
  int n_hold_pattern = 0, n_hold_error = 0, n_strict = 0;

  // reference state
  logic ref_q = 1'b0, ref_aged = 1'b0;
  int   ref_ops = 0, ref_errs = 0;

  ahl #(.N(N), .THRESH(TH), .WINDOW(WINDOW), .ERR_TH(ERR_TH)) dut (
    .clk(clk), .rst_n(rst_n), .a(a), .op_done(op_done), .err(err),
    .gating_n(gating_n), .q(q), .aged(aged)
  );

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] with_zeros(int nz);
    logic [N-1:0] x = '1;
    int placed = 0;
    while (placed < nz) begin
      int k = int'($urandom_range(N - 1, 0));
      if (x[k]) begin
        x[k] = 1'b0;
        placed++;
      end
    end
    return x;
  endfunction

  function automatic int zeros_of(logic [N-1:0] x);
    int z = 0;
    for (int i = 0; i < N; i++) if (!x[i]) z++;
    return z;
  endfunction

  // Apply inputs for one cycle, check the outputs, advance the reference.
  task automatic step(logic [N-1:0] a_i, logic done_i, logic err_i);
    logic one, exp_g;
    a       = a_i;
    op_done = done_i;
    err     = err_i && ref_q;   // the top only reports errors after a completing edge
    #1;
    one   = zeros_of(a_i) > (ref_aged ? TH + 1 : TH);
    exp_g = (one && !err) || !ref_q;
    checks += 3;
    if (gating_n !== exp_g) begin
      failures++;
      $display("FAIL gating_n=%b expected %b (zeros=%0d aged=%b q=%b err=%b) at %0t",
               gating_n, exp_g, zeros_of(a_i), ref_aged, ref_q, err, $time);
    end
    if (q !== ref_q) begin
      failures++;
      $display("FAIL q=%b expected %b at %0t", q, ref_q, $time);
    end
    if (aged !== ref_aged) begin
      failures++;
      $display("FAIL aged=%b expected %b at %0t", aged, ref_aged, $time);
    end
    if (ref_q && !exp_g && !err) n_hold_pattern++;
    if (ref_q && err) n_hold_error++;
    if (ref_aged && zeros_of(a_i) == TH + 1 && ref_q && !err) n_strict++;
    @(negedge clk);
    // reference update for the edge just passed
    if (op_done) begin
      if (ref_errs + int'(err) > ERR_TH) ref_aged = 1'b1;
      if (ref_ops == WINDOW - 1) begin
        ref_ops  = 0;
        ref_errs = 0;
      end else begin
        ref_ops++;
        ref_errs += int'(err);
      end
    end
    ref_q = exp_g;
  endtask

  task automatic expect_g(logic exp, string what);
    checks++;
    if (gating_n !== exp) begin
      failures++;
      $display("FAIL %s: gating_n=%b expected %b", what, gating_n, exp);
    end
  endtask

  initial begin
    logic [N-1:0] x;
    @(negedge clk);
    rst_n = 1'b1;
    // steady one-cycle pattern: never held
    x = with_zeros(24);
    for (int i = 0; i < 6; i++) step(x, 1'b0, 1'b0);
    // a two-cycle pattern is held for exactly one cycle, repeatedly
    x = with_zeros(8);
    for (int i = 0; i < 6; i++) step(x, 1'b0, 1'b0);
    // 17 zeros: one cycle while fresh
    x = with_zeros(TH + 1);
    a = x;
    #1 expect_g(1'b1, "17 zeros fresh");
    for (int i = 0; i < 3; i++) step(x, 1'b1, 1'b0);
    // an error on a one-cycle pattern forces a hold
    step(with_zeros(24), 1'b1, 1'b1);
    step(with_zeros(24), 1'b1, 1'b0);
    // a second error in the window ages the circuit
    step(with_zeros(24), 1'b1, 1'b1);
    step(with_zeros(24), 1'b1, 1'b0);
    checks++;
    if (!aged) begin
      failures++;
      $display("FAIL two errors in a window did not age the circuit");
    end
    // 17 zeros: two cycles once aged
    for (int i = 0; i < 4; i++) step(x, 1'b1, 1'b0);
    // random traffic
    for (int i = 0; i < 3000; i++) begin
      int nz;
      nz = int'($urandom_range(N, 0));
      step(with_zeros(nz), 1'($urandom_range(1, 0)), ($urandom_range(9, 0) == 0));
    end
    checks += 3;
    if (n_hold_pattern == 0) begin failures++; $display("FAIL no pattern hold seen"); end
    if (n_hold_error == 0)   begin failures++; $display("FAIL no error hold seen"); end
    if (n_strict == 0)       begin failures++; $display("FAIL stricter judging never used"); end
    $display("holds for pattern %0d, for error %0d, stricter judgement %0d",
             n_hold_pattern, n_hold_error, n_strict);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

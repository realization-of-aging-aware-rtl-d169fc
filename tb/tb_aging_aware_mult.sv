// End-to-end testbench for aging_aware_mult at its default parameters
// (32 x 32 bits, zero threshold 16, aging window 1024 operations, more than
// 32 errors per window ages the circuit).
//
// RTL has no delays, so the testbench supplies the datapath timing. clk has
// a 10 ns period and clk_del rises 3 ns after it. The Razor register's
// input is driven with the multiplier output delayed by 4 ns: new operands
// reach it after clk_del (the minimum-delay condition a real datapath meets,
// without which the shadow copies would catch the next operation) and well
// before the next clk edge. An aged, slow operation is emulated by showing
// a wrong product from 1 ns before the edge to 1 ns after it, so the main
// flops take the wrong value and the shadow copies the right one. Phases:
// fresh (no late results), then aging (10 % of completions late), until the aging
// indicator trips and the stricter judging block takes over.
//
// The first operation is 0x10101010 * 0x10101010, whose product is
// 0x0102030403020100. Checks, against values worked out here: every
// product (in order); the
// latency of every operation in cycles (1 for a one-cycle pattern, 2 for a
// two-cycle pattern or when the previous result needed a restore, plus 1
// when the operation's own result was late); razor_err exactly when a late
// result was injected at a completing edge; no error for a wrong value at
// the first edge of a two-cycle operation; and aged against a model of the
// error window. Each mechanism must occur at least once.
module tb_aging_aware_mult;
  localparam int unsigned N    = 32;
  localparam int unsigned TH   = 16;
  localparam int unsigned WIN  = 1024;
  localparam int unsigned ETH  = 32;
  localparam int          NOPS = 3000;

  typedef struct {
    logic [N-1:0]   a, b;
    logic [2*N-1:0] p;
    int             acc_cyc;  // first cycle the operands sit in the input flip-flops
    int             base;     // cycles the design should give it
    bit             late;     // its result was injected late
  } op_t;

  logic           clk = 1'b0, clk_del = 1'b0, rst_n = 1'b0;
  logic           load = 1'b0;
  logic [N-1:0]   a = '0, b = '0;
  logic           ready, done, razor_err, aged;
  logic [2*N-1:0] result;

  aging_aware_mult dut (
    .clk(clk), .clk_del(clk_del), .rst_n(rst_n), .load(load), .ready(ready),
    .a(a), .b(b), .result(result), .done(done), .razor_err(razor_err), .aged(aged)
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

  int checks = 0, failures = 0;
  // mechanism counters
  int n_one = 0, n_two = 0, n_err_hold = 0, n_late = 0, n_glitch = 0;
  int n_bubble = 0, n_strict = 0, n_aged = 0, n_done = 0, n_fig = 0;

  // datapath delay model
  logic [2*N-1:0] d_model = '0, late_val = '0;
  bit             late_on = 0;
  always @(dut.prod) d_model <= #4 dut.prod;
  always @(d_model, late_on, late_val) begin
    if (late_on) force dut.u_razor.d = late_val;
    else         force dut.u_razor.d = d_model;
  end

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL %s at %0t", msg, $time);
  endtask

  function automatic int zeros_of(logic [N-1:0] x);
    int z = 0;
    for (int i = 0; i < N; i++) if (!x[i]) z++;
    return z;
  endfunction

  function automatic logic [N-1:0] operand(int kind);
    logic [N-1:0] x;
    x = $urandom();
    case (kind)
      0: x = x & $urandom();                // sparse: usually one cycle
      1: x = x | $urandom();                // dense: two cycles
      default: ;
    endcase
    return x;
  endfunction

  op_t ops[$];                   // accepted, not yet delivered
  int  next_id = 0, done_id = 0; // ids = positions in accepted order
  int  held_id = -1;             // op in the input flip-flops, -1 for none
  int  judge_id = -1;            // op to be judged at the next falling edge
  op_t all_ops[NOPS + 8];

  // aging model
  int  ref_ops = 0, ref_errs = 0;
  bit  ref_aged = 0;
  bit  chk_d = 0, chk_err_d = 0;
  bit  exp_err = 0;

  initial begin
    int cyc = 0;
    int completions = 0;
    bit inj, glitch, completing, accepting;
    op_t o;

    #12 rst_n = 1'b1;

    while (done_id < NOPS) begin
      @(negedge clk);
      cyc++;

      // ---- observe ----
      checks++;
      if (razor_err !== exp_err) fail($sformatf("razor_err=%b expected %b", razor_err, exp_err));
      checks++;
      if (aged !== ref_aged) fail($sformatf("aged=%b expected %b", aged, ref_aged));
      if (chk_d) begin
        if (ref_errs + int'(chk_err_d) > int'(ETH) && !ref_aged) begin
          ref_aged = 1;
          n_aged++;
          $display("aging indicator trips after %0d completions", completions);
        end
        if (ref_ops == int'(WIN) - 1) begin
          ref_ops  = 0;
          ref_errs = 0;
        end else begin
          ref_ops++;
          ref_errs += int'(chk_err_d);
        end
      end
      if (judge_id >= 0) begin
        bit one_cycle;
        one_cycle = zeros_of(all_ops[judge_id].a) > (ref_aged ? TH + 1 : TH);
        all_ops[judge_id].acc_cyc = cyc;
        all_ops[judge_id].base    = (one_cycle && !razor_err) ? 1 : 2;
        if (razor_err) n_err_hold++;
        else if (one_cycle) n_one++;
        else n_two++;
        if (ref_aged && zeros_of(all_ops[judge_id].a) == TH + 1) n_strict++;
        judge_id = -1;
      end
      if (done) begin
        if (done_id >= next_id) fail("done without an operation");
        else begin
          o = all_ops[done_id];
          checks++;
          if (done_id == 0 && o.a == 32'h1010_1010 && o.b == 32'h1010_1010 && result == 64'h0102_0304_0302_0100)
            n_fig++;
          if (result !== o.p) fail($sformatf("op %0d: %h * %h = %h, got %h", done_id, o.a, o.b, o.p, result));
          checks++;
          if (cyc - o.acc_cyc != o.base + int'(o.late))
            fail($sformatf("op %0d latency %0d expected %0d", done_id, cyc - o.acc_cyc, o.base + int'(o.late)));
          done_id++;
          n_done++;
        end
      end

      // ---- plan the next edge ----
      if (cyc == 1) begin
        // the first operation is the operand pair of the published waveform
        a    = 32'h1010_1010;
        b    = 32'h1010_1010;
        load = 1'b1;
      end
      accepting  = ready;
      completing = ready && (held_id >= 0);
      inj        = completing && (completions >= 400) && ($urandom_range(9, 0) == 0);
      glitch     = !ready && (held_id >= 0) && ($urandom_range(3, 0) == 0);
      if (completing) begin
        all_ops[held_id].late = inj;
        completions++;
        if (inj) n_late++;
      end
      if (glitch) n_glitch++;
      chk_d     = completing;
      chk_err_d = inj;
      exp_err   = inj;

      if (accepting) begin
        if (load) begin
          o.a = a;
          o.b = b;
          o.p = 64'(a) * 64'(b);
          o.late = 0;
          o.base = 0;
          o.acc_cyc = 0;
          all_ops[next_id] = o;
          held_id  = next_id;
          judge_id = next_id;
          next_id++;
        end else begin
          held_id = -1;
          n_bubble++;
        end
      end

      // ---- datapath timing around the edge ----
      #4;                                    // 1 ns before the edge
      if (inj || glitch) begin
        late_val = ~d_model;
        late_on  = 1;
      end
      #2;                                    // 1 ns after the edge
      late_on = 0;
      if (accepting) begin
        // new operands for the next acceptance
        int kind;
        kind = int'($urandom_range(2, 0));
        a    = operand(kind);
        b    = operand(int'($urandom_range(2, 0)));
        if (next_id % 3 == 1) a = operand(2);           // near the threshold
        load = (next_id < NOPS) && ($urandom_range(19, 0) != 0);
      end
    end

    checks++;
    if (next_id != NOPS) fail("not every operation was accepted");
    $display("one-cycle %0d, two-cycle %0d, held after error %0d, late results %0d,",
             n_one, n_two, n_err_hold, n_late);
    $display("ignored first-cycle mismatches %0d, bubbles %0d, stricter judgements %0d, aged %0d, done %0d",
             n_glitch, n_bubble, n_strict, n_aged, n_done);
    checks += 10;
    if (n_fig != 1)      fail("waveform operand pair not delivered first");
    if (n_one == 0)      fail("no one-cycle operation");
    if (n_two == 0)      fail("no two-cycle operation");
    if (n_err_hold == 0) fail("no hold after an error");
    if (n_late == 0)     fail("no late result");
    if (n_glitch == 0)   fail("no first-cycle mismatch");
    if (n_bubble == 0)   fail("no bubble");
    if (n_strict == 0)   fail("stricter judging never applied");
    if (n_aged == 0)     fail("aging indicator never tripped");
    if (n_done != NOPS)  fail("not every operation delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

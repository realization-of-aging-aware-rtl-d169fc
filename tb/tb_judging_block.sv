// Self-checking testbench for judging_block.
//
// Drives multiplicands with a chosen number of zeros (every count from 0 to
// N, at random positions) and random ones, and compares one_cycle with a
// zero count made in the testbench: 1 exactly when more than THRESH bits are
// zero. Two instances check the default threshold and THRESH + 1, as the
// adaptive hold logic uses them.
module tb_judging_block;
  localparam int unsigned N  = 32;
  localparam int unsigned TH = 16;

  logic [N-1:0] a;
  logic         one1, one2;

  int checks   = 0;
  int failures = 0;

  judging_block                          dut1 (.a(a), .one_cycle(one1));
  judging_block #(.N(N), .THRESH(TH + 1)) dut2 (.a(a), .one_cycle(one2));

  function automatic int zeros_of(logic [N-1:0] x);
    int z = 0;
    for (int i = 0; i < N; i++) if (x[i] == 1'b0) z++;
    return z;
  endfunction

  // A word with exactly nz zero bits at random places.
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

  task automatic check(logic [N-1:0] x);
    int z;
    a = x;
    #1;
    z = zeros_of(x);
    checks += 2;
    if (one1 !== (z > TH)) begin
      failures++;
      $display("FAIL block1 a=%h zeros=%0d one_cycle=%b", x, z, one1);
    end
    if (one2 !== (z > TH + 1)) begin
      failures++;
      $display("FAIL block2 a=%h zeros=%0d one_cycle=%b", x, z, one2);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int nz = 0; nz <= N; nz++)
      for (int r = 0; r < 20; r++) check(with_zeros(nz));
    for (int r = 0; r < 2000; r++) check($urandom());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

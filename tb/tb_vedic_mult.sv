// Self-checking testbench for vedic_mult.
//
// Checks the default 32 x 32 multiplier against the simulator's own 64-bit
// product on corner operands and random ones (dense, sparse and mixed), a
// 64 x 64 instance on random operands, and a 4 x 4 instance exhaustively. Purely combinational; a watchdog ends the
// run if it hangs.
module tb_vedic_mult;
  localparam int unsigned N = 32;

  logic [N-1:0]   a, b;
  logic [2*N-1:0] p;
  logic [63:0]    a64, b64;
  logic [127:0]   p64;
  logic [3:0]     a4, b4;
  logic [7:0]     p4;

  int checks   = 0;
  int failures = 0;

  vedic_mult            dut  (.a(a),  .b(b),  .p(p));
  vedic_mult #(.N(64))  dut64 (.a(a64), .b(b64), .p(p64));
  vedic_mult #(.N(4))   dut4 (.a(a4), .b(b4), .p(p4));

  task automatic check32(input logic [N-1:0] x, input logic [N-1:0] y);
    logic [2*N-1:0] ref_p;
    a = x;
    b = y;
    #1;
    ref_p = 64'(x) * 64'(y);
    checks++;
    if (p !== ref_p) begin
      failures++;
      if (failures < 10)
        $display("FAIL %h * %h: got %h expected %h", x, y, p, ref_p);
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
    check32('0, '0);
    check32('1, '1);
    check32('1, 32'd1);
    check32(32'h1010_1010, 32'h1010_1010);  // a pattern with many zeros
    check32(32'h8000_0000, 32'h8000_0000);
    check32(32'hFFFF_0000, 32'h0000_FFFF);
    for (int i = 0; i < 3000; i++) begin
      logic [N-1:0] x, y;
      x = $urandom();
      y = $urandom();
      case (i % 3)
        1: begin x &= $urandom(); y &= $urandom(); end  // sparse
        2: begin x |= $urandom(); y |= $urandom(); end  // dense
        default: ;
      endcase
      check32(x, y);
    end
    for (int i = 0; i < 1000; i++) begin
      a64 = {$urandom(), $urandom()};
      b64 = {$urandom(), $urandom()};
      if (i == 0) begin a64 = '1; b64 = '1; end
      #1;
      checks++;
      if (p64 !== 128'(a64) * 128'(b64)) begin
        failures++;
        if (failures < 10) $display("FAIL 64x64 %h * %h: got %h", a64, b64, p64);
      end
    end
    for (int x = 0; x < 16; x++) begin
      for (int y = 0; y < 16; y++) begin
        a4 = 4'(x);
        b4 = 4'(y);
        #1;
        checks++;
        if (p4 !== 8'(x * y)) begin
          failures++;
          $display("FAIL 4x4 %0d * %0d: got %0d", x, y, p4);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

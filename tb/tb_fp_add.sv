// tb_fp_add: self-checking test of the single-precision add unit.
//
// Random normal operands over a wide exponent range plus directed special
// cases (zeros, infinities, NaN, cancellation, rounding ties) are applied to
// the combinational unit once per clock; each result is compared bit for bit
// with the correctly rounded reference of fp_ref_pkg. A watchdog ends the run
// with a failure if it does not finish in time.
module tb_fp_add;
  import fp_ref_pkg::*;

  logic        clk = 1'b0;
  logic [31:0] a, b, y, exp_y;
  int          checks = 0, failures = 0, cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  logic sub;
  fp_add dut (.a(a), .b(b), .sub(sub), .y(y));

  task automatic check(logic [31:0] ta, logic [31:0] tb, logic ts);
    a = ta; b = tb; sub = ts;
    exp_y = ts ? fsub(ta, tb) : fadd(ta, tb);
    @(posedge clk);
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10) $display("MISMATCH %h %s %h: got %h expected %h", ta, ts ? "-" : "+", tb, y, exp_y);
    end
  endtask

  initial begin
    logic [31:0] x;
    check(32'h3f800000, 32'h3f800000, 1'b0);   // 1 + 1
    check(32'h3f800000, 32'h3f800000, 1'b1);   // 1 - 1 = +0
    check(32'h80000000, 32'h80000000, 1'b0);   // -0 + -0
    check(32'h3f800000, 32'h33800000, 1'b0);   // 1 + 2^-24, tie to even
    check(32'h3f800001, 32'h33800000, 1'b0);   // tie rounding up
    check(32'h7f800000, 32'h3f800000, 1'b0);   // inf + 1
    check(32'h7f800000, 32'h7f800000, 1'b1);   // inf - inf
    check(32'h7f7fffff, 32'h7f7fffff, 1'b0);   // overflow
    check(32'h00000000, 32'h40490fdb, 1'b1);   // 0 - pi
    for (int i = 0; i < 20000; i++) begin
      x = rnd_fp(60, 190);
      case (i % 4)
        0: check(x, rnd_fp(60, 190), i[4]);
        1: check(x, rnd_fp(int'(x[30:23]) - 3, int'(x[30:23]) + 3), i[4]);
        2: check(x, {x[31:1] ^ 31'($urandom % 4), 1'b0} ^ 32'($urandom % 2), 1'b1);  // cancellation
        default: check(x, rnd_fp(int'(x[30:23]) - 30, int'(x[30:23])), i[4]);
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cyc == 200000);
    failures++;
    $display("watchdog: timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_fp_sqrt: self-checking test of the single-precision sqrt unit.
//
// Random normal operands over a wide exponent range plus directed special
// cases (zeros, infinities, NaN, cancellation, rounding ties) are applied to
// the combinational unit once per clock; each result is compared bit for bit
// with the correctly rounded reference of fp_ref_pkg. A watchdog ends the run
// with a failure if it does not finish in time.
module tb_fp_sqrt;
  import fp_ref_pkg::*;

  logic        clk = 1'b0;
  logic [31:0] a, b, y, exp_y;
  int          checks = 0, failures = 0, cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  assign b = 32'd0;
  fp_sqrt dut (.a(a), .y(y));

  task automatic check(logic [31:0] ta);
    a = ta;
    exp_y = fsqrt(ta);
    @(posedge clk);
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10) $display("MISMATCH sqrt %h: got %h expected %h", ta, y, exp_y);
    end
  endtask

  initial begin
    check(32'h40800000);   // 4
    check(32'h40000000);   // 2
    check(32'h80000000);   // -0
    check(32'hbf800000);   // -1
    check(32'h7f800000);   // inf
    check(32'h00800000);   // smallest normal
    check(32'h7f7fffff);   // largest
    for (int i = 0; i < 20000; i++)
      check(rnd_fp(1, 254) & 32'h7fffffff);
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

// tb_fp_div: self-checking test of the single-precision div unit.
//
// Random normal operands over a wide exponent range plus directed special
// cases (zeros, infinities, NaN, cancellation, rounding ties) are applied to
// the combinational unit once per clock; each result is compared bit for bit
// with the correctly rounded reference of fp_ref_pkg. A watchdog ends the run
// with a failure if it does not finish in time.
module tb_fp_div;
  import fp_ref_pkg::*;

  logic        clk = 1'b0;
  logic [31:0] a, b, y, exp_y;
  int          checks = 0, failures = 0, cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  fp_div dut (.a(a), .b(b), .y(y));

  task automatic check(logic [31:0] ta, logic [31:0] tb);
    a = ta; b = tb;
    exp_y = fdiv(ta, tb);
    @(posedge clk);
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10) $display("MISMATCH %h / %h: got %h expected %h", ta, tb, y, exp_y);
    end
  endtask

  initial begin
    check(32'h3f800000, 32'h40400000);   // 1 / 3
    check(32'h40c00000, 32'h40400000);   // 6 / 3 exact
    check(32'h3f800000, 32'h00000000);   // 1 / 0
    check(32'h00000000, 32'h00000000);   // 0 / 0
    check(32'h7f800000, 32'h7f800000);   // inf / inf
    check(32'hc0000000, 32'h7f800000);   // -2 / inf
    check(32'h7f000000, 32'h00800000);   // overflow
    for (int i = 0; i < 20000; i++)
      check(rnd_fp(70, 180), rnd_fp(70, 180));
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

// tb_particle_update: self-checking test of the particle update unit.
//
// Random particles and accelerations enter on most cycles; each result must
// appear one cycle later with its tag and equal the reference
// v' = v + a*dt, x' = x + v'*dt bit for bit, mass unchanged.
module tb_particle_update;
  import nbody_pkg::*;
  import fp_ref_pkg::*;
  import nbody_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;

  logic       in_valid, out_valid;
  logic [5:0] in_tag, out_tag;
  particle_t  p_in, p_out, exp_p;
  accel_t     acc;
  fp32_t      dt;
  logic       exp_v;
  logic [5:0] exp_tag;
  int checks = 0, failures = 0, cyc = 0;

  particle_update #(.TAG_W(6)) dut (.*);

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    rst_n = 0; in_valid = 0; in_tag = 0; p_in = '0; acc = '0;
    dt = r2f(0.01);
    exp_v = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      in_valid = ($urandom % 5) != 0;
      in_tag   = 6'(t);
      p_in     = rnd_particle();
      acc.ax   = rnd_fp(100, 140);
      acc.ay   = rnd_fp(100, 140);
      if (t % 500 == 0) dt = r2f(real'(1 + $urandom % 100) / 1000.0);
      exp_v   = in_valid;
      exp_tag = in_tag;
      exp_p   = update(p_in, acc, dt);
      @(posedge clk); #1;
      // registered: the result is there exactly one cycle after the input
      checks++;
      if (out_valid !== exp_v || (exp_v && (out_tag !== exp_tag || p_out !== exp_p))) begin
        failures++;
        if (failures < 10) $display("MISMATCH t=%0d got %h expected %h", t, p_out, exp_p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cyc == 100000);
    failures++;
    $display("watchdog: timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

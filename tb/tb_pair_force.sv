// tb_pair_force: self-checking test of the pipelined compute-force unit.
//
// A new random pair enters on most cycles (some are self pairs, some lie
// beyond the cut-off radius, some cycles are empty). Each output is compared
// bit for bit with the reference model, and must leave exactly PAIR_LATENCY
// cycles after its pair entered, with its tag and flag.
module tb_pair_force;
  import nbody_pkg::*;
  import fp_ref_pkg::*;
  import nbody_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;

  logic       in_valid, in_first, in_self;
  logic [7:0] in_tag;
  particle_t  pi, pj;
  fp32_t      grav_g, soft2, cutoff2;
  logic       out_valid, out_first, out_near;
  logic [7:0] out_tag;
  accel_t     out_acc;

  pair_force #(.TAG_W(8)) dut (
    .clk, .rst_n, .in_valid, .in_tag, .in_first, .in_self,
    .xi(pi.x), .yi(pi.y), .xj(pj.x), .yj(pj.y), .mj(pj.m),
    .grav_g, .soft2, .cutoff2,
    .out_valid, .out_tag, .out_first, .out_near, .out_acc
  );

  typedef struct { int due; logic [7:0] tag; logic first; logic near; accel_t acc; } exp_t;
  exp_t q [$];
  int checks = 0, failures = 0, cyc = 0, n_near = 0, n_far = 0;

  always @(posedge clk) cyc <= cyc + 1;

  // checker
  always @(posedge clk) begin
    if (rst_n) begin
      if (q.size() != 0 && q[0].due == cyc) begin
        checks++;
        if (!out_valid || out_tag !== q[0].tag || out_first !== q[0].first ||
            out_near !== q[0].near || out_acc !== q[0].acc) begin
          failures++;
          if (failures < 10)
            $display("MISMATCH cyc=%0d valid=%b tag=%h/%h near=%b/%b acc=%h/%h", cyc, out_valid,
                     out_tag, q[0].tag, out_near, q[0].near, out_acc, q[0].acc);
        end
        void'(q.pop_front());
      end else if (out_valid) begin
        checks++; failures++;
        $display("unexpected output at cyc=%0d", cyc);
      end
    end
  end

  initial begin
    logic near;
    accel_t a;
    rst_n = 0; in_valid = 0; in_first = 0; in_self = 0; in_tag = 0;
    pi = '0; pj = '0;
    grav_g  = r2f(6.674e-3);
    soft2   = r2f(0.01);
    cutoff2 = r2f(2500.0);      // radius 50 in a 100 x 100 box
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      in_valid = ($urandom % 8) != 0;
      pi = rnd_particle();
      pj = (t % 13 == 0) ? pi : rnd_particle();
      in_self  = (t % 13 == 0);
      in_tag   = 8'(t);
      in_first = t[3];
      if (in_valid) begin
        a = pair_acc(pi, pj, in_self, grav_g, soft2, cutoff2, near);
        if (near) n_near++; else n_far++;
        q.push_back('{due: cyc + PAIR_LATENCY, tag: in_tag, first: in_first, near: near, acc: a});
      end
      @(posedge clk); #1;
    end
    in_valid = 0;
    repeat (PAIR_LATENCY + 2) @(posedge clk);
    #1;
    checks++;
    if (q.size() != 0 || n_near == 0 || n_far == 0) begin
      failures++;
      $display("left over %0d, near %0d, excluded %0d", q.size(), n_near, n_far);
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

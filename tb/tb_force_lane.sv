// tb_force_lane: self-checking test of one batch lane.
//
// The lane holds DEPTH particles. For each of NJ broadcast particles j the
// testbench streams all DEPTH particles through the lane on consecutive
// cycles (the first j flagged `in_first`, one j being one of the lane's own
// particles so that a self pair occurs), with an idle gap between some rows.
// Afterwards it reads back the accumulated accelerations and compares them
// bit for bit with the reference sum over j in order. The counts of nearby
// and cut-off pairs
// and the streaming rate (one pair per cycle, no stall) are checked too, and
// a second pass checks that `in_first` clears the previous sums.
module tb_force_lane;
  import nbody_pkg::*;
  import fp_ref_pkg::*;
  import nbody_ref_pkg::*;

  localparam int unsigned DEPTH = 5;
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned NJ = 12;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;

  logic          in_valid, in_first, in_self, acc_rd_en, busy, near_pulse, far_pulse;
  logic [AW-1:0] in_addr, acc_rd_addr;
  particle_t     pi, pj;
  fp32_t         grav_g, soft2, cutoff2;
  accel_t        acc_rd_data;

  force_lane #(.DEPTH(DEPTH)) dut (.*);

  particle_t mine [DEPTH];
  particle_t js   [NJ];
  accel_t    ref_acc [DEPTH];
  int checks = 0, failures = 0, cyc = 0, near_seen = 0, far_seen = 0, near_exp = 0, busy_cycles = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && near_pulse) near_seen++;
    if (rst_n && far_pulse) far_seen++;
    if (busy) busy_cycles++;
  end

  task automatic run_pass(int pass);
    logic near;
    accel_t c;
    int t0;
    for (int i = 0; i < DEPTH; i++) mine[i] = rnd_particle();
    for (int j = 0; j < NJ; j++) js[j] = (j == 3) ? mine[2] : rnd_particle();
    for (int i = 0; i < DEPTH; i++) begin
      ref_acc[i] = '0;
      for (int j = 0; j < NJ; j++) begin
        c = pair_acc(mine[i], js[j], j == 3 && i == 2, grav_g, soft2, cutoff2, near);
        if (near) near_exp++;
        ref_acc[i].ax = fadd(ref_acc[i].ax, c.ax);
        ref_acc[i].ay = fadd(ref_acc[i].ay, c.ay);
      end
    end
    busy_cycles = 0;
    t0 = cyc;
    for (int j = 0; j < NJ; j++) begin
      for (int i = 0; i < DEPTH; i++) begin
        in_valid = 1; in_addr = AW'(i); in_first = (j == 0);
        in_self = (j == 3 && i == 2);
        pi = mine[i]; pj = js[j];
        @(posedge clk); #1;
      end
      if (pass == 1 && j % 4 == 1) begin    // idle gap between rows
        in_valid = 0;
        @(posedge clk); #1;
      end
    end
    in_valid = 0;
    while (busy) @(posedge clk);
    #1;
    // every pair is in flight exactly PAIR_LATENCY cycles, and rows stream
    // without a stall
    checks++;
    if (pass == 0 && (cyc - t0 != NJ * DEPTH + PAIR_LATENCY + 1)) begin
      failures++;
      $display("stream took %0d cycles, expected %0d", cyc - t0, NJ * DEPTH + PAIR_LATENCY + 1);
    end
    for (int i = 0; i < DEPTH; i++) begin
      acc_rd_en = 1; acc_rd_addr = AW'(i);
      @(posedge clk); #1;
      acc_rd_en = 0;
      checks++;
      if (acc_rd_data !== ref_acc[i]) begin
        failures++;
        $display("pass %0d particle %0d: got %h expected %h", pass, i, acc_rd_data, ref_acc[i]);
      end
    end
  endtask

  initial begin
    rst_n = 0; in_valid = 0; in_first = 0; in_self = 0; in_addr = 0;
    acc_rd_en = 0; acc_rd_addr = 0; pi = '0; pj = '0;
    grav_g = r2f(1.0); soft2 = r2f(0.01); cutoff2 = r2f(3600.0);
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    run_pass(0);
    run_pass(1);           // in_first must discard the sums of pass 0
    checks++;
    if (near_seen != near_exp || near_exp == NJ * DEPTH * 2) begin
      failures++;
      $display("nearby pairs %0d, expected %0d (of %0d)", near_seen, near_exp, NJ * DEPTH * 2);
    end
    checks++;
    if (far_seen != NJ * DEPTH * 2 - near_exp) begin
      failures++;
      $display("pairs beyond the cut-off %0d, expected %0d", far_seen, NJ * DEPTH * 2 - near_exp);
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

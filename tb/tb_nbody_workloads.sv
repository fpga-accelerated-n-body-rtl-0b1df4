// tb_nbody_workloads: the report's evaluation runs, at simulable sizes.
//
// Each kernel runs in its own environment (nbody_env), which checks every
// stored particle of every step bit for bit against the single-precision
// reference model and checks the force-phase cycle count.
//   w10:   10 time steps of 1,000 particles in 8 lanes (the report times 10
//          steps of 10,000 particles; one such step is tb_nbody_full).
//   w1000: 1,000 time steps of 64 particles in 8 lanes (the report's
//          longest run is 1,000 iterations of 10,000 particles).
//   b1..b8: one step of 40 particles with 1, 2, 4, 5 and 8 lanes, the batch
//          sizes the report compares; the force phase must shrink as
//          N*N/BATCH.
// w10 and w1000 also measure the accuracy metric: 100 % minus the mean
// relative error of the x and y positions over all particles and steps,
// against a double-precision run of the same algorithm; it must stay at or
// above 90 %, the requirement the report sets.
module tb_nbody_workloads;
  import nbody_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

`define NBODY_WORKLOAD_INST(NAME, NN, BB, SS, ACC) \
  logic NAME``_rst_n, NAME``_start, NAME``_busy, NAME``_done; \
  logic [31:0] NAME``_steps, NAME``_in_base, NAME``_out_base, NAME``_step; \
  fp32_t NAME``_g, NAME``_dt, NAME``_soft2, NAME``_cut2; \
  phase_e NAME``_phase; nbody_events_t NAME``_ev; \
  logic NAME``_rq_v, NAME``_rq_r, NAME``_rq_w, NAME``_rs_v; \
  logic [31:0] NAME``_rq_a; \
  particle_t NAME``_rq_d, NAME``_rs_d; \
  logic NAME``_fin; int NAME``_checks, NAME``_fails; longint NAME``_excl, NAME``_stalls; real NAME``_acc; \
  nbody_kernel #(.N_PARTICLES(NN), .BATCH(BB)) NAME``_dut ( \
    .clk, .rst_n(NAME``_rst_n), .start(NAME``_start), .num_steps(NAME``_steps), \
    .in_base(NAME``_in_base), .out_base(NAME``_out_base), .grav_g(NAME``_g), .dt(NAME``_dt), \
    .soft2(NAME``_soft2), .cutoff2(NAME``_cut2), .busy(NAME``_busy), .done(NAME``_done), \
    .phase(NAME``_phase), .step(NAME``_step), .events(NAME``_ev), \
    .mem_req_valid(NAME``_rq_v), .mem_req_ready(NAME``_rq_r), .mem_req_write(NAME``_rq_w), \
    .mem_req_addr(NAME``_rq_a), .mem_req_wdata(NAME``_rq_d), \
    .mem_rsp_valid(NAME``_rs_v), .mem_rsp_data(NAME``_rs_d)); \
  nbody_env #(.N(NN), .BATCH(BB), .STEPS(SS), .ACCURACY(ACC)) NAME``_env ( \
    .clk, .rst_n(NAME``_rst_n), .start(NAME``_start), .num_steps(NAME``_steps), \
    .in_base(NAME``_in_base), .out_base(NAME``_out_base), .grav_g(NAME``_g), .dt(NAME``_dt), \
    .soft2(NAME``_soft2), .cutoff2(NAME``_cut2), .busy(NAME``_busy), .done(NAME``_done), \
    .phase(NAME``_phase), \
    .mem_req_valid(NAME``_rq_v), .mem_req_ready(NAME``_rq_r), .mem_req_write(NAME``_rq_w), \
    .mem_req_addr(NAME``_rq_a), .mem_req_wdata(NAME``_rq_d), \
    .mem_rsp_valid(NAME``_rs_v), .mem_rsp_data(NAME``_rs_d), \
    .finished(NAME``_fin), .checks(NAME``_checks), .failures(NAME``_fails), \
    .excluded_pairs(NAME``_excl), .stall_cycles(NAME``_stalls), .accuracy(NAME``_acc));


  `NBODY_WORKLOAD_INST(w10, 1000, 8, 10, 1'b1)
  `NBODY_WORKLOAD_INST(w1000, 64, 8, 1000, 1'b1)
  `NBODY_WORKLOAD_INST(b1, 40, 1, 1, 1'b0)
  `NBODY_WORKLOAD_INST(b2, 40, 2, 1, 1'b0)
  `NBODY_WORKLOAD_INST(b4, 40, 4, 1, 1'b0)
  `NBODY_WORKLOAD_INST(b5, 40, 5, 1, 1'b0)
  `NBODY_WORKLOAD_INST(b8, 40, 8, 1, 1'b0)

  int checks = 0, failures = 0;

  initial begin
    wait (w10_fin && w1000_fin && b1_fin && b2_fin && b4_fin && b5_fin && b8_fin);
    checks   = w10_checks + w1000_checks + b1_checks + b2_checks + b4_checks + b5_checks + b8_checks;
    failures = w10_fails + w1000_fails + b1_fails + b2_fails + b4_fails + b5_fails + b8_fails;
    checks += 2;
    if (w10_acc < 90.0)   begin failures++; $display("10-step accuracy %f %% below 90 %%", w10_acc); end
    if (w1000_acc < 90.0) begin failures++; $display("1000-step accuracy %f %% below 90 %%", w1000_acc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cyc == 3_000_000);
    failures++;
    $display("watchdog: timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_nbody_kernel: end-to-end test of the N-body kernel at reduced sizes.
//
// Two kernels run side by side, each in its own environment (nbody_env):
//   A: 16 particles, 8 lanes of 2 (the prefetched particle j is forwarded
//      straight from the memory output), 3 time steps;
//   B: 24 particles, 4 lanes of 6 (the prefetched particle waits in its
//      register), 2 time steps.
// Both use a DRAM with 100 cycles of read latency that refuses requests on
// random cycles. Every stored particle of every step is compared with the
// reference model, and the force phase must take N*N/BATCH cycles plus a
// small overhead. The test also counts how often each mechanism happened:
// load, force, update and store phases, both prefetch paths, self pairs,
// pairs excluded by the cut-off radius, and DRAM back-pressure; one that
// never happened is a failure.
module tb_nbody_kernel;
  import nbody_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

`define NBODY_KERNEL_INST(NAME, NN, BB, SS) \
  logic NAME``_rst_n, NAME``_start, NAME``_busy, NAME``_done; \
  logic [31:0] NAME``_steps, NAME``_in_base, NAME``_out_base, NAME``_step; \
  fp32_t NAME``_g, NAME``_dt, NAME``_soft2, NAME``_cut2; \
  phase_e NAME``_phase; nbody_events_t NAME``_ev; \
  logic NAME``_rq_v, NAME``_rq_r, NAME``_rq_w, NAME``_rs_v; \
  logic [31:0] NAME``_rq_a; \
  particle_t NAME``_rq_d, NAME``_rs_d; \
  logic NAME``_fin; int NAME``_checks, NAME``_fails; longint NAME``_excl, NAME``_stalls; \
  nbody_kernel #(.N_PARTICLES(NN), .BATCH(BB)) NAME``_dut ( \
    .clk, .rst_n(NAME``_rst_n), .start(NAME``_start), .num_steps(NAME``_steps), \
    .in_base(NAME``_in_base), .out_base(NAME``_out_base), .grav_g(NAME``_g), .dt(NAME``_dt), \
    .soft2(NAME``_soft2), .cutoff2(NAME``_cut2), .busy(NAME``_busy), .done(NAME``_done), \
    .phase(NAME``_phase), .step(NAME``_step), .events(NAME``_ev), \
    .mem_req_valid(NAME``_rq_v), .mem_req_ready(NAME``_rq_r), .mem_req_write(NAME``_rq_w), \
    .mem_req_addr(NAME``_rq_a), .mem_req_wdata(NAME``_rq_d), \
    .mem_rsp_valid(NAME``_rs_v), .mem_rsp_data(NAME``_rs_d)); \
  nbody_env #(.N(NN), .BATCH(BB), .STEPS(SS)) NAME``_env ( \
    .clk, .rst_n(NAME``_rst_n), .start(NAME``_start), .num_steps(NAME``_steps), \
    .in_base(NAME``_in_base), .out_base(NAME``_out_base), .grav_g(NAME``_g), .dt(NAME``_dt), \
    .soft2(NAME``_soft2), .cutoff2(NAME``_cut2), .busy(NAME``_busy), .done(NAME``_done), \
    .phase(NAME``_phase), \
    .mem_req_valid(NAME``_rq_v), .mem_req_ready(NAME``_rq_r), .mem_req_write(NAME``_rq_w), \
    .mem_req_addr(NAME``_rq_a), .mem_req_wdata(NAME``_rq_d), \
    .mem_rsp_valid(NAME``_rs_v), .mem_rsp_data(NAME``_rs_d), \
    .finished(NAME``_fin), .checks(NAME``_checks), .failures(NAME``_fails), \
    .excluded_pairs(NAME``_excl), .stall_cycles(NAME``_stalls), .accuracy());

  `NBODY_KERNEL_INST(ka, 16, 8, 3)
  `NBODY_KERNEL_INST(kb, 24, 4, 2)

  // mechanism counters
  longint n_load = 0, n_force = 0, n_update = 0, n_store = 0;
  longint n_pf_bypass = 0, n_pf_reg = 0, n_self = 0, n_far = 0;
  phase_e ka_last;

  always @(posedge clk) begin
    ka_last <= ka_phase;
    if (ka_rst_n && ka_phase != ka_last) begin
      if (ka_phase == PH_LOAD)   n_load++;
      if (ka_phase == PH_FORCE)  n_force++;
      if (ka_phase == PH_UPDATE) n_update++;
      if (ka_phase == PH_STORE)  n_store++;
    end
    if (ka_rst_n && ka_ev.pf_forward)  n_pf_bypass++;
    if (kb_rst_n && kb_ev.pf_register) n_pf_reg++;
    if (ka_rst_n && ka_ev.self_pair)   n_self++;
    if (ka_rst_n && ka_ev.far_pair)    n_far++;
  end

  int checks = 0, failures = 0;

  task automatic mech(string name, longint n);
    $display("  %-34s %0d", name, n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("  ... never happened");
    end
  endtask

  initial begin
    wait (ka_fin && kb_fin);
    checks   = ka_checks + kb_checks;
    failures = ka_fails + kb_fails;
    $display("mechanisms:");
    mech("load phases", n_load);
    mech("force phases", n_force);
    mech("update phases", n_update);
    mech("store phases", n_store);
    mech("prefetch forwarded from memory", n_pf_bypass);
    mech("prefetch through register", n_pf_reg);
    mech("self pairs issued", n_self);
    mech("pairs discarded by lanes (A)", n_far);
    mech("pairs excluded by cut-off (A)", ka_excl - 16 * 3);
    mech("pairs excluded by cut-off (B)", kb_excl - 24 * 2);
    mech("DRAM back-pressure cycles", ka_stalls + kb_stalls);
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

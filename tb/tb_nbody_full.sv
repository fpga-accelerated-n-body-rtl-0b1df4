// tb_nbody_full: one complete time step of the kernel at its default size.
//
// The kernel is instantiated with its default parameters: 10,000 particles
// in 8 lanes of 1,250. The environment (nbody_env) loads random particles
// through a DRAM with 100 cycles of read latency (about 500 ns at 200 MHz)
// and random back-pressure, runs one time step, and compares all 10,000
// stored particles bit for bit with the reference model. The force phase
// must take 10,000 * 1,250 = 12.5 million cycles plus a small overhead.
module tb_nbody_full;
  import nbody_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic        rst_n, start, busy, done;
  logic [31:0] num_steps, in_base, out_base, step;
  fp32_t       grav_g, dt, soft2, cutoff2;
  phase_e      phase;
  logic        mem_req_valid, mem_req_ready, mem_req_write, mem_rsp_valid;
  logic [31:0] mem_req_addr;
  particle_t   mem_req_wdata, mem_rsp_data;
  logic        finished;
  int          env_checks, env_failures;
  longint      excluded_pairs, stall_cycles;
  nbody_events_t events;

  nbody_kernel dut (.*);

  nbody_env #(.N(10000), .BATCH(8), .STEPS(1), .CUTOFF(40.0)) env (
    .clk, .rst_n, .start, .num_steps, .in_base, .out_base, .grav_g, .dt, .soft2, .cutoff2,
    .busy, .done, .phase,
    .mem_req_valid, .mem_req_ready, .mem_req_write, .mem_req_addr, .mem_req_wdata,
    .mem_rsp_valid, .mem_rsp_data,
    .finished, .checks(env_checks), .failures(env_failures), .excluded_pairs, .stall_cycles,
    .accuracy()
  );

  int checks = 0, failures = 0;

  initial begin
    wait (finished);
    checks   = env_checks + 2;
    failures = env_failures;
    if (excluded_pairs <= 10000) begin
      failures++;
      $display("no pair was excluded by the cut-off radius");
    end
    if (stall_cycles == 0) begin
      failures++;
      $display("the DRAM never applied back-pressure");
    end
    $display("cycles %0d, excluded pairs %0d, DRAM stall cycles %0d", cyc, excluded_pairs, stall_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cyc == 13_000_000);
    failures++;
    $display("watchdog: timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

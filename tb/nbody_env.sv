// nbody_env: test environment for the N-body kernel (not synthesizable).
//
// Holds the DRAM model, fills it with N random particles, starts the kernel
// for STEPS time steps and waits for `done`. Then it runs the reference
// model step by step and compares every stored record of every step, bit
// for bit. It also checks the cycle count of each force phase against
// N * DEPTH (one row of BATCH pairs per cycle) plus a bounded overhead, and
// reports the number of pairs the nearby test excluded. `finished` rises
// when all checks are done.
module nbody_env
  import nbody_pkg::*;
  import fp_ref_pkg::*;
  import nbody_ref_pkg::*;
#(
  parameter int unsigned N       = 16,
  parameter int unsigned BATCH   = 8,
  parameter int unsigned STEPS   = 2,
  parameter int unsigned LATENCY = 100,
  parameter bit          STALLS  = 1'b1,
  parameter real         CUTOFF  = 30.0,
  parameter bit          ACCURACY = 1'b0    // also measure accuracy against double precision
) (
  input  logic        clk,
  output logic        rst_n,
  output logic        start,
  output logic [31:0] num_steps,
  output logic [31:0] in_base,
  output logic [31:0] out_base,
  output fp32_t       grav_g,
  output fp32_t       dt,
  output fp32_t       soft2,
  output fp32_t       cutoff2,
  input  logic        busy,
  input  logic        done,
  input  phase_e      phase,
  input  logic        mem_req_valid,
  output logic        mem_req_ready,
  input  logic        mem_req_write,
  input  logic [31:0] mem_req_addr,
  input  particle_t   mem_req_wdata,
  output logic        mem_rsp_valid,
  output particle_t   mem_rsp_data,
  output logic        finished,
  output int          checks,
  output int          failures,
  output longint      excluded_pairs,
  output longint      stall_cycles,
  output real         accuracy
);
  localparam int unsigned DEPTH = N / BATCH;
  localparam int unsigned IN_BASE  = 8;
  localparam int unsigned OUT_BASE = IN_BASE + N + 8;
  localparam int unsigned WORDS    = OUT_BASE + N * STEPS + 8;

  dram_model #(.WORDS(WORDS), .LATENCY(LATENCY), .STALLS(STALLS)) u_mem (.*);

  longint force_cycles [STEPS];
  longint cur_force;
  int     fstep;
  phase_e last_phase;

  assign stall_cycles = u_mem.stall_cycles;

  always @(posedge clk) begin
    last_phase <= rst_n ? phase : PH_IDLE;
    if (rst_n && phase == PH_FORCE) cur_force <= cur_force + 1;
    if (rst_n && last_phase == PH_FORCE && phase != PH_FORCE) begin
      if (fstep < STEPS) force_cycles[fstep] <= cur_force;
      fstep     <= fstep + 1;
      cur_force <= 0;
    end
  end

  function automatic real rel_err(real r, real t);
    real d;
    d = (r - t) / r;
    return (d < 0.0) ? -d : d;
  endfunction

  // one all-pairs step in double precision, same force law and integrator
  function automatic void dstep(ref real q [][4], ref real m [], input real g, real h,
                                real e2, real c2);
    real ax [], ay [];
    real dx, dy, r2, r2s, s;
    ax = new[q.size()];
    ay = new[q.size()];
    for (int i = 0; i < q.size(); i++) begin
      ax[i] = 0.0; ay[i] = 0.0;
      for (int jj = 0; jj < q.size(); jj++) begin
        dx = q[jj][0] - q[i][0];
        dy = q[jj][1] - q[i][1];
        r2 = dx * dx + dy * dy;
        if (i != jj && r2 < c2) begin
          r2s = r2 + e2;
          s = g * m[jj] / (r2s * $sqrt(r2s));
          ax[i] += s * dx;
          ay[i] += s * dy;
        end
      end
    end
    for (int i = 0; i < q.size(); i++) begin
      q[i][2] += ax[i] * h;
      q[i][3] += ay[i] * h;
      q[i][0] += q[i][2] * h;
      q[i][1] += q[i][3] * h;
    end
  endfunction

  initial begin
    particle_t p [];
    longint    n_near;
    real       dp [][4];      // double-precision reference: x, y, vx, vy
    real       dm [];
    real       err_sum;
    finished = 0; checks = 0; failures = 0; excluded_pairs = 0;
    cur_force = 0; fstep = 0;
    rst_n = 0; start = 0;
    num_steps = STEPS; in_base = IN_BASE; out_base = OUT_BASE;
    grav_g = r2f(1.0); dt = r2f(0.01); soft2 = r2f(0.01);
    cutoff2 = r2f(CUTOFF * CUTOFF);
    p = new[N];
    dp = new[N];
    dm = new[N];
    err_sum = 0.0;
    accuracy = 0.0;
    for (int i = 0; i < N; i++) begin
      p[i] = rnd_particle();
      u_mem.mem[IN_BASE + i] = p[i];
      dp[i][0] = f2r(p[i].x);  dp[i][1] = f2r(p[i].y);
      dp[i][2] = f2r(p[i].vx); dp[i][3] = f2r(p[i].vy);
      dm[i]    = f2r(p[i].m);
    end
    repeat (4) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1 start = 1;
    @(posedge clk); #1 start = 0;
    while (!done) begin @(posedge clk); #1; end
    @(posedge clk); #1;
    checks++;
    if (busy) begin failures++; $display("kernel still busy after done"); end
    for (int s = 0; s < STEPS; s++) begin
      n_near = step(p, grav_g, dt, soft2, cutoff2);
      if (ACCURACY) begin
        dstep(dp, dm, f2r(grav_g), f2r(dt), f2r(soft2), f2r(cutoff2));
        for (int i = 0; i < N; i++)
          err_sum += (rel_err(dp[i][0], f2r(u_mem.mem[OUT_BASE + s * N + i].x)) +
                      rel_err(dp[i][1], f2r(u_mem.mem[OUT_BASE + s * N + i].y))) / 2.0;
      end
      excluded_pairs += longint'(N) * longint'(N) - n_near;
      for (int i = 0; i < N; i++) begin
        checks++;
        if (u_mem.mem[OUT_BASE + s * N + i] !== p[i]) begin
          failures++;
          if (failures < 10)
            $display("step %0d particle %0d: got %h expected %h", s, i,
                     u_mem.mem[OUT_BASE + s * N + i], p[i]);
        end
      end
      checks++;
      if (force_cycles[s] < longint'(N) * DEPTH ||
          force_cycles[s] > longint'(N) * DEPTH + PAIR_LATENCY + 8) begin
        failures++;
        $display("step %0d: force phase took %0d cycles, expected about %0d", s,
                 force_cycles[s], longint'(N) * DEPTH);
      end
    end
    if (ACCURACY) begin
      // accuracy = 100 % minus the mean relative position error over all
      // particles and steps
      accuracy = 100.0 - 100.0 * err_sum / (real'(N) * real'(STEPS));
      $display("N=%0d steps=%0d: accuracy against double precision %f %%", N, STEPS, accuracy);
    end
    $display("N=%0d BATCH=%0d steps=%0d: force phase %0d cycles per step (N*N/BATCH = %0d)",
             N, BATCH, STEPS, force_cycles[0], longint'(N) * DEPTH);
    finished = 1;
  end

endmodule

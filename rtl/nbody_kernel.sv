// nbody_kernel: all-pairs 2D gravitational N-body simulation kernel.
//
// The kernel holds all N_PARTICLES particles on chip, split into BATCH
// partitions of DEPTH = N_PARTICLES / BATCH records, one per lane (particle p
// lives in partition p / DEPTH). A run, started by `start`, is:
//   LOAD    read the initial particles from DRAM at in_base (dram_dma)
//   then, for each of num_steps time steps:
//   FORCE   for every particle j (outer loop) read j once and broadcast it to
//           all lanes; each lane streams its own DEPTH particles i (inner
//           loop) through its compute-force pipeline and accumulates the
//           acceleration of i (force_lane). BATCH pairs per cycle.
//   UPDATE  each lane reads its particles and their accelerations and writes
//           back the new velocity and position (particle_update).
//   STORE   write all particles to DRAM at out_base + step * N_PARTICLES.
// `done` pulses when the last store has finished. `events` carries one-cycle
// pulses for performance counters (prefetch path taken, self pairs, nearby
// and discarded pairs).
//
// Timing: the force phase issues one row of BATCH pairs per cycle without
// bubbles, N_PARTICLES * DEPTH cycles plus a few cycles of start-up and the
// pipeline drain; particle j+1 is prefetched on the memory's second port
// while row j streams (when DEPTH is 2 the prefetched word is forwarded
// straight from the memory output). The update phase takes DEPTH cycles plus
// three; load and store are bound by the DRAM port.
//
// The inputs grav_g (G), dt, soft2 (softening eps^2) and cutoff2 (squared
// "nearby" radius; +inf makes every pair count) are single-precision numbers
// sampled at `start`. The DRAM port is described in dram_dma.
//
// From the source report ("FPGA Accelerated N-Body Simulations", an HLS
// design for the Ultra96-V2 board): the all-pairs algorithm with a nearby test, single
// precision, the reordered loop nest, batches of 8 lanes over partitioned
// dual-port block RAM, 10,000 particles kept on chip, and the DRAM holding
// inputs and per-step results. This design's own: the control sequence,
// the prefetch, the DRAM port, the integration rule and the softening term.
module nbody_kernel
  import nbody_pkg::*;
#(
  parameter int unsigned N_PARTICLES = 10000,
  parameter int unsigned BATCH       = 8,
  localparam int unsigned DEPTH = N_PARTICLES / BATCH,
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned BW    = (BATCH > 1) ? $clog2(BATCH) : 1
) (
  input  logic        clk,
  input  logic        rst_n,
  // control
  input  logic        start,
  input  logic [31:0] num_steps,
  input  logic [31:0] in_base,
  input  logic [31:0] out_base,
  input  fp32_t       grav_g,
  input  fp32_t       dt,
  input  fp32_t       soft2,
  input  fp32_t       cutoff2,
  output logic        busy,
  output logic        done,
  output phase_e      phase,
  output logic [31:0] step,
  output nbody_events_t events,
  // DRAM port
  output logic        mem_req_valid,
  input  logic        mem_req_ready,
  output logic        mem_req_write,
  output logic [31:0] mem_req_addr,
  output particle_t   mem_req_wdata,
  input  logic        mem_rsp_valid,
  input  particle_t   mem_rsp_data
);

  initial begin
    assert (N_PARTICLES % BATCH == 0) else $fatal(1, "N_PARTICLES must be a multiple of BATCH");
    assert (DEPTH >= 2) else $fatal(1, "each lane needs at least two particles");
  end

  typedef enum logic [3:0] {
    K_IDLE, K_LOAD, K_F_FETCH, K_F_WAIT, K_F_STREAM, K_F_DRAIN,
    K_UPD, K_UPD_DRAIN, K_STORE_GO, K_STORE
  } kstate_e;

  kstate_e state;

  // sampled run parameters
  logic [31:0] n_steps_q, in_base_q;
  fp32_t       g_q, dt_q, soft2_q, cut2_q;
  logic [31:0] out_ptr;

  // loop counters
  logic [31:0]   j;                 // outer loop: broadcast particle
  logic [BW-1:0] j_lane;
  logic [AW-1:0] j_addr;
  logic [AW-1:0] a;                 // inner loop / update index

  particle_t     pj_cur, pj_next;
  logic          pf_pending;
  logic [BW-1:0] pf_lane;

  // issue register of the force stream (aligned with memory read data)
  logic          iss_v, iss_first;
  logic [AW-1:0] iss_addr, iss_ja;
  logic [BW-1:0] iss_jl;
  particle_t     pj_q;

  // update stream
  logic          u_v;
  logic [AW-1:0] u_addr;
  logic [2:0]    drain_cnt;

  // memory and lane signals
  particle_t     bank_a_rdata [BATCH];
  particle_t     bank_b_rdata [BATCH];
  logic          bank_b_en    [BATCH];
  logic          bank_b_we    [BATCH];
  logic [AW-1:0] bank_b_addr  [BATCH];
  particle_t     bank_b_wdata [BATCH];
  logic          bank_a_en;
  logic [AW-1:0] bank_a_addr;
  logic [BATCH-1:0] lane_busy, lane_near, lane_far;
  accel_t        lane_acc [BATCH];
  logic [BATCH-1:0] upd_v;
  logic [AW-1:0] upd_tag [BATCH];
  particle_t     upd_p   [BATCH];

  // DMA
  logic          dma_load, dma_store, dma_busy, dma_done;
  logic [31:0]   dma_base;
  logic          pm_wr_en, pm_rd_en;
  logic [BW-1:0] pm_wr_lane, pm_rd_lane;
  logic [AW-1:0] pm_wr_addr, pm_rd_addr;
  particle_t     pm_wr_data, pm_rd_data;

  // next position of the broadcast index
  logic [BW-1:0] nj_lane;
  logic [AW-1:0] nj_addr;
  always_comb begin
    if (j_addr == AW'(DEPTH - 1)) begin
      nj_addr = '0;
      nj_lane = j_lane + 1'b1;
    end else begin
      nj_addr = j_addr + 1'b1;
      nj_lane = j_lane;
    end
  end

  logic stream_issue, prefetch, upd_issue, pf_bypass;
  assign stream_issue = (state == K_F_STREAM);
  assign prefetch     = stream_issue && (a == '0) && (j != N_PARTICLES - 1);
  assign upd_issue    = (state == K_UPD);
  assign pf_bypass    = stream_issue && (a == AW'(DEPTH - 1)) && (j != N_PARTICLES - 1) && pf_pending;

  // ------------------------------------------------------------------ control
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= K_IDLE;
      done       <= 1'b0;
      step       <= '0;
      j          <= '0;
      j_lane     <= '0;
      j_addr     <= '0;
      a          <= '0;
      pf_pending <= 1'b0;
      iss_v      <= 1'b0;
      u_v        <= 1'b0;
      drain_cnt  <= '0;
      dma_load   <= 1'b0;
      dma_store  <= 1'b0;
    end else begin
      done      <= 1'b0;
      dma_load  <= 1'b0;
      dma_store <= 1'b0;
      iss_v     <= 1'b0;
      u_v       <= 1'b0;
      pf_pending <= prefetch;
      if (pf_pending) pj_next <= bank_b_rdata[pf_lane];
      if (prefetch)   pf_lane <= nj_lane;

      // force stream issue register
      iss_v     <= stream_issue;
      iss_addr  <= a;
      iss_first <= (j == 0);
      iss_jl    <= j_lane;
      iss_ja    <= j_addr;
      pj_q      <= pj_cur;
      // update issue register
      u_v       <= upd_issue;
      u_addr    <= a;

      case (state)
        K_IDLE: begin
          if (start) begin
            n_steps_q  <= num_steps;
            in_base_q  <= in_base;
            out_ptr    <= out_base;
            g_q <= grav_g; dt_q <= dt; soft2_q <= soft2; cut2_q <= cutoff2;
            step       <= '0;
            dma_load   <= 1'b1;
            state      <= K_LOAD;
          end
        end
        K_LOAD: begin
          if (dma_done) begin
            if (n_steps_q == 0) begin
              state <= K_IDLE;
              done  <= 1'b1;
            end else begin
              state <= K_F_FETCH;
            end
          end
        end
        K_F_FETCH: begin                       // read particle 0
          j <= '0; j_lane <= '0; j_addr <= '0; a <= '0;
          state <= K_F_WAIT;
        end
        K_F_WAIT: begin
          pj_cur <= bank_b_rdata[0];
          state  <= K_F_STREAM;
        end
        K_F_STREAM: begin
          if (a == AW'(DEPTH - 1)) begin
            a <= '0;
            if (j == N_PARTICLES - 1) begin
              state     <= K_F_DRAIN;
              drain_cnt <= '0;
            end else begin
              j      <= j + 1;
              j_lane <= nj_lane;
              j_addr <= nj_addr;
              pj_cur <= pf_pending ? bank_b_rdata[pf_lane] : pj_next;
            end
          end else begin
            a <= a + 1'b1;
          end
        end
        K_F_DRAIN: begin
          if (!iss_v && lane_busy == '0) begin
            state <= K_UPD;
            a     <= '0;
          end
        end
        K_UPD: begin
          if (a == AW'(DEPTH - 1)) begin
            a         <= '0;
            state     <= K_UPD_DRAIN;
            drain_cnt <= '0;
          end else begin
            a <= a + 1'b1;
          end
        end
        K_UPD_DRAIN: begin
          drain_cnt <= drain_cnt + 1'b1;
          if (drain_cnt == 3'd2) state <= K_STORE_GO;
        end
        K_STORE_GO: begin
          dma_store <= 1'b1;
          state     <= K_STORE;
        end
        K_STORE: begin
          if (dma_done) begin
            out_ptr <= out_ptr + N_PARTICLES;
            step    <= step + 1;
            if (step + 1 == n_steps_q) begin
              state <= K_IDLE;
              done  <= 1'b1;
            end else begin
              state <= K_F_FETCH;
            end
          end
        end
        default: state <= K_IDLE;
      endcase
    end
  end

  assign dma_base = (state == K_LOAD) ? in_base_q : out_ptr;

  always_comb begin
    events.pf_forward  = pf_bypass;
    events.pf_register = stream_issue && (a == AW'(DEPTH - 1)) && (j != N_PARTICLES - 1) && !pf_pending;
    events.self_pair   = iss_v && (iss_addr == iss_ja);
    events.near_pair   = |lane_near;
    events.far_pair    = |lane_far;
  end

  // the DMA is only ever working while the kernel waits for it
  a_dma_idle: assert property (@(posedge clk) disable iff (!rst_n)
    dma_busy |-> (state == K_LOAD || state == K_STORE));
  assign busy     = (state != K_IDLE);

  always_comb begin
    case (state)
      K_IDLE:                                        phase = PH_IDLE;
      K_LOAD:                                        phase = PH_LOAD;
      K_F_FETCH, K_F_WAIT, K_F_STREAM, K_F_DRAIN:    phase = PH_FORCE;
      K_UPD, K_UPD_DRAIN:                            phase = PH_UPDATE;
      default:                                       phase = PH_STORE;
    endcase
  end

  // ---------------------------------------------------------------- datapath
  assign bank_a_en   = stream_issue | upd_issue | pm_rd_en;
  assign bank_a_addr = (state == K_STORE) ? pm_rd_addr : a;
  assign pm_rd_data  = bank_a_rdata[pm_rd_lane];

  for (genvar k = 0; k < BATCH; k++) begin : g_lane
    always_comb begin
      bank_b_en[k]    = 1'b0;
      bank_b_we[k]    = 1'b0;
      bank_b_addr[k]  = '0;
      bank_b_wdata[k] = upd_p[k];
      case (state)
        K_LOAD: begin
          bank_b_en[k]    = pm_wr_en && (pm_wr_lane == BW'(k));
          bank_b_we[k]    = 1'b1;
          bank_b_addr[k]  = pm_wr_addr;
          bank_b_wdata[k] = pm_wr_data;
        end
        K_F_FETCH: begin
          bank_b_en[k]   = (k == 0);
          bank_b_addr[k] = '0;
        end
        K_F_STREAM: begin
          bank_b_en[k]   = prefetch && (nj_lane == BW'(k));
          bank_b_addr[k] = nj_addr;
        end
        default: begin                          // update write-back
          bank_b_en[k]   = upd_v[k];
          bank_b_we[k]   = 1'b1;
          bank_b_addr[k] = upd_tag[k];
        end
      endcase
    end

    logic [PARTICLE_W-1:0] a_rd, b_rd;
    bram_2p #(.WIDTH(PARTICLE_W), .DEPTH(DEPTH)) u_bank (
      .clk,
      .a_en(bank_a_en), .a_addr(bank_a_addr), .a_rdata(a_rd),
      .b_en(bank_b_en[k]), .b_we(bank_b_we[k]), .b_addr(bank_b_addr[k]),
      .b_wdata(bank_b_wdata[k]), .b_rdata(b_rd)
    );
    assign bank_a_rdata[k] = a_rd;
    assign bank_b_rdata[k] = b_rd;

    force_lane #(.DEPTH(DEPTH)) u_lane (
      .clk, .rst_n,
      .in_valid(iss_v), .in_addr(iss_addr), .in_first(iss_first),
      .in_self((iss_jl == BW'(k)) && (iss_ja == iss_addr)),
      .pi(bank_a_rdata[k]), .pj(pj_q),
      .grav_g(g_q), .soft2(soft2_q), .cutoff2(cut2_q),
      .acc_rd_en(upd_issue), .acc_rd_addr(a), .acc_rd_data(lane_acc[k]),
      .busy(lane_busy[k]), .near_pulse(lane_near[k]), .far_pulse(lane_far[k])
    );

    particle_update #(.TAG_W(AW)) u_upd (
      .clk, .rst_n,
      .in_valid(u_v), .in_tag(u_addr), .p_in(bank_a_rdata[k]), .acc(lane_acc[k]), .dt(dt_q),
      .out_valid(upd_v[k]), .out_tag(upd_tag[k]), .p_out(upd_p[k])
    );
  end

  dram_dma #(.N_PARTICLES(N_PARTICLES), .BATCH(BATCH)) u_dma (
    .clk, .rst_n,
    .load(dma_load), .store(dma_store), .base(dma_base),
    .busy(dma_busy), .done(dma_done),
    .mem_req_valid, .mem_req_ready, .mem_req_write, .mem_req_addr, .mem_req_wdata,
    .mem_rsp_valid, .mem_rsp_data,
    .pm_wr_en, .pm_wr_lane, .pm_wr_addr, .pm_wr_data,
    .pm_rd_en, .pm_rd_lane, .pm_rd_addr, .pm_rd_data
  );

endmodule

// tb_dram_dma: self-checking test of the DRAM load/store engine.
//
// N = 24 particles in BATCH = 4 partitions of 6. The DRAM model answers
// reads after 20 cycles and refuses requests on random cycles. A load must
// place particle p in partition p / 6, entry p % 6, and must keep several
// reads outstanding (it must finish well before N times the latency); a
// store must write every record to base + p.
module tb_dram_dma;
  import nbody_pkg::*;
  import nbody_ref_pkg::*;

  localparam int unsigned N = 24, BATCH = 4, DEPTH = N / BATCH;
  localparam int unsigned AW = $clog2(DEPTH), BW = $clog2(BATCH);
  localparam int unsigned LAT = 20;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;

  logic load, store, busy, done;
  logic [31:0] base;
  logic mem_req_valid, mem_req_ready, mem_req_write, mem_rsp_valid;
  logic [31:0] mem_req_addr;
  particle_t mem_req_wdata, mem_rsp_data;
  logic pm_wr_en, pm_rd_en;
  logic [BW-1:0] pm_wr_lane, pm_rd_lane;
  logic [AW-1:0] pm_wr_addr, pm_rd_addr;
  particle_t pm_wr_data, pm_rd_data;

  dram_dma #(.N_PARTICLES(N), .BATCH(BATCH)) dut (.*);
  dram_model #(.WORDS(256), .LATENCY(LAT), .STALLS(1'b1)) u_mem (.*);

  // partitioned memory model with one cycle of read latency
  particle_t part [BATCH][DEPTH];
  always @(posedge clk) begin
    if (pm_wr_en) part[pm_wr_lane][pm_wr_addr] <= pm_wr_data;
    if (pm_rd_en) pm_rd_data <= part[pm_rd_lane][pm_rd_addr];
  end

  int checks = 0, failures = 0, cyc = 0, t0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    particle_t src [N];
    rst_n = 0; load = 0; store = 0; base = 0;
    for (int p = 0; p < N; p++) begin
      src[p] = rnd_particle();
      u_mem.mem[16 + p] = src[p];
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // load
    base = 16; load = 1; t0 = cyc;
    @(posedge clk); #1 load = 0;
    while (!done) begin @(posedge clk); #1; end
    checks++;
    if (cyc - t0 > LAT + 3 * N) begin
      failures++;
      $display("load took %0d cycles: reads are not overlapped", cyc - t0);
    end
    for (int p = 0; p < N; p++) begin
      checks++;
      if (part[p / DEPTH][p % DEPTH] !== src[p]) begin
        failures++;
        $display("load: particle %0d misplaced", p);
      end
    end
    // change the partitions, then store them
    for (int p = 0; p < N; p++) part[p / DEPTH][p % DEPTH] = rnd_particle();
    @(posedge clk); #1;
    base = 100; store = 1;
    @(posedge clk); #1 store = 0;
    while (!done) begin @(posedge clk); #1; end
    for (int p = 0; p < N; p++) begin
      checks++;
      if (u_mem.mem[100 + p] !== part[p / DEPTH][p % DEPTH]) begin
        failures++;
        $display("store: particle %0d wrong", p);
      end
    end
    checks++;
    if (u_mem.stall_cycles == 0 || u_mem.writes != N || u_mem.reads != N) begin
      failures++;
      $display("stalls %0d reads %0d writes %0d", u_mem.stall_cycles, u_mem.reads, u_mem.writes);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cyc == 20000);
    failures++;
    $display("watchdog: timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

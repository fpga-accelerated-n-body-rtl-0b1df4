// dram_dma: moves particle records between DRAM and the particle memories.
//
// Load (`load` pulse): reads N_PARTICLES records from DRAM word addresses
// base .. base+N_PARTICLES-1 and writes record p into partition p / DEPTH at
// entry p % DEPTH (block partitioning: lane k holds particles k*DEPTH ..
// (k+1)*DEPTH-1). Read requests are issued back to back, as fast as the
// memory accepts them, without waiting for earlier data, so the DRAM latency
// is paid once per load rather than once per record; responses return in
// order and are written as they arrive.
// Store (`store` pulse): reads each record from its partition and writes it to
// DRAM word base+p; each record takes three cycles plus any wait on
// mem_req_ready. Writes are posted (no response).
// `done` pulses for one cycle when an operation is complete.
//
// Memory port: a request is taken when mem_req_valid and mem_req_ready are
// both high; a read response is mem_rsp_valid with mem_rsp_data, one per
// read, in order, and cannot be refused. One word is one particle record.
// The report reads the initial particles from DRAM into on-chip buffers in
// batches and writes results back; the port protocol, word size and address
// layout are this design's own.
module dram_dma
  import nbody_pkg::*;
#(
  parameter int unsigned N_PARTICLES = 10000,
  parameter int unsigned BATCH       = 8,
  localparam int unsigned DEPTH = N_PARTICLES / BATCH,
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned BW    = (BATCH > 1) ? $clog2(BATCH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic          store,
  input  logic [31:0]   base,
  output logic          busy,
  output logic          done,
  // DRAM port
  output logic          mem_req_valid,
  input  logic          mem_req_ready,
  output logic          mem_req_write,
  output logic [31:0]   mem_req_addr,
  output particle_t     mem_req_wdata,
  input  logic          mem_rsp_valid,
  input  particle_t     mem_rsp_data,
  // particle memory: write side (load)
  output logic          pm_wr_en,
  output logic [BW-1:0] pm_wr_lane,
  output logic [AW-1:0] pm_wr_addr,
  output particle_t     pm_wr_data,
  // particle memory: read side (store); data one cycle after pm_rd_en
  output logic          pm_rd_en,
  output logic [BW-1:0] pm_rd_lane,
  output logic [AW-1:0] pm_rd_addr,
  input  particle_t     pm_rd_data
);

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_ST_RD, S_ST_CAP, S_ST_WR} state_e;
  state_e state;

  logic [31:0]   base_q;
  logic [31:0]   req_cnt;            // requests issued
  logic [BW-1:0] rsp_lane, st_lane;
  logic [AW-1:0] rsp_addr, st_addr;
  logic [31:0]   rsp_cnt;
  particle_t     st_data;

  logic req_fire;
  assign req_fire = mem_req_valid && mem_req_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      done    <= 1'b0;
      req_cnt <= '0;
      rsp_cnt <= '0;
      rsp_lane <= '0; rsp_addr <= '0;
      st_lane  <= '0; st_addr  <= '0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: begin
          req_cnt <= '0; rsp_cnt <= '0;
          rsp_lane <= '0; rsp_addr <= '0;
          st_lane  <= '0; st_addr  <= '0;
          base_q   <= base;
          if (load)       state <= S_LOAD;
          else if (store) state <= S_ST_RD;
        end
        S_LOAD: begin
          if (req_fire) req_cnt <= req_cnt + 1;
          if (mem_rsp_valid) begin
            rsp_cnt <= rsp_cnt + 1;
            if (rsp_addr == AW'(DEPTH - 1)) begin
              rsp_addr <= '0;
              rsp_lane <= rsp_lane + 1'b1;
            end else begin
              rsp_addr <= rsp_addr + 1'b1;
            end
            if (rsp_cnt == N_PARTICLES - 1) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end
          end
        end
        S_ST_RD:  state <= S_ST_CAP;
        S_ST_CAP: begin
          st_data <= pm_rd_data;
          state   <= S_ST_WR;
        end
        S_ST_WR: begin
          if (req_fire) begin
            req_cnt <= req_cnt + 1;
            if (st_addr == AW'(DEPTH - 1)) begin
              st_addr <= '0;
              st_lane <= st_lane + 1'b1;
            end else begin
              st_addr <= st_addr + 1'b1;
            end
            if (req_cnt == N_PARTICLES - 1) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              state <= S_ST_RD;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    mem_req_valid = (state == S_LOAD && req_cnt < N_PARTICLES) || state == S_ST_WR;
    mem_req_write = (state == S_ST_WR);
    mem_req_addr  = base_q + req_cnt;
    mem_req_wdata = st_data;
  end

  assign pm_wr_en   = (state == S_LOAD) && mem_rsp_valid;
  assign pm_wr_lane = rsp_lane;
  assign pm_wr_addr = rsp_addr;
  assign pm_wr_data = mem_rsp_data;

  assign pm_rd_en   = (state == S_ST_RD);
  assign pm_rd_lane = st_lane;
  assign pm_rd_addr = st_addr;

  assign busy = (state != S_IDLE);

  a_rsp_only_when_loading: assert property (@(posedge clk) disable iff (!rst_n)
    mem_rsp_valid |-> state == S_LOAD);

endmodule

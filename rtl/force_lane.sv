// force_lane: one batch lane of the force phase.
//
// The lane owns DEPTH particles (one partition of the particle memory). For
// every broadcast particle j the controller streams the lane's particles i
// through a pair_force pipeline, and the lane adds each contribution into an
// acceleration buffer entry for i (a DEPTH x 64-bit dual-port RAM). This is
// the report's reordered loop nest: the outer loop runs over j, the inner
// over i, so consecutive additions go to different entries and the
// accumulation never stalls the pipeline. For the first j of a time step
// (`in_first`) the contribution overwrites the entry instead of adding to it,
// which clears the buffer without a separate pass.
//
// Timing: the buffer entry is read PAIR_LATENCY-1 cycles after the pair
// enters, so that the old value arrives together with the contribution; the
// sum is written in that same cycle. Consequently two consecutive pairs must
// not target the same entry (asserted). When the force phase is over, the
// update logic reads the buffer through the `acc_rd_*` port (one cycle
// latency); it must not do so while pairs are in flight.
// Loop order, batching and partitioning follow the report; the overwrite
// on the first j and the buffer timing are this design's own.
module force_lane
  import nbody_pkg::*;
#(
  parameter int unsigned DEPTH = 1250,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // pair stream
  input  logic          in_valid,
  input  logic [AW-1:0] in_addr,     // index of particle i inside the lane
  input  logic          in_first,    // first j of the time step
  input  logic          in_self,     // i == j
  input  particle_t     pi,
  input  particle_t     pj,
  input  fp32_t         grav_g,
  input  fp32_t         soft2,
  input  fp32_t         cutoff2,
  // accumulated acceleration, read after the force phase
  input  logic          acc_rd_en,
  input  logic [AW-1:0] acc_rd_addr,
  output accel_t        acc_rd_data,
  // status
  output logic          busy,        // pairs in flight
  output logic          near_pulse,  // an accumulated pair was nearby
  output logic          far_pulse    // an accumulated pair was not nearby
);

  localparam int unsigned L = PAIR_LATENCY;

  logic          pv;
  logic [AW-1:0] ptag;
  logic          pfirst, pnear;
  accel_t        pacc;

  pair_force #(.TAG_W(AW)) u_pair (
    .clk, .rst_n,
    .in_valid, .in_tag(in_addr), .in_first, .in_self,
    .xi(pi.x), .yi(pi.y), .xj(pj.x), .yj(pj.y), .mj(pj.m),
    .grav_g, .soft2, .cutoff2,
    .out_valid(pv), .out_tag(ptag), .out_first(pfirst), .out_near(pnear), .out_acc(pacc)
  );

  // address of each pair, delayed to read the buffer one cycle early
  logic [AW-1:0] addr_d [1:L-1];
  logic [L-1:1]  v_d;

  always_ff @(posedge clk) begin
    addr_d[1] <= in_addr;
    for (int s = 2; s < L; s++) addr_d[s] <= addr_d[s-1];
  end
  always_ff @(posedge clk) begin
    if (!rst_n) v_d <= '0;
    else        v_d <= {v_d[L-2:1], in_valid};
  end

  logic            rd_en;
  logic [AW-1:0]   rd_addr;
  logic [ACCEL_W-1:0] rd_data;
  accel_t          old_acc, sum;

  assign rd_en   = v_d[L-1] | acc_rd_en;
  assign rd_addr = v_d[L-1] ? addr_d[L-1] : acc_rd_addr;

  bram_2p #(.WIDTH(ACCEL_W), .DEPTH(DEPTH)) u_acc_mem (
    .clk,
    .a_en(rd_en), .a_addr(rd_addr), .a_rdata(rd_data),
    .b_en(pv), .b_we(pv), .b_addr(ptag), .b_wdata(sum), .b_rdata()
  );

  assign old_acc     = rd_data;
  assign acc_rd_data = rd_data;

  accel_t base;
  assign base = pfirst ? '0 : old_acc;

  fp_add u_add_x (.a(base.ax), .b(pacc.ax), .sub(1'b0), .y(sum.ax));
  fp_add u_add_y (.a(base.ay), .b(pacc.ay), .sub(1'b0), .y(sum.ay));

  logic [AW-1:0] last_wr_addr;
  logic          last_wr_v;
  always_ff @(posedge clk) begin
    if (!rst_n) last_wr_v <= 1'b0;
    else        last_wr_v <= pv;
    last_wr_addr <= ptag;
  end

  assign busy       = in_valid | (|v_d) | pv;
  assign near_pulse = pv & pnear;
  assign far_pulse  = pv & ~pnear;

  // The entry must not be the one written in the previous cycle: its read
  // was issued before that write landed.
  a_no_back_to_back: assert property (@(posedge clk) disable iff (!rst_n)
    (pv && last_wr_v && !pfirst) |-> (ptag != last_wr_addr));
  a_no_read_in_flight: assert property (@(posedge clk) disable iff (!rst_n)
    !(acc_rd_en && v_d[L-1]));

endmodule

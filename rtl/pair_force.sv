// pair_force: the "compute force" unit, a pipelined pairwise gravity kernel.
//
// Every cycle it can accept one pair: particle i (the lane's own particle,
// streamed from its memory partition) and particle j (broadcast to all lanes).
// It returns the acceleration that j exerts on i,
//     a = G * m_j * (r_j - r_i) / (|r_j - r_i|^2 + eps^2)^(3/2),
// or zero when the pair is not "nearby" (i == j, or squared distance not
// below cutoff2). The result leaves PAIR_LATENCY (8) cycles after the pair
// entered, with the tag and flag that entered with it. Stages:
//   1 dx, dy, G*m_j   2 dx^2, dy^2   3 r^2, nearby test   4 r^2 + eps^2
//   5 sqrt            6 r^3          7 G*m_j / r^3        8 times dx, dy
// There is no stall: the pipeline advances every cycle (initiation interval
// one, as the report's pipelined loop). The report gives the all-pairs
// loop with its nearby test and Newton's law of gravitation; the softening
// term, the cut-off form of the nearby test and the stage split are this
// design's choices. Arithmetic is single precision throughout.
module pair_force
  import nbody_pkg::*;
#(
  parameter int unsigned TAG_W = 11
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [TAG_W-1:0] in_tag,
  input  logic             in_first,   // carried along for the accumulator
  input  logic             in_self,    // i == j
  input  fp32_t            xi, yi,
  input  fp32_t            xj, yj, mj,
  input  fp32_t            grav_g,
  input  fp32_t            soft2,
  input  fp32_t            cutoff2,
  output logic             out_valid,
  output logic [TAG_W-1:0] out_tag,
  output logic             out_first,
  output logic             out_near,   // the pair counted
  output accel_t           out_acc
);

  localparam int unsigned L = PAIR_LATENCY;

  // control bits travelling with the data
  logic [L:1]             v;
  logic [TAG_W-1:0]       tag   [1:L];
  logic [L:1]             first;
  logic [L:1]             self_q;
  logic [L:3]             near;

  // data registers of each stage
  fp32_t dx1, dy1, gm1;
  fp32_t dx2, dy2, sx2, sy2, gm2;
  fp32_t dx3, dy3, r2_3, gm3;
  fp32_t dx4, dy4, r2s4, gm4;
  fp32_t dx5, dy5, r2s5, r5, gm5;
  fp32_t dx6, dy6, r3_6, gm6;
  fp32_t dx7, dy7, s7;
  accel_t acc8;

  // combinational results feeding each stage register
  fp32_t c_dx, c_dy, c_gm, c_sx, c_sy, c_r2, c_r2s, c_r, c_r3, c_s, c_ax, c_ay;

  fp_add u_dx  (.a(xj),   .b(xi),   .sub(1'b1), .y(c_dx));
  fp_add u_dy  (.a(yj),   .b(yi),   .sub(1'b1), .y(c_dy));
  fp_mul u_gm  (.a(grav_g), .b(mj), .y(c_gm));
  fp_mul u_sx  (.a(dx1),  .b(dx1),  .y(c_sx));
  fp_mul u_sy  (.a(dy1),  .b(dy1),  .y(c_sy));
  fp_add u_r2  (.a(sx2),  .b(sy2),  .sub(1'b0), .y(c_r2));
  fp_add u_r2s (.a(r2_3), .b(soft2), .sub(1'b0), .y(c_r2s));
  fp_sqrt u_r  (.a(r2s4), .y(c_r));
  fp_mul u_r3  (.a(r2s5), .b(r5),   .y(c_r3));
  fp_div u_s   (.a(gm6),  .b(r3_6), .y(c_s));
  fp_mul u_ax  (.a(s7),   .b(dx7),  .y(c_ax));
  fp_mul u_ay  (.a(s7),   .b(dy7),  .y(c_ay));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v <= '0;
    end else begin
      v <= {v[L-1:1], in_valid};
    end
  end

  always_ff @(posedge clk) begin
    tag[1]    <= in_tag;
    first[1]  <= in_first;
    self_q[1] <= in_self;
    for (int s = 2; s <= L; s++) begin
      tag[s]    <= tag[s-1];
      first[s]  <= first[s-1];
      self_q[s] <= self_q[s-1];
    end
    near[3] <= !self_q[2] && fp_lt_pos(c_r2, cutoff2);
    for (int s = 4; s <= L; s++) near[s] <= near[s-1];

    // stage 1
    dx1 <= c_dx;  dy1 <= c_dy;  gm1 <= c_gm;
    // stage 2
    dx2 <= dx1;   dy2 <= dy1;   sx2 <= c_sx;  sy2 <= c_sy;  gm2 <= gm1;
    // stage 3
    dx3 <= dx2;   dy3 <= dy2;   r2_3 <= c_r2; gm3 <= gm2;
    // stage 4
    dx4 <= dx3;   dy4 <= dy3;   r2s4 <= c_r2s; gm4 <= gm3;
    // stage 5
    dx5 <= dx4;   dy5 <= dy4;   r2s5 <= r2s4; r5 <= c_r;   gm5 <= gm4;
    // stage 6
    dx6 <= dx5;   dy6 <= dy5;   r3_6 <= c_r3; gm6 <= gm5;
    // stage 7
    dx7 <= dx6;   dy7 <= dy6;   s7 <= c_s;
    // stage 8: pairs that are not nearby contribute exactly +0
    acc8.ax <= near[7] ? c_ax : FP_ZERO;
    acc8.ay <= near[7] ? c_ay : FP_ZERO;
  end

  assign out_valid = v[L];
  assign out_tag   = tag[L];
  assign out_first = first[L];
  assign out_near  = near[L];
  assign out_acc   = acc8;

endmodule

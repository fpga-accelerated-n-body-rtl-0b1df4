// particle_update: the per-particle "update" step that ends a time step.
//
// From a particle record and its accumulated acceleration it computes
//     v' = v + a * dt,   x' = x + v' * dt     (each of x and y)
// i.e. semi-implicit (symplectic) Euler integration, in single precision.
// Mass is passed through. The result is registered: it appears one cycle
// after in_valid, with the tag that came with it. One particle per cycle.
// The report names the step ("update particle positions and velocities
// based on forces") and has one update unit per batch lane; the integration
// rule is this design's choice.
module particle_update
  import nbody_pkg::*;
#(
  parameter int unsigned TAG_W = 11
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [TAG_W-1:0] in_tag,
  input  particle_t        p_in,
  input  accel_t           acc,
  input  fp32_t            dt,
  output logic             out_valid,
  output logic [TAG_W-1:0] out_tag,
  output particle_t        p_out
);

  fp32_t dvx, dvy, vx_n, vy_n, dx, dy, x_n, y_n;

  fp_mul u_dvx (.a(acc.ax),  .b(dt),   .y(dvx));
  fp_mul u_dvy (.a(acc.ay),  .b(dt),   .y(dvy));
  fp_add u_vx  (.a(p_in.vx), .b(dvx),  .sub(1'b0), .y(vx_n));
  fp_add u_vy  (.a(p_in.vy), .b(dvy),  .sub(1'b0), .y(vy_n));
  fp_mul u_dx  (.a(vx_n),    .b(dt),   .y(dx));
  fp_mul u_dy  (.a(vy_n),    .b(dt),   .y(dy));
  fp_add u_x   (.a(p_in.x),  .b(dx),   .sub(1'b0), .y(x_n));
  fp_add u_y   (.a(p_in.y),  .b(dy),   .sub(1'b0), .y(y_n));

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
    out_tag <= in_tag;
    p_out   <= '{x: x_n, y: y_n, vx: vx_n, vy: vy_n, m: p_in.m};
  end

endmodule

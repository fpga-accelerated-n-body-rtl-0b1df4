// nbody_pkg: types and constants shared by the N-body kernel.
//
// Every physical quantity is an IEEE-754 single-precision number (fp32_t),
// kept as a raw 32-bit pattern. A particle record holds its 2D position,
// 2D velocity and mass; the record is 160 bits wide and is the unit of
// transfer in the particle memories and on the DRAM port. The choice of
// single precision follows the report; the record layout is this
// design's own.
package nbody_pkg;

  typedef logic [31:0] fp32_t;

  // Field order, most significant first: x, y, vx, vy, m.
  typedef struct packed {
    fp32_t x;
    fp32_t y;
    fp32_t vx;
    fp32_t vy;
    fp32_t m;
  } particle_t;

  // Accumulated acceleration of one particle (force divided by its own mass).
  typedef struct packed {
    fp32_t ax;
    fp32_t ay;
  } accel_t;

  localparam int unsigned PARTICLE_W = $bits(particle_t);
  localparam int unsigned ACCEL_W    = $bits(accel_t);

  // Cycles from a pair entering the compute-force pipeline to its
  // acceleration contribution leaving it (see pair_force).
  localparam int unsigned PAIR_LATENCY = 8;

  // Phases of the kernel, visible on its status output.
  typedef enum logic [2:0] {
    PH_IDLE   = 3'd0,
    PH_LOAD   = 3'd1,   // DRAM -> particle memories
    PH_FORCE  = 3'd2,   // all-pairs acceleration accumulation
    PH_UPDATE = 3'd3,   // velocity and position update
    PH_STORE  = 3'd4    // particle memories -> DRAM
  } phase_e;

  // One-cycle event pulses of the kernel, for performance counters.
  typedef struct packed {
    logic pf_forward;    // prefetched particle j taken straight from memory
    logic pf_register;   // prefetched particle j taken from its register
    logic self_pair;     // a pair with i == j entered a lane
    logic near_pair;     // some lane accumulated a nearby pair this cycle
    logic far_pair;      // some lane discarded a pair (not nearby)
  } nbody_events_t;

  localparam fp32_t FP_ZERO = 32'h0000_0000;

  // Flip the sign of a number (exact, used for subtraction).
  function automatic fp32_t fp_neg(fp32_t a);
    return {~a[31], a[30:0]};
  endfunction

  // a < b for two numbers known to be non-negative and not NaN: the bit
  // patterns of non-negative floats order like unsigned integers.
  function automatic logic fp_lt_pos(fp32_t a, fp32_t b);
    return a[30:0] < b[30:0];
  endfunction

endpackage

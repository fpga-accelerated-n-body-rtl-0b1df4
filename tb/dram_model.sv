// dram_model: behavioural model of the DRAM behind the kernel's memory port.
//
// Not synthesizable. WORDS particle records. A read request is answered
// LATENCY cycles after it is accepted, in order, one response per cycle; a
// write is committed when accepted. With STALLS set, mem_req_ready is low on
// a pseudo-random quarter of the cycles. It counts the cycles on which a
// request waited (`stall_cycles`) and the reads and writes it served.
module dram_model
  import nbody_pkg::*;
#(
  parameter int unsigned WORDS   = 1024,
  parameter int unsigned LATENCY = 100,
  parameter bit          STALLS  = 1'b1
) (
  input  logic        clk,
  input  logic        mem_req_valid,
  output logic        mem_req_ready,
  input  logic        mem_req_write,
  input  logic [31:0] mem_req_addr,
  input  particle_t   mem_req_wdata,
  output logic        mem_rsp_valid,
  output particle_t   mem_rsp_data
);

  particle_t mem [WORDS];
  longint    cyc = 0;
  longint    stall_cycles = 0, reads = 0, writes = 0;

  typedef struct { longint due; particle_t data; } rsp_t;
  rsp_t q [$];

  initial begin
    mem_req_ready = 1'b1;
    mem_rsp_valid = 1'b0;
    mem_rsp_data  = '0;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (mem_req_valid && !mem_req_ready) stall_cycles++;
    if (mem_req_valid && mem_req_ready) begin
      if (mem_req_write) begin
        mem[mem_req_addr] = mem_req_wdata;
        writes++;
      end else begin
        q.push_back('{due: cyc + LATENCY, data: mem[mem_req_addr]});
        reads++;
      end
    end
    if (q.size() != 0 && q[0].due <= cyc) begin
      mem_rsp_valid <= 1'b1;
      mem_rsp_data  <= q[0].data;
      void'(q.pop_front());
    end else begin
      mem_rsp_valid <= 1'b0;
    end
    mem_req_ready <= STALLS ? (($urandom % 4) != 0) : 1'b1;
  end

endmodule

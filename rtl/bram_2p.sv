// bram_2p: one partition of the on-chip particle memory (block RAM).
//
// A dual-port synchronous RAM of DEPTH words of WIDTH bits. Port A only
// reads; port B reads or writes. Both ports have one cycle of read latency
// (the address is registered by the clock edge, the data is valid in the next
// cycle). Port B is read-first: a read and a write in the same cycle return
// the old word. A read on port A of the word that port B writes in the same
// cycle also returns the old word. Contents are not reset.
// The report keeps all particle data in partitioned, dual-ported block RAM
// with one partition per batch lane; the word width (a whole particle record,
// matching its "array reshape") and the port roles are this design's choice.
module bram_2p #(
  parameter int unsigned WIDTH = 160,
  parameter int unsigned DEPTH = 1250,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  // port A: read
  input  logic             a_en,
  input  logic [AW-1:0]    a_addr,
  output logic [WIDTH-1:0] a_rdata,
  // port B: read/write
  input  logic             b_en,
  input  logic             b_we,
  input  logic [AW-1:0]    b_addr,
  input  logic [WIDTH-1:0] b_wdata,
  output logic [WIDTH-1:0] b_rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_en) a_rdata <= mem[a_addr];
  end

  always_ff @(posedge clk) begin
    if (b_en) begin
      b_rdata <= mem[b_addr];
      if (b_we) mem[b_addr] <= b_wdata;
    end
  end

endmodule

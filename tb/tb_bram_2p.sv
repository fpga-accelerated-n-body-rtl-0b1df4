// tb_bram_2p: self-checking test of the dual-port particle memory.
//
// Random reads on port A and random reads/writes on port B every cycle, with
// frequent address collisions, against an array model: one cycle of read
// latency on both ports, read-first behaviour on port B and old data on port
// A when port B writes the same word. Small depth keeps collisions common.
module tb_bram_2p;
  localparam int unsigned WIDTH = 40;
  localparam int unsigned DEPTH = 6;
  localparam int unsigned AW = $clog2(DEPTH);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic             a_en, b_en, b_we;
  logic [AW-1:0]    a_addr, b_addr;
  logic [WIDTH-1:0] b_wdata, a_rdata, b_rdata;
  logic [WIDTH-1:0] model [DEPTH];
  logic [WIDTH-1:0] exp_a, exp_b;
  logic             chk_a, chk_b;
  int checks = 0, failures = 0, cyc = 0;

  bram_2p #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    chk_a = 0; chk_b = 0;
    a_en = 0; b_en = 0; b_we = 0; a_addr = 0; b_addr = 0; b_wdata = 0;
    // fill every word through port B
    for (int i = 0; i < DEPTH; i++) begin
      b_en = 1; b_we = 1; b_addr = AW'(i); b_wdata = {8'(i), 32'($urandom)};
      model[i] = b_wdata;
      @(posedge clk); #1;
    end
    b_en = 0; b_we = 0;
    for (int t = 0; t < 4000; t++) begin
      a_en   = ($urandom % 4) != 0;
      a_addr = AW'($urandom % DEPTH);
      b_en   = ($urandom % 4) != 0;
      b_we   = $urandom % 2;
      b_addr = ($urandom % 3 == 0) ? a_addr : AW'($urandom % DEPTH);
      b_wdata = {8'($urandom), 32'($urandom)};
      if (a_en) exp_a = model[a_addr];
      if (b_en) exp_b = model[b_addr];
      chk_a = a_en; chk_b = b_en;
      @(posedge clk);
      if (b_en && b_we) model[b_addr] = b_wdata;
      #1;
      if (chk_a) begin
        checks++;
        if (a_rdata !== exp_a) begin failures++; $display("port A mismatch at t=%0d", t); end
      end
      if (chk_b) begin
        checks++;
        if (b_rdata !== exp_b) begin failures++; $display("port B mismatch at t=%0d", t); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cyc == 100000);
    failures++;
    $display("watchdog: timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

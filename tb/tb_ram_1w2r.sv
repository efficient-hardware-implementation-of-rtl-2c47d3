// tb_ram_1w2r: self-checking test of the one-write, two-read memory.
//
// Random writes and reads on both read ports against a model array; checks
// that read data appears exactly one cycle after the address and that a read
// of the address being written in the same cycle returns the old word.
module tb_ram_1w2r;
  localparam int unsigned DEPTH = 40, W = 13, AW = $clog2(DEPTH);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic          we = 1'b0;
  logic [AW-1:0] waddr = '0, raddr_a = '0, raddr_b = '0;
  logic [W-1:0]  wdata = '0, rdata_a, rdata_b;

  ram_1w2r #(.DEPTH(DEPTH), .W(W)) dut (.*);

  int checks = 0, failures = 0;
  logic [W-1:0] model [DEPTH];
  logic [W-1:0] exp_a, exp_b;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every word first (contents are not reset)
    for (int a = 0; a < int'(DEPTH); a++) begin
      @(negedge clk);
      we = 1'b1; waddr = AW'(a); wdata = W'($urandom); model[a] = wdata;
    end
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      raddr_a = AW'($urandom % DEPTH);
      raddr_b = (n % 4 == 0) ? waddr : AW'($urandom % DEPTH);
      we      = $urandom % 2 == 0;
      waddr   = (n % 7 == 0) ? raddr_a : AW'($urandom % DEPTH);
      wdata   = W'($urandom);
      exp_a = model[raddr_a];
      exp_b = model[raddr_b];
      if (we) model[waddr] = wdata;
      @(negedge clk);
      we = 1'b0;
      checks += 2;
      if (rdata_a != exp_a) begin failures++; $display("FAIL port a addr %0d", raddr_a); end
      if (rdata_b != exp_b) begin failures++; $display("FAIL port b addr %0d", raddr_b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

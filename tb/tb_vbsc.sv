// tb_vbsc: self-checking test of the VbSC multiplier.
//
// Three configurations: binary (xor) with P = 37, NB = 4 (short last word of
// one element); integer (add) with 3-bit inputs and 6-bit outputs,
// P = 61, NB = 8; and binary with P = 131, NB = 32 (H = 5). Each harness
// checks every output element against a direct computation and the busy
// time against LEN*(3H+2) cycles.
module tb_vbsc;
  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;

  int c0, f0, c1, f1, c2, f2;
  logic d0, d1, d2;

  vbsc_harness #(.P(37),  .NB(4),  .EW_IN(1), .EW_OUT(1), .ADD(1'b0)) h0 (.clk, .rst_n, .checks(c0), .failures(f0), .finished(d0));
  vbsc_harness #(.P(61),  .NB(8),  .EW_IN(3), .EW_OUT(6), .ADD(1'b1)) h1 (.clk, .rst_n, .checks(c1), .failures(f1), .finished(d1));
  vbsc_harness #(.P(131), .NB(32), .EW_IN(1), .EW_OUT(1), .ADD(1'b0)) h2 (.clk, .rst_n, .checks(c2), .failures(f2), .finished(d2));

  initial begin
    repeat (200000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2 + 1);
    $finish;
  end

  initial begin
    // reset: a falling edge for the asynchronous reset, released after 3 cycles
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (d0 && d1 && d2);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2);
    $finish;
  end
endmodule

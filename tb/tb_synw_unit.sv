// tb_synw_unit: self-checking test of the syndrome weight counter.
//
// P = 131, NB = 32 (H = 5 words). Loads random, all-zero and all-one
// syndromes into a memory model and checks the reported weight against a
// direct count, the busy time against 2H cycles and that done pulses once.
module tb_synw_unit;
  localparam int unsigned P = 131, NB = 32, H = (P + NB - 1) / NB;

  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic          start, busy, done;
  logic [2:0]    s_raddr;
  logic [NB-1:0] s_rdata;
  logic [7:0]    weight;
  logic [NB-1:0] smem [8];

  always_ff @(posedge clk) s_rdata <= smem[s_raddr];

  synw_unit #(.P(P), .NB(NB), .SAW(3)) dut (
    .clk, .rst_n, .start, .busy, .done, .s_raddr, .s_rdata, .weight
  );

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned expw, cyc, nd;
    start = 1'b0;
    // reset: a falling edge for the asynchronous reset, released after 3 cycles
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 20; run++) begin
      expw = 0;
      for (int w = 0; w < int'(H); w++)
        for (int b = 0; b < int'(NB); b++) begin
          bit v;
          v = (run == 0) ? 1'b0 : (run == 1) ? 1'b1 : 1'($urandom);
          if (w * NB + b >= P) v = 1'b0;
          smem[w][b] = v;
          expw += v;
        end
      @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      cyc = 0; nd = 0;
      while (busy) begin
        cyc++;
        if (done) nd++;
        @(negedge clk);
      end
      checks += 3;
      if (int'(weight) != expw) begin
        failures++;
        $display("FAIL synw: weight %0d expected %0d", weight, expw);
      end
      if (cyc != 2 * H) begin
        failures++;
        $display("FAIL synw: %0d cycles, expected %0d", cyc, 2 * H);
      end
      if (nd != 1) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_collapse_unit: self-checking test of the logarithmic collapse unit.
//
// Drives random 2*NB-element windows and every shift value 0 .. NB, and
// compares the output with the NB elements starting at element `shift`,
// computed here by plain indexing. Runs for NB = 4 with 1-bit elements (the
// configuration of the worked example: a rotation by three of v8..v15 gives
// v11..v14) and NB = 32 with 7-bit elements.
module tb_collapse_unit;
  localparam int unsigned NB1 = 4,  EW1 = 1;
  localparam int unsigned NB2 = 32, EW2 = 7;

  int checks = 0, failures = 0;

  logic [2*NB1*EW1-1:0] win1;
  logic [$clog2(NB1):0] sh1;
  logic [NB1*EW1-1:0]   out1;
  logic [2*NB2*EW2-1:0] win2;
  logic [$clog2(NB2):0] sh2;
  logic [NB2*EW2-1:0]   out2;

  collapse_unit #(.NB(NB1), .EW(EW1)) dut1 (.win(win1), .shift(sh1), .out(out1));
  collapse_unit #(.NB(NB2), .EW(EW2)) dut2 (.win(win2), .shift(sh2), .out(out2));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fixed case: window elements 0..7 = 0,1,1,0,1,1,0,1, shift 3 -> 0,1,1,0
    win1 = 8'b1011_0110;
    sh1  = 3'd3;
    #1;
    checks++;
    if (out1 !== 4'b0110) begin
      failures++;
      $display("FAIL example: out=%b", out1);
    end
    for (int n = 0; n < 200; n++) begin
      win1 = 8'($urandom);
      for (int s = 0; s <= NB1; s++) begin
        sh1 = 3'(s);
        #1;
        checks++;
        if (out1 !== win1[s*EW1 +: NB1*EW1]) begin
          failures++;
          $display("FAIL nb=4 shift=%0d win=%b out=%b", s, win1, out1);
        end
      end
    end
    for (int n = 0; n < 100; n++) begin
      // 2*NB2*EW2 = 448 bits, a multiple of 32
      for (int w = 0; w < 2 * NB2 * EW2 / 32; w++) win2[w*32 +: 32] = $urandom;
      for (int s = 0; s <= NB2; s++) begin
        sh2 = 6'(s);
        #1;
        for (int q = 0; q < NB2; q++) begin
          checks++;
          if (out2[q*EW2 +: EW2] !== win2[(s + q)*EW2 +: EW2]) begin
            failures++;
            if (failures < 10) $display("FAIL nb=32 shift=%0d elem=%0d", s, q);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

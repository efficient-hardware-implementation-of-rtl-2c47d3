// tb_threshold_lut: self-checking test of the threshold table.
//
// Loads four (w_i, b_i) pairs, leaves the other entries unused, and checks
// for many syndrome weights that b is the b_i of the largest w_i below the
// weight (BMAX if none), that done comes two cycles after start and that
// b holds afterwards.
module tb_threshold_lut;
  localparam int unsigned NLUT = 8, WW = 14, BW = 7, BMAX = 77;

  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic           lut_we, start, busy, done;
  logic [2:0]     lut_addr;
  logic [WW-1:0]  lut_w, ws;
  logic [BW-1:0]  lut_b, b;

  threshold_lut #(.NLUT(NLUT), .WW(WW), .BW(BW), .BMAX(BMAX)) dut (
    .clk, .rst_n, .lut_we, .lut_addr, .lut_w, .lut_b, .start, .ws, .busy, .done, .b
  );

  int unsigned tw [4] = '{10, 1500, 4000, 9000};
  int unsigned tb [4] = '{39, 42, 46, 50};

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned expb, wsv, cyc;
    lut_we = 1'b0; start = 1'b0; lut_addr = '0; lut_w = '0; lut_b = '0; ws = '0;
    // reset: a falling edge for the asynchronous reset, released after 3 cycles
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 4; i++) begin
      @(negedge clk);
      lut_we = 1'b1; lut_addr = 3'(i); lut_w = WW'(tw[i]); lut_b = BW'(tb[i]);
    end
    @(negedge clk);
    lut_we = 1'b0;
    for (int n = 0; n < 300; n++) begin
      case (n)
        0: wsv = 0;   1: wsv = 10;  2: wsv = 11;  3: wsv = 1500; 4: wsv = 1501;
        5: wsv = 4001; 6: wsv = 9001; 7: wsv = 16383;
        default: wsv = $urandom % 12000;
      endcase
      expb = BMAX;
      for (int i = 0; i < 4; i++) if (tw[i] < wsv) expb = tb[i];
      ws = WW'(wsv);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      cyc = 1;
      while (!done) begin
        cyc++;
        @(negedge clk);
      end
      @(negedge clk);
      checks += 2;
      if (int'(b) != expb) begin
        failures++;
        $display("FAIL lut: ws=%0d b=%0d expected %0d", wsv, b, expb);
      end
      if (cyc != 2) begin
        failures++;
        $display("FAIL lut: done after %0d cycles", cyc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

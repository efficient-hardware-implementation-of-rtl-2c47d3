// tb_errpos_unit: self-checking test of the error position search.
//
// P = 131, NB = 32, N0 = 2 blocks, 7-bit counters, VMAX = 8 list slots per
// block. Random counter vectors (padding elements zero) are searched with a
// threshold; the test checks the dense error words (old value xor the
// matches), the position lists (ascending, first VMAX matches of each
// block), the per-block counts, the overflow flag and the busy time
// 2*N0*H + (NB+1)*(words with a match).
module tb_errpos_unit;
  localparam int unsigned P = 131, NB = 32, N0 = 2, EW = 7, VMAX = 8;
  localparam int unsigned H = (P + NB - 1) / NB, PW = $clog2(P);

  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic                   start, busy, done, e_we, ep_we, ovf;
  logic [EW-1:0]          thr;
  logic [3:0]             rho_raddr, e_raddr, e_waddr;
  logic [NB*EW-1:0]       rho_rdata;
  logic [NB-1:0]          e_rdata, e_wdata;
  logic [3:0]             ep_waddr;
  logic [PW-1:0]          ep_wdata;
  logic [N0-1:0][3:0]     cnt;

  logic [NB*EW-1:0] rmem [16];
  logic [NB-1:0]    emem [16];
  logic [PW-1:0]    pmem [16];
  logic [NB-1:0]    e_old [16];

  always_ff @(posedge clk) begin
    rho_rdata <= rmem[rho_raddr];
    e_rdata   <= emem[e_raddr];
    if (e_we) emem[e_waddr] <= e_wdata;
    if (ep_we) pmem[ep_waddr] <= ep_wdata;
  end

  errpos_unit #(.P(P), .NB(NB), .N0(N0), .EW(EW), .VMAX(VMAX), .RHAW(4), .EAW(4)) dut (
    .clk, .rst_n, .start, .thr, .busy, .done,
    .rho_raddr, .rho_rdata, .e_raddr, .e_rdata, .e_we, .e_waddr, .e_wdata,
    .ep_we, .ep_waddr, .ep_wdata, .cnt, .ovf
  );

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned cyc, rows, expc [N0], prob;
    bit expovf;
    start = 1'b0; thr = '0;
    for (int w = 0; w < 16; w++) emem[w] = NB'($urandom);
    // reset: a falling edge for the asynchronous reset, released after 3 cycles
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 12; run++) begin
      prob = (run < 4) ? 2 : (run < 8) ? 10 : 40;   // percent of large counters
      thr  = EW'(40);
      for (int j = 0; j < int'(N0); j++)
        for (int w = 0; w < int'(H); w++)
          for (int q = 0; q < int'(NB); q++) begin
            int unsigned v;
            v = ($urandom % 100 < prob) ? 41 + $urandom % 30 : $urandom % 41;
            if (w * NB + q >= P) v = 0;
            rmem[j * H + w][q*EW +: EW] = EW'(v);
          end
      for (int w = 0; w < 16; w++) e_old[w] = emem[w];
      @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      cyc = 0;
      while (busy) begin
        cyc++;
        @(negedge clk);
      end
      // reference
      rows = 0; expovf = 1'b0;
      for (int j = 0; j < int'(N0); j++) begin
        expc[j] = 0;
        for (int w = 0; w < int'(H); w++) begin
          logic [NB-1:0] m;
          m = '0;
          for (int q = 0; q < int'(NB); q++) m[q] = (rmem[j * H + w][q*EW +: EW] > thr);
          if (m != '0) rows++;
          checks++;
          if (emem[j * H + w] != (e_old[j * H + w] ^ m)) begin
            failures++;
            $display("FAIL errpos: e word %0d of block %0d", w, j);
          end
          for (int q = 0; q < int'(NB); q++) if (m[q]) begin
            if (expc[j] < VMAX) begin
              checks++;
              if (int'(pmem[j * VMAX + expc[j]]) != w * NB + q) begin
                failures++;
                $display("FAIL errpos: list %0d entry %0d = %0d, expected %0d", j, expc[j],
                         pmem[j * VMAX + expc[j]], w * NB + q);
              end
              expc[j]++;
            end else expovf = 1'b1;
          end
        end
        checks++;
        if (int'(cnt[j]) != expc[j]) begin
          failures++;
          $display("FAIL errpos: count %0d of block %0d, expected %0d", cnt[j], j, expc[j]);
        end
      end
      checks += 2;
      if (ovf != expovf) begin
        failures++;
        $display("FAIL errpos: overflow %0d expected %0d", ovf, expovf);
      end
      if (cyc != 2 * N0 * H + (NB + 1) * rows) begin
        failures++;
        $display("FAIL errpos: %0d cycles, expected %0d", cyc, 2 * N0 * H + (NB + 1) * rows);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

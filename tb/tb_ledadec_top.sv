// tb_ledadec_top: end-to-end test of the Q-decoder at reduced code size.
//
// Builds a random secret key (H_i of weight DH, Q_{i,j} with the circulant
// weight pattern WQ, L_j = sum_i H_i Q_{i,j}, regenerated until no L_j has
// cancellations), loads its position lists, the threshold table and a
// ciphertext into the decoder, runs it, and compares success, iteration
// count, overflow flag and every word of the error estimate with a
// bit-level reference model of the Q-decoder written here. The reference
// computes the counters directly from the L_j lists, independently of the
// two-step sigma/rho computation of the hardware. The number of busy cycles
// is checked against the per-unit cycle counts (VbSC LEN*(3H+2), SVbSC
// DV+DA+6*DA*DV, error search 2*N0*H+(NB+1)*rows, weight 2H, threshold 2),
// plus one launch cycle per unit call. With VER >= 2 and NB >= 64 the first
// two updates recompute the syndrome with the dense VbSC instead, costing
// sum_i (DH*(3H+2) + 1 + sum_j (w_ij*(3H+2) + 1)) cycles.
//
// A decodable ciphertext is made by putting all T errors in the last block:
// then x = e_{N0-1} satisfies L_{N0-1} x = L e.
// Scenarios: zero ciphertext (no iteration), two decodable ciphertexts, a run where the threshold never lets a bit flip (failure at ITMAX, empty syndrome updates), a dense random ciphertext with a low threshold (flip-list overflow) and a final decodable run. Reduced code: P = 1031, N0 = 2, DH = 5, WQ = [3, 2], NB = 8, T = 12 errors.
module tb_ledadec_top;
  import ledadec_pkg::*;

  localparam int unsigned P      = 1031;
  localparam int unsigned N0     = 2;
  localparam int unsigned DH     = 5;
  localparam int unsigned WQ [4] = '{3, 2, 0, 0};
  localparam int unsigned NB     = 8;
  localparam int unsigned ITMAX  = 4;
  localparam int unsigned VMAX   = 16;
  localparam int unsigned NLUT   = 4;
  localparam int unsigned VER    = VER_DEF;
  localparam int unsigned T      = 12;   // errors in the ciphertext
  localparam int unsigned WDOG   = 2000000;

  localparam int unsigned H     = (P + NB - 1) / NB;
  localparam int unsigned PW    = $clog2(P);
  localparam int unsigned M     = wq_sum(WQ, N0);
  localparam int unsigned WQM   = wq_max(WQ, N0);
  localparam int unsigned EW    = $clog2(M * DH + 1);
  localparam int unsigned WW    = $clog2(P + 1);
  localparam int unsigned KDEP  = key_depth(N0, DH, WQM, M);
  localparam int unsigned KAW   = $clog2(KDEP);
  localparam int unsigned XAW   = (H > 1) ? $clog2(H) : 1;
  localparam int unsigned BAW   = $clog2(N0 * H);
  localparam int unsigned LAW   = (NLUT > 1) ? $clog2(NLUT) : 1;
  localparam int unsigned ITW   = $clog2(ITMAX + 1);

  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;

  logic            key_we = 1'b0, lut_we = 1'b0, x_we = 1'b0, start = 1'b0;
  logic [KAW-1:0]  key_addr = '0;
  logic [PW-1:0]   key_data = '0;
  logic [LAW-1:0]  lut_addr = '0;
  logic [WW-1:0]   lut_w = '0;
  logic [EW-1:0]   lut_b = '0;
  logic [XAW-1:0]  x_addr = '0;
  logic [NB-1:0]   x_data = '0;
  logic            busy, done, success, overflow;
  logic [ITW-1:0]  iter;
  logic [WW-1:0]   synd_weight;
  logic [BAW-1:0]  e_raddr = '0;
  logic [NB-1:0]   e_rdata;

  ledadec_top #(.P(P), .N0(N0), .DH(DH), .WQ(WQ), .NB(NB), .ITMAX(ITMAX), .VMAX(VMAX), .NLUT(NLUT)) dut (
    .clk, .rst_n, .key_we, .key_addr, .key_data, .lut_we, .lut_addr, .lut_w, .lut_b,
    .x_we, .x_addr, .x_data, .start, .busy, .done, .success, .overflow, .iter,
    .synd_weight, .e_raddr, .e_rdata
  );

  int checks = 0, failures = 0;
  // how often each mechanism happened
  int n_success = 0, n_itmax = 0, n_ovf = 0, n_empty = 0, n_match_rows = 0,
      n_quiet_rows = 0, n_iters = 0, n_dense = 0, n_sparse = 0;

  // key and vectors
  int unsigned hpos [N0][DH];
  int unsigned qpos [N0][N0][WQM];
  int unsigned lpos [N0][M*DH];
  bit          xv   [P];
  bit          sv   [P];
  bit          ev   [N0][P];
  bit          etrue[N0][P];
  int unsigned lutw [NLUT];
  int unsigned lutb [NLUT];
  int unsigned nlut_used;

  function automatic int unsigned qw(int unsigned i, int unsigned j);
    return wq_block(WQ, N0, i, j);
  endfunction

  task automatic gen_key();
    bit ok, used [P];
    do begin
      ok = 1'b1;
      for (int i = 0; i < int'(N0); i++) begin
        foreach (used[a]) used[a] = 1'b0;
        for (int k = 0; k < int'(DH); k++) begin
          int unsigned r;
          do r = $urandom % P; while (used[r]);
          used[r] = 1'b1; hpos[i][k] = r;
        end
        for (int j = 0; j < int'(N0); j++) begin
          foreach (used[a]) used[a] = 1'b0;
          for (int k = 0; k < int'(qw(i, j)); k++) begin
            int unsigned r;
            do r = $urandom % P; while (used[r]);
            used[r] = 1'b1; qpos[i][j][k] = r;
          end
        end
      end
      for (int j = 0; j < int'(N0); j++) begin
        int n = 0;
        foreach (used[a]) used[a] = 1'b0;
        for (int i = 0; i < int'(N0); i++)
          for (int a = 0; a < int'(DH); a++)
            for (int b = 0; b < int'(qw(i, j)); b++) begin
              int unsigned r = (hpos[i][a] + qpos[i][j][b]) % P;
              if (used[r]) ok = 1'b0;
              used[r] = 1'b1;
              lpos[j][n] = r;
              n++;
            end
      end
    end while (!ok);
  endtask

  task automatic wr_key(int unsigned addr, int unsigned val);
    @(negedge clk);
    key_we = 1'b1; key_addr = KAW'(addr); key_data = PW'(val);
    @(negedge clk);
    key_we = 1'b0;
  endtask

  task automatic load_key();
    for (int i = 0; i < int'(N0); i++)
      for (int k = 0; k < int'(DH); k++) begin
        wr_key(key_hs(DH, i) + k, (P - hpos[i][k]) % P);
        wr_key(key_hc(N0, DH, WQM, i) + k, hpos[i][k]);
      end
    for (int i = 0; i < int'(N0); i++)
      for (int j = 0; j < int'(N0); j++)
        for (int k = 0; k < int'(qw(i, j)); k++) begin
          wr_key(key_qs(N0, DH, WQM, i, j) + k, (P - qpos[i][j][k]) % P);
          wr_key(key_qc(N0, DH, WQM, i, j) + k, qpos[i][j][k]);
        end
    for (int j = 0; j < int'(N0); j++)
      for (int k = 0; k < int'(M * DH); k++)
        wr_key(key_l(N0, DH, WQM, M, j) + k, lpos[j][k]);
  endtask

  task automatic load_lut();
    for (int i = 0; i < int'(NLUT); i++) begin
      @(negedge clk);
      lut_we = 1'b1; lut_addr = LAW'(i);
      lut_w = (i < int'(nlut_used)) ? WW'(lutw[i]) : '1;
      lut_b = (i < int'(nlut_used)) ? EW'(lutb[i]) : EW'(M * DH);
    end
    @(negedge clk);
    lut_we = 1'b0;
  endtask

  task automatic load_x();
    for (int w = 0; w < int'(H); w++) begin
      @(negedge clk);
      x_we = 1'b1; x_addr = XAW'(w);
      for (int b = 0; b < int'(NB); b++) x_data[b] = (w * NB + b < P) ? xv[w * NB + b] : 1'b0;
    end
    @(negedge clk);
    x_we = 1'b0;
  endtask

  // reference Q-decoder; returns expected busy cycles
  int unsigned r_iter, r_cycles;
  bit          r_success, r_ovf;

  function automatic int unsigned vb(int unsigned d);
    return d * (3 * H + 2);
  endfunction

  task automatic reference();
    bit t [P];
    int unsigned ws, thr, rows, cnt [N0];
    bit flip [N0][P];
    r_cycles = 0; r_iter = 0; r_success = 1'b0; r_ovf = 1'b0;
    foreach (sv[a]) sv[a] = 1'b0;
    for (int j = 0; j < int'(N0); j++) foreach (ev[j][a]) ev[j][a] = 1'b0;
    // syndrome s = sum_i H_i (Q_{i,N0-1} x)
    for (int i = 0; i < int'(N0); i++) begin
      foreach (t[a]) t[a] = 1'b0;
      for (int a = 0; a < int'(P); a++) if (xv[a])
        for (int k = 0; k < int'(qw(i, N0 - 1)); k++) t[(a + qpos[i][N0-1][k]) % P] ^= 1'b1;
      for (int a = 0; a < int'(P); a++) if (t[a])
        for (int k = 0; k < int'(DH); k++) sv[(a + hpos[i][k]) % P] ^= 1'b1;
      r_cycles += vb(qw(i, N0 - 1)) + 1 + vb(DH) + 1;
    end
    forever begin
      ws = 0;
      foreach (sv[a]) ws += sv[a];
      r_cycles += 2 * H + 1;
      if (ws == 0) begin
        r_success = 1'b1;
        break;
      end
      if (r_iter == ITMAX) break;
      thr = M * DH;
      for (int i = 0; i < int'(nlut_used); i++) if (lutw[i] < ws) thr = lutb[i];
      r_cycles += 3;
      for (int i = 0; i < int'(N0); i++) begin
        r_cycles += vb(DH) + 1;
        for (int j = 0; j < int'(N0); j++) r_cycles += vb(qw(i, j)) + 1;
      end
      rows = 0;
      for (int j = 0; j < int'(N0); j++) begin
        cnt[j] = 0;
        for (int l = 0; l < int'(P); l++) begin
          int unsigned rho = 0;
          for (int k = 0; k < int'(M * DH); k++) rho += sv[(l + lpos[j][k]) % P];
          flip[j][l] = (rho > thr);
          if (flip[j][l]) cnt[j]++;
        end
        for (int w = 0; w < int'(H); w++) begin
          bit any = 1'b0;
          for (int b = 0; b < int'(NB); b++) if (w * NB + b < P) any |= flip[j][w * NB + b];
          if (any) rows++;
        end
        if (cnt[j] > VMAX) r_ovf = 1'b1;
        for (int l = 0; l < int'(P); l++) ev[j][l] ^= flip[j][l];
      end
      n_match_rows += rows;
      n_quiet_rows += N0 * H - rows;
      r_cycles += 2 * N0 * H + (NB + 1) * rows + 1;
      if (r_ovf) break;
      if (VER >= 2 && NB >= V2_MIN_NB && r_iter < V2_ITERS) begin
        // version 2: s = s0 + sum_i H_i (sum_j Q_{i,j} e_j), recomputed from
        // the whole estimate; equal to the incremental update below
        n_dense++;
        for (int i = 0; i < int'(N0); i++) begin
          r_cycles += vb(DH) + 1;
          for (int j = 0; j < int'(N0); j++) r_cycles += vb(qw(i, j)) + 1;
        end
        for (int j = 0; j < int'(N0); j++)
          for (int l = 0; l < int'(P); l++) if (flip[j][l])
            for (int k = 0; k < int'(M * DH); k++) sv[(l + lpos[j][k]) % P] ^= 1'b1;
        r_iter++;
        continue;
      end
      n_sparse++;
      for (int j = 0; j < int'(N0); j++) begin
        if (cnt[j] == 0) begin
          r_cycles += 2;
          n_empty++;
        end else begin
          r_cycles += cnt[j] + M * DH + 6 * M * DH * cnt[j] + 1;
          for (int l = 0; l < int'(P); l++) if (flip[j][l])
            for (int k = 0; k < int'(M * DH); k++) sv[(l + lpos[j][k]) % P] ^= 1'b1;
        end
      end
      r_iter++;
    end
  endtask

  task automatic run_and_check(string name, bit expect_true_e);
    int unsigned cyc;
    reference();
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 0;
    while (!done) begin
      if (busy) cyc++;
      @(negedge clk);
    end
    $display("%s: success=%0d iter=%0d overflow=%0d cycles=%0d (reference: %0d %0d %0d %0d)",
             name, success, iter, overflow, cyc, r_success, r_iter, r_ovf, r_cycles);
    checks += 4;
    if (success != r_success) begin failures++; $display("FAIL %s: success", name); end
    if (int'(iter) != r_iter) begin failures++; $display("FAIL %s: iterations", name); end
    if (overflow != r_ovf)   begin failures++; $display("FAIL %s: overflow", name); end
    if (cyc != r_cycles)     begin failures++; $display("FAIL %s: cycles", name); end
    if (r_success) n_success++;
    else if (r_ovf) n_ovf++;
    else n_itmax++;
    n_iters += r_iter;
    // read back the error estimate
    for (int j = 0; j < int'(N0); j++)
      for (int w = 0; w < int'(H); w++) begin
        @(negedge clk);
        e_raddr = BAW'(j * H + w);
        @(negedge clk);
        for (int b = 0; b < int'(NB); b++) begin
          bit exp_b;
          exp_b = (w * NB + b < P) ? ev[j][w * NB + b] : 1'b0;
          if (expect_true_e && w * NB + b < P && exp_b != etrue[j][w * NB + b]) begin
            failures++;
            $display("FAIL %s: reference did not recover the error at %0d/%0d", name, j, w * NB + b);
          end
          checks++;
          if (e_rdata[b] != exp_b) begin
            failures++;
            if (failures < 20) $display("FAIL %s: e block %0d bit %0d", name, j, w * NB + b);
          end
        end
      end
  endtask

  task automatic make_error();
    for (int j = 0; j < int'(N0); j++) foreach (etrue[j][a]) etrue[j][a] = 1'b0;
    for (int n = 0; n < int'(T); n++) begin
      int unsigned r;
      do r = $urandom % P; while (etrue[N0-1][r]);
      etrue[N0-1][r] = 1'b1;
    end
    foreach (xv[a]) xv[a] = etrue[N0-1][a];
  endtask

  initial begin
    repeat (WDOG) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // reset: a falling edge for the asynchronous reset, released after 3 cycles
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    gen_key();
    load_key();
    // 1: zero ciphertext, syndrome already zero
    foreach (xv[a]) xv[a] = 1'b0;
    nlut_used = 3;
    lutw[0] = 0; lutb[0] = 13;
    lutw[1] = 100; lutb[1] = 15;
    lutw[2] = 200; lutb[2] = 16;
    load_lut();
    load_x();
    run_and_check("zero", 1'b0);
    // 2, 3: decodable ciphertexts
    for (int n = 0; n < 2; n++) begin
      make_error();
      load_x();
      run_and_check("decode", 1'b1);
    end
    // 4: thresholds at the maximum, nothing ever flips: failure after ITMAX
    make_error();
    load_x();
    nlut_used = 1;
    lutw[0] = 0; lutb[0] = 25;
    load_lut();
    run_and_check("no-flip", 1'b0);
    // 5: dense random ciphertext with a low threshold: flip-list overflow
    foreach (xv[a]) xv[a] = 1'($urandom);
    nlut_used = 1;
    lutw[0] = 0; lutb[0] = 13;
    load_lut();
    load_x();
    run_and_check("overflow", 1'b0);
    // 6: decodable again after the failures
    nlut_used = 3;
    lutw[0] = 0; lutb[0] = 13;
    lutw[1] = 100; lutb[1] = 15;
    lutw[2] = 200; lutb[2] = 16;
    load_lut();
    make_error();
    load_x();
    run_and_check("decode-again", 1'b1);

    // every mechanism must have happened
    checks += 6;
    if (n_success == 0)    begin failures++; $display("FAIL mechanism: successful decoding never happened"); end
    if (n_itmax == 0)      begin failures++; $display("FAIL mechanism: iteration limit never reached"); end
    if (n_ovf == 0)        begin failures++; $display("FAIL mechanism: flip-list overflow never happened"); end
    if (n_empty == 0)      begin failures++; $display("FAIL mechanism: empty syndrome update never happened"); end
    if (n_match_rows == 0) begin failures++; $display("FAIL mechanism: no counter word ever matched"); end
    if (n_quiet_rows == 0) begin failures++; $display("FAIL mechanism: every counter word matched"); end
    $display("mechanisms: success=%0d itmax=%0d overflow=%0d empty-update=%0d matched-words=%0d quiet-words=%0d iterations=%0d",
             n_success, n_itmax, n_ovf, n_empty, n_match_rows, n_quiet_rows, n_iters);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

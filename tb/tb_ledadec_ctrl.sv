// tb_ledadec_ctrl: self-checking test of the decoder control unit.
//
// The data path is replaced by a stub that answers every launch with a done
// pulse after a random delay of 1 to 6 cycles. During the weight step it
// returns a syndrome weight from a per-run script, and during the search
// step a random flip count per block plus an overflow flag from the script.
// An independent model of the Q-decoder schedule builds the expected list
// of jobs (phase, key list base and length, input/output offsets, init
// flag, flip-list length). Each launch is compared with the next expected
// job; at the end the outcome (success, iteration count), the single done
// pulse and the number of cycles from start to done (sum of the stub delays
// plus one launch cycle per job) are checked.
// Runs: success after 0, 1 and 2 iterations, failure at ITMAX, overflow
// stop in the first and in a later iteration, plus random scripts.
// NB = 64 with VER = 2, so iterations 0 and 1 issue the dense (version 2)
// update jobs and iteration 2 the sparse SVbSC jobs.
module tb_ledadec_ctrl;
  import ledadec_pkg::*;

  localparam int unsigned P = 1031, N0 = 2, DH = 5, NB = 64, ITMAX = 3, VMAX = 16;
  localparam int unsigned VER = 2;
  localparam int unsigned WQ [4] = '{3, 2, 0, 0};
  localparam int unsigned H = (P + NB - 1) / NB;
  localparam int unsigned M = wq_sum(WQ, N0), WQM = wq_max(WQ, N0);
  localparam int unsigned KAW = $clog2(key_depth(N0, DH, WQM, M));
  localparam int unsigned LENW = $clog2(M * DH + 1);
  localparam int unsigned IBW = 9, OBW = 9;
  localparam int unsigned WW = $clog2(P + 1), DVW = $clog2(VMAX + 1), ITW = $clog2(ITMAX + 1);

  logic clk = 1'b0, rst_n = 1'b1, start = 1'b0;
  always #5 clk = ~clk;

  logic busy, done, success, launch, job_init;
  logic [ITW-1:0] iter;
  phase_e phase;
  logic [KAW-1:0] job_list_base;
  logic [LENW-1:0] job_list_len;
  logic [IBW-1:0] job_in_base;
  logic [OBW-1:0] job_out_base;
  logic [DVW-1:0] job_v_len;
  logic unit_done = 1'b0, flip_ovf = 1'b0;
  logic [WW-1:0] synd_weight = '0;
  logic [N0-1:0][DVW-1:0] flip_cnt = '0;

  ledadec_ctrl #(.P(P), .N0(N0), .DH(DH), .WQ(WQ), .NB(NB), .ITMAX(ITMAX), .VMAX(VMAX),
                 .KAW(KAW), .LENW(LENW), .IBW(IBW), .OBW(OBW), .VER(VER)) dut (.*);

  int checks = 0, failures = 0;

  typedef struct {
    phase_e ph;
    int unsigned base, len, inb, outb, init, vlen;
  } job_t;
  job_t exp_q[$];

  // per-run script: weight returned by the n-th weight step, overflow flag
  // of the n-th search
  int unsigned wscript [8];
  bit          oscript [8];
  int unsigned cnt_now [N0];

  function automatic int unsigned qw(int unsigned i, int unsigned j);
    return wq_block(WQ, N0, i, j);
  endfunction

  function automatic void push(phase_e ph, int unsigned base, int unsigned len,
                               int unsigned inb, int unsigned outb, int unsigned init);
    job_t j;
    j.ph = ph; j.base = base; j.len = len; j.inb = inb; j.outb = outb; j.init = init; j.vlen = 0;
    exp_q.push_back(j);
  endfunction

  // expected schedule except the flip-list lengths (known only at run time)
  int unsigned e_iter;
  bit          e_success;
  task automatic build_expected();
    int unsigned it = 0;
    exp_q.delete();
    for (int i = 0; i < int'(N0); i++) begin
      push(PH_SYN_QX, key_qs(N0, DH, WQM, i, N0 - 1), qw(i, N0 - 1), 0, 0, 1);
      push(PH_SYN_HT, key_hs(DH, i), DH, 0, 0, (i == 0));
    end
    e_success = 1'b0;
    forever begin
      push(PH_SYNW, 0, 0, 0, 0, 0);
      if (wscript[it] == 0) begin e_success = 1'b1; break; end
      if (it == ITMAX) break;
      push(PH_TH, 0, 0, 0, 0, 0);
      for (int i = 0; i < int'(N0); i++) push(PH_CORR_SIG, key_hc(N0, DH, WQM, i), DH, 0, i * H, 1);
      for (int j = 0; j < int'(N0); j++)
        for (int i = 0; i < int'(N0); i++)
          push(PH_CORR_RHO, key_qc(N0, DH, WQM, i, j), qw(i, j), i * H, j * H, (i == 0));
      push(PH_ERRPOS, 0, 0, 0, 0, 0);
      if (oscript[it]) break;
      if (it < V2_ITERS) begin
        // version 2: t = sum_j Q_{i,j} e_j, s ^= H_i t for every i
        for (int i = 0; i < int'(N0); i++) begin
          for (int j = 0; j < int'(N0); j++)
            push(PH_UPD_QE, key_qs(N0, DH, WQM, i, j), qw(i, j), j * H, 0, (j == 0));
          push(PH_UPD_HT, key_hs(DH, i), DH, 0, 0, 0);
        end
      end else begin
        for (int j = 0; j < int'(N0); j++) push(PH_SYNUPD, key_l(N0, DH, WQM, M, j), M * DH, j * VMAX, 0, 0);
      end
      it++;
    end
    e_iter = it;
  endtask

  // stub data path
  int unsigned n_synw, n_search, exp_cycles;
  always @(posedge clk) begin
    if (launch) begin
      automatic job_t j;
      automatic phase_e ph = phase;
      automatic int unsigned d = 1 + $urandom % 6;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected job %s", ph.name());
      end else begin
        j = exp_q.pop_front();
        if (ph != j.ph || job_list_base != KAW'(j.base) || job_list_len != LENW'(j.len) ||
            job_in_base != IBW'(j.inb) || job_out_base != OBW'(j.outb) || job_init != j.init[0] ||
            (ph == PH_SYNUPD && job_v_len != DVW'(cnt_now[job_in_base / VMAX]))) begin
          failures++;
          $display("FAIL job %s: got base=%0d len=%0d in=%0d out=%0d init=%0d vlen=%0d, expected %s %0d %0d %0d %0d %0d",
                   ph.name(), job_list_base, job_list_len, job_in_base, job_out_base, job_init,
                   job_v_len, j.ph.name(), j.base, j.len, j.inb, j.outb, j.init);
        end
      end
      exp_cycles += d + 1;
      fork
        begin
          repeat (d - 1) @(posedge clk);
          #1;
          unit_done = 1'b1;
          if (ph == PH_SYNW) begin
            synd_weight = WW'(wscript[n_synw]);
            n_synw++;
          end
          if (ph == PH_ERRPOS) begin
            for (int b = 0; b < int'(N0); b++) begin
              cnt_now[b] = $urandom % (VMAX + 1);
              flip_cnt[b] = DVW'(cnt_now[b]);
            end
            flip_ovf = oscript[n_search];
            n_search++;
          end
          @(posedge clk);
          #1;
          unit_done = 1'b0;
          flip_ovf = 1'b0;
        end
      join_none
    end
  end

  int n_done_pulses;
  always @(posedge clk) if (done) n_done_pulses++;

  task automatic run(string name);
    int unsigned cyc;
    build_expected();
    n_synw = 0; n_search = 0; exp_cycles = 0; n_done_pulses = 0;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    repeat (3) @(negedge clk);
    checks += 5;
    if (success != e_success) begin failures++; $display("FAIL %s: success", name); end
    if (int'(iter) != e_iter) begin failures++; $display("FAIL %s: iter %0d, expected %0d", name, iter, e_iter); end
    if (exp_q.size() != 0) begin failures++; $display("FAIL %s: %0d jobs never launched", name, exp_q.size()); end
    if (n_done_pulses != 1 || busy) begin failures++; $display("FAIL %s: done pulses %0d busy %0d", name, n_done_pulses, busy); end
    // clock edges from the one that samples start to the one that raises
    // done: per job its launch cycle and the stub delay
    if (cyc - 1 != exp_cycles) begin failures++; $display("FAIL %s: %0d cycles, expected %0d", name, cyc - 1, exp_cycles); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
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
    foreach (oscript[k]) oscript[k] = 1'b0;
    wscript = '{0, 0, 0, 0, 0, 0, 0, 0};             run("success at once");
    wscript = '{50, 0, 0, 0, 0, 0, 0, 0};            run("success after 1");
    wscript = '{50, 20, 0, 0, 0, 0, 0, 0};           run("success after 2");
    wscript = '{50, 40, 30, 20, 10, 5, 0, 0};        run("iteration limit");
    oscript[0] = 1'b1;                               run("overflow first");
    oscript[0] = 1'b0; oscript[2] = 1'b1;            run("overflow third");
    for (int n = 0; n < 40; n++) begin
      foreach (wscript[k]) wscript[k] = ($urandom % 3 == 0) ? 0 : 1 + $urandom % 300;
      foreach (oscript[k]) oscript[k] = ($urandom % 5 == 0);
      run("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// vbsc_harness: drives one vbsc instance with memory models and checks it.
//
// Runs NRUN multiplications with random position lists (always including
// the wrap-around corner positions) and random input vectors; each run
// first overwrites the output (init = 1) and then accumulates a second list
// onto it (init = 0). The expected result is computed element by element as
// sum_k v[(q + k) mod P], by xor or by addition modulo 2^EW_OUT, and the busy
// time of every call is checked against LEN * (3H + 2) cycles. Reports its
// counts on `checks`/`failures` and raises `finished`.
module vbsc_harness #(
  parameter int unsigned P      = 37,
  parameter int unsigned NB     = 4,
  parameter int unsigned EW_IN  = 1,
  parameter int unsigned EW_OUT = 1,
  parameter bit          ADD    = 1'b0,
  parameter int unsigned NRUN   = 6
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic finished
);
  localparam int unsigned H   = (P + NB - 1) / NB;
  localparam int unsigned PW  = $clog2(P);
  localparam int unsigned KAW = 4;
  localparam int unsigned VAW = $clog2(H) + 1;

  logic              start, busy, done, init;
  logic [KAW-1:0]    list_base, key_addr;
  logic [7:0]        list_len;
  logic [PW-1:0]     key_data;
  logic [VAW-1:0]    va, vb, rra, rwa;
  logic [NB*EW_IN-1:0]  vda, vdb;
  logic [NB*EW_OUT-1:0] rrd, rwd;
  logic              rwe;

  logic [PW-1:0]        kmem [16];
  logic [NB*EW_IN-1:0]  vmem [2*H];
  logic [NB*EW_OUT-1:0] rmem [2*H];

  always_ff @(posedge clk) begin
    key_data <= kmem[key_addr];
    vda      <= vmem[va];
    vdb      <= vmem[vb];
    rrd      <= rmem[rra];
    if (rwe) rmem[rwa] <= rwd;
  end

  // input vector at rows H.., output at rows H.. too, to exercise the bases
  vbsc #(
    .P(P), .NB(NB), .EW_IN(EW_IN), .EW_OUT(EW_OUT), .ADD(ADD),
    .KAW(KAW), .VAW(VAW), .RAW(VAW), .LENW(8)
  ) dut (
    .clk, .rst_n, .start, .busy, .done,
    .cfg_list_base(list_base), .cfg_list_len(list_len),
    .cfg_in_base(VAW'(H)), .cfg_out_base(VAW'(H)), .cfg_init(init),
    .key_addr, .key_data,
    .v_addr_a(va), .v_addr_b(vb), .v_data_a(vda), .v_data_b(vdb),
    .r_raddr(rra), .r_rdata(rrd), .r_we(rwe), .r_waddr(rwa), .r_wdata(rwd)
  );

  int unsigned v   [P];
  int unsigned ref_r [P];

  task automatic run_one(input int unsigned len, input bit do_init, input int unsigned base);
    int unsigned k, cyc;
    for (int i = 0; i < int'(len); i++) begin
      k = int'(kmem[base + i]);
      for (int q = 0; q < int'(P); q++) begin
        if (ADD) ref_r[q] = (ref_r[q] * ((do_init && i == 0) ? 0 : 1) + v[(q + k) % P]) % (1 << EW_OUT);
        else     ref_r[q] = ((do_init && i == 0) ? 0 : ref_r[q]) ^ v[(q + k) % P];
      end
    end
    @(negedge clk);
    list_base = KAW'(base);
    list_len  = 8'(len);
    init      = do_init;
    start     = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 0;
    while (busy) begin
      cyc++;
      if (done && busy) ; // done is inside the busy window
      @(negedge clk);
    end
    checks++;
    if (cyc != len * (3 * H + 2)) begin
      failures++;
      $display("FAIL vbsc P=%0d NB=%0d: busy %0d cycles, expected %0d", P, NB, cyc, len * (3 * H + 2));
    end
  endtask

  task automatic compare();
    for (int w = 0; w < int'(H); w++) begin
      for (int q = 0; q < int'(NB); q++) begin
        int unsigned idx = w * NB + q;
        int unsigned got = int'(rmem[H + w][q*EW_OUT +: EW_OUT]);
        int unsigned exp = (idx < P) ? ref_r[idx] : 0;
        checks++;
        if (got != exp) begin
          failures++;
          if (failures < 10)
            $display("FAIL vbsc P=%0d NB=%0d add=%0d: element %0d got %0d exp %0d", P, NB, ADD, idx, got, exp);
        end
      end
    end
  endtask

  // count done pulses: exactly one per call
  int ndone = 0;
  always_ff @(posedge clk) if (done) ndone <= ndone + 1;

  initial begin
    checks = 0; failures = 0; finished = 1'b0; start = 1'b0;
    list_base = '0; list_len = '0; init = 1'b0;
    for (int i = 0; i < 2 * int'(H); i++) begin
      vmem[i] = '0;
      rmem[i] = '0;
    end
    @(posedge rst_n);
    for (int run = 0; run < int'(NRUN); run++) begin
      int unsigned l1, l2;
      // random input vector, zero padding in the last word
      for (int q = 0; q < int'(P); q++) v[q] = $urandom % (1 << EW_IN);
      for (int w = 0; w < int'(H); w++)
        for (int q = 0; q < int'(NB); q++)
          vmem[H + w][q*EW_IN +: EW_IN] = (w * NB + q < P) ? EW_IN'(v[w * NB + q]) : '0;
      // first list: corner positions, then random
      l1 = 1 + $urandom % 5;
      l2 = 1 + $urandom % 5;
      for (int i = 0; i < 16; i++) kmem[i] = PW'($urandom % P);
      kmem[0] = PW'((run == 0) ? 0 : (run == 1) ? P - 1 : (H - 2) * NB + NB - 1);
      kmem[8] = PW'((run == 0) ? (H - 1) * NB : (H - 2) * NB + (P - (H - 1) * NB));
      run_one(l1, 1'b1, 0);
      compare();
      run_one(l2, 1'b0, 8);
      compare();
    end
    @(negedge clk);
    checks++;
    if (ndone != 2 * int'(NRUN)) begin
      failures++;
      $display("FAIL vbsc: %0d done pulses for %0d calls", ndone, 2 * NRUN);
    end
    finished = 1'b1;
  end
endmodule

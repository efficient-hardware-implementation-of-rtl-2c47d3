// tb_svbsc: self-checking test of the SVbSC multiplier.
//
// With P = 131 and NB = 32 the unit toggles, in a random dense vector s,
// the bits (a_k + v_l) mod P for random position lists a (length DA) and v
// (length DV), reading both lists from memory models at non-zero bases.
// The result is compared with a direct computation, and the busy time with
// DV + DA + 6*DA*DV cycles. An empty v list must leave s alone.
module tb_svbsc;
  localparam int unsigned P = 131, NB = 32, VMAX = 16;
  localparam int unsigned H = (P + NB - 1) / NB, PW = $clog2(P);

  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic           start, busy, done, s_we;
  logic [7:0]     a_base, key_addr, a_len;
  logic [5:0]     v_base, ev_addr;
  logic [4:0]     v_len;
  logic [PW-1:0]  key_data, ev_data;
  logic [2:0]     s_raddr, s_waddr;
  logic [NB-1:0]  s_rdata, s_wdata;

  logic [PW-1:0]  kmem [256];
  logic [PW-1:0]  emem [64];
  logic [NB-1:0]  smem [8];
  bit             sref [P];

  always_ff @(posedge clk) begin
    key_data <= kmem[key_addr];
    ev_data  <= emem[ev_addr];
    s_rdata  <= smem[s_raddr];
    if (s_we) smem[s_waddr] <= s_wdata;
  end

  svbsc #(.P(P), .NB(NB), .VMAX(VMAX), .KAW(8), .EAW(6), .SAW(3), .LENW(8)) dut (
    .clk, .rst_n, .start, .busy, .done,
    .cfg_a_base(a_base), .cfg_a_len(a_len), .cfg_v_base(v_base), .cfg_v_len(v_len),
    .key_addr, .key_data, .ev_addr, .ev_data,
    .s_raddr, .s_rdata, .s_we, .s_waddr, .s_wdata
  );

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int unsigned da, input int unsigned dv);
    int unsigned cyc, ndone;
    for (int i = 0; i < int'(da); i++) kmem[20 + i] = PW'($urandom % P);
    for (int i = 0; i < int'(dv); i++) emem[16 + i] = PW'($urandom % P);
    if (da > 1) kmem[20] = PW'(P - 1);
    if (dv > 1) emem[16] = PW'(P - 1);
    for (int i = 0; i < int'(da); i++)
      for (int l = 0; l < int'(dv); l++)
        sref[(int'(kmem[20 + i]) + int'(emem[16 + l])) % P] ^= 1'b1;
    @(negedge clk);
    a_base = 8'd20; a_len = 8'(da); v_base = 6'd16; v_len = 5'(dv);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 0; ndone = 0;
    while (busy) begin
      cyc++;
      if (done) ndone++;
      @(negedge clk);
    end
    checks++;
    if (dv != 0 && cyc != dv + da + 6 * da * dv) begin
      failures++;
      $display("FAIL svbsc: busy %0d cycles, expected %0d", cyc, dv + da + 6 * da * dv);
    end
    checks++;
    if (ndone != 1) begin
      failures++;
      $display("FAIL svbsc: %0d done pulses", ndone);
    end
    for (int q = 0; q < int'(H * NB); q++) begin
      checks++;
      if (smem[q / NB][q % NB] != ((q < int'(P)) ? sref[q] : 1'b0)) begin
        failures++;
        if (failures < 10) $display("FAIL svbsc: bit %0d", q);
      end
    end
  endtask

  initial begin
    start = 1'b0; a_base = '0; a_len = '0; v_base = '0; v_len = '0;
    for (int q = 0; q < int'(P); q++) sref[q] = 1'($urandom);
    for (int w = 0; w < int'(H); w++)
      for (int b = 0; b < int'(NB); b++)
        smem[w][b] = (w * NB + b < P) ? sref[w * NB + b] : 1'b0;
    // reset: a falling edge for the asynchronous reset, released after 3 cycles
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(1, 1);
    run(7, 3);
    run(12, VMAX);
    run(5, 0);
    run(30, 9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

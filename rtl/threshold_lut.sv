// threshold_lut: threshold evaluation b = f(w(s)).
//
// Holds NLUT pairs (w_i, b_i), written through a simple write port, sorted by
// increasing w_i. Given the syndrome weight ws it returns the b_i of the
// largest w_i that is lower than ws. Entries not used should hold w_i = all
// ones so that they never match. If no entry matches, b = BMAX.
//
// Two cycles after start: in the first, every w_i is compared with ws in
// parallel and the match vector is registered; in the second, the highest
// matching entry is selected and b is registered. done is asserted in the
// second cycle; b stays valid until the next start. The pair format and the
// selection rule are those of the LEDAcrypt threshold function; the two-step
// pipeline is this design's own.
module threshold_lut #(
  parameter int unsigned NLUT = 8,
  parameter int unsigned WW   = 14,   // syndrome weight width
  parameter int unsigned BW   = 7,    // threshold width
  parameter int unsigned BMAX = 77,
  localparam int unsigned LAW = (NLUT > 1) ? $clog2(NLUT) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  // table load
  input  logic           lut_we,
  input  logic [LAW-1:0] lut_addr,
  input  logic [WW-1:0]  lut_w,
  input  logic [BW-1:0]  lut_b,
  // evaluation
  input  logic           start,
  input  logic [WW-1:0]  ws,
  output logic           busy,
  output logic           done,
  output logic [BW-1:0]  b
);
  logic [WW-1:0]   tw [NLUT];
  logic [BW-1:0]   tb [NLUT];
  logic [NLUT-1:0] match;
  logic [1:0]      phase;   // 0 idle, 1 compare, 2 select

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NLUT; i++) begin
        tw[i] <= '1;
        tb[i] <= BW'(BMAX);
      end
    end else if (lut_we) begin
      tw[lut_addr] <= lut_w;
      tb[lut_addr] <= lut_b;
    end
  end

  logic [BW-1:0] sel_b;
  always_comb begin
    sel_b = BW'(BMAX);
    for (int i = 0; i < NLUT; i++) if (match[i]) sel_b = tb[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= 2'd0;
      match <= '0;
      b     <= BW'(BMAX);
    end else begin
      case (phase)
        2'd0: if (start) phase <= 2'd1;
        2'd1: begin
          for (int i = 0; i < NLUT; i++) match[i] <= (tw[i] < ws);
          phase <= 2'd2;
        end
        default: begin
          b     <= sel_b;
          phase <= 2'd0;
        end
      endcase
    end
  end

  assign busy = (phase != 2'd0);
  assign done = (phase == 2'd2);

endmodule

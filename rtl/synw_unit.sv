// synw_unit: syndrome weight (ones counter).
//
// Reads the H words of the syndrome memory, starting at row 0, and adds up
// the number of set bits. Each word costs two cycles: one to read it, one to
// count its ones into the accumulator, so busy lasts 2H cycles and done is
// asserted in the last of them together with the final weight on `weight`
// (which then stays valid until the next start). The two-cycle-per-word
// rhythm follows the cost model of the decoder architecture; the register
// structure is this design's own.
module synw_unit #(
  parameter int unsigned P   = 14939,
  parameter int unsigned NB  = 32,
  parameter int unsigned SAW = 9,
  localparam int unsigned WW = $clog2(P + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  output logic           busy,
  output logic           done,
  output logic [SAW-1:0] s_raddr,
  input  logic [NB-1:0]  s_rdata,
  output logic [WW-1:0]  weight
);
  localparam int unsigned H  = (P + NB - 1) / NB;

  typedef enum logic [1:0] {S_IDLE, S_RD, S_CNT} state_e;
  state_e         state;
  logic [SAW-1:0] row;
  logic [WW-1:0]  acc;

  logic [WW-1:0] ones;
  always_comb begin
    ones = '0;
    for (int b = 0; b < NB; b++) ones += WW'(s_rdata[b]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      row   <= '0;
      acc   <= '0;
    end else begin
      case (state)
        S_IDLE: if (start) begin
          row   <= '0;
          acc   <= '0;
          state <= S_RD;
        end
        S_RD:  state <= S_CNT;
        S_CNT: begin
          acc <= acc + ones;
          if (row == SAW'(H - 1)) begin
            state <= S_IDLE;
          end else begin
            row   <= row + 1'b1;
            state <= S_RD;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign s_raddr = row;
  assign busy    = (state != S_IDLE);
  assign done    = (state == S_CNT) && (row == SAW'(H - 1));
  // in the done cycle the last word is not yet in acc
  assign weight  = done ? acc + ones : acc;

endmodule

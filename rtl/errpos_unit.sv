// errpos_unit: error position search.
//
// Scans the correlation (UPC counter) vectors rho_0 .. rho_{N0-1} word by
// word and flips every error-estimate bit whose counter exceeds the
// threshold b. For each block j it also writes the flipped positions into
// that block's list in the flip-position memory (VMAX slots per block,
// j*VMAX + k), where the syndrome-update multiplier reads them, and reports
// the number of positions per block on `cnt`.
//
// Per word: one cycle reads the rho word (and the matching word of the
// dense error estimate), one cycle compares all NB counters with b at once.
// If nothing matches the next word follows. Otherwise NB cycles walk the
// word, storing one position per matching element, and one more cycle
// writes back the error word with the matching bits flipped. busy lasts
// 2*N0*H + (NB+1)*(words with a match) cycles; done is asserted in the last
// of them. That cost matches the architecture's model for this unit; the
// flip-list overflow handling is this design's own: positions beyond VMAX
// in a block are still flipped in the dense estimate but not listed, and
// `ovf` is raised (the decoder then reports failure).
module errpos_unit #(
  parameter int unsigned P    = 14939,
  parameter int unsigned NB   = 32,
  parameter int unsigned N0   = 2,
  parameter int unsigned EW   = 7,    // counter width
  parameter int unsigned VMAX = 256,
  parameter int unsigned RHAW = 10,   // rho / e memory address width
  parameter int unsigned EAW  = 9,    // flip-position memory address width
  localparam int unsigned PW  = $clog2(P),
  localparam int unsigned DVW = $clog2(VMAX + 1)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic [EW-1:0]            thr,
  output logic                     busy,
  output logic                     done,
  // correlation memory (read)
  output logic [RHAW-1:0]          rho_raddr,
  input  logic [NB*EW-1:0]         rho_rdata,
  // dense error estimate (read / write, same address as rho)
  output logic [RHAW-1:0]          e_raddr,
  input  logic [NB-1:0]            e_rdata,
  output logic                     e_we,
  output logic [RHAW-1:0]          e_waddr,
  output logic [NB-1:0]            e_wdata,
  // flip-position lists (write)
  output logic                     ep_we,
  output logic [EAW-1:0]           ep_waddr,
  output logic [PW-1:0]            ep_wdata,
  output logic [N0-1:0][DVW-1:0]   cnt,
  output logic                     ovf
);
  localparam int unsigned H   = (P + NB - 1) / NB;
  localparam int unsigned LG  = $clog2(NB);
  localparam int unsigned HW  = $clog2(H);
  localparam int unsigned JW  = (N0 > 1) ? $clog2(N0) : 1;

  typedef enum logic [2:0] {S_IDLE, S_RD, S_CMP, S_SCAN, S_WB} state_e;
  state_e state;

  logic [JW-1:0]  blk;
  logic [HW-1:0]  row;
  logic [LG-1:0]  k;
  logic [NB-1:0]  mask_q, e_q;

  logic [NB-1:0]  match;
  always_comb begin
    for (int q = 0; q < NB; q++) match[q] = (rho_rdata[q*EW +: EW] > thr);
  end

  logic last_row;
  assign last_row = (row == HW'(H - 1)) && (blk == JW'(N0 - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      blk    <= '0;
      row    <= '0;
      k      <= '0;
      mask_q <= '0;
      e_q    <= '0;
      cnt    <= '0;
      ovf    <= 1'b0;
    end else begin
      case (state)
        S_IDLE: if (start) begin
          blk   <= '0;
          row   <= '0;
          cnt   <= '0;
          ovf   <= 1'b0;
          state <= S_RD;
        end
        S_RD: state <= S_CMP;
        S_CMP: begin
          mask_q <= match;
          e_q    <= e_rdata;
          k      <= '0;
          if (match != '0) begin
            state <= S_SCAN;
          end else if (last_row) begin
            state <= S_IDLE;
          end else begin
            if (row == HW'(H - 1)) begin
              row <= '0;
              blk <= blk + 1'b1;
            end else begin
              row <= row + 1'b1;
            end
            state <= S_RD;
          end
        end
        S_SCAN: begin
          if (mask_q[k]) begin
            if (cnt[blk] == DVW'(VMAX)) ovf <= 1'b1;
            else cnt[blk] <= cnt[blk] + 1'b1;
          end
          k <= k + 1'b1;
          if (k == LG'(NB - 1)) state <= S_WB;
        end
        S_WB: begin
          if (last_row) begin
            state <= S_IDLE;
          end else begin
            if (row == HW'(H - 1)) begin
              row <= '0;
              blk <= blk + 1'b1;
            end else begin
              row <= row + 1'b1;
            end
            state <= S_RD;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  logic [RHAW-1:0] word_addr;
  assign word_addr = RHAW'(blk) * RHAW'(H) + RHAW'(row);

  assign rho_raddr = word_addr;
  assign e_raddr   = word_addr;
  assign e_we      = (state == S_WB);
  assign e_waddr   = word_addr;
  assign e_wdata   = e_q ^ mask_q;

  assign ep_we     = (state == S_SCAN) && mask_q[k] && (cnt[blk] != DVW'(VMAX));
  assign ep_waddr  = EAW'(blk) * EAW'(VMAX) + EAW'(cnt[blk]);
  assign ep_wdata  = PW'(row) * PW'(NB) + PW'(k);

  assign busy = (state != S_IDLE);
  assign done = ((state == S_CMP) && (match == '0) && last_row) ||
                ((state == S_WB) && last_row);

endmodule

// ledadec_ctrl: control unit of the Q-decoder.
//
// Sequences the data-path units through Algorithm "Q-decoder" (bit flipping
// on L = H Q with the two-step counter computation):
//
//   syndrome : for i: t = Q_{i,n0-1} x  (PH_SYN_QX), s ^= H_i t (PH_SYN_HT)
//   loop     : w(s)                      (PH_SYNW)
//              stop with success if w(s) = 0, with failure if ITMAX
//              iterations are done
//              b = f(w(s))               (PH_TH)
//              for i: sigma_i = s * H_i^T                (PH_CORR_SIG)
//              for j, i: rho_j (+)= sigma_i * Q_{i,j}^T  (PH_CORR_RHO)
//              flip e where rho > b, list the flips      (PH_ERRPOS)
//              stop with failure if a flip list overflowed
//              for j: s ^= L_j * (flips of block j)      (PH_SYNUPD)
//                or, in version 2 (VER >= 2, NB >= 64, It < 2):
//              for i: for j: t (+)= Q_{i,j} e_j         (PH_UPD_QE)
//                     s ^= H_i t                         (PH_UPD_HT)
//              It = It + 1
//
// Version 2 recomputes the syndrome from the whole error estimate with the
// syndrome VbSC (the top restores s to the initial syndrome first). The
// rule for choosing it, dense update in the first two iterations when the
// word size is at least 64, is the one the architecture description gives;
// with VER = 1 or a smaller word every update is the sparse SVbSC one.
//
// Each step is one job: the controller presents the job's configuration
// (list base and length in the key memory, input and output row offsets,
// init flag) on job_*, pulses `launch` for one cycle and waits for the
// unit's done pulse. The top level routes the memories by `phase`. The
// order of the units and the start/end handshake follow the decoder
// architecture; checking the syndrome weight at the start of each iteration
// (rather than after the correlation) is this design's own choice and does
// the same work.
module ledadec_ctrl
  import ledadec_pkg::*;
#(
  parameter int unsigned P      = P_DEF,
  parameter int unsigned N0     = N0_DEF,
  parameter int unsigned DH     = DH_DEF,
  parameter int unsigned WQ [4] = WQ_DEF,
  parameter int unsigned NB     = NB_DEF,
  parameter int unsigned ITMAX  = ITMAX_DEF,
  parameter int unsigned VMAX   = VMAX_DEF,
  parameter int unsigned VER    = VER_DEF,
  parameter int unsigned KAW    = 8,
  parameter int unsigned LENW   = 8,
  parameter int unsigned IBW    = 16,   // width of the input base offset
  parameter int unsigned OBW    = 16,   // width of the output base offset
  localparam int unsigned WW    = $clog2(P + 1),
  localparam int unsigned DVW   = $clog2(VMAX + 1),
  localparam int unsigned ITW   = $clog2(ITMAX + 1)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  output logic                   busy,
  output logic                   done,      // one-cycle pulse at the end
  output logic                   success,   // valid from done until next start
  output logic [ITW-1:0]         iter,      // iterations performed
  // job presented to the data path
  output phase_e                 phase,
  output logic                   launch,
  output logic [KAW-1:0]         job_list_base,
  output logic [LENW-1:0]        job_list_len,
  output logic [IBW-1:0]         job_in_base,
  output logic [OBW-1:0]         job_out_base,
  output logic                   job_init,
  output logic [DVW-1:0]         job_v_len,
  // unit status
  input  logic                   unit_done,
  input  logic [WW-1:0]          synd_weight,
  input  logic [N0-1:0][DVW-1:0] flip_cnt,
  input  logic                   flip_ovf
);
  localparam int unsigned H     = (P + NB - 1) / NB;
  localparam int unsigned M     = wq_sum(WQ, N0);
  localparam int unsigned WQM   = wq_max(WQ, N0);
  localparam int unsigned JW    = (N0 > 1) ? $clog2(N0) : 1;

  logic [JW-1:0] bi, bj;

  // version 2: dense syndrome update in the first iterations at large NB
  logic use_dense;
  assign use_dense = (VER >= 2) && (NB >= V2_MIN_NB) && (32'(iter) < V2_ITERS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase   <= PH_IDLE;
      launch  <= 1'b0;
      bi      <= '0;
      bj      <= '0;
      iter    <= '0;
      success <= 1'b0;
      done    <= 1'b0;
    end else begin
      launch <= 1'b0;
      done   <= 1'b0;
      case (phase)
        PH_IDLE, PH_DONE: if (start) begin
          phase   <= PH_SYN_QX;
          launch  <= 1'b1;
          bi      <= '0;
          iter    <= '0;
          success <= 1'b0;
        end
        PH_SYN_QX: if (unit_done) begin
          phase  <= PH_SYN_HT;
          launch <= 1'b1;
        end
        PH_SYN_HT: if (unit_done) begin
          launch <= 1'b1;
          if (bi == JW'(N0 - 1)) begin
            phase <= PH_SYNW;
          end else begin
            bi    <= bi + 1'b1;
            phase <= PH_SYN_QX;
          end
        end
        PH_SYNW: if (unit_done) begin
          if (synd_weight == '0) begin
            success <= 1'b1;
            done    <= 1'b1;
            phase   <= PH_DONE;
          end else if (iter == ITW'(ITMAX)) begin
            done  <= 1'b1;
            phase <= PH_DONE;
          end else begin
            launch <= 1'b1;
            phase  <= PH_TH;
          end
        end
        PH_TH: if (unit_done) begin
          bi     <= '0;
          launch <= 1'b1;
          phase  <= PH_CORR_SIG;
        end
        PH_CORR_SIG: if (unit_done) begin
          launch <= 1'b1;
          if (bi == JW'(N0 - 1)) begin
            bi    <= '0;
            bj    <= '0;
            phase <= PH_CORR_RHO;
          end else begin
            bi <= bi + 1'b1;
          end
        end
        PH_CORR_RHO: if (unit_done) begin
          launch <= 1'b1;
          if (bi == JW'(N0 - 1)) begin
            bi <= '0;
            if (bj == JW'(N0 - 1)) phase <= PH_ERRPOS;
            else bj <= bj + 1'b1;
          end else begin
            bi <= bi + 1'b1;
          end
        end
        PH_ERRPOS: if (unit_done) begin
          bi <= '0;
          bj <= '0;
          if (flip_ovf) begin
            done  <= 1'b1;
            phase <= PH_DONE;
          end else begin
            launch <= 1'b1;
            phase  <= use_dense ? PH_UPD_QE : PH_SYNUPD;
          end
        end
        PH_UPD_QE: if (unit_done) begin
          launch <= 1'b1;
          if (bj == JW'(N0 - 1)) begin
            bj    <= '0;
            phase <= PH_UPD_HT;
          end else begin
            bj <= bj + 1'b1;
          end
        end
        PH_UPD_HT: if (unit_done) begin
          launch <= 1'b1;
          if (bi == JW'(N0 - 1)) begin
            bi    <= '0;
            iter  <= iter + 1'b1;
            phase <= PH_SYNW;
          end else begin
            bi    <= bi + 1'b1;
            phase <= PH_UPD_QE;
          end
        end
        PH_SYNUPD: if (unit_done) begin
          launch <= 1'b1;
          if (bj == JW'(N0 - 1)) begin
            iter  <= iter + 1'b1;
            phase <= PH_SYNW;
          end else begin
            bj <= bj + 1'b1;
          end
        end
        default: phase <= PH_IDLE;
      endcase
    end
  end

  // job configuration for the current phase and block indices
  always_comb begin
    job_list_base = '0;
    job_list_len  = '0;
    job_in_base   = '0;
    job_out_base  = '0;
    job_init      = 1'b0;
    job_v_len     = '0;
    case (phase)
      PH_SYN_QX: begin
        job_list_base = KAW'(key_qs(N0, DH, WQM, 32'(bi), N0 - 1));
        job_list_len  = LENW'(wq_block(WQ, N0, 32'(bi), N0 - 1));
        job_init      = 1'b1;
      end
      PH_SYN_HT: begin
        job_list_base = KAW'(key_hs(DH, 32'(bi)));
        job_list_len  = LENW'(DH);
        job_init      = (bi == '0);
      end
      PH_CORR_SIG: begin
        job_list_base = KAW'(key_hc(N0, DH, WQM, 32'(bi)));
        job_list_len  = LENW'(DH);
        job_out_base  = OBW'(32'(bi) * H);
        job_init      = 1'b1;
      end
      PH_CORR_RHO: begin
        job_list_base = KAW'(key_qc(N0, DH, WQM, 32'(bi), 32'(bj)));
        job_list_len  = LENW'(wq_block(WQ, N0, 32'(bi), 32'(bj)));
        job_in_base   = IBW'(32'(bi) * H);
        job_out_base  = OBW'(32'(bj) * H);
        job_init      = (bi == '0);
      end
      PH_SYNUPD: begin
        job_list_base = KAW'(key_l(N0, DH, WQM, M, 32'(bj)));
        job_list_len  = LENW'(M * DH);
        job_in_base   = IBW'(32'(bj) * VMAX);
        job_v_len     = flip_cnt[bj];
      end
      PH_UPD_QE: begin
        job_list_base = KAW'(key_qs(N0, DH, WQM, 32'(bi), 32'(bj)));
        job_list_len  = LENW'(wq_block(WQ, N0, 32'(bi), 32'(bj)));
        job_in_base   = IBW'(32'(bj) * H);
        job_init      = (bj == '0);
      end
      PH_UPD_HT: begin
        job_list_base = KAW'(key_hs(DH, 32'(bi)));
        job_list_len  = LENW'(DH);
      end
      default: ;
    endcase
  end

  assign busy = (phase != PH_IDLE) && (phase != PH_DONE);

endmodule

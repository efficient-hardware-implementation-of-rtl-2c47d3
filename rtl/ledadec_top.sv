// ledadec_top: LEDAkem Q-decoder (bit-flipping decoder for L = H Q).
//
// Given the ciphertext x (p bits) and the secret key (position lists of the
// circulant blocks H_i, Q_{i,j} and L_j), the decoder computes the syndrome
// s = L_{n0-1} x = sum_i H_i (Q_{i,n0-1} x) and then iterates: count the
// syndrome weight, pick the flipping threshold b from a look-up table,
// compute the unsatisfied-parity-check counters rho = (s * H^T) * Q^T in two
// sparse steps, flip every error bit whose counter exceeds b and update the
// syndrome with the flipped positions. It stops with success when the
// syndrome is zero, and with failure after ITMAX iterations or when more
// than VMAX bits of one block flip in one iteration.
//
// Two versions of the syndrome update exist. Version 1 adds L_j times the
// flips of the current iteration with the SVbSC multiplier. Version 2
// (VER >= 2 and NB >= 64, iterations 0 and 1 only) restores s from a copy
// of the initial syndrome and adds sum_i H_i (sum_j Q_{i,j} e_j) over the
// whole estimate with the syndrome VbSC, which costs the same in every
// iteration and is cheaper while many bits flip at a large word size.
//
// Structure: a control unit (ledadec_ctrl) and a data path of two VbSC
// multipliers (binary one for the syndrome, integer one for the counters),
// a ones counter, the threshold table, the error position search and a
// SVbSC multiplier for the syndrome update, around a set of memories:
//   M_x   ciphertext,               H words x NB bits,   two read ports
//   M_t   Q_{i,n0-1} x temporary,   H words x NB bits,   two read ports
//   M_s   syndrome,                 H words x NB bits,   two read ports
//   M_s0  initial syndrome,         H words x NB bits    (version 2 only)
//   M_sig sigma_i, i < n0,          n0*H words x NB*EW,  two read ports
//   M_rho rho_j, j < n0,            n0*H words x NB*EW
//   M_e   error estimate (dense),   n0*H words x NB bits, two read ports
//   M_ep  flip positions per block, n0*VMAX entries of ceil(log2 p) bits
//   M_key position lists (layout in ledadec_pkg)
// Every memory has one cycle of read latency; the top only multiplexes their
// ports by the controller's phase.
//
// Usage: with the decoder idle, load the key lists (key_we), the threshold
// pairs (lut_we) and the H ciphertext words (x_we); pulse start. busy rises
// the next cycle; at the end done pulses for one cycle with success and iter
// valid. The error estimate of block j, word w is then read at
// e_raddr = j*H + w (data one cycle later). The top's structure, the units and
// their cycle counts and the version-2 selection rule follow the LEDAcrypt
// decoder architecture; the memory port assignment, the clearing of M_e
// while the syndrome is computed, the M_s0 copy engine (it runs during the
// first Q e job, which leaves M_s idle) and the overflow stop are this
// design's own.
module ledadec_top
  import ledadec_pkg::*;
#(
  parameter int unsigned P      = P_DEF,
  parameter int unsigned N0     = N0_DEF,
  parameter int unsigned DH     = DH_DEF,
  parameter int unsigned WQ [4] = WQ_DEF,
  parameter int unsigned NB     = NB_DEF,
  parameter int unsigned ITMAX  = ITMAX_DEF,
  parameter int unsigned VMAX   = VMAX_DEF,
  parameter int unsigned NLUT   = NLUT_DEF,
  parameter int unsigned VER    = VER_DEF,
  localparam int unsigned H     = (P + NB - 1) / NB,
  localparam int unsigned PW    = $clog2(P),
  localparam int unsigned M     = wq_sum(WQ, N0),
  localparam int unsigned WQM   = wq_max(WQ, N0),
  localparam int unsigned EW    = $clog2(M * DH + 1),
  localparam int unsigned WW    = $clog2(P + 1),
  localparam int unsigned KDEP  = key_depth(N0, DH, WQM, M),
  localparam int unsigned KAW   = $clog2(KDEP),
  localparam int unsigned XAW   = (H > 1) ? $clog2(H) : 1,
  localparam int unsigned BAW   = $clog2(N0 * H),
  localparam int unsigned EPAW  = $clog2(N0 * VMAX),
  localparam int unsigned LAW   = (NLUT > 1) ? $clog2(NLUT) : 1,
  localparam int unsigned ITW   = $clog2(ITMAX + 1),
  localparam int unsigned LENW  = $clog2(M * DH + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  // key lists
  input  logic            key_we,
  input  logic [KAW-1:0]  key_addr,
  input  logic [PW-1:0]   key_data,
  // threshold table
  input  logic            lut_we,
  input  logic [LAW-1:0]  lut_addr,
  input  logic [WW-1:0]   lut_w,
  input  logic [EW-1:0]   lut_b,
  // ciphertext
  input  logic            x_we,
  input  logic [XAW-1:0]  x_addr,
  input  logic [NB-1:0]   x_data,
  // control and status
  input  logic            start,
  output logic            busy,
  output logic            done,
  output logic            success,
  output logic            overflow,
  output logic [ITW-1:0]  iter,
  output logic [WW-1:0]   synd_weight,
  // error estimate read-out
  input  logic [BAW-1:0]  e_raddr,
  output logic [NB-1:0]   e_rdata
);
  localparam int unsigned DVW = $clog2(VMAX + 1);
  localparam int unsigned IBW = (EPAW > BAW) ? EPAW : BAW;
  // version 2 hardware (initial-syndrome store) only where it can be chosen
  localparam bit HAS_V2 = (VER >= 2) && (NB >= V2_MIN_NB);

  // ---------------------------------------------------------------- control
  phase_e                phase;
  logic                  launch;
  logic [KAW-1:0]        job_list_base;
  logic [LENW-1:0]       job_list_len;
  logic [IBW-1:0]        job_in_base;
  logic [BAW-1:0]        job_out_base;
  logic                  job_init;
  logic [DVW-1:0]        job_v_len;
  logic                  unit_done;
  logic [N0-1:0][DVW-1:0] flip_cnt;
  logic                  flip_ovf;

  ledadec_ctrl #(
    .P(P), .N0(N0), .DH(DH), .WQ(WQ), .NB(NB), .ITMAX(ITMAX), .VMAX(VMAX), .VER(VER),
    .KAW(KAW), .LENW(LENW), .IBW(IBW), .OBW(BAW)
  ) u_ctrl (
    .clk, .rst_n, .start, .busy, .done, .success, .iter,
    .phase, .launch, .job_list_base, .job_list_len, .job_in_base, .job_out_base,
    .job_init, .job_v_len, .unit_done, .synd_weight, .flip_cnt, .flip_ovf
  );

  assign overflow = flip_ovf;

  logic syn_phase, corr_phase;
  assign syn_phase  = (phase == PH_SYN_QX) || (phase == PH_SYN_HT) ||
                      (phase == PH_UPD_QE) || (phase == PH_UPD_HT);
  assign corr_phase = (phase == PH_CORR_SIG) || (phase == PH_CORR_RHO);

  // ---------------------------------------------------------------- memories
  // M_x
  logic [XAW-1:0]  mx_ra, mx_rb;
  logic [NB-1:0]   mx_da, mx_db;
  ram_1w2r #(.DEPTH(H), .W(NB)) u_mx (
    .clk, .we(x_we), .waddr(x_addr), .wdata(x_data),
    .raddr_a(mx_ra), .rdata_a(mx_da), .raddr_b(mx_rb), .rdata_b(mx_db)
  );

  // M_t
  logic            mt_we, t_out;
  logic [XAW-1:0]  mt_wa, mt_ra, mt_rb;
  logic [NB-1:0]   mt_wd, mt_da, mt_db;
  ram_1w2r #(.DEPTH(H), .W(NB)) u_mt (
    .clk, .we(mt_we), .waddr(mt_wa), .wdata(mt_wd),
    .raddr_a(mt_ra), .rdata_a(mt_da), .raddr_b(mt_rb), .rdata_b(mt_db)
  );

  // M_s
  logic            ms_we;
  logic [XAW-1:0]  ms_wa, ms_ra, ms_rb;
  logic [NB-1:0]   ms_wd, ms_da, ms_db;
  ram_1w2r #(.DEPTH(H), .W(NB)) u_ms (
    .clk, .we(ms_we), .waddr(ms_wa), .wdata(ms_wd),
    .raddr_a(ms_ra), .rdata_a(ms_da), .raddr_b(ms_rb), .rdata_b(ms_db)
  );

  // M_sig
  logic              msg_we;
  logic [BAW-1:0]    msg_wa, msg_ra, msg_rb;
  logic [NB*EW-1:0]  msg_wd, msg_da, msg_db;
  ram_1w2r #(.DEPTH(N0 * H), .W(NB * EW)) u_msig (
    .clk, .we(msg_we), .waddr(msg_wa), .wdata(msg_wd),
    .raddr_a(msg_ra), .rdata_a(msg_da), .raddr_b(msg_rb), .rdata_b(msg_db)
  );

  // M_rho
  logic              mr_we;
  logic [BAW-1:0]    mr_wa, mr_ra;
  logic [NB*EW-1:0]  mr_wd, mr_d;
  ram_1w1r #(.DEPTH(N0 * H), .W(NB * EW)) u_mrho (
    .clk, .we(mr_we), .waddr(mr_wa), .wdata(mr_wd), .raddr(mr_ra), .rdata(mr_d)
  );

  // M_e (second read port for the version-2 syndrome update)
  logic              me_we;
  logic [BAW-1:0]    me_wa, me_ra, me_rb;
  logic [NB-1:0]     me_wd, me_d, me_db;
  ram_1w2r #(.DEPTH(N0 * H), .W(NB)) u_me (
    .clk, .we(me_we), .waddr(me_wa), .wdata(me_wd),
    .raddr_a(me_ra), .rdata_a(me_d), .raddr_b(me_rb), .rdata_b(me_db)
  );
  assign e_rdata = me_d;

  // M_ep
  logic              mep_we;
  logic [EPAW-1:0]   mep_wa, mep_ra;
  logic [PW-1:0]     mep_wd, mep_d;
  ram_1w1r #(.DEPTH(N0 * VMAX), .W(PW)) u_mep (
    .clk, .we(mep_we), .waddr(mep_wa), .wdata(mep_wd), .raddr(mep_ra), .rdata(mep_d)
  );

  // M_key
  logic [KAW-1:0]    mk_ra;
  logic [PW-1:0]     mk_d;
  ram_1w1r #(.DEPTH(KDEP), .W(PW)) u_mkey (
    .clk, .we(key_we), .waddr(key_addr), .wdata(key_data), .raddr(mk_ra), .rdata(mk_d)
  );

  // M_s0: initial syndrome, written together with M_s while the syndrome is
  // computed. Version 2 restores M_s from it before each dense update.
  logic            cp_active, cp_we;
  logic [XAW-1:0]  cp_wa;
  logic [NB-1:0]   ms0_d;
  if (HAS_V2) begin : g_ms0
    logic            ms0_we;
    logic [XAW-1:0]  cp_ra;
    assign ms0_we = (phase == PH_SYN_HT) && ms_we;
    ram_1w1r #(.DEPTH(H), .W(NB)) u_ms0 (
      .clk, .we(ms0_we), .waddr(ms_wa), .wdata(ms_wd), .raddr(cp_ra), .rdata(ms0_d)
    );
    // copy M_s0 -> M_s word by word at the start of the update (first
    // t = Q e job, which leaves M_s idle and always takes longer)
    logic prev_errpos;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        prev_errpos <= 1'b0;
        cp_active   <= 1'b0;
        cp_ra       <= '0;
        cp_we       <= 1'b0;
        cp_wa       <= '0;
      end else begin
        prev_errpos <= (phase == PH_ERRPOS);
        cp_we       <= cp_active;
        cp_wa       <= cp_ra;
        if (prev_errpos && phase == PH_UPD_QE) begin
          cp_active <= 1'b1;
          cp_ra     <= '0;
        end else if (cp_active) begin
          cp_ra <= cp_ra + 1'b1;
          if (cp_ra == XAW'(H - 1)) cp_active <= 1'b0;
        end
      end
    end
  end else begin : g_no_ms0
    assign ms0_d     = '0;
    assign cp_active = 1'b0;
    assign cp_we     = 1'b0;
    assign cp_wa     = '0;
  end

  // ---------------------------------------------------------------- syndrome VbSC
  logic              syn_start, syn_busy, syn_done, syn_rwe;
  logic [KAW-1:0]    syn_kaddr;
  logic [BAW-1:0]    syn_va, syn_vb;
  logic [XAW-1:0]    syn_rra, syn_rwa;
  logic [NB-1:0]     syn_vda, syn_vdb, syn_rrd, syn_rwd;

  assign syn_start = launch && syn_phase;

  vbsc #(
    .P(P), .NB(NB), .EW_IN(1), .EW_OUT(1), .ADD(1'b0),
    .KAW(KAW), .VAW(BAW), .RAW(XAW), .LENW(LENW)
  ) u_vbsc_syn (
    .clk, .rst_n, .start(syn_start), .busy(syn_busy), .done(syn_done),
    .cfg_list_base(job_list_base), .cfg_list_len(job_list_len),
    .cfg_in_base(BAW'(job_in_base)), .cfg_out_base(XAW'(job_out_base)), .cfg_init(job_init),
    .key_addr(syn_kaddr), .key_data(mk_d),
    .v_addr_a(syn_va), .v_addr_b(syn_vb), .v_data_a(syn_vda), .v_data_b(syn_vdb),
    .r_raddr(syn_rra), .r_rdata(syn_rrd), .r_we(syn_rwe), .r_waddr(syn_rwa), .r_wdata(syn_rwd)
  );

  // ---------------------------------------------------------------- correlation VbSC
  logic              corr_start, corr_busy, corr_done, corr_rwe;
  logic [KAW-1:0]    corr_kaddr;
  logic [BAW-1:0]    corr_va, corr_vb, corr_rra, corr_rwa;
  logic [NB*EW-1:0]  corr_vda, corr_vdb, corr_rrd, corr_rwd;

  assign corr_start = launch && corr_phase;

  vbsc #(
    .P(P), .NB(NB), .EW_IN(EW), .EW_OUT(EW), .ADD(1'b1),
    .KAW(KAW), .VAW(BAW), .RAW(BAW), .LENW(LENW)
  ) u_vbsc_corr (
    .clk, .rst_n, .start(corr_start), .busy(corr_busy), .done(corr_done),
    .cfg_list_base(job_list_base), .cfg_list_len(job_list_len),
    .cfg_in_base(BAW'(job_in_base)), .cfg_out_base(job_out_base), .cfg_init(job_init),
    .key_addr(corr_kaddr), .key_data(mk_d),
    .v_addr_a(corr_va), .v_addr_b(corr_vb), .v_data_a(corr_vda), .v_data_b(corr_vdb),
    .r_raddr(corr_rra), .r_rdata(corr_rrd), .r_we(corr_rwe), .r_waddr(corr_rwa), .r_wdata(corr_rwd)
  );

  // binary syndrome word widened to EW-bit elements
  function automatic logic [NB*EW-1:0] widen(input logic [NB-1:0] w);
    logic [NB*EW-1:0] r;
    for (int q = 0; q < NB; q++) r[q*EW +: EW] = EW'(w[q]);
    return r;
  endfunction

  // ---------------------------------------------------------------- syndrome weight, threshold
  logic            sw_start, sw_busy, sw_done;
  logic [XAW-1:0]  sw_ra;
  synw_unit #(.P(P), .NB(NB), .SAW(XAW)) u_synw (
    .clk, .rst_n, .start(sw_start), .busy(sw_busy), .done(sw_done),
    .s_raddr(sw_ra), .s_rdata(ms_da), .weight(synd_weight)
  );
  assign sw_start = launch && (phase == PH_SYNW);

  logic            th_start, th_busy, th_done;
  logic [EW-1:0]   thr;
  threshold_lut #(.NLUT(NLUT), .WW(WW), .BW(EW), .BMAX(M * DH)) u_th (
    .clk, .rst_n, .lut_we, .lut_addr, .lut_w, .lut_b,
    .start(th_start), .ws(synd_weight), .busy(th_busy), .done(th_done), .b(thr)
  );
  assign th_start = launch && (phase == PH_TH);

  // ---------------------------------------------------------------- error position search
  logic            ep_start, ep_busy, ep_done, ep_ewe, ep_pwe;
  logic [BAW-1:0]  ep_rra, ep_era, ep_ewa;
  logic [NB-1:0]   ep_ewd;
  logic [EPAW-1:0] ep_pwa;
  logic [PW-1:0]   ep_pwd;
  errpos_unit #(
    .P(P), .NB(NB), .N0(N0), .EW(EW), .VMAX(VMAX), .RHAW(BAW), .EAW(EPAW)
  ) u_errpos (
    .clk, .rst_n, .start(ep_start), .thr(thr), .busy(ep_busy), .done(ep_done),
    .rho_raddr(ep_rra), .rho_rdata(mr_d),
    .e_raddr(ep_era), .e_rdata(me_d), .e_we(ep_ewe), .e_waddr(ep_ewa), .e_wdata(ep_ewd),
    .ep_we(ep_pwe), .ep_waddr(ep_pwa), .ep_wdata(ep_pwd),
    .cnt(flip_cnt), .ovf(flip_ovf)
  );
  assign ep_start = launch && (phase == PH_ERRPOS);

  // ---------------------------------------------------------------- syndrome update SVbSC
  logic            su_start, su_busy, su_done, su_we;
  logic [KAW-1:0]  su_kaddr;
  logic [EPAW-1:0] su_eaddr;
  logic [XAW-1:0]  su_ra, su_wa;
  logic [NB-1:0]   su_wd;
  svbsc #(
    .P(P), .NB(NB), .VMAX(VMAX), .KAW(KAW), .EAW(EPAW), .SAW(XAW), .LENW(LENW)
  ) u_svbsc (
    .clk, .rst_n, .start(su_start), .busy(su_busy), .done(su_done),
    .cfg_a_base(job_list_base), .cfg_a_len(job_list_len),
    .cfg_v_base(EPAW'(job_in_base)), .cfg_v_len(job_v_len),
    .key_addr(su_kaddr), .key_data(mk_d),
    .ev_addr(su_eaddr), .ev_data(mep_d),
    .s_raddr(su_ra), .s_rdata(ms_da), .s_we(su_we), .s_waddr(su_wa), .s_wdata(su_wd)
  );
  assign su_start = launch && (phase == PH_SYNUPD);

  // ---------------------------------------------------------------- clearing of M_e
  // The dense error estimate is zeroed word by word right after start, while
  // the syndrome is being computed (which always takes longer).
  logic           clr_active;
  logic [BAW-1:0] clr_addr;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clr_active <= 1'b0;
      clr_addr   <= '0;
    end else if (start && !busy) begin
      clr_active <= 1'b1;
      clr_addr   <= '0;
    end else if (clr_active) begin
      clr_addr <= clr_addr + 1'b1;
      if (clr_addr == BAW'(N0 * H - 1)) clr_active <= 1'b0;
    end
  end

  // ---------------------------------------------------------------- port routing
  always_comb begin
    unit_done = 1'b0;
    case (phase)
      PH_SYN_QX, PH_SYN_HT,
      PH_UPD_QE, PH_UPD_HT:     unit_done = syn_done;
      PH_CORR_SIG, PH_CORR_RHO: unit_done = corr_done;
      PH_SYNW:                  unit_done = sw_done;
      PH_TH:                    unit_done = th_done;
      PH_ERRPOS:                unit_done = ep_done;
      PH_SYNUPD:                unit_done = su_done;
      default:                  unit_done = 1'b0;
    endcase
  end

  always_comb begin
    // key memory
    mk_ra = syn_kaddr;
    if (corr_phase)            mk_ra = corr_kaddr;
    if (phase == PH_SYNUPD)    mk_ra = su_kaddr;

    // M_x: input of Q_{i,n0-1} x
    mx_ra = XAW'(syn_va);
    mx_rb = XAW'(syn_vb);

    // M_t: output of Q x (or Q e), input of H t
    t_out = (phase == PH_SYN_QX) || (phase == PH_UPD_QE);
    mt_we = t_out && syn_rwe;
    mt_wa = syn_rwa;
    mt_wd = syn_rwd;
    mt_ra = t_out ? syn_rra : XAW'(syn_va);
    mt_rb = XAW'(syn_vb);

    // syndrome VbSC data inputs
    syn_vda = mt_da;
    syn_vdb = mt_db;
    if (phase == PH_SYN_QX) begin
      syn_vda = mx_da;
      syn_vdb = mx_db;
    end else if (phase == PH_UPD_QE) begin
      syn_vda = me_d;
      syn_vdb = me_db;
    end
    syn_rrd = t_out ? mt_da : ms_da;

    // M_s
    ms_we = 1'b0;
    ms_wa = syn_rwa;
    ms_wd = syn_rwd;
    ms_ra = syn_rra;
    ms_rb = corr_vb[XAW-1:0];
    case (phase)
      PH_SYN_HT, PH_UPD_HT: begin
        ms_we = syn_rwe;
      end
      PH_UPD_QE: begin
        ms_we = cp_we;
        ms_wa = cp_wa;
        ms_wd = ms0_d;
      end
      PH_SYNW: ms_ra = sw_ra;
      PH_CORR_SIG: ms_ra = corr_va[XAW-1:0];
      PH_SYNUPD: begin
        ms_we = su_we;
        ms_wa = su_wa;
        ms_wd = su_wd;
        ms_ra = su_ra;
      end
      default: ;
    endcase

    // M_sig: output of s * H_i^T, input of sigma_i * Q_{i,j}^T
    msg_we = (phase == PH_CORR_SIG) && corr_rwe;
    msg_wa = corr_rwa;
    msg_wd = corr_rwd;
    msg_ra = (phase == PH_CORR_SIG) ? corr_rra : corr_va;
    msg_rb = corr_vb;

    // M_rho: output of the counter computation, input of the search
    mr_we = (phase == PH_CORR_RHO) && corr_rwe;
    mr_wa = corr_rwa;
    mr_wd = corr_rwd;
    mr_ra = (phase == PH_CORR_RHO) ? corr_rra : ep_rra;

    // correlation VbSC data inputs
    corr_vda = (phase == PH_CORR_SIG) ? widen(ms_da) : msg_da;
    corr_vdb = (phase == PH_CORR_SIG) ? widen(ms_db) : msg_db;
    corr_rrd = (phase == PH_CORR_SIG) ? msg_da : mr_d;

    // M_e
    me_we = clr_active || ep_ewe;
    me_wa = clr_active ? clr_addr : ep_ewa;
    me_wd = clr_active ? '0 : ep_ewd;
    me_ra = e_raddr;
    if (phase == PH_ERRPOS) me_ra = ep_era;
    if (phase == PH_UPD_QE) me_ra = syn_va;
    me_rb = syn_vb;

    // M_ep
    mep_we = ep_pwe;
    mep_wa = ep_pwa;
    mep_wd = ep_pwd;
    mep_ra = su_eaddr;
  end

  // ---------------------------------------------------------------- checks
  // Both hold during reset too (every state is cleared), so they need no
  // disable condition.
  // The error estimate must be cleared before the first search writes it.
  a_clear_before_search : assert property (@(posedge clk)
    (phase == PH_ERRPOS) |-> !clr_active);
  // M_s is restored from M_s0 before the first H_i t update writes it.
  a_restore_before_update : assert property (@(posedge clk)
    (phase == PH_UPD_HT) |-> !cp_active && !cp_we);
  // Only one unit of the data path works at a time.
  a_one_unit : assert property (@(posedge clk)
    $onehot0({syn_busy, corr_busy, sw_busy, th_busy, ep_busy, su_busy}));

endmodule

// svbsc: Sparse Vector by Sparse Circulant multiplier (binary).
//
// Computes s ^= v * a over GF(2)[x]/(x^P - 1) where both v and a are given
// as position lists: for every pair (k_a, k_v) the bit (k_a + k_v) mod P of
// the dense vector s is toggled. In the decoder, a is a block L_j of the
// secret matrix and v the list of positions flipped in block j during the
// current iteration, so the unit applies the syndrome update in place.
//
// The v list (DV entries, at most VMAX) is first copied into a local
// register buffer, one entry per cycle. Then, for each entry of the a list,
// one cycle reads the position and, for each v entry, six cycles do:
// select v, add, subtract P, select the reduced sum (the modulo is split
// over two cycles), read the word of s, write the toggled word back.
// busy therefore lasts DV + DA + 6*DA*DV cycles, which is the cost model of
// the architecture this RTL follows; the exact cycle split is this design's
// own. done is asserted in the last busy cycle. A call with DA = 0 or DV = 0
// does nothing and ends one cycle after start.
//
// Ports: start pulse, configuration sampled at start, key memory read port
// (a list), flip-list read port (v list), read/write port of s. All
// memories have one cycle of read latency.
module svbsc #(
  parameter int unsigned P     = 14939,
  parameter int unsigned NB    = 32,
  parameter int unsigned VMAX  = 256,
  parameter int unsigned KAW   = 8,
  parameter int unsigned EAW   = 9,
  parameter int unsigned SAW   = 9,
  parameter int unsigned LENW  = 8,
  localparam int unsigned PW   = $clog2(P),
  localparam int unsigned DVW  = $clog2(VMAX + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              busy,
  output logic              done,
  input  logic [KAW-1:0]    cfg_a_base,
  input  logic [LENW-1:0]   cfg_a_len,
  input  logic [EAW-1:0]    cfg_v_base,
  input  logic [DVW-1:0]    cfg_v_len,
  output logic [KAW-1:0]    key_addr,
  input  logic [PW-1:0]     key_data,
  output logic [EAW-1:0]    ev_addr,
  input  logic [PW-1:0]     ev_data,
  output logic [SAW-1:0]    s_raddr,
  input  logic [NB-1:0]     s_rdata,
  output logic              s_we,
  output logic [SAW-1:0]    s_waddr,
  output logic [NB-1:0]     s_wdata
);
  localparam int unsigned LG = $clog2(NB);
  localparam int unsigned IXW = (VMAX > 1) ? $clog2(VMAX) : 1;

  typedef enum logic [3:0] {S_IDLE, S_LOADV, S_LA, S_SEL, S_ADD, S_SUB, S_MOD, S_RD, S_WR, S_END}
    state_e;
  state_e state;

  logic [KAW-1:0]  a_base;
  logic [LENW-1:0] a_len, ia;
  logic [EAW-1:0]  v_base;
  logic [DVW-1:0]  v_len, iv, ld_cnt;
  logic            ld_vld;
  logic [IXW-1:0]  ld_idx;
  logic [PW-1:0]   vbuf [VMAX];
  logic [PW-1:0]   a_reg, v_reg;
  logic [PW:0]     sum_q;
  logic [PW-1:0]   dif_q;
  logic [PW-1:0]   pos_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      a_base <= '0;
      a_len  <= '0;
      v_base <= '0;
      v_len  <= '0;
      ia     <= '0;
      iv     <= '0;
      ld_cnt <= '0;
      ld_vld <= 1'b0;
      ld_idx <= '0;
      a_reg  <= '0;
      v_reg  <= '0;
      sum_q  <= '0;
      dif_q  <= '0;
      pos_q  <= '0;
    end else begin
      // list copy: data of the read issued in the previous cycle
      ld_vld <= (state == S_LOADV);
      ld_idx <= IXW'(ld_cnt);

      case (state)
        S_IDLE: if (start) begin
          a_base <= cfg_a_base;
          a_len  <= cfg_a_len;
          v_base <= cfg_v_base;
          v_len  <= cfg_v_len;
          ia     <= '0;
          iv     <= '0;
          ld_cnt <= '0;
          state  <= (cfg_a_len == '0 || cfg_v_len == '0) ? S_END : S_LOADV;
        end
        S_LOADV: begin
          ld_cnt <= ld_cnt + 1'b1;
          if (ld_cnt == v_len - 1'b1) state <= S_LA;
        end
        S_LA: begin
          iv    <= '0;
          state <= S_SEL;
        end
        S_SEL: begin
          if (iv == '0) a_reg <= key_data;
          v_reg <= vbuf[IXW'(iv)];
          state <= S_ADD;
        end
        S_ADD: begin
          sum_q <= {1'b0, a_reg} + {1'b0, v_reg};
          state <= S_SUB;
        end
        S_SUB: begin
          dif_q <= PW'(sum_q - (PW + 1)'(P));  // only read when sum_q >= P
          state <= S_MOD;
        end
        S_MOD: begin
          pos_q <= (sum_q >= (PW + 1)'(P)) ? dif_q : sum_q[PW-1:0];
          state <= S_RD;
        end
        S_RD: state <= S_WR;
        S_WR: begin
          if (iv == v_len - 1'b1) begin
            if (ia == a_len - 1'b1) begin
              state <= S_IDLE;
            end else begin
              ia    <= ia + 1'b1;
              state <= S_LA;
            end
          end else begin
            iv    <= iv + 1'b1;
            state <= S_SEL;
          end
        end
        S_END:   state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // local copy of the v list (no reset: every entry is written before use)
  always_ff @(posedge clk) begin
    if (ld_vld) vbuf[ld_idx] <= ev_data;
  end

  logic [NB-1:0] bitmask;
  always_comb begin
    bitmask = '0;
    bitmask[pos_q[LG-1:0]] = 1'b1;
  end

  assign key_addr = a_base + KAW'(ia);
  assign ev_addr  = v_base + EAW'(ld_cnt);
  assign s_raddr  = SAW'(pos_q >> LG);
  assign s_waddr  = SAW'(pos_q >> LG);
  assign s_we     = (state == S_WR);
  assign s_wdata  = s_rdata ^ bitmask;

  assign busy = (state != S_IDLE);
  assign done = (state == S_END) ||
                ((state == S_WR) && (iv == v_len - 1'b1) && (ia == a_len - 1'b1));

endmodule

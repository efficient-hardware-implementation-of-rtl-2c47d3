// vbsc: Vector by Sparse Circulant multiplier.
//
// Computes r = sum_{k in S} rot(v, k), where rot(v, k)_q = v_{(q + k) mod P}
// and S is a list of LEN positions read from the key memory. Each rotated
// copy of v is a partial product; the result is built word by word in the
// output memory. In binary mode (ADD = 0) partial products are xor-ed, in
// integer mode (ADD = 1) they are added element by element (EW_OUT-bit
// elements, no saturation needed when EW_OUT covers the list length times
// the largest input value). With INIT set the first partial product
// overwrites the output vector, otherwise every partial product is
// accumulated onto what the output memory already holds.
//
// Vectors are H = ceil(P/NB) words of NB elements; the last word holds
// P - (H-1)*NB elements and zero padding. For output word j the unit needs
// input elements (k + j*NB) mod P onwards: it reads the two input rows r
// and r+1 (two read ports) and the collapse unit extracts NB elements at
// column offset c. Where the vector wraps around (rows H-2 and H-1) the
// window is spliced with a copy of row 0 that is read once per partial
// product, so the rotation is exact modulo P.
//
// Timing (all memories have one cycle of read latency):
//   per position: 1 cycle to read the position, 1 cycle to read row 0,
//   then 3 cycles per output word (read rows + output word, collapse,
//   write back). busy lasts exactly LEN*(3H + 2) cycles after start, and
//   done is asserted in the last of them. The counts follow the cost model
//   of the decoder architecture; the row-0 splice is this design's own way
//   of making the rotation exact for a prime P.
//
// Ports: start (1-cycle pulse, ignored while busy), configuration sampled at
// start (list base/length, input/output row offsets, init), key memory read
// port, two input read ports and one output read/write port.
module vbsc #(
  parameter int unsigned P      = 14939,
  parameter int unsigned NB     = 32,
  parameter int unsigned EW_IN  = 1,
  parameter int unsigned EW_OUT = 1,
  parameter bit          ADD    = 1'b0,  // 0: xor accumulate, 1: integer add
  parameter int unsigned KAW    = 8,     // key memory address width
  parameter int unsigned VAW    = 10,    // input memory address width
  parameter int unsigned RAW    = 10,    // output memory address width
  parameter int unsigned LENW   = 8,     // list length width
  localparam int unsigned PW    = $clog2(P)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  output logic                    busy,
  output logic                    done,
  // configuration, sampled at start
  input  logic [KAW-1:0]          cfg_list_base,
  input  logic [LENW-1:0]         cfg_list_len,
  input  logic [VAW-1:0]          cfg_in_base,
  input  logic [RAW-1:0]          cfg_out_base,
  input  logic                    cfg_init,
  // key (position list) memory
  output logic [KAW-1:0]          key_addr,
  input  logic [PW-1:0]           key_data,
  // input vector memory, two read ports
  output logic [VAW-1:0]          v_addr_a,
  output logic [VAW-1:0]          v_addr_b,
  input  logic [NB*EW_IN-1:0]     v_data_a,
  input  logic [NB*EW_IN-1:0]     v_data_b,
  // output vector memory
  output logic [RAW-1:0]          r_raddr,
  input  logic [NB*EW_OUT-1:0]    r_rdata,
  output logic                    r_we,
  output logic [RAW-1:0]          r_waddr,
  output logic [NB*EW_OUT-1:0]    r_wdata
);
  localparam int unsigned LG  = $clog2(NB);
  localparam int unsigned H   = (P + NB - 1) / NB;
  localparam int unsigned LB  = P - (H - 1) * NB;   // elements in the last word
  localparam int unsigned HW  = $clog2(H + 1);
  localparam int unsigned WI  = NB * EW_IN;

  typedef enum logic [2:0] {S_IDLE, S_POS, S_ROW0, S_W1, S_W2, S_W3} state_e;
  state_e state;

  logic [KAW-1:0]  list_base;
  logic [LENW-1:0] list_len, idx;
  logic [VAW-1:0]  in_base;
  logic [RAW-1:0]  out_base;
  logic            init;
  logic [HW-1:0]   j;
  logic [PW:0]     s_pos;          // start index of the current output word
  logic            first_word;     // W1 of word 0: row 0 data is on port A
  logic [(NB-LB)*EW_IN-1:0] row0;   // only the part of row 0 the splice uses
  logic [NB*EW_OUT-1:0] ext_q, acc_q;

  // row and column of the current start index
  logic [PW-LG:0]  row;
  logic [LG-1:0]   col;
  assign row = s_pos[PW:LG];
  assign col = s_pos[LG-1:0];

  // window assembly with the wrap-around splice
  logic [2*WI-1:0] win;
  always_comb begin
    if (row == (PW - LG + 1)'(H - 2)) begin
      win = {row0, v_data_b[LB*EW_IN-1:0], v_data_a};
    end else if (row == (PW - LG + 1)'(H - 1)) begin
      win = '0;
      win[(LB+NB)*EW_IN-1:0] = {v_data_b, v_data_a[LB*EW_IN-1:0]};
    end else begin
      win = {v_data_b, v_data_a};
    end
  end

  logic [WI-1:0] coll;
  collapse_unit #(.NB(NB), .EW(EW_IN)) u_collapse (
    .win  (win),
    .shift({1'b0, col}),
    .out  (coll)
  );

  // widen to the output element size and clear the padding of the last word
  logic [NB*EW_OUT-1:0] coll_w;
  always_comb begin
    for (int q = 0; q < NB; q++) begin
      coll_w[q*EW_OUT +: EW_OUT] = EW_OUT'(coll[q*EW_IN +: EW_IN]);
      if (j == HW'(H - 1) && q >= LB) coll_w[q*EW_OUT +: EW_OUT] = '0;
    end
  end

  // accumulation of the partial product onto the stored word
  logic [NB*EW_OUT-1:0] sum_w;
  always_comb begin
    for (int q = 0; q < NB; q++) begin
      if (ADD) sum_w[q*EW_OUT +: EW_OUT] = ext_q[q*EW_OUT +: EW_OUT] + acc_q[q*EW_OUT +: EW_OUT];
      else     sum_w[q*EW_OUT +: EW_OUT] = ext_q[q*EW_OUT +: EW_OUT] ^ acc_q[q*EW_OUT +: EW_OUT];
    end
  end

  logic overwrite;
  assign overwrite = init && (idx == '0);

  // next start index: advance by one word, modulo P
  logic [PW:0] s_next;
  always_comb begin
    s_next = s_pos + (PW + 1)'(NB);
    if (s_next >= (PW + 1)'(P)) s_next = s_next - (PW + 1)'(P);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      list_base  <= '0;
      list_len   <= '0;
      idx        <= '0;
      in_base    <= '0;
      out_base   <= '0;
      init       <= 1'b0;
      j          <= '0;
      s_pos      <= '0;
      first_word <= 1'b0;
      row0       <= '0;
      ext_q      <= '0;
      acc_q      <= '0;
    end else begin
      case (state)
        S_IDLE: if (start) begin
          list_base <= cfg_list_base;
          list_len  <= cfg_list_len;
          in_base   <= cfg_in_base;
          out_base  <= cfg_out_base;
          init      <= cfg_init;
          idx       <= '0;
          state     <= (cfg_list_len == '0) ? S_IDLE : S_POS;
        end
        S_POS:  state <= S_ROW0;
        S_ROW0: begin
          s_pos      <= {1'b0, key_data};
          j          <= '0;
          first_word <= 1'b1;
          state      <= S_W1;
        end
        S_W1: begin
          if (first_word) row0 <= v_data_a[(NB-LB)*EW_IN-1:0];
          first_word <= 1'b0;
          state      <= S_W2;
        end
        S_W2: begin
          ext_q <= coll_w;
          acc_q <= r_rdata;
          state <= S_W3;
        end
        S_W3: begin
          s_pos <= s_next;
          if (j == HW'(H - 1)) begin
            if (idx == list_len - 1'b1) begin
              state <= S_IDLE;
            end else begin
              idx   <= idx + 1'b1;
              state <= S_POS;
            end
          end else begin
            j     <= j + 1'b1;
            state <= S_W1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The row-0 copy is taken in W1 of word 0, one cycle after S_ROW0 issued
  // its read; the window of word 0 is used one cycle later, in W2.
  logic [VAW-1:0] row_a, row_b;
  assign row_a = in_base + VAW'(row);
  assign row_b = in_base + ((row == (PW - LG + 1)'(H - 1)) ? VAW'(0) : VAW'(row + 1'b1));

  always_comb begin
    key_addr = list_base + KAW'(idx);
    v_addr_a = row_a;
    v_addr_b = row_b;
    if (state == S_ROW0) v_addr_a = in_base;
    r_raddr  = out_base + RAW'(j);
    r_we     = (state == S_W3);
    r_waddr  = out_base + RAW'(j);
    r_wdata  = overwrite ? ext_q : sum_w;
  end

  assign busy = (state != S_IDLE);
  assign done = (state == S_W3) && (j == HW'(H - 1)) && (idx == list_len - 1'b1);

endmodule

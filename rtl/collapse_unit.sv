// collapse_unit: logarithmic funnel shifter of the VbSC multiplier.
//
// Takes a window of 2*NB elements (EW bits each, element 0 in the least
// significant bits) and returns the NB consecutive elements that start at
// element `shift`, i.e. out[q] = win[shift + q].
//
// The selection is a cascade of log2(NB)+1 two-input multiplexer levels.
// Level l (l = 0 .. log2(NB)-1) keeps either the lower or the upper part of
// its input, which is a rotation by 0 or NB/2^(l+1) elements, and shortens
// the vector by that amount: 2NB -> NB+NB/2 -> NB+NB/4 -> ... -> NB+1. A last
// level rotates by 0 or 1 and leaves NB elements. So shift may range over
// 0 .. NB: values below NB use the binary digits of shift on the first
// log2(NB) levels; shift = NB sets every level. This structure is the one of
// the LEDAcrypt decoder architecture this RTL follows; the encoding of the
// select signals is this implementation's own.
//
// Purely combinational.
module collapse_unit #(
  parameter int unsigned NB = 32,  // output elements (power of two, >= 2)
  parameter int unsigned EW = 1    // bits per element
) (
  input  logic [2*NB*EW-1:0]      win,
  input  logic [$clog2(NB):0]     shift,
  output logic [NB*EW-1:0]        out
);
  localparam int unsigned LG = $clog2(NB);

  // Per-level select bits and the final extra rotation.
  logic [LG-1:0] sel;
  logic          sel_last;

  always_comb begin
    if (shift[LG]) begin
      sel      = '1;
      sel_last = 1'b1;
    end else begin
      for (int l = 0; l < LG; l++) sel[l] = shift[LG-1-l];
      sel_last = 1'b0;
    end
  end

  // stage[l] holds the vector entering level l; its live width shrinks.
  logic [2*NB*EW-1:0] stage [LG+2];

  assign stage[0] = win;

  for (genvar l = 0; l < LG; l++) begin : g_level
    localparam int unsigned AMT = (NB >> (l + 1)) * EW;  // rotation in bits
    assign stage[l+1] = sel[l] ? (stage[l] >> AMT) : stage[l];
  end

  assign stage[LG+1] = sel_last ? (stage[LG] >> EW) : stage[LG];
  assign out = stage[LG+1][NB*EW-1:0];

endmodule

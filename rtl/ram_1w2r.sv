// ram_1w2r: synchronous memory with one write port and two read ports.
//
// Used for the dense vectors that the VbSC multiplier reads two rows at a
// time. Write: on the clock edge when we is high. Reads: the words at
// raddr_a and raddr_b appear on rdata_a and rdata_b one cycle later. A read
// of the address being written returns the old word. Contents are not reset.
module ram_1w2r #(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned W     = 32,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr_a,
  output logic [W-1:0]  rdata_a,
  input  logic [AW-1:0] raddr_b,
  output logic [W-1:0]  rdata_b
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata_a <= mem[raddr_a];
    rdata_b <= mem[raddr_b];
  end

endmodule

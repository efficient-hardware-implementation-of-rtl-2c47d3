// ram_1w1r: synchronous memory with one write port and one read port.
//
// Write: on the clock edge when we is high. Read: the word at raddr appears
// on rdata one cycle later (registered output, as in FPGA block RAM or an
// SRAM macro). A read of the address being written returns the old word.
// Contents are not reset.
module ram_1w1r #(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned W     = 32,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule

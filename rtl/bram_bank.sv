// bram_bank - one simple dual-port block RAM (one write port, one read port).
//
// Models a block RAM in its DEPTH x WIDTH mode (512x36 in the HDTV buffers).
// The write port stores wdata at waddr when we is high. The read port is
// synchronous: rdata shows the word at raddr one clock after raddr is
// presented. A read of the address being written in the same cycle returns
// the old word. The contents are not reset, as in a block RAM; every user
// writes a word before reading it.
module bram_bank #(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned WIDTH = 36
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [WIDTH-1:0]         rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule

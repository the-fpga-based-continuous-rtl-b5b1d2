// bbq_ram: simple dual-port RAM (one write port, one read port with a
// registered read, one clock of latency) holding 2^AW complex words. One
// instance is one frame buffer. Written as an array so synthesis maps it to
// block RAM or, at the full 2^18-word depth, to external memory.
module bbq_ram
  import bbq_pkg::*;
#(
  parameter int unsigned AW = 18
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  cplx_t         wdata,
  input  logic [AW-1:0] raddr,
  output cplx_t         rdata
);

  cplx_t mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule

// mem_bank: one register bank of the arithmetic/register unit (MEM1..MEM4).
//
// The node keeps intermediate results, state variables and host-supplied
// coefficients in four separate single-ported banks so that a multiply-add
// can make its four memory accesses (three reads, one write) in one cycle
// when they fall in different banks.  Each bank is 256 words of 32 bits,
// as in the document; being single-ported (one read or one write per
// cycle) follows the document's choice of separate banks over multi-ported
// arrays.
//
// Interface: en starts an access at addr; with we it writes wdata,
// otherwise rdata shows the word one clock later and holds it until the
// next read.  Contents are not reset; rdata resets to 0.
module mem_bank #(
  parameter int unsigned WORDS  = 256,
  parameter int unsigned WIDTH  = 32,
  localparam int unsigned AW    = $clog2(WORDS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (en && we) mem[addr] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          rdata <= '0;
    else if (en && !we)  rdata <= mem[addr];
  end

endmodule

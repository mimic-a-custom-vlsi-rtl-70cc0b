// dram_model: behavioural model of the node's commercial 256K x 4-bit DRAM,
// for simulation only.
//
// Multiplexed address: a clock with RAS low and CAS high latches the
// 9-bit row; each following clock with RAS and CAS low is a page-mode
// access to the 9-bit column: the addressed nibble is driven on dq_out
// during the clock, and if WE is low the nibble on dq_in is written at the
// clock's end (a read-modify-write within one clock).  No timing
// parameters, no refresh.  Contents start as 0.
module dram_model #(
  parameter int unsigned AW = 9
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          ras_n,
  input  logic          cas_n,
  input  logic          we_n,
  input  logic [3:0]    dq_in,
  output logic [3:0]    dq_out
);
  logic [3:0]    mem [1 << (2 * AW)];
  logic [AW-1:0] row = '0;

  initial for (int i = 0; i < (1 << (2 * AW)); i++) mem[i] = 4'h0;

  assign dq_out = (!ras_n && !cas_n) ? mem[{row, addr}] : 4'h0;

  always @(posedge clk) begin
    if (!ras_n && cas_n) row <= addr;
    if (!ras_n && !cas_n && !we_n) mem[{row, addr}] <= dq_in;
  end
endmodule

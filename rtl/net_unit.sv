// net_unit: network interface of a MIMIC node ("compiled routing").
//
// Each node has six bit-serial input links and six bit-serial output links
// to its neighbours in the mesh.  Because MIMIC programs have no branches,
// every packet's path and timing is fixed when the program is compiled, so
// the switch needs no headers and makes no decisions: a route table,
// loaded by the host, says for every clock of the sample period what each
// output link carries and which receivers listen.  A packet is one 32-bit
// word; a word passing through a node is delayed by one bit time (the
// registered output), as in the document.
//
// Per clock, from the route-table entry of the current period cycle:
//   out_sel[p] = 0       output p sends 0 (idle)
//              = 1..6    output p repeats input (out_sel-1), one clock later
//              = 7       output p sends the next bit (MSB first) of its
//                        transmit register, which the OBUS loaded earlier
//   rx_en[k]             input k shifts into receive register k, whose
//                        last 32 bits the IBUS can take
//   host_tap             input (host_tap-1) feeds the host interface
// Before the host has started a program (running low) a fixed boot route
// applies: input BOOT_IN is tapped by the host interface and repeated on
// output BOOT_OUT, so that host messages reach every node of a chain
// before any route table has been loaded.  The table, its encoding, MSB-first
// order and the boot route are this design's choices.
module net_unit
  import mimic_pkg::*;
#(
  parameter int unsigned DEPTH    = 512,
  parameter int unsigned BOOT_IN  = 0,
  parameter int unsigned BOOT_OUT = 1,
  localparam int unsigned AW      = $clog2(DEPTH)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // links
  input  logic [NPORTS-1:0]             net_in,
  output logic [NPORTS-1:0]             net_out,
  // timing from the sequencer
  input  logic [AW-1:0]                 cycle,
  input  logic                          running,
  // route-table writes from the host interface
  input  logic                          rt_we,
  input  logic [AW-1:0]                 rt_index,
  input  route_t                        rt_wdata,
  // OBUS side
  input  logic                          tx_load,
  input  logic [PORT_W-1:0]             tx_port,
  input  logic [WORD_W-1:0]             tx_word,
  // IBUS side
  output logic [NPORTS-1:0][WORD_W-1:0] rx_word,
  // host interface side
  output logic                          host_bit,
  output logic                          host_bit_valid,
  // activity
  output logic                          ev_through,
  output logic                          ev_tx
);

  route_t mem [DEPTH];
  route_t rt;
  logic [NPORTS-1:0][WORD_W-1:0] tx_sr;

  always_ff @(posedge clk) begin
    if (rt_we) mem[rt_index] <= rt_wdata;
  end

  always_comb begin
    if (running) begin
      rt = mem[cycle];
    end else begin
      rt = '0;
      rt.out_sel[BOOT_OUT] = 3'(BOOT_IN + 1);
      rt.host_tap          = 3'(BOOT_IN + 1);
    end
    host_bit_valid = (rt.host_tap != 3'd0) && (rt.host_tap <= 3'(NPORTS));
    host_bit       = host_bit_valid ? net_in[rt.host_tap - 3'd1] : 1'b0;
    ev_through = 1'b0;
    ev_tx      = 1'b0;
    for (int p = 0; p < NPORTS; p++) begin
      if (rt.out_sel[p] == SEL_LOCAL)                                ev_tx = 1'b1;
      else if (rt.out_sel[p] != SEL_IDLE && rt.out_sel[p] <= 3'(NPORTS)) ev_through = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      net_out <= '0;
      tx_sr   <= '0;
      rx_word <= '0;
    end else begin
      for (int p = 0; p < NPORTS; p++) begin
        if (rt.out_sel[p] == SEL_LOCAL) begin
          net_out[p] <= tx_sr[p][WORD_W-1];
          tx_sr[p]   <= {tx_sr[p][WORD_W-2:0], 1'b0};
        end else if (rt.out_sel[p] != SEL_IDLE && rt.out_sel[p] <= 3'(NPORTS)) begin
          net_out[p] <= net_in[rt.out_sel[p] - 3'd1];
        end else begin
          net_out[p] <= 1'b0;
        end
        if (rt.rx_en[p]) rx_word[p] <= {rx_word[p][WORD_W-2:0], net_in[p]};
      end
      // an OBUS load replaces a word not yet (or no longer) being sent
      if (tx_load && tx_port < 3'(NPORTS)) tx_sr[tx_port] <= tx_word;
    end
  end

endmodule

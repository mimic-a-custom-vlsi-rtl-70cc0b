// Testbench for net_unit.  Boot mode: input 0 must appear on output 1 one
// clock later and at the host tap.  Running: a route table (period 64)
// sends a loaded word out of port 2 MSB first, passes input 4 through to
// output 5 with one bit time of delay, receives a word on port 3 and taps
// port 0 for the host during a window; idle outputs must stay 0.  All
// expected bit streams are computed here from the same table.
module tb_net_unit;
  import mimic_pkg::*;
  import mimic_tb_pkg::*;

  localparam int DEPTH = 64;
  logic clk = 0, rst_n = 0;
  logic [NPORTS-1:0] net_in = 0, net_out;
  logic [5:0] cycle = 0;
  logic running = 0;
  logic rt_we = 0;
  logic [5:0] rt_index = 0;
  route_t rt_wdata = '0;
  logic tx_load = 0;
  logic [PORT_W-1:0] tx_port = 0;
  logic [WORD_W-1:0] tx_word = 0;
  logic [NPORTS-1:0][WORD_W-1:0] rx_word;
  logic host_bit, host_bit_valid, ev_through, ev_tx;

  net_unit #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  route_t tab [DEPTH];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %b exp %b at cycle %0d", what, got, exp, cycle); end
  endtask

  logic [31:0] word_tx, word_rx;
  logic prev_in4, prev_in0;
  int t;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // ---- boot mode
    prev_in0 = 0;
    for (int k = 0; k < 100; k++) begin
      @(negedge clk);
      net_in = NPORTS'($urandom);
      #1;
      chk(host_bit_valid, 1'b1, "boot tap valid");
      chk(host_bit, net_in[0], "boot tap bit");
      @(posedge clk); #1;
      chk(net_out[1], net_in[0], "boot forward");
      chk(net_out[0] | net_out[2] | net_out[3] | net_out[4] | net_out[5], 1'b0, "boot idle");
    end
    // ---- route table
    word_tx = $urandom;
    word_rx = $urandom;
    for (int c = 0; c < DEPTH; c++) begin
      tab[c] = '0;
      if (c >= 10 && c < 42) tab[c].out_sel[2] = SEL_LOCAL;
      if (c >= 5 && c < 60)  tab[c].out_sel[5] = 3'd5;     // input 4
      if (c >= 20 && c < 52) tab[c].rx_en[3] = 1'b1;
      if (c >= 30 && c < 40) tab[c].host_tap = 3'd1;       // input 0
      @(negedge clk); rt_we = 1; rt_index = 6'(c); rt_wdata = tab[c];
    end
    @(negedge clk); rt_we = 0;
    tx_load = 1; tx_port = 3'd2; tx_word = word_tx;
    @(negedge clk); tx_load = 0;
    cycle = 0; running = 1;
    prev_in4 = 0;
    for (int c = 0; c < DEPTH; c++) begin
      cycle = 6'(c);
      net_in = NPORTS'($urandom);
      if (c >= 20 && c < 52) net_in[3] = word_rx[31 - (c - 20)];
      #1;
      chk(host_bit_valid, (c >= 30 && c < 40), "tap window");
      if (c >= 30 && c < 40) chk(host_bit, net_in[0], "tap bit");
      prev_in4 = net_in[4];
      @(posedge clk); #1;
      chk(net_out[2], (c >= 10 && c < 42) ? word_tx[31 - (c - 10)] : 1'b0, "tx bit");
      chk(net_out[5], (c >= 5 && c < 60) ? prev_in4 : 1'b0, "through bit");
      chk(net_out[0] | net_out[1] | net_out[3] | net_out[4], 1'b0, "idle outputs");
      @(negedge clk);
    end
    checks++;
    if (rx_word[3] !== word_rx) begin failures++; $display("FAIL rx word %h exp %h", rx_word[3], word_rx); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

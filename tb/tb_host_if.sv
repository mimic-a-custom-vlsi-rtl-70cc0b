// Testbench for host_if.  Sends host messages bit by bit with random gaps
// (hbit_valid low) and checks: control-store, route, descriptor and
// period/run writes with the decoded fields; that messages for another
// node are ignored and broadcast ones taken; that staged coefficient writes
// stay in the buffer until HC_ACTIVATE and then drain, in order, only while
// drain_en is high; that a full buffer drops and flags the write; and that a
// DRAM write waits for dram_wready.
module tb_host_if;
  import mimic_pkg::*;
  import mimic_tb_pkg::*;

  localparam int ME = 5;
  logic clk = 0, rst_n = 0;
  logic [7:0] node_id = 8'(ME);
  logic hbit = 0, hbit_valid = 0, drain_en = 0;
  logic cs_we, rt_we, ctrl_we, ctrl_run, desc_we, dram_wvalid, coef_wvalid;
  logic [8:0] cs_index, rt_index;
  logic [1:0] cs_chunk, desc_field;
  logic [31:0] cs_wdata, desc_wdata;
  route_t rt_wdata;
  logic [15:0] ctrl_period;
  logic [DESC_AW-1:0] desc_idx;
  logic [SADDR_W-1:0] dram_waddr;
  logic [WORD_W-1:0] dram_wdata, coef_wdata;
  logic dram_wready = 0, coef_wready = 1;
  opnd_t coef_wdst;
  logic ev_msg, ev_overflow, ev_activate;

  host_if #(.COEF_DEPTH(4)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int n_cs = 0, n_rt = 0, n_ctrl = 0, n_desc = 0, n_over = 0, n_msg = 0;
  logic [31:0] last_cs, last_desc;
  logic [8:0]  last_cs_idx;
  logic [1:0]  last_chunk;
  logic [31:0] coef_seen [$];
  logic [9:0]  coef_dst_seen [$];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (cs_we)   begin n_cs++; last_cs = cs_wdata; last_cs_idx = cs_index; last_chunk = cs_chunk; end
    if (rt_we)   n_rt++;
    if (ctrl_we) n_ctrl++;
    if (desc_we) begin n_desc++; last_desc = desc_wdata; end
    if (ev_overflow) n_over++;
    if (ev_msg) n_msg++;
    if (coef_wvalid && coef_wready) begin
      coef_seen.push_back(coef_wdata);
      coef_dst_seen.push_back(coef_wdst);
      if (!drain_en) begin failures++; $display("FAIL drained while not enabled"); end
    end
  end

  task automatic send(input logic [63:0] m);
    logic [64:0] bits;
    bits = {1'b1, m};
    for (int k = 64; k >= 0; k--) begin
      while ($urandom_range(3, 0) == 0) begin
        @(negedge clk); hbit_valid = 0; hbit = $urandom;   // gap, bit ignored
      end
      @(negedge clk); hbit_valid = 1; hbit = bits[k];
    end
    @(negedge clk); hbit_valid = 1; hbit = 0;   // idle line
    repeat (3) @(negedge clk);
    hbit_valid = 0;
  endtask

  task automatic chk(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0d, expected %0d", what, got, exp); end
  endtask

  logic [31:0] cv [6];

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    send(hmsg(ME, HC_CS_WR, (37 << 2) | 2, 32'hCAFE_0001));
    chk(n_cs, 1, "cs writes");
    chk(last_cs, 32'hCAFE_0001, "cs data");
    chk(last_cs_idx, 37, "cs index");
    chk(last_chunk, 2, "cs chunk");
    send(hmsg(ME + 1, HC_CS_WR, 0, 32'h1));         // other node
    chk(n_cs, 1, "foreign message ignored");
    send(hmsg(8'hFF, HC_RT_WR, 9, 32'h0123_4567));   // broadcast
    chk(n_rt, 1, "broadcast route write");
    chk(rt_index, 9, "route index");
    chk(32'(rt_wdata), 32'h0123_4567 & ((1 << ROUTE_W) - 1), "route data");
    send(hmsg(ME, HC_DESC_WR, (7 << 2) | 1, 32'd1234));
    chk(n_desc, 1, "desc write");
    chk(desc_idx, 7, "desc idx");
    chk(desc_field, 1, "desc field");
    send(hmsg(ME, HC_CTRL, 0, 32'h0001_0190));
    chk(n_ctrl, 1, "ctrl write");
    chk(ctrl_run, 1, "run");
    chk(ctrl_period, 400, "period");
    // staged coefficients
    drain_en = 1;
    for (int k = 0; k < 3; k++) begin
      cv[k] = $urandom;
      send(hmsg(ME, HC_COEF, (k << 8) | (10 + k), cv[k]));
    end
    chk(coef_seen.size(), 0, "nothing drains before activate");
    drain_en = 0;
    send(hmsg(ME, HC_ACTIVATE, 0, 0));
    repeat (5) @(negedge clk);
    chk(coef_seen.size(), 0, "nothing drains while node busy");
    drain_en = 1;
    repeat (5) @(negedge clk);
    chk(coef_seen.size(), 3, "drained after activate");
    for (int k = 0; k < 3; k++) begin
      chk(coef_seen[k], cv[k], "coef data");
      chk(coef_dst_seen[k], (k << 8) | (10 + k), "coef destination");
    end
    // overflow: depth 4, send 5 without activate
    for (int k = 0; k < 5; k++) send(hmsg(ME, HC_COEF, k, $urandom));
    chk(n_over, 1, "buffer overflow flagged");
    send(hmsg(ME, HC_ACTIVATE, 0, 0));
    repeat (8) @(negedge clk);
    chk(coef_seen.size(), 7, "four more drained");
    // DRAM write waits for ready
    send(hmsg(ME, HC_DRAM_WR, 12345, 32'hABCD_EF01));
    chk(dram_wvalid, 1, "dram write pending");
    chk(dram_waddr, 12345, "dram address");
    chk(dram_wdata, 32'hABCD_EF01, "dram data");
    @(negedge clk); dram_wready = 1;
    @(negedge clk); dram_wready = 0;
    chk(dram_wvalid, 0, "dram write taken");
    chk(n_msg, 15, "messages accepted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

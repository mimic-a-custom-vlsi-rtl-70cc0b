// Testbench for table_unit with the DRAM model.  The host path fills a
// lookup table, a wave table and a delay line; the program path then runs
// delay-line, lookup and wave-table operations, and every result is
// compared with a reference kept here (circular buffers and index formula
// computed independently).  Each operation must keep busy high for
// exactly eleven clocks, the document's cost of one DRAM operation.  Then
// delay-line operations are started back to back whenever ready_next
// allows: a start must be taken every eleven clocks, and each result must
// be in y when y_valid rises.
module tb_table_unit;
  import mimic_pkg::*;
  import mimic_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  logic go = 0;
  logic [5:0] desc = 0;
  logic [31:0] x = 0, y;
  logic busy, ready_next, y_valid;
  logic desc_we = 0;
  logic [5:0] desc_idx = 0;
  logic [1:0] desc_field = 0;
  logic [31:0] desc_wdata = 0;
  logic hw_valid = 0, hw_ready;
  logic [14:0] hw_addr = 0;
  logic [31:0] hw_data = 0;
  logic [8:0] dram_addr;
  logic dram_ras_n, dram_cas_n, dram_we_n, dram_dq_oe, ev_op;
  logic [3:0] dram_dq_out, dram_dq_in;

  table_unit dut (.*);
  dram_model u_dram (.clk, .addr(dram_addr), .ras_n(dram_ras_n), .cas_n(dram_cas_n),
                     .we_n(dram_we_n), .dq_in(dram_dq_out), .dq_out(dram_dq_in));

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [31:0] shadow [32768];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    // back to back
    n_b2b = 1;
    for (int k = 0; k < 12; k++) begin
      @(negedge clk);
      for (int w = 0; w < 20 && !ready_next; w++) @(negedge clk);
      @(negedge clk);
      xv = $urandom;
      go = 1; desc = 6'd3; x = xv;
      exp_q.push_back(shadow[30000 + dptr]);
      shadow[30000 + dptr] = xv;
      dptr = (dptr + 1) % 7;
      @(negedge clk); go = 0;
    end
    for (int w = 0; w < 20 && busy; w++) @(negedge clk);
    repeat (2) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d results missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic set_desc(input int d, input int base, input int len, input int ptr,
                          input int mode, input int size);
    int v [4];
    v[0] = base; v[1] = len; v[2] = ptr; v[3] = (mode << 4) | size;
    for (int f = 0; f < 4; f++) begin
      @(negedge clk); desc_we = 1; desc_idx = 6'(d); desc_field = 2'(f); desc_wdata = v[f];
    end
    @(negedge clk); desc_we = 0;
  endtask

  task automatic host_write(input int a, input logic [31:0] d);
    @(negedge clk); hw_valid = 1; hw_addr = 15'(a); hw_data = d;
    @(posedge clk);
    while (!hw_ready) @(posedge clk);
    @(negedge clk); hw_valid = 0;
    shadow[a] = d;
    while (busy) @(negedge clk);
  endtask

  task automatic op(input int d, input logic [31:0] xv, input logic [31:0] exp_y);
    int n;
    @(negedge clk); go = 1; desc = 6'(d); x = xv;
    @(negedge clk); go = 0;
    n = 0;
    while (busy) begin n++; @(negedge clk); end
    checks++;
    if (n != 11) begin failures++; $display("FAIL op took %0d clocks", n); end
    checks++;
    if (y !== exp_y) begin failures++; $display("FAIL desc %0d y=%h exp %h", d, y, exp_y); end
  endtask

  // back-to-back results, checked when y_valid rises
  logic [31:0] exp_q [$];
  logic yv_q = 1'b1;
  int cyc = 0, last_start = -1, n_b2b = 0;
  always @(posedge clk) begin
    cyc++;
    yv_q <= y_valid;
    if (rst_n && y_valid && !yv_q && exp_q.size() != 0) begin
      checks++;
      if (y !== exp_q[0]) begin
        failures++;
        if (failures < 20) $display("FAIL back-to-back y=%h exp %h", y, exp_q[0]);
      end
      void'(exp_q.pop_front());
    end
    if (rst_n && ev_op && n_b2b > 0) begin
      if (last_start >= 0) begin
        checks++;
        if (cyc - last_start != 11) begin
          failures++;
          if (failures < 20) $display("FAIL starts %0d clocks apart", cyc - last_start);
        end
      end
      last_start = cyc;
    end
  end

  int dptr, wptr;
  logic [31:0] xv;
  int idx;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // lookup table: 16 entries at 1000, size 4
    set_desc(1, 1000, 16, 0, TM_LOOKUP, 4);
    for (int i = 0; i < 16; i++) host_write(1000 + i, $urandom);
    // wave table: 5 entries at 2000
    set_desc(2, 2000, 5, 0, TM_WAVE, 0);
    for (int i = 0; i < 5; i++) host_write(2000 + i, $urandom);
    // delay line: 7 samples at 30000, initially zero
    set_desc(3, 30000, 7, 0, TM_DELAY, 0);
    for (int i = 0; i < 7; i++) host_write(30000 + i, 32'h0);
    dptr = 0; wptr = 0;
    for (int k = 0; k < 60; k++) begin
      case (k % 3)
        0: begin
          xv = $urandom;
          op(3, xv, shadow[30000 + dptr]);
          shadow[30000 + dptr] = xv;
          dptr = (dptr + 1) % 7;
        end
        1: begin
          xv = $urandom;
          idx = int'((xv ^ 32'h8000_0000) >> 28);
          op(1, xv, shadow[1000 + idx]);
        end
        default: begin
          op(2, 32'h0, shadow[2000 + wptr]);
          wptr = (wptr + 1) % 5;
        end
      endcase
    end
    // back to back
    n_b2b = 1;
    for (int k = 0; k < 12; k++) begin
      @(negedge clk);
      for (int w = 0; w < 20 && !ready_next; w++) @(negedge clk);
      @(negedge clk);
      xv = $urandom;
      go = 1; desc = 6'd3; x = xv;
      exp_q.push_back(shadow[30000 + dptr]);
      shadow[30000 + dptr] = xv;
      dptr = (dptr + 1) % 7;
      @(negedge clk); go = 0;
    end
    for (int w = 0; w < 20 && busy; w++) @(negedge clk);
    repeat (2) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d results missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

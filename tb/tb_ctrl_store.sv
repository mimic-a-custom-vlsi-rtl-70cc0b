// Testbench for ctrl_store.  Loads a program in 32-bit chunks, starts it
// with a short sample period and checks that the instructions come out in
// order, once per period, starting on the period's first clock, with the
// AR unit's accept signal throttled at random; that "last" ends the
// program; that a program longer than the period raises ev_overrun and
// restarts; and that a new period takes effect only at the next wrap.
module tb_ctrl_store;
  import mimic_pkg::*;
  import mimic_tb_pkg::*;

  localparam int DEPTH = 64;
  logic clk = 0, rst_n = 0;
  logic cs_we = 0, ctrl_we = 0, ctrl_run = 0;
  logic [5:0]  cs_index = 0;
  logic [1:0]  cs_chunk = 0;
  logic [31:0] cs_wdata = 0;
  logic [15:0] ctrl_period = 0;
  instr_t instr;
  logic instr_valid, instr_accept;
  logic [15:0] cycle;
  logic running, frame_start, ev_overrun;

  ctrl_store #(.DEPTH(DEPTH), .PERIOD_DEF(400)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  instr_t prog [DEPTH];
  int plen;
  logic throttle = 0;
  int n_over = 0, n_issue = 0, expect_pc = 0, frames = 0;

  assign instr_accept = instr_valid && (!throttle || ($urandom_range(1, 0) == 1));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // instruction stream monitor
  always @(posedge clk) if (rst_n) begin
    if (ev_overrun) n_over++;
    if (frame_start) begin
      frames++;
      checks++;
      if (cycle != 0) begin failures++; $display("FAIL frame_start at cycle %0d", cycle); end
      expect_pc = 0;
    end
    if (instr_valid && instr_accept) begin
      checks++;
      if (instr !== prog[expect_pc]) begin
        failures++; $display("FAIL instr %0d", expect_pc);
      end
      expect_pc++;
      n_issue++;
    end
  end

  task automatic load(input int n);
    logic [95:0] w;
    for (int k = 0; k < n; k++) begin
      prog[k] = instr_t'($urandom) ^ {$urandom, $urandom, $urandom};
      prog[k].last = (k == n - 1);
      w = 96'(prog[k]);
      for (int ch = 0; ch < 3; ch++) begin
        @(negedge clk); cs_we = 1; cs_index = 6'(k); cs_chunk = 2'(ch); cs_wdata = w[32*ch +: 32];
      end
    end
    @(negedge clk); cs_we = 0;
    plen = n;
  endtask

  task automatic ctrl(input logic run, input int period);
    @(negedge clk); ctrl_we = 1; ctrl_run = run; ctrl_period = 16'(period);
    @(negedge clk); ctrl_we = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    load(10);
    ctrl(1, 30);
    // wait for the running period to wrap
    wait (running);
    n_issue = 0; frames = 0;
    repeat (30 * 5) @(posedge clk);
    checks++;
    if (n_issue != 50) begin failures++; $display("FAIL issued %0d, expected 50", n_issue); end
    // throttled accept: still one program per period
    throttle = 1; n_issue = 0;
    @(posedge frame_start);
    repeat (30 * 4) @(posedge clk);
    checks++;
    if (n_issue != 40) begin failures++; $display("FAIL throttled issued %0d", n_issue); end
    throttle = 0;
    // new period takes effect at the wrap: measure the period length
    ctrl(1, 12);
    @(posedge frame_start);
    @(posedge frame_start);
    begin
      int t0, t1;
      t0 = $time;
      @(posedge frame_start);
      t1 = $time;
      checks++;
      if ((t1 - t0) / 10 != 12) begin failures++; $display("FAIL period %0d", (t1 - t0) / 10); end
    end
    // overrun: 10-instruction program, 12-clock period, throttled accept
    n_over = 0;
    throttle = 1;
    repeat (12 * 10) @(posedge clk);
    throttle = 0;
    checks++;
    if (n_over == 0) begin failures++; $display("FAIL no overrun"); end
    // stop
    ctrl(0, 12);
    repeat (30) @(posedge clk);
    checks++;
    if (running || instr_valid) begin failures++; $display("FAIL did not stop"); end
    $display("overruns=%0d", n_over);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

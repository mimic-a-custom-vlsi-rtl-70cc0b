// Testbench for one mimic_node with its DRAM model, at the default sizes.
// The testbench is the host on the node's input 0 (boot route).  It loads
// the program, route table, table descriptors, DRAM contents and
// coefficients, starts the node and checks, period by period against a
// reference computed here, the word the node sends on output 1 in clocks
// 100..131: per sample, a wave-table read gives x; the two-delay resonator
// u' = x + a*v, v' = u + b*v, out = G*v; a 5-sample DRAM delay line and a
// 16-entry lookup on out; s = delayed + lookup/2.  While running, the host
// sends only in clocks 140..399: a new G staged and activated, and a burst
// that overflows the staging buffer.  Bank-conflict stalls, forwarding,
// table waits and all three table operations must each occur.
module tb_mimic_node;
  import mimic_pkg::*;
  import mimic_tb_pkg::*;

  localparam int PER = 400;

  logic clk = 0, rst_n = 0;
  logic [7:0] node_id = 8'd0;
  logic [NPORTS-1:0] net_in, net_out;
  logic [DRAM_AW-1:0] dram_addr;
  logic dram_ras_n, dram_cas_n, dram_we_n, dram_dq_oe;
  logic [3:0] dram_dq_out, dram_dq_in;

  mimic_node dut (.*);

  dram_model u_dram (.clk, .addr(dram_addr), .ras_n(dram_ras_n), .cas_n(dram_cas_n),
                     .we_n(dram_we_n), .dq_in(dram_dq_out), .dq_out(dram_dq_in));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ------------------------------------------------------------ probes
  wire        run0    = dut.running;
  wire [15:0] cyc0    = dut.cycle;
  wire        fs0     = dut.frame_start;
  wire        conf0   = dut.ev_conflict;
  wire        fwd0    = dut.ev_forward;
  wire        tbop0   = dut.ev_tblop;
  wire        twait0  = dut.instr_valid &&
                        ((dut.instr.tbl_go && !dut.u_ar.tbl_ok) ||
                         (dut.instr.ib_src == IB_TABLE && !dut.u_ar.ib_ok));
  wire        tx0     = dut.ev_tx;
  wire        act0    = dut.ev_activate;
  wire        ovf0    = dut.ev_overflow;
  wire        ovr0    = dut.ev_overrun;

  int n_conf = 0, n_fwd = 0, n_tbop = 0, n_twait = 0, n_tx = 0;
  int n_act = 0, n_ovf = 0, n_ovr = 0, n_switch = 0;
  logic run0_q = 0;

  always @(posedge clk) if (rst_n) begin
    if (conf0) n_conf++;
    if (fwd0) n_fwd++;
    if (tbop0) n_tbop++;
    if (twait0) n_twait++;
    if (tx0 && run0) n_tx++;
    if (act0) n_act++;
    if (ovf0) n_ovf++;
    if (ovr0) n_ovr++;
    if (run0 && !run0_q) n_switch++;
    run0_q <= run0;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ host
  int host_lo = 140, host_hi = 399;

  task automatic send(input logic [63:0] m);
    logic [64:0] bits;
    bits = {1'b1, m};
    for (int k = 64; k >= 0; k--) begin
      @(negedge clk);
      while (run0 && (cyc0 < 16'(host_lo) || cyc0 > 16'(host_hi))) begin
        net_in[0] = 1'b0;
        @(negedge clk);
      end
      net_in[0] = bits[k];
    end
    @(negedge clk);
    net_in[0] = 1'b0;
  endtask

  task automatic load_prog(input int node, input instr_t p [$]);
    logic [95:0] w;
    foreach (p[k]) begin
      w = 96'(p[k]);
      for (int ch = 0; ch < 3; ch++)
        send(hmsg(node, HC_CS_WR, (k << 2) | ch, w[32*ch +: 32]));
    end
  endtask

  task automatic coef(input int node, input int b, input int a, input logic [31:0] v);
    send(hmsg(node, HC_COEF, (b << 8) | a, v));
  endtask

  task automatic desc(input int node, input int d, input int base, input int len,
                      input int mode, input int size);
    send(hmsg(node, HC_DESC_WR, (d << 2) | 0, base));
    send(hmsg(node, HC_DESC_WR, (d << 2) | 1, len));
    send(hmsg(node, HC_DESC_WR, (d << 2) | 2, 0));
    send(hmsg(node, HC_DESC_WR, (d << 2) | 3, (mode << 4) | size));
  endtask

  // ------------------------------------------------------------ model
  localparam int WL = 7, DL = 5, TL = 16;
  logic [31:0] wave [WL];
  logic [31:0] tabl [TL];
  logic [31:0] dline [DL];
  logic [31:0] ca, cb, cg, cg_new;
  logic [31:0] u, v;
  int wp = 0, dp = 0;
  int frame = -1, act_frame = 1 << 30;
  logic [31:0] exp_s [$];     // node 0 output, this period
  localparam logic [31:0] HALF = 32'h4000_0000;

  task automatic model_frame();
    logic [31:0] x, out, tmpv, dl, lk, s, g;
    g    = (frame > act_frame) ? cg_new : cg;
    x    = wave[wp]; wp = (wp + 1) % WL;
    out  = ref_madd(32'h0, g, v);
    tmpv = ref_madd(u, cb, v);
    u    = ref_madd(x, ca, v);
    v    = ref_madd(tmpv, 32'h0, 32'h0);
    dl   = dline[dp]; dline[dp] = out; dp = (dp + 1) % DL;
    lk   = tabl[(out ^ 32'h8000_0000) >> 28];
    s    = ref_madd(dl, lk, HALF);
    exp_s.push_back(s);
  endtask

  always @(posedge clk) if (rst_n && run0 && fs0) begin
    frame++;
    model_frame();
  end
  always @(posedge clk) if (rst_n && act0 && run0) act_frame = frame;

  // ------------------------------------------------------------ capture
  logic [31:0] w0;
  int n_s = 0;
  always @(posedge clk) if (rst_n && run0) begin
    if (cyc0 >= 101 && cyc0 <= 132) w0 = {w0[30:0], net_out[1]};
    if (cyc0 == 132) begin
      checks++; n_s++;
      if (exp_s.size() == 0 || w0 !== exp_s[0]) begin
        failures++; $display("FAIL frame %0d node0 sent %h exp %h", frame, w0, exp_s.size() ? exp_s[0] : 0);
      end
      if (exp_s.size()) void'(exp_s.pop_front());
    end
  end

  // ------------------------------------------------------------ program
  instr_t p0 [$];
  instr_t t;
  route_t r;

  task automatic need(input string what, input int n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never seen: %s", what); end
    $display("  %-28s %0d", what, n);
  endtask

  initial begin
    net_in = '0;
    for (int i = 0; i < WL; i++) wave[i] = 32'($signed($urandom) >>> 2);
    for (int i = 0; i < TL; i++) tabl[i] = $urandom;
    for (int i = 0; i < DL; i++) dline[i] = 32'h0;
    ca = q31(-0.5); cb = q31(0.9); cg = q31(0.75); cg_new = q31(-0.3);
    u = 0; v = 0;

    // node 0: wave desc 0, delay desc 1, lookup desc 2
    t = i_nop(); t.tbl_go = 1; t.tbl_desc = 0;                          p0.push_back(t); // I0 wave
    p0.push_back(i_madd(op(1, 2), op(3, 0), op(0, 2), op(2, 1)));       // I1 out = G*v
    p0.push_back(i_madd(op(0, 3), op(3, 1), op(1, 1), op(2, 1)));       // I2 tmpv = u + b*v
    t = i_nop(); t.ib_src = IB_TABLE; t.ib_dst = op(3, 2);              p0.push_back(t); // I3 x
    p0.push_back(i_madd(op(3, 1), op(3, 2), op(0, 1), op(2, 1)));       // I4 u = x + a*v
    p0.push_back(i_madd(op(2, 1), op(0, 3), op(0, 0), op(2, 0)));       // I5 v = tmpv (bank conflict)
    t = i_nop(); t.tbl_go = 1; t.tbl_desc = 1; t.ob_dst = OB_TABLE; t.ob_src = op(1, 2);
    p0.push_back(t);                                                    // I6 delay(out)
    t = i_nop(); t.ib_src = IB_TABLE; t.ib_dst = op(2, 3);              p0.push_back(t); // I7
    t = i_nop(); t.tbl_go = 1; t.tbl_desc = 2; t.ob_dst = OB_TABLE; t.ob_src = op(1, 2);
    p0.push_back(t);                                                    // I8 lookup(out)
    t = i_nop(); t.ib_src = IB_TABLE; t.ib_dst = op(1, 3);              p0.push_back(t); // I9
    p0.push_back(i_madd(op(0, 4), op(2, 3), op(1, 3), op(3, 3)));       // I10 s
    t = i_nop(); t.ob_dst = OB_NET; t.ob_port = 3'd1; t.ob_src = op(0, 4); t.last = 1;
    p0.push_back(t);                                                    // I11 send s
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);

    load_prog(0, p0);
    // route table
    for (int c = 0; c < PER; c++) begin
      r = '0;
      if (c >= 140) begin r.host_tap = 3'd1; r.out_sel[1] = 3'd1; end
      send(hmsg(0, HC_RT_WR, c, 32'(r)));
    end
    for (int c = 100; c < 132; c++) begin
      r = '0; r.out_sel[1] = SEL_LOCAL;
      send(hmsg(0, HC_RT_WR, c, 32'(r)));
    end
    // table set-up and DRAM contents of node 0
    desc(0, 0, 100, WL, TM_WAVE, 0);
    desc(0, 1, 200, DL, TM_DELAY, 0);
    desc(0, 2, 300, TL, TM_LOOKUP, 4);
    for (int i = 0; i < WL; i++) send(hmsg(0, HC_DRAM_WR, 100 + i, wave[i]));
    for (int i = 0; i < DL; i++) send(hmsg(0, HC_DRAM_WR, 200 + i, 32'h0));
    for (int i = 0; i < TL; i++) send(hmsg(0, HC_DRAM_WR, 300 + i, tabl[i]));
    // coefficients and state
    for (int b = 0; b < 4; b++) coef(0, b, 0, 32'h0);
    coef(0, 0, 1, ca); coef(0, 1, 1, cb); coef(0, 0, 2, cg); coef(0, 3, 3, HALF);
    coef(0, 3, 1, 32'h0); coef(0, 2, 1, 32'h0);
    send(hmsg(0, HC_ACTIVATE, 0, 0));
    // start at a known point of the period
    @(negedge clk);
    while (cyc0 != 16'd10) @(negedge clk);
    send(hmsg(0, HC_CTRL, 0, 32'h0001_0000 | PER));
    wait (run0);
    // run a few periods, then change G through the double buffer
    repeat (6 * PER) @(negedge clk);
    coef(0, 0, 2, cg_new);
    repeat (2 * PER) @(negedge clk);
    checks++;
    if (n_s < 6 || exp_s.size() > 1) begin failures++; $display("FAIL staged G used early"); end
    send(hmsg(0, HC_ACTIVATE, 0, 0));
    repeat (4 * PER) @(negedge clk);
    // overflow the staging buffer with writes to unused words
    for (int k = 0; k < 17; k++) coef(0, 3, 200 + k, 32'(k));
    send(hmsg(0, HC_ACTIVATE, 0, 0));
    repeat (6 * PER) @(negedge clk);

    $display("periods checked: %0d", n_s);
    need("bank conflict stalls", n_conf);
    need("forwarded operands", n_fwd);
    need("table-unit waits", n_twait);
    need("table operations", n_tbop);
    need("local transmit bits", n_tx);
    need("coefficient activations", n_act);
    need("staging overflows", n_ovf);
    need("boot-to-run switches", n_switch);
    checks++;
    if (n_ovr != 0) begin failures++; $display("FAIL period overrun"); end
    checks++;
    if (n_s < 15) begin failures++; $display("FAIL too few periods"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

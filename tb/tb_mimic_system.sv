// End-to-end testbench for mimic_system at its default size (3 x 3 x 3
// nodes, 400-clock sample period).  It plays the host on the serial line
// into node 0's -x face and uses the first row of the mesh (nodes 0, 1, 2):
//
//   boot     all set-up goes over the boot route (each node repeats input 0
//            on output 1): programs, route tables (common entries by
//            broadcast), table descriptors, DRAM contents, coefficients,
//            then a broadcast "run".
//   node 0   per sample: a wave-table read gives the excitation x; the
//            two-delay resonator of the document's resonator figure
//            (u' = x + a*v, v' = u + b*v, out = G*v); a DRAM delay line of
//            5 samples and a 16-entry table lookup on out; s = delayed +
//            lookup/2.  s is sent on output 1 in clocks 100..131.
//   node 1   receives s in clocks 101..132, and in the next period
//            computes r = g2*s and sends it on output 1 in clocks 60..91.
//   node 2   passes that word through from input 0 to output 1.
//   host     while running, sends messages only in clocks 140..397 of the
//            period (the chain's free slots; node k taps them k clocks later): a change of G, activated by
//            one control word, and a burst that overflows the staging
//            buffer.
// Words are checked on the links against a reference computed here.  Every
// mechanism must occur at least once: bank-conflict stall, forwarding,
// table-unit wait, delay/lookup/wave operations, pass-through routing,
// local transmit, double-buffer activation, buffer overflow and the switch
// from boot to running.
module tb_mimic_system;
  import mimic_pkg::*;
  import mimic_tb_pkg::*;

  localparam int N = 27;
  localparam int PER = 400;

  logic clk = 0, rst_n = 0;
  logic [N-1:0][NPORTS-1:0] ext_in, ext_out;
  logic [N-1:0][DRAM_AW-1:0] dram_addr;
  logic [N-1:0] dram_ras_n, dram_cas_n, dram_we_n, dram_dq_oe;
  logic [N-1:0][3:0] dram_dq_out, dram_dq_in;

  mimic_system dut (.*);

  for (genvar g = 0; g < N; g++) begin : g_dram
    dram_model u_dram (.clk, .addr(dram_addr[g]), .ras_n(dram_ras_n[g]), .cas_n(dram_cas_n[g]),
                       .we_n(dram_we_n[g]), .dq_in(dram_dq_out[g]), .dq_out(dram_dq_in[g]));
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ------------------------------------------------------------ probes
  wire        run0    = dut.g_z[0].g_y[0].g_x[0].u_node.running;
  wire [15:0] cyc0    = dut.g_z[0].g_y[0].g_x[0].u_node.cycle;
  wire        fs0     = dut.g_z[0].g_y[0].g_x[0].u_node.frame_start;
  wire        conf0   = dut.g_z[0].g_y[0].g_x[0].u_node.ev_conflict;
  wire        fwd0    = dut.g_z[0].g_y[0].g_x[0].u_node.ev_forward;
  wire        fwd1    = dut.g_z[0].g_y[0].g_x[1].u_node.ev_forward;
  wire        tbop0   = dut.g_z[0].g_y[0].g_x[0].u_node.ev_tblop;
  wire        twait0  = dut.g_z[0].g_y[0].g_x[0].u_node.instr_valid &&
                        ((dut.g_z[0].g_y[0].g_x[0].u_node.instr.tbl_go &&
                          !dut.g_z[0].g_y[0].g_x[0].u_node.u_ar.tbl_ok) ||
                         (dut.g_z[0].g_y[0].g_x[0].u_node.instr.ib_src == IB_TABLE &&
                          !dut.g_z[0].g_y[0].g_x[0].u_node.u_ar.ib_ok));
  wire        thru2   = dut.g_z[0].g_y[0].g_x[2].u_node.ev_through && run0;
  wire        tx0     = dut.g_z[0].g_y[0].g_x[0].u_node.ev_tx;
  wire        act0    = dut.g_z[0].g_y[0].g_x[0].u_node.ev_activate;
  wire        ovf0    = dut.g_z[0].g_y[0].g_x[0].u_node.ev_overflow;
  wire        ovr0    = dut.g_z[0].g_y[0].g_x[0].u_node.ev_overrun;
  wire        run1    = dut.g_z[0].g_y[0].g_x[1].u_node.running;
  wire        run2    = dut.g_z[0].g_y[0].g_x[2].u_node.running;

  int n_conf = 0, n_fwd = 0, n_tbop = 0, n_twait = 0, n_thru = 0, n_tx = 0;
  int n_act = 0, n_ovf = 0, n_ovr = 0, n_switch = 0;
  logic run0_q = 0;

  always @(posedge clk) if (rst_n) begin
    if (conf0) n_conf++;
    if (fwd0 || fwd1) n_fwd++;
    if (tbop0) n_tbop++;
    if (twait0) n_twait++;
    if (thru2) n_thru++;
    if (tx0 && run0) n_tx++;
    if (act0) n_act++;
    if (ovf0) n_ovf++;
    if (ovr0) n_ovr++;
    if (run0 && !run0_q) n_switch++;
    run0_q <= run0;
    checks++;
    if (run0 != run1 || run0 != run2) begin
      failures++; $display("FAIL nodes not started together");
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ host
  int host_lo = 140, host_hi = 397;

  task automatic send(input logic [63:0] m);
    logic [64:0] bits;
    bits = {1'b1, m};
    for (int k = 64; k >= 0; k--) begin
      @(negedge clk);
      while (run0 && (cyc0 < 16'(host_lo) || cyc0 > 16'(host_hi))) begin
        ext_in[0][0] = 1'b0;
        @(negedge clk);
      end
      ext_in[0][0] = bits[k];
    end
    @(negedge clk);
    ext_in[0][0] = 1'b0;
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
  logic [31:0] ca, cb, cg, cg_new, g2;
  logic [31:0] u, v;
  int wp = 0, dp = 0;
  int frame = -1, act_frame = 1 << 30;
  logic [31:0] exp_s [$];     // node 0 output, this period
  logic [31:0] exp_r [$];     // node 2 output, next period
  logic [31:0] s_prev = 0;
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
    exp_r.push_back(ref_madd(32'h0, s_prev, g2));
    s_prev = s;
  endtask

  always @(posedge clk) if (rst_n && run0 && fs0) begin
    frame++;
    model_frame();
  end
  always @(posedge clk) if (rst_n && act0 && run0) act_frame = frame;

  // ------------------------------------------------------------ capture
  logic [31:0] w0, w2;
  int n_s = 0, n_r = 0;
  always @(posedge clk) if (rst_n && run0) begin
    if (cyc0 >= 101 && cyc0 <= 132) w0 = {w0[30:0], ext_out[0][1]};
    if (cyc0 == 132) begin
      checks++; n_s++;
      if (exp_s.size() == 0 || w0 !== exp_s[0]) begin
        failures++; $display("FAIL frame %0d node0 sent %h exp %h", frame, w0, exp_s.size() ? exp_s[0] : 0);
      end
      if (exp_s.size()) void'(exp_s.pop_front());
    end
    if (cyc0 >= 62 && cyc0 <= 93) w2 = {w2[30:0], ext_out[2][1]};
    if (cyc0 == 93) begin
      checks++; n_r++;
      if (exp_r.size() == 0 || w2 !== exp_r[0]) begin
        failures++; $display("FAIL frame %0d node2 passed %h exp %h", frame, w2, exp_r.size() ? exp_r[0] : 0);
      end
      if (exp_r.size()) void'(exp_r.pop_front());
    end
  end

  // ------------------------------------------------------------ program
  instr_t p0 [$], p1 [$], p2 [$];
  instr_t t;
  route_t r;

  task automatic need(input string what, input int n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never seen: %s", what); end
    $display("  %-28s %0d", what, n);
  endtask

  initial begin
    ext_in = '0;
    for (int i = 0; i < WL; i++) wave[i] = 32'($signed($urandom) >>> 2);
    for (int i = 0; i < TL; i++) tabl[i] = $urandom;
    for (int i = 0; i < DL; i++) dline[i] = 32'h0;
    ca = q31(-0.5); cb = q31(0.9); cg = q31(0.75); cg_new = q31(-0.3); g2 = q31(0.6);
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
    // node 1
    t = i_nop(); t.ib_src = IB_NET; t.ib_port = 3'd0; t.ib_dst = op(0, 5); p1.push_back(t);
    p1.push_back(i_madd(op(2, 5), op(3, 0), op(0, 5), op(1, 5)));
    t = i_nop(); t.ob_dst = OB_NET; t.ob_port = 3'd1; t.ob_src = op(2, 5); t.last = 1;
    p1.push_back(t);
    // node 2: nothing to compute
    t = i_nop(); t.last = 1; p2.push_back(t);

    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);

    load_prog(0, p0);
    load_prog(1, p1);
    load_prog(2, p2);
    // routes: common entries by broadcast, then per-node ones
    for (int c = 0; c < PER; c++) begin
      r = '0;
      if (c >= 140) begin r.host_tap = 3'd1; r.out_sel[1] = 3'd1; end
      send(hmsg(NODE_BCAST, HC_RT_WR, c, 32'(r)));
    end
    // a node k hops down the chain hears the host k clocks late: close
    // each node's tap window to exactly the clocks the host's bits pass it
    send(hmsg(0, HC_RT_WR, 398, 32'h0));
    send(hmsg(0, HC_RT_WR, 399, 32'h0));
    send(hmsg(1, HC_RT_WR, 140, 32'h0));
    send(hmsg(1, HC_RT_WR, 399, 32'h0));
    send(hmsg(2, HC_RT_WR, 140, 32'h0));
    send(hmsg(2, HC_RT_WR, 141, 32'h0));
    for (int c = 100; c < 132; c++) begin
      r = '0; r.out_sel[1] = SEL_LOCAL;
      send(hmsg(0, HC_RT_WR, c, 32'(r)));
    end
    for (int c = 60; c < 133; c++) begin
      r = '0;
      if (c >= 101) r.rx_en[0] = 1'b1;
      if (c < 92) r.out_sel[1] = SEL_LOCAL;
      if (c < 92 || c >= 101) send(hmsg(1, HC_RT_WR, c, 32'(r)));
    end
    for (int c = 61; c < 93; c++) begin
      r = '0; r.out_sel[1] = 3'd1;
      send(hmsg(2, HC_RT_WR, c, 32'(r)));
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
    coef(1, 3, 0, 32'h0); coef(1, 1, 5, g2);
    send(hmsg(NODE_BCAST, HC_ACTIVATE, 0, 0));
    // start all nodes of the row at the same period boundary
    @(negedge clk);
    while (cyc0 != 16'd10) @(negedge clk);
    send(hmsg(NODE_BCAST, HC_CTRL, 0, 32'h0001_0000 | PER));
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

    $display("periods checked: node0 %0d, node2 %0d", n_s, n_r);
    need("bank conflict stalls", n_conf);
    need("forwarded operands", n_fwd);
    need("table-unit waits", n_twait);
    need("table operations", n_tbop);
    need("pass-through bits", n_thru);
    need("local transmit bits", n_tx);
    need("coefficient activations", n_act);
    need("staging overflows", n_ovf);
    need("boot-to-run switches", n_switch);
    checks++;
    if (n_ovr != 0) begin failures++; $display("FAIL period overrun"); end
    checks++;
    if (n_s < 15 || n_r < 15) begin failures++; $display("FAIL too few periods"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

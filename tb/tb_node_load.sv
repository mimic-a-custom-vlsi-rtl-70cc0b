// Load testbench: one mimic_node at its default sizes (400-clock period)
// carrying the per-node, per-sample load of a small synthesis machine:
// 30 delay-line operations, 10 words received and 10 words sent on the
// links, one host coefficient update (a staged write and its activation
// word) and as many multiply-adds as fit besides.
//
// The program has NI instructions, every one a multiply-add.  Its bank
// placement keeps the banks conflict-free: the three reads of instruction i
// avoid the bank that the write-back of instruction i-2 uses, so every
// multiply-add alone issues in one clock.  The IBUS writes (30 table
// results, 10 received words) each need one more bank slot, and so cost a
// clock each.  OBUS words always name one of the instruction's own
// operands, so they cost nothing.  Received words arrive on inputs 0..4 in
// clocks 20..51 and 150..181, sent words leave on outputs 0..4 in clocks
// 200..231 and 360..391, and the host uses input 0 in clocks 250..389.
//
// A model executes the same program in program order on its own copy of
// the banks, the delay lines and the table result register.  Every sent
// word is checked against it, and per period the number of multiply-adds,
// table operations and transmit loads is checked, as is the absence of
// period overruns.
module tb_node_load;
  import mimic_pkg::*;
  import mimic_tb_pkg::*;

  localparam int PER   = 400;
  localparam int NI    = 350;   // instructions (= multiply-adds) per period
  localparam int NT    = 30;    // delay-line operations per period
  localparam int NW    = 5;     // words per batch; two batches in, two out
  localparam int RUNP  = 12;    // periods run

  logic clk = 0, rst_n = 0;
  logic [7:0] node_id = 8'd4;
  logic [NPORTS-1:0] net_in, net_out;
  logic [DRAM_AW-1:0] dram_addr;
  logic dram_ras_n, dram_cas_n, dram_we_n, dram_dq_oe;
  logic [3:0] dram_dq_out, dram_dq_in;

  mimic_node dut (.*);

  dram_model u_dram (.clk, .addr(dram_addr), .ras_n(dram_ras_n), .cas_n(dram_cas_n),
                     .we_n(dram_we_n), .dq_in(dram_dq_out), .dq_out(dram_dq_in));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ probes
  wire        run0 = dut.running;
  wire [15:0] cyc0 = dut.cycle;
  wire        fs0  = dut.frame_start;
  wire        madd = dut.u_ar.e_valid && dut.u_ar.e_ins.madd_en;
  wire        tbop = dut.ev_tblop;
  wire        txld = dut.ob_net_load;
  wire        act0 = dut.ev_activate;
  wire        ovr0 = dut.ev_overrun;
  wire        acc  = dut.instr_accept;

  // ------------------------------------------------------------ host line
  logic hline = 1'b0;
  int host_lo = 250, host_hi = 389;

  task automatic send(input logic [63:0] m);
    logic [64:0] bits;
    bits = {1'b1, m};
    for (int k = 64; k >= 0; k--) begin
      @(negedge clk);
      while (run0 && (cyc0 < 16'(host_lo) || cyc0 > 16'(host_hi))) begin
        hline = 1'b0;
        @(negedge clk);
      end
      hline = bits[k];
    end
    @(negedge clk);
    hline = 1'b0;
  endtask

  // ------------------------------------------------------------ data lines
  logic [31:0] rxa [NW], rxb [NW];
  always_comb begin
    net_in = '0;
    net_in[0] = hline;
    if (run0) begin
      for (int k = 0; k < NW; k++) begin
        if (cyc0 >= 20 && cyc0 <= 51)   net_in[k] = rxa[k][31 - (int'(cyc0) - 20)];
        if (cyc0 >= 150 && cyc0 <= 181) net_in[k] = rxb[k][31 - (int'(cyc0) - 150)];
      end
    end
  end

  // ------------------------------------------------------------ model
  instr_t      prog [NI];
  int          tdesc [NI];          // delay-line index started, or -1
  logic [31:0] refm [4][256];
  logic [31:0] dmem [int];
  int          dbase [NT], dlen [NT], dptr [NT];
  logic [31:0] last_y = 32'h0;
  logic [31:0] expq [NW][$];
  logic [31:0] staged [$], released [$];
  opnd_t       st_dst [$], rl_dst [$];
  int          frame = -1;

  task automatic model_frame();
    logic [31:0] va, vb, vc, vo, y;
    instr_t t;
    int j;
    foreach (released[k]) refm[rl_dst[k].bank][rl_dst[k].addr] = released[k];
    released.delete(); rl_dst.delete();
    for (int i = 0; i < NI; i++) begin
      t  = prog[i];
      va = refm[t.a.bank][t.a.addr];
      vb = refm[t.b.bank][t.b.addr];
      vc = refm[t.c.bank][t.c.addr];
      vo = (t.ob_src == t.a) ? va : (t.ob_src == t.b) ? vb : vc;
      if (t.ob_dst == OB_NET) expq[t.ob_port].push_back(vo);
      if (t.ib_src == IB_TABLE) refm[t.ib_dst.bank][t.ib_dst.addr] = last_y;
      if (t.ib_src == IB_NET)
        refm[t.ib_dst.bank][t.ib_dst.addr] = (i < 200) ? rxa[t.ib_port] : rxb[t.ib_port];
      if (t.tbl_go) begin
        j = tdesc[i];
        y = dmem.exists(dbase[j] + dptr[j]) ? dmem[dbase[j] + dptr[j]] : 32'h0;
        dmem[dbase[j] + dptr[j]] = vo;
        dptr[j] = (dptr[j] + 1) % dlen[j];
        last_y = y;
      end
      refm[t.d.bank][t.d.addr] = ref_madd(va, vb, vc);
    end
  endtask

  // per period: new words on the inputs, then the model of the period
  always @(posedge clk) if (rst_n && run0 && fs0) begin
    frame++;
    for (int k = 0; k < NW; k++) begin rxa[k] = $urandom; rxb[k] = $urandom; end
    model_frame();
  end

  always @(posedge clk) if (rst_n && act0) begin
    foreach (staged[k]) begin released.push_back(staged[k]); rl_dst.push_back(st_dst[k]); end
    staged.delete(); st_dst.delete();
  end

  // ------------------------------------------------------------ capture
  logic [31:0] cap [NW];
  int n_words = 0;
  always @(posedge clk) if (rst_n && run0) begin
    for (int k = 0; k < NW; k++) begin
      if ((cyc0 >= 201 && cyc0 <= 232) || (cyc0 >= 361 && cyc0 <= 392))
        cap[k] = {cap[k][30:0], net_out[k]};
      if (cyc0 == 232 || cyc0 == 392) begin
        checks++; n_words++;
        if (expq[k].size() == 0 || cap[k] !== expq[k][0]) begin
          failures++;
          $display("FAIL frame %0d port %0d sent %h exp %h", frame, k, cap[k],
                   expq[k].size() ? expq[k][0] : 32'h0);
        end
        if (expq[k].size()) void'(expq[k].pop_front());
      end
    end
  end

  // ------------------------------------------------------------ per-period counts
  int c_madd = 0, c_tbl = 0, c_tx = 0, last_acc = 0, worst_end = 0, n_ovr = 0, n_act = 0;
  always @(posedge clk) if (rst_n) begin
    if (ovr0) n_ovr++;
    if (act0 && run0) n_act++;
    if (run0 && fs0 && frame >= 1) begin
      // counts of the period that just ended
      checks += 3;
      if (c_madd != NI) begin failures++; $display("FAIL frame %0d: %0d multiply-adds", frame, c_madd); end
      if (c_tbl != NT)  begin failures++; $display("FAIL frame %0d: %0d table operations", frame, c_tbl); end
      if (c_tx != 2*NW) begin failures++; $display("FAIL frame %0d: %0d transmit loads", frame, c_tx); end
      if (last_acc > worst_end) worst_end = last_acc;
    end
    if (run0 && fs0) begin c_madd = 0; c_tbl = 0; c_tx = 0; end
    if (madd) c_madd++;
    if (tbop) c_tbl++;
    if (txld) c_tx++;
    if (acc) last_acc = int'(cyc0);
    if (run0 && frame == 2) begin
      if (dut.ev_conflict) n_cf++;
      if (dut.instr_valid && !acc) n_st++;
    end
  end
  int n_cf = 0, n_st = 0;

  // ------------------------------------------------------------ set-up
  function automatic int rnd_other(input int avoid, input int used0, input int used1);
    int b;
    do b = $urandom_range(3, 0); while (b == avoid || b == used0 || b == used1);
    return b;
  endfunction

  int dbank [NI];

  // an IBUS write waits one clock for its bank; it then must avoid the bank
  // that the previous instruction's write-back takes in that clock
  function automatic opnd_t ib_place(input int i, input int addr);
    return op(rnd_other(dbank[i-1], -1, -1), addr);
  endfunction

  task automatic build_prog();
    int ba, bb, bc, nxt;
    instr_t t;
    for (int i = 0; i < NI; i++) begin
      dbank[i] = $urandom_range(3, 0);
      // reads avoid the bank written back by instruction i-2
      ba = rnd_other(i >= 2 ? dbank[i-2] : -1, -1, -1);
      bb = rnd_other(i >= 2 ? dbank[i-2] : -1, ba, -1);
      bc = rnd_other(i >= 2 ? dbank[i-2] : -1, ba, bb);
      t = i_madd(op(dbank[i], $urandom_range(149, 0)),
                 op(ba, $urandom_range(255, 0)),
                 op(bb, $urandom_range(255, 0)),
                 op(bc, $urandom_range(255, 200)));
      tdesc[i] = -1;
      prog[i] = t;
    end
    // table operations: start j also stores the result of start j-1
    nxt = 0;
    for (int j = 0; j < NT; j++) begin
      int i = 6 + 11 * j;
      prog[i].tbl_go   = 1'b1;
      prog[i].tbl_desc = 6'(j);
      prog[i].ob_dst   = OB_TABLE;
      prog[i].ob_src   = prog[i].c;
      prog[i].ib_src   = IB_TABLE;
      prog[i].ib_dst   = ib_place(i, 150 + j);
      tdesc[i] = j;
    end
    prog[340].ib_src = IB_TABLE;
    prog[340].ib_dst = ib_place(340, 190);
    // received words: batch A at 85..89, batch B at 250..254
    for (int k = 0; k < NW; k++) begin
      prog[85 + k].ib_src  = IB_NET; prog[85 + k].ib_port = 3'(k);
      prog[85 + k].ib_dst  = ib_place(85 + k, 180 + k);
      prog[250 + k].ib_src = IB_NET; prog[250 + k].ib_port = 3'(k);
      prog[250 + k].ib_dst = ib_place(250 + k, 185 + k);
    end
    // sent words: batch A loaded at 100..104, batch B at 240..244
    for (int k = 0; k < NW; k++) begin
      prog[100 + k].ob_dst = OB_NET; prog[100 + k].ob_port = 3'(k);
      prog[100 + k].ob_src = prog[100 + k].a;
      prog[240 + k].ob_dst = OB_NET; prog[240 + k].ob_port = 3'(k);
      prog[240 + k].ob_src = prog[240 + k].b;
    end
    prog[NI-1].last = 1'b1;
  endtask

  task automatic coef(input int b, input int a, input logic [31:0] v);
    send(hmsg(4, HC_COEF, (b << 8) | a, v));
  endtask

  route_t r;
  logic [95:0] w;

  initial begin
    build_prog();
    for (int j = 0; j < NT; j++) begin
      dbase[j] = 700 * j + 13; dlen[j] = 1 + (j % 9); dptr[j] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);

    // program
    for (int i = 0; i < NI; i++) begin
      w = 96'(prog[i]);
      for (int ch = 0; ch < 3; ch++) send(hmsg(4, HC_CS_WR, (i << 2) | ch, w[32*ch +: 32]));
    end
    // route table
    for (int c = 0; c < PER; c++) begin
      r = '0;
      if ((c >= 20 && c <= 51) || (c >= 150 && c <= 181)) r.rx_en = 6'b011111;
      for (int k = 0; k < NW; k++)
        if ((c >= 200 && c <= 231) || (c >= 360 && c <= 391)) r.out_sel[k] = SEL_LOCAL;
      if (c >= host_lo && c <= host_hi) r.host_tap = 3'd1;
      send(hmsg(4, HC_RT_WR, c, 32'(r)));
    end
    // delay lines (DRAM starts at 0)
    for (int j = 0; j < NT; j++) begin
      send(hmsg(4, HC_DESC_WR, (j << 2) | 0, dbase[j]));
      send(hmsg(4, HC_DESC_WR, (j << 2) | 1, dlen[j]));
      send(hmsg(4, HC_DESC_WR, (j << 2) | 2, 0));
      send(hmsg(4, HC_DESC_WR, (j << 2) | 3, TM_DELAY << 4));
    end
    // bank contents: data below 200, small coefficients from 200
    for (int b = 0; b < 4; b++)
      for (int a = 0; a < 256; a++) begin
        refm[b][a] = (a < 200) ? 32'($signed($urandom) >>> 2) : 32'($signed($urandom) >>> 3);
        coef(b, a, refm[b][a]);
        if (a % 16 == 15) send(hmsg(4, HC_ACTIVATE, 0, 0));
      end
    // start
    @(negedge clk);
    while (cyc0 != 16'd10) @(negedge clk);
    send(hmsg(4, HC_CTRL, 0, 32'h0001_0000 | PER));
    wait (run0);
    // one coefficient update per period while running
    for (int p = 0; p < RUNP; p++) begin
      int b, a;
      logic [31:0] v;
      b = $urandom_range(3, 0); a = $urandom_range(255, 200);
      v = 32'($signed($urandom) >>> 3);
      staged.push_back(v); st_dst.push_back(op(b, a));
      coef(b, a, v);
      send(hmsg(4, HC_ACTIVATE, 0, 0));
    end
    repeat (2 * PER) @(negedge clk);

    $display("periods run: %0d, words checked: %0d, host updates: %0d", frame, n_words, n_act);
    $display("per period: %0d multiply-adds, %0d delay-line operations, %0d words in, %0d out",
             NI, NT, 2 * NW, 2 * NW);
    $display("stall clocks in one period: %0d, %0d of them with a bank conflict", n_st, n_cf);
    $display("latest clock of the last instruction: %0d of %0d", worst_end, PER - 1);
    checks++;
    if (n_ovr != 0) begin failures++; $display("FAIL period overrun %0d", n_ovr); end
    checks++;
    if (n_act < RUNP) begin failures++; $display("FAIL host updates %0d", n_act); end
    checks++;
    if (n_words < 2 * NW * (RUNP - 2)) begin failures++; $display("FAIL too few words %0d", n_words); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

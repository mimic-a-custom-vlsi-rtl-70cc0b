// Testbench for ar_unit.  The banks are loaded through the idle-time host
// port.  Directed programs then check the issue rate: conflict-free
// multiply-adds issue one per clock; two operands in one bank cost one
// extra clock; a chain in which every instruction uses the previous result
// issues one per clock through the forwarding path; a table start waits for
// a busy table unit.  A random program (random banks, so many conflicts)
// is checked word for word against an in-order reference model through the
// OBUS, the table operand and a final read-out of all 1024 words.
module tb_ar_unit;
  import mimic_pkg::*;
  import mimic_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  instr_t instr;
  logic   instr_valid, instr_accept;
  logic [NPORTS-1:0][WORD_W-1:0] net_rx_word;
  logic [WORD_W-1:0] tbl_y = 32'h0BAD_F00D;
  logic   tbl_busy = 0;
  logic   host_wvalid = 0, host_wready;
  opnd_t  host_wdst = '0;
  logic [WORD_W-1:0] host_wdata = '0;
  logic   ob_net_load, tbl_go, busy, ev_conflict, ev_forward, ev_saturate;
  logic [PORT_W-1:0] ob_port;
  logic [WORD_W-1:0] obus, tbl_x;
  logic [DESC_AW-1:0] tbl_desc;

  wire    tbl_ready  = !tbl_busy;
  wire    tbl_yvalid = !tbl_busy;
  ar_unit dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  instr_t prog [$];
  int pc = 0;
  int cyc = 0, first_acc = -1, last_acc = -1, n_conf = 0, n_fwd = 0;
  logic [31:0] refm [4][256];
  logic [31:0] exp_ob [$];
  logic [31:0] exp_x  [$];

  assign instr       = (pc < prog.size()) ? prog[pc] : '0;
  assign instr_valid = (pc < prog.size());

  always @(posedge clk) begin
    cyc++;
    if (ev_conflict) n_conf++;
    if (ev_forward)  n_fwd++;
    if (instr_valid && instr_accept) begin
      if (first_acc < 0) first_acc = cyc;
      last_acc = cyc;
      pc++;
    end
    if (ob_net_load && rst_n) begin
      checks++;
      if (exp_ob.size() == 0 || obus !== exp_ob[0]) begin
        failures++;
        $display("FAIL obus %h exp %h", obus, exp_ob.size() ? exp_ob[0] : 32'h0);
      end
      if (exp_ob.size()) void'(exp_ob.pop_front());
    end
    if (tbl_go && rst_n) begin
      checks++;
      if (exp_x.size() == 0 || tbl_x !== exp_x[0]) begin
        failures++;
        $display("FAIL tbl_x %h exp %h n=%0d pc=%0d cyc=%0d", tbl_x, exp_x.size() ? exp_x[0] : 32'h0, exp_x.size(), pc, cyc);
      end
      if (exp_x.size()) void'(exp_x.pop_front());
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference execution of one instruction, in program order
  task automatic ref_exec(input instr_t i);
    logic [31:0] va, vb, vc, vo;
    va = refm[i.a.bank][i.a.addr];
    vb = refm[i.b.bank][i.b.addr];
    vc = refm[i.c.bank][i.c.addr];
    vo = refm[i.ob_src.bank][i.ob_src.addr];
    if (i.ob_dst == OB_NET) exp_ob.push_back(vo);
    if (i.tbl_go) exp_x.push_back(i.ob_dst == OB_TABLE ? vo : 32'h0);
    if (i.ib_src == IB_NET)   refm[i.ib_dst.bank][i.ib_dst.addr] = net_rx_word[i.ib_port];
    if (i.ib_src == IB_TABLE) refm[i.ib_dst.bank][i.ib_dst.addr] = tbl_y;
    if (i.madd_en) refm[i.d.bank][i.d.addr] = ref_madd(va, vb, vc);
  endtask

  task automatic run_prog(output int cycles);
    pc = 0; first_acc = -1;
    foreach (prog[k]) ref_exec(prog[k]);
    wait (pc == prog.size());
    @(posedge clk);
    cycles = last_acc - first_acc + 1;
    repeat (4) @(posedge clk);
  endtask

  task automatic hw(input int b, input int a, input logic [31:0] d);
    @(negedge clk);
    host_wvalid = 1; host_wdst = op(b, a); host_wdata = d;
    refm[b][a] = d;
    @(posedge clk);
    checks++;
    if (!host_wready) begin failures++; $display("FAIL host port not ready"); end
    #1 host_wvalid = 0;
  endtask

  task automatic expect_cycles(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: %0d cycles, expected %0d", what, got, exp);
    end
  endtask

  int cy;
  instr_t t;

  initial begin
    for (int p = 0; p < NPORTS; p++) net_rx_word[p] = $urandom;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < 4; b++)
      for (int a = 0; a < 256; a++)
        hw(b, a, $urandom >> ($urandom_range(8, 0)));

    // 1: conflict-free stream, one instruction per clock
    prog.delete();
    for (int k = 0; k < 8; k++)
      prog.push_back(i_madd(op(3, k), op(0, k), op(1, k), op(2, k)));
    run_prog(cy);
    expect_cycles("conflict-free stream", cy, 8);

    // 2: a and b in the same bank: one extra clock each
    prog.delete();
    for (int k = 0; k < 4; k++)
      prog.push_back(i_madd(op(3, 20 + k), op(0, k), op(0, 10 + k), op(2, k)));
    run_prog(cy);
    expect_cycles("bank conflict", cy, 7);

    // 3: dependent chain through the forwarding path
    prog.delete();
    for (int k = 0; k < 8; k++)
      prog.push_back(i_madd(op(k % 2 ? 2 : 3, 40 + k), op(k % 2 ? 3 : 2, 39 + k), op(0, k), op(1, k)));
    n_fwd = 0;
    run_prog(cy);
    expect_cycles("forwarded chain", cy, 8);
    checks++;
    if (n_fwd < 7) begin failures++; $display("FAIL forwards %0d", n_fwd); end

    // 3b: OBUS source equal to an operand shares its read: still one per clock
    prog.delete();
    for (int k = 0; k < 8; k++) begin
      t = i_madd(op(3, 60 + k), op(0, 60 + k), op(1, 60 + k), op(2, 60 + k));
      t.ob_dst = OB_NET; t.ob_port = 3'(k % 6);
      t.ob_src = (k % 3 == 0) ? t.a : (k % 3 == 1) ? t.b : t.c;
      prog.push_back(t);
    end
    n_conf = 0;
    run_prog(cy);
    expect_cycles("shared OBUS read", cy, 8);
    checks++;
    if (n_conf != 0) begin failures++; $display("FAIL shared OBUS read conflicted"); end

    // 4: table start waits while the table unit is busy
    prog.delete();
    t = i_nop(); t.tbl_go = 1; t.tbl_desc = 6'd5; t.ob_dst = OB_TABLE; t.ob_src = op(1, 3);
    prog.push_back(t);
    prog.push_back(t);
    fork
      begin
        @(negedge clk); tbl_busy = 1;
        repeat (6) @(negedge clk);
        tbl_busy = 0;
      end
      run_prog(cy);
    join
    checks++;
    if (cy < 6) begin failures++; $display("FAIL table wait %0d", cy); end

    // 5: random program, all units
    prog.delete();
    for (int k = 0; k < 400; k++) begin
      t = i_nop();
      if ($urandom_range(3, 0) != 0) begin
        t.madd_en = 1;
        t.a = op($urandom_range(3, 0), $urandom_range(255, 0));
        t.b = op($urandom_range(3, 0), $urandom_range(255, 0));
        t.c = op($urandom_range(3, 0), $urandom_range(255, 0));
        t.d = op($urandom_range(3, 0), $urandom_range(199, 0));
      end
      case ($urandom_range(2, 0))
        0: ;
        1: begin t.ob_dst = OB_NET; t.ob_port = 3'($urandom_range(5, 0)); end
        default: begin t.ob_dst = OB_TABLE; t.tbl_go = 1; end
      endcase
      case ($urandom_range(3, 0))
        0: t.ob_src = t.a;
        1: t.ob_src = t.c;
        default: t.ob_src = op($urandom_range(3, 0), $urandom_range(255, 0));
      endcase
      case ($urandom_range(2, 0))
        0: ;
        1: begin t.ib_src = IB_NET; t.ib_port = 3'($urandom_range(5, 0)); end
        default: t.ib_src = IB_TABLE;
      endcase
      t.ib_dst = op($urandom_range(3, 0), $urandom_range(255, 200));
      prog.push_back(t);
    end
    n_conf = 0;
    run_prog(cy);
    checks++;
    if (n_conf == 0 || cy <= 400) begin failures++; $display("FAIL no conflicts seen"); end

    // read everything back through the OBUS
    prog.delete();
    for (int b = 0; b < 4; b++)
      for (int a = 0; a < 256; a++) begin
        t = i_nop(); t.ob_dst = OB_NET; t.ob_src = op(b, a);
        prog.push_back(t);
      end
    run_prog(cy);
    expect_cycles("read-out", cy, 1024);
    checks++;
    if (exp_ob.size() != 0 || exp_x.size() != 0) begin
      failures++; $display("FAIL %0d words not seen", exp_ob.size() + exp_x.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

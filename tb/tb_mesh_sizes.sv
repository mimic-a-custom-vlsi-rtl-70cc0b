// Testbench for mimic_system built as larger cubes: 4 x 4 x 4 = 64 nodes
// and 5 x 5 x 5 = 125 nodes, the two larger sizes of the routing study the
// design was sized against.  The same test runs on both meshes side by side,
// each with its own host line into node 0's -x face.  It uses the x row
// y = z = 0 (nodes 0..K-1 of a K-node row) and checks three things:
//
//   boot     before the run bit is set every node repeats input 0 on
//            output 1 with one clock of delay, so the host's bit stream
//            leaves the row's +x face exactly K clocks after it enters
//            node 0 (checked on every boot clock).
//   run      node 0 computes w = a + b*c once per period and sends it on
//            output 1 in clocks 100..131; the middle nodes pass it through
//            and the last node of the row both receives it (rx_en on
//            input 0) and passes it out of the +x face.  The word seen on
//            the face, and in that node's receive register, must equal the
//            reference multiply-add every period.
//   scope    a broadcast travels only along the chain the boot route
//            forms: the row's last node runs, the far corner node does not.
module tb_mesh_sizes;
  import mimic_pkg::*;
  import mimic_tb_pkg::*;

  localparam int PER = 400;
  localparam int NSIZES = 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks [NSIZES];
  int failures [NSIZES];
  logic [NSIZES-1:0] done = '0;

  for (genvar gi = 0; gi < NSIZES; gi++) begin : g_m
    localparam int K = 4 + gi;
    localparam int N = K * K * K;

    logic [N-1:0][NPORTS-1:0] ext_in, ext_out;
    logic [N-1:0][DRAM_AW-1:0] dram_addr;
    logic [N-1:0] dram_ras_n, dram_cas_n, dram_we_n, dram_dq_oe;
    logic [N-1:0][3:0] dram_dq_out, dram_dq_in;

    assign dram_dq_in = '0;

    mimic_system #(.NX(K), .NY(K), .NZ(K)) dut (.*);

    wire        run0  = dut.g_z[0].g_y[0].g_x[0].u_node.running;
    wire        runl  = dut.g_z[0].g_y[0].g_x[K-1].u_node.running;
    wire        runf  = dut.g_z[K-1].g_y[K-1].g_x[K-1].u_node.running;
    wire [15:0] cycl  = dut.g_z[0].g_y[0].g_x[K-1].u_node.cycle;
    wire [31:0] rxl   = dut.g_z[0].g_y[0].g_x[K-1].u_node.rx_word[0];

    // -------------------------------------------------------- boot chain
    logic [K-1:0] hist = '0;
    int n_boot = 0;
    always @(negedge clk) if (rst_n) begin
      if (!run0 && !runl && $time > 200) begin
        checks[gi]++;
        n_boot++;
        if (ext_out[K-1][1] != hist[K-1]) begin
          failures[gi]++;
          if (failures[gi] < 20)
            $display("FAIL %0d nodes, boot chain: face bit %b, host bit %0d clocks ago %b",
                     N, ext_out[K-1][1], K, hist[K-1]);
        end
      end
      hist <= {hist[K-2:0], ext_in[0][0]};
    end

    // -------------------------------------------------------- run: face word
    logic [31:0] expw, face;
    int n_word = 0;
    always @(negedge clk) if (rst_n && runl) begin
      if (cycl >= 16'(100 + K) && cycl <= 16'(131 + K)) face <= {face[30:0], ext_out[K-1][1]};
      if (cycl == 16'd200 && n_word < 100) begin
        checks[gi] += 2;
        n_word++;
        if (face != expw) begin
          failures[gi]++; $display("FAIL %0d nodes, face word %h, expected %h", N, face, expw);
        end
        if (rxl != expw) begin
          failures[gi]++; $display("FAIL %0d nodes, receive register %h, expected %h", N, rxl, expw);
        end
      end
    end

    // -------------------------------------------------------- host
    task automatic send(input logic [63:0] m);
      logic [64:0] bits;
      bits = {1'b1, m};
      for (int k = 64; k >= 0; k--) begin
        @(negedge clk);
        ext_in[0][0] = bits[k];
      end
      @(negedge clk);
      ext_in[0][0] = 1'b0;
    endtask

    task automatic load_prog(input int node, input instr_t p [$]);
      logic [95:0] w;
      for (int k = 0; k < p.size(); k++) begin
        w = 96'(p[k]);
        for (int ch = 0; ch < 3; ch++)
          send(hmsg(node, HC_CS_WR, (k << 2) | ch, w[32*ch +: 32]));
      end
    endtask

    instr_t p0 [$], pn [$];
    instr_t t;
    route_t r;
    logic [31:0] va, vb, vc;

    initial begin
      ext_in = '0;
      va = q31(0.25 - 0.1 * gi); vb = q31(-0.7); vc = q31(0.4 + 0.2 * gi);
      expw = ref_madd(va, vb, vc);

      p0.push_back(i_madd(op(3, 9), op(0, 4), op(1, 4), op(2, 4)));
      t = i_nop(); t.ob_dst = OB_NET; t.ob_port = 3'd1; t.ob_src = op(3, 9); t.last = 1;
      p0.push_back(t);
      t = i_nop(); t.last = 1; pn.push_back(t);

      wait (rst_n);
      repeat (2) @(negedge clk);

      load_prog(0, p0);
      for (int n = 1; n < K; n++) load_prog(n, pn);
      for (int c = 0; c < PER; c++) send(hmsg(NODE_BCAST, HC_RT_WR, c, 32'h0));
      for (int c = 100; c < 132; c++) begin
        r = '0; r.out_sel[1] = SEL_LOCAL;
        send(hmsg(0, HC_RT_WR, c, 32'(r)));
      end
      for (int n = 1; n < K; n++)
        for (int c = 100 + n; c < 132 + n; c++) begin
          r = '0; r.out_sel[1] = 3'd1;
          if (n == K - 1) r.rx_en[0] = 1'b1;
          send(hmsg(n, HC_RT_WR, c, 32'(r)));
        end
      send(hmsg(0, HC_COEF, (0 << 8) | 4, va));
      send(hmsg(0, HC_COEF, (1 << 8) | 4, vb));
      send(hmsg(0, HC_COEF, (2 << 8) | 4, vc));
      send(hmsg(0, HC_ACTIVATE, 0, 0));
      send(hmsg(NODE_BCAST, HC_CTRL, 0, 32'h0001_0000 | PER));
      wait (runl);
      repeat (6 * PER) @(negedge clk);

      $display("%0d nodes: boot clocks checked %0d, periods checked %0d", N, n_boot, n_word);
      checks[gi]++;
      if (n_boot < 1000) begin failures[gi]++; $display("FAIL %0d nodes, too few boot clocks", N); end
      checks[gi]++;
      if (n_word < 4) begin failures[gi]++; $display("FAIL %0d nodes, too few periods", N); end
      checks[gi]++;
      if (!run0 || !runl || runf) begin
        failures[gi]++;
        $display("FAIL %0d nodes, run bit reached: first %b last %b far corner %b", N, run0, runl, runf);
      end
      done[gi] = 1'b1;
    end
  end

  function automatic int total(input int v [NSIZES]);
    int s = 0;
    foreach (v[i]) s += v[i];
    return s;
  endfunction

  initial begin
    foreach (checks[i]) begin checks[i] = 0; failures[i] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (&done);
    $display("TB_RESULT checks=%0d failures=%0d", total(checks), total(failures));
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", total(checks), total(failures) + 1);
    $finish;
  end
endmodule

// ar_unit: the arithmetic/register (AR) unit of a MIMIC node.
//
// Four single-ported register banks (MEM1..MEM4) feed one multiply-add
// unit.  All arithmetic is memory to memory: an instruction reads a, b and
// c from the banks and writes d = a + b*c back.  The same banks are the
// sinks of the IBUS (words from the network receive registers or the table
// unit) and, through a bank-to-OBUS selector, the source of the OBUS
// (words to the network transmit registers or the table unit).
//
// Pipeline, three stages:
//   RD  collects the accesses of the current instruction: reads of a, b,
//       c and of the OBUS source, and the IBUS write.  Each bank grants one
//       access per cycle.  When two accesses of an instruction, or an access
//       and the write-back of an earlier instruction, fall in the same bank,
//       they are made one after another over several cycles (the
//       document's "sequential memory access" on a bank conflict); the
//       instruction leaves RD once every access has been made.  An OBUS
//       source equal to one of a, b or c shares that operand's read.
//   EX  computes the multiply-add from the read data and drives the OBUS.
//   WB  writes the result into its bank.
// With conflict-free bank assignment one instruction is issued per clock.
// A read of the word the instruction in EX is about to write takes the
// result from the WB register instead (the result-to-ALU feedback path of
// the node diagram), so a dependent instruction can follow directly.
//
// The document gives the four banks of 256 words, the 32-bit multiply-add,
// the IBUS/OBUS structure and conflict serialisation.  The three-stage
// pipeline, the grant order (a, b, c, OBUS read, IBUS write), the forwarding,
// the shared OBUS read and the idle-time host write port are this design's
// own.
//
// Interface: instr/instr_valid come from the sequencer, which moves on when
// instr_accept is high.  host_w* writes one staged coefficient while the
// unit is idle.  ob_* and tbl_* are valid in the EX cycle of an
// instruction.
module ar_unit
  import mimic_pkg::*;
#(
  parameter int unsigned BANK_WORDS = 256
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // instruction stream
  input  instr_t                   instr,
  input  logic                     instr_valid,
  output logic                     instr_accept,
  // IBUS sources
  input  logic [NPORTS-1:0][WORD_W-1:0] net_rx_word,
  input  logic [WORD_W-1:0]        tbl_y,
  input  logic                     tbl_ready,     // table takes a start next clock
  input  logic                     tbl_yvalid,    // tbl_y is the latest result
  // idle-time coefficient writes from the host interface
  input  logic                     host_wvalid,
  input  opnd_t                    host_wdst,
  input  logic [WORD_W-1:0]        host_wdata,
  output logic                     host_wready,
  // OBUS
  output logic                     ob_net_load,
  output logic [PORT_W-1:0]        ob_port,
  output logic [WORD_W-1:0]        obus,
  output logic                     tbl_go,
  output logic [DESC_AW-1:0]       tbl_desc,
  output logic [WORD_W-1:0]        tbl_x,
  // status
  output logic                     busy,
  output logic                     ev_conflict,   // an access waited for a bank
  output logic                     ev_forward,    // a read took the WB result
  output logic                     ev_saturate    // a multiply-add clipped
);

  localparam int unsigned NRD = 4;          // a, b, c, OBUS source
  localparam int unsigned NRQ = NRD + 1;    // + IBUS write
  localparam int unsigned IBQ = NRD;        // request index of the IBUS write

  // ---------------------------------------------------------------- stages
  logic                    e_valid;
  instr_t                  e_ins;
  logic [NRD-1:0][WORD_W-1:0] ex_op;
  logic [NRD-1:0]          ex_pend, ex_fwd;

  logic                    wb_valid;
  opnd_t                   wb_dst;
  logic [WORD_W-1:0]       wb_data;

  // collector state for the instruction in RD
  logic [NRQ-1:0]          done_q;
  logic [NRD-1:0]          lg_q, lf_q;      // granted / forwarded last cycle
  logic [NRD-1:0][1:0]     lb_q;            // bank of last cycle's grant
  logic [NRD-1:0][WORD_W-1:0] op_q;

  // bank ports
  logic [NBANKS-1:0]                  b_en, b_we;
  logic [NBANKS-1:0][BANK_AW-1:0]     b_addr;
  logic [NBANKS-1:0][WORD_W-1:0]      b_wdata, b_rdata;

  for (genvar g = 0; g < NBANKS; g++) begin : g_bank
    mem_bank #(.WORDS(BANK_WORDS), .WIDTH(WORD_W)) u_mem (
      .clk, .rst_n,
      .en(b_en[g]), .we(b_we[g]), .addr(b_addr[g]),
      .wdata(b_wdata[g]), .rdata(b_rdata[g])
    );
  end

  // --------------------------------------------------- request decoding
  opnd_t [NRQ-1:0]   rq_op;
  logic  [NRQ-1:0]   rq_need;
  logic  [NRQ-1:0]   grant;
  logic  [NRD-1:0]   fwd;
  logic  [NBANKS-1:0] bbusy;
  logic              tbl_ok, ib_ok, all_done, issue;
  logic [WORD_W-1:0] ib_data;
  logic [NRD-1:0][WORD_W-1:0] cur_val;

  // The OBUS word comes through the bank-output selector.  When it names
  // one of the instruction's own multiply-add operands it is taken from that
  // read (0..2) and needs no bank access of its own; otherwise (3) it is a
  // separate read.
  function automatic logic [1:0] ob_from(instr_t i);
    if (i.madd_en && i.ob_src == i.a) return 2'd0;
    if (i.madd_en && i.ob_src == i.b) return 2'd1;
    if (i.madd_en && i.ob_src == i.c) return 2'd2;
    return 2'd3;
  endfunction

  always_comb begin
    rq_op[0] = instr.a;
    rq_op[1] = instr.b;
    rq_op[2] = instr.c;
    rq_op[3] = instr.ob_src;
    rq_op[4] = instr.ib_dst;
    rq_need[0] = instr.madd_en;
    rq_need[1] = instr.madd_en;
    rq_need[2] = instr.madd_en;
    rq_need[3] = (instr.ob_dst != OB_NONE) && (ob_from(instr) == 2'd3);
    rq_need[4] = (instr.ib_src != IB_NONE);

    // a start may leave RD when the table unit takes it in the next clock;
    // a result store waits until the latest started operation's result is in
    tbl_ok = tbl_ready && !(e_valid && e_ins.tbl_go);
    ib_ok  = (instr.ib_src != IB_TABLE) || (tbl_yvalid && !(e_valid && e_ins.tbl_go));
    ib_data = (instr.ib_src == IB_TABLE) ? tbl_y : net_rx_word[instr.ib_port];

    bbusy = '0;
    if (wb_valid) bbusy[wb_dst.bank] = 1'b1;
    grant = '0;
    fwd   = '0;
    ev_conflict = 1'b0;
    if (instr_valid) begin
      for (int r = 0; r < NRQ; r++) begin
        if (rq_need[r] && !done_q[r] && (r != IBQ || ib_ok)) begin
          if (!bbusy[rq_op[r].bank]) begin
            grant[r] = 1'b1;
            bbusy[rq_op[r].bank] = 1'b1;
          end else begin
            ev_conflict = 1'b1;
          end
        end
      end
    end
    for (int r = 0; r < NRD; r++)
      fwd[r] = grant[r] && e_valid && e_ins.madd_en && (e_ins.d == rq_op[r]);

    all_done = 1'b1;
    for (int r = 0; r < NRQ; r++)
      if (rq_need[r] && !done_q[r] && !grant[r]) all_done = 1'b0;
    issue = instr_valid && all_done && (!instr.tbl_go || tbl_ok);

    for (int r = 0; r < NRD; r++)
      cur_val[r] = lg_q[r] ? (lf_q[r] ? wb_data : b_rdata[lb_q[r]]) : op_q[r];
  end

  assign instr_accept = issue;
  assign ev_forward   = |fwd;

  // host writes only while the unit has nothing in flight
  assign host_wready = !instr_valid && !e_valid && !wb_valid;
  assign busy        = instr_valid || e_valid || wb_valid;

  // -------------------------------------------------------- bank ports
  always_comb begin
    b_en = '0; b_we = '0; b_addr = '0; b_wdata = '0;
    if (wb_valid) begin
      b_en[wb_dst.bank]    = 1'b1;
      b_we[wb_dst.bank]    = 1'b1;
      b_addr[wb_dst.bank]  = wb_dst.addr;
      b_wdata[wb_dst.bank] = wb_data;
    end
    for (int r = 0; r < NRD; r++) begin
      if (grant[r]) begin
        b_en[rq_op[r].bank]   = 1'b1;
        b_addr[rq_op[r].bank] = rq_op[r].addr;
      end
    end
    if (grant[IBQ]) begin
      b_en[instr.ib_dst.bank]    = 1'b1;
      b_we[instr.ib_dst.bank]    = 1'b1;
      b_addr[instr.ib_dst.bank]  = instr.ib_dst.addr;
      b_wdata[instr.ib_dst.bank] = ib_data;
    end
    if (host_wvalid && host_wready) begin
      b_en[host_wdst.bank]    = 1'b1;
      b_we[host_wdst.bank]    = 1'b1;
      b_addr[host_wdst.bank]  = host_wdst.addr;
      b_wdata[host_wdst.bank] = host_wdata;
    end
  end

  // ---------------------------------------------------- collector state
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done_q <= '0;
      lg_q   <= '0;
      lf_q   <= '0;
      lb_q   <= '0;
      op_q   <= '0;
    end else begin
      done_q <= issue ? '0 : (done_q | grant);
      lg_q   <= grant[NRD-1:0];
      lf_q   <= fwd;
      for (int r = 0; r < NRD; r++) begin
        lb_q[r] <= rq_op[r].bank;
        op_q[r] <= cur_val[r];
      end
    end
  end

  // ------------------------------------------------------------ EX stage
  logic [NRD-1:0][WORD_W-1:0] e_val;
  logic [WORD_W-1:0]          madd_y;
  logic                       madd_sat;

  always_comb begin
    opnd_t e_src [NRD];
    e_src[0] = e_ins.a;
    e_src[1] = e_ins.b;
    e_src[2] = e_ins.c;
    e_src[3] = e_ins.ob_src;
    for (int r = 0; r < NRD; r++)
      e_val[r] = ex_pend[r] ? (ex_fwd[r] ? wb_data : b_rdata[e_src[r].bank]) : ex_op[r];
  end

  madd_unit #(.W(WORD_W)) u_madd (
    .a(e_val[0]), .b(e_val[1]), .c(e_val[2]), .y(madd_y), .sat(madd_sat)
  );

  assign obus        = e_val[ob_from(e_ins)];
  assign ob_net_load = e_valid && (e_ins.ob_dst == OB_NET);
  assign ob_port     = e_ins.ob_port;
  assign tbl_go      = e_valid && e_ins.tbl_go;
  assign tbl_desc    = e_ins.tbl_desc;
  assign tbl_x       = (e_ins.ob_dst == OB_TABLE) ? obus : '0;
  assign ev_saturate = e_valid && e_ins.madd_en && madd_sat;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e_valid  <= 1'b0;
      e_ins    <= '0;
      ex_op    <= '0;
      ex_pend  <= '0;
      ex_fwd   <= '0;
      wb_valid <= 1'b0;
      wb_dst   <= '0;
      wb_data  <= '0;
    end else begin
      e_valid <= issue;
      if (issue) begin
        e_ins   <= instr;
        ex_op   <= cur_val;
        ex_pend <= grant[NRD-1:0];
        ex_fwd  <= fwd;
      end
      wb_valid <= e_valid && e_ins.madd_en;
      wb_dst   <= e_ins.d;
      wb_data  <= madd_y;
    end
  end

endmodule

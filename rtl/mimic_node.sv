// mimic_node: one MIMIC processing chip.
//
// The chip joins five units with two 32-bit buses: the IBUS carries words
// into the register banks (from the network interface's receive registers
// and the table unit's result), the OBUS carries words out of the banks (to
// the network interface's transmit registers and the table unit).  The
// control store's sequencer feeds one instruction stream to all of them,
// once per sample period; the host interface, reached through the network,
// loads that program and the other set-up state and delivers coefficient
// updates.  The document gives this unit structure and bus arrangement, the
// six-link network, the 16 DRAM pins and the bank and DRAM sizes; how each
// unit is built is described in its own file.
//
// Pins: clk, rst_n; six serial links in and out; the DRAM control pins
// (address, RAS, CAS, WE, data with separate in/out/enable).  node_id gives
// the node's number for host messages; it stands for a value fixed when the
// board is built and is not among the document's pins.
module mimic_node
  import mimic_pkg::*;
#(
  parameter int unsigned BANK_WORDS = 256,   // words per register bank
  parameter int unsigned CS_DEPTH   = 512,   // control-store words
  parameter int unsigned RT_DEPTH   = 512,   // route-table entries
  parameter int unsigned PERIOD     = 400,   // clocks per sample period
  parameter int unsigned NDESC      = 64,    // table descriptors
  parameter int unsigned COEF_DEPTH = 16,    // staged coefficient writes
  parameter int unsigned BOOT_IN    = 0,
  parameter int unsigned BOOT_OUT   = 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [7:0]          node_id,
  input  logic [NPORTS-1:0]   net_in,
  output logic [NPORTS-1:0]   net_out,
  output logic [DRAM_AW-1:0]  dram_addr,
  output logic                dram_ras_n,
  output logic                dram_cas_n,
  output logic                dram_we_n,
  output logic [3:0]          dram_dq_out,
  output logic                dram_dq_oe,
  input  logic [3:0]          dram_dq_in
);

  localparam int unsigned CS_AW = $clog2(CS_DEPTH);
  localparam int unsigned RT_AW = $clog2(RT_DEPTH);

  // control store / sequencer
  instr_t        instr;
  logic          instr_valid, instr_accept;
  logic [15:0]   cycle;
  logic          running, frame_start, ev_overrun;

  // host interface outputs
  logic              cs_we;
  logic [CS_AW-1:0]  cs_index;
  logic [1:0]        cs_chunk;
  logic [31:0]       cs_wdata;
  logic              rt_we;
  logic [RT_AW-1:0]  rt_index;
  route_t            rt_wdata;
  logic              ctrl_we, ctrl_run;
  logic [15:0]       ctrl_period;
  logic              desc_we;
  logic [DESC_AW-1:0] desc_idx;
  logic [1:0]        desc_field;
  logic [31:0]       desc_wdata;
  logic              hw_valid, hw_ready;
  logic [SADDR_W-1:0] hw_addr;
  logic [WORD_W-1:0] hw_data;
  logic              coef_wvalid, coef_wready;
  opnd_t             coef_wdst;
  logic [WORD_W-1:0] coef_wdata;
  logic              ev_msg, ev_overflow, ev_activate;

  // network interface
  logic [NPORTS-1:0][WORD_W-1:0] rx_word;
  logic              hbit, hbit_valid, ev_through, ev_tx;

  // buses
  logic              ob_net_load, tbl_go, tbl_busy, tbl_ready, tbl_yvalid, ar_busy;
  logic [PORT_W-1:0] ob_port;
  logic [WORD_W-1:0] obus, tbl_x, tbl_y;
  logic [DESC_AW-1:0] tbl_desc;
  logic              ev_conflict, ev_forward, ev_saturate, ev_tblop;

  ctrl_store #(.DEPTH(CS_DEPTH), .PERIOD_DEF(PERIOD)) u_cs (
    .clk, .rst_n,
    .cs_we, .cs_index, .cs_chunk, .cs_wdata,
    .ctrl_we, .ctrl_run, .ctrl_period,
    .instr, .instr_valid, .instr_accept,
    .cycle, .running, .frame_start, .ev_overrun
  );

  ar_unit #(.BANK_WORDS(BANK_WORDS)) u_ar (
    .clk, .rst_n,
    .instr, .instr_valid, .instr_accept,
    .net_rx_word(rx_word), .tbl_y, .tbl_ready, .tbl_yvalid,
    .host_wvalid(coef_wvalid), .host_wdst(coef_wdst), .host_wdata(coef_wdata),
    .host_wready(coef_wready),
    .ob_net_load, .ob_port, .obus, .tbl_go, .tbl_desc, .tbl_x,
    .busy(ar_busy), .ev_conflict, .ev_forward, .ev_saturate
  );

  net_unit #(.DEPTH(RT_DEPTH), .BOOT_IN(BOOT_IN), .BOOT_OUT(BOOT_OUT)) u_net (
    .clk, .rst_n,
    .net_in, .net_out,
    .cycle(cycle[RT_AW-1:0]), .running,
    .rt_we, .rt_index, .rt_wdata,
    .tx_load(ob_net_load), .tx_port(ob_port), .tx_word(obus),
    .rx_word,
    .host_bit(hbit), .host_bit_valid(hbit_valid),
    .ev_through, .ev_tx
  );

  host_if #(.COEF_DEPTH(COEF_DEPTH), .CS_AW(CS_AW), .RT_AW(RT_AW)) u_host (
    .clk, .rst_n, .node_id,
    .hbit, .hbit_valid,
    .drain_en(!ar_busy),
    .cs_we, .cs_index, .cs_chunk, .cs_wdata,
    .rt_we, .rt_index, .rt_wdata,
    .ctrl_we, .ctrl_run, .ctrl_period,
    .desc_we, .desc_idx, .desc_field, .desc_wdata,
    .dram_wvalid(hw_valid), .dram_waddr(hw_addr), .dram_wdata(hw_data),
    .dram_wready(hw_ready),
    .coef_wvalid, .coef_wdst, .coef_wdata, .coef_wready,
    .ev_msg, .ev_overflow, .ev_activate
  );

  table_unit #(.NDESC(NDESC)) u_tbl (
    .clk, .rst_n,
    .go(tbl_go), .desc(tbl_desc[$clog2(NDESC)-1:0]), .x(tbl_x), .y(tbl_y), .busy(tbl_busy),
    .ready_next(tbl_ready), .y_valid(tbl_yvalid),
    .desc_we, .desc_idx(desc_idx[$clog2(NDESC)-1:0]), .desc_field, .desc_wdata,
    .hw_valid, .hw_addr, .hw_data, .hw_ready,
    .dram_addr, .dram_ras_n, .dram_cas_n, .dram_we_n,
    .dram_dq_out, .dram_dq_oe, .dram_dq_in,
    .ev_op(ev_tblop)
  );

endmodule

// host_if: host interface of a MIMIC node.
//
// The host reaches the nodes over daisy chains that run through the
// network links the data traffic leaves unused; the network interface hands
// this node's chain bits to the host interface one at a time (hbit with
// hbit_valid, gaps allowed).  A message is a start bit (1) followed by a
// 32-bit header {node, cmd, addr} and a 32-bit data word, MSB first; all
// nodes on a chain see every message and act on those with their own node
// number or the broadcast number 8'hFF.
//
// Commands (mimic_pkg::hcmd_e) load the control store, the route table and
// the table-unit descriptors, write DRAM samples, set the sample period and
// start the program, and update coefficients.  Coefficient updates are
// double-buffered, as the document asks: HC_COEF only stages a bank write
// in a small buffer, and HC_ACTIVATE releases every staged write at once.
// Released writes go to the register banks through the AR unit's idle-time
// port, i.e. after the node's program has finished for the sample period and
// before the next period starts, so a sample is never computed with half of
// an update.  A staged write that finds the buffer full, or a DRAM write
// that finds the previous one still waiting, is dropped and counted in
// ev_overflow.  Message format, command set and buffer depth are this
// design's choices; the document gives the double buffering and the single
// activating control word.
module host_if
  import mimic_pkg::*;
#(
  parameter int unsigned COEF_DEPTH = 16,
  parameter int unsigned CS_AW      = 9,
  parameter int unsigned RT_AW      = 9,
  localparam int unsigned PW        = $clog2(COEF_DEPTH) + 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [7:0]          node_id,
  // serial input from the network interface
  input  logic                hbit,
  input  logic                hbit_valid,
  // the node is idle: staged writes may go out
  input  logic                drain_en,
  // control store
  output logic                cs_we,
  output logic [CS_AW-1:0]    cs_index,
  output logic [1:0]          cs_chunk,
  output logic [31:0]         cs_wdata,
  // route table
  output logic                rt_we,
  output logic [RT_AW-1:0]    rt_index,
  output route_t              rt_wdata,
  // period and run
  output logic                ctrl_we,
  output logic                ctrl_run,
  output logic [15:0]         ctrl_period,
  // table-unit descriptors and DRAM writes
  output logic                desc_we,
  output logic [DESC_AW-1:0]  desc_idx,
  output logic [1:0]          desc_field,
  output logic [31:0]         desc_wdata,
  output logic                dram_wvalid,
  output logic [SADDR_W-1:0]  dram_waddr,
  output logic [WORD_W-1:0]   dram_wdata,
  input  logic                dram_wready,
  // released coefficient writes to the register banks
  output logic                coef_wvalid,
  output opnd_t               coef_wdst,
  output logic [WORD_W-1:0]   coef_wdata,
  input  logic                coef_wready,
  // activity
  output logic                ev_msg,
  output logic                ev_overflow,
  output logic                ev_activate
);

  // ------------------------------------------------------ deserialiser
  logic              rx_busy;
  logic [5:0]        rx_cnt;
  logic [63:0]       rx_sr;
  logic [63:0]       msg;
  logic              msg_done;
  hhdr_t             hdr;
  logic [31:0]       dat;
  logic              mine;

  always_comb begin
    msg      = {rx_sr[62:0], hbit};
    msg_done = rx_busy && hbit_valid && (rx_cnt == 6'd63);
    hdr      = hhdr_t'(msg[63:32]);
    dat      = msg[31:0];
    mine     = msg_done && (hdr.node == node_id || hdr.node == NODE_BCAST);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_busy <= 1'b0;
      rx_cnt  <= '0;
      rx_sr   <= '0;
    end else if (hbit_valid) begin
      if (!rx_busy) begin
        rx_busy <= hbit;          // start bit
        rx_cnt  <= '0;
      end else begin
        rx_sr   <= msg;
        rx_cnt  <= rx_cnt + 6'd1;
        if (rx_cnt == 6'd63) rx_busy <= 1'b0;
      end
    end
  end

  // ------------------------------------------------ coefficient buffer
  logic [COEF_DEPTH-1:0][BANK_AW+1:0] cb_dst;
  logic [COEF_DEPTH-1:0][WORD_W-1:0]  cb_dat;
  logic [PW-1:0] wp, rp, cp;
  logic          cb_full, cb_pop, cb_push;
  logic          dram_pend;

  assign cb_full     = (wp - rp) == PW'(COEF_DEPTH);
  assign coef_wvalid = drain_en && (rp != cp);
  assign coef_wdst   = opnd_t'(cb_dst[rp[PW-2:0]]);
  assign coef_wdata  = cb_dat[rp[PW-2:0]];
  assign cb_pop      = coef_wvalid && coef_wready;
  assign cb_push     = mine && hdr.cmd == HC_COEF && !cb_full;
  assign dram_wvalid = drain_en && dram_pend;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; cp <= '0;
      cb_dst <= '0; cb_dat <= '0;
      dram_pend <= 1'b0; dram_waddr <= '0; dram_wdata <= '0;
      ev_overflow <= 1'b0; ev_activate <= 1'b0; ev_msg <= 1'b0;
    end else begin
      ev_overflow <= 1'b0;
      ev_activate <= 1'b0;
      ev_msg      <= mine;
      if (cb_push) begin
        cb_dst[wp[PW-2:0]] <= hdr.addr[BANK_AW+1:0];
        cb_dat[wp[PW-2:0]] <= dat;
        wp <= wp + PW'(1);
      end
      if (cb_pop) rp <= rp + PW'(1);
      if (mine && hdr.cmd == HC_ACTIVATE) begin
        cp <= wp;
        ev_activate <= 1'b1;
      end
      if (mine && hdr.cmd == HC_COEF && cb_full) ev_overflow <= 1'b1;

      if (dram_wvalid && dram_wready) dram_pend <= 1'b0;
      if (mine && hdr.cmd == HC_DRAM_WR) begin
        if (dram_pend && !(dram_wvalid && dram_wready)) begin
          ev_overflow <= 1'b1;
        end else begin
          dram_pend  <= 1'b1;
          dram_waddr <= hdr.addr[SADDR_W-1:0];
          dram_wdata <= dat;
        end
      end
    end
  end

  // ------------------------------------------------- direct writes
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cs_we <= 1'b0; rt_we <= 1'b0; ctrl_we <= 1'b0; desc_we <= 1'b0;
      cs_index <= '0; cs_chunk <= '0; cs_wdata <= '0;
      rt_index <= '0; rt_wdata <= '0;
      ctrl_run <= 1'b0; ctrl_period <= '0;
      desc_idx <= '0; desc_field <= '0; desc_wdata <= '0;
    end else begin
      cs_we   <= mine && hdr.cmd == HC_CS_WR;
      rt_we   <= mine && hdr.cmd == HC_RT_WR;
      ctrl_we <= mine && hdr.cmd == HC_CTRL;
      desc_we <= mine && hdr.cmd == HC_DESC_WR;
      if (mine) begin
        cs_index    <= hdr.addr[CS_AW+1:2];
        cs_chunk    <= hdr.addr[1:0];
        cs_wdata    <= dat;
        rt_index    <= hdr.addr[RT_AW-1:0];
        rt_wdata    <= route_t'(dat[ROUTE_W-1:0]);
        ctrl_run    <= dat[16];
        ctrl_period <= dat[15:0];
        desc_idx    <= hdr.addr[DESC_AW+1:2];
        desc_field  <= hdr.addr[1:0];
        desc_wdata  <= dat;
      end
    end
  end

endmodule

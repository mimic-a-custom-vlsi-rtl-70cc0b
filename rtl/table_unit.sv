// table_unit: delay-line and table-lookup unit with its DRAM controller.
//
// Delay lines and tables live in the node's external 256K x 4-bit DRAM,
// 32K samples of 32 bits.  The unit keeps a set of descriptors (base,
// length, current pointer, mode, lookup size) and performs one operation at
// a time for the program:
//   TM_DELAY   y = line[ptr], then line[ptr] = x, ptr = (ptr+1) mod len:
//              a delay line of len samples
//   TM_LOOKUP  y = table[index], index = top `size` bits of x taken as an
//              offset-binary number (x = -1 gives 0): a table lookup f(x)
//   TM_WAVE    y = table[ptr], ptr = (ptr+1) mod len: a wave table g(t)
// and, when the node is idle, single sample writes for the host to fill
// tables.
//
// DRAM cycle: a sample address splits into a 9-bit row (sample[14:6]) and
// 9-bit column ({sample[5:0], nibble}), so all eight nibbles of a sample
// share a row.  One operation takes eleven clocks, the document's number:
// a row-address clock, eight page-mode nibble clocks (least significant
// nibble first) and two precharge clocks.  A delay-line nibble clock reads
// the old nibble and writes the new one (read-modify-write), so a delay
// operation costs no more than a lookup.  With 400 clocks per sample period
// that allows 36 operations per period.  The pins are the 16 DRAM
// control pins of the chip: 9 address, RAS, CAS, WE and 4 data (data shown
// here as separate in/out/enable, the pad being outside the logic).
// Descriptor layout, index mapping, nibble order and the timing inside the
// eleven clocks are this design's choices; DRAM refresh is not done.
//
// Interface: go starts an operation on descriptor desc with operand x.  It is
// taken while the unit is idle or in the last of the eleven clocks of the
// running operation, so operations can follow each other every eleven
// clocks; ready_next tells the program side one clock ahead that a go will
// be taken.  busy is high while an operation runs.  The result is complete
// after the eighth nibble clock and goes into y then, two clocks before the
// operation ends; y_valid is high when y holds the result of the most
// recently started operation, and y keeps it until the next result.
module table_unit
  import mimic_pkg::*;
#(
  parameter int unsigned NDESC = 64,
  localparam int unsigned DW   = $clog2(NDESC)
) (
  input  logic                clk,
  input  logic                rst_n,
  // operations from the program
  input  logic                go,
  input  logic [DW-1:0]       desc,
  input  logic [WORD_W-1:0]   x,
  output logic [WORD_W-1:0]   y,
  output logic                busy,
  output logic                ready_next,
  output logic                y_valid,
  // descriptor and DRAM writes from the host interface
  input  logic                desc_we,
  input  logic [DW-1:0]       desc_idx,
  input  logic [1:0]          desc_field,
  input  logic [31:0]         desc_wdata,
  input  logic                hw_valid,
  input  logic [SADDR_W-1:0]  hw_addr,
  input  logic [WORD_W-1:0]   hw_data,
  output logic                hw_ready,
  // DRAM pins
  output logic [DRAM_AW-1:0]  dram_addr,
  output logic                dram_ras_n,
  output logic                dram_cas_n,
  output logic                dram_we_n,
  output logic [3:0]          dram_dq_out,
  output logic                dram_dq_oe,
  input  logic [3:0]          dram_dq_in,
  // activity
  output logic                ev_op
);

  localparam int unsigned LAST_STEP = 10;   // steps 0..10: eleven clocks

  desc_t               dtab [NDESC];
  logic [3:0]          step;
  logic [SADDR_W-1:0]  sa;
  logic [WORD_W-1:0]   wd, rd;
  logic                do_rd, do_wr;

  // ------------------------------------------------ operation start
  desc_t               dsel;
  logic [SADDR_W-1:0]  idx, nptr, start_sa;
  logic [WORD_W-1:0]   xo;
  logic                start_go, start_hw;

  always_comb begin
    dsel = dtab[desc];
    xo   = x ^ 32'h8000_0000;
    idx  = SADDR_W'(xo >> (6'd32 - 6'(dsel.size)));
    if (dsel.size == 4'd0) idx = '0;
    nptr = (dsel.ptr + SADDR_W'(1) >= dsel.len) ? '0 : dsel.ptr + SADDR_W'(1);
    start_sa = (dsel.mode == TM_LOOKUP) ? dsel.base + idx : dsel.base + dsel.ptr;
    start_go = go && (!busy || step == 4'(LAST_STEP));
    start_hw = hw_valid && !busy && !go;
  end

  assign hw_ready   = start_hw;
  assign ready_next = !busy || step >= 4'(LAST_STEP - 1);
  assign y_valid    = !busy || step > 4'd8;
  assign ev_op    = start_go;

  always_ff @(posedge clk) begin
    if (desc_we) begin
      case (desc_field)
        2'd0: dtab[desc_idx].base <= desc_wdata[SADDR_W-1:0];
        2'd1: dtab[desc_idx].len  <= desc_wdata[SADDR_W-1:0];
        2'd2: dtab[desc_idx].ptr  <= desc_wdata[SADDR_W-1:0];
        default: begin
          dtab[desc_idx].mode <= tmode_e'(desc_wdata[5:4]);
          dtab[desc_idx].size <= desc_wdata[3:0];
        end
      endcase
    end else if (start_go && dsel.mode != TM_LOOKUP) begin
      dtab[desc].ptr <= nptr;
    end
  end

  // ------------------------------------------------ DRAM sequence
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      step  <= '0;
      sa    <= '0;
      wd    <= '0;
      rd    <= '0;
      y     <= '0;
      do_rd <= 1'b0;
      do_wr <= 1'b0;
    end else if (!busy || start_go) begin
      if (start_go) begin
        busy  <= 1'b1;
        step  <= '0;
        sa    <= start_sa;
        wd    <= x;
        do_rd <= 1'b1;
        do_wr <= (dsel.mode == TM_DELAY);
      end else if (start_hw) begin
        busy  <= 1'b1;
        step  <= '0;
        sa    <= hw_addr;
        wd    <= hw_data;
        do_rd <= 1'b0;
        do_wr <= 1'b1;
      end
    end else begin
      if (step >= 4'd1 && step <= 4'd8 && do_rd)
        rd[{3'(step - 4'd1), 2'b00} +: 4] <= dram_dq_in;
      if (step == 4'd8 && do_rd) y <= {dram_dq_in, rd[27:0]};
      if (step == 4'(LAST_STEP)) busy <= 1'b0;
      step <= step + 4'd1;
    end
  end

  // pins are decoded from the registered step
  always_comb begin
    dram_ras_n  = 1'b1;
    dram_cas_n  = 1'b1;
    dram_we_n   = 1'b1;
    dram_addr   = '0;
    dram_dq_out = '0;
    dram_dq_oe  = 1'b0;
    if (busy) begin
      if (step == 4'd0) begin
        dram_ras_n = 1'b0;
        dram_addr  = sa[SADDR_W-1:6];
      end else if (step <= 4'd8) begin
        dram_ras_n  = 1'b0;
        dram_cas_n  = 1'b0;
        dram_addr   = {sa[5:0], 3'(step - 4'd1)};
        dram_we_n   = !do_wr;
        dram_dq_oe  = do_wr;
        dram_dq_out = wd[{3'(step - 4'd1), 2'b00} +: 4];
      end
    end
  end

endmodule

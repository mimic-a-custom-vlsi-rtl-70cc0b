// ctrl_store: control store (program store) and sequencer of a MIMIC node.
//
// A node's program has no branches: it is run from its first instruction
// once in every sample period, and the same program repeats until the host
// replaces it.  The sequencer keeps a free-running cycle counter over the
// sample period (400 clocks at 20 MHz for a 50 kHz sample rate, the
// document's numbers).  When the counter wraps, the program counter goes
// back to 0 and the program starts again; the instruction marked "last"
// ends it for the period.  If the program is still running at the wrap it
// has overrun the period: ev_overrun pulses and the program restarts anyway.
//
// Because every node counts the same sample period from the common reset,
// the cycle counters of all nodes stay aligned; the network route table is
// indexed by this counter.  Period and run changes from the host are held
// and take effect at the next wrap so that the counters stay aligned as long
// as the change reaches every node within one period.
//
// The host writes the store in 32-bit chunks (chunk 0 = bits 31:0).  The
// store depth (512 words) and the chunked write are this design's choices;
// the document gives only that the host loads the program before execution
// and that it is repeated once per sample time.
//
// Interface: instr is valid while instr_valid; the AR unit raises
// instr_accept when it has taken it.  cycle counts 0..period-1.
module ctrl_store
  import mimic_pkg::*;
#(
  parameter int unsigned DEPTH      = 512,
  parameter int unsigned PERIOD_DEF = 400,
  localparam int unsigned AW        = $clog2(DEPTH)
) (
  input  logic           clk,
  input  logic           rst_n,
  // host writes
  input  logic           cs_we,
  input  logic [AW-1:0]  cs_index,
  input  logic [1:0]     cs_chunk,
  input  logic [31:0]    cs_wdata,
  input  logic           ctrl_we,
  input  logic           ctrl_run,
  input  logic [15:0]    ctrl_period,
  // instruction stream
  output instr_t         instr,
  output logic           instr_valid,
  input  logic           instr_accept,
  // timing
  output logic [15:0]    cycle,
  output logic           running,      // a program has been started
  output logic           frame_start,  // first cycle of a sample period
  output logic           ev_overrun
);

  logic [INSTR_W-1:0] mem [DEPTH];
  logic [AW-1:0]      pc;
  logic               active;
  logic [15:0]        period_q, period_nx;
  logic               run_nx;
  logic               wrap;

  always_ff @(posedge clk) begin
    if (cs_we) begin
      case (cs_chunk)
        2'd0:    mem[cs_index][31:0]          <= cs_wdata;
        2'd1:    mem[cs_index][63:32]         <= cs_wdata;
        default: mem[cs_index][INSTR_W-1:64]  <= cs_wdata[INSTR_W-65:0];
      endcase
    end
  end

  assign instr       = instr_t'(mem[pc]);
  assign instr_valid = active;
  assign wrap        = (cycle >= period_q - 16'd1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cycle       <= '0;
      period_q    <= 16'(PERIOD_DEF);
      period_nx   <= 16'(PERIOD_DEF);
      run_nx      <= 1'b0;
      running     <= 1'b0;
      active      <= 1'b0;
      pc          <= '0;
      frame_start <= 1'b0;
      ev_overrun  <= 1'b0;
    end else begin
      if (ctrl_we) begin
        period_nx <= (ctrl_period < 16'd2) ? 16'd2 : ctrl_period;
        run_nx    <= ctrl_run;
      end
      frame_start <= wrap;
      ev_overrun  <= 1'b0;
      if (wrap) begin
        cycle    <= '0;
        period_q <= period_nx;
        running  <= run_nx;
        active   <= run_nx;
        pc       <= '0;
        ev_overrun <= active && !(instr_accept && instr.last);
      end else begin
        cycle <= cycle + 16'd1;
        if (active && instr_accept) begin
          if (instr.last || pc == AW'(DEPTH - 1)) active <= 1'b0;
          else                                     pc     <= pc + AW'(1);
        end
      end
    end
  end

endmodule

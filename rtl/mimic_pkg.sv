// mimic_pkg: types and constants shared by the MIMIC node.
//
// A MIMIC node is a statically scheduled multiply-add processor: its
// program has no branches and is run once per audio sample period.  Each
// instruction word can start one multiply-add (three operands and one
// result, each a bank/address pair into the four 256-word register banks),
// move one word from the IBUS (network receive register or table-unit
// result) into a bank, move one word from a bank onto the OBUS (to a
// network transmit register or the table unit) and start one table-unit
// operation.  The field layout, the host message format and all encodings
// below are this design's own choices; the document gives the units and the
// buses but not their encodings.
package mimic_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned WORD_W     = 32;   // sample / packet word
  localparam int unsigned NBANKS     = 4;    // MEM1..MEM4
  localparam int unsigned BANK_AW    = 8;    // 256 words per bank
  localparam int unsigned NPORTS     = 6;    // network links per node
  localparam int unsigned PORT_W     = 3;    // encodes 0..NPORTS-1
  localparam int unsigned DESC_AW    = 6;    // 64 table descriptors
  localparam int unsigned SADDR_W    = 15;   // 32K samples of DRAM
  localparam int unsigned DRAM_AW    = 9;    // multiplexed row/column address
  localparam int unsigned CS_CHUNKS  = 3;    // 32-bit host chunks per instruction

  // ------------------------------------------------------------ operands
  typedef struct packed {
    logic [1:0]         bank;
    logic [BANK_AW-1:0] addr;
  } opnd_t;

  // IBUS source of an instruction's bank write
  typedef enum logic [1:0] {
    IB_NONE  = 2'd0,
    IB_NET   = 2'd1,   // receive register of network port ib_port
    IB_TABLE = 2'd2    // result register of the table unit
  } ib_src_e;

  // OBUS destination of an instruction's bank read
  typedef enum logic [1:0] {
    OB_NONE  = 2'd0,
    OB_NET   = 2'd1,   // transmit register of network port ob_port
    OB_TABLE = 2'd2    // operand x of the table operation started now
  } ob_dst_e;

  // One control-store word (79 bits, loaded as three 32-bit chunks).
  typedef struct packed {
    logic                last;     // last instruction of the sample period
    logic                madd_en;  // d <= a + b*c
    opnd_t               a;
    opnd_t               b;
    opnd_t               c;
    opnd_t               d;
    ib_src_e             ib_src;
    logic [PORT_W-1:0]   ib_port;
    opnd_t               ib_dst;
    ob_dst_e             ob_dst;
    logic [PORT_W-1:0]   ob_port;
    opnd_t               ob_src;
    logic                tbl_go;   // start a table-unit operation
    logic [DESC_AW-1:0]  tbl_desc;
  } instr_t;

  localparam int unsigned INSTR_W = $bits(instr_t);

  // ------------------------------------------------------ routing word
  // One route-table entry, used for one clock cycle of the sample period.
  // out_sel: 0 = idle (0), 1..6 = input port 0..5 delayed by one bit time,
  //          7 = this node's transmit shift register for that port.
  // rx_en:   shift the port's input bit into its receive register.
  // host_tap: 0 = none, 1..6 = input port whose bit goes to the host interface.
  typedef struct packed {
    logic [NPORTS-1:0][2:0] out_sel;
    logic [NPORTS-1:0]      rx_en;
    logic [2:0]             host_tap;
  } route_t;

  localparam int unsigned ROUTE_W = $bits(route_t);
  localparam logic [2:0]  SEL_IDLE  = 3'd0;
  localparam logic [2:0]  SEL_LOCAL = 3'd7;

  // ------------------------------------------------------ table unit
  typedef enum logic [1:0] {
    TM_DELAY  = 2'd0,  // y = line[ptr]; line[ptr] = x; ptr++ mod len
    TM_LOOKUP = 2'd1,  // y = table[index(x)]
    TM_WAVE   = 2'd2   // y = table[ptr]; ptr++ mod len
  } tmode_e;

  typedef struct packed {
    logic [SADDR_W-1:0] base;
    logic [SADDR_W-1:0] len;
    logic [SADDR_W-1:0] ptr;
    tmode_e             mode;
    logic [3:0]         size;   // log2 of lookup-table length
  } desc_t;

  // ------------------------------------------------------ host messages
  // A host message on the serial daisy chain is a start bit (1) followed
  // by a 32-bit header and a 32-bit data word, most significant bit first.
  // header = {node[7:0], cmd[3:0], addr[19:0]}; node 8'hFF is broadcast.
  typedef enum logic [3:0] {
    HC_NOP      = 4'd0,
    HC_CS_WR    = 4'd1,  // addr = {index, chunk[1:0]}
    HC_RT_WR    = 4'd2,  // addr = route-table index
    HC_COEF     = 4'd3,  // addr = {bank[1:0], addr[7:0]}: stage a bank write
    HC_ACTIVATE = 4'd4,  // release all staged bank writes
    HC_DESC_WR  = 4'd5,  // addr = {desc, field[1:0]}
    HC_DRAM_WR  = 4'd6,  // addr = sample address
    HC_CTRL     = 4'd7   // data = {run, period[15:0]}
  } hcmd_e;

  typedef struct packed {
    logic [7:0]  node;
    hcmd_e       cmd;
    logic [19:0] addr;
  } hhdr_t;

  localparam logic [7:0] NODE_BCAST = 8'hFF;
  localparam int unsigned HMSG_BITS = 64;

endpackage

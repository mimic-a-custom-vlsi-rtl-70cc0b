// mimic_system: a MIMIC machine, a three-dimensional mesh of MIMIC nodes.
//
// Nodes sit at (x, y, z) with 0 <= x < NX, 0 <= y < NY, 0 <= z < NZ; node
// number n = x + NX*(y + NY*z) is also the number the node answers to in
// host messages.  Every node has six bidirectional bit-serial links, one per
// direction: port 0 = -x, 1 = +x, 2 = -y, 3 = +y, 4 = -z, 5 = +z.  Output
// port p of a node drives input port p^1 of its neighbour in that
// direction.  A link with no neighbour (the faces of the mesh) is brought
// out: ext_in feeds it and ext_out shows it, which is where the host's
// serial lines attach, or where a board closes the mesh into a torus.
// ext_out also shows every inner link; ext_in of an inner link is unused.
// Each node's DRAM chip sits outside, on the dram_* arrays.
//
// The default is the document's low-end machine, a 3 x 3 x 3 cube of 27
// nodes.  With the default boot route (input port 0 to output port 1) the
// host reaches all nodes of an x row through ext_in of the row's -x node.
module mimic_system
  import mimic_pkg::*;
#(
  parameter int unsigned NX         = 3,
  parameter int unsigned NY         = 3,
  parameter int unsigned NZ         = 3,
  parameter int unsigned BANK_WORDS = 256,
  parameter int unsigned CS_DEPTH   = 512,
  parameter int unsigned RT_DEPTH   = 512,
  parameter int unsigned PERIOD     = 400,
  parameter int unsigned NDESC      = 64,
  parameter int unsigned COEF_DEPTH = 16,
  localparam int unsigned N         = NX * NY * NZ
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic [N-1:0][NPORTS-1:0]       ext_in,
  output logic [N-1:0][NPORTS-1:0]       ext_out,
  output logic [N-1:0][DRAM_AW-1:0]      dram_addr,
  output logic [N-1:0]                   dram_ras_n,
  output logic [N-1:0]                   dram_cas_n,
  output logic [N-1:0]                   dram_we_n,
  output logic [N-1:0][3:0]              dram_dq_out,
  output logic [N-1:0]                   dram_dq_oe,
  input  logic [N-1:0][3:0]              dram_dq_in
);

  logic [N-1:0][NPORTS-1:0] nin, nout;

  assign ext_out = nout;

  // neighbour of node (x,y,z) through port p, or -1 on a face
  function automatic int neighbour(int x, int y, int z, int p);
    int nx, ny, nz;
    nx = x; ny = y; nz = z;
    case (p)
      0: nx = x - 1;
      1: nx = x + 1;
      2: ny = y - 1;
      3: ny = y + 1;
      4: nz = z - 1;
      default: nz = z + 1;
    endcase
    if (nx < 0 || nx >= int'(NX) || ny < 0 || ny >= int'(NY) || nz < 0 || nz >= int'(NZ))
      return -1;
    return nx + int'(NX) * (ny + int'(NY) * nz);
  endfunction

  for (genvar gz = 0; gz < NZ; gz++) begin : g_z
    for (genvar gy = 0; gy < NY; gy++) begin : g_y
      for (genvar gx = 0; gx < NX; gx++) begin : g_x
        localparam int ID = gx + NX * (gy + NY * gz);
        for (genvar p = 0; p < NPORTS; p++) begin : g_link
          localparam int NB = neighbour(gx, gy, gz, p);
          if (NB < 0) begin : g_face
            assign nin[ID][p] = ext_in[ID][p];
          end else begin : g_inner
            assign nin[ID][p] = nout[NB][p ^ 1];
          end
        end
        mimic_node #(
          .BANK_WORDS(BANK_WORDS), .CS_DEPTH(CS_DEPTH), .RT_DEPTH(RT_DEPTH),
          .PERIOD(PERIOD), .NDESC(NDESC), .COEF_DEPTH(COEF_DEPTH)
        ) u_node (
          .clk, .rst_n,
          .node_id(8'(ID)),
          .net_in(nin[ID]), .net_out(nout[ID]),
          .dram_addr(dram_addr[ID]), .dram_ras_n(dram_ras_n[ID]),
          .dram_cas_n(dram_cas_n[ID]), .dram_we_n(dram_we_n[ID]),
          .dram_dq_out(dram_dq_out[ID]), .dram_dq_oe(dram_dq_oe[ID]),
          .dram_dq_in(dram_dq_in[ID])
        );
      end
    end
  end

endmodule

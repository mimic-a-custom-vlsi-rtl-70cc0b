// mimic_tb_pkg: helpers shared by the MIMIC testbenches: instruction and
// host-message builders and an independent reference for the fixed-point
// multiply-add (64-bit integer arithmetic, floor rounding, clipping).
package mimic_tb_pkg;
  import mimic_pkg::*;

  function automatic opnd_t op(input int bank, input int addr);
    opnd_t o;
    o.bank = 2'(bank);
    o.addr = 8'(addr);
    return o;
  endfunction

  function automatic instr_t i_nop();
    instr_t i;
    i = '0;
    return i;
  endfunction

  function automatic instr_t i_madd(input opnd_t d, input opnd_t a, input opnd_t b, input opnd_t c);
    instr_t i;
    i = '0;
    i.madd_en = 1'b1;
    i.a = a; i.b = b; i.c = c; i.d = d;
    return i;
  endfunction

  // reference y = a + b*c
  function automatic logic [31:0] ref_madd(input logic [31:0] a, b, c);
    longint p, q, s;
    p = longint'($signed(b)) * longint'($signed(c));
    q = p / 64'sd2147483648;
    if (p < 0 && q * 64'sd2147483648 != p) q = q - 1;
    s = longint'($signed(a)) + q;
    if (s > 64'sd2147483647)  s = 64'sd2147483647;
    if (s < -64'sd2147483648) s = -64'sd2147483648;
    return s[31:0];
  endfunction

  function automatic logic [63:0] hmsg(input int node, input hcmd_e cmd, input int addr,
                                      input logic [31:0] data);
    hhdr_t h;
    h.node = 8'(node);
    h.cmd  = cmd;
    h.addr = 20'(addr);
    return {h, data};
  endfunction

  // fixed-point helpers
  function automatic logic [31:0] q31(input real v);
    return 32'($rtoi(v * 2147483648.0));
  endfunction
endpackage

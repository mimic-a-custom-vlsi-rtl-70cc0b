// Testbench for madd_unit: checks y = a + b*c in signed fixed point with
// 31 fraction bits against a reference computed with 64-bit integers
// (product shifted right by 31 with floor rounding, then clipped), over
// directed corner cases and random operands.  Combinational: no clock.
module tb_madd_unit;
  logic [31:0] a, b, c, y;
  logic        sat;
  int checks = 0, failures = 0;

  madd_unit dut (.a, .b, .c, .y, .sat);

  function automatic longint floor_div_2_31(longint p);
    longint q;
    q = p / 64'sd2147483648;
    if (p < 0 && q * 64'sd2147483648 != p) q = q - 1;
    return q;
  endfunction

  task automatic check(input logic [31:0] ta, tb_, tc);
    longint s, e;
    logic   esat;
    a = ta; b = tb_; c = tc;
    #1;
    s = longint'($signed(ta)) + floor_div_2_31(longint'($signed(tb_)) * longint'($signed(tc)));
    esat = 1'b0;
    if (s > 64'sd2147483647)       begin e = 64'sd2147483647;  esat = 1'b1; end
    else if (s < -64'sd2147483648) begin e = -64'sd2147483648; esat = 1'b1; end
    else e = s;
    checks++;
    if (y !== e[31:0] || sat !== esat) begin
      failures++;
      $display("FAIL a=%h b=%h c=%h y=%h exp=%h sat=%b", ta, tb_, tc, y, e[31:0], sat);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32'h0, 32'h4000_0000, 32'h4000_0000);   // 0.5*0.5 = 0.25
    check(32'h1000_0000, 32'hC000_0000, 32'h4000_0000);
    check(32'h0, 32'h8000_0000, 32'h8000_0000);   // -1 * -1 clips
    check(32'h7FFF_FFFF, 32'h4000_0000, 32'h4000_0000);
    check(32'h8000_0000, 32'hC000_0000, 32'h4000_0000);
    check(32'h0, 32'hFFFF_FFFF, 32'h0000_0001);   // floor of a tiny negative
    for (int i = 0; i < 2000; i++) check($urandom, $urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

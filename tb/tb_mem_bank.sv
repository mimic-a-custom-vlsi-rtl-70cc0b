// Testbench for mem_bank: fills the 256-word bank with random words, reads
// every word back and checks it one clock after the request, checks that
// rdata holds across write cycles, and mixes random reads and writes
// against a reference array.
module tb_mem_bank;
  logic clk = 0, rst_n = 0, en = 0, we = 0;
  logic [7:0]  addr = 0;
  logic [31:0] wdata = 0, rdata;
  logic [31:0] ref_m [256];
  logic [31:0] hold;
  int checks = 0, failures = 0;

  mem_bank dut (.clk, .rst_n, .en, .we, .addr, .wdata, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic put(input logic [7:0] ad, input logic [31:0] d);
    @(negedge clk); en = 1; we = 1; addr = ad; wdata = d; ref_m[ad] = d;
  endtask

  task automatic get_check(input logic [7:0] ad);
    @(negedge clk); en = 1; we = 0; addr = ad;
    @(negedge clk); en = 0;
    checks++;
    if (rdata !== ref_m[ad]) begin
      failures++; $display("FAIL read %0d got %h exp %h", ad, rdata, ref_m[ad]);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 256; i++) put(8'(i), $urandom);
    for (int i = 0; i < 256; i++) get_check(8'(i));
    // rdata holds while writes go on
    get_check(8'd17);
    hold = ref_m[17];
    put(8'd18, 32'hDEAD_BEEF);
    put(8'd17, ~hold);
    @(negedge clk); en = 0;
    checks++;
    if (rdata !== hold) begin
      failures++; $display("FAIL rdata changed by a write");
    end
    for (int i = 0; i < 1000; i++) begin
      if ($urandom_range(1, 0) == 1) put(8'($urandom), $urandom);
      else get_check(8'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Testbench of the register file against a shadow array: random writes and
// reads on both ports, register 0 held at zero, and a read of the register
// being written returning the new value in the same cycle.
module tb_regfile;

  int checks = 0;
  int failures = 0;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [4:0]  ra1, ra2, wa;
  logic [31:0] rd1, rd2, wd;
  logic        we;
  logic [31:0] shadow [32];

  regfile dut (.clk, .rst_n, .ra1, .rd1, .ra2, .rd2, .we, .wa, .wd);

  function automatic logic [31:0] model(input logic [4:0] a);
    if (a == 0)             return '0;
    if (we && wa == a)      return wd;
    return shadow[a];
  endfunction

  initial begin
    for (int i = 0; i < 32; i++) shadow[i] = '0;
    we = 0; wa = 0; wd = 0; ra1 = 0; ra2 = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      we  = 1'($urandom);
      wa  = 5'($urandom);
      wd  = $urandom;
      ra1 = 5'($urandom);
      ra2 = (i % 3 == 0) ? wa : 5'($urandom);
      #1;
      checks += 2;
      if (rd1 != model(ra1)) begin failures++; $display("FAIL rd1 r%0d %h vs %h", ra1, rd1, model(ra1)); end
      if (rd2 != model(ra2)) begin failures++; $display("FAIL rd2 r%0d %h vs %h", ra2, rd2, model(ra2)); end
      @(posedge clk);
      if (we && wa != 0) shadow[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// Testbench of the carry-select adder section: exhaustive at 4 bits (the
// width of the paper's example), random at 9 and 18 bits, each against
// the sum computed with a plain wide addition.
module tb_csel_adder;

  int checks = 0;
  int failures = 0;

  logic [3:0]  a4, b4, s4;
  logic [8:0]  a9, b9, s9;
  logic [17:0] a18, b18, s18;
  logic        c4, c9, c18, ci4, ci9, ci18;

  csel_adder #(.W(4))  u4  (.a(a4),  .b(b4),  .cin(ci4),  .sum(s4),  .cout(c4));
  csel_adder #(.W(9))  u9  (.a(a9),  .b(b9),  .cin(ci9),  .sum(s9),  .cout(c9));
  csel_adder #(.W(18)) u18 (.a(a18), .b(b18), .cin(ci18), .sum(s18), .cout(c18));

  initial begin
    for (int i = 0; i < 512; i++) begin
      {ci4, a4, b4} = 9'(i);
      #1;
      checks++;
      if ({c4, s4} != 5'(a4 + b4 + ci4)) begin
        failures++;
        $display("FAIL 4-bit %h+%h+%b -> %b %h", a4, b4, ci4, c4, s4);
      end
    end
    for (int i = 0; i < 2000; i++) begin
      a9 = 9'($urandom); b9 = 9'($urandom); ci9 = 1'($urandom);
      a18 = 18'($urandom); b18 = 18'($urandom); ci18 = 1'($urandom);
      if (i < 4) begin a18 = '1; b18 = 18'(i & 1); ci18 = 1'(i >> 1); end
      #1;
      checks += 2;
      if ({c9, s9} != 10'({1'b0, a9} + {1'b0, b9} + 10'(ci9))) begin
        failures++;
        $display("FAIL 9-bit %h+%h+%b", a9, b9, ci9);
      end
      if ({c18, s18} != 19'({1'b0, a18} + {1'b0, b18} + 19'(ci18))) begin
        failures++;
        $display("FAIL 18-bit %h+%h+%b", a18, b18, ci18);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// Testbench of the FAC-like predictor at its default field split (5-bit
// block offset, 9-bit set index, 18-bit tag). The predicted fields are
// compared with a 32-bit addition and FAC_Vali with an independent test of
// whether base + sign-extended offset leaves the 32-bit address space.
// Directed cases exercise the carry chain between the fields and both
// wrap directions.
module tb_fac_predictor;

  int checks = 0;
  int failures = 0;

  logic        en;
  logic [31:0] base, offset, addr;
  logic [4:0]  ofs;
  logic [8:0]  idx;
  logic [17:0] tag;
  logic        vali;

  fac_predictor dut (
    .fac_enable(en), .base(base), .offset(offset),
    .block_ofs(ofs), .pred_index(idx), .pred_tag(tag), .pred_addr(addr), .fac_vali(vali)
  );

  task automatic try(input logic [31:0] b, input logic [15:0] imm, input logic e);
    longint signed wide;
    logic [31:0] sum;
    logic exp_vali;
    base = b;
    offset = {{16{imm[15]}}, imm};
    en = e;
    #1;
    wide = longint'(b) + longint'($signed(imm));
    sum = b + offset;
    exp_vali = e && (wide >= 0) && (wide <= 64'hFFFF_FFFF);
    checks++;
    if ({tag, idx, ofs} != sum || addr != sum || vali != exp_vali) begin
      failures++;
      $display("FAIL base %h off %h en %b: fields %h %h %h addr %h vali %b, expected %h vali %b",
               b, offset, e, tag, idx, ofs, addr, vali, sum, exp_vali);
    end
  endtask

  initial begin
    // carry out of the block offset and of the set index
    try(32'h0000_001F, 16'h0001, 1'b1);
    try(32'h0000_3FFC, 16'h0004, 1'b1);
    try(32'h1234_3FE0, 16'h0020, 1'b1);
    // leaving the address space upwards and downwards
    try(32'hFFFF_FFF0, 16'h0020, 1'b1);
    try(32'h0000_0008, 16'hFFF0, 1'b1);
    try(32'h0000_0010, 16'hFFF0, 1'b1);
    try(32'hFFFF_FFFC, 16'h0004, 1'b1);
    try(32'h0000_1000, 16'h0010, 1'b0);
    for (int i = 0; i < 5000; i++) begin
      logic [31:0] b;
      b = $urandom;
      if (i % 4 == 1) b = 32'hFFFF_0000 | 32'($urandom_range(0, 65535));
      if (i % 4 == 2) b = 32'($urandom_range(0, 65535));
      try(b, 16'($urandom), (i % 16) != 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

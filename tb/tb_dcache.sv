// Testbench of the direct-mapped data cache at its default geometry (16 KiB,
// 32-byte lines, two read ports). A shadow copy of the tag and line of every
// set that has been refilled predicts HIT and DATA of both ports; addresses
// are drawn from a few tags so that hits, misses and conflicting refills
// of the same set all occur. Reset must leave every line invalid.
module tb_dcache;

  int checks = 0;
  int failures = 0;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [31:0]  rd_addr [2];
  logic         rd_hit  [2];
  logic [31:0]  rd_data [2];
  logic         fill_en;
  logic [31:0]  fill_addr;
  logic [255:0] fill_line;

  dcache dut (.clk, .rst_n, .rd_addr, .rd_hit, .rd_data, .fill_en, .fill_addr, .fill_line);

  bit           m_valid [512];
  logic [17:0]  m_tag   [512];
  logic [255:0] m_line  [512];

  function automatic logic [31:0] rand_addr();
    logic [31:0] a;
    a = $urandom;
    a[31:14] = 18'($urandom_range(0, 3)) ^ 18'h2A5A5;
    a[13:5]  = 9'($urandom_range(0, 15)) << 3;  // a few sets
    return a;
  endfunction

  int hits = 0;

  initial begin
    for (int i = 0; i < 512; i++) m_valid[i] = 0;
    fill_en = 0; fill_addr = 0; fill_line = 0;
    rd_addr[0] = 0; rd_addr[1] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      rd_addr[0] = rand_addr();
      rd_addr[1] = (i % 5 == 0) ? rd_addr[0] : rand_addr();
      fill_en = ($urandom_range(0, 3) == 0);
      fill_addr = rand_addr();
      for (int w = 0; w < 8; w++) fill_line[w*32 +: 32] = $urandom;
      #1;
      for (int p = 0; p < 2; p++) begin
        logic [8:0] idx;
        bit exp_hit;
        idx = rd_addr[p][13:5];
        exp_hit = m_valid[idx] && m_tag[idx] == rd_addr[p][31:14];
        checks++;
        if (rd_hit[p] != exp_hit ||
            (exp_hit && rd_data[p] != m_line[idx][rd_addr[p][4:2]*32 +: 32])) begin
          failures++;
          $display("FAIL port %0d addr %h hit %b data %h, expected hit %b", p, rd_addr[p],
                   rd_hit[p], rd_data[p], exp_hit);
        end
        if (exp_hit) hits++;
      end
      @(posedge clk);
      if (fill_en) begin
        m_valid[fill_addr[13:5]] = 1;
        m_tag[fill_addr[13:5]]   = fill_addr[31:14];
        m_line[fill_addr[13:5]]  = fill_line;
      end
    end
    checks++;
    if (hits < 500) begin failures++; $display("FAIL: too few hits (%0d)", hits); end
    // reset invalidates
    @(negedge clk) rst_n = 1'b0; fill_en = 0;
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      rd_addr[0] = rand_addr();
      rd_addr[1] = rand_addr();
      #1;
      checks++;
      if (rd_hit[0] || rd_hit[1]) begin failures++; $display("FAIL: hit after reset"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

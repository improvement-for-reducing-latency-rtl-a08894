// LTAPB size sweep: the same load-heavy loop on eight copies of the
// pipeline, with 4, 16, 32 and 64 LTAPB entries, each in LTAPB-only and in
// hybrid configuration.
//
// The loop runs 12 times over 40 loads at distinct PCs, all with the same,
// never rewritten base register, each followed by an add that uses the
// loaded value. Expectations, derived from the schemes:
//  - every copy retires exactly the reference model's instruction stream;
//  - with 64 entries all 40 loads fit, so every load after the first
//    iteration is served by the LTAPB (11 x 40 = 440) and nothing is evicted;
//  - LTAPB-served loads never decrease as entries grow;
//  - LTAPB only: each load not served by the LTAPB takes the normal path and
//    stalls its consumer once, so stalls = 480 - LTAPB loads;
//  - hybrid: FAC-like serves the rest, so there are no stalls at all.
module tb_ltapb_sweep;
  import lp_pkg::*;

  localparam int NCOPY = 8;
  localparam int NLOADS = 40;
  localparam int ITERS = 12;
  localparam int SIZES [4] = '{4, 16, 32, 64};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  word_t imem [1024];
  int    prog_len = 0;

  function automatic word_t dmem_word(input word_t a);
    return ((a >> 2) * 32'h9E37_79B1) ^ 32'h2468_ACE1;
  endfunction

  // expected retirement stream
  word_t exp_pc   [4096];
  bit    exp_we   [4096];
  reg_t  exp_rd   [4096];
  word_t exp_data [4096];
  int    n_exp = 0;

  int  lt_loads [NCOPY];
  int  stalls   [NCOPY];
  int  evicts   [NCOPY];
  int  bad      [NCOPY];
  int  retired  [NCOPY];
  bit  done     [NCOPY];

  for (genvar g = 0; g < NCOPY; g++) begin : g_copy
    word_t             imem_addr;
    logic              mem_req, mem_valid;
    word_t             mem_addr;
    logic [255:0]      mem_line;
    logic              halted, retire_valid, retire_we;
    word_t             retire_pc, retire_data;
    reg_t              retire_rd;
    load_path_e        retire_path;
    events_t           events;

    hybrid_load_pipeline #(.LT_N(SIZES[g % 4])) dut (
      .clk, .rst_n, .cfg_ltapb_en(1'b1), .cfg_fac_en(1'(g / 4)),
      .imem_addr, .imem_rdata(imem[imem_addr[11:2]]),
      .mem_req, .mem_addr, .mem_valid, .mem_line,
      .halted, .retire_valid, .retire_pc, .retire_we, .retire_rd, .retire_data,
      .retire_path, .events
    );

    // next memory level: two-cycle refill
    int cnt;
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        mem_valid <= 1'b0;
        cnt <= 0;
      end else begin
        mem_valid <= 1'b0;
        if (mem_req && !mem_valid) begin
          if (cnt >= 2) begin
            mem_valid <= 1'b1;
            for (int i = 0; i < 8; i++) mem_line[i*32 +: 32] <= dmem_word(mem_addr + 32'(4 * i));
            cnt <= 0;
          end else cnt <= cnt + 1;
        end
      end
    end

    always @(posedge clk) begin
      if (rst_n && !halted) begin
        if (events.load_use_stall) stalls[g]++;
        if (events.ltapb_evict)    evicts[g]++;
        if (retire_valid) begin
          int k;
          k = retired[g];
          if (k >= n_exp || retire_pc != exp_pc[k] || retire_we != exp_we[k] ||
              (exp_we[k] && (retire_rd != exp_rd[k] || retire_data != exp_data[k])))
            bad[g]++;
          if (retire_path == LP_LTAPB) lt_loads[g]++;
          retired[g]++;
        end
      end
      done[g] = halted;
    end
  end

  task automatic emit(input word_t w);
    imem[prog_len] = w;
    prog_len++;
  endtask

  task automatic reference();
    word_t r [32];
    word_t pc, ins;
    kind_e k;
    for (int i = 0; i < 32; i++) r[i] = '0;
    pc = '0;
    forever begin
      ins = imem[pc[11:2]];
      k = decode_kind(ins);
      exp_pc[n_exp] = pc; exp_we[n_exp] = 0; exp_rd[n_exp] = '0; exp_data[n_exp] = '0;
      if (k == K_ADDU)  begin exp_rd[n_exp] = ins[15:11]; exp_data[n_exp] = r[ins[25:21]] + r[ins[20:16]]; end
      if (k == K_ADDIU) begin exp_rd[n_exp] = ins[20:16]; exp_data[n_exp] = r[ins[25:21]] + sext16(ins[15:0]); end
      if (k == K_LW)    begin exp_rd[n_exp] = ins[20:16];
                              exp_data[n_exp] = dmem_word(r[ins[25:21]] + sext16(ins[15:0])); end
      if ((k == K_ADDU || k == K_ADDIU || k == K_LW) && exp_rd[n_exp] != 0) begin
        exp_we[n_exp] = 1;
        r[exp_rd[n_exp]] = exp_data[n_exp];
      end
      n_exp++;
      if (k == K_HALT) break;
      if (k == K_BNE && r[ins[25:21]] != r[ins[20:16]]) pc = pc + 4 + {sext16(ins[15:0]), 2'b00};
      else pc = pc + 4;
    end
  endtask

  initial begin
    int start;
    for (int i = 0; i < 1024; i++) imem[i] = '0;
    for (int g = 0; g < NCOPY; g++) begin
      lt_loads[g] = 0; stalls[g] = 0; evicts[g] = 0; bad[g] = 0; retired[g] = 0; done[g] = 0;
    end
    emit({OP_ADDIU, 5'd0, 5'd2, 16'h2000});             // r2 = 0x2000
    emit({OP_ADDIU, 5'd0, 5'd20, 16'(ITERS)});          // r20 = loop count
    start = prog_len;
    for (int i = 0; i < NLOADS; i++) begin
      emit({OP_LW, 5'd2, 5'(4 + i % 4), 16'(4 * i)});            // lw r(4+i%4), 4i(r2)
      emit({OP_RTYPE, 5'd10, 5'(4 + i % 4), 5'd10, 11'h021});    // addu r10, r10, r(4+i%4)
    end
    emit({OP_ADDIU, 5'd20, 5'd20, 16'hFFFF});           // r20 -= 1
    emit({OP_BNE, 5'd20, 5'd0, 16'(start - prog_len - 1)});
    emit({OP_HALT, 26'h0});
    reference();

    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int c = 0; c < 20000; c++) begin
      bit all;
      @(posedge clk);
      all = 1;
      for (int g = 0; g < NCOPY; g++) all &= done[g];
      if (all) break;
    end
    @(negedge clk);

    for (int g = 0; g < NCOPY; g++) begin
      string name;
      name = $sformatf("%0d entries, %s", SIZES[g % 4], g / 4 ? "hybrid" : "LTAPB only");
      $display("  %-22s LTAPB loads %4d stalls %4d evictions %4d", name, lt_loads[g], stalls[g], evicts[g]);
      check(done[g], {name, ": halted"});
      check(bad[g] == 0 && retired[g] == n_exp, {name, ": retire stream"});
      if (g / 4 == 0) check(stalls[g] == NLOADS * ITERS - lt_loads[g], {name, ": stalls = loads not served by the LTAPB"});
      else            check(stalls[g] == 0, {name, ": no stalls"});
      if (g % 4 > 0)  check(lt_loads[g] >= lt_loads[g - 1], {name, ": LTAPB loads do not drop with more entries"});
    end
    check(lt_loads[3] == NLOADS * (ITERS - 1) && lt_loads[7] == NLOADS * (ITERS - 1),
          "64 entries: every load after the first iteration is served by the LTAPB");
    check(evicts[3] == 0 && evicts[7] == 0, "64 entries: no evictions");
    check(lt_loads[0] < lt_loads[3], "4 entries serve fewer loads than 64");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

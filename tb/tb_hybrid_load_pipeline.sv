// End-to-end testbench of the hybrid load pipeline, at the top's default
// sizes (64-entry LTAPB, 16 KiB data cache).
//
// A behavioural instruction memory and a behavioural next-level data memory
// (data word = a fixed hash of its address, refill latency programmable)
// surround the pipeline. An instruction-set reference model runs each
// program first and records the sequence of retired instructions (PC,
// destination register, value); every retirement of the pipeline is compared
// with it. Each program runs in the four modes: baseline, LTAPB only, FAC-like
// only and hybrid.
//
// Timing checks:
//  - cycles to halt = retired + 4 (pipeline fill) + 2 per taken branch +
//    load-use stalls + refill stall cycles, so no stall goes unexplained;
//  - directed microbenchmarks check the number of load-use stalls and of
//    LTAPB-served loads against values derived by hand from the schemes:
//    a load followed by its consumer stalls one cycle on the normal path and
//    none on the FAC-like or LTAPB paths.
// Every mechanism of the design must be seen at least once over the run.
module tb_hybrid_load_pipeline;
  import lp_pkg::*;

  localparam int unsigned LINE_W = 256;
  localparam int unsigned IMEM_WORDS = 1024;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              cfg_ltapb_en, cfg_fac_en;
  word_t             imem_addr, imem_rdata;
  logic              mem_req, mem_valid;
  word_t             mem_addr;
  logic [LINE_W-1:0] mem_line;
  logic              halted, retire_valid, retire_we;
  word_t             retire_pc, retire_data;
  reg_t              retire_rd;
  load_path_e        retire_path;
  events_t           events;

  hybrid_load_pipeline dut (
    .clk, .rst_n, .cfg_ltapb_en, .cfg_fac_en,
    .imem_addr, .imem_rdata,
    .mem_req, .mem_addr, .mem_valid, .mem_line,
    .halted, .retire_valid, .retire_pc, .retire_we, .retire_rd, .retire_data,
    .retire_path, .events
  );

  int checks = 0;
  int failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------------------ memories
  word_t imem [IMEM_WORDS];
  int    prog_len;

  assign imem_rdata = imem[imem_addr[11:2]];

  function automatic word_t dmem_word(input word_t a);
    return ((a >> 2) * 32'h9E37_79B1) ^ 32'h2468_ACE1;
  endfunction

  int refill_lat;
  int lat_cnt;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mem_valid <= 1'b0;
      lat_cnt   <= 0;
    end else begin
      mem_valid <= 1'b0;
      if (mem_req && !mem_valid) begin
        if (lat_cnt >= refill_lat) begin
          mem_valid <= 1'b1;
          for (int i = 0; i < LINE_W / 32; i++)
            mem_line[i*32 +: 32] <= dmem_word(mem_addr + 32'(4 * i));
          lat_cnt <= 0;
        end else begin
          lat_cnt <= lat_cnt + 1;
        end
      end
    end
  end

  // ------------------------------------------------------------ encoding
  function automatic word_t e_addu(input int rd, input int rs, input int rt);
    return {OP_RTYPE, 5'(rs), 5'(rt), 5'(rd), 11'h021};
  endfunction
  function automatic word_t e_addiu(input int rt, input int rs, input int imm);
    return {OP_ADDIU, 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic word_t e_lw(input int rt, input int base, input int imm);
    return {OP_LW, 5'(base), 5'(rt), 16'(imm)};
  endfunction
  function automatic word_t e_bne(input int rs, input int rt, input int off);
    return {OP_BNE, 5'(rs), 5'(rt), 16'(off)};
  endfunction
  function automatic word_t e_halt();
    return {OP_HALT, 26'h0};
  endfunction

  task automatic emit(input word_t w);
    imem[prog_len] = w;
    prog_len++;
  endtask

  task automatic clear_prog();
    for (int i = 0; i < IMEM_WORDS; i++) imem[i] = '0;
    prog_len = 0;
  endtask

  // ------------------------------------------------------------ reference model
  localparam int MAXR = 60000;
  word_t exp_pc   [MAXR];
  bit    exp_we   [MAXR];
  reg_t  exp_rd   [MAXR];
  word_t exp_data [MAXR];
  int    n_exp;

  task automatic run_reference();
    word_t r [32];
    word_t pc, ins;
    kind_e k;
    int steps;
    for (int i = 0; i < 32; i++) r[i] = '0;
    pc = '0;
    n_exp = 0;
    steps = 0;
    forever begin
      ins = imem[pc[11:2]];
      k = decode_kind(ins);
      exp_pc[n_exp] = pc;
      exp_we[n_exp] = 1'b0;
      exp_rd[n_exp] = '0;
      exp_data[n_exp] = '0;
      case (k)
        K_ADDU: begin
          exp_rd[n_exp] = ins[15:11];
          exp_data[n_exp] = r[ins[25:21]] + r[ins[20:16]];
        end
        K_ADDIU: begin
          exp_rd[n_exp] = ins[20:16];
          exp_data[n_exp] = r[ins[25:21]] + sext16(ins[15:0]);
        end
        K_LW: begin
          exp_rd[n_exp] = ins[20:16];
          exp_data[n_exp] = dmem_word(r[ins[25:21]] + sext16(ins[15:0]));
        end
        default: ;
      endcase
      if ((k == K_ADDU || k == K_ADDIU || k == K_LW) && exp_rd[n_exp] != 0) begin
        exp_we[n_exp] = 1'b1;
        r[exp_rd[n_exp]] = exp_data[n_exp];
      end
      n_exp++;
      steps++;
      if (k == K_HALT || n_exp >= MAXR) break;
      if (k == K_BNE && r[ins[25:21]] != r[ins[20:16]])
        pc = pc + 4 + {sext16(ins[15:0]), 2'b00};
      else
        pc = pc + 4;
    end
    if (n_exp >= MAXR) $fatal(1, "reference run too long");
  endtask

  // ------------------------------------------------------------ monitors
  bit    running = 1'b0;
  int    cycles, retired, ret_idx, mismatches;
  int    n_lu, n_flush, n_refill, n_busy;
  int    path_cnt [4];
  int    ev_total [17];

  always @(posedge clk) begin
    if (running && rst_n && !halted) begin
      cycles++;
      if (events.load_use_stall) n_lu++;
      if (events.branch_flush)   n_flush++;
      if (events.dcache_refill)  n_refill++;
      if (mem_req)               n_busy++;
      for (int i = 0; i < 17; i++) if (events[i]) ev_total[i]++;
      if (retire_valid) begin
        if (ret_idx >= n_exp ||
            retire_pc != exp_pc[ret_idx] ||
            retire_we != exp_we[ret_idx] ||
            (exp_we[ret_idx] && (retire_rd != exp_rd[ret_idx] ||
                                 retire_data != exp_data[ret_idx]))) begin
          if (mismatches < 5)
            $display("  retire %0d mismatch: pc %h we %0d r%0d=%h, expected pc %h we %0d r%0d=%h",
                     ret_idx, retire_pc, retire_we, retire_rd, retire_data,
                     exp_pc[ret_idx], exp_we[ret_idx], exp_rd[ret_idx], exp_data[ret_idx]);
          mismatches++;
        end
        path_cnt[retire_path]++;
        ret_idx++;
        retired++;
      end
    end
  end

  // Runs the loaded program in one mode; returns load-use stalls and LTAPB loads.
  task automatic run_mode(input bit lt, input bit fac, input int lat, input string name,
                          output int lu, output int lt_loads, output int cyc);
    rst_n = 1'b0;
    cfg_ltapb_en = lt;
    cfg_fac_en = fac;
    refill_lat = lat;
    repeat (3) @(posedge clk);
    cycles = 0; retired = 0; ret_idx = 0; mismatches = 0;
    n_lu = 0; n_flush = 0; n_refill = 0; n_busy = 0;
    for (int i = 0; i < 4; i++) path_cnt[i] = 0;
    running = 1'b1;
    @(negedge clk);
    rst_n = 1'b1;
    while (!halted && cycles < 400000) @(posedge clk);
    @(negedge clk);
    running = 1'b0;
    check(halted, {name, ": halted"});
    check(mismatches == 0 && retired == n_exp, $sformatf("%s: retire stream (%0d mismatches, %0d of %0d)",
          name, mismatches, retired, n_exp));
    check(cycles == retired + 4 + 2 * n_flush + n_lu + n_refill + n_busy,
          $sformatf("%s: cycle account %0d vs %0d+4+2*%0d+%0d+%0d+%0d", name, cycles,
                    retired, n_flush, n_lu, n_refill, n_busy));
    if (!lt) check(path_cnt[LP_LTAPB] == 0, {name, ": no LTAPB loads when disabled"});
    if (!fac) check(path_cnt[LP_FAC] == 0, {name, ": no FAC loads when disabled"});
    lu = n_lu;
    lt_loads = path_cnt[LP_LTAPB];
    cyc = cycles;
    $display("  %-22s cycles %6d retired %6d stalls %4d flush %4d refills %4d paths L/F/N %0d/%0d/%0d",
             name, cycles, retired, n_lu, n_flush, n_refill,
             path_cnt[LP_LTAPB], path_cnt[LP_FAC], path_cnt[LP_NORMAL]);
  endtask

  task automatic run_all_modes(input string name, input int lat,
                               input int exp_lu [4], input int exp_lt [4]);
    int lu, ltl, cyc;
    int cyc_m [4];
    run_reference();
    for (int m = 0; m < 4; m++) begin
      run_mode(m[0], m[1], lat, $sformatf("%s/%s", name,
               m == 0 ? "base" : m == 1 ? "ltapb" : m == 2 ? "fac" : "hybrid"), lu, ltl, cyc);
      cyc_m[m] = cyc;
      if (exp_lu[m] >= 0)
        check(lu == exp_lu[m], $sformatf("%s mode %0d: load-use stalls %0d, expected %0d",
                                         name, m, lu, exp_lu[m]));
      if (exp_lt[m] >= 0)
        check(ltl == exp_lt[m], $sformatf("%s mode %0d: LTAPB loads %0d, expected %0d",
                                          name, m, ltl, exp_lt[m]));
    end
    if (exp_lu[0] >= 0 && exp_lu[2] >= 0)
      check(cyc_m[0] - cyc_m[2] == exp_lu[0] - exp_lu[2],
            $sformatf("%s: FAC-like saves %0d cycles, expected %0d", name,
                      cyc_m[0] - cyc_m[2], exp_lu[0] - exp_lu[2]));
  endtask

  // ------------------------------------------------------------ programs
  // Straight line: 8 x {lw r1,0(r2); addu r3,r3,r1}.
  task automatic prog_straight();
    clear_prog();
    emit(e_addiu(2, 0, 'h100));
    for (int i = 0; i < 8; i++) begin
      emit(e_lw(1, 2, 0));
      emit(e_addu(3, 3, 1));
    end
    emit(e_halt());
  endtask

  // Loop of 10: {lw r1,0(r2); addu r3,r3,r1; addiu r4,r4,-1; bne r4,r0,loop}.
  task automatic prog_loop();
    clear_prog();
    emit(e_addiu(2, 0, 'h200));
    emit(e_addiu(4, 0, 10));
    emit(e_lw(1, 2, 0));
    emit(e_addu(3, 3, 1));
    emit(e_addiu(4, 4, -1));
    emit(e_bne(4, 0, -4));
    emit(e_halt());
  endtask

  // Wrapping address, port conflict, dependency invalidation, forwarding.
  task automatic prog_directed();
    clear_prog();
    emit(e_addiu(2, 0, 'h300));
    emit(e_addiu(3, 0, 'h400));
    emit(e_addiu(9, 0, -16));       // 0xFFFF_FFF0
    emit(e_addiu(4, 0, 6));
    emit(e_lw(10, 9, 32));          // wraps to 0x10: FAC_Vali low
    emit(e_lw(11, 2, 8));           // in EXE while the wrapping load holds MEM
    emit(e_addu(12, 10, 11));
    emit(e_lw(13, 3, 0));           // base r3 changes every iteration
    emit(e_addiu(3, 3, 4));
    emit(e_addu(14, 13, 12));
    emit(e_addiu(4, 4, -1));
    emit(e_bne(4, 0, -8));
    emit(e_halt());
  endtask

  // 70 loads at distinct PCs, run twice: more loads than LTAPB entries.
  task automatic prog_many_loads();
    clear_prog();
    emit(e_addiu(2, 0, 'h800));
    emit(e_addiu(4, 0, 2));
    for (int i = 0; i < 70; i++) emit(e_lw(5 + i % 8, 2, 4 * i));
    emit(e_addiu(4, 4, -1));
    emit(e_bne(4, 0, -72));
    emit(e_halt());
  endtask

  // Random loops of loads, adds and base register updates.
  task automatic prog_random(input int nblocks);
    int start, body, sel, rd, rs, rt;
    clear_prog();
    emit(e_addiu(1, 0, 'h1000));
    emit(e_addiu(2, 0, 'h1400));
    emit(e_addiu(3, 0, 'h1800));
    emit(e_addiu(9, 0, -16));
    for (int b = 0; b < nblocks; b++) begin
      emit(e_addiu(20, 0, 1 + $urandom_range(0, 5)));
      start = prog_len;
      body = $urandom_range(3, 12);
      for (int j = 0; j < body; j++) begin
        sel = $urandom_range(0, 99);
        if (sel < 35) begin
          rd = ($urandom_range(0, 9) == 0) ? $urandom_range(1, 3) : $urandom_range(4, 8);
          rs = ($urandom_range(0, 4) == 0) ? $urandom_range(4, 8) : $urandom_range(1, 3);
          emit(e_lw(rd, rs, 4 * $urandom_range(0, 63) - 64));
        end else if (sel < 60) begin
          emit(e_addu($urandom_range(4, 12), $urandom_range(0, 12), $urandom_range(0, 12)));
        end else if (sel < 85) begin
          rd = $urandom_range(1, 8);
          emit(e_addiu(rd, (rd <= 3) ? rd : $urandom_range(0, 12),
                       4 * $urandom_range(0, 8) - 16));
        end else begin
          emit(e_lw($urandom_range(4, 8), 9, 4 * $urandom_range(0, 15)));
        end
      end
      emit(e_addiu(20, 20, -1));
      emit(e_bne(20, 0, start - prog_len - 1));
    end
    emit(e_halt());
  endtask

  // ------------------------------------------------------------ main
  localparam string EV_NAME [17] = '{
    "retire", "fwd_memwb", "fwd_exmem", "branch_flush", "dcache_refill",
    "load_use_stall", "normal_load", "fac_port_busy", "fac_invalid", "fac_hit",
    "ltapb_dc_miss", "ltapb_fill", "ltapb_dep_kill", "ltapb_release", "ltapb_evict",
    "ltapb_reserve", "ltapb_hit"};

  initial begin
    int lu4 [4];
    int lt4 [4];
    for (int i = 0; i < 17; i++) ev_total[i] = 0;
    cfg_ltapb_en = 1'b0;
    cfg_fac_en = 1'b0;
    refill_lat = 2;

    // modes: 0 base, 1 LTAPB, 2 FAC-like, 3 hybrid
    prog_straight();
    lu4 = '{8, 8, 0, 0};  lt4 = '{0, 0, 0, 0};
    run_all_modes("straight", 3, lu4, lt4);

    prog_loop();
    lu4 = '{10, 1, 0, 0}; lt4 = '{0, 9, 0, 9};
    run_all_modes("loop", 3, lu4, lt4);

    prog_directed();
    lu4 = '{-1, -1, -1, -1}; lt4 = '{0, -1, 0, -1};
    run_all_modes("directed", 1, lu4, lt4);

    prog_many_loads();
    lu4 = '{0, 0, 0, 0}; lt4 = '{0, -1, 0, -1};
    run_all_modes("many_loads", 0, lu4, lt4);

    lu4 = '{-1, -1, -1, -1}; lt4 = '{0, -1, 0, -1};
    for (int s = 0; s < 24; s++) begin
      prog_random(16);
      run_all_modes($sformatf("random%0d", s), $urandom_range(0, 4), lu4, lt4);
    end

    for (int i = 0; i < 17; i++) begin
      $display("  mechanism %-15s seen %0d times", EV_NAME[i], ev_total[i]);
      check(ev_total[i] > 0, {"mechanism never seen: ", EV_NAME[i]});
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

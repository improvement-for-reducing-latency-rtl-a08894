// Testbench of the LTAPB, with 4 entries so that replacement is reached
// quickly (the widths keep their defaults).
//
// Directed part: miss and reservation, fill and hit with the filled address,
// Ref_Count-driven replacement, release of a non-load, invalidation by a
// write of the base register (also in the same cycle as a lookup and as a
// fill), refill of an invalidated entry, release of a load that overwrites
// its own base register and of a squashed instruction, and refusal to
// reserve when every entry is reserved.
// Random part: loads of four PCs with fixed base registers and random
// register writes, one operation at a time, against a model in which a PC
// hits exactly when it has been filled and its base register not written
// since; the hit must return the last filled address.
module tb_ltapb;

  localparam int N = 4;

  int checks = 0;
  int failures = 0;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        lk_en, lk_hit, lk_reserved, lk_evict;
  logic [63:0] lk_pc, lk_ea;
  logic [1:0]  lk_idx;
  logic        id_en, id_squash, id_has_entry, id_is_load, id_dest_we;
  logic [1:0]  id_idx;
  logic [4:0]  id_base, id_dest;
  logic        id_release, id_dep_kill;
  logic        fill_en, fill_done;
  logic [1:0]  fill_idx;
  logic [63:0] fill_ea;

  ltapb #(.N(N)) dut (
    .clk, .rst_n,
    .lk_en, .lk_pc, .lk_hit, .lk_ea, .lk_reserved, .lk_evict, .lk_idx,
    .id_en, .id_squash, .id_has_entry, .id_idx, .id_is_load, .id_base, .id_dest_we, .id_dest,
    .id_release, .id_dep_kill,
    .fill_en, .fill_idx, .fill_ea, .fill_done
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic idle();
    lk_en = 0; lk_pc = '0;
    id_en = 0; id_squash = 0; id_has_entry = 0; id_idx = 0; id_is_load = 0;
    id_base = 0; id_dest_we = 0; id_dest = 0;
    fill_en = 0; fill_idx = 0; fill_ea = 0;
  endtask

  // One fetch-stage lookup, committed. Returns hit, address, reserved, index.
  task automatic lookup(input logic [63:0] pc, output bit hit, output logic [63:0] ea,
                        output bit rsv, output logic [1:0] idx, output bit evict);
    @(negedge clk);
    idle();
    lk_en = 1; lk_pc = pc;
    #1;
    hit = lk_hit; ea = lk_ea; rsv = lk_reserved; idx = lk_idx; evict = lk_evict;
    @(posedge clk);
  endtask

  // Decode of the instruction that owns entry idx.
  task automatic decode(input bit has, input logic [1:0] idx, input bit is_load,
                        input int base, input bit we, input int dest,
                        output bit rel, output bit kill);
    @(negedge clk);
    idle();
    id_en = 1; id_has_entry = has; id_idx = idx; id_is_load = is_load;
    id_base = 5'(base); id_dest_we = we; id_dest = 5'(dest);
    #1;
    rel = id_release; kill = id_dep_kill;
    @(posedge clk);
  endtask

  task automatic fill(input logic [1:0] idx, input logic [63:0] ea, output bit done);
    @(negedge clk);
    idle();
    fill_en = 1; fill_idx = idx; fill_ea = ea;
    #1;
    done = fill_done;
    @(posedge clk);
  endtask

  // A complete load: lookup, decode as a load with base register, fill.
  task automatic run_load(input logic [63:0] pc, input int base, input int dest,
                          input logic [63:0] ea, output bit hit, output logic [63:0] got);
    bit rsv, ev, rel, kill, done;
    logic [1:0] idx;
    lookup(pc, hit, got, rsv, idx, ev);
    if (!hit) begin
      decode(rsv, idx, 1, base, 1, dest, rel, kill);
      if (rsv && !rel) fill(idx, ea, done);
    end
  endtask

  task automatic write_reg(input int r, output bit kill);
    bit rel;
    decode(0, 0, 0, 0, 1, r, rel, kill);
  endtask

  initial begin
    bit hit, rsv, ev, rel, kill, done;
    logic [63:0] ea;
    logic [1:0] idx, idx_a;
    logic [63:0] model_ea [4];
    bit model_valid [4];
    int base_of [4];

    idle();
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // miss, reservation, fill, hit
    lookup(64'h100, hit, ea, rsv, idx_a, ev);
    check(!hit && rsv && !ev, "first lookup misses and reserves");
    decode(1, idx_a, 1, 2, 1, 7, rel, kill);
    check(!rel && !kill, "load keeps its reservation");
    fill(idx_a, 64'hABC0, done);
    check(done, "fill of reserved entry accepted");
    lookup(64'h100, hit, ea, rsv, idx, ev);
    check(hit && ea == 64'hABC0 && idx == idx_a, "hit returns the filled address");
    lookup(64'h100, hit, ea, rsv, idx, ev);
    lookup(64'h100, hit, ea, rsv, idx, ev);     // Ref_Count of 0x100 now 3

    // non-load releases its reservation
    lookup(64'h200, hit, ea, rsv, idx, ev);
    check(!hit && rsv, "non-load reserves");
    decode(1, idx, 0, 0, 1, 9, rel, kill);
    check(rel && !kill, "non-load releases");
    lookup(64'h200, hit, ea, rsv, idx, ev);
    check(!hit && rsv, "released entry does not hit");
    decode(1, idx, 0, 0, 0, 0, rel, kill);

    // dependency invalidation and refill of the entry
    write_reg(2, kill);
    check(kill, "write of base register r2 invalidates");
    lookup(64'h100, hit, ea, rsv, idx, ev);
    check(!hit && rsv && idx == idx_a, "invalidated entry misses and is reused");
    decode(1, idx, 1, 2, 1, 7, rel, kill);
    fill(idx, 64'hABD0, done);
    lookup(64'h100, hit, ea, rsv, idx, ev);
    check(hit && ea == 64'hABD0, "entry valid again with the new address");

    // same-cycle bypass: writer in ID, load in IF
    @(negedge clk);
    idle();
    lk_en = 1; lk_pc = 64'h100;
    id_en = 1; id_dest_we = 1; id_dest = 5'd2;
    #1;
    check(!lk_hit && lk_reserved, "lookup behind a writer of the base register misses");
    idx = lk_idx;
    @(posedge clk);
    decode(1, idx, 1, 2, 1, 7, rel, kill);
    // fill killed by a writer of the base register in the same cycle
    @(negedge clk);
    idle();
    fill_en = 1; fill_idx = idx; fill_ea = 64'hDEAD;
    id_en = 1; id_dest_we = 1; id_dest = 5'd2;
    #1;
    check(!fill_done && id_dep_kill, "fill dropped when its base register is written");
    @(posedge clk);
    lookup(64'h100, hit, ea, rsv, idx, ev);
    check(!hit, "dropped fill leaves the entry invalid");
    decode(1, idx, 1, 2, 1, 7, rel, kill);
    fill(idx, 64'hABE0, done);

    // load that overwrites its own base register is released
    lookup(64'h300, hit, ea, rsv, idx, ev);
    decode(1, idx, 1, 4, 1, 4, rel, kill);
    check(rel, "load overwriting its base releases its entry");
    // squashed instruction releases
    lookup(64'h304, hit, ea, rsv, idx, ev);
    @(negedge clk);
    idle();
    id_squash = 1; id_has_entry = 1; id_idx = idx;
    #1;
    check(id_release, "squashed instruction releases its entry");
    @(posedge clk);

    // fill all four entries, then replace the one with the lowest Ref_Count
    run_load(64'h400, 5, 8, 64'h4000, hit, ea);
    run_load(64'h500, 6, 8, 64'h5000, hit, ea);
    run_load(64'h600, 10, 8, 64'h6000, hit, ea);
    run_load(64'h400, 5, 8, 64'h4000, hit, ea);
    check(hit && ea == 64'h4000, "0x400 hits");
    run_load(64'h600, 10, 8, 64'h6000, hit, ea);
    check(hit && ea == 64'h6000, "0x600 hits");
    // 0x100 has Ref_Count 3 (well, saturated), 0x400/0x600 have 1, 0x500 has 0
    lookup(64'h700, hit, ea, rsv, idx, ev);
    check(!hit && rsv && ev, "full buffer replaces a valid entry");
    decode(1, idx, 1, 11, 1, 8, rel, kill);
    fill(idx, 64'h7000, done);
    lookup(64'h500, hit, ea, rsv, idx, ev);
    check(!hit, "entry with the lowest Ref_Count was the victim");
    decode(1, idx, 0, 0, 0, 0, rel, kill);
    lookup(64'h100, hit, ea, rsv, idx, ev);
    check(hit && ea == 64'hABE0, "most referenced entry survives");

    // every entry reserved: no reservation possible
    for (int i = 0; i < N; i++) begin
      lookup(64'h900 + 64'(4 * i), hit, ea, rsv, idx, ev);
      check(rsv, "reservation while entries remain");
    end
    lookup(64'hA00, hit, ea, rsv, idx, ev);
    check(!hit && !rsv, "no reservation when all entries are reserved");

    // random part
    @(negedge clk) rst_n = 0;
    idle();
    @(negedge clk) rst_n = 1;
    for (int p = 0; p < 4; p++) begin
      model_valid[p] = 0;
      base_of[p] = p + 1;
      model_ea[p] = 0;
    end
    for (int i = 0; i < 3000; i++) begin
      int p;
      logic [63:0] new_ea;
      p = $urandom_range(0, 3);
      if ($urandom_range(0, 3) == 0) begin
        int r;
        r = $urandom_range(1, 6);
        write_reg(r, kill);
        check(kill == ((model_valid[0] && base_of[0] == r) || (model_valid[1] && base_of[1] == r) ||
                       (model_valid[2] && base_of[2] == r) || (model_valid[3] && base_of[3] == r)),
              $sformatf("random: dependency report for r%0d", r));
        for (int q = 0; q < 4; q++) if (base_of[q] == r) model_valid[q] = 0;
      end else begin
        new_ea = {$urandom, $urandom};
        run_load(64'h1000 + 64'(8 * p), base_of[p], 20, new_ea, hit, ea);
        check(hit == model_valid[p] && (!hit || ea == model_ea[p]),
              $sformatf("random: load %0d hit %b ea %h, model %b %h", p, hit, ea,
                        model_valid[p], model_ea[p]));
        if (!hit) begin
          model_valid[p] = 1;
          model_ea[p] = new_ea;
        end
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

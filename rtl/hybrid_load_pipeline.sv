// Five-stage in-order pipeline with the hybrid load-latency scheme.
//
// Stages: IF (fetch), ID (decode, register read), EXE (ALU, address
// calculation, branch resolution), MEM (data cache access) and WB (register
// write). A load can obtain its data on one of three paths, tried in order:
//
//  1. LTAPB. In IF the Load Target Address Prediction Buffer is looked up
//     with the PC beside the instruction fetch. On a hit the predicted
//     effective address reads the data cache (port A) while the load is in
//     ID, so its result is ready when it enters EXE and it needs no base
//     register at all: two cycles earlier than a normal load. If that read
//     misses, the load simply continues on path 2 or 3 (no refill from ID).
//  2. FAC-like. Otherwise, in EXE, the base register (after forwarding) and
//     the offset go into the carry-select predictor. When FAC_Vali is high and
//     the control logic grants the port (FAC_enable2), the predicted fields
//     read the data cache (port B) in EXE: one cycle earlier than normal.
//  3. Normal. Otherwise the ALU's effective address reads port B in MEM.
//     FAC_enable2 is low exactly when a load in MEM needs port B, so a
//     normal access is never delayed by a prediction.
//
// A load whose data is late (path 3) makes a dependent instruction in ID
// wait one cycle (load-use interlock); paths 1 and 2 need no interlock.
// Results are forwarded into EXE from the EX/MEM and MEM/WB registers.
// Branches resolve in EXE and squash IF and ID when taken (predict not
// taken). A data cache miss on port B freezes the whole pipeline while the
// line is fetched over the refill port; the access is then repeated and
// hits. Port A never refills: two loads in flight could otherwise evict each
// other's line from the same set forever.
//
// Every fetched instruction looks up the LTAPB; a miss reserves an entry,
// which ID keeps for a load and releases otherwise. The load's EXE-stage
// effective address fills the reserved entry. Any instruction leaving ID
// invalidates the entries whose base register it overwrites.
//
// Interfaces (all synchronous to clk, reset rst_n low, synchronous):
//  - cfg_ltapb_en / cfg_fac_en: turn each scheme on; both on is the hybrid
//    scheme, both off the baseline pipeline. Hold them stable while running.
//  - imem_addr / imem_rdata: instruction fetch, read combinationally in IF.
//  - mem_req / mem_addr / mem_valid / mem_line: line refill. mem_req rises
//    with a line-aligned mem_addr and stays high until the cycle in which
//    mem_valid is high with the line; any latency is allowed.
//  - halted: a HALT instruction has retired; the pipeline is then empty.
//  - retire_*: one retired instruction per cycle at most, with its register
//    write and, for loads, the path that served it. events: per-cycle strobes.
//
// Taken from the paper: the stage at which each scheme reads the cache,
// the order in which the schemes are tried, the carry-select predictor, the
// LTAPB fields and its hit, miss and dependency behaviour, and the 64-entry
// LTAPB. This design's own: the instruction set, predict-not-taken branches,
// the two data cache read ports, the freeze-and-refill miss handling, the
// cache geometry, and the port grant rule for FAC_enable2.
module hybrid_load_pipeline
  import lp_pkg::*;
#(
  parameter int unsigned LT_N     = 64,  // LTAPB entries
  parameter int unsigned LT_TAG_W = 64,  // LTAPB TAG field
  parameter int unsigned LT_EA_W  = 64,  // LTAPB Effec_Addr field
  parameter int unsigned DC_B     = 5,   // data cache block offset bits
  parameter int unsigned DC_S     = 14,  // data cache index + offset bits
  localparam int unsigned LINE_W  = 8 * (2 ** DC_B),
  localparam int unsigned LT_IDX_W = (LT_N > 1) ? $clog2(LT_N) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cfg_ltapb_en,
  input  logic              cfg_fac_en,
  // instruction fetch
  output word_t             imem_addr,
  input  word_t             imem_rdata,
  // data cache refill from the next memory level
  output logic              mem_req,
  output word_t             mem_addr,
  input  logic              mem_valid,
  input  logic [LINE_W-1:0] mem_line,
  // status
  output logic              halted,
  output logic              retire_valid,
  output word_t             retire_pc,
  output logic              retire_we,
  output reg_t              retire_rd,
  output word_t             retire_data,
  output load_path_e        retire_path,
  output events_t           events
);

  // ------------------------------------------------------------ pipe regs
  typedef struct packed {
    logic                 valid;
    word_t                pc;
    word_t                instr;
    logic                 lt_hit;
    logic [LT_EA_W-1:0]   lt_ea;
    logic                 lt_entry;
    logic [LT_IDX_W-1:0]  lt_idx;
  } ifid_t;

  typedef struct packed {
    logic                 valid;
    word_t                pc;
    kind_e                kind;
    reg_t                 rs;
    reg_t                 rt;
    reg_t                 dest;
    logic                 dest_we;
    word_t                rs_val;
    word_t                rt_val;
    word_t                imm;
    logic                 ld_done;
    word_t                ld_data;
    logic                 lt_entry;
    logic [LT_IDX_W-1:0]  lt_idx;
  } idex_t;

  typedef struct packed {
    logic       valid;
    word_t      pc;
    kind_e      kind;
    reg_t       dest;
    logic       dest_we;
    word_t      result;
    word_t      ea;
    logic       ld_pending;
    load_path_e path;
  } exmem_t;

  typedef struct packed {
    logic       valid;
    word_t      pc;
    kind_e      kind;
    reg_t       dest;
    logic       dest_we;
    word_t      result;
    load_path_e path;
  } memwb_t;

  word_t  pc_q;
  ifid_t  ifid_q;
  idex_t  idex_q;
  exmem_t exmem_q;
  memwb_t memwb_q;
  logic   fetch_stop_q;
  logic   halted_q;
  logic   rf_busy_q;
  word_t  rf_addr_q;

  // ------------------------------------------------------------ data cache
  word_t dc_addr [2];
  logic  dc_hit  [2];
  word_t dc_data [2];

  dcache #(.ADDR_W(XLEN), .DATA_W(XLEN), .B(DC_B), .S(DC_S), .NRD(2)) u_dcache (
    .clk, .rst_n,
    .rd_addr(dc_addr), .rd_hit(dc_hit), .rd_data(dc_data),
    .fill_en(rf_busy_q && mem_valid), .fill_addr(rf_addr_q), .fill_line(mem_line)
  );

  // ------------------------------------------------------------ ID decode
  logic  pa_req, pa_hit;  // LTAPB-predicted load in ID, and its port A hit
  kind_e id_kind;
  reg_t  id_rs, id_rt, id_dest;
  logic  id_dest_we, id_needs_rs, id_needs_rt, id_is_load, id_keep_entry;
  word_t id_imm, id_rs_val, id_rt_val;

  always_comb begin
    id_kind    = ifid_q.valid ? decode_kind(ifid_q.instr) : K_NOP;
    id_rs      = ifid_q.instr[25:21];
    id_rt      = ifid_q.instr[20:16];
    id_imm     = sext16(ifid_q.instr[15:0]);
    id_is_load = (id_kind == K_LW);
    id_dest    = (id_kind == K_ADDU) ? ifid_q.instr[15:11] : id_rt;
    id_dest_we = (id_kind == K_ADDU) || (id_kind == K_ADDIU) || id_is_load;
    // a load served from the cache in ID does not need its base register
    id_needs_rs = (id_kind == K_ADDU) || (id_kind == K_ADDIU) || (id_kind == K_BNE) ||
                  (id_is_load && !pa_hit);
    id_needs_rt = (id_kind == K_ADDU) || (id_kind == K_BNE);
    // the load keeps its reserved entry unless it overwrites its own base
    id_keep_entry = ifid_q.lt_entry && id_is_load && !(id_rt != '0 && id_rt == id_rs);
  end

  regfile #(.XLEN(XLEN), .NREG(32)) u_rf (
    .clk, .rst_n,
    .ra1(id_rs), .rd1(id_rs_val),
    .ra2(id_rt), .rd2(id_rt_val),
    .we(memwb_q.valid && memwb_q.dest_we), .wa(memwb_q.dest), .wd(memwb_q.result)
  );

  // ------------------------------------------------------------ EXE
  word_t ex_a, ex_b, ex_ea, ex_alu, ex_target;
  logic  ex_fwd_exmem, ex_fwd_memwb, ex_taken;

  function automatic logic fwd_hit_exmem(input reg_t r);
    return r != '0 && exmem_q.valid && exmem_q.dest_we && exmem_q.dest == r;
  endfunction
  function automatic logic fwd_hit_memwb(input reg_t r);
    return r != '0 && memwb_q.valid && memwb_q.dest_we && memwb_q.dest == r;
  endfunction

  always_comb begin
    if (idex_q.rs == '0)                ex_a = '0;
    else if (fwd_hit_exmem(idex_q.rs))  ex_a = exmem_q.result;
    else if (fwd_hit_memwb(idex_q.rs))  ex_a = memwb_q.result;
    else                                ex_a = idex_q.rs_val;
    if (idex_q.rt == '0)                ex_b = '0;
    else if (fwd_hit_exmem(idex_q.rt))  ex_b = exmem_q.result;
    else if (fwd_hit_memwb(idex_q.rt))  ex_b = memwb_q.result;
    else                                ex_b = idex_q.rt_val;
    ex_fwd_exmem = fwd_hit_exmem(idex_q.rs) ||
                   ((idex_q.kind == K_ADDU || idex_q.kind == K_BNE) && fwd_hit_exmem(idex_q.rt));
    ex_fwd_memwb = (!fwd_hit_exmem(idex_q.rs) && fwd_hit_memwb(idex_q.rs)) ||
                   ((idex_q.kind == K_ADDU || idex_q.kind == K_BNE) &&
                    !fwd_hit_exmem(idex_q.rt) && fwd_hit_memwb(idex_q.rt));
    ex_ea     = ex_a + idex_q.imm;                   // normal address adder
    ex_alu    = (idex_q.kind == K_ADDU) ? ex_a + ex_b : ex_ea;
    ex_target = idex_q.pc + 32'd4 + {idex_q.imm[XLEN-3:0], 2'b00};
    ex_taken  = idex_q.valid && idex_q.kind == K_BNE && ex_a != ex_b;
  end

  // FAC-like predictor and port-B address selection
  logic [DC_B-1:0]      fac_ofs;
  logic [DC_S-DC_B-1:0] fac_idx;
  logic [XLEN-DC_S-1:0] fac_tag;
  logic                 fac_vali, fac_enable2, use_pred;
  logic                 fac_cand, mem_needs_port;

  assign fac_cand       = idex_q.valid && idex_q.kind == K_LW && !idex_q.ld_done;
  assign mem_needs_port = exmem_q.valid && exmem_q.ld_pending;
  assign fac_enable2    = fac_cand && !mem_needs_port;

  fac_predictor #(.ADDR_W(XLEN), .B(DC_B), .S(DC_S)) u_fac (
    .fac_enable(cfg_fac_en), .base(ex_a), .offset(idex_q.imm),
    .block_ofs(fac_ofs), .pred_index(fac_idx), .pred_tag(fac_tag),
    .pred_addr(), .fac_vali(fac_vali)
  );

  dcache_addr_sel #(.ADDR_W(XLEN), .B(DC_B), .S(DC_S)) u_sel (
    .eff_addr(exmem_q.ea), .block_ofs(fac_ofs), .pred_index(fac_idx), .pred_tag(fac_tag),
    .fac_vali(fac_vali), .fac_enable2(fac_enable2),
    .cache_addr(dc_addr[1]), .use_pred(use_pred)
  );

  // ------------------------------------------------------------ control
  logic pb_req, miss_b, stall_all;
  logic fac_done, ex_ld_late, lu_stall, flush, ex_adv, id_adv, if_take;

  // Port A: a miss does not stall; the load falls back to the EXE/MEM paths.
  assign pa_req    = ifid_q.valid && id_is_load && ifid_q.lt_hit;
  assign pa_hit    = pa_req && dc_hit[0];
  assign dc_addr[0] = ifid_q.lt_ea[XLEN-1:0];
  // Port B: a miss freezes the pipeline until the line is refilled.
  assign pb_req    = use_pred || mem_needs_port;
  assign miss_b    = pb_req && !dc_hit[1];
  assign stall_all = rf_busy_q || miss_b;

  assign fac_done   = use_pred && dc_hit[1];
  assign ex_ld_late = idex_q.valid && idex_q.kind == K_LW && !idex_q.ld_done && !fac_done;
  assign lu_stall   = ifid_q.valid && ex_ld_late && idex_q.dest_we && idex_q.dest != '0 &&
                      ((id_needs_rs && id_rs == idex_q.dest) ||
                       (id_needs_rt && id_rt == idex_q.dest));

  assign flush   = ex_taken && !stall_all;
  assign ex_adv  = !stall_all;
  assign id_adv  = !stall_all && !lu_stall && !flush && ifid_q.valid;
  assign if_take = !stall_all && !lu_stall && !flush && !fetch_stop_q &&
                   !(id_kind == K_HALT) && !halted_q;

  // ------------------------------------------------------------ LTAPB
  logic                lk_hit, lk_reserved, lk_evict;
  logic [LT_EA_W-1:0]  lk_ea;
  logic [LT_IDX_W-1:0] lk_idx;
  logic                lt_release, lt_dep_kill, lt_fill_done;

  ltapb #(.N(LT_N), .TAG_W(LT_TAG_W), .EA_W(LT_EA_W), .REG_W(REG_W), .RC_W(2)) u_ltapb (
    .clk, .rst_n,
    .lk_en(cfg_ltapb_en && if_take), .lk_pc(LT_TAG_W'(pc_q)),
    .lk_hit, .lk_ea, .lk_reserved, .lk_evict, .lk_idx,
    .id_en(cfg_ltapb_en && id_adv), .id_squash(cfg_ltapb_en && flush && ifid_q.valid),
    .id_has_entry(ifid_q.lt_entry), .id_idx(ifid_q.lt_idx),
    .id_is_load, .id_base(id_rs), .id_dest_we, .id_dest,
    .id_release(lt_release), .id_dep_kill(lt_dep_kill),
    .fill_en(cfg_ltapb_en && ex_adv && idex_q.valid && idex_q.lt_entry),
    .fill_idx(idex_q.lt_idx), .fill_ea(LT_EA_W'(ex_ea)), .fill_done(lt_fill_done)
  );

  // ------------------------------------------------------------ registers
  assign imem_addr = pc_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pc_q         <= '0;
      ifid_q       <= '0;
      idex_q       <= '0;
      exmem_q      <= '0;
      memwb_q      <= '0;
      fetch_stop_q <= 1'b0;
      halted_q     <= 1'b0;
      rf_busy_q    <= 1'b0;
      rf_addr_q    <= '0;
    end else begin
      // refill engine
      if (!rf_busy_q && miss_b) begin
        rf_busy_q <= 1'b1;
        rf_addr_q <= dc_addr[1] & ~word_t'((2 ** DC_B) - 1);
      end else if (rf_busy_q && mem_valid) begin
        rf_busy_q <= 1'b0;
      end

      if (!stall_all) begin
        // IF -> ID
        if (if_take) begin
          ifid_q.valid    <= 1'b1;
          ifid_q.pc       <= pc_q;
          ifid_q.instr    <= imem_rdata;
          ifid_q.lt_hit   <= cfg_ltapb_en && lk_hit;
          ifid_q.lt_ea    <= lk_ea;
          ifid_q.lt_entry <= cfg_ltapb_en && lk_reserved;
          ifid_q.lt_idx   <= lk_idx;
          pc_q            <= pc_q + 32'd4;
        end else if (!lu_stall) begin
          ifid_q <= '0;
          if (flush) pc_q <= ex_target;
        end
        if (id_adv && id_kind == K_HALT) fetch_stop_q <= 1'b1;

        // ID -> EXE
        if (id_adv) begin
          idex_q.valid    <= 1'b1;
          idex_q.pc       <= ifid_q.pc;
          idex_q.kind     <= id_kind;
          idex_q.rs       <= id_needs_rs ? id_rs : '0;
          idex_q.rt       <= id_needs_rt ? id_rt : '0;
          idex_q.dest     <= id_dest;
          idex_q.dest_we  <= id_dest_we;
          idex_q.rs_val   <= id_rs_val;
          idex_q.rt_val   <= id_rt_val;
          idex_q.imm      <= id_imm;
          idex_q.ld_done  <= pa_hit;          // port A hit: data already here
          idex_q.ld_data  <= dc_data[0];
          idex_q.lt_entry <= id_keep_entry;
          idex_q.lt_idx   <= ifid_q.lt_idx;
        end else begin
          idex_q <= '0;
        end

        // EXE -> MEM
        exmem_q.valid      <= idex_q.valid;
        exmem_q.pc         <= idex_q.pc;
        exmem_q.kind       <= idex_q.kind;
        exmem_q.dest       <= idex_q.dest;
        exmem_q.dest_we    <= idex_q.valid && idex_q.dest_we;
        exmem_q.ea         <= ex_ea;
        exmem_q.ld_pending <= ex_ld_late;
        if (idex_q.kind != K_LW)  exmem_q.result <= ex_alu;
        else if (idex_q.ld_done)  exmem_q.result <= idex_q.ld_data;
        else if (fac_done)        exmem_q.result <= dc_data[1];
        else                      exmem_q.result <= '0;
        if (idex_q.kind != K_LW)  exmem_q.path <= LP_NONE;
        else if (idex_q.ld_done)  exmem_q.path <= LP_LTAPB;
        else if (fac_done)        exmem_q.path <= LP_FAC;
        else                      exmem_q.path <= LP_NORMAL;

        // MEM -> WB
        memwb_q.valid   <= exmem_q.valid;
        memwb_q.pc      <= exmem_q.pc;
        memwb_q.kind    <= exmem_q.kind;
        memwb_q.dest    <= exmem_q.dest;
        memwb_q.dest_we <= exmem_q.dest_we;
        memwb_q.result  <= exmem_q.ld_pending ? dc_data[1] : exmem_q.result;
        memwb_q.path    <= exmem_q.path;

        // WB
        if (memwb_q.valid && memwb_q.kind == K_HALT) halted_q <= 1'b1;
      end
    end
  end

  assign mem_req  = rf_busy_q;
  assign mem_addr = rf_addr_q;
  assign halted   = halted_q;

  assign retire_valid = memwb_q.valid && !stall_all;
  assign retire_pc    = memwb_q.pc;
  assign retire_we    = memwb_q.dest_we && memwb_q.dest != '0;
  assign retire_rd    = memwb_q.dest;
  assign retire_data  = memwb_q.result;
  assign retire_path  = memwb_q.path;

  always_comb begin
    events                = '0;
    events.ltapb_hit      = cfg_ltapb_en && if_take && lk_hit;
    events.ltapb_reserve  = cfg_ltapb_en && if_take && lk_reserved;
    events.ltapb_evict    = cfg_ltapb_en && if_take && lk_evict;
    events.ltapb_release  = lt_release;
    events.ltapb_dep_kill = lt_dep_kill;
    events.ltapb_fill     = lt_fill_done;
    events.ltapb_dc_miss  = id_adv && pa_req && !pa_hit;
    events.fac_hit        = ex_adv && fac_done;
    events.fac_invalid    = ex_adv && fac_cand && cfg_fac_en && !fac_vali;
    events.fac_port_busy  = ex_adv && fac_cand && fac_vali && !fac_enable2;
    events.normal_load    = ex_adv && mem_needs_port;
    events.load_use_stall = !stall_all && lu_stall;
    events.dcache_refill  = !rf_busy_q && miss_b;
    events.branch_flush   = flush;
    events.fwd_exmem      = ex_adv && idex_q.valid && ex_fwd_exmem;
    events.fwd_memwb      = ex_adv && idex_q.valid && ex_fwd_memwb;
    events.retire         = retire_valid;
  end

  // ------------------------------------------------------------ checks
  // A late load result is never forwarded: the interlock holds its consumer.
  a_no_fwd_pending: assert property (@(posedge clk) disable iff (!rst_n)
    !(idex_q.valid && exmem_q.ld_pending &&
      ((idex_q.rs != '0 && exmem_q.dest == idex_q.rs) ||
       (idex_q.rt != '0 && exmem_q.dest == idex_q.rt))));
  // Refill handshake: data arrives only while requested, request held until then.
  a_refill_valid: assert property (@(posedge clk) disable iff (!rst_n)
    mem_valid |-> mem_req);
  a_refill_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (mem_req && !mem_valid) |=> (mem_req && $stable(mem_addr)));

endmodule

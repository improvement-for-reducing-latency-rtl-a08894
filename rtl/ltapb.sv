// Load Target Address Prediction Buffer (LTAPB).
//
// A small fully associative table, looked up with the PC in the fetch stage
// in parallel with the instruction cache. Each of the N entries holds the
// six fields of the paper's example structure: TAG (the PC of a load),
// Valid, Reserved, Base_Num (the load's base register), Effec_Addr (its last
// effective address) and Ref_Count (a saturating hit counter).
//
// Fetch (lk_*). A valid entry whose TAG equals the PC is a hit: lk_ea is the
// predicted effective address, used by the pipeline to read the data cache
// in ID, and Ref_Count is incremented when lk_en confirms that the fetched
// instruction advances. On a miss an entry is reserved for the instruction
// (Reserved=1, Valid=0, TAG=PC). An entry that already carries the PC is
// reused; otherwise a free entry is taken, and if there is none the
// non-reserved entry with the lowest Ref_Count is replaced (lowest index on a
// tie). lk_idx names the hit or reserved entry, to be carried down the pipe.
//
// Decode (id_*). When the instruction in ID advances, its own reserved entry
// is kept (Base_Num := base register) if it is a load, and released
// (Reserved := 0) otherwise. Also, every other entry whose Base_Num equals
// the instruction's destination register is invalidated: Valid and Reserved
// both drop, so a fill still in flight for it is dropped too. The same
// comparison is applied combinationally to the lookup of the same cycle, so
// a load fetched right behind the writer of its base register cannot hit on
// a stale address. A load that overwrites its own base register is released,
// for the same reason. An instruction squashed in ID (id_squash) releases its
// entry.
//
// Execute (fill_*). When a load with a reserved entry leaves EXE, its
// computed effective address is written into Effec_Addr and Valid is set.
// This is also how an entry invalidated by a dependency gets its address
// updated and becomes valid again: the next execution of that load reuses
// the entry and fills it with the address formed from the new base value.
//
// All updates happen at the clock edge, in the order decode, dependency,
// fill, fetch, so the youngest instruction's action wins. Reset (rst_n low,
// synchronous) clears Valid, Reserved, TAG and Ref_Count.
//
// The fields, widths (64-bit TAG and Effec_Addr, 5-bit Base_Num, 2-bit
// Ref_Count), the 64 entries and the hit, miss and dependency behaviour
// follow the paper. Full associativity, the victim order, entry reuse and
// the handling of squashed instructions and of self-overwriting loads are
// this design's own choices.
module ltapb #(
  parameter int unsigned N     = 64,  // entries
  parameter int unsigned TAG_W = 64,  // TAG field (PC)
  parameter int unsigned EA_W  = 64,  // Effec_Addr field
  parameter int unsigned REG_W = 5,   // Base_Num field
  parameter int unsigned RC_W  = 2,   // Ref_Count field
  localparam int unsigned IDX_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // fetch-stage lookup
  input  logic             lk_en,        // fetched instruction advances: commit update
  input  logic [TAG_W-1:0] lk_pc,
  output logic             lk_hit,
  output logic [EA_W-1:0]  lk_ea,
  output logic             lk_reserved,  // miss, and an entry was reserved
  output logic             lk_evict,     // the reservation replaces a valid entry
  output logic [IDX_W-1:0] lk_idx,
  // decode-stage update and dependency check
  input  logic             id_en,        // ID instruction advances to EXE
  input  logic             id_squash,    // ID instruction is discarded
  input  logic             id_has_entry, // it reserved an entry in fetch
  input  logic [IDX_W-1:0] id_idx,
  input  logic             id_is_load,
  input  logic [REG_W-1:0] id_base,
  input  logic             id_dest_we,
  input  logic [REG_W-1:0] id_dest,
  output logic             id_release,   // own reservation cleared
  output logic             id_dep_kill,  // dependency invalidation happened
  // execute-stage fill
  input  logic             fill_en,
  input  logic [IDX_W-1:0] fill_idx,
  input  logic [EA_W-1:0]  fill_ea,
  output logic             fill_done
);

  typedef struct packed {
    logic [TAG_W-1:0] tag;
    logic             valid;
    logic             reserved;
    logic [REG_W-1:0] base_num;
    logic [EA_W-1:0]  effec_addr;
    logic [RC_W-1:0]  ref_count;
  } entry_t;

  entry_t ent [N];

  // ---------------------------------------------------------------- decode
  logic [N-1:0] kill;
  logic         own_release;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      kill[i] = id_en && id_dest_we && (id_dest != '0)
             && (ent[i].valid || ent[i].reserved)
             && (ent[i].base_num == id_dest)
             && !(id_has_entry && IDX_W'(i) == id_idx);
    end
    own_release = id_has_entry && ent[id_idx].reserved &&
                  (id_squash ||
                   (id_en && (!id_is_load ||
                              (id_dest_we && id_dest != '0 && id_dest == id_base))));
  end

  assign id_release  = own_release;
  assign id_dep_kill = |kill;

  // ---------------------------------------------------------------- fill
  assign fill_done = fill_en && ent[fill_idx].reserved && !kill[fill_idx];

  // ---------------------------------------------------------------- lookup
  logic             any_match, any_free, any_repl;
  logic [IDX_W-1:0] match_idx, hit_idx, free_idx, repl_idx;
  logic [RC_W-1:0]  repl_rc;

  always_comb begin
    lk_hit    = 1'b0;
    hit_idx   = '0;
    any_match = 1'b0;
    match_idx = '0;
    any_free  = 1'b0;
    free_idx  = '0;
    any_repl  = 1'b0;
    repl_idx  = '0;
    repl_rc   = '1;
    for (int i = 0; i < N; i++) begin
      if (ent[i].tag == lk_pc) begin
        if (ent[i].valid && !kill[i] && !lk_hit) begin
          lk_hit  = 1'b1;
          hit_idx = IDX_W'(i);
        end
        if (!any_match) begin
          any_match = 1'b1;
          match_idx = IDX_W'(i);
        end
      end
      if (!ent[i].valid && !ent[i].reserved && !any_free) begin
        any_free = 1'b1;
        free_idx = IDX_W'(i);
      end
      if (!ent[i].reserved && (!any_repl || ent[i].ref_count < repl_rc)) begin
        any_repl = 1'b1;
        repl_idx = IDX_W'(i);
        repl_rc  = ent[i].ref_count;
      end
    end
    lk_ea       = ent[hit_idx].effec_addr;
    lk_reserved = !lk_hit && (any_match || any_free || any_repl);
    if (lk_hit)         lk_idx = hit_idx;
    else if (any_match) lk_idx = match_idx;
    else if (any_free)  lk_idx = free_idx;
    else                lk_idx = repl_idx;
    lk_evict = lk_reserved && !any_match && !any_free && ent[repl_idx].valid;
  end

  // ---------------------------------------------------------------- state
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) begin
        ent[i].tag       <= '0;
        ent[i].valid     <= 1'b0;
        ent[i].reserved  <= 1'b0;
        ent[i].base_num  <= '0;
        ent[i].ref_count <= '0;
      end
    end else begin
      // decode: own entry
      if (own_release) begin
        ent[id_idx].reserved <= 1'b0;
      end else if (id_en && id_has_entry && ent[id_idx].reserved) begin
        ent[id_idx].base_num <= id_base;
      end
      // decode: dependency invalidation
      for (int i = 0; i < N; i++) begin
        if (kill[i]) begin
          ent[i].valid    <= 1'b0;
          ent[i].reserved <= 1'b0;
        end
      end
      // execute: fill
      if (fill_done) begin
        ent[fill_idx].effec_addr <= fill_ea;
        ent[fill_idx].valid      <= 1'b1;
        ent[fill_idx].reserved   <= 1'b0;
      end
      // fetch
      if (lk_en) begin
        if (lk_hit) begin
          if (ent[hit_idx].ref_count != '1)
            ent[hit_idx].ref_count <= ent[hit_idx].ref_count + 1'b1;
        end else if (lk_reserved) begin
          ent[lk_idx].tag      <= lk_pc;
          ent[lk_idx].valid    <= 1'b0;
          ent[lk_idx].reserved <= 1'b1;
          if (!any_match) ent[lk_idx].ref_count <= '0;
        end
      end
    end
  end

endmodule

// Shared types and constants of the load-latency pipeline.
//
// The pipeline runs a small MIPS-like instruction set that is just large
// enough to exercise the three load-latency schemes: register+register add,
// add-immediate, load word with register+constant addressing, a conditional
// branch to build loops, and a halt. The encoding follows the MIPS I-type and
// R-type field layout (6-bit opcode, 5-bit rs/rt/rd, 16-bit immediate); the
// choice of instructions is this design's own, the paper only speaks of a
// RISC with register+constant loads. Addresses and data are 32 bits wide, as
// in the effective-address fields <31:0> of the data cache access path.
package lp_pkg;

  localparam int unsigned XLEN  = 32;  // data and address width
  localparam int unsigned REG_W = 5;   // register number width (Base_Num field)

  typedef logic [XLEN-1:0]  word_t;
  typedef logic [REG_W-1:0] reg_t;

  // Major opcodes, instr[31:26]
  localparam logic [5:0] OP_RTYPE = 6'h00;  // ADDU rd = rs + rt (funct ignored)
  localparam logic [5:0] OP_BNE   = 6'h05;  // if rs != rt: pc = pc + 4 + (sext(imm) << 2)
  localparam logic [5:0] OP_ADDIU = 6'h09;  // rt = rs + sext(imm)
  localparam logic [5:0] OP_LW    = 6'h23;  // rt = mem[rs + sext(imm)]
  localparam logic [5:0] OP_HALT  = 6'h3f;  // stop when it reaches write-back

  typedef enum logic [2:0] {
    K_NOP,
    K_ADDU,
    K_ADDIU,
    K_LW,
    K_BNE,
    K_HALT
  } kind_e;

  // How a load obtained its data, reported when it retires.
  typedef enum logic [1:0] {
    LP_NONE   = 2'd0,  // not a load
    LP_LTAPB  = 2'd1,  // predicted address from the LTAPB, cache read in ID
    LP_FAC    = 2'd2,  // FAC-like predicted address, cache read in EXE
    LP_NORMAL = 2'd3   // ALU address in EXE, cache read in MEM
  } load_path_e;

  // One-cycle event strobes, brought out of the top for counting.
  typedef struct packed {
    logic ltapb_hit;       // IF lookup hit (counted when IF advances)
    logic ltapb_reserve;   // IF lookup missed and reserved an entry
    logic ltapb_evict;     // the reservation replaced a valid entry
    logic ltapb_release;   // ID found a non-load and cleared the reservation
    logic ltapb_dep_kill;  // ID destination matched one or more Base_Num fields
    logic ltapb_fill;      // EXE wrote an effective address into a reserved entry
    logic ltapb_dc_miss;   // LTAPB-predicted load missed the cache in ID, fell back
    logic fac_hit;         // load served by the FAC-like prediction in EXE
    logic fac_invalid;     // FAC_Vali low: the sum left the address space
    logic fac_port_busy;   // FAC_enable2 low: the MEM stage held the cache port
    logic normal_load;     // load served by the cache access in MEM
    logic load_use_stall;  // ID held one cycle for a load result
    logic dcache_refill;   // a line refill was started
    logic branch_flush;    // taken branch squashed IF and ID
    logic fwd_exmem;       // an EXE operand came from the EX/MEM register
    logic fwd_memwb;       // an EXE operand came from the MEM/WB register
    logic retire;          // an instruction left write-back
  } events_t;

  function automatic word_t sext16(input logic [15:0] imm);
    return {{(XLEN-16){imm[15]}}, imm};
  endfunction

  function automatic kind_e decode_kind(input word_t instr);
    unique case (instr[31:26])
      OP_RTYPE: return (instr == '0) ? K_NOP : K_ADDU;
      OP_BNE:   return K_BNE;
      OP_ADDIU: return K_ADDIU;
      OP_LW:    return K_LW;
      OP_HALT:  return K_HALT;
      default:  return K_NOP;
    endcase
  endfunction

endpackage

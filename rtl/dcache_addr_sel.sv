// Data cache address selection for the FAC-like scheme.
//
// The data cache port that serves EXE and MEM can be addressed with two
// addresses: the normal effective address, computed by the EXE-stage ALU of
// a load that is now in MEM, or the fields predicted by the FAC-like circuit
// for the load now in EXE. Each field (tag, set index, block offset) has its
// own 2:1 multiplexer, and all three are steered by FAC_Vali AND FAC_enable2.
// FAC_enable2 is the control logic's grant of the port to the prediction;
// the select is also handed back to the control logic so that it knows which
// stage the cache result belongs to.
//
// The three multiplexers and the AND gate follow the paper's data cache
// access diagram; what drives FAC_enable2 is decided by the pipeline.
// Purely combinational.
module dcache_addr_sel #(
  parameter int unsigned ADDR_W = 32,
  parameter int unsigned B      = 5,
  parameter int unsigned S      = 14
) (
  input  logic [ADDR_W-1:0]   eff_addr,     // Effective_Addr<ADDR_W-1:0>
  input  logic [B-1:0]        block_ofs,    // BlockOFS
  input  logic [S-B-1:0]      pred_index,   // PredIndex
  input  logic [ADDR_W-S-1:0] pred_tag,     // PredTag
  input  logic                fac_vali,     // FAC_Vali
  input  logic                fac_enable2,  // FAC_enable2
  output logic [ADDR_W-1:0]   cache_addr,   // address presented to the cache
  output logic                use_pred      // to the control logic
);

  always_comb begin
    use_pred = fac_vali & fac_enable2;
    cache_addr[ADDR_W-1:S] = use_pred ? pred_tag   : eff_addr[ADDR_W-1:S];
    cache_addr[S-1:B]      = use_pred ? pred_index : eff_addr[S-1:B];
    cache_addr[B-1:0]      = use_pred ? block_ofs  : eff_addr[B-1:0];
  end

endmodule

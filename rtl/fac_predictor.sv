// FAC-like effective-address prediction circuit.
//
// A load's base register value and its constant offset go into a
// combinational adder built from three carry-select sections, one per field
// of the data cache address: block offset <B-1:0>, set index <S-1:B> and tag
// <ADDR_W-1:S>. The block-offset carry-out selects the set-index sum and
// carry, and the set-index carry-out selects the tag sum and carry. The
// circuit sits beside the normal EXE-stage ALU, so the cache can be read
// with the predicted fields in the same cycle as the address is computed.
//
// FAC_Vali, the single validity bit, is low only when the sum leaves the
// address space, which is the one failure case of this predictor. The offset
// is a sign-extended immediate, so the address space is left when the
// carry-out of the tag section differs from the offset's sign: for
// non-negative offsets this is simply an inverted carry-out. The fac_enable
// input turns the scheme off by forcing FAC_Vali low.
//
// The field split into three carry-select sections follows the paper; the
// signed-offset form of the carry test and the enable input are choices of
// this design. Purely combinational.
module fac_predictor #(
  parameter int unsigned ADDR_W = 32,  // address width
  parameter int unsigned B      = 5,   // block offset bits (32-byte lines)
  parameter int unsigned S      = 14   // block offset + set index bits (16 KiB)
) (
  input  logic              fac_enable,  // scheme enabled
  input  logic [ADDR_W-1:0] base,        // base register, after forwarding
  input  logic [ADDR_W-1:0] offset,      // sign-extended constant offset
  output logic [B-1:0]      block_ofs,   // BlockOFS<B-1:0>
  output logic [S-B-1:0]    pred_index,  // PredIndex<S-1:B>
  output logic [ADDR_W-S-1:0] pred_tag,  // PredTag<ADDR_W-1:S>
  output logic [ADDR_W-1:0] pred_addr,   // the three fields joined
  output logic              fac_vali     // FAC_Vali
);

  logic c_ofs, c_idx, c_tag;

  csel_adder #(.W(B)) u_ofs (
    .a(base[B-1:0]), .b(offset[B-1:0]), .cin(1'b0),
    .sum(block_ofs), .cout(c_ofs)
  );

  csel_adder #(.W(S-B)) u_idx (
    .a(base[S-1:B]), .b(offset[S-1:B]), .cin(c_ofs),
    .sum(pred_index), .cout(c_idx)
  );

  csel_adder #(.W(ADDR_W-S)) u_tag (
    .a(base[ADDR_W-1:S]), .b(offset[ADDR_W-1:S]), .cin(c_idx),
    .sum(pred_tag), .cout(c_tag)
  );

  assign pred_addr = {pred_tag, pred_index, block_ofs};
  assign fac_vali  = fac_enable & ~(c_tag ^ offset[ADDR_W-1]);

endmodule

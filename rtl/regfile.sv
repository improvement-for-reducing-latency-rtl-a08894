// General register file: NREG registers of XLEN bits, two read ports for the
// ID stage and one write port for the WB stage.
//
// Register 0 always reads as zero and ignores writes. A write and a read of
// the same register in the same cycle return the value being written, so an
// instruction in ID sees the result that WB retires in that cycle; the other
// forwarding paths live in the pipeline's EXE stage. Reads are
// combinational; the write and the synchronous reset (all registers to zero)
// take effect at the clock edge.
//
// The paper only names the register file and its forwarding logic; the
// organisation here is that of a classic five-stage RISC pipeline.
module regfile #(
  parameter int unsigned XLEN = 32,
  parameter int unsigned NREG = 32
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [$clog2(NREG)-1:0] ra1,
  output logic [XLEN-1:0]         rd1,
  input  logic [$clog2(NREG)-1:0] ra2,
  output logic [XLEN-1:0]         rd2,
  input  logic                    we,
  input  logic [$clog2(NREG)-1:0] wa,
  input  logic [XLEN-1:0]         wd
);

  logic [XLEN-1:0] regs [NREG];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NREG; i++) regs[i] <= '0;
    end else if (we && wa != '0) begin
      regs[wa] <= wd;
    end
  end

  function automatic logic [XLEN-1:0] rd(input logic [$clog2(NREG)-1:0] a);
    if (a == '0)             return '0;
    else if (we && wa == a)  return wd;
    else                     return regs[a];
  endfunction

  assign rd1 = rd(ra1);
  assign rd2 = rd(ra2);

endmodule

// Direct-mapped data cache with a line refill port.
//
// The cache holds 2^S bytes in 2^(S-B) lines of 2^B bytes. An address splits
// into tag <ADDR_W-1:S>, set index <S-1:B> and block offset <B-1:0>. The set
// index drives the row decoder of the data array and of the tag array; the
// stored tag is compared with the address tag to give HIT, and the block
// offset selects one DATA_W-bit word of the line (the low two offset bits are
// ignored, reads are word aligned).
//
// There are NRD independent read ports, all combinational: hit and data
// follow the address in the same cycle. The pipeline uses one for loads
// predicted by the LTAPB (read in ID) and one shared by the FAC-like access
// in EXE and the normal access in MEM. A miss is handled outside: the
// pipeline fetches the whole line from the next memory level and writes it
// through the refill port, which takes effect at the next clock edge. Only
// the valid bits are reset (rst_n low, synchronous).
//
// The array layout (data array 8*2^B bits wide, 2^S/2^B rows, separate tag
// array, one comparator) follows the paper's data cache access diagram.
// Direct mapping, the sizes, the number of read ports and the refill port
// are this design's choices.
module dcache #(
  parameter int unsigned ADDR_W = 32,
  parameter int unsigned DATA_W = 32,
  parameter int unsigned B      = 5,   // 32-byte lines
  parameter int unsigned S      = 14,  // 16 KiB
  parameter int unsigned NRD    = 2
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // read ports
  input  logic [ADDR_W-1:0]      rd_addr [NRD],
  output logic                   rd_hit  [NRD],
  output logic [DATA_W-1:0]      rd_data [NRD],
  // refill port: one whole line
  input  logic                   fill_en,
  input  logic [ADDR_W-1:0]      fill_addr,
  input  logic [8*(2**B)-1:0]    fill_line
);

  localparam int unsigned LINES  = 2 ** (S - B);
  localparam int unsigned LINE_W = 8 * (2 ** B);
  localparam int unsigned WORDS  = LINE_W / DATA_W;
  localparam int unsigned WSEL_W = (WORDS > 1) ? $clog2(WORDS) : 1;
  localparam int unsigned BSEL   = $clog2(DATA_W / 8);  // byte bits inside a word
  localparam int unsigned TAG_W  = ADDR_W - S;

  logic [LINE_W-1:0] data_arr [LINES];
  logic [TAG_W-1:0]  tag_arr  [LINES];
  logic [LINES-1:0]  valid_q;

  logic [S-B-1:0] fill_idx;
  assign fill_idx = fill_addr[S-1:B];

  always_ff @(posedge clk) begin
    if (fill_en) begin
      data_arr[fill_idx] <= fill_line;
      tag_arr[fill_idx]  <= fill_addr[ADDR_W-1:S];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)       valid_q <= '0;
    else if (fill_en) valid_q[fill_idx] <= 1'b1;
  end

  for (genvar p = 0; p < NRD; p++) begin : g_rd
    logic [S-B-1:0]    idx;
    logic [LINE_W-1:0] line;
    logic [WSEL_W-1:0] wsel;
    assign idx  = rd_addr[p][S-1:B];
    assign line = data_arr[idx];
    assign wsel = WSEL_W'(rd_addr[p][B-1:BSEL]);
    assign rd_hit[p]  = valid_q[idx] && (tag_arr[idx] == rd_addr[p][ADDR_W-1:S]);
    assign rd_data[p] = line[wsel*DATA_W +: DATA_W];
  end

endmodule

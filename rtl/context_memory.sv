// context_memory: storage for RC array contexts.
//
// 256 words of 32 bits, organised as two blocks (0: row contexts, 1: column
// contexts) x 8 rows/columns x 16 contexts. The word address is
// {block, rowcol[2:0], ctx[3:0]}. The DMA controller writes one word per cycle
// over the 32-bit context data bus. For a broadcast, one read returns context
// number `rd_ctx` of all eight rows (or columns) of block `rd_block` at once, the
// 8 x 32-bit context bus of the RC array; a second read port returns one word
// for single-cell reconfiguration. Both reads are combinational from the
// register array; a write is visible from the next cycle.
// From the source: 16 configurations for each of 8 rows and 8 columns, 32-bit
// words, 256 x 32 organisation, 8 x 32-bit context bus. This design's own
// choices: the address layout and the combinational reads.
module context_memory #(
  parameter int unsigned NROWCOL = 8,
  parameter int unsigned NCTX    = 16
) (
  input  logic                       clk,
  input  logic                       we,
  input  logic [7:0]                 waddr,
  input  logic [31:0]                wdata,
  input  logic                       rd_block,
  input  logic [3:0]                 rd_ctx,
  output logic [NROWCOL-1:0][31:0]   ctx_bus,
  input  logic [7:0]                 raddr,
  output logic [31:0]                rdata
);
  localparam int unsigned WORDS = 2 * NROWCOL * NCTX;

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk)
    if (we) mem[waddr] <= wdata;

  always_comb begin
    for (int unsigned k = 0; k < NROWCOL; k++)
      ctx_bus[k] = mem[{rd_block, 3'(k), rd_ctx}];
    rdata = mem[raddr];
  end
endmodule

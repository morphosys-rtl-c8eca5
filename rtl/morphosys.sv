// morphosys: the MorphoSys reconfigurable processor, top level.
//
// Tiny RISC runs the program and issues the array instructions. The DMA
// controller moves data between main memory and the frame buffer (64-bit words,
// two memory cycles each) or the context memory (32-bit words). The context
// memory feeds eight contexts at a time to the 8x8 RC array, which loads them
// row- or column-wise (or one cell at a time) while execution continues:
// reconfiguration is dynamic, interleaved with execution, not a separate
// program phase. The frame buffer's two sets let the DMA controller fill one set
// while the RC array works on the other.
//
// Timing of the array instructions, counted from the cycle an instruction is in
// Tiny RISC's Execute stage (cycle t):
//   RC execute:   frame-buffer read of both banks of the set at t, every cell
//                 executes at t+1 with IA = bank 0 bytes, IB = bank 1 bytes.
//   RC write-back: at t+1 the low bytes of the selected row/column are written
//                 to one bank (byte-enabled by each cell's WRITE_BUS bit).
//   Context broadcast / single-cell load: the context registers load at t+1.
//   DMA transfers start at t and run in the background.
// The cache and main memory are outside this design: the instruction and data
// ports of Tiny RISC and the main-memory port of the DMA controller are brought
// out as ports.
module morphosys
  import morphosys_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // Tiny RISC instruction cache
  output logic [31:0] i_addr,
  input  logic [31:0] i_data,
  input  logic        i_ack_n,
  // Tiny RISC data cache
  output logic        d_rd,
  output logic        d_wr,
  output logic [31:0] d_addr,
  output logic [31:0] d_wdata,
  input  logic [31:0] d_rdata,
  // interrupt requests
  input  logic [7:0]  irq,
  // main memory (DMA side)
  output logic        mem_rd,
  output logic        mem_wr,
  output logic [31:0] mem_addr,
  output logic [31:0] mem_wdata,
  input  logic [31:0] mem_rdata,
  // status
  output logic        dma_busy,
  output logic        cpu_stall
);

  tr_cmd_t cmd, cmd_q;
  logic    dma_busy_set, dma_done;

  tinyrisc u_cpu (
    .clk, .rst_n,
    .i_addr, .i_data, .i_ack_n,
    .d_rd, .d_wr, .d_addr, .d_wdata, .d_rdata,
    .irq,
    .cmd,
    .dma_busy, .dma_busy_set,
    .rc_wr_busy(cmd_q.rc_wb),
    .stall(cpu_stall)
  );

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) cmd_q <= '0;
    else        cmd_q <= cmd;

  // DMA controller
  logic        dfb_rd, dfb_wr, dfb_set, dfb_bank;
  logic [5:0]  dfb_addr;
  logic [63:0] dfb_wdata, dfb_rdata;
  logic        ctx_we;
  logic [7:0]  ctx_waddr;
  logic [31:0] ctx_wdata;

  dma_controller u_dma (
    .clk, .rst_n,
    .start(cmd.dma_start), .op(cmd.dma_op),
    .mem_addr_in(cmd.dma_mem_addr), .loc_addr_in(cmd.dma_loc_addr), .count_in(cmd.dma_count),
    .busy(dma_busy), .busy_set(dma_busy_set), .done(dma_done),
    .mem_rd, .mem_wr, .mem_addr, .mem_wdata, .mem_rdata,
    .fb_rd(dfb_rd), .fb_wr(dfb_wr), .fb_set(dfb_set), .fb_bank(dfb_bank),
    .fb_addr(dfb_addr), .fb_wdata(dfb_wdata), .fb_rdata(dfb_rdata),
    .ctx_we, .ctx_addr(ctx_waddr), .ctx_wdata
  );

  // Context memory
  logic [7:0][31:0] ctx_bus;
  logic [31:0]      ctx_word;

  context_memory u_cm (
    .clk,
    .we(ctx_we), .waddr(ctx_waddr), .wdata(ctx_wdata),
    .rd_block(cmd_q.ctx_addr[7]), .rd_ctx(cmd_q.ctx_addr[3:0]), .ctx_bus,
    .raddr(cmd_q.ctx_addr), .rdata(ctx_word)
  );

  // Frame buffer: read for RC execute at t, write-back at t+1
  logic [63:0] bus_a, bus_b, wb_data;
  logic [7:0]  wb_mask;

  frame_buffer u_fb (
    .clk,
    .dma_rd(dfb_rd), .dma_wr(dfb_wr), .dma_set(dfb_set), .dma_bank(dfb_bank),
    .dma_addr(dfb_addr), .dma_wdata(dfb_wdata), .dma_rdata(dfb_rdata),
    .rc_rd(cmd.rc_exec), .rc_wr(cmd_q.rc_wb),
    .rc_set(cmd_q.rc_wb ? cmd_q.fb_set : cmd.fb_set),
    .rc_bank(cmd_q.fb_bank),
    .rc_addr(cmd_q.rc_wb ? cmd_q.fb_offset : cmd.fb_offset),
    .rc_wdata(wb_data), .rc_wmask(wb_mask),
    .rc_rdata_a(bus_a), .rc_rdata_b(bus_b)
  );

  // RC array
  logic [7:0][7:0][15:0] cell_out;

  rc_array u_rca (
    .clk, .rst_n,
    .col_mode(cmd_q.col_mode),
    .ctx_bcast(cmd_q.ctx_bcast), .ctx_bus,
    .ctx_single(cmd_q.ctx_single), .sel_row(cmd_q.sel_row), .sel_col(cmd_q.sel_col),
    .ctx_word,
    .exec(cmd_q.rc_exec),
    .bus_a, .bus_b,
    .wb_sel(cmd_q.sel_row), .wb_data, .wb_mask,
    .cell_out
  );

endmodule

// frame_buffer: the two-set, two-bank frame buffer between the DMA controller
// and the RC array.
//
// Each of the two sets holds two banks of DEPTH 64-bit words. The DMA port
// reads or writes one bank at a time over one 64-bit bus (never both in the
// same cycle). The RC-array port reads both banks of one set at the same offset
// in one cycle, bank 0 onto bus A and bank 1 onto bus B (the 2 x 64 = 128 bits
// for eight cells x two 8-bit operands); it writes 64 bits into one bank. Since
// the RC-array write shares a bus with one read bus, it cannot read and write
// in the same cycle. Reads are synchronous: data appears the cycle after the
// request. DMA and RC array may run at the same time only on different sets;
// assertions flag a violation of any of these rules.
// From the source: 2 sets x 2 banks x 64 words x 64 bits, bus widths, the
// one-bank DMA access, the both-banks RC access, the set exclusivity.
// This design's own choices: synchronous read timing and the port signals.
module frame_buffer #(
  parameter int unsigned DEPTH = 64
) (
  input  logic                      clk,
  // DMA port
  input  logic                      dma_rd,
  input  logic                      dma_wr,
  input  logic                      dma_set,
  input  logic                      dma_bank,
  input  logic [$clog2(DEPTH)-1:0]  dma_addr,
  input  logic [63:0]               dma_wdata,
  output logic [63:0]               dma_rdata,
  // RC array port
  input  logic                      rc_rd,
  input  logic                      rc_wr,
  input  logic                      rc_set,
  input  logic                      rc_bank,      // bank written by rc_wr
  input  logic [$clog2(DEPTH)-1:0]  rc_addr,
  input  logic [63:0]               rc_wdata,
  input  logic [7:0]                rc_wmask,     // byte enables for rc_wr
  output logic [63:0]               rc_rdata_a,
  output logic [63:0]               rc_rdata_b
);
  // mem[set*2 + bank]
  logic [63:0] mem0 [DEPTH];   // set 0 bank 0
  logic [63:0] mem1 [DEPTH];   // set 0 bank 1
  logic [63:0] mem2 [DEPTH];   // set 1 bank 0
  logic [63:0] mem3 [DEPTH];   // set 1 bank 1

  logic [1:0]  dsel, rsel;
  assign dsel = {dma_set, dma_bank};
  assign rsel = {rc_set,  rc_bank};

  function automatic logic [63:0] merge(logic [63:0] old, logic [63:0] nw, logic [7:0] m);
    for (int k = 0; k < 8; k++) if (m[k]) old[8*k +: 8] = nw[8*k +: 8];
    return old;
  endfunction

  always_ff @(posedge clk) begin
    if (dma_wr) begin
      unique case (dsel)
        2'd0: mem0[dma_addr] <= dma_wdata;
        2'd1: mem1[dma_addr] <= dma_wdata;
        2'd2: mem2[dma_addr] <= dma_wdata;
        default: mem3[dma_addr] <= dma_wdata;
      endcase
    end
    if (rc_wr) begin
      unique case (rsel)
        2'd0: mem0[rc_addr] <= merge(mem0[rc_addr], rc_wdata, rc_wmask);
        2'd1: mem1[rc_addr] <= merge(mem1[rc_addr], rc_wdata, rc_wmask);
        2'd2: mem2[rc_addr] <= merge(mem2[rc_addr], rc_wdata, rc_wmask);
        default: mem3[rc_addr] <= merge(mem3[rc_addr], rc_wdata, rc_wmask);
      endcase
    end
    if (dma_rd) begin
      unique case (dsel)
        2'd0: dma_rdata <= mem0[dma_addr];
        2'd1: dma_rdata <= mem1[dma_addr];
        2'd2: dma_rdata <= mem2[dma_addr];
        default: dma_rdata <= mem3[dma_addr];
      endcase
    end
    if (rc_rd) begin
      rc_rdata_a <= rc_set ? mem2[rc_addr] : mem0[rc_addr];
      rc_rdata_b <= rc_set ? mem3[rc_addr] : mem1[rc_addr];
    end
  end

  // Access rules
  a_dma_one_dir: assert property (@(posedge clk) !(dma_rd && dma_wr));
  a_rc_one_dir:  assert property (@(posedge clk) !(rc_rd && rc_wr));
  a_set_excl:    assert property (@(posedge clk)
                   !((dma_rd || dma_wr) && (rc_rd || rc_wr) && dma_set == rc_set));
endmodule

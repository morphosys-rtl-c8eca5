// dma_controller: moves data between the 32-bit main memory and the frame
// buffer (64-bit words) or the context memory (32-bit words).
//
// A transfer starts with a one-cycle `start` carrying the operation, the main
// memory word address, the local address and the number of words. It is built
// from three parts, named after the source's description:
//  * State Controller: the FSM that sequences a transfer until `count` words
//    have moved, then pulses `done`; `busy` is high meanwhile and `busy_set`
//    tells which frame-buffer set is in use.
//  * Address Generator Unit: the main-memory address counter and the local
//    (frame-buffer {bank,offset} or context-memory word) address counter.
//  * Data Packing Register: holds the first 32-bit half of a 64-bit frame
//    buffer word (memory to FB) or the second half still to be written out
//    (FB to memory).
// Rates: memory to FB takes two memory cycles per 64-bit word (one request per
// cycle, the second half completes the word); memory to context memory moves
// one 32-bit word per cycle; FB to memory moves two 32-bit words per FB word.
// Main memory is assumed to accept a request every cycle and return read data
// the cycle after mem_rd (fixed latency, no wait states). The frame-buffer read
// port is synchronous (data the cycle after fb_rd).
// Local address for FB transfers: loc_addr = {set, bank, offset[5:0]}; the
// {bank,offset} part increments, so one transfer can fill a whole set.
// Context memory address: loc_addr = {block, rowcol, ctx}, incrementing.
// From the source: the three parts, the 64-bit FB bus, the 32-bit memory and
// context buses, two cycles per 64-bit word. This design's own choices: the
// command format, the memory timing and the counting.
module dma_controller
  import morphosys_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // command from Tiny RISC
  input  logic        start,
  input  dma_op_e     op,
  input  logic [31:0] mem_addr_in,
  input  logic [7:0]  loc_addr_in,
  input  logic [8:0]  count_in,
  output logic        busy,
  output logic        busy_set,
  output logic        done,
  // main memory
  output logic        mem_rd,
  output logic        mem_wr,
  output logic [31:0] mem_addr,
  output logic [31:0] mem_wdata,
  input  logic [31:0] mem_rdata,
  // frame buffer
  output logic        fb_rd,
  output logic        fb_wr,
  output logic        fb_set,
  output logic        fb_bank,
  output logic [5:0]  fb_addr,
  output logic [63:0] fb_wdata,
  input  logic [63:0] fb_rdata,
  // context memory
  output logic        ctx_we,
  output logic [7:0]  ctx_addr,
  output logic [31:0] ctx_wdata
);

  typedef enum logic [2:0] {S_IDLE, S_M2L, S_F2M_RD, S_F2M_LO, S_F2M_HI} state_e;

  state_e      state;
  dma_op_e     op_q;
  logic [31:0] agu_mem;       // next main-memory address
  logic [7:0]  agu_loc;       // next local address to write / read
  logic [9:0]  n_issue;       // memory reads (or FB reads) still to issue
  logic [9:0]  n_recv;        // words still to receive / write out
  logic        half;          // memory->FB: next returned word is the high half
  logic [31:0] pack;          // Data Packing Register
  logic        rd_pend;       // a memory read was issued last cycle

  assign busy     = (state != S_IDLE);
  assign busy_set = agu_loc[7];

  always_comb begin
    mem_rd    = 1'b0;
    mem_wr    = 1'b0;
    mem_addr  = agu_mem;
    mem_wdata = '0;
    fb_rd     = 1'b0;
    fb_wr     = 1'b0;
    fb_set    = agu_loc[7];
    fb_bank   = agu_loc[6];
    fb_addr   = agu_loc[5:0];
    fb_wdata  = {mem_rdata, pack};
    ctx_we    = 1'b0;
    ctx_addr  = agu_loc;
    ctx_wdata = mem_rdata;
    unique case (state)
      S_M2L: begin
        mem_rd = (n_issue != 0);
        if (rd_pend) begin
          if (op_q == DMA_MEM2CTX) ctx_we = 1'b1;
          else                     fb_wr  = half;
        end
      end
      S_F2M_RD: fb_rd = 1'b1;
      S_F2M_LO: begin
        mem_wr    = 1'b1;
        mem_wdata = fb_rdata[31:0];
        fb_rd     = (n_issue != 0);
        fb_addr   = 6'(agu_loc[5:0] + 6'd1);
        fb_bank   = agu_loc[6] ^ (&agu_loc[5:0]);
      end
      S_F2M_HI: begin
        mem_wr    = 1'b1;
        mem_wdata = pack;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      op_q    <= DMA_MEM2FB;
      agu_mem <= '0;
      agu_loc <= '0;
      n_issue <= '0;
      n_recv  <= '0;
      half    <= 1'b0;
      pack    <= '0;
      rd_pend <= 1'b0;
      done    <= 1'b0;
    end else begin
      done    <= 1'b0;
      rd_pend <= mem_rd;
      unique case (state)
        S_IDLE: if (start) begin
          op_q    <= op;
          agu_mem <= mem_addr_in;
          agu_loc <= loc_addr_in;
          half    <= 1'b0;
          if (count_in == 0) begin
            done <= 1'b1;
          end else if (op == DMA_FB2MEM) begin
            n_issue <= 10'(count_in) - 10'd1;
            n_recv  <= 10'(count_in);
            state   <= S_F2M_RD;
          end else begin
            n_issue <= (op == DMA_MEM2FB) ? {count_in, 1'b0} : 10'(count_in);
            n_recv  <= (op == DMA_MEM2FB) ? {count_in, 1'b0} : 10'(count_in);
            state   <= S_M2L;
          end
        end
        S_M2L: begin
          if (mem_rd) begin
            agu_mem <= agu_mem + 32'd1;
            n_issue <= n_issue - 10'd1;
          end
          if (rd_pend) begin
            n_recv <= n_recv - 10'd1;
            if (op_q == DMA_MEM2CTX) begin
              agu_loc <= agu_loc + 8'd1;
            end else begin
              half <= ~half;
              if (!half) pack <= mem_rdata;
              else       agu_loc[6:0] <= agu_loc[6:0] + 7'd1;
            end
            if (n_recv == 10'd1) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end
          end
        end
        S_F2M_RD: state <= S_F2M_LO;
        S_F2M_LO: begin
          pack    <= fb_rdata[63:32];
          agu_mem <= agu_mem + 32'd1;
          if (n_issue != 0) begin
            n_issue      <= n_issue - 10'd1;
            agu_loc[6:0] <= agu_loc[6:0] + 7'd1;
          end
          state <= S_F2M_HI;
        end
        S_F2M_HI: begin
          agu_mem <= agu_mem + 32'd1;
          n_recv  <= n_recv - 10'd1;
          if (n_recv == 10'd1) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            state <= S_F2M_LO;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_no_restart: assert property (@(posedge clk) disable iff (!rst_n) busy |-> !start);
endmodule

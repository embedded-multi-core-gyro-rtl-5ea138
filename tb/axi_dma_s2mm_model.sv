// axi_dma_s2mm_model: behavioural stand-in, for simulation only, for an AXI
// DMA engine in stream-to-memory (S2MM) mode and the DDR buffer it writes.
//
// It accepts AXI4-Stream beats and writes each 32-bit word to the next
// location of a ring buffer `mem` of BUF_WORDS words (the pre-allocated DDR
// receive buffer). Beats are grouped into memory bursts of at most BURST_LEN
// beats; a burst also closes at TLAST. At each TLAST the model raises
// `irq` for one clock (the end-of-transfer interrupt), reports the buffer
// index of the packet's first word in `pkt_base` and the packet length in
// `pkt_len`. TREADY is low while `stall` is high. No AXI4 memory-mapped bus,
// register file or descriptor handling is modelled.
module axi_dma_s2mm_model #(
  parameter int BUF_WORDS = 4096,
  parameter int BURST_LEN = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        stall,
  input  logic [31:0] s_axis_tdata,
  input  logic [3:0]  s_axis_tkeep,
  input  logic        s_axis_tlast,
  input  logic        s_axis_tvalid,
  output logic        s_axis_tready,
  output logic        irq,
  output int          pkt_base,
  output int          pkt_len,
  output int          beats,
  output int          packets,
  output int          bursts,
  output int          stall_beats   // clocks with TVALID high and TREADY low
);
  logic [31:0] mem [BUF_WORDS];
  int wr_ptr;
  int cur_len;
  int burst_fill;

  assign s_axis_tready = rst_n && !stall;

  always @(posedge clk) begin
    irq <= 1'b0;
    if (!rst_n) begin
      wr_ptr      <= 0;
      cur_len     <= 0;
      burst_fill  <= 0;
      beats       <= 0;
      packets     <= 0;
      bursts      <= 0;
      stall_beats <= 0;
      pkt_base    <= 0;
      pkt_len     <= 0;
    end else begin
      if (s_axis_tvalid && !s_axis_tready) stall_beats <= stall_beats + 1;
      if (s_axis_tvalid && s_axis_tready) begin
        mem[wr_ptr] <= s_axis_tdata & {{8{s_axis_tkeep[3]}}, {8{s_axis_tkeep[2]}},
                                       {8{s_axis_tkeep[1]}}, {8{s_axis_tkeep[0]}}};
        wr_ptr <= (wr_ptr + 1) % BUF_WORDS;
        beats  <= beats + 1;
        if (s_axis_tlast || burst_fill == BURST_LEN - 1) begin
          bursts     <= bursts + 1;
          burst_fill <= 0;
        end else begin
          burst_fill <= burst_fill + 1;
        end
        if (s_axis_tlast) begin
          irq      <= 1'b1;
          packets  <= packets + 1;
          pkt_len  <= cur_len + 1;
          pkt_base <= (wr_ptr - cur_len + BUF_WORDS) % BUF_WORDS;
          cur_len  <= 0;
        end else begin
          cur_len <= cur_len + 1;
        end
      end
    end
  end
endmodule

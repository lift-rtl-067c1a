// Output buffer of the auxiliary processing unit: one SRAM per MAC array
// that keeps the partially accumulated output vectors of the high-degree
// vertices mapped to that array, so that their many updates stay on the
// base die.  512 KB in total over 64 arrays = 8 KB each, i.e. 1024 chunks of
// 64 bits = 32 vectors of 128 elements per array.
//
// One read port with one cycle of latency and one write port; a read and a
// write of the same address in one cycle return the old data.  The contents
// are not reset: the flush sequence reads every used vector and writes it
// back as zero, and the buffer is cleared that way after reset.
//
// The 512 KB total (64 x 8 KB) and the role of the buffers follow the
// architecture; one buffer per MAC array, the one-cycle read and the
// read-before-write behaviour are this implementation's choices.
module output_buffer
  import lift_pkg::*;
#(
  parameter int unsigned DEPTH = 1024
) (
  input  logic                     clk,
  input  logic                     rd_en,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output word_t                    rdata,
  input  logic                     wr_en,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  word_t                    wr_data
);
  word_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (rd_en) rdata <= mem[rd_addr];
    if (wr_en) mem[wr_addr] <= wr_data;
  end

endmodule

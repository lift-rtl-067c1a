// Input vector buffer: holds fetched input vectors (rows of X*W, or rows of
// W during the combination phase) until every non-zero of their column has
// been processed, and broadcasts them chunk by chunk to the MAC arrays.
//
// The buffer is divided into NSLOT slots of one vector each (NCHUNK chunks of
// LANES elements).  2 KB = 8 slots in a lightweight processing unit and
// 16 KB = 64 slots in the auxiliary processing unit, for 128-element vectors
// of 16-bit elements.  Slot management:
//   * alloc: alloc_ok/alloc_slot name the lowest free slot (combinational);
//     alloc_take claims it at the clock edge and clears its loaded bit.
//   * write: fetched chunks arrive as (slot, chunk, data) with no back
//     pressure; the slot becomes loaded when its last chunk (NCHUNK-1) is
//     written, so chunks of one vector must arrive in order.
//   * free: free_valid/free_slot releases a slot after its column is done.
// Read: rd_en with (slot, chunk) returns rd_data one cycle later.
//
// The buffer sizes follow the architecture; dividing it into slots, the
// lowest-free-slot allocation and release after the column ends are this
// implementation's own choices.
module input_vector_buffer
  import lift_pkg::*;
#(
  parameter int unsigned NSLOT = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // allocation
  output logic                     alloc_ok,
  output logic [$clog2(NSLOT)-1:0] alloc_slot,
  input  logic                     alloc_take,
  // release
  input  logic                     free_valid,
  input  logic [$clog2(NSLOT)-1:0] free_slot,
  // fill from the fetch path
  input  logic                     wr_valid,
  input  logic [$clog2(NSLOT)-1:0] wr_slot,
  input  logic [CHUNK_W-1:0]       wr_chunk,
  input  word_t                    wr_data,
  // broadcast read
  input  logic                     rd_en,
  input  logic [$clog2(NSLOT)-1:0] rd_slot,
  input  logic [CHUNK_W-1:0]       rd_chunk,
  output word_t                    rd_data,
  // status
  output logic [NSLOT-1:0]         loaded
);
  localparam int unsigned SW = $clog2(NSLOT);

  word_t            mem [NSLOT*NCHUNK];
  logic [NSLOT-1:0] busy;

  // lowest free slot
  always_comb begin
    alloc_ok   = 1'b0;
    alloc_slot = '0;
    for (int s = NSLOT - 1; s >= 0; s--) begin
      if (!busy[s]) begin
        alloc_ok   = 1'b1;
        alloc_slot = SW'(s);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= '0;
      loaded <= '0;
    end else begin
      if (wr_valid && wr_chunk == CHUNK_W'(NCHUNK - 1)) loaded[wr_slot] <= 1'b1;
      if (free_valid) begin
        busy[free_slot]   <= 1'b0;
        loaded[free_slot] <= 1'b0;
      end
      if (alloc_take && alloc_ok) begin
        busy[alloc_slot]   <= 1'b1;
        loaded[alloc_slot] <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (wr_valid) mem[{wr_slot, wr_chunk}] <= wr_data;
    if (rd_en)    rd_data <= mem[{rd_slot, rd_chunk}];
  end

  // A slot is only written while it is claimed and not yet complete.
  a_write_claimed: assert property (@(posedge clk) disable iff (!rst_n) wr_valid |-> busy[wr_slot])
    else $error("input_vector_buffer: write to a free slot");

endmodule

// Look-ahead FIFO: the scratchpad that buffers sparse-matrix non-zeros in
// front of the MAC arrays and hides the latency of input-vector fetches.
//
// Besides the usual write port and head (pop) port it has a look-ahead port
// whose pointer runs ahead of the head.  The prefetcher reads each non-zero
// there, learns its column index, and on advancing attaches a tag (the input
// vector buffer slot that will hold the column's vector).  Only entries that
// the look-ahead pointer has passed are visible at the head, together with
// their tag.  Pointer order is always head <= look-ahead <= write.
//
// Depth: 1 KB of 64-bit records = 128 entries for the lightweight processing
// unit (design configuration).  Each port uses a valid/ready style
// handshake; all moves take effect at the clock edge.
//
// The 1 KB size and the purpose (buffer non-zeros, hide fetch latency)
// follow the architecture; the second read pointer and the per-entry slot
// tag are this implementation's way of doing it.
module lookahead_fifo #(
  parameter int unsigned WIDTH = 64,
  parameter int unsigned DEPTH = 128,
  parameter int unsigned TAG_W = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  // write port
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  // look-ahead port
  output logic             la_valid,
  output logic [WIDTH-1:0] la_data,
  input  logic             la_advance,
  input  logic [TAG_W-1:0] la_tag,
  // head port
  output logic             hd_valid,
  output logic [WIDTH-1:0] hd_data,
  output logic [TAG_W-1:0] hd_tag,
  input  logic             hd_pop
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem  [DEPTH];
  logic [TAG_W-1:0] tags [DEPTH];
  // pointers carry one wrap bit
  logic [AW:0] wr_ptr, la_ptr, rd_ptr;

  assign in_ready = (wr_ptr - rd_ptr) != (AW+1)'(DEPTH);
  assign la_valid = (la_ptr != wr_ptr);
  assign la_data  = mem[la_ptr[AW-1:0]];
  assign hd_valid = (rd_ptr != la_ptr);
  assign hd_data  = mem[rd_ptr[AW-1:0]];
  assign hd_tag   = tags[rd_ptr[AW-1:0]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      la_ptr <= '0;
      rd_ptr <= '0;
    end else begin
      if (in_valid && in_ready) wr_ptr <= wr_ptr + 1'b1;
      if (la_advance && la_valid) la_ptr <= la_ptr + 1'b1;
      if (hd_pop && hd_valid) rd_ptr <= rd_ptr + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) mem[wr_ptr[AW-1:0]] <= in_data;
    if (la_advance && la_valid) tags[la_ptr[AW-1:0]] <= la_tag;
  end

  // DEPTH must be a power of two for the wrap-bit pointers.
  initial assert ((1 << AW) == DEPTH) else $error("lookahead_fifo: DEPTH must be a power of two");

endmodule

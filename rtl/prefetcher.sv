// Prefetcher: walks the look-ahead port of the look-ahead FIFO, and for the
// first non-zero of every column claims a free input vector buffer slot and
// issues a fetch request for that column's input vector.  Every non-zero is
// tagged with the slot of its column as it passes, so the controller can
// later find the vector.
//
// Columns are delimited by the `last` flag of the non-zero record (the final
// non-zero of a CSC column).  A new column needs both a free slot and an
// accepted fetch request; until then the look-ahead pointer stops
// (ev_noslot pulses while it waits for a slot).  Non-zeros of an open column
// pass at one per cycle.  The fetch request is a valid/ready handshake whose
// valid does not depend on ready.
//
// Prefetching by column index from the look-ahead FIFO follows the
// architecture; the slot protocol and one request per column are this
// implementation's choices.
module prefetcher
  import lift_pkg::*;
#(
  parameter int unsigned NSLOT = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // look-ahead port of the FIFO
  input  logic                     la_valid,
  input  nz_t                      la_data,
  output logic                     la_advance,
  output logic [$clog2(NSLOT)-1:0] la_tag,
  // slot allocation in the input vector buffer
  input  logic                     alloc_ok,
  input  logic [$clog2(NSLOT)-1:0] alloc_slot,
  output logic                     alloc_take,
  // fetch request towards the non-CIM memory
  output logic                     fetch_valid,
  input  logic                     fetch_ready,
  output vid_t                     fetch_col,
  output logic [$clog2(NSLOT)-1:0] fetch_slot,
  // event: a new column waits for a free slot
  output logic                     ev_noslot
);
  logic                     in_col;
  logic [$clog2(NSLOT)-1:0] cur_slot;
  logic                     new_col_go;

  assign fetch_valid = la_valid && !in_col && alloc_ok;
  assign fetch_col   = la_data.col;
  assign fetch_slot  = alloc_slot;
  assign new_col_go  = fetch_valid && fetch_ready;
  assign alloc_take  = new_col_go;
  assign la_advance  = in_col ? la_valid : new_col_go;
  assign la_tag      = in_col ? cur_slot : alloc_slot;
  assign ev_noslot   = la_valid && !in_col && !alloc_ok;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_col   <= 1'b0;
      cur_slot <= '0;
    end else if (la_advance) begin
      in_col <= !la_data.last;
      if (!in_col) cur_slot <= alloc_slot;
    end
  end

endmodule

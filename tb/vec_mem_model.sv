// Behavioural model of the non-CIM bank groups answering input-vector
// fetches.  A request (id, column, slot) is accepted when fewer than QDEPTH
// are pending (and, if STALL_PCT > 0, not refused at random); LAT cycles
// after acceptance its 32 chunks are returned, one per cycle, in order,
// tagged with id and slot.  Vector data comes from lift_tb_pkg::vec_chunk.
module vec_mem_model
  import lift_tb_pkg::*;
#(
  parameter int unsigned IDW       = 1,
  parameter int unsigned SLOT_W    = 3,
  parameter int unsigned LAT       = 10,
  parameter int unsigned QDEPTH    = 4,
  parameter int unsigned STALL_PCT = 0
) (
  input  logic              clk,
  input  logic              req_valid,
  output logic              req_ready,
  input  logic [IDW-1:0]    req_id,
  input  logic [21:0]       req_col,
  input  logic [SLOT_W-1:0] req_slot,
  output logic              rsp_valid,
  output logic [IDW-1:0]    rsp_id,
  output logic [SLOT_W-1:0] rsp_slot,
  output logic [4:0]        rsp_chunk,
  output logic [63:0]       rsp_data
);
  typedef struct { int id; int col; int slot; longint due; } rq_t;
  rq_t    q[$];
  longint now = 0;
  int     chunk = 0;
  bit     refuse = 0;

  assign req_ready = (q.size() < QDEPTH) && !refuse;

  initial begin
    rsp_valid = 0; rsp_id = '0; rsp_slot = '0; rsp_chunk = '0; rsp_data = '0;
  end

  always @(posedge clk) begin
    now++;
    rsp_valid <= 1'b0;
    if (q.size() > 0 && q[0].due <= now) begin
      rsp_valid <= 1'b1;
      rsp_id    <= IDW'(q[0].id);
      rsp_slot  <= SLOT_W'(q[0].slot);
      rsp_chunk <= 5'(chunk);
      rsp_data  <= vec_chunk(q[0].col, chunk);
      if (chunk == 31) begin
        chunk = 0;
        void'(q.pop_front());
      end else chunk++;
    end
    if (req_valid && req_ready)
      q.push_back('{id: int'(req_id), col: int'(req_col), slot: int'(req_slot), due: now + LAT});
    refuse <= (STALL_PCT > 0) && (($urandom % 100) < STALL_PCT);
  end

endmodule

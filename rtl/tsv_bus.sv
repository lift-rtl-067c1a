// Fetch path over the bank-group buses and TSVs: lets all processing units
// share one path to the non-CIM bank groups for input-vector fetches.
//
// Requests (column index and destination buffer slot) from NREQ units are
// arbitrated round-robin onto a single request channel that carries the
// requester's id.  The memory side answers with the vector as a stream of
// chunks tagged with that id and slot; the bus steers each chunk to its
// requester.  Request side is valid/ready (a unit's valid must not wait for
// ready); the response side has no back pressure, since every input vector
// buffer slot is reserved before its request goes out.  ev_contention pulses
// in cycles where more than one unit requests.  The arbitration scheme, the
// single shared channel and the id tagging are this implementation's own
// choices.
module tsv_bus
  import lift_pkg::*;
#(
  parameter int unsigned NREQ   = 33,
  parameter int unsigned SLOT_W = 6
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // from the units
  input  logic [NREQ-1:0]           req_valid,
  output logic [NREQ-1:0]           req_ready,
  input  vid_t                      req_col  [NREQ],
  input  logic [SLOT_W-1:0]         req_slot [NREQ],
  // to the memory side
  output logic                      mem_req_valid,
  input  logic                      mem_req_ready,
  output logic [$clog2(NREQ)-1:0]   mem_req_id,
  output vid_t                      mem_req_col,
  output logic [SLOT_W-1:0]         mem_req_slot,
  // vector chunks back from the memory side
  input  logic                      mem_rsp_valid,
  input  logic [$clog2(NREQ)-1:0]   mem_rsp_id,
  input  logic [SLOT_W-1:0]         mem_rsp_slot,
  input  logic [CHUNK_W-1:0]        mem_rsp_chunk,
  input  word_t                     mem_rsp_data,
  // to the units
  output logic [NREQ-1:0]           rsp_valid,
  output logic [SLOT_W-1:0]         rsp_slot,
  output logic [CHUNK_W-1:0]        rsp_chunk,
  output word_t                     rsp_data,
  output logic                      ev_contention
);
  localparam int unsigned IW = $clog2(NREQ);

  logic [IW-1:0] ptr, grant;
  logic          any;
  int unsigned   nreq;

  // first requester at or after ptr
  always_comb begin
    any   = 1'b0;
    grant = '0;
    nreq  = 0;
    for (int k = 0; k < NREQ; k++) begin
      int unsigned idx;
      idx = (32'(ptr) + k) % NREQ;
      if (req_valid[idx]) begin
        nreq++;
        if (!any) begin
          any   = 1'b1;
          grant = IW'(idx);
        end
      end
    end
  end

  assign mem_req_valid = any;
  assign mem_req_id    = grant;
  assign mem_req_col   = req_col[grant];
  assign mem_req_slot  = req_slot[grant];
  assign ev_contention = (nreq > 1);

  always_comb begin
    req_ready = '0;
    if (any) req_ready[grant] = mem_req_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ptr <= '0;
    else if (any && mem_req_ready)
      ptr <= (32'(grant) == NREQ - 1) ? '0 : grant + 1'b1;
  end

  always_comb begin
    rsp_valid = '0;
    if (mem_rsp_valid) rsp_valid[mem_rsp_id] = 1'b1;
  end
  assign rsp_slot  = mem_rsp_slot;
  assign rsp_chunk = mem_rsp_chunk;
  assign rsp_data  = mem_rsp_data;

endmodule

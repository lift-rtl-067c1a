// Behavioural model of one DRAM bank seen through its I/O sense amplifiers
// and write drivers: column reads return data a fixed LAT cycles later,
// column writes take effect at the clock edge.  Never-written words read as
// zero (the contents are kept sparsely).  A read and a write of the same
// word in one cycle return the old data.  Row activation and refresh are
// not modelled.
module dram_bank_model #(
  parameter int unsigned AW  = 21,
  parameter int unsigned LAT = 7
) (
  input  logic          clk,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output logic [63:0]   rdata,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [63:0]   wr_data
);
  logic [63:0] mem [int unsigned];
  logic [63:0] pipe [LAT];

  assign rdata = pipe[LAT-1];

  always @(posedge clk) begin
    for (int k = LAT - 1; k > 0; k--) pipe[k] <= pipe[k-1];
    if (rd_en) pipe[0] <= mem.exists(rd_addr) ? mem[rd_addr] : 64'd0;
    else       pipe[0] <= 64'hDEAD_BEEF_DEAD_BEEF;
    if (wr_en) mem[wr_addr] = wr_data;
  end

  function automatic logic [63:0] peek(int unsigned a);
    return mem.exists(a) ? mem[a] : 64'd0;
  endfunction

endmodule

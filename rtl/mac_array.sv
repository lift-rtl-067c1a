// MAC array: LANES multiply-accumulate units that perform one chunk of the
// vector-scalar product  partial[i] += a(i,j) * x_j  per cycle.
//
// The partial output vector lives outside the array: in a DRAM bank, reached
// through the bank's I/O sense amplifiers and write drivers (lightweight
// processing unit), or in an output buffer (auxiliary processing unit).  The
// array therefore does a read-modify-write per chunk:
//   cycle t            issue: read request to the accumulator store (addr)
//   cycle t+1          x chunk arrives from the input vector buffer
//   cycle t+ACC_LAT    partial chunk arrives; a*x is added
//   cycle t+ACC_LAT+1  the sum is written back to the same address
// One chunk can be issued every cycle.  Elements are 16-bit signed fixed
// point with 8 fraction bits; the product is shifted arithmetically right by
// 8 and truncated, the sum wraps (this number format is an implementation
// choice).  ACC_LAT must be at least 1.
module mac_array
  import lift_pkg::*;
#(
  parameter int unsigned ACC_LAT = 7,
  parameter int unsigned ADDR_W  = 21
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              issue,
  input  logic [ADDR_W-1:0] addr,
  input  elem_t             a,
  input  word_t             x,        // valid one cycle after issue
  output logic              acc_rd_en,
  output logic [ADDR_W-1:0] acc_rd_addr,
  input  word_t             acc_rdata,
  output logic              acc_wr_en,
  output logic [ADDR_W-1:0] acc_wr_addr,
  output word_t             acc_wr_data
);
  typedef struct packed {
    logic              v;
    logic [ADDR_W-1:0] addr;
    elem_t             a;
  } op_t;

  op_t   op_pipe [ACC_LAT];
  op_t   op_now;
  word_t x_now, sum;

  assign acc_rd_en   = issue;
  assign acc_rd_addr = addr;
  assign op_now      = op_pipe[ACC_LAT-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < ACC_LAT; k++) op_pipe[k] <= '0;
    end else begin
      op_pipe[0] <= '{v: issue, addr: addr, a: a};
      for (int k = 1; k < ACC_LAT; k++) op_pipe[k] <= op_pipe[k-1];
    end
  end

  // x arrives one cycle after issue; delay it by ACC_LAT-1 more cycles
  if (ACC_LAT == 1) begin : g_x_direct
    assign x_now = x;
  end else begin : g_x_delay
    word_t xd [ACC_LAT-1];
    always_ff @(posedge clk) begin
      xd[0] <= x;
      for (int k = 1; k < ACC_LAT - 1; k++) xd[k] <= xd[k-1];
    end
    assign x_now = xd[ACC_LAT-2];
  end

  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      logic signed [2*DW-1:0] prod;
      prod = op_now.a * elem_t'(x_now[l*DW +: DW]);
      sum[l*DW +: DW] = elem_t'(acc_rdata[l*DW +: DW]) + elem_t'(prod >>> FRAC_BITS);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_wr_en   <= 1'b0;
      acc_wr_addr <= '0;
      acc_wr_data <= '0;
    end else begin
      acc_wr_en   <= op_now.v;
      acc_wr_addr <= op_now.addr;
      acc_wr_data <= sum;
    end
  end

  initial assert (ACC_LAT >= 1) else $error("mac_array: ACC_LAT must be >= 1");

endmodule

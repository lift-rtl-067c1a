// Self-checking test of tsv_bus with 5 requesters: every requester keeps
// issuing fetch requests; the memory side accepts at random.  Checks that a
// granted request carries its requester's id, column and slot, that no
// requester waits more than NREQ grants while requesting (round-robin
// fairness), that responses are steered to exactly the addressed requester,
// and that contention is reported.
module tb_tsv_bus;
  import lift_pkg::*;
  localparam int N = 5;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req_valid = '0, req_ready, rsp_valid;
  vid_t req_col [N];
  logic [5:0] req_slot [N];
  logic mem_req_valid, mem_req_ready = 0, ev_contention;
  logic [2:0] mem_req_id, mem_rsp_id = '0;
  vid_t mem_req_col;
  logic [5:0] mem_req_slot, mem_rsp_slot = '0, rsp_slot;
  logic mem_rsp_valid = 0;
  logic [CHUNK_W-1:0] mem_rsp_chunk = '0, rsp_chunk;
  word_t mem_rsp_data = '0, rsp_data;
  int checks = 0, failures = 0;
  int waited [N];
  int grants [N];
  int contention = 0;
  logic [N-1:0] served = '0;

  tsv_bus #(.NREQ(N), .SLOT_W(6)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      req_col[i] = vid_t'(i * 1000); req_slot[i] = 6'(i); waited[i] = 0; grants[i] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      req_valid = req_valid & ~served;   // accepted at the last edge
      served = '0;
      for (int i = 0; i < N; i++) begin
        // a request, once raised, stays until accepted
        if (!req_valid[i] && ($urandom % 3 == 0)) begin
          req_valid[i] = 1; req_col[i] = vid_t'($urandom); req_slot[i] = 6'($urandom);
        end
      end
      mem_req_ready = ($urandom % 2) != 0;
      mem_rsp_valid = ($urandom % 2) != 0;
      mem_rsp_id = 3'($urandom % N); mem_rsp_slot = 6'($urandom);
      mem_rsp_chunk = CHUNK_W'($urandom); mem_rsp_data = {$urandom, $urandom};
      #1;
      if (ev_contention) contention++;
      check(mem_req_valid == (req_valid != '0), "request forwarded");
      check($countones(req_ready) <= 1, "one grant at a time");
      if (mem_req_valid) begin
        check(req_valid[mem_req_id], "grant to a requester");
        check(mem_req_col == req_col[mem_req_id] && mem_req_slot == req_slot[mem_req_id], "granted payload");
        check(req_ready[mem_req_id] == mem_req_ready, "ready back to the granted unit");
      end
      check(rsp_valid == (mem_rsp_valid ? (N'(1) << mem_rsp_id) : '0), "response steering");
      check(rsp_slot == mem_rsp_slot && rsp_chunk == mem_rsp_chunk && rsp_data == mem_rsp_data, "response payload");
      if (mem_req_valid && mem_req_ready) begin
        for (int i = 0; i < N; i++)
          if (req_valid[i] && i != int'(mem_req_id)) begin
            waited[i]++;
            check(waited[i] < N, "round-robin fairness");
          end
        waited[mem_req_id] = 0;
        grants[mem_req_id]++;
        served[mem_req_id] = 1'b1;
      end
    end
    for (int i = 0; i < N; i++) check(grants[i] > 100, "every requester served");
    check(contention > 0, "contention seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

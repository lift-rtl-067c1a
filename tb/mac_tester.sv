// Drives one mac_array (store latency LAT) for tb_mac_array.
module mac_tester
  import lift_pkg::*;
  import lift_tb_pkg::*;
#(
  parameter int unsigned LAT = 7
) (
  input  logic clk,
  input  logic rst_n,
  output bit   done
);
  localparam int AW = 8;
  logic issue = 0;
  logic [AW-1:0] addr = '0, rd_addr, wr_addr;
  elem_t a = '0;
  word_t x = '0, rdata, wr_data;
  logic rd_en, wr_en;
  int checks = 0, failures = 0;
  logic [63:0] ref_mem [256];
  longint issue_cyc [256];
  longint cyc = 0;

  mac_array #(.ACC_LAT(LAT), .ADDR_W(AW)) dut (
    .clk, .rst_n, .issue, .addr, .a, .x,
    .acc_rd_en(rd_en), .acc_rd_addr(rd_addr), .acc_rdata(rdata),
    .acc_wr_en(wr_en), .acc_wr_addr(wr_addr), .acc_wr_data(wr_data)
  );
  dram_bank_model #(.AW(AW), .LAT(LAT)) store (
    .clk, .rd_en, .rd_addr, .rdata, .wr_en, .wr_addr, .wr_data
  );

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (wr_en && rst_n) begin
      checks++;
      if (cyc != issue_cyc[wr_addr] + LAT + 1) begin
        failures++; $display("FAIL: LAT=%0d write-back at %0d, issued %0d", LAT, cyc, issue_cyc[wr_addr]);
      end
    end
  end

  initial begin
    done = 0;
    @(posedge rst_n);
    @(negedge clk);
    for (int i = 0; i < 256; i++) ref_mem[i] = store.peek(i);
    for (int round = 0; round < 40; round++) begin
      // 32 consecutive issues to distinct addresses (one vector's worth)
      int base;
      base = ($urandom % 8) * 32;
      a = elem_t'(($urandom % 512) - 256);
      for (int c = 0; c < 32; c++) begin
        @(negedge clk);
        issue = 1; addr = AW'(base + c);
        issue_cyc[base + c] = cyc;
        // x is presented one cycle after issue
        fork begin
          automatic word_t xv = {$urandom, $urandom};
          automatic int ad = base + c;
          automatic elem_t av = a;
          @(negedge clk);
          x = xv;
          for (int l = 0; l < 4; l++)
            ref_mem[ad][l*16 +: 16] = ref_mac(shortint'(ref_mem[ad][l*16 +: 16]), av, shortint'(xv[l*16 +: 16]));
        end join_none
      end
      @(negedge clk);
      issue = 0;
      repeat (LAT + 3) @(negedge clk);
    end
    repeat (LAT + 3) @(negedge clk);
    for (int i = 0; i < 256; i++) begin
      checks++;
      if (store.peek(i) != ref_mem[i]) begin
        failures++; $display("FAIL: LAT=%0d addr %0d got %h exp %h", LAT, i, store.peek(i), ref_mem[i]);
      end
    end
    done = 1;
  end
endmodule

// tb_scan_chain: random request patterns on a 12-segment chain. Each scan
// must service the requesting segments exactly once each, in index order,
// one per clock with no gap (idle segments are skipped inside the clock),
// then the end segment, with the matching addresses on addr.
module tb_scan_chain;
  localparam int N = 12;
  localparam int AW = $clog2(N + 2);
  logic clk = 0, rst_n = 0, clk_en = 0, clr = 0, start = 0;
  logic [N-1:0] req = '0, service;
  logic end_service;
  logic [AW-1:0] addr;
  int checks = 0, failures = 0;

  scan_chain #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      int expect_list[$];
      expect_list.delete();
      @(negedge clk);
      req = (t == 0) ? '0 : (t == 1) ? '1 : N'($urandom);
      for (int i = 0; i < N; i++) if (req[i]) expect_list.push_back(i + 1);
      expect_list.push_back(N + 1);
      clr = 1; start = 0; clk_en = 0;
      @(negedge clk);
      clr = 0; start = 1; clk_en = 1;
      // first service appears after one clock, then one per clock
      checks++;
      if (addr !== '0) begin failures++; $display("addr before first clock"); end
      foreach (expect_list[k]) begin
        @(negedge clk);
        checks++;
        if (addr !== AW'(expect_list[k]) || $countones({service, end_service}) != 1) begin
          failures++;
          $display("scan %0d req=%b step %0d addr=%0d exp %0d", t, req, k, addr, expect_list[k]);
        end
      end
      @(negedge clk);
      checks++;
      if (addr !== '0 || end_service) begin failures++; $display("chain not idle after END"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

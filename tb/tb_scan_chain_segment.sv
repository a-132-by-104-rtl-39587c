// tb_scan_chain_segment: directed checks of one scan chain segment: the
// skip path passes the authorization within the cycle, the service path
// takes one clock and services exactly one clock period, clock enable and
// clear are obeyed.
module tb_scan_chain_segment;
  logic clk = 0, rst_n = 0, clk_en = 0, clr = 0, req = 0, prev = 0;
  logic present, service;
  int checks = 0, failures = 0;

  scan_chain_segment dut (.*);

  always #5 clk = ~clk;

  task automatic chk(logic e_present, logic e_service, string what);
    #1;
    checks++;
    if (present !== e_present || service !== e_service) begin
      failures++;
      $display("%s: present=%b service=%b exp %b %b", what, present, service, e_present, e_service);
    end
  endtask

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // skip path: combinational
    @(negedge clk); req = 0; prev = 0; clk_en = 1; chk(0, 0, "skip idle");
    prev = 1; chk(1, 0, "skip pass");
    // service path: clear, then authorization arrives
    @(negedge clk); clr = 1; req = 1; prev = 0;
    @(negedge clk); clr = 0; chk(0, 0, "cleared");
    prev = 1; chk(0, 0, "before clock");
    @(negedge clk); chk(1, 1, "serviced");
    @(negedge clk); chk(1, 0, "service done");
    @(negedge clk); chk(1, 0, "stays done");
    // clock enable low holds the service
    clr = 1; @(negedge clk); clr = 0; clk_en = 0;
    @(negedge clk); chk(0, 0, "no clock");
    clk_en = 1; @(negedge clk); clk_en = 0; chk(1, 1, "serviced");
    @(negedge clk); chk(1, 1, "held without clock");
    clk_en = 1; @(negedge clk); chk(1, 0, "released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_pixel_frontend: drives the behavioural pixel front end with a random
// log-intensity walk and random restarts, and checks the latched ON/OFF
// crossings against a reference computed here.
module tb_pixel_frontend;
  logic clk = 0, rst_n = 0;
  logic [7:0] log_i = 8'd100, th_on = 8'd10, th_off = 8'd12;
  logic rst_pix = 1, on_evt, off_evt;
  int checks = 0, failures = 0, n_on = 0, n_off = 0;
  int m_ref = 100;
  bit m_on = 0, m_off = 0;

  pixel_frontend #(.LOGI_W(8)) dut (.*);

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
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      checks += 2;
      if (on_evt !== m_on)  begin failures++; $display("%0d on %b exp %b", i, on_evt, m_on); end
      if (off_evt !== m_off) begin failures++; $display("%0d off %b exp %b", i, off_evt, m_off); end
      rst_pix = ($urandom % 8) == 0;
      log_i = 8'(int'(log_i) + int'($urandom % 9) - 4);
      if (log_i < 20) log_i = 20;
      if (log_i > 230) log_i = 230;
      @(posedge clk);
      if (rst_pix) begin m_ref = log_i; m_on = 0; m_off = 0; end
      else if (!m_on && !m_off) begin
        if (int'(log_i) - m_ref >= int'(th_on)) begin m_on = 1; n_on++; end
        else if (m_ref - int'(log_i) >= int'(th_off)) begin m_off = 1; n_off++; end
      end
    end
    checks++;
    if (n_on == 0 || n_off == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

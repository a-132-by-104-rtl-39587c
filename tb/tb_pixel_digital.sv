// tb_pixel_digital: random SAMPLE/RESTART/comparator sequences checked
// against a reference model of the Event Memory kept in the testbench.
module tb_pixel_digital;
  logic clk = 0, rst_n = 0;
  logic sample = 0, restart = 0, on_evt = 0, off_evt = 0;
  logic rst_pix, me, ev_on, ev_off;
  int checks = 0, failures = 0;
  logic m_me = 0, m_pol = 0;
  int n_restarts = 0;

  pixel_digital dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      // check outputs for the present state
      checks += 4;
      if (me !== m_me) begin failures++; $display("%0d me %b exp %b", i, me, m_me); end
      if (ev_on !== (m_me & m_pol)) failures++;
      if (ev_off !== (m_me & ~m_pol)) failures++;
      // new inputs
      sample  = ($urandom % 4) == 0;
      restart = !sample && ($urandom % 4) == 0;
      case ($urandom % 3)
        0: begin on_evt = 0; off_evt = 0; end
        1: begin on_evt = 1; off_evt = 0; end
        default: begin on_evt = 0; off_evt = 1; end
      endcase
      #1;
      if (rst_pix !== (restart & m_me)) failures++;
      if (rst_pix) n_restarts++;
      @(posedge clk);
      if (sample) begin m_me = on_evt | off_evt; m_pol = on_evt; end
      else if (restart) m_me = 0;
    end
    checks++;
    if (n_restarts == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

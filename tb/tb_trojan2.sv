// tb_trojan2: clocks random keystream words into the time-bomb Trojan, about
// one in four with bits 16:13 all ones, and counts those words itself. The
// reset must pass through until the 100th such word has been clocked in,
// then stay low whatever follows, until the external reset clears the bomb.
// The test is run twice to check the clear.
module tb_trojan2;
  timeunit 1ns;
  timeprecision 1ps;

  logic        clk = 1'b0;
  logic [31:0] z;
  logic        rst_n_in, rst_n_out, trigger;
  int          seen;
  int          checks = 0, failures = 0;

  trojan2 dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_once();
    rst_n_in = 1'b0;
    z = '1;
    @(posedge clk); #1;
    rst_n_in = 1'b1;
    #1;
    seen = 0;
    for (int k = 0; k < 800; k++) begin
      checks += 2;
      if (trigger !== (seen >= 100)) begin
        failures++;
        $display("after %0d words: trigger=%b", seen, trigger);
      end
      if (rst_n_out !== (seen < 100)) begin
        failures++;
        $display("after %0d words: rst_n_out=%b", seen, rst_n_out);
      end
      z = $urandom;
      if ($urandom_range(3) == 0) z[16:13] = 4'hF;
      @(posedge clk);
      if (z[16:13] == 4'hF) seen++;
      #1;
    end
    checks++;
    if (seen < 100) begin failures++; $display("bomb never went off"); end
  endtask

  initial begin
    run_once();
    run_once();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_trojan3: feeds the Trojan a stream of keystream words (one every 10 ns)
// in which bits 16:13 are all ones about one word in three, and counts
// activations itself: a word with 1111 that follows a word without it.
// counter1 counts activations modulo 16; the second AND tree fires whenever
// counter1 reaches 15, i.e. at activations 15, 31, 47, ... so the 62nd pulse
// of counter2, and the hold of the reset, come with activation
// 15 + 16*61 = 991. Checks the reset before and after that point, that
// tmp_load rises on every second activation, and the clear by rst_n_in.
module tb_trojan3;
  timeunit 1ns;
  timeprecision 1ps;

  logic [31:0] z;
  logic        rst_n_in, rst_n_out, trigger;
  logic        prev_on, on;
  int          act, tmp_rises;
  int          checks = 0, failures = 0;

  trojan3 dut (.*);

  always @(posedge dut.tmp_load) tmp_rises++;

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_once();
    z = '0;
    rst_n_in = 1'b1;   // give the asynchronous clear an edge
    #1;
    rst_n_in = 1'b0;
    #10;
    rst_n_in = 1'b1;
    act = 0; tmp_rises = 0; prev_on = 1'b0;
    while (act < 1100) begin
      z = $urandom;
      on = ($urandom_range(2) == 0);
      z[16:13] = on ? 4'hF : 4'h0 | 4'($urandom_range(14));
      if (on && !prev_on) act++;
      prev_on = on;
      #10;
      checks += 2;
      if (trigger !== (act >= 991)) begin
        failures++;
        $display("after %0d activations: trigger=%b", act, trigger);
      end
      if (rst_n_out !== (act < 991)) begin
        failures++;
        $display("after %0d activations: rst_n_out=%b", act, rst_n_out);
      end
    end
    checks++;
    if (tmp_rises != 550) begin
      failures++;
      $display("tmp_load rose %0d times in 1100 activations, expected 550", tmp_rises);
    end
  endtask

  initial begin
    run_once();
    run_once();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

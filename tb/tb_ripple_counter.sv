// tb_ripple_counter: drives bursts of pulses of random length into a 16-bit
// and a 4-bit ripple counter and compares the counts with the number of
// pulses sent; checks the asynchronous clear and the wrap of the 4-bit
// counter at 16.
module tb_ripple_counter;
  timeunit 1ns;
  timeprecision 1ps;

  logic        pulse = 1'b0;
  logic        clr = 1'b0;
  logic [15:0] count16;
  logic [3:0]  count4;
  int          sent = 0;
  int          checks = 0, failures = 0;

  ripple_counter              dut16 (.pulse(pulse), .clr(clr), .count(count16));
  ripple_counter #(.WIDTH(4)) dut4  (.pulse(pulse), .clr(clr), .count(count4));

  task automatic send(int n);
    repeat (n) begin
      #2 pulse = 1'b1;
      #2 pulse = 1'b0;
      sent++;
    end
    #5;
  endtask

  task automatic check_counts();
    checks += 2;
    if (count16 !== 16'(sent)) begin
      failures++;
      $display("16-bit count %0d, expected %0d", count16, sent);
    end
    if (count4 !== 4'(sent)) begin
      failures++;
      $display("4-bit count %0d, expected %0d", count4, sent % 16);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 clr = 1'b1;
    #3 clr = 1'b0;
    #3;
    check_counts();
    for (int k = 0; k < 20; k++) begin
      send(int'($urandom_range(1, 300)));
      check_counts();
    end
    clr = 1'b1;
    #1;
    sent = 0;
    check_counts();
    send(3);           // clear holds the counter at 0
    sent = 0;
    check_counts();
    clr = 1'b0;
    #1;
    send(17);          // 4-bit counter wraps to 1
    check_counts();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

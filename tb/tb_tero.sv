// tb_tero: checks the TERO behavioural model. With ctrl low the output must
// rest at 1. After ctrl rises, the test counts rising edges of the output and
// measures its period: with the default delays (NAND 40 ps, inverter 30 ps,
// mismatch 2 ps) the half-period is 40 + 2*30 = 100 ps for LENGTH 4, so the
// period is 200 ps and the burst holds ceil(100/2) = 50 oscillations; for
// LENGTH 8 the half-period is 160 ps and the burst 80 oscillations. It also
// checks that the loop has locked at 1 after the burst, that a second burst
// repeats the count, and that dropping ctrl cuts a burst short. A third
// instance with 1 ps of jitter shrinks its pulse by 1 to 3 ps per
// oscillation, so each of its bursts must hold between 34 and 100
// oscillations.
module tb_tero;
  timeunit 1ps;
  timeprecision 1ps;

  logic ctrl = 1'b0;
  logic out4, out8, outj;
  int   edges4 = 0, edges8 = 0, edgesj = 0;
  int   checks = 0, failures = 0;
  time  t_fall [2];
  int   n_fall = 0;

  tero               dut4 (.ctrl(ctrl), .out(out4));
  tero #(.LENGTH(8)) dut8 (.ctrl(ctrl), .out(out8));
  tero #(.JITTER_PS(1)) dutj (.ctrl(ctrl), .out(outj));

  always @(posedge out4) edges4++;
  always @(posedge out8) edges8++;
  always @(posedge outj) edgesj++;
  always @(negedge out4) begin
    if (n_fall < 2) t_fall[n_fall] = $time;
    n_fall++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    check(out4 === 1'b1 && out8 === 1'b1, "output not 1 while ctrl is low");
    // full burst
    edges4 = 0; edges8 = 0; n_fall = 0;
    ctrl = 1'b1;
    #50_000;
    check(edges4 == 50, $sformatf("LENGTH 4 burst %0d, expected 50", edges4));
    check(edges8 == 80, $sformatf("LENGTH 8 burst %0d, expected 80", edges8));
    check(t_fall[1] - t_fall[0] == 200, $sformatf("period %0t, expected 200 ps", t_fall[1] - t_fall[0]));
    check(out4 === 1'b1 && out8 === 1'b1, "loop not locked at 1 after the burst");
    // reset and repeat, several times
    for (int k = 0; k < 4; k++) begin
      ctrl = 1'b0;
      #1000;
      edges4 = 0;
      edgesj = 0;
      ctrl = 1'b1;
      #50_000;
      check(edges4 == 50, $sformatf("repeated burst %0d, expected 50", edges4));
      check(edgesj >= 34 && edgesj <= 100, $sformatf("jittered burst %0d, expected 34..100", edgesj));
    end
    // cut a burst short after 5 periods
    ctrl = 1'b0;
    #1000;
    edges4 = 0;
    ctrl = 1'b1;
    #1000;
    ctrl = 1'b0;
    #50_000;
    check(edges4 >= 5 && edges4 <= 6, $sformatf("cut burst %0d, expected 5 or 6", edges4));
    check(out4 === 1'b1, "output not back at 1 after ctrl fell");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

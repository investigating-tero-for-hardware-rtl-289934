// tb_trojan1: applies random keystream words, a quarter of them with bits
// 31:24 all ones, and checks that the Trojan pulls the active-low reset low
// exactly for those words and otherwise passes the reset through unchanged.
module tb_trojan1;
  timeunit 1ns;
  timeprecision 1ps;

  logic [31:0] z;
  logic        rst_n_in, rst_n_out, trigger;
  logic        hit;
  int          fired = 0;
  int          checks = 0, failures = 0;

  trojan1 dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 400; k++) begin
      z = $urandom;
      if ($urandom_range(3) == 0) z[31:24] = 8'hFF;
      if ($urandom_range(7) == 0) z[31:24] = 8'hFF ^ (8'h01 << $urandom_range(7));
      rst_n_in = ($urandom_range(9) != 0);
      #1;
      hit = (z[31:24] == 8'hFF);
      if (hit && rst_n_in) fired++;
      checks += 2;
      if (trigger !== hit) begin
        failures++;
        $display("z=%h trigger=%b", z, trigger);
      end
      if (rst_n_out !== (rst_n_in ^ hit)) begin
        failures++;
        $display("z=%h rst_n_in=%b rst_n_out=%b", z, rst_n_in, rst_n_out);
      end
    end
    checks++;
    if (fired == 0) begin failures++; $display("Trojan never fired"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

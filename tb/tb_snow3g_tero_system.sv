// tb_snow3g_tero_system: checks one design of the experiment at its default
// parameters (no Trojan, TERO length 4, 16-bit counter). A TERO measurement
// must give 50 oscillations (half-period 100 ps, 2 ps shrink per
// oscillation), clearing must zero the count, and the cipher must deliver
// the keystream of SNOW 3G test set 1 (first 8 words, first one 34 clocks
// after start, one per clock) with the system reset passed straight to it.
module tb_snow3g_tero_system;
  timeunit 1ns;
  timeprecision 1ps;

  localparam logic [31:0] KS [8] = '{
    32'hABEE9704, 32'h7AC31373, 32'hDEDC2F7A, 32'hD601E9CA,
    32'h277E5BE7, 32'h919C03DB, 32'hC2B1DC48, 32'h4773BAFE};

  logic         clk = 1'b0;
  logic         rst_n, start, z_valid, busy, cipher_rst_n, trojan_trigger;
  logic         tero_ctrl, tero_clr;
  logic [127:0] key, iv;
  logic [31:0]  z;
  logic [15:0]  tero_count;
  int           lat;
  int           checks = 0, failures = 0;

  snow3g_tero_system dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; start = 1'b0; tero_ctrl = 1'b0; tero_clr = 1'b0;
    #1 tero_clr = 1'b1;
    key = {32'h2BD6459F, 32'h82C5B300, 32'h952C4910, 32'h4881FF48};
    iv  = {32'hEA024714, 32'hAD5C4D84, 32'hDF1F9B25, 32'h1C0BF45F};
    repeat (2) @(posedge clk);
    #1;
    check(cipher_rst_n === 1'b0, "reset not passed to the cipher");
    rst_n = 1'b1;
    #1;
    check(cipher_rst_n === 1'b1 && trojan_trigger === 1'b0, "clean design altered the reset");
    // TERO measurement
    tero_clr = 1'b0;
    #5;
    tero_ctrl = 1'b1;
    #100;
    check(tero_count == 16'd50, $sformatf("TERO count %0d, expected 50", tero_count));
    tero_ctrl = 1'b0;
    tero_clr = 1'b1;
    #5;
    check(tero_count == 16'd0, "TERO counter not cleared");
    // keystream
    @(negedge clk);
    start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    lat = 0;
    while (!z_valid && lat < 100) begin
      @(posedge clk); #1;
      lat++;
    end
    check(lat == 34, $sformatf("first word after %0d clocks, expected 34", lat));
    for (int n = 0; n < 8; n++) begin
      check(z_valid && z === KS[n], $sformatf("word %0d: %h, expected %h", n + 1, z, KS[n]));
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_snow3g_lfsr: loads the key and IV of SNOW 3G test set 1, checks the
// loaded stages, then advances 20 times in initialisation mode (random F
// words fed back) and 20 times in keystream mode, checking S0, S5 and S15
// after every clock against an independent software model. Also checks that
// the register holds when neither load nor advance is set, and that reset
// clears it.
module tb_snow3g_lfsr;
  timeunit 1ns;
  timeprecision 1ps;

  localparam logic [31:0] F_IN [40] = '{
    32'h24EDE6A4, 32'h8A6A63EC, 32'h1E27A1C0, 32'h92276658,
    32'h4EF8AA38, 32'h8F6D0558, 32'hD0EDA82F, 32'hAE97BA94,
    32'h2E44158B, 32'h1A61DBE2, 32'h94E3BF91, 32'h923A7369,
    32'hA38FD547, 32'h301850C5, 32'h5F557203, 32'h18F135D2,
    32'h8C38FB29, 32'hB64CE422, 32'h1012F037, 32'h907A70C3,
    32'h00000000, 32'h00000000, 32'h00000000, 32'h00000000,
    32'h00000000, 32'h00000000, 32'h00000000, 32'h00000000,
    32'h00000000, 32'h00000000, 32'h00000000, 32'h00000000,
    32'h00000000, 32'h00000000, 32'h00000000, 32'h00000000,
    32'h00000000, 32'h00000000, 32'h00000000, 32'h00000000};
  localparam logic [31:0] E_S0 [41] = '{
    32'hD429BA60, 32'h7D3A4CFF, 32'h6AD3B6EF, 32'hB77E00B7,
    32'h2BD6459F, 32'h82C5B300, 32'h952C4910, 32'h4881FF48,
    32'hD429BA60, 32'h6131B8A0, 32'hB5CC2DCA, 32'hB77E00B7,
    32'h868A081B, 32'h82C5B300, 32'h952C4910, 32'hA283B85C,
    32'h11B1767C, 32'hC2B6780A, 32'hB45C4356, 32'h55BD3CCC,
    32'hBBDD21F9, 32'h468392EA, 32'hB5E3F799, 32'hBEC42DD0,
    32'hF3A7D2EF, 32'hA7FB83D4, 32'h409FF7AA, 32'h6C7A5E63,
    32'h3DDF1B53, 32'hF37A0A29, 32'h0313F71F, 32'h35D8D5B9,
    32'hBCCCCBF3, 32'hE3ABBCD0, 32'hE5732D7E, 32'hDF5204E2,
    32'hEBAE1007, 32'hBE83E1A6, 32'h05F1734D, 32'hDA40F890,
    32'h2CA9A525};
  localparam logic [31:0] E_S5 [41] = '{
    32'h82C5B300, 32'h952C4910, 32'h4881FF48, 32'hD429BA60,
    32'h6131B8A0, 32'hB5CC2DCA, 32'hB77E00B7, 32'h868A081B,
    32'h82C5B300, 32'h952C4910, 32'hA283B85C, 32'h11B1767C,
    32'hC2B6780A, 32'hB45C4356, 32'h55BD3CCC, 32'hBBDD21F9,
    32'h468392EA, 32'hB5E3F799, 32'hBEC42DD0, 32'hF3A7D2EF,
    32'hA7FB83D4, 32'h409FF7AA, 32'h6C7A5E63, 32'h3DDF1B53,
    32'hF37A0A29, 32'h0313F71F, 32'h35D8D5B9, 32'hBCCCCBF3,
    32'hE3ABBCD0, 32'hE5732D7E, 32'hDF5204E2, 32'hEBAE1007,
    32'hBE83E1A6, 32'h05F1734D, 32'hDA40F890, 32'h2CA9A525,
    32'hC7E2719E, 32'h69BEE23B, 32'h7A718B29, 32'h3890F632,
    32'h89F705EA};
  localparam logic [31:0] E_S15 [41] = '{
    32'hA283B85C, 32'h11B1767C, 32'hC2B6780A, 32'hB45C4356,
    32'h55BD3CCC, 32'hBBDD21F9, 32'h468392EA, 32'hB5E3F799,
    32'hBEC42DD0, 32'hF3A7D2EF, 32'hA7FB83D4, 32'h409FF7AA,
    32'h6C7A5E63, 32'h3DDF1B53, 32'hF37A0A29, 32'h0313F71F,
    32'h35D8D5B9, 32'hBCCCCBF3, 32'hE3ABBCD0, 32'hE5732D7E,
    32'hDF5204E2, 32'hEBAE1007, 32'hBE83E1A6, 32'h05F1734D,
    32'hDA40F890, 32'h2CA9A525, 32'hC7E2719E, 32'h69BEE23B,
    32'h7A718B29, 32'h3890F632, 32'h89F705EA, 32'h7DD3403E,
    32'h815FF30E, 32'h3E69A3D7, 32'hD9E533D2, 32'h24BEC5B6,
    32'h2C2D745C, 32'hD8093319, 32'h8B5FE918, 32'hB6EAA5AE,
    32'h5104A253};
  logic         clk = 1'b0;
  logic         rst_n, load, advance, init_mode;
  logic [127:0] key, iv;
  logic [31:0]  f_in, s0, s5, s15;
  int checks = 0, failures = 0;

  snow3g_lfsr dut (.*);

  always #5 clk = ~clk;

  task automatic expect_state(int idx);
    checks += 3;
    if (s0 !== E_S0[idx] || s5 !== E_S5[idx] || s15 !== E_S15[idx]) begin
      failures++;
      $display("step %0d: s0=%h s5=%h s15=%h, expected %h %h %h", idx, s0, s5,
               s15, E_S0[idx], E_S5[idx], E_S15[idx]);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; load = 1'b0; advance = 1'b0; init_mode = 1'b0; f_in = '0;
    key = {32'h2BD6459F, 32'h82C5B300, 32'h952C4910, 32'h4881FF48};
    iv  = {32'hEA024714, 32'hAD5C4D84, 32'hDF1F9B25, 32'h1C0BF45F};
    @(posedge clk); #1;
    rst_n = 1'b1;
    checks++;
    if (s0 !== 0 || s15 !== 0) begin failures++; $display("reset did not clear"); end
    load = 1'b1;
    @(posedge clk); #1;
    load = 1'b0;
    expect_state(0);
    @(posedge clk); #1;          // idle clock: must hold
    expect_state(0);
    for (int n = 0; n < 40; n++) begin
      advance = 1'b1; init_mode = (n < 20); f_in = F_IN[n];
      @(posedge clk); #1;
      expect_state(n + 1);
    end
    advance = 1'b0;
    rst_n = 1'b0;
    @(posedge clk); #1;
    checks++;
    if (s0 !== 0 || s5 !== 0 || s15 !== 0) begin failures++; $display("reset did not clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

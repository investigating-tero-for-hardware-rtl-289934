// tb_tero_htd_top: end-to-end test of the four designs at their default
// parameters (TERO length 4, 16-bit counters, Trojan thresholds 100 and 62).
//
// 1. A TERO measurement on all four designs: each count must be 50.
// 2. All four ciphers are started with SNOW 3G test set 1 and run until every
//    Trojan has fired. The clean design (0) must deliver the known keystream
//    (first 16 words checked) at one word per clock without a gap. The test
//    keeps its own count of the trigger conditions, from design 0's
//    keystream: words with bits 31:24 = FF (Trojan1), clocks with
//    bits 16:13 = 1111 (Trojan2, fires after the 100th), and rising edges of
//    that pattern (Trojan3, fires with the 991st). Each infected design must
//    match design 0 until its Trojan fires, then lose its keystream: the
//    Trojan's trigger, the reset its cipher sees and z_valid are checked
//    every clock.
// 3. A restart: the combinational Trojan1 only knocks its cipher into
//    reset, so design 1 must start again; designs 2 and 3 stay held.
// 4. A second TERO measurement, which must repeat the first.
// Every mechanism (TERO burst, counter clear, each Trojan firing, tmp_load,
// restart) is counted, and one that never happened counts as a failure.
module tb_tero_htd_top;
  timeunit 1ns;
  timeprecision 1ps;

  localparam logic [31:0] KS [16] = '{
    32'hABEE9704, 32'h7AC31373, 32'hDEDC2F7A, 32'hD601E9CA,
    32'h277E5BE7, 32'h919C03DB, 32'hC2B1DC48, 32'h4773BAFE,
    32'hACDAA531, 32'h97D4482C, 32'h16D11892, 32'hDB02468E,
    32'hE115DDA3, 32'hA9BEEDFA, 32'h40DFDD7D, 32'h14CE4043};
  localparam int MAX_CLOCKS = 60000;

  logic         clk = 1'b0;
  logic         rst_n, start, tero_ctrl, tero_clr;
  logic [127:0] key, iv;
  logic [31:0]  z [4];
  logic [3:0]   z_valid, busy, cipher_rst_n, trojan_trigger;
  logic [15:0]  tero_count [4];

  int checks = 0, failures = 0;
  // mechanism counters
  int n_tero_bursts = 0, n_clears = 0, n_words = 0, n_restarts = 0;
  int n_fire [1:3] = '{0, 0, 0};
  int n_tmp_load = 0;
  // reference model of the trigger conditions
  int  m_cnt2 = 0, m_act3 = 0;
  bit  prev_on = 1'b0;
  int  fire_cycle [1:3] = '{-1, -1, -1};
  int  cyc;
  bit  seen_valid;

  tero_htd_top dut (.*);

  always #5 clk = ~clk;

  always @(posedge dut.g_design[3].u_design.g_trojan3.u_trojan.tmp_load) n_tmp_load++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL at clock %0d: %s", cyc, what);
    end
  endtask

  task automatic tero_measure();
    tero_ctrl = 1'b0;
    tero_clr  = 1'b0;
    #1;
    tero_clr  = 1'b1;
    #5;
    for (int i = 0; i < 4; i++) check(tero_count[i] == 0, "TERO counter not cleared");
    n_clears++;
    tero_clr = 1'b0;
    #5;
    tero_ctrl = 1'b1;
    #100;
    for (int i = 0; i < 4; i++)
      check(tero_count[i] == 16'd50, $sformatf("design %0d TERO count %0d, expected 50", i, tero_count[i]));
    if (tero_count[0] == 16'd50) n_tero_bursts++;
    tero_ctrl = 1'b0;
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cyc = 0;
    rst_n = 1'b1;   // a falling edge on the reset also clears the ripple counters
    #1;
    rst_n = 1'b0; start = 1'b0; tero_ctrl = 1'b0; tero_clr = 1'b0;
    key = {32'h2BD6459F, 32'h82C5B300, 32'h952C4910, 32'h4881FF48};
    iv  = {32'hEA024714, 32'hAD5C4D84, 32'hDF1F9B25, 32'h1C0BF45F};
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    tero_measure();

    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    seen_valid = 1'b0;
    // cyc counts clocks after the one that took start
    for (cyc = 0; cyc < MAX_CLOCKS; cyc++) begin
      bit hit1, on, exp2, exp3;
      // design 0: the reference keystream
      if (z_valid[0]) begin
        n_words++;
        if (n_words <= 16) check(z[0] === KS[n_words - 1], $sformatf("word %0d %h, expected %h", n_words, z[0], KS[n_words - 1]));
        if (n_words == 1) check(cyc == 34, $sformatf("first word at clock %0d, expected 34", cyc));
        seen_valid = 1'b1;
      end else begin
        check(!seen_valid, "gap in the clean keystream");
      end
      check(cipher_rst_n[0] && !trojan_trigger[0], "clean design altered its reset");

      // design 1: Trojan1, combinational, on z[31:24] == FF
      if (fire_cycle[1] < 0) begin
        hit1 = (z[0][31:24] == 8'hFF);
        check(z[1] === z[0] && z_valid[1] === z_valid[0], "design 1 differs before its Trojan fired");
        check(trojan_trigger[1] === hit1 && cipher_rst_n[1] === !hit1, "Trojan1 trigger/reset wrong");
        if (hit1) begin fire_cycle[1] = cyc; n_fire[1]++; end
      end else if (cyc == fire_cycle[1] + 1) begin
        check(!z_valid[1] && z[1] == 0, "design 1 not reset by Trojan1");
      end else begin
        check(!z_valid[1] && cipher_rst_n[1], "design 1 should be idle with its reset released");
      end

      // design 2: Trojan2, fires after the 100th clock with z[16:13] = 1111
      exp2 = (m_cnt2 >= 100);
      check(trojan_trigger[2] === exp2 && cipher_rst_n[2] === !exp2,
            $sformatf("Trojan2 trigger=%b after %0d counted words", trojan_trigger[2], m_cnt2));
      if (!exp2) check(z[2] === z[0] && z_valid[2] === z_valid[0], "design 2 differs before its Trojan fired");
      else if (fire_cycle[2] < 0) begin fire_cycle[2] = cyc; n_fire[2]++; end
      else check(!z_valid[2], "design 2 keystream not stopped");
      if (&z[0][16:13] && m_cnt2 < 100) m_cnt2++;

      // design 3: Trojan3, fires with the 991st rising edge of z[16:13] = 1111
      on = &z[0][16:13];
      if (on && !prev_on && fire_cycle[3] < 0) m_act3++;
      prev_on = on;
      exp3 = (m_act3 >= 991);
      check(trojan_trigger[3] === exp3 && cipher_rst_n[3] === !exp3,
            $sformatf("Trojan3 trigger=%b after %0d activations", trojan_trigger[3], m_act3));
      if (!exp3) check(z[3] === z[0] && z_valid[3] === z_valid[0], "design 3 differs before its Trojan fired");
      else if (fire_cycle[3] < 0) begin fire_cycle[3] = cyc; n_fire[3]++; end
      else check(!z_valid[3], "design 3 keystream not stopped");

      if (fire_cycle[1] >= 0 && fire_cycle[2] >= 0 && fire_cycle[3] >= 0 &&
          cyc > fire_cycle[3] + 3) break;
      @(negedge clk);
    end
    $display("Trojan1 fired at clock %0d, Trojan2 at %0d, Trojan3 at %0d",
             fire_cycle[1], fire_cycle[2], fire_cycle[3]);

    // restart: design 1 recovers, designs 2 and 3 stay in reset
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    repeat (34) @(negedge clk);
    check(z_valid[1] && z[1] === KS[0], "design 1 did not restart");
    check(z_valid[0] && z[0] === KS[0], "design 0 did not restart");
    check(!z_valid[2] && !z_valid[3] && !cipher_rst_n[2] && !cipher_rst_n[3],
          "designs 2 and 3 left reset");
    if (z_valid[1] && z[1] === KS[0]) n_restarts++;

    tero_measure();

    $display("mechanisms: TERO bursts %0d, counter clears %0d, clean words %0d, Trojan1 %0d, Trojan2 %0d, Trojan3 %0d, tmp_load %0d, restarts %0d",
             n_tero_bursts, n_clears, n_words, n_fire[1], n_fire[2], n_fire[3], n_tmp_load, n_restarts);
    check(n_tero_bursts == 2, "TERO burst missing");
    check(n_clears > 0, "counter clear never happened");
    check(n_words > 0, "no keystream");
    for (int t = 1; t <= 3; t++) check(n_fire[t] == 1, $sformatf("Trojan%0d fired %0d times", t, n_fire[t]));
    check(n_tmp_load > 0, "tmp_load never rose");
    check(n_restarts == 1, "restart never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_tero_lengths: the TERO length sweep of the experiment (TERO-04 to
// TERO-24) on the full four-design top. For each length L one top is built
// with TERO_LENGTH = L; a TERO measurement (ctrl low with the counters
// cleared, then ctrl high until the burst has died out) must give, in every
// one of the four designs, ceil(H/2) oscillations with the model's default
// delays, H = 40 + (L/2)*30 ps: 50, 80, 110, 140, 170 and 200. A longer loop
// oscillates more slowly and for longer. The ciphers are held in reset; the
// TERO does not depend on them.
module tb_tero_lengths;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int NL = 6;
  localparam int LENGTHS [NL] = '{4, 8, 12, 16, 20, 24};

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         start = 1'b0;
  logic [127:0] key = '0, iv = '0;
  logic         tero_ctrl = 1'b0, tero_clr = 1'b0;
  logic [15:0]  counts [NL][4];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar g = 0; g < NL; g++) begin : g_len
    logic [31:0] z [4];
    logic [3:0]  z_valid, busy, cipher_rst_n, trojan_trigger;
    tero_htd_top #(.TERO_LENGTH(LENGTHS[g])) u_top (
      .clk, .rst_n, .start, .key, .iv, .tero_ctrl, .tero_clr,
      .z, .z_valid, .busy, .cipher_rst_n, .trojan_trigger,
      .tero_count(counts[g])
    );
  end

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int h, expected;
    #10;
    tero_clr = 1'b1;
    #10;
    tero_clr = 1'b0;
    #5;
    tero_ctrl = 1'b1;
    #200;
    for (int l = 0; l < NL; l++) begin
      h = 40 + (LENGTHS[l] / 2) * 30;
      expected = (h + 1) / 2;
      for (int d = 0; d < 4; d++) begin
        checks++;
        if (counts[l][d] != 16'(expected)) begin
          failures++;
          $display("TERO-%0d design %0d: %0d oscillations, expected %0d",
                   LENGTHS[l], d, counts[l][d], expected);
        end
      end
      $display("TERO-%0d: %0d oscillations", LENGTHS[l], counts[l][0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_snow3g_sbox: checks the SNOW 3G S-boxes S1 and S2 against reference
// outputs for random and corner-case input words. The expected words were
// computed with an independent software model of the S-boxes (Rijndael and
// Dickson byte S-boxes followed by the SNOW 3G MixColumn), then typed in.
module tb_snow3g_sbox;
  timeunit 1ns;
  timeprecision 1ps;

  localparam logic [31:0] SB_IN [28] = '{
    32'h52E6B438, 32'hF2A74DE4, 32'h269E0D37, 32'h6513270E,
    32'hA6A3A450, 32'h0C5C7FD0, 32'h128B2F33, 32'hD23F0824,
    32'h892F902B, 32'h1818E811, 32'h5D9DC9F8, 32'h9531985D,
    32'h0ED90475, 32'hE8E25D94, 32'h81E74EF5, 32'h36F675CC,
    32'h099950D8, 32'h1600A35A, 32'h6F03675A, 32'h6B0D549B,
    32'h11E20B8F, 32'h3D9C1724, 32'h1738F7D9, 32'h8D116ECE,
    32'h00000000, 32'hFFFFFFFF, 32'h01020304, 32'h80808080};
  localparam logic [31:0] S1_EXP [28] = '{
    32'h0A8D8F0C, 32'h0DB2D939, 32'h9C59C5B1, 32'hCD4AE232,
    32'hFE62FB53, 32'hEF2FEF39, 32'hFFEC6756, 32'h6E287CFC,
    32'h2849A9EB, 32'hEAB4EEA9, 32'hD8F44EEC, 32'h01E1B8BF,
    32'h36E396B2, 32'h9FF39293, 32'h92EE133E, 32'h085DA96D,
    32'h1CF6EFD8, 32'h3EBB485D, 32'h6C2E8A20, 32'h350049E0,
    32'h39EE1481, 32'h3A08939E, 32'hCB581C25, 32'h21EC6E68,
    32'h63636363, 32'h16161616, 32'hF9E3E179, 32'hCDCDCDCD};
  localparam logic [31:0] S2_EXP [28] = '{
    32'hABFB99D4, 32'h1F24262A, 32'h4C86B255, 32'hF9C086D3,
    32'h36F924C2, 32'hE598C109, 32'hC80353AD, 32'h2B478D28,
    32'h8B0CCD99, 32'hF36637B4, 32'hC1AF4E3B, 32'hF84BADA5,
    32'hD426CAA9, 32'hA9DEEF7B, 32'h04C097C5, 32'h72CB2F05,
    32'h7F6FE33F, 32'hBFA50307, 32'h91DD1FBA, 32'h4810D46E,
    32'h4873C990, 32'h04C4F023, 32'h8EB4CFB8, 32'hEC7A3330,
    32'h25252525, 32'h86868686, 32'h4C3AA839, 32'hEBEBEBEB};
  logic [31:0] w, r1, r2;
  int checks = 0, failures = 0;

  snow3g_sbox #(.IS_S2(1'b0)) dut_s1 (.w(w), .r(r1));
  snow3g_sbox #(.IS_S2(1'b1)) dut_s2 (.w(w), .r(r2));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < $size(SB_IN); i++) begin
      w = SB_IN[i];
      #1;
      checks += 2;
      if (r1 !== S1_EXP[i]) begin
        failures++;
        $display("S1(%h) = %h, expected %h", w, r1, S1_EXP[i]);
      end
      if (r2 !== S2_EXP[i]) begin
        failures++;
        $display("S2(%h) = %h, expected %h", w, r2, S2_EXP[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

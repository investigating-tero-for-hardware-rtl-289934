// tb_snow3g_fsm: clears the SNOW 3G FSM, then feeds it 30 random (s5, s15)
// pairs, checking F = (s15 + R1) ^ R2 before every advance against an
// independent software model; also checks that clear and reset zero R1..R3
// (F then equals s15) and that the state holds without advance.
module tb_snow3g_fsm;
  timeunit 1ns;
  timeprecision 1ps;

  localparam logic [31:0] IN_S5 [30] = '{
    32'h0F4205B4, 32'h9E7769B1, 32'h34B9B5DF, 32'h7F150524,
    32'hAE2EB154, 32'h881ED162, 32'h6D76B07E, 32'hC6F87718,
    32'h506BF2EF, 32'h7731AF10, 32'h95E761D1, 32'hEC66A787,
    32'h7403E430, 32'h5C90A958, 32'h4CBD87AD, 32'h3F98E277,
    32'hCB5C7427, 32'h2E05319A, 32'hB2F14C94, 32'hC7A2EA20,
    32'h3E7D1BFB, 32'h14F4733F, 32'h930D6EAF, 32'h4CDD2055,
    32'h86734721, 32'h7EBFF206, 32'hE00902C7, 32'h57EE05CD,
    32'hBABCED20, 32'h72E6CC3A};
  localparam logic [31:0] IN_S15 [30] = '{
    32'h49B64A08, 32'h9BE4BCFC, 32'hFAECBD38, 32'h12BD4ACE,
    32'h1E398F10, 32'h830E07BC, 32'h6B0A18E8, 32'h2A3AF4D4,
    32'hC1D3FCFF, 32'h5790F82E, 32'h26E87555, 32'hEEEACBE2,
    32'h7D2CAF82, 32'h6BF46C69, 32'h0A097C97, 32'hF646E1F4,
    32'hAB1031D0, 32'h13DEEF86, 32'hC3BAEA9E, 32'h8EDE0D7A,
    32'h92B1D3F2, 32'hCA02135E, 32'hE01F5057, 32'hD17F9ACA,
    32'h5051C1CC, 32'h57124242, 32'hB1FEE08F, 32'h59A54A7B,
    32'h98289FCD, 32'h7F26144B};
  localparam logic [31:0] EXP_F [30] = '{
    32'h49B64A08, 32'hC845A1D3, 32'h3E8634C9, 32'h113D47FC,
    32'h279F6EF9, 32'h51C98CEF, 32'h213FBB82, 32'hF18D95CA,
    32'h08DDCC3D, 32'hA02F1BB6, 32'h14C66F0D, 32'h03D87D75,
    32'h0AC0AF8C, 32'h41E682AA, 32'hE5617314, 32'hD05C023C,
    32'h7A3BB383, 32'hDC42B80A, 32'h7B093F8C, 32'h8B5D8FB1,
    32'hB30C1DCA, 32'h76689740, 32'hFC4FAFC4, 32'h282A9B2B,
    32'hA7C16451, 32'h7B5DEEDD, 32'h5C34A0B9, 32'h6BFCEE3E,
    32'h0ABC6264, 32'hF7FC2FFE};
  logic        clk = 1'b0;
  logic        rst_n, clear, advance;
  logic [31:0] s5, s15, f;
  logic [31:0] held;
  int checks = 0, failures = 0;

  snow3g_fsm dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; clear = 1'b0; advance = 1'b0; s5 = '0; s15 = 32'h1234_5678;
    @(posedge clk); #1;
    rst_n = 1'b1;
    checks++;
    if (f !== 32'h1234_5678) begin failures++; $display("reset: f=%h", f); end
    for (int n = 0; n < $size(IN_S5); n++) begin
      s5 = IN_S5[n]; s15 = IN_S15[n];
      #1;
      checks++;
      if (f !== EXP_F[n]) begin
        failures++;
        $display("step %0d: f=%h expected %h", n, f, EXP_F[n]);
      end
      advance = 1'b1;
      @(posedge clk); #1;
      advance = 1'b0;
    end
    held = f;
    @(posedge clk); #1;
    checks++;
    if (f !== held) begin failures++; $display("state changed without advance"); end
    clear = 1'b1; advance = 1'b1; s15 = 32'hCAFE_F00D;
    @(posedge clk); #1;
    clear = 1'b0; advance = 1'b0;
    checks++;
    if (f !== 32'hCAFE_F00D) begin failures++; $display("clear: f=%h", f); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

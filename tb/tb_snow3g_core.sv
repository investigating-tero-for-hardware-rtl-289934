// tb_snow3g_core: runs the SNOW 3G core on test sets 1 and 2 of the SNOW 3G
// implementers' test data and checks the first 16 keystream words of each
// (expected words from an independent software model, which reproduces the
// published first words ABEE9704 7AC31373 and EFF8A342 F751480F). It also
// checks the timing: the first word 34 clocks after start, then one word
// every clock with no gap; a restart with a new key in mid-stream; and that
// reset stops the keystream and clears z.
module tb_snow3g_core;
  timeunit 1ns;
  timeprecision 1ps;

  localparam logic [31:0] KS1 [16] = '{
    32'hABEE9704, 32'h7AC31373, 32'hDEDC2F7A, 32'hD601E9CA,
    32'h277E5BE7, 32'h919C03DB, 32'hC2B1DC48, 32'h4773BAFE,
    32'hACDAA531, 32'h97D4482C, 32'h16D11892, 32'hDB02468E,
    32'hE115DDA3, 32'hA9BEEDFA, 32'h40DFDD7D, 32'h14CE4043};
  localparam logic [31:0] KS2 [16] = '{
    32'hEFF8A342, 32'hF751480F, 32'h8383B51D, 32'hDF4815FA,
    32'hDE526833, 32'h63A4EA9D, 32'h8FAC9A2C, 32'hA31D2E38,
    32'hBBDC5BF1, 32'h0782C957, 32'h84AE4203, 32'h52D44049,
    32'h2B71A648, 32'h0253CB77, 32'hB94E214C, 32'hB080B26E};
  logic         clk = 1'b0;
  logic         rst_n, start, z_valid, busy;
  logic [127:0] key, iv;
  logic [31:0]  z;
  int checks = 0, failures = 0;

  snow3g_core dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_set(input logic [127:0] k, input logic [127:0] v,
                         input logic [31:0] exp_ks [16]);
    int lat;
    key = k; iv = v;
    start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    lat = 0;   // clocks after the one that sampled start
    while (!z_valid && lat < 100) begin
      checks++;
      if (!busy) begin failures++; $display("busy low during initialisation"); end
      @(posedge clk); #1;
      lat++;
    end
    checks++;
    if (lat != 34) begin
      failures++;
      $display("first word after %0d clocks, expected 34", lat);
    end
    for (int n = 0; n < 16; n++) begin
      checks++;
      if (!z_valid || z !== exp_ks[n]) begin
        failures++;
        $display("word %0d: valid=%b z=%h expected %h", n + 1, z_valid, z, exp_ks[n]);
      end
      @(posedge clk); #1;   // one word per clock
    end
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0; key = '0; iv = '0;
    repeat (2) @(posedge clk);
    #1;
    rst_n = 1'b1;
    checks++;
    if (z_valid || busy || z !== 0) begin failures++; $display("not idle after reset"); end
    run_set({32'h2BD6459F, 32'h82C5B300, 32'h952C4910, 32'h4881FF48},
            {32'hEA024714, 32'hAD5C4D84, 32'hDF1F9B25, 32'h1C0BF45F}, KS1);
    // restart in mid-stream with test set 2
    run_set({32'h8CE33E2C, 32'hC3C0B5FC, 32'h1F3DE8A6, 32'hDC66B1F3},
            {32'hD3C5D592, 32'h327FB11C, 32'hDE551988, 32'hCEB2F9B7}, KS2);
    rst_n = 1'b0;
    @(posedge clk); #1;
    rst_n = 1'b1;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (z_valid || z !== 0) begin failures++; $display("keystream continued after reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_snow3g_alpha: checks MULalpha and DIValpha of the SNOW 3G LFSR on random
// bytes and on all eight unit bytes. Expected words come from an independent
// software model that applies MULxPOW literally (up to 245 MULx steps).
module tb_snow3g_alpha;
  timeunit 1ns;
  timeprecision 1ps;

  localparam logic [7:0] A_IN [32] = '{
    8'h6C, 8'h0F, 8'hD3, 8'h90,
    8'h1F, 8'hF2, 8'h39, 8'hA1,
    8'hA0, 8'h95, 8'hF2, 8'h0F,
    8'h93, 8'h95, 8'h65, 8'h0C,
    8'hF9, 8'h38, 8'h0B, 8'h8E,
    8'hDB, 8'h22, 8'h4A, 8'h6B,
    8'h01, 8'h02, 8'h04, 8'h08,
    8'h10, 8'h20, 8'h40, 8'h80};
  localparam logic [31:0] MUL_EXP [32] = '{
    32'hEF89D4D0, 32'h59284AE1, 32'hF81425A4, 32'h5AD2990E,
    32'h53CF5B78, 32'h0DECC82C, 32'hFAB82089, 32'hA5CD651F,
    32'h4452AA0C, 32'h6DCA3851, 32'h0DECC82C, 32'h59284AE1,
    32'hD0DA613B, 32'h6DCA3851, 32'h0BB1C75B, 32'hD320B2D4,
    32'h8243EC81, 32'h1B27EF9A, 32'h8FAF24AD, 32'hE8820D65,
    32'hFDB3F93C, 32'h7FF015BD, 32'h46FEAF21, 32'hB30642A9,
    32'hE19FCF13, 32'h6B973726, 32'hD6876E4C, 32'h05A7DC98,
    32'h0AE71199, 32'h1467229B, 32'h28CE449F, 32'h50358897};
  localparam logic [31:0] DIV_EXP [32] = '{
    32'h569F390C, 32'h88559254, 32'h44FE492A, 32'hC87D5C10,
    32'hA1A5CD65, 32'h0EB8B785, 32'hA3CE5A52, 32'hABCBFD8E,
    32'hB3C4BD43, 32'hB04EB5BB, 32'h0EB8B785, 32'h88559254,
    32'hE06C9CEE, 32'hB04EB5BB, 32'h8EE8820D, 32'hA04452AA,
    32'hE6D18CB7, 32'hBBC11A9F, 32'hE8693B32, 32'h71D7D1B8,
    32'h8486B2E6, 32'h62573E51, 32'h54F4AE3B, 32'h1EB25094,
    32'h180F40CD, 32'h301E8033, 32'h603CA966, 32'hC078FBCC,
    32'h29F05F31, 32'h5249BE62, 32'hA492D5C4, 32'hE18D0321};
  logic [7:0]  mi, di;
  logic [31:0] mo, dout;
  int checks = 0, failures = 0;

  snow3g_alpha dut (.mul_in(mi), .div_in(di), .mul_out(mo), .div_out(dout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < $size(A_IN); i++) begin
      // feed the two inputs different bytes so that crossed paths show
      mi = A_IN[i];
      di = A_IN[($size(A_IN) - 1) - i];
      #1;
      checks += 2;
      if (mo !== MUL_EXP[i]) begin
        failures++;
        $display("MULalpha(%h) = %h, expected %h", mi, mo, MUL_EXP[i]);
      end
      if (dout !== DIV_EXP[$size(A_IN) - 1 - i]) begin
        failures++;
        $display("DIValpha(%h) = %h, expected %h", di, dout, DIV_EXP[$size(A_IN) - 1 - i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

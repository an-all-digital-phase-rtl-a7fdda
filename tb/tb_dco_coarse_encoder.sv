`timescale 1ps / 1fs
// tb_dco_coarse_encoder: exhaustive test of the coarse path-select decoder.
//
// For all 64 coarse codes it checks that exactly one tap enable and one
// group enable are set, that the tap enable is en[code] and that the group
// enable is the one whose 16 taps contain it (sep[code / 16]).
module tb_dco_coarse_encoder;
  import adpll_pkg::*;

  logic [COARSE_W-1:0] coarse;
  logic [N_PATHS-1:0]  en;
  logic [N_GROUPS-1:0] sep;

  int checks   = 0;
  int failures = 0;

  dco_coarse_encoder dut (.coarse, .en, .sep);

  initial begin
    for (int c = 0; c < 64; c++) begin
      logic [63:0] en_exp;
      logic [3:0]  sep_exp;
      coarse  = 6'(c);
      en_exp  = 64'd1 << c;
      sep_exp = 4'd1 << (c / 16);
      #10;
      checks++;
      if (en !== en_exp || sep !== sep_exp) begin
        failures++;
        $display("FAIL code %0d: en %h sep %b", c, en, sep);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

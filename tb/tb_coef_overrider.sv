// tb_coef_overrider: checks that linear mode reads the weight tile address
// and non-linear mode reads the stored slope matrix of function k at
// FUNC_BASE + k, for every address and function.
module tb_coef_overrider;
  import nlf_pkg::*;

  localparam int AW = 5, KW = 3, BASE = 24;

  int checks = 0, failures = 0;

  mode_e          m;
  logic [KW-1:0]  k;
  logic [AW-1:0]  tile_addr, coef_addr;

  coef_overrider #(.AW(AW), .KW(KW), .FUNC_BASE(BASE)) dut (
    .m(m), .k(k), .tile_addr(tile_addr), .coef_addr(coef_addr));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 2 ** AW; a++)
      for (int f = 0; f < 2 ** KW; f++)
        for (int mm = 0; mm < 2; mm++) begin
          m = mode_e'(mm);
          k = KW'(f);
          tile_addr = AW'(a);
          #1;
          checks++;
          if (coef_addr !== ((mm == 1) ? AW'(BASE + f) : AW'(a))) begin
            failures++;
            $display("mismatch m=%0d k=%0d tile=%0d got=%0d", mm, f, a, coef_addr);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

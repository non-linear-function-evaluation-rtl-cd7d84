// tb_data_overrider: checks the b x b multiplexer outputs psi[i][j] for random
// vectors in both modes against Eq. psi = x_j (linear), and beta_j / x_i / 0
// for segments below / holding / above x_i (non-linear).
module tb_data_overrider;
  import nlf_pkg::*;

  localparam int B = 4;
  localparam int N = 16;

  int checks = 0, failures = 0;

  mode_e                      m;
  logic [B-1:0][N-1:0]        x, beta;
  logic [B-2:0][N-1:0]        h;
  logic [B-1:0][B-1:0][N-1:0] psi;
  ovr_sel_e [B-1:0][B-1:0]    c;

  data_overrider #(.B(B), .S(B), .N(N)) dut (.m(m), .x(x), .h(h), .beta(beta), .psi(psi), .c(c));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 300; it++) begin
      int base;
      base = -300;
      for (int j = 0; j < B - 1; j++) begin
        base += $urandom_range(20, 200);
        h[j] = N'(base);
      end
      for (int i = 0; i < B; i++) begin
        x[i]    = N'($urandom_range(0, 800) - 400);
        beta[i] = N'($urandom);
      end
      m = mode_e'(it % 3 != 0);
      #1;
      for (int i = 0; i < B; i++) begin
        int seg;
        seg = 0;
        for (int j = 1; j < B; j++) if ($signed(x[i]) >= $signed(h[j-1])) seg = j;
        for (int j = 0; j < B; j++) begin
          logic [N-1:0] exp;
          if (m == MODE_LINEAR) exp = x[j];
          else if (j < seg)     exp = beta[j];
          else if (j == seg)    exp = x[i];
          else                  exp = '0;
          checks++;
          if (psi[i][j] !== exp) begin
            failures++;
            if (failures < 10) $display("mismatch m=%0d i=%0d j=%0d got=%h exp=%h", m, i, j, psi[i][j], exp);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

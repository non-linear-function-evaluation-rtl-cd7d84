// tb_override_ctrl: checks the segment comparators and control codes.
// Two instances (b = 4 with s = 4 and s = 3) get random inputs and random
// ascending boundaries, including inputs equal to a boundary; every code is
// compared with the code derived from the segment index of x_i:
// 11 below it, 10 at it, 01 above it, 00 in linear mode.
module tb_override_ctrl;
  import nlf_pkg::*;

  localparam int B = 4;
  localparam int N = 16;

  int checks = 0, failures = 0;
  int seen [4] = '{0, 0, 0, 0};

  mode_e                   m;
  logic [B-1:0][N-1:0]     x;
  logic [B-2:0][N-1:0]     h;
  ovr_sel_e [B-1:0][B-1:0] c4, c3;

  override_ctrl #(.B(B), .S(4), .N(N)) dut4 (.m(m), .x(x), .h(h), .c(c4));
  override_ctrl #(.B(B), .S(3), .N(N)) dut3 (.m(m), .x(x), .h(h), .c(c3));

  function automatic logic [1:0] expect_code(int j, int seg, bit nl);
    if (!nl)          return 2'b00;
    else if (j < seg) return 2'b11;
    else if (j == seg) return 2'b10;
    else              return 2'b01;
  endfunction

  task automatic check_all();
    for (int s = 3; s <= 4; s++)
      for (int i = 0; i < B; i++) begin
        int seg;
        seg = 0;
        for (int j = 1; j < s; j++) if ($signed(x[i]) >= $signed(h[j-1])) seg = j;
        for (int j = 0; j < B; j++) begin
          logic [1:0] got, exp;
          got = (s == 4) ? c4[i][j] : c3[i][j];
          exp = expect_code(j, seg, m == MODE_NONLINEAR);
          checks++;
          if (s == 4) seen[got]++;
          if (got !== exp) begin
            failures++;
            if (failures < 10) $display("mismatch s=%0d m=%0d i=%0d j=%0d x=%0d got=%b exp=%b",
                                        s, m, i, j, $signed(x[i]), got, exp);
          end
        end
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
    for (int it = 0; it < 400; it++) begin
      int base;
      base = $urandom_range(0, 400) - 200;
      for (int j = 0; j < B - 1; j++) begin
        base += $urandom_range(1, 60);
        h[j] = N'(base);
      end
      for (int i = 0; i < B; i++) begin
        if ($urandom_range(0, 3) == 0) x[i] = h[$urandom_range(0, B - 2)];  // on a boundary
        else x[i] = N'(int'($signed(h[0])) - 80 + int'($urandom_range(0, 320)));
      end
      m = mode_e'(it % 5 != 0);
      #1;
      check_all();
    end
    for (int s = 0; s < 4; s++) begin
      checks++;
      if (seen[s] == 0) begin
        failures++;
        $display("code %0d never produced", s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_arith_block: drives the arithmetic block (b = 4) with random vectors,
// one per cycle, alternating at random between linear mode (random W) and
// non-linear mode (random ascending boundaries, slopes and intercept terms,
// coefficient rows all equal to the slopes). Each result is compared exactly
// with W x, or with sum_{j below seg(x_i)} alpha_j beta_j + alpha_seg x_i,
// and must appear three cycles after its input.
module tb_arith_block;
  import nlf_pkg::*;

  localparam int B = 4;
  localparam int N = 16;
  localparam int SUM_W = 2 * N + $clog2(B) + 1;
  localparam int LAT = 3;

  int checks = 0, failures = 0;
  int n_lin = 0, n_nl = 0;

  logic clk = 0, rst_n = 0;
  logic valid_in, valid_out;
  mode_e m;
  logic [B-1:0][N-1:0]        x, beta;
  logic [B-2:0][N-1:0]        h;
  logic [B-1:0][B-1:0][N-1:0] coef;
  ovr_sel_e [B-1:0][B-1:0]    c;
  logic [B-1:0][SUM_W-1:0]    v;

  typedef struct { longint sum [B]; int cycle; } exp_t;
  exp_t q [$];
  int   cycle = 0;

  arith_block #(.B(B), .S(B), .N(N)) dut (
    .clk(clk), .rst_n(rst_n), .valid_in(valid_in), .m(m), .x(x), .coef(coef), .h(h),
    .beta(beta), .c(c), .valid_out(valid_out), .v(v));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && valid_out) begin
    exp_t e;
    checks++;
    if (q.size() == 0) begin
      failures++;
      $display("unexpected result");
    end else begin
      e = q.pop_front();
      if (cycle - e.cycle != LAT) begin
        failures++;
        $display("latency %0d, expected %0d", cycle - e.cycle, LAT);
      end
      for (int i = 0; i < B; i++) begin
        checks++;
        if (longint'($signed(v[i])) != e.sum[i]) begin
          failures++;
          if (failures < 10) $display("row %0d got %0d exp %0d", i, $signed(v[i]), e.sum[i]);
        end
      end
    end
  end

  initial begin
    valid_in = 0; m = MODE_LINEAR; x = '0; beta = '0; h = '0; coef = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 600; it++) begin
      exp_t e;
      @(negedge clk);
      valid_in = ($urandom_range(0, 5) != 0);
      m = mode_e'($urandom_range(0, 1));
      for (int i = 0; i < B; i++) x[i] = N'($urandom_range(0, 2000) - 1000);
      if (m == MODE_LINEAR) begin
        for (int i = 0; i < B; i++)
          for (int j = 0; j < B; j++) coef[i][j] = N'($urandom);
        for (int i = 0; i < B; i++) begin
          e.sum[i] = 0;
          for (int j = 0; j < B; j++)
            e.sum[i] += longint'($signed(coef[i][j])) * longint'($signed(x[j]));
        end
      end else begin
        int base;
        logic [B-1:0][N-1:0] alpha;
        base = -900;
        for (int j = 0; j < B - 1; j++) begin
          base += $urandom_range(100, 500);
          h[j] = N'(base);
        end
        for (int j = 0; j < B; j++) begin
          alpha[j] = N'($urandom_range(0, 600) - 300);
          beta[j]  = N'($urandom_range(0, 4000) - 2000);
        end
        for (int i = 0; i < B; i++) coef[i] = alpha;
        for (int i = 0; i < B; i++) begin
          int seg;
          seg = 0;
          for (int j = 1; j < B; j++) if ($signed(x[i]) >= $signed(h[j-1])) seg = j;
          e.sum[i] = longint'($signed(alpha[seg])) * longint'($signed(x[i]));
          for (int j = 0; j < seg; j++)
            e.sum[i] += longint'($signed(alpha[j])) * longint'($signed(beta[j]));
        end
      end
      if (valid_in) begin
        if (m == MODE_LINEAR) n_lin++; else n_nl++;
        e.cycle = cycle;
        q.push_back(e);
      end
    end
    @(negedge clk);
    valid_in = 0;
    repeat (6) @(negedge clk);
    checks += 2;
    if (q.size() != 0) begin failures++; $display("%0d results missing", q.size()); end
    if (n_lin == 0 || n_nl == 0) begin failures++; $display("a mode was never exercised"); end
    $display("linear vectors %0d, non-linear vectors %0d", n_lin, n_nl);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

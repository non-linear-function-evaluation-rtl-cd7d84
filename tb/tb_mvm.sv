// tb_mvm: streams random signed matrices and per-multiplier inputs into the
// multiplier, one per cycle with random gaps, and checks each row sum
// sum_j phi[i][j]*psi[i][j] exactly, and that every result arrives exactly two
// cycles after its input.
module tb_mvm;
  localparam int B = 4;
  localparam int N = 16;
  localparam int SUM_W = 2 * N + $clog2(B) + 1;
  localparam int LAT = 2;

  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic valid_in, valid_out;
  logic [B-1:0][B-1:0][N-1:0] phi, psi;
  logic [B-1:0][SUM_W-1:0]    v;

  typedef struct { longint sum [B]; int cycle; } exp_t;
  exp_t q [$];
  int   cycle = 0;

  mvm #(.B(B), .N(N)) dut (.clk(clk), .rst_n(rst_n), .valid_in(valid_in), .phi(phi), .psi(psi),
                          .valid_out(valid_out), .v(v));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker
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
    valid_in = 0; phi = '0; psi = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 500; it++) begin
      @(negedge clk);
      valid_in = ($urandom_range(0, 4) != 0);
      for (int i = 0; i < B; i++)
        for (int j = 0; j < B; j++) begin
          phi[i][j] = (it < 4) ? N'(it[0] ? 16'h8000 : 16'h7fff) : N'($urandom);
          psi[i][j] = (it < 4) ? N'(it[1] ? 16'h8000 : 16'h7fff) : N'($urandom);
        end
      if (valid_in) begin
        exp_t e;
        for (int i = 0; i < B; i++) begin
          e.sum[i] = 0;
          for (int j = 0; j < B; j++)
            e.sum[i] += longint'($signed(phi[i][j])) * longint'($signed(psi[i][j]));
        end
        e.cycle = cycle;
        q.push_back(e);
      end
    end
    @(negedge clk);
    valid_in = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("%0d results missing", q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

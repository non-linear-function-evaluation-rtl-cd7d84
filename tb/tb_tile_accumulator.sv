// tb_tile_accumulator: feeds random groups of 1..5 tile results (random
// gaps between tiles, random mode and lambda) and checks each output vector:
// sum of the tiles, plus lambda scaled by 2^FRAC in non-linear mode, rounded
// half up to FRAC fraction bits and saturated to n bits, with the saturation
// flags, one cycle after the last tile. Large tiles force saturation both ways.
module tb_tile_accumulator;
  import nlf_pkg::*;
  import nlf_ref_pkg::*;

  localparam int B = 4;
  localparam int N = 16;
  localparam int FRAC = 8;
  localparam int SUM_W = 2 * N + $clog2(B) + 1;

  int checks = 0, failures = 0;
  int n_sat = 0;

  logic clk = 0, rst_n = 0;
  logic valid_in, first, last, valid_out;
  mode_e m;
  logic [N-1:0] lambda;
  logic [B-1:0][SUM_W-1:0] v;
  logic [B-1:0][N-1:0] y;
  logic [B-1:0] sat_out;

  typedef struct { longint y [B]; bit sat [B]; int cycle; } exp_t;
  exp_t q [$];
  int cycle = 0;

  tile_accumulator #(.B(B), .N(N), .FRAC(FRAC)) dut (
    .clk(clk), .rst_n(rst_n), .valid_in(valid_in), .first(first), .last(last), .m(m),
    .lambda(lambda), .v(v), .valid_out(valid_out), .y(y), .sat_out(sat_out));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
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
      if (cycle - e.cycle != 1) begin failures++; $display("latency %0d", cycle - e.cycle); end
      for (int i = 0; i < B; i++) begin
        checks++;
        if (sext(64'(y[i]), N) != e.y[i] || sat_out[i] != e.sat[i]) begin
          failures++;
          if (failures < 10) $display("entry %0d got %0d/%b exp %0d/%b", i, sext(64'(y[i]), N), sat_out[i], e.y[i], e.sat[i]);
        end
        if (e.sat[i]) n_sat++;
      end
    end
  end

  initial begin
    valid_in = 0; first = 0; last = 0; m = MODE_LINEAR; lambda = '0; v = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int g = 0; g < 400; g++) begin
      int           nt;
      wide_t        acc [B];
      exp_t         e;
      mode_e        gm;
      logic [N-1:0] gl;
      nt = $urandom_range(1, 5);
      gm = mode_e'($urandom_range(0, 1));
      gl = N'($urandom);
      for (int i = 0; i < B; i++)
        acc[i] = (gm == MODE_NONLINEAR) ? (wide_t'($signed(gl)) <<< FRAC) : '0;
      for (int t = 0; t < nt; t++) begin
        while ($urandom_range(0, 3) == 0) begin
          @(negedge clk);
          valid_in = 0;
        end
        @(negedge clk);
        valid_in = 1;
        m      = gm;
        lambda = gl;
        first = (t == 0);
        last  = (t == nt - 1);
        for (int i = 0; i < B; i++) begin
          longint r;
          if (g % 10 == 0) r = (g % 20 == 0) ? 64'sd4000000000 : -64'sd4000000000;
          else r = longint'($signed($urandom)) >>> $urandom_range(4, 18);
          v[i] = SUM_W'(r);
          acc[i] += wide_t'(r);
        end
        if (last) begin
          for (int i = 0; i < B; i++) e.y[i] = round_sat(acc[i], N, FRAC, e.sat[i]);
          e.cycle = cycle;
          q.push_back(e);
        end
      end
    end
    @(negedge clk);
    valid_in = 0;
    repeat (4) @(negedge clk);
    checks += 2;
    if (q.size() != 0) begin failures++; $display("%0d results missing", q.size()); end
    if (n_sat == 0) begin failures++; $display("saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

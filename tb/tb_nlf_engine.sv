// tb_nlf_engine: end-to-end test of the engine at its default size
// (b = s = 16, n = 32 with 16 fraction bits, 8 functions).
//
// The eight activation functions (Sigmoid, LogSigmoid, Tanh, Tanhshrink, ELU,
// SELU, Softplus, Softsign) are fitted with 16 uniform segments over [-4, 4]
// and loaded as numbers only: boundaries, intercept terms and baseline in the
// function parameter memory, slope matrices in the top of the coefficient
// memory. The test then runs
//   - tiled linear combinations (n_in = 2, n_out = 2) against exact sums,
//     including one whose results saturate;
//   - every function on two vectors of inputs spread over [-4, 4], compared
//     bit-exactly with an integer model of the approximation and, in double
//     precision, with the function itself (error bound of chord
//     interpolation, M2*w^2/8, plus quantisation slack);
//   - a linear layer followed by Tanh on its result, the two operations
//     back to back.
// It counts how often each mechanism happened (each multiplexer code, linear
// and non-linear tiles, multi-tile accumulation, saturation, mode switches,
// pipeline drains) and fails if one never did, and checks that each operation
// takes exactly (tiles + 7) cycles from acceptance to done.
module tb_nlf_engine;
  import nlf_pkg::*;
  import nlf_ref_pkg::*;

  localparam int B = TILE_B, S = SEG_S, N = WORD_N, FR = FRAC_BITS, K = NUM_FUNCS;
  localparam int DAW = $clog2(DMEM_ENTRIES), CAW = $clog2(CMEM_ENTRIES), KW = $clog2(K);
  localparam int FBASE = CMEM_ENTRIES - K;
  localparam real LO = -4.0, HI = 4.0;

  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic instr_valid, instr_ready, busy, done;
  instr_t instr;
  logic dm_we, dm_re, cm_we, pm_we;
  logic [DAW-1:0] dm_waddr, dm_raddr;
  logic [B-1:0][N-1:0] dm_wdata, dm_rdata;
  logic [CAW-1:0] cm_waddr;
  logic [B-1:0][B-1:0][N-1:0] cm_wdata;
  logic [KW-1:0] pm_waddr;
  logic [B-2:0][N-1:0] pm_h;
  logic [B-1:0][N-1:0] pm_beta;
  logic [N-1:0] pm_lambda;
  logic [B-1:0] sat;

  nlf_engine dut (
    .clk(clk), .rst_n(rst_n), .instr_valid(instr_valid), .instr_ready(instr_ready),
    .instr(instr), .busy(busy), .done(done),
    .dm_we(dm_we), .dm_waddr(dm_waddr), .dm_wdata(dm_wdata),
    .dm_re(dm_re), .dm_raddr(dm_raddr), .dm_rdata(dm_rdata),
    .cm_we(cm_we), .cm_waddr(cm_waddr), .cm_wdata(cm_wdata),
    .pm_we(pm_we), .pm_waddr(pm_waddr), .pm_h(pm_h), .pm_beta(pm_beta), .pm_lambda(pm_lambda),
    .sat(sat));

  always #5 clk = ~clk;

  // ---- mechanism counters ----
  int code_seen [4] = '{0, 0, 0, 0};
  int n_lin_tiles = 0, n_nl_tiles = 0, n_multi = 0, n_sat = 0, n_switch = 0, n_drain = 0;
  mode_e last_mode = MODE_LINEAR;
  bit    have_mode = 0;

  always @(posedge clk) if (rst_n) begin
    if (dut.arith_valid) begin
      if (dut.arith_m == MODE_NONLINEAR) begin
        n_nl_tiles++;
        for (int i = 0; i < B; i++)
          for (int j = 0; j < B; j++) code_seen[dut.c[i][j]]++;
      end else begin
        n_lin_tiles++;
        code_seen[dut.c[0][0]]++;
      end
      if (have_mode && dut.arith_m != last_mode) n_switch++;
      last_mode = dut.arith_m;
      have_mode = 1;
    end
    if (dut.acc_valid && !dut.acc_first) n_multi++;
    if (dut.y_valid) for (int i = 0; i < B; i++) if (dut.y_sat[i]) n_sat++;
    if (done) n_drain++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- host tasks ----
  task automatic write_vec(int addr, logic [B-1:0][N-1:0] d);
    @(negedge clk);
    dm_we = 1; dm_waddr = DAW'(addr); dm_wdata = d;
    @(negedge clk);
    dm_we = 0;
  endtask

  task automatic read_vec(int addr, output logic [B-1:0][N-1:0] d);
    @(negedge clk);
    dm_re = 1; dm_raddr = DAW'(addr);
    @(negedge clk);
    dm_re = 0;
    d = dm_rdata;
  endtask

  task automatic write_mat(int addr, logic [B-1:0][B-1:0][N-1:0] d);
    @(negedge clk);
    cm_we = 1; cm_waddr = CAW'(addr); cm_wdata = d;
    @(negedge clk);
    cm_we = 0;
  endtask

  task automatic run(instr_t ins, int tiles);
    int t0, t1;
    @(negedge clk);
    instr = ins; instr_valid = 1;
    @(posedge clk);
    while (!instr_ready) @(posedge clk);
    t0 = int'($time / 10);
    @(negedge clk);
    instr_valid = 0;
    @(posedge clk);
    while (!done) @(posedge clk);
    t1 = int'($time / 10);
    checks++;
    if (t1 - t0 != tiles + 7) begin
      failures++;
      $display("operation took %0d cycles, expected %0d", t1 - t0, tiles + 7);
    end
  endtask

  // uniform value in [-span, span] / scale
  function automatic real rnd(int span, real scale);
    int v;
    v = int'($urandom_range(0, 2 * span));
    return real'(v - span) / scale;
  endfunction

  function automatic instr_t mk(mode_e md, int f, int src, int dst, int coef, int nin, int nout);
    instr_t i;
    i = '0;
    i.mode = md; i.func = 8'(f); i.src = ADDR_W'(src); i.dst = ADDR_W'(dst);
    i.coef = ADDR_W'(coef); i.n_in = CNT_W'(nin); i.n_out = CNT_W'(nout);
    return i;
  endfunction

  // ---- function parameters (kept for the reference model) ----
  longint fh [K][], fa [K][], fb [K][];
  longint fl [K];
  real    bound [K];

  task automatic load_function(int f);
    logic [B-1:0][B-1:0][N-1:0] am;
    real w, m2;
    fit_pwl(f, S, B, N, FR, LO, HI, fh[f], fa[f], fb[f], fl[f]);
    for (int j = 0; j < B - 1; j++) pm_h[j] = N'(fh[f][j]);
    for (int j = 0; j < B; j++) pm_beta[j] = N'(fb[f][j]);
    pm_lambda = N'(fl[f]);
    @(negedge clk);
    pm_we = 1; pm_waddr = KW'(f);
    @(negedge clk);
    pm_we = 0;
    for (int i = 0; i < B; i++) for (int j = 0; j < B; j++) am[i][j] = N'(fa[f][j]);
    write_mat(FBASE + f, am);
    // largest second derivative inside the segments
    w  = (HI - LO) / S;
    m2 = 0.0;
    for (int s = 0; s < S; s++)
      for (int p = 1; p < 50; p++) begin
        real x, d, e;
        x = LO + s * w + w * p / 50.0;
        e = 1.0e-3;
        d = (act(f, x + e) - 2.0 * act(f, x) + act(f, x - e)) / (e * e);
        if (d < 0.0) d = -d;
        if (d > m2) m2 = d;
      end
    bound[f] = m2 * w * w / 8.0 + 2.0e-3;
  endtask

  // ---- linear check ----
  task automatic check_linear(int src, int dst, int coef, int nin, int nout,
                              const ref logic [B-1:0][N-1:0] xv [],
                              const ref logic [B-1:0][B-1:0][N-1:0] wm []);
    logic [B-1:0][N-1:0] r;
    for (int o = 0; o < nout; o++) begin
      read_vec(dst + o, r);
      for (int i = 0; i < B; i++) begin
        wide_t acc;
        bit    s;
        longint e;
        acc = '0;
        for (int t = 0; t < nin; t++)
          for (int j = 0; j < B; j++)
            acc += wide_t'($signed(wm[o * nin + t][i][j])) * wide_t'($signed(xv[t][j]));
        e = round_sat(acc, N, FR, s);
        checks++;
        if (sext(64'(r[i]), N) != e) begin
          failures++;
          if (failures < 10) $display("linear o=%0d i=%0d got %0d exp %0d", o, i, sext(64'(r[i]), N), e);
        end
      end
    end
  endtask

  // ---- non-linear check ----
  real max_err [K];

  task automatic check_nl(int f, int dst, int nout, const ref logic [B-1:0][N-1:0] xv []);
    logic [B-1:0][N-1:0] r;
    for (int o = 0; o < nout; o++) begin
      read_vec(dst + o, r);
      for (int i = 0; i < B; i++) begin
        longint xi, e, g;
        bit s;
        real err;
        xi = sext(64'(xv[o][i]), N);
        e  = pwl_ref(xi, fh[f], fa[f], fb[f], fl[f], S, N, FR, s);
        g  = sext(64'(r[i]), N);
        checks++;
        if (g != e) begin
          failures++;
          if (failures < 10) $display("%s x=%f got %0d exp %0d", act_name(f), unq(xi, FR), g, e);
        end
        err = unq(g, FR) - act(f, unq(xi, FR));
        if (err < 0.0) err = -err;
        if (err > max_err[f]) max_err[f] = err;
        checks++;
        if (err > bound[f]) begin
          failures++;
          if (failures < 10) $display("%s x=%f error %f above %f", act_name(f), unq(xi, FR), err, bound[f]);
        end
      end
    end
  endtask

  initial begin
    logic [B-1:0][N-1:0]        xv [];
    logic [B-1:0][B-1:0][N-1:0] wm [];
    logic [B-1:0][N-1:0]        r;
    instr_valid = 0; instr = '0;
    dm_we = 0; dm_re = 0; cm_we = 0; pm_we = 0;
    dm_waddr = '0; dm_raddr = '0; dm_wdata = '0; cm_waddr = '0; cm_wdata = '0;
    pm_waddr = '0; pm_h = '0; pm_beta = '0; pm_lambda = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    for (int f = 0; f < K; f++) begin
      load_function(f);
      max_err[f] = 0.0;
    end

    // tiled linear combination: 2 input tiles, 2 output vectors
    xv = new[2];
    wm = new[4];
    for (int t = 0; t < 2; t++) begin
      for (int j = 0; j < B; j++) xv[t][j] = N'(quant(rnd(2000, 1000.0), FR));
      write_vec(t, xv[t]);
    end
    for (int n = 0; n < 4; n++) begin
      for (int i = 0; i < B; i++)
        for (int j = 0; j < B; j++) wm[n][i][j] = N'(quant(rnd(1000, 2000.0), FR));
      write_mat(n, wm[n]);
    end
    run(mk(MODE_LINEAR, 0, 0, 40, 0, 2, 2), 4);
    check_linear(0, 40, 0, 2, 2, xv, wm);

    // linear combination that overflows the word
    xv = new[1];
    wm = new[1];
    for (int j = 0; j < B; j++) xv[0][j] = N'(quant((j % 2 == 0) ? 100.0 : -100.0, FR));
    for (int i = 0; i < B; i++)
      for (int j = 0; j < B; j++) wm[0][i][j] = N'(quant(((i % 2 == 0) == (j % 2 == 0)) ? 50.0 : -50.0, FR));
    write_vec(2, xv[0]);
    write_mat(4, wm[0]);
    run(mk(MODE_LINEAR, 0, 2, 42, 4, 1, 1), 1);
    check_linear(2, 42, 4, 1, 1, xv, wm);

    // every function on two vectors spread over [LO, HI]
    xv = new[2];
    for (int f = 0; f < K; f++) begin
      for (int o = 0; o < 2; o++) begin
        for (int j = 0; j < B; j++) begin
          real xr;
          if (o == 0) xr = LO + (HI - LO) * j / B + 0.01 * f;               // near boundaries
          else        xr = LO + (HI - LO) * $urandom_range(0, 99999) / 100000.0;
          xv[o][j] = N'(quant(xr, FR));
        end
        write_vec(4 + o, xv[o]);
      end
      run(mk(MODE_NONLINEAR, f, 4, 50, 0, 0, 2), 2);
      check_nl(f, 50, 2, xv);
    end

    // a layer: y = W x (one tile) then Tanh(y) from the result in place
    xv = new[1];
    wm = new[1];
    for (int j = 0; j < B; j++) xv[0][j] = N'(quant(rnd(1000, 1000.0), FR));
    for (int i = 0; i < B; i++)
      for (int j = 0; j < B; j++) wm[0][i][j] = N'(quant(rnd(500, 2000.0), FR));
    write_vec(8, xv[0]);
    write_mat(5, wm[0]);
    run(mk(MODE_LINEAR, 0, 8, 9, 5, 1, 1), 1);
    check_linear(8, 9, 5, 1, 1, xv, wm);
    run(mk(MODE_NONLINEAR, 2, 9, 9, 0, 1, 1), 1);
    read_vec(9, r);
    begin
      logic [B-1:0][N-1:0] yv [];
      logic [B-1:0][N-1:0] hid;
      yv = new[1];
      // expected hidden vector, then Tanh of it
      for (int i = 0; i < B; i++) begin
        wide_t acc;
        bit s;
        acc = '0;
        for (int j = 0; j < B; j++) acc += wide_t'($signed(wm[0][i][j])) * wide_t'($signed(xv[0][j]));
        hid[i] = N'(round_sat(acc, N, FR, s));
      end
      yv[0] = hid;
      check_nl(2, 9, 1, yv);
    end

    for (int f = 0; f < K; f++)
      $display("%-10s max |error| %f (bound %f)", act_name(f), max_err[f], bound[f]);
    $display("codes 00:%0d 01:%0d 10:%0d 11:%0d; linear tiles %0d, non-linear tiles %0d",
             code_seen[0], code_seen[1], code_seen[2], code_seen[3], n_lin_tiles, n_nl_tiles);
    $display("accumulated tiles %0d, saturated entries %0d, mode switches %0d, drains %0d",
             n_multi, n_sat, n_switch, n_drain);
    foreach (code_seen[c]) begin
      checks++;
      if (code_seen[c] == 0) begin failures++; $display("code %0d never used", c); end
    end
    checks += 6;
    if (n_lin_tiles == 0) begin failures++; $display("no linear tile"); end
    if (n_nl_tiles == 0)  begin failures++; $display("no non-linear tile"); end
    if (n_multi == 0)     begin failures++; $display("no tile accumulation"); end
    if (n_sat == 0)       begin failures++; $display("no saturation"); end
    if (n_switch == 0)    begin failures++; $display("no mode switch"); end
    if (n_drain == 0)     begin failures++; $display("no drain"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

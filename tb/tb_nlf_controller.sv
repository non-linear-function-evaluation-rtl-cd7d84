// tb_nlf_controller: issues random linear and non-linear instructions and
// checks, cycle by cycle, the tile sequence the controller produces: data and
// coefficient tile addresses, m and k at issue; the delayed controls for the
// arithmetic block (+1 cycle), the tile accumulator (+4, first/last flags) and
// the result address (+5, on last tiles only). It also checks one tile per
// cycle (issue cycles = n_out * n_in) and that done comes exactly
// n_out*n_in + 7 cycles after the instruction was accepted.
module tb_nlf_controller;
  import nlf_pkg::*;

  localparam int DAW = 6, CAW = 5, KW = 3;

  int checks = 0, failures = 0;
  int n_lin = 0, n_nl = 0, n_multi = 0;

  logic clk = 0, rst_n = 0;
  logic instr_valid, instr_ready, busy, done;
  instr_t instr;
  logic rd_en, arith_valid, acc_valid, acc_first, acc_last;
  logic [DAW-1:0] dmem_raddr, wb_addr;
  logic [CAW-1:0] tile_addr;
  logic [KW-1:0] k;
  mode_e m, arith_m, acc_m;

  nlf_controller #(.DAW(DAW), .CAW(CAW), .KW(KW)) dut (
    .clk(clk), .rst_n(rst_n), .instr_valid(instr_valid), .instr_ready(instr_ready),
    .instr(instr), .busy(busy), .done(done), .rd_en(rd_en), .dmem_raddr(dmem_raddr),
    .tile_addr(tile_addr), .m(m), .k(k), .arith_valid(arith_valid), .arith_m(arith_m),
    .acc_valid(acc_valid), .acc_first(acc_first), .acc_last(acc_last), .acc_m(acc_m),
    .wb_addr(wb_addr));

  typedef struct { int d; int c; bit m; int k; bit first; bit last; int dst; } tile_t;
  tile_t exp_q [$];
  tile_t hist [$];   // issued tiles with their issue cycle order
  int    issue_cyc [$];
  int    cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void fail(string s);
    failures++;
    if (failures < 15) $display("cycle %0d: %s", cycle, s);
  endfunction

  // observe every cycle before the edge
  always @(negedge clk) if (rst_n) begin
    tile_t t, p;
    if (rd_en) begin
      checks++;
      if (exp_q.size() == 0) fail("tile issued that was not expected");
      else begin
        t = exp_q.pop_front();
        if (dmem_raddr != DAW'(t.d) || tile_addr != CAW'(t.c) || m != mode_e'(t.m) || k != KW'(t.k))
          fail($sformatf("issue got d=%0d c=%0d m=%0d k=%0d exp d=%0d c=%0d m=%0d k=%0d",
                         dmem_raddr, tile_addr, m, k, t.d, t.c, t.m, t.k));
        hist.push_back(t);
        issue_cyc.push_back(cycle);
      end
    end
    // delayed controls
    for (int n = 0; n < hist.size(); n++) begin
      int age;
      age = cycle - issue_cyc[n];
      p = hist[n];
      if (age == 1) begin
        checks++;
        if (!arith_valid || arith_m != mode_e'(p.m)) fail("arithmetic-block control misaligned");
      end
      if (age == 4) begin
        checks++;
        if (!acc_valid || acc_first != p.first || acc_last != p.last || acc_m != mode_e'(p.m))
          fail($sformatf("accumulator control got v=%b f=%b l=%b exp f=%b l=%b",
                         acc_valid, acc_first, acc_last, p.first, p.last));
      end
      if (age == 5 && p.last) begin
        checks++;
        if (wb_addr != DAW'(p.dst)) fail($sformatf("write-back address %0d exp %0d", wb_addr, p.dst));
      end
    end
    while (hist.size() > 0 && cycle - issue_cyc[0] >= 5) begin
      void'(hist.pop_front());
      void'(issue_cyc.pop_front());
    end
  end

  initial begin
    instr_valid = 0; instr = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 60; it++) begin
      int nin, nout, t0, tiles;
      instr_t ins;
      ins       = '0;
      ins.mode  = mode_e'($urandom_range(0, 1));
      ins.func  = 8'($urandom_range(0, 7));
      ins.src   = ADDR_W'($urandom_range(0, 20));
      ins.dst   = ADDR_W'($urandom_range(32, 50));
      ins.coef  = ADDR_W'($urandom_range(0, 10));
      ins.n_in  = CNT_W'($urandom_range(0, 4));
      ins.n_out = CNT_W'($urandom_range(0, 4));
      nin  = (ins.mode == MODE_NONLINEAR || ins.n_in == 0) ? 1 : int'(ins.n_in);
      nout = (ins.n_out == 0) ? 1 : int'(ins.n_out);
      if (ins.mode == MODE_LINEAR) n_lin++; else n_nl++;
      if (nin > 1) n_multi++;
      for (int o = 0; o < nout; o++)
        for (int t = 0; t < nin; t++) begin
          tile_t e;
          e.d = (ins.mode == MODE_NONLINEAR) ? int'(ins.src) + o : int'(ins.src) + t;
          e.c = int'(ins.coef) + o * nin + t;
          e.m = ins.mode;
          e.k = int'(ins.func);
          e.first = (t == 0);
          e.last  = (t == nin - 1);
          e.dst = int'(ins.dst) + o;
          exp_q.push_back(e);
        end
      repeat ($urandom_range(0, 3)) @(negedge clk);
      instr = ins;
      instr_valid = 1;
      checks++;
      if (!instr_ready || busy) fail("not ready when idle");
      @(negedge clk);
      t0 = cycle;
      instr_valid = 0;
      instr = '0;
      tiles = 0;
      while (!done) begin
        checks++;
        if (instr_ready) fail("ready while busy");
        if (rd_en) tiles++;
        @(negedge clk);
      end
      checks += 2;
      if (tiles != nin * nout) fail($sformatf("%0d tiles issued, expected %0d", tiles, nin * nout));
      if (cycle - t0 + 1 != nin * nout + 7)
        fail($sformatf("operation took %0d cycles, expected %0d", cycle - t0 + 1, nin * nout + 7));
    end
    checks++;
    if (n_lin == 0 || n_nl == 0 || n_multi == 0 || exp_q.size() != 0) fail("coverage or leftover tiles");
    $display("linear %0d, non-linear %0d, multi-tile %0d", n_lin, n_nl, n_multi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

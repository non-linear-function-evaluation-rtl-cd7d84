// tb_ram_1r1w: writes random words to random addresses while reading, and
// compares every read (one cycle later) with a shadow array, including reads
// of the address being written (old data expected) and reads with re low
// (output held).
module tb_ram_1r1w;
  localparam int W = 40, D = 16;

  int checks = 0, failures = 0;

  logic clk = 0;
  logic we, re;
  logic [3:0] waddr, raddr;
  logic [W-1:0] wdata, rdata;
  logic [W-1:0] shadow [D];
  logic [W-1:0] expected;
  bit   valid_exp;

  ram_1r1w #(.WIDTH(W), .DEPTH(D)) dut (
    .clk(clk), .we(we), .waddr(waddr), .wdata(wdata), .re(re), .raddr(raddr), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; re = 0; waddr = 0; raddr = 0; wdata = 0; valid_exp = 0;
    for (int a = 0; a < D; a++) begin
      @(negedge clk);
      we = 1; waddr = 4'(a); wdata = {$urandom, 8'(a)};
      shadow[a] = wdata;
    end
    for (int it = 0; it < 2000; it++) begin
      @(negedge clk);
      if (valid_exp) begin
        checks++;
        if (rdata !== expected) begin
          failures++;
          if (failures < 10) $display("read mismatch got=%h exp=%h", rdata, expected);
        end
      end
      we    = 1'($urandom_range(0, 1));
      waddr = 4'($urandom);
      wdata = {$urandom, 8'($urandom)};
      re    = (it == 0) || ($urandom_range(0, 3) != 0);
      raddr = (it % 7 == 0) ? waddr : 4'($urandom);
      if (re) expected = shadow[raddr];
      valid_exp = 1;
      if (we) shadow[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

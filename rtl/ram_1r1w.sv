// ram_1r1w: simple dual-port memory, one write port and one read port.
//
// Used for the data memory (one vector of b words per entry), the coefficient
// memory (one b x b matrix per entry) and the function parameter memory (the
// segment boundaries, intercept terms and baseline intercept of one function
// per entry). The memories are only named by the design; their organisation is
// this implementation's choice.
//
// Timing: a write takes effect at the clock edge where we is high. A read
// presents raddr with re high and rdata holds the entry from the next edge on
// until the next read. Reading the address being written returns the old
// contents. There is no reset; contents are undefined until written.
module ram_1r1w #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 16,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end

endmodule

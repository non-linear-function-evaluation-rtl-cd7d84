// nlf_controller: scheduling logic of the engine.
//
// Accepts one instruction (nlf_pkg::instr_t) at a time with a valid/ready
// handshake and breaks it into tiles, issuing one tile per cycle:
//   linear:     for each output vector o, n_in tiles t: x from src + t, weight
//               tile from coef + o*n_in + t, accumulated into dst + o;
//   non-linear: for each vector o: x from src + o through function func,
//               result to dst + o.
// A count of zero is taken as one. For every issued tile it reads the data
// memory, the coefficient memory (address steered by the coefficient
// overrider from m, k and the tile address) and the function parameter memory
// (entry k), and carries the control of that tile (m, first, last, result
// address) down a delay line that matches the datapath: memory read (1 cycle),
// arithmetic block (3 cycles), tile accumulator (1 cycle).
//
// Consecutive operations depend on each other's results, so a new instruction
// is accepted only after the previous one has written its last result: the
// controller drains the pipeline before raising done for one cycle and
// returning to idle. Tile partitioning follows the design; the instruction
// format, the issue order and the drain rule are this implementation's own.
module nlf_controller
  import nlf_pkg::*;
#(
  parameter int unsigned DAW = $clog2(nlf_pkg::DMEM_ENTRIES),  // data memory address width
  parameter int unsigned CAW = $clog2(nlf_pkg::CMEM_ENTRIES),  // coefficient memory address width
  parameter int unsigned KW  = $clog2(nlf_pkg::NUM_FUNCS)   // function selector width
) (
  input  logic            clk,
  input  logic            rst_n,
  // instruction
  input  logic            instr_valid,
  output logic            instr_ready,
  input  instr_t          instr,
  output logic            busy,
  output logic            done,
  // memory reads (data is on the memories' rdata one cycle later)
  output logic            rd_en,
  output logic [DAW-1:0]  dmem_raddr,
  output logic [CAW-1:0]  tile_addr,
  output mode_e           m,          // control signal m of the issued tile
  output logic [KW-1:0]   k,          // selected function
  // control aligned with the arithmetic block input (memory data)
  output logic            arith_valid,
  output mode_e           arith_m,
  // control aligned with the tile accumulator input
  output logic            acc_valid,
  output logic            acc_first,
  output logic            acc_last,
  output mode_e           acc_m,
  // result address aligned with the tile accumulator output
  output logic [DAW-1:0]  wb_addr
);

  localparam int unsigned ARITH_LAT = 3;
  localparam int unsigned DEPTH     = ARITH_LAT + 2;  // stages up to the write back

  typedef enum logic [1:0] {IDLE, ISSUE, DRAIN} state_e;

  typedef struct packed {
    logic           valid;
    logic           first;
    logic           last;
    mode_e          m;
    logic [DAW-1:0] dst;
  } tile_ctl_t;

  state_e           state;
  instr_t           cur;
  logic [CNT_W-1:0] n_in, n_out, t_cnt, o_cnt;
  logic [CAW-1:0]   coef_ptr;
  tile_ctl_t        issue;
  tile_ctl_t        pipe [DEPTH];
  logic             in_flight;

  assign instr_ready = (state == IDLE);
  assign busy        = (state != IDLE);

  // tile issued in this cycle
  always_comb begin
    issue.valid = (state == ISSUE);
    issue.first = (t_cnt == '0);
    issue.last  = (t_cnt == n_in - 1'b1);
    issue.m     = cur.mode;
    issue.dst   = DAW'(cur.dst) + DAW'(o_cnt);
  end

  assign rd_en      = issue.valid;
  assign dmem_raddr = (cur.mode == MODE_NONLINEAR) ? DAW'(cur.src) + DAW'(o_cnt)
                                                   : DAW'(cur.src) + DAW'(t_cnt);
  assign tile_addr  = coef_ptr;
  assign m          = cur.mode;
  assign k          = KW'(cur.func);

  always_comb begin
    in_flight = 1'b0;
    for (int s = 0; s < DEPTH; s++) in_flight |= pipe[s].valid;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= IDLE;
      cur      <= '0;
      n_in     <= '0;
      n_out    <= '0;
      t_cnt    <= '0;
      o_cnt    <= '0;
      coef_ptr <= '0;
      done     <= 1'b0;
      for (int s = 0; s < DEPTH; s++) pipe[s] <= '0;
    end else begin
      done    <= 1'b0;
      pipe[0] <= issue;
      for (int s = 1; s < DEPTH; s++) pipe[s] <= pipe[s-1];
      unique case (state)
        IDLE: if (instr_valid) begin
          cur      <= instr;
          n_in     <= (instr.mode == MODE_NONLINEAR || instr.n_in == '0) ? CNT_W'(1) : instr.n_in;
          n_out    <= (instr.n_out == '0) ? CNT_W'(1) : instr.n_out;
          t_cnt    <= '0;
          o_cnt    <= '0;
          coef_ptr <= CAW'(instr.coef);
          state    <= ISSUE;
        end
        ISSUE: begin
          coef_ptr <= coef_ptr + 1'b1;
          if (issue.last) begin
            t_cnt <= '0;
            o_cnt <= o_cnt + 1'b1;
            if (o_cnt == n_out - 1'b1) state <= DRAIN;
          end else begin
            t_cnt <= t_cnt + 1'b1;
          end
        end
        DRAIN: if (!in_flight) begin
          done  <= 1'b1;
          state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign arith_valid = pipe[0].valid;
  assign arith_m     = pipe[0].m;
  assign acc_valid   = pipe[ARITH_LAT].valid;
  assign acc_first   = pipe[ARITH_LAT].first;
  assign acc_last    = pipe[ARITH_LAT].last;
  assign acc_m       = pipe[ARITH_LAT].m;
  assign wb_addr     = pipe[ARITH_LAT+1].dst;

  // An instruction is only taken in IDLE and the instruction must hold while
  // it waits; a write-back never happens without a preceding issue.
  a_instr_hold: assert property (@(posedge clk) disable iff (!rst_n)
    instr_valid && !instr_ready |=> instr_valid && $stable(instr));
  a_no_issue_idle: assert property (@(posedge clk) disable iff (!rst_n)
    state == IDLE |-> !in_flight);

endmodule

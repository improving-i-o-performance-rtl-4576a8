// csb_system: the uncached store path of a processor with a conditional
// store buffer (CSB).
//
// Uncached operations leave the processor in program order through one
// request port. uc_dispatch sends combining stores and conditional flushes
// (the atomic swap to combining space) to the CSB, and every other uncached
// load and store to the uncached buffer. The system interface drains both
// onto the system bus: single-beat transactions for the uncached buffer, one
// full-line burst for each line the CSB commits. Caches, the TLB (which
// supplies the combining attribute per page) and the process ID register
// lie outside; their outputs arrive as req_comb and req_pid.
//
// Clocks: everything runs on clk, the processor clock. The bus runs
// CLK_RATIO times slower; this block derives the bus cycle enable bus_ce
// (high in the last processor clock of every bus cycle) and brings it out so
// that bus targets can sample on the same edges. All bus outputs change only
// on those edges.
//
// Processor port: req_valid/req_ready handshake, one operation per clock.
// A load or a swap gets exactly one rsp_valid pulse: for a swap the clock
// after it is accepted (its source value on success, 0 on failure), for a
// load when the bus target has returned the data. Stores get no response.
// mem_idle is high when the uncached buffer is empty, no CSB line is waiting
// and the bus is idle: a memory barrier waits for it.
//
// Reset is synchronous and active low. Defaults follow the main
// configuration the paper evaluates: 64-byte lines, an 8-byte
// multiplexed bus, bus clock 1/6 of the processor clock, no turnaround cycle
// and no acknowledgment delay. Uncached buffer depth, PID and counter widths
// are this design's own choices.
module csb_system
  import csb_pkg::*;
#(
  parameter int unsigned LINE_BYTES = 64,
  parameter int unsigned BUS_BYTES  = 8,
  parameter bit          MUX_BUS    = 1'b1,
  parameter int unsigned TURNAROUND = 0,
  parameter int unsigned ACK_DELAY  = 0,
  parameter int unsigned CLK_RATIO  = 6,
  parameter int unsigned UCB_DEPTH  = 4,
  parameter int unsigned PID_W      = 8,
  parameter int unsigned CNT_W      = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // processor side
  input  logic                    req_valid,
  output logic                    req_ready,
  input  mem_op_e                 req_op,
  input  logic [ADDR_W-1:0]       req_addr,
  input  logic [1:0]              req_size,
  input  logic [WORD_W-1:0]       req_wdata,
  input  logic                    req_comb,
  input  logic [PID_W-1:0]        req_pid,
  output logic                    rsp_valid,
  output logic [WORD_W-1:0]       rsp_data,
  output logic                    mem_idle,
  output logic [CNT_W-1:0]        csb_hit_count,
  // system bus
  output logic                    bus_ce,
  output logic                    bus_a_valid,
  output logic [ADDR_W-1:0]       bus_a_addr,
  output logic                    bus_a_write,
  output logic [3:0]              bus_a_size,
  output logic                    bus_d_valid,
  output logic [8*BUS_BYTES-1:0]  bus_d_data,
  output logic [BUS_BYTES-1:0]    bus_d_be,
  input  logic                    bus_r_valid,
  input  logic [8*BUS_BYTES-1:0]  bus_r_data,
  input  logic                    bus_ack
);

  localparam int unsigned DIV_W = (CLK_RATIO > 1) ? $clog2(CLK_RATIO) : 1;

  // bus cycle enable
  logic [DIV_W-1:0] div_q;
  always_ff @(posedge clk) begin
    if (!rst_n || bus_ce) div_q <= '0;
    else                  div_q <= div_q + 1'b1;
  end
  assign bus_ce = (div_q == DIV_W'(CLK_RATIO - 1));

  // dispatcher <-> CSB
  logic                  st_valid, st_ready, fl_valid, fl_ready, fl_rsp_valid;
  logic [ADDR_W-1:0]     st_addr, fl_addr;
  logic [WORD_W-1:0]     st_data, fl_expect, fl_rsp_data;
  logic [WORD_BYTES-1:0] st_be;
  logic [PID_W-1:0]      st_pid, fl_pid;
  // CSB -> system interface
  logic                    line_valid, line_ready;
  logic [ADDR_W-1:0]       line_addr;
  logic [8*LINE_BYTES-1:0] line_data;
  // dispatcher -> uncached buffer -> system interface
  logic    enq_valid, enq_ready, deq_valid, deq_ready, ucb_empty;
  uc_req_t enq_req, deq_req;
  // loads
  logic              ld_rsp_valid, sif_busy;
  logic [WORD_W-1:0] ld_rsp_data;

  uc_dispatch #(.PID_W(PID_W)) u_dispatch (
    .clk, .rst_n,
    .req_valid, .req_ready, .req_op, .req_addr, .req_size, .req_wdata, .req_comb, .req_pid,
    .rsp_valid, .rsp_data,
    .st_valid, .st_ready, .st_addr, .st_data, .st_be, .st_pid,
    .fl_valid, .fl_ready, .fl_addr, .fl_expect, .fl_pid, .fl_rsp_valid, .fl_rsp_data,
    .csb_line_pending (line_valid),
    .enq_valid, .enq_ready, .enq_req,
    .ld_rsp_valid, .ld_rsp_data
  );

  csb_buffer #(.LINE_BYTES(LINE_BYTES), .PID_W(PID_W), .CNT_W(CNT_W)) u_csb (
    .clk, .rst_n,
    .st_valid, .st_ready, .st_addr, .st_data, .st_be, .st_pid,
    .fl_valid, .fl_ready, .fl_addr, .fl_expect, .fl_pid, .fl_rsp_valid, .fl_rsp_data,
    .line_valid, .line_ready, .line_addr, .line_data,
    .hit_count (csb_hit_count)
  );

  uc_buffer #(.DEPTH(UCB_DEPTH)) u_ucb (
    .clk, .rst_n,
    .enq_valid, .enq_ready, .enq_req,
    .deq_valid, .deq_ready, .deq_req,
    .empty (ucb_empty)
  );

  sys_if #(
    .LINE_BYTES(LINE_BYTES), .BUS_BYTES(BUS_BYTES), .MUX_BUS(MUX_BUS),
    .TURNAROUND(TURNAROUND), .ACK_DELAY(ACK_DELAY)
  ) u_sif (
    .clk, .rst_n, .bus_ce,
    .uc_valid (deq_valid), .uc_ready (deq_ready), .uc_req (deq_req),
    .line_valid, .line_ready, .line_addr, .line_data,
    .ld_rsp_valid, .ld_rsp_data,
    .bus_a_valid, .bus_a_addr, .bus_a_write, .bus_a_size,
    .bus_d_valid, .bus_d_data, .bus_d_be,
    .bus_r_valid, .bus_r_data, .bus_ack,
    .busy (sif_busy)
  );

  assign mem_idle = ucb_empty && !line_valid && !sif_busy;

endmodule

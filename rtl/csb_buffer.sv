// csb_buffer: the conditional store buffer (CSB).
//
// A single cache line of store data plus three registers: the line-aligned
// address and the process ID of the most recent combining store, and a hit
// counter holding the number of consecutive stores that one process issued
// to that line without a conflict.
//
// Combining store (st_*): the line address and PID are compared with the
// saved ones. On a match the bytes are merged into their slot and the counter
// goes up by one. On a mismatch, or when the buffer is empty, the line is
// cleared, the new bytes written, address and PID saved and the counter set
// to 1. Stores may come in any order; only their number is checked.
//
// Conditional flush (fl_*): carries the expected counter value (the swap
// source register). If counter, line address and PID all match, the line is
// committed: it is offered to the system interface as one full-line burst
// (line_*) with unwritten bytes zero, the counter is cleared and the response
// returns the expected value unchanged. Otherwise the line and the counter
// are cleared, nothing is issued and the response is 0.
//
// Timing: one store or flush is accepted per clock (valid/ready). The flush
// response is registered and appears the clock after the flush is accepted.
// While a committed line waits for line_ready, st_ready and fl_ready are low
// (the buffer has only one entry). The line register is cleared when the
// system interface takes the line. Reset is synchronous and active low.
//
// Address use: a store needs only its doubleword slot and line address, so
// st_addr bits below the doubleword are unused (the byte enables carry
// them); a flush names its line, so fl_addr bits below the line are unused.
// line_addr is line aligned, its low bits are always zero.
//
// From the paper: the register set, the compare/merge/reset rules, the
// flush result (value kept on success, 0 on failure), full-line bursts with
// zero padding and the single entry. Own choices: the counter saturates at
// its maximum instead of wrapping; a flush of an empty buffer (counter 0)
// always fails; the byte-enable store port; the widths of PID and counter.
module csb_buffer
  import csb_pkg::*;
#(
  parameter int unsigned LINE_BYTES = 64,
  parameter int unsigned PID_W      = 8,
  parameter int unsigned CNT_W      = 8
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // combining store
  input  logic                      st_valid,
  output logic                      st_ready,
  input  logic [ADDR_W-1:0]         st_addr,
  input  logic [WORD_W-1:0]         st_data,
  input  logic [WORD_BYTES-1:0]     st_be,
  input  logic [PID_W-1:0]          st_pid,
  // conditional flush
  input  logic                      fl_valid,
  output logic                      fl_ready,
  input  logic [ADDR_W-1:0]         fl_addr,
  input  logic [WORD_W-1:0]         fl_expect,
  input  logic [PID_W-1:0]          fl_pid,
  output logic                      fl_rsp_valid,
  output logic [WORD_W-1:0]         fl_rsp_data,
  // committed line to the system interface
  output logic                      line_valid,
  input  logic                      line_ready,
  output logic [ADDR_W-1:0]         line_addr,
  output logic [8*LINE_BYTES-1:0]   line_data,
  // status
  output logic [CNT_W-1:0]          hit_count
);

  localparam int unsigned OFFS_W = $clog2(LINE_BYTES);
  localparam int unsigned SLOTS  = LINE_BYTES / WORD_BYTES;
  localparam int unsigned SLOT_W = (SLOTS > 1) ? $clog2(SLOTS) : 1;
  localparam int unsigned TAG_W  = ADDR_W - OFFS_W;

  logic [TAG_W-1:0]        tag_q;
  logic [PID_W-1:0]        pid_q;
  logic [CNT_W-1:0]        cnt_q;
  logic [8*LINE_BYTES-1:0] data_q;
  logic                    committed_q;

  logic              st_fire, fl_fire, st_hit, fl_ok;
  logic [SLOT_W-1:0] slot;
  logic [8*LINE_BYTES-1:0] st_mask, st_bits, base;

  assign st_ready = !committed_q;
  assign fl_ready = !committed_q;
  assign st_fire  = st_valid && st_ready;
  assign fl_fire  = fl_valid && fl_ready;

  assign st_hit = (cnt_q != '0) && (st_addr[ADDR_W-1:OFFS_W] == tag_q) && (st_pid == pid_q);
  assign fl_ok  = (cnt_q != '0) && (fl_addr[ADDR_W-1:OFFS_W] == tag_q) && (fl_pid == pid_q)
               && (fl_expect == WORD_W'(cnt_q));

  if (SLOTS > 1) begin : g_slot
    assign slot = st_addr[OFFS_W-1:3];
  end else begin : g_one
    assign slot = '0;
  end

  // Lane mask and data of the store, placed in its slot of the line.
  always_comb begin
    logic [WORD_W-1:0] lane_mask;
    for (int b = 0; b < WORD_BYTES; b++) lane_mask[8*b +: 8] = {8{st_be[b]}};
    st_mask = '0;
    st_bits = '0;
    st_mask[WORD_W*slot +: WORD_W] = lane_mask;
    st_bits[WORD_W*slot +: WORD_W] = st_data & lane_mask;
    base = st_hit ? data_q : '0;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tag_q        <= '0;
      pid_q        <= '0;
      cnt_q        <= '0;
      data_q       <= '0;
      committed_q  <= 1'b0;
      fl_rsp_valid <= 1'b0;
      fl_rsp_data  <= '0;
    end else begin
      fl_rsp_valid <= fl_fire;
      if (st_fire) begin
        data_q <= (base & ~st_mask) | st_bits;
        tag_q  <= st_addr[ADDR_W-1:OFFS_W];
        pid_q  <= st_pid;
        if (!st_hit)               cnt_q <= CNT_W'(1);
        else if (cnt_q != '1)      cnt_q <= cnt_q + 1'b1;
      end else if (fl_fire) begin
        cnt_q <= '0;
        if (fl_ok) begin
          committed_q <= 1'b1;
          fl_rsp_data <= fl_expect;
        end else begin
          data_q      <= '0;
          fl_rsp_data <= '0;
        end
      end
      if (line_valid && line_ready) begin
        committed_q <= 1'b0;
        data_q      <= '0;
      end
    end
  end

  assign line_valid = committed_q;
  assign line_addr  = {tag_q, {OFFS_W{1'b0}}};
  assign line_data  = data_q;
  assign hit_count  = cnt_q;

  // The dispatcher hands over one operation per clock.
  a_one_op: assert property (@(posedge clk) disable iff (!rst_n) !(st_valid && fl_valid));
  // A committed line stays put until the system interface takes it.
  a_line_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                  line_valid && !line_ready |=> line_valid && $stable(line_data));

  initial begin
    assert (LINE_BYTES >= WORD_BYTES && (LINE_BYTES & (LINE_BYTES - 1)) == 0)
      else $error("LINE_BYTES must be a power of two of at least one doubleword");
  end

endmodule

// uc_buffer: the uncached buffer.
//
// A first-in first-out queue of uncached loads and stores that have left the
// processor and wait for the system interface. Entries leave strictly in the
// order they came, so uncached accesses reach the bus in program order and
// each exactly once. This is the plain, non-combining form of the buffer:
// every entry becomes one bus transaction.
//
// Interface: enq_* and deq_* are valid/ready handshakes carrying a uc_req_t.
// deq_valid/deq_req come straight from the head register. 'empty' lets a
// memory barrier wait until every earlier uncached access has left.
//
// Timing: an entry written in one clock can be read out the next clock; a
// full buffer accepts a new entry in the same clock the head leaves. Reset
// (synchronous, active low) empties the buffer.
//
// From the paper: the FIFO order and the empty condition used by memory
// barriers. Own choices: the depth (the paper gives none) and the
// handshake.
module uc_buffer
  import csb_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     enq_valid,
  output logic     enq_ready,
  input  uc_req_t  enq_req,
  output logic     deq_valid,
  input  logic     deq_ready,
  output uc_req_t  deq_req,
  output logic     empty
);

  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  uc_req_t          mem_q [DEPTH];
  logic [PTR_W-1:0] rd_q, wr_q;
  logic [PTR_W:0]   cnt_q;
  logic             enq_fire, deq_fire;

  assign deq_valid = (cnt_q != '0);
  assign enq_ready = (cnt_q != (PTR_W+1)'(DEPTH)) || deq_ready;
  assign enq_fire  = enq_valid && enq_ready;
  assign deq_fire  = deq_valid && deq_ready;
  assign deq_req   = mem_q[rd_q];
  assign empty     = (cnt_q == '0);

  function automatic logic [PTR_W-1:0] inc(logic [PTR_W-1:0] p);
    return (p == PTR_W'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_q  <= '0;
      wr_q  <= '0;
      cnt_q <= '0;
    end else begin
      if (enq_fire) wr_q <= inc(wr_q);
      if (deq_fire) rd_q <= inc(rd_q);
      cnt_q <= cnt_q + (PTR_W+1)'(enq_fire) - (PTR_W+1)'(deq_fire);
    end
  end

  always_ff @(posedge clk) begin
    if (enq_fire) mem_q[wr_q] <= enq_req;
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) cnt_q <= (PTR_W+1)'(DEPTH));

endmodule

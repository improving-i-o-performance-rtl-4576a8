// uc_dispatch: steers the processor's uncached operations.
//
// The page attribute of the access (from the TLB) says whether the address
// lies in the combining part of uncached space. Stores there go to the
// conditional store buffer as combining stores; an atomic swap there is the
// conditional flush, with the swap source register as the expected hit count.
// All other uncached loads and stores go to the uncached buffer. Loads to
// combining space also take the uncached buffer: they pass the combined
// stores, which are not committed yet.
//
// Ordering: once a flush has committed a line, uncached loads and stores
// wait here until the system interface has taken that line, so the burst
// keeps its place in program order (the system interface in turn sends the
// line only when the uncached buffer is empty).
//
// The dispatcher also forms the byte enables of the access from its size and
// address, and merges the two response sources (flush result, load data)
// into one response port. It is combinational; clk and rst_n only clock its
// assertions. Accesses are naturally aligned. An atomic swap to
// non-combining space is not an uncached operation and must not arrive here.
// Most output bits (address, data, PID) are the request fields wired
// straight through to both targets; only the valid/ready signals, the byte
// enables and the response are logic.
//
// From the paper: the page-attribute selection, the use of the swap as
// the flush and loads bypassing the CSB. Own choices: the ordering rule with
// the committed line, the port format and the response merge.
module uc_dispatch
  import csb_pkg::*;
#(
  parameter int unsigned PID_W = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // processor side
  input  logic                  req_valid,
  output logic                  req_ready,
  input  mem_op_e               req_op,
  input  logic [ADDR_W-1:0]     req_addr,
  input  logic [1:0]            req_size,
  input  logic [WORD_W-1:0]     req_wdata,
  input  logic                  req_comb,     // page attribute: combining space
  input  logic [PID_W-1:0]      req_pid,      // current process ID
  output logic                  rsp_valid,
  output logic [WORD_W-1:0]     rsp_data,
  // conditional store buffer
  output logic                  st_valid,
  input  logic                  st_ready,
  output logic [ADDR_W-1:0]     st_addr,
  output logic [WORD_W-1:0]     st_data,
  output logic [WORD_BYTES-1:0] st_be,
  output logic [PID_W-1:0]      st_pid,
  output logic                  fl_valid,
  input  logic                  fl_ready,
  output logic [ADDR_W-1:0]     fl_addr,
  output logic [WORD_W-1:0]     fl_expect,
  output logic [PID_W-1:0]      fl_pid,
  input  logic                  fl_rsp_valid,
  input  logic [WORD_W-1:0]     fl_rsp_data,
  input  logic                  csb_line_pending,
  // uncached buffer
  output logic                  enq_valid,
  input  logic                  enq_ready,
  output uc_req_t               enq_req,
  // load data from the system interface
  input  logic                  ld_rsp_valid,
  input  logic [WORD_W-1:0]     ld_rsp_data
);

  logic to_st, to_fl, to_uc;
  logic [WORD_BYTES-1:0] be;

  assign be    = size_to_be(req_size, req_addr[2:0]);
  assign to_st = req_comb && (req_op == OP_STORE);
  assign to_fl = req_comb && (req_op == OP_SWAP);
  assign to_uc = (req_op == OP_LOAD) || (!req_comb && req_op == OP_STORE);

  assign st_valid  = req_valid && to_st;
  assign st_addr   = req_addr;
  assign st_data   = req_wdata;
  assign st_be     = be;
  assign st_pid    = req_pid;

  assign fl_valid  = req_valid && to_fl;
  assign fl_addr   = req_addr;
  assign fl_expect = req_wdata;
  assign fl_pid    = req_pid;

  assign enq_valid       = req_valid && to_uc && !csb_line_pending;
  assign enq_req.is_load = (req_op == OP_LOAD);
  assign enq_req.addr    = req_addr;
  assign enq_req.size    = req_size;
  assign enq_req.data    = req_wdata;
  assign enq_req.be      = be;

  always_comb begin
    if (to_st)      req_ready = st_ready;
    else if (to_fl) req_ready = fl_ready;
    else if (to_uc) req_ready = enq_ready && !csb_line_pending;
    else            req_ready = 1'b0;
  end

  assign rsp_valid = fl_rsp_valid || ld_rsp_valid;
  assign rsp_data  = fl_rsp_valid ? fl_rsp_data : ld_rsp_data;

  a_aligned: assert property (@(posedge clk) disable iff (!rst_n)
                              req_valid |-> (req_addr[2:0] & ((3'(1) << req_size) - 3'(1))) == 3'd0);
  a_no_plain_swap: assert property (@(posedge clk) disable iff (!rst_n)
                                    req_valid |-> !(req_op == OP_SWAP && !req_comb));
  a_one_rsp: assert property (@(posedge clk) disable iff (!rst_n) !(fl_rsp_valid && ld_rsp_valid));

endmodule

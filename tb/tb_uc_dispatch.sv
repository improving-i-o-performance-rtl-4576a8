// tb_uc_dispatch: self-checking test of the uncached-operation dispatcher.
//
// Random operations (load, store, swap to combining space), sizes, aligned
// addresses, attribute bits and ready/pending inputs are applied one per
// clock. For each the test works out on its own where the operation must go
// (CSB store port, CSB flush port or uncached buffer), the byte enables of
// the access, whether the processor sees ready, that uncached operations
// wait while a committed CSB line is pending, and which response reaches the
// processor.
//
// The routing follows the paper's use of the page attribute and the swap;
// the ordering hold and port format are this design's own.
module tb_uc_dispatch;
  import csb_pkg::*;

  localparam int unsigned PID_W = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                  req_valid = 0, req_ready, req_comb = 0;
  mem_op_e               req_op = OP_LOAD;
  logic [ADDR_W-1:0]     req_addr = '0;
  logic [1:0]            req_size = '0;
  logic [WORD_W-1:0]     req_wdata = '0;
  logic [PID_W-1:0]      req_pid = '0;
  logic                  rsp_valid;
  logic [WORD_W-1:0]     rsp_data;
  logic                  st_valid, st_ready = 0, fl_valid, fl_ready = 0, fl_rsp_valid = 0;
  logic [ADDR_W-1:0]     st_addr, fl_addr;
  logic [WORD_W-1:0]     st_data, fl_expect, fl_rsp_data = '0;
  logic [WORD_BYTES-1:0] st_be;
  logic [PID_W-1:0]      st_pid, fl_pid;
  logic                  csb_line_pending = 0;
  logic                  enq_valid, enq_ready = 0;
  uc_req_t               enq_req;
  logic                  ld_rsp_valid = 0;
  logic [WORD_W-1:0]     ld_rsp_data = '0;

  uc_dispatch #(.PID_W(PID_W)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  int n_st = 0, n_fl = 0, n_uc = 0, n_held = 0;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int n = 0; n < 4000; n++) begin
      int k, nbytes;
      logic [WORD_BYTES-1:0] exp_be;
      bit go_st, go_fl, go_uc, exp_ready;
      #1;
      k = $urandom_range(0, 2);
      req_comb  = 1'($urandom());
      // no plain atomic swaps reach this unit
      req_op    = (k == 2 && !req_comb) ? OP_STORE : mem_op_e'(k);
      req_size  = 2'($urandom());
      nbytes    = 1 << req_size;
      req_addr  = {$urandom(), $urandom()} & ~64'(nbytes - 1);
      req_wdata = {$urandom(), $urandom()};
      req_pid   = 8'($urandom());
      req_valid = ($urandom_range(0, 3) != 0);
      st_ready  = 1'($urandom());
      fl_ready  = 1'($urandom());
      enq_ready = 1'($urandom());
      csb_line_pending = ($urandom_range(0, 3) == 0);
      fl_rsp_valid = ($urandom_range(0, 3) == 0);
      ld_rsp_valid = !fl_rsp_valid && ($urandom_range(0, 3) == 0);
      fl_rsp_data  = {$urandom(), $urandom()};
      ld_rsp_data  = {$urandom(), $urandom()};
      #1;
      exp_be = '0;
      for (int b = 0; b < nbytes; b++) exp_be[int'(req_addr[2:0]) + b] = 1'b1;
      go_st = req_comb && req_op == OP_STORE;
      go_fl = req_comb && req_op == OP_SWAP;
      go_uc = !go_st && !go_fl;
      exp_ready = go_st ? st_ready : go_fl ? fl_ready : (enq_ready && !csb_line_pending);
      check(st_valid == (req_valid && go_st), "store routed to the CSB");
      check(fl_valid == (req_valid && go_fl), "swap routed to the CSB as flush");
      check(enq_valid == (req_valid && go_uc && !csb_line_pending), "uncached op routed to buffer");
      check(req_ready == exp_ready, "ready back to the processor");
      if (go_st) check(st_be == exp_be && st_addr == req_addr && st_data == req_wdata
                       && st_pid == req_pid, "store fields");
      if (go_fl) check(fl_expect == req_wdata && fl_addr == req_addr && fl_pid == req_pid,
                       "flush fields");
      if (go_uc) check(enq_req.be == exp_be && enq_req.is_load == (req_op == OP_LOAD)
                       && enq_req.addr == req_addr && enq_req.size == req_size
                       && enq_req.data == req_wdata, "uncached entry fields");
      check(rsp_valid == (fl_rsp_valid || ld_rsp_valid), "response valid");
      if (fl_rsp_valid) check(rsp_data == fl_rsp_data, "flush response data");
      else if (ld_rsp_valid) check(rsp_data == ld_rsp_data, "load response data");
      if (st_valid) n_st++;
      if (fl_valid) n_fl++;
      if (enq_valid) n_uc++;
      if (req_valid && go_uc && csb_line_pending) n_held++;
      @(posedge clk);
    end
    check(n_st > 100 && n_fl > 100 && n_uc > 100 && n_held > 50, "all routes exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

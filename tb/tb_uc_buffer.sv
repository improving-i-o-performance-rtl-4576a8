// tb_uc_buffer: self-checking test of the uncached buffer.
//
// Random pushes and pops against a SystemVerilog queue as the reference: the
// head must always equal the oldest entry, entries must leave in the order
// they came, a full buffer (DEPTH entries) must refuse a push unless the
// head leaves in the same clock, and 'empty' must follow the occupancy.
//
// The FIFO behaviour follows the paper's plain uncached buffer; the depth
// and handshake are this design's own.
module tb_uc_buffer;
  import csb_pkg::*;

  localparam int unsigned DEPTH = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic    enq_valid = 0, enq_ready, deq_valid, deq_ready = 0, empty;
  uc_req_t enq_req = '0, deq_req;

  uc_buffer #(.DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  uc_req_t model [$];
  int pushes = 0, pops = 0, full_refusals = 0;

  function automatic uc_req_t rnd_req();
    uc_req_t r;
    r.is_load = 1'($urandom());
    r.addr    = {$urandom(), $urandom()};
    r.size    = 2'($urandom());
    r.data    = {$urandom(), $urandom()};
    r.be      = 8'($urandom());
    return r;
  endfunction

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk); #1;
    check(empty && !deq_valid, "empty after reset");
    for (int n = 0; n < 5000; n++) begin
      // phases: fill-heavy, drain-heavy, mixed
      int pe, pd;
      pe = (n % 1000 < 400) ? 90 : (n % 1000 < 700) ? 20 : 60;
      pd = (n % 1000 < 400) ? 15 : (n % 1000 < 700) ? 90 : 60;
      enq_valid = ($urandom_range(0, 99) < pe);
      enq_req   = rnd_req();
      deq_ready = ($urandom_range(0, 99) < pd);
      #1;
      check(empty == (model.size() == 0), "empty flag");
      check(deq_valid == (model.size() != 0), "deq_valid");
      check(enq_ready == (model.size() < DEPTH || deq_ready), "enq_ready");
      if (deq_valid && model.size() != 0) check(deq_req == model[0], "head entry in order");
      if (enq_valid && !enq_ready) full_refusals++;
      @(posedge clk);
      if (deq_valid && deq_ready) begin void'(model.pop_front()); pops++; end
      if (enq_valid && enq_ready) begin model.push_back(enq_req); pushes++; end
      #1;
    end
    check(full_refusals > 0, "buffer was filled to its depth");
    check(pops > 1000, "entries flowed through");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

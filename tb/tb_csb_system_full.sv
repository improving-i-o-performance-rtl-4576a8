// tb_csb_system_full: the two microbenchmarks run on csb_system at its
// default parameters (64-byte line, 8-byte multiplexed bus, bus clock 1/6
// of the processor clock, no turnaround, no acknowledgment delay).
//
// Store bandwidth: transfers of 16 bytes to 1 KB, written once with
// doubleword stores to combining space (one conditional flush per line,
// retried on failure) and once with plain uncached doubleword stores. The
// bus time of a transfer runs from its first address cycle to its last busy
// cycle. Expected, from the bus rules: a line burst takes 1 + 8 = 9 bus
// cycles and bursts follow back to back, so ceil(bytes/64) * 9 cycles; a
// plain doubleword store takes 2 bus cycles, so bytes/8 * 2 cycles (4 bytes
// per bus cycle). Device memory must hold the data afterwards.
//
// Atomic access: 2 to 8 doubleword stores to combining space and a
// conditional flush. The processor cycles from the first store to the flush
// result must grow by exactly one per doubleword (n + 1 in all).
//
// The bandwidth figures are printed in bytes per bus cycle.
//
// The two benchmarks follow the paper's microbenchmarks; the lock-based
// comparison sequence is not modelled.
module tb_csb_system_full;
  import csb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              req_valid = 0, req_ready, req_comb = 0, rsp_valid, mem_idle;
  mem_op_e           req_op = OP_LOAD;
  logic [ADDR_W-1:0] req_addr = '0;
  logic [1:0]        req_size = '0;
  logic [WORD_W-1:0] req_wdata = '0, rsp_data;
  logic [7:0]        req_pid = '0;
  logic [7:0]        csb_hit_count;
  logic              bus_ce, bus_a_valid, bus_a_write, bus_d_valid, bus_r_valid, bus_ack;
  logic [ADDR_W-1:0] bus_a_addr;
  logic [3:0]        bus_a_size;
  logic [63:0]       bus_d_data, bus_r_data;
  logic [7:0]        bus_d_be;
  logic              clr = 0;
  int n_addr, n_rej, n_lines, n_singles, n_loads, first_cyc, last_cyc;

  csb_system dut (.*);

  io_target #(.BUS_BYTES(8), .LINE_BYTES(64)) tgt (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // Requests change 1 time unit after a clock edge.
  task automatic issue(mem_op_e op, logic [ADDR_W-1:0] a, logic [WORD_W-1:0] d, bit comb);
    #1;
    req_valid = 1; req_op = op; req_addr = a; req_size = 2'd3;
    req_wdata = d; req_comb = comb; req_pid = 8'd7;
    @(posedge clk);
    while (!req_ready) @(posedge clk);
    #1 req_valid = 0;
  endtask

  task automatic wait_rsp(output logic [WORD_W-1:0] r);
    while (!rsp_valid) @(posedge clk);
    r = rsp_data;
    @(posedge clk);
  endtask

  task automatic barrier();
    @(posedge clk);
    while (!mem_idle) @(posedge clk);
    repeat (12) @(posedge clk);
  endtask

  task automatic clear_counts();
    #1 clr = 1;
    @(posedge clk);
    #1 clr = 0;
  endtask

  function automatic logic [WORD_W-1:0] pattern(logic [ADDR_W-1:0] a, int run);
    return {a[31:0], 32'(run) ^ 32'hc0de_0000};
  endfunction

  task automatic verify(logic [ADDR_W-1:0] base, int bytes, int run, string what);
    int bad = 0;
    for (int i = 0; i < bytes; i += 8) begin
      logic [WORD_W-1:0] d;
      d = pattern(base + ADDR_W'(i), run);
      for (int j = 0; j < 8; j++)
        if (!tgt.mem.exists(base + ADDR_W'(i + j)) || tgt.mem[base + ADDR_W'(i + j)] != d[8*j +: 8])
          bad++;
    end
    check(bad == 0, $sformatf("%s: %0d bytes wrong in device memory", what, bad));
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int sizes [7] = '{16, 32, 64, 128, 256, 512, 1024};
  int n_csb_bursts = 0, n_plain = 0, n_retries = 0;

  initial begin
    logic [ADDR_W-1:0] base;
    logic [WORD_W-1:0] r;
    int run = 0;
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    repeat (4) @(posedge clk);

    // ---- store bandwidth ----
    foreach (sizes[s]) begin
      int bytes, cyc, exp_cyc, nlines;
      bytes = sizes[s];

      // through the conditional store buffer
      run++;
      base = 64'h0000_0080_0000_0000 + ADDR_W'(run * 4096);
      barrier();
      clear_counts();
      nlines = (bytes + 63) / 64;
      for (int l = 0; l < nlines; l++) begin
        int nw;
        bit ok;
        nw = ((bytes - 64 * l) >= 64) ? 8 : (bytes - 64 * l) / 8;
        do begin
          for (int w = 0; w < nw; w++)
            issue(OP_STORE, base + ADDR_W'(64 * l + 8 * w), pattern(base + ADDR_W'(64 * l + 8 * w), run), 1);
          issue(OP_SWAP, base + ADDR_W'(64 * l), WORD_W'(nw), 1);
          wait_rsp(r);
          ok = (r == WORD_W'(nw));
          if (!ok) n_retries++;
        end while (!ok);
      end
      barrier();
      cyc = last_cyc - first_cyc + 1;
      exp_cyc = 9 * nlines;
      check(cyc == exp_cyc, $sformatf("CSB %0d bytes: %0d bus cycles, expected %0d", bytes, cyc, exp_cyc));
      check(n_lines == nlines && n_singles == 0, "CSB transfer uses only line bursts");
      n_csb_bursts += n_lines;
      verify(base, bytes, run, $sformatf("CSB %0d bytes", bytes));
      $display("store bandwidth  %0d bytes  CSB  %0d bus cycles  %0.2f bytes/cycle",
               bytes, cyc, real'(bytes) / real'(cyc));

      // plain uncached stores, no combining
      run++;
      base = 64'h0000_0080_0000_0000 + ADDR_W'(run * 4096);
      clear_counts();
      for (int w = 0; w < bytes / 8; w++)
        issue(OP_STORE, base + ADDR_W'(8 * w), pattern(base + ADDR_W'(8 * w), run), 0);
      barrier();
      cyc = last_cyc - first_cyc + 1;
      exp_cyc = 2 * (bytes / 8);
      check(cyc == exp_cyc, $sformatf("uncached %0d bytes: %0d bus cycles, expected %0d", bytes, cyc, exp_cyc));
      check(n_singles == bytes / 8 && n_lines == 0, "one bus transaction per uncached store");
      n_plain += n_singles;
      verify(base, bytes, run, $sformatf("uncached %0d bytes", bytes));
      $display("store bandwidth  %0d bytes  uncached  %0d bus cycles  %0.2f bytes/cycle",
               bytes, cyc, real'(bytes) / real'(cyc));
    end

    // ---- atomic access ----
    begin
      int prev = -1;
      for (int n = 2; n <= 8; n++) begin
        int t0, t1;
        run++;
        base = 64'h0000_0080_0000_0000 + ADDR_W'(run * 4096);
        barrier();
        t0 = int'($time / 10);
        for (int w = 0; w < n; w++)
          issue(OP_STORE, base + ADDR_W'(8 * w), pattern(base + ADDR_W'(8 * w), run), 1);
        issue(OP_SWAP, base, WORD_W'(n), 1);
        wait_rsp(r);
        t1 = int'($time / 10) - 1;
        check(r == WORD_W'(n), $sformatf("atomic %0d doublewords: flush succeeded", n));
        check(t1 - t0 == n + 1, $sformatf("atomic %0d doublewords: %0d cycles to the flush result, expected %0d",
                                          n, t1 - t0, n + 1));
        if (prev >= 0) check(t1 - t0 - prev == 1, "one more cycle per doubleword");
        prev = t1 - t0;
        barrier();
        verify(base, 8 * n, run, $sformatf("atomic %0d doublewords", n));
        $display("atomic access    %0d doublewords  %0d processor cycles to the flush result", n, t1 - t0);
      end
    end

    check(n_csb_bursts > 0, "mechanism: line bursts");
    check(n_plain > 0, "mechanism: single-beat uncached stores");
    check(n_retries == 0, "no flush failed without a competing process");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// bw_bench: the uncached store-bandwidth benchmark on one configuration of
// csb_system, with an io_target on the bus; tb_csb_bandwidth runs one per
// bus configuration side by side.
//
// For each transfer size from 16 bytes to 1 KB the benchmark writes the data
// twice: once as doubleword stores to combining space, one conditional flush
// per cache line (retried on failure), and once as plain uncached doubleword
// stores. The bus time of a transfer runs from its first address cycle to its
// last busy cycle; a turnaround after the last transaction is not counted.
//
// Expected bus cycles, worked out from the bus rules alone:
//   L      = cycles of one transaction: beats + 1 on the multiplexed bus,
//            beats on the split bus (a doubleword store: 2 or 1);
//   S      = distance between two address cycles = max(L + TURNAROUND,
//            ACK_DELAY), since the next uncached address waits for the
//            acknowledgment of the previous one;
//   k transactions take (k - 1) * S + L cycles.
// The CSB sends ceil(bytes / LINE_BYTES) full-line bursts, plain stores one
// transaction per doubleword. The count must match exactly whenever the bus
// is the bottleneck. When a line burst lasts fewer processor clocks than it
// takes the program to issue the next line (its stores, the flush and the
// flush result, LINE_BYTES/8 + 3 clocks), the processor is the bottleneck
// and the count may only be larger. Device memory is checked afterwards.
//
// The benchmark (doubleword stores, 16 bytes to 1 KB, one flush per line) and
// the bus overheads follow the paper's store-bandwidth study; the formula,
// the device model and the handshakes are this design's own.
module bw_bench
  import csb_pkg::*;
#(
  parameter string       NAME       = "",
  parameter int unsigned LINE_BYTES = 64,
  parameter int unsigned BUS_BYTES  = 8,
  parameter bit          MUX_BUS    = 1'b1,
  parameter int unsigned TURNAROUND = 0,
  parameter int unsigned ACK_DELAY  = 0,
  parameter int unsigned CLK_RATIO  = 6
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output bit   done
);

  localparam int unsigned NW = LINE_BYTES / WORD_BYTES;

  logic                   req_valid = 0, req_ready, req_comb = 0, rsp_valid, mem_idle;
  mem_op_e                req_op = OP_LOAD;
  logic [ADDR_W-1:0]      req_addr = '0;
  logic [1:0]             req_size = '0;
  logic [WORD_W-1:0]      req_wdata = '0, rsp_data;
  logic [7:0]             req_pid = '0;
  logic [7:0]             csb_hit_count;
  logic                   bus_ce, bus_a_valid, bus_a_write, bus_d_valid, bus_r_valid, bus_ack;
  logic [ADDR_W-1:0]      bus_a_addr;
  logic [3:0]             bus_a_size;
  logic [8*BUS_BYTES-1:0] bus_d_data, bus_r_data;
  logic [BUS_BYTES-1:0]   bus_d_be;
  logic                   clr = 0;
  int n_addr, n_rej, n_lines, n_singles, n_loads, first_cyc, last_cyc;

  csb_system #(
    .LINE_BYTES(LINE_BYTES), .BUS_BYTES(BUS_BYTES), .MUX_BUS(MUX_BUS),
    .TURNAROUND(TURNAROUND), .ACK_DELAY(ACK_DELAY), .CLK_RATIO(CLK_RATIO)
  ) dut (.*);

  io_target #(
    .BUS_BYTES(BUS_BYTES), .LINE_BYTES(LINE_BYTES), .ACK_DELAY(ACK_DELAY)
  ) tgt (.*);

  initial begin checks = 0; failures = 0; done = 0; end
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL [%s] %s (t=%0t)", NAME, what, $time);
    end
  endtask

  // Requests change 1 time unit after a clock edge.
  task automatic issue(mem_op_e op, logic [ADDR_W-1:0] a, logic [WORD_W-1:0] d, bit comb);
    #1;
    req_valid = 1; req_op = op; req_addr = a; req_size = 2'd3;
    req_wdata = d; req_comb = comb; req_pid = 8'd3;
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
    repeat (3 * CLK_RATIO + 2 * ACK_DELAY * CLK_RATIO) @(posedge clk);
  endtask

  task automatic clear_counts();
    #1 clr = 1;
    @(posedge clk);
    #1 clr = 0;
  endtask

  function automatic logic [WORD_W-1:0] pattern(logic [ADDR_W-1:0] a, int run);
    return {a[31:0], 32'(run) ^ 32'h5eed_0000};
  endfunction

  function automatic int max2(int a, int b);
    return (a > b) ? a : b;
  endfunction

  // (k - 1) * S + L, see above
  function automatic int bus_cycles(int k, int l);
    return (k - 1) * max2(l + int'(TURNAROUND), int'(ACK_DELAY)) + l;
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

  task automatic show(string kind, int bytes, int cyc, int exp_cyc);
    $display("%s  %s  %0d bytes  %0d bus cycles (formula %0d)  %0.2f bytes/cycle",
             NAME, kind, bytes, cyc, exp_cyc, real'(bytes) / real'(cyc));
  endtask

  int sizes [7] = '{16, 32, 64, 128, 256, 512, 1024};
  localparam int L_LINE   = MUX_BUS ? 1 + LINE_BYTES / BUS_BYTES : LINE_BYTES / BUS_BYTES;
  localparam int L_SINGLE = MUX_BUS ? 2 : 1;
  // bus is the bottleneck for line bursts if a burst (with its spacing)
  // outlasts the processor's next line sequence
  localparam bit CSB_BUS_BOUND =
    (L_LINE + TURNAROUND > ACK_DELAY ? L_LINE + TURNAROUND : ACK_DELAY) * CLK_RATIO >= NW + 3;

  initial begin
    logic [ADDR_W-1:0] base;
    logic [WORD_W-1:0] r;
    int run;
    run = 0;
    wait (rst_n);
    repeat (4) @(posedge clk);

    foreach (sizes[s]) begin
      int bytes, cyc, exp_cyc, nlines;
      bytes = sizes[s];

      // through the conditional store buffer
      run++;
      base = 64'h0000_00c0_0000_0000 + ADDR_W'(run * 4096);
      barrier();
      clear_counts();
      nlines = (bytes + LINE_BYTES - 1) / LINE_BYTES;
      for (int l = 0; l < nlines; l++) begin
        int nw;
        bit ok;
        nw = ((bytes - int'(LINE_BYTES) * l) >= int'(LINE_BYTES)) ? NW
                                                                 : (bytes - int'(LINE_BYTES) * l) / 8;
        do begin
          for (int w = 0; w < nw; w++)
            issue(OP_STORE, base + ADDR_W'(LINE_BYTES * l + 8 * w),
                  pattern(base + ADDR_W'(LINE_BYTES * l + 8 * w), run), 1);
          issue(OP_SWAP, base + ADDR_W'(LINE_BYTES * l), WORD_W'(nw), 1);
          wait_rsp(r);
          ok = (r == WORD_W'(nw));
        end while (!ok);
      end
      barrier();
      cyc = last_cyc - first_cyc + 1;
      exp_cyc = bus_cycles(nlines, L_LINE);
      if (CSB_BUS_BOUND)
        check(cyc == exp_cyc, $sformatf("CSB %0d bytes: %0d bus cycles, expected %0d", bytes, cyc, exp_cyc));
      else
        check(cyc >= exp_cyc, $sformatf("CSB %0d bytes: %0d bus cycles, below the bus limit %0d",
                                        bytes, cyc, exp_cyc));
      check(n_lines == nlines && n_singles == 0, "CSB transfer uses only line bursts");
      verify(base, bytes, run, $sformatf("CSB %0d bytes", bytes));
      show("CSB", bytes, cyc, exp_cyc);

      // plain uncached stores
      run++;
      base = 64'h0000_00c0_0000_0000 + ADDR_W'(run * 4096);
      clear_counts();
      for (int w = 0; w < bytes / 8; w++)
        issue(OP_STORE, base + ADDR_W'(8 * w), pattern(base + ADDR_W'(8 * w), run), 0);
      barrier();
      cyc = last_cyc - first_cyc + 1;
      exp_cyc = bus_cycles(bytes / 8, L_SINGLE);
      check(cyc == exp_cyc, $sformatf("uncached %0d bytes: %0d bus cycles, expected %0d", bytes, cyc, exp_cyc));
      check(n_singles == bytes / 8 && n_lines == 0, "one bus transaction per uncached store");
      verify(base, bytes, run, $sformatf("uncached %0d bytes", bytes));
      show("uncached", bytes, cyc, exp_cyc);
    end
    done = 1;
  end

endmodule

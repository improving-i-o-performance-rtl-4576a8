// csb_env: end-to-end test of csb_system in one configuration, with an
// io_target on the bus; tb_csb_system runs several side by side.
//
// The processor side is driven by tasks that issue one uncached operation at
// a time and wait for its response. A shadow copy of the device memory is
// kept from the architectural rules alone: a plain uncached store lands as
// it is; a successful conditional flush lands as one whole line holding the
// combined stores and zeros elsewhere; a failed flush lands nothing. After
// each step the test waits for mem_idle (a memory barrier) and compares
// device memory with the shadow copy.
//
// Steps: a full line of combining stores in scrambled order with a
// successful flush; a competing process breaking a sequence (flush returns
// 0); a wrong expected count; a store stalled behind a committed line; an
// uncached store held back until the committed line has gone; an uncached
// load to a line under combination (it must see the old device contents);
// plain stores and loads. Each mechanism is counted and one that never
// happened counts as a failure.
//
// The rules checked follow the paper's description of the CSB; the steps,
// the shadow model and the device model are this design's own.
module csb_env
  import csb_pkg::*;
#(
  parameter int unsigned LINE_BYTES   = 64,
  parameter int unsigned BUS_BYTES    = 8,
  parameter bit          MUX_BUS      = 1'b1,
  parameter int unsigned TURNAROUND   = 0,
  parameter int unsigned ACK_DELAY    = 0,
  parameter int unsigned CLK_RATIO    = 6,
  parameter int unsigned REJECT_EVERY = 0
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output bit   done
);

  localparam int unsigned NW    = LINE_BYTES / WORD_BYTES;
  localparam int unsigned PID_W = 8;
  localparam int unsigned CNT_W = 8;

  logic                   req_valid = 0, req_ready, req_comb = 0, rsp_valid, mem_idle;
  mem_op_e                req_op = OP_LOAD;
  logic [ADDR_W-1:0]      req_addr = '0;
  logic [1:0]             req_size = '0;
  logic [WORD_W-1:0]      req_wdata = '0, rsp_data;
  logic [PID_W-1:0]       req_pid = '0;
  logic [CNT_W-1:0]       csb_hit_count;
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
    .BUS_BYTES(BUS_BYTES), .LINE_BYTES(LINE_BYTES), .ACK_DELAY(ACK_DELAY),
    .REJECT_EVERY(REJECT_EVERY)
  ) tgt (.*);

  initial begin checks = 0; failures = 0; done = 0; end
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL [line=%0d bus=%0d mux=%0d] %s (t=%0t)", LINE_BYTES, BUS_BYTES, MUX_BUS,
               what, $time);
    end
  endtask

  // ---------------- processor side ----------------
  // Requests change 1 time unit after a clock edge, so the design samples
  // them cleanly at the next edge.
  int stall_cycles;   // clocks an operation waited for req_ready

  task automatic issue(mem_op_e op, logic [ADDR_W-1:0] a, logic [1:0] sz,
                       logic [WORD_W-1:0] d, bit comb, logic [PID_W-1:0] pid);
    #1;
    req_valid = 1; req_op = op; req_addr = a; req_size = sz;
    req_wdata = d; req_comb = comb; req_pid = pid;
    stall_cycles = 0;
    @(posedge clk);
    while (!req_ready) begin
      stall_cycles++;
      @(posedge clk);
    end
    #1 req_valid = 0;
  endtask

  task automatic wait_rsp(output logic [WORD_W-1:0] r);
    while (!rsp_valid) @(posedge clk);
    r = rsp_data;
    @(posedge clk);
  endtask

  // ---------------- shadow of the device memory ----------------
  byte unsigned shadow [logic [ADDR_W-1:0]];
  byte unsigned comb_bytes [LINE_BYTES];
  logic [ADDR_W-1:0] touched [$];

  function automatic void sh_write(logic [ADDR_W-1:0] a, byte unsigned b);
    if (!shadow.exists(a)) touched.push_back(a);
    shadow[a] = b;
  endfunction

  task automatic uc_store(logic [ADDR_W-1:0] a, logic [WORD_W-1:0] d);
    issue(OP_STORE, a, 2'd3, d, 0, 8'd1);
    for (int j = 0; j < 8; j++) sh_write(a + ADDR_W'(j), d[8*j +: 8]);
  endtask

  task automatic comb_store(logic [ADDR_W-1:0] a, logic [WORD_W-1:0] d, logic [PID_W-1:0] pid,
                            bit fresh);
    if (fresh) foreach (comb_bytes[i]) comb_bytes[i] = 8'h00;
    issue(OP_STORE, a, 2'd3, d, 1, pid);
    for (int j = 0; j < 8; j++) comb_bytes[int'(a % LINE_BYTES) + j] = d[8*j +: 8];
  endtask

  task automatic flush(logic [ADDR_W-1:0] a, int expect_cnt, logic [PID_W-1:0] pid,
                       bit should_pass, output bit passed);
    logic [WORD_W-1:0] r;
    issue(OP_SWAP, a, 2'd3, WORD_W'(expect_cnt), 1, pid);
    wait_rsp(r);
    passed = (r == WORD_W'(expect_cnt)) && (expect_cnt != 0);
    check(passed == should_pass, $sformatf("flush result %0d (expected %0s)", r,
                                           should_pass ? "success" : "failure"));
    check(passed ? 1'b1 : (r == '0), "a failed flush returns 0");
    if (passed) begin
      logic [ADDR_W-1:0] ln;
      ln = a & ~ADDR_W'(LINE_BYTES - 1);
      for (int i = 0; i < LINE_BYTES; i++) sh_write(ln + ADDR_W'(i), comb_bytes[i]);
    end
  endtask

  task automatic barrier();
    @(posedge clk);
    while (!mem_idle) @(posedge clk);
  endtask

  task automatic compare_memory(string when);
    int bad = 0;
    foreach (touched[i]) begin
      byte unsigned got;
      got = tgt.mem.exists(touched[i]) ? tgt.mem[touched[i]] : 8'h00;
      if (got != shadow[touched[i]]) bad++;
    end
    check(bad == 0, $sformatf("device memory after %s: %0d bytes differ", when, bad));
  endtask

  function automatic logic [WORD_W-1:0] rnd64();
    return {$urandom(), $urandom()};
  endfunction

  // mechanism counters
  int m_combined = 0, m_flush_ok = 0, m_flush_conflict = 0, m_flush_count = 0;
  int m_csb_stall = 0, m_uc_held = 0, m_load_bypass = 0, m_retry = 0, m_burst = 0;

  initial begin
    logic [ADDR_W-1:0] io, ln;
    logic [WORD_W-1:0] r, old;
    bit ok;
    int order [NW];
    io = 64'h0000_0040_0000_0000 + 64'(($urandom() & 32'hfff) * 1024);
    wait (rst_n);
    repeat (4) @(posedge clk);

    // 1: one line of combining stores in scrambled order, then a flush
    foreach (order[i]) order[i] = i;
    order.shuffle();
    ln = io;
    foreach (order[i]) begin
      comb_store(ln + ADDR_W'(8 * order[i]), rnd64(), 8'd3, i == 0);
    end
    @(posedge clk);
    check(csb_hit_count == CNT_W'(NW), "hit counter counts the combined stores");
    if (csb_hit_count == CNT_W'(NW)) m_combined++;
    flush(ln, NW, 8'd3, 1, ok);
    if (ok) m_flush_ok++;
    barrier();
    compare_memory("a full-line flush");
    check(n_lines == 1, "one burst for the whole line");
    m_burst += n_lines;

    // 2: a competing process breaks the sequence
    ln = io + ADDR_W'(LINE_BYTES);
    for (int i = 0; i < NW; i++) uc_store(ln + ADDR_W'(8 * i), rnd64());   // non-zero background
    barrier();
    for (int i = 0; i < NW / 2; i++) comb_store(ln + ADDR_W'(8 * i), rnd64(), 8'd3, i == 0);
    comb_store(ln + ADDR_W'(8 * (NW - 1)), rnd64(), 8'd5, 1);
    flush(ln, NW / 2, 8'd3, 0, ok);
    if (!ok) m_flush_conflict++;
    // the competitor's own sequence: one store, padded with zeros
    comb_store(ln + ADDR_W'(8 * (NW - 1)), rnd64(), 8'd5, 1);
    flush(ln, 1, 8'd5, 1, ok);
    barrier();
    compare_memory("a conflict and a one-store flush");

    // 3: wrong expected count
    for (int i = 0; i < 3; i++) comb_store(ln + ADDR_W'(8 * i), rnd64(), 8'd3, i == 0);
    flush(ln, 2, 8'd3, 0, ok);
    if (!ok) m_flush_count++;
    barrier();
    compare_memory("a flush with a wrong count");

    // 4: back-to-back lines; the next stores stall while a line waits
    for (int l = 0; l < 3; l++) begin
      ln = io + ADDR_W'((4 + l) * LINE_BYTES);
      for (int i = 0; i < NW; i++) begin
        comb_store(ln + ADDR_W'(8 * i), rnd64(), 8'd3, i == 0);
        if (stall_cycles > 0) m_csb_stall++;
      end
      flush(ln, NW, 8'd3, 1, ok);
    end
    // 5: an uncached store right after a flush waits for the line
    uc_store(io + ADDR_W'(16 * LINE_BYTES), rnd64());
    if (stall_cycles > 0) m_uc_held++;
    barrier();
    compare_memory("back-to-back lines");
    check(tgt.wlog[$] == io + ADDR_W'(16 * LINE_BYTES), "uncached store after the last burst");
    check(tgt.wlog[$-1] == io + ADDR_W'(6 * LINE_BYTES), "last burst before the uncached store");

    // 6: a load to a line under combination sees the device, not the CSB
    ln = io + ADDR_W'(8 * LINE_BYTES);
    uc_store(ln, 64'h0123_4567_89ab_cdef);
    barrier();
    comb_store(ln, 64'hdead_beef_dead_beef, 8'd3, 1);
    comb_store(ln + 8, rnd64(), 8'd3, 0);
    issue(OP_LOAD, ln, 2'd3, '0, 1, 8'd3);
    wait_rsp(r);
    check(r == 64'h0123_4567_89ab_cdef, "uncached load bypasses the combined stores");
    if (r == 64'h0123_4567_89ab_cdef) m_load_bypass++;
    flush(ln, 2, 8'd3, 1, ok);
    barrier();
    compare_memory("load bypass");

    // 7: plain uncached stores of several sizes, read back
    for (int i = 0; i < 6; i++) begin
      logic [ADDR_W-1:0] a;
      a = io + ADDR_W'(20 * LINE_BYTES + 8 * i);
      old = rnd64();
      uc_store(a, old);
      issue(OP_LOAD, a, 2'd3, '0, 0, 8'd1);
      wait_rsp(r);
      check(r == old, "uncached load returns the stored doubleword");
    end
    barrier();
    compare_memory("plain uncached accesses");

    m_retry = n_rej;
    check(m_combined > 0,       "mechanism: stores combined");
    check(m_flush_ok > 0,       "mechanism: successful conditional flush");
    check(m_flush_conflict > 0, "mechanism: flush failed on a competing process");
    check(m_flush_count > 0,    "mechanism: flush failed on a wrong count");
    check(m_csb_stall > 0,      "mechanism: store stalled behind a committed line");
    check(m_uc_held > 0,        "mechanism: uncached access held behind a committed line");
    check(m_load_bypass > 0,    "mechanism: load bypassing the CSB");
    check(m_burst > 0,          "mechanism: line burst on the bus");
    if (REJECT_EVERY != 0) check(m_retry > 0, "mechanism: rejected transaction retried");
    $display("[line=%0d bus=%0d mux=%0d turn=%0d ack=%0d] combined=%0d flush_ok=%0d conflict=%0d wrong_count=%0d csb_stall=%0d uc_held=%0d load_bypass=%0d bursts=%0d retries=%0d",
             LINE_BYTES, BUS_BYTES, MUX_BUS, TURNAROUND, ACK_DELAY, m_combined, m_flush_ok,
             m_flush_conflict, m_flush_count, m_csb_stall, m_uc_held, m_load_bypass, m_burst,
             m_retry);
    done = 1;
  end

endmodule

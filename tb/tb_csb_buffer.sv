// tb_csb_buffer: self-checking test of the conditional store buffer.
//
// A byte-level reference model (line bytes, line address,
// PID, hit count) is kept in the testbench and updated from the rules of the
// CSB: a matching store merges and counts, a conflicting store clears and
// restarts at 1, a flush succeeds only when count, line address and PID all
// match. The test runs the directed sequences first (an eight-doubleword
// transfer in scrambled order, an interrupted sequence, a flush with the
// wrong count, a store stalled behind a committed line) and then random
// stores and flushes from two processes over two lines. It checks the hit
// count after every operation, every flush response, every line handed to
// the system interface, the one-clock flush latency and the
// one-store-per-clock rate.
//
// The reference model follows the paper's CSB rules; saturation and the
// empty-buffer flush are this design's own choices and are checked as such.
module tb_csb_buffer;
  import csb_pkg::*;

  localparam int unsigned LINE_BYTES = 64;
  localparam int unsigned PID_W = 8;
  localparam int unsigned CNT_W = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic st_valid = 0, st_ready, fl_valid = 0, fl_ready, fl_rsp_valid, line_valid, line_ready = 0;
  logic [ADDR_W-1:0] st_addr = '0, fl_addr = '0, line_addr;
  logic [WORD_W-1:0] st_data = '0, fl_expect = '0, fl_rsp_data;
  logic [WORD_BYTES-1:0] st_be = '0;
  logic [PID_W-1:0] st_pid = '0, fl_pid = '0;
  logic [8*LINE_BYTES-1:0] line_data;
  logic [CNT_W-1:0] hit_count;

  csb_buffer #(.LINE_BYTES(LINE_BYTES), .PID_W(PID_W), .CNT_W(CNT_W)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // reference model
  byte unsigned      m_bytes [LINE_BYTES];
  logic [ADDR_W-1:0] m_line;
  logic [PID_W-1:0]  m_pid;
  int                m_cnt;
  logic [8*LINE_BYTES-1:0] exp_line;
  logic [ADDR_W-1:0]       exp_addr;
  bit                      exp_pending;

  function automatic void m_clear();
    foreach (m_bytes[i]) m_bytes[i] = 8'h00;
  endfunction

  // one combining store: drive it, wait for acceptance, update the model
  task automatic do_store(logic [ADDR_W-1:0] a, logic [WORD_W-1:0] d,
                          logic [WORD_BYTES-1:0] be, logic [PID_W-1:0] pid);
    logic [ADDR_W-1:0] ln;
    st_valid <= 1'b1; st_addr <= a; st_data <= d; st_be <= be; st_pid <= pid;
    do @(posedge clk); while (!st_ready);
    st_valid <= 1'b0;
    ln = a & ~ADDR_W'(LINE_BYTES - 1);
    if (!(m_cnt != 0 && ln == m_line && pid == m_pid)) begin
      m_clear();
      m_cnt = 1;
    end else if (m_cnt < (1 << CNT_W) - 1) begin
      m_cnt++;
    end
    m_line = ln;
    m_pid  = pid;
    for (int b = 0; b < WORD_BYTES; b++)
      if (be[b]) m_bytes[int'(a[5:3]) * WORD_BYTES + b] = d[8*b +: 8];
    #1;
    check(hit_count == CNT_W'(m_cnt), $sformatf("hit count %0d, expected %0d", hit_count, m_cnt));
  endtask

  task automatic do_flush(logic [ADDR_W-1:0] a, logic [WORD_W-1:0] e, logic [PID_W-1:0] pid);
    bit ok;
    fl_valid <= 1'b1; fl_addr <= a; fl_expect <= e; fl_pid <= pid;
    do @(posedge clk); while (!fl_ready);
    fl_valid <= 1'b0;
    ok = (m_cnt != 0) && ((a & ~ADDR_W'(LINE_BYTES - 1)) == m_line) && (pid == m_pid)
         && (e == WORD_W'(m_cnt));
    #1;
    check(fl_rsp_valid === 1'b1, "flush response one clock after the flush");
    check(fl_rsp_data == (ok ? e : '0), $sformatf("flush result %0h, expected %0h",
                                                  fl_rsp_data, ok ? e : '0));
    check(hit_count == '0, "counter cleared by a flush");
    if (ok) begin
      for (int i = 0; i < LINE_BYTES; i++) exp_line[8*i +: 8] = m_bytes[i];
      exp_addr    = m_line;
      exp_pending = 1'b1;
    end
    m_clear();
    m_cnt = 0;
  endtask

  // The system interface side: takes lines with a random delay and checks
  // each against the model's copy taken at the successful flush.
  int lines_seen = 0, lines_expected = 0;
  bit ready_rand = 1'b1;
  always @(posedge clk) begin
    if (rst_n) begin
      if (line_valid && line_ready) begin
        lines_seen++;
        check(exp_pending, "line issued only after a successful flush");
        check(line_data == exp_line, "line data");
        check(line_addr == exp_addr, "line address");
        exp_pending = 1'b0;
      end else if (!exp_pending) begin
        check(!line_valid, "no line without a successful flush");
      end
      line_ready <= ready_rand ? ($urandom_range(0, 3) == 0) : 1'b0;
    end
  end

  function automatic logic [WORD_W-1:0] rnd64();
    return {$urandom(), $urandom()};
  endfunction

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int order [8];
    logic [ADDR_W-1:0] base;
    int t0;
    m_clear(); m_cnt = 0; m_line = '0; m_pid = '0; exp_pending = 0; exp_line = '0; exp_addr = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    // 1: eight doublewords in scrambled order, then a flush expecting 8
    base = 64'h0000_0000_8000_1240;
    order = '{5, 0, 7, 2, 1, 6, 3, 4};
    t0 = $time;
    foreach (order[i]) do_store(base + 8 * order[i], rnd64(), 8'hff, 8'd3);
    check(($time - t0) / 10 <= 8, "eight stores accepted in eight clocks");
    do_flush(base, 64'd8, 8'd3);
    lines_expected++;
    wait (!exp_pending); @(posedge clk);

    // 2: a competing process interrupts before the flush
    for (int i = 0; i < 4; i++) do_store(base + 8 * i, rnd64(), 8'hff, 8'd3);
    do_store(base + 16, rnd64(), 8'hff, 8'd9);
    check(hit_count == 1, "competing store restarts the count at 1");
    do_flush(base, 64'd4, 8'd3);

    // 3: right process, wrong count; then a different line
    for (int i = 0; i < 3; i++) do_store(base + 8 * i, rnd64(), 8'hff, 8'd3);
    do_flush(base, 64'd2, 8'd3);
    for (int i = 0; i < 3; i++) do_store(base + 8 * i, rnd64(), 8'hff, 8'd3);
    do_flush(base + 64, 64'd3, 8'd3);
    // empty buffer flush
    do_flush(base, 64'd0, 8'd3);

    // 4: partial line with byte stores, zero padding, store stalled behind it
    ready_rand = 1'b0;
    do_store(base + 8, 64'h1122_3344_5566_7788, 8'h0f, 8'd4);
    do_store(base + 56, 64'haabb_ccdd_eeff_0011, 8'hc0, 8'd4);
    do_flush(base + 8, 64'd2, 8'd4);
    lines_expected++;
    @(posedge clk); #1;
    check(!st_ready && !fl_ready, "buffer stalls while the committed line waits");
    ready_rand = 1'b1;
    do_store(base, rnd64(), 8'hff, 8'd4);
    check(!exp_pending, "stalled store accepted only after the line left");

    // 5: random traffic from two processes over two lines
    for (int n = 0; n < 3000; n++) begin
      logic [PID_W-1:0] p;
      logic [ADDR_W-1:0] a;
      p = ($urandom_range(0, 9) == 0) ? 8'd7 : 8'd2;
      a = base + 64 * $urandom_range(0, 1) + 8 * $urandom_range(0, 7);
      if ($urandom_range(0, 5) == 0) begin
        bit will_ok;
        logic [WORD_W-1:0] e;
        e = ($urandom_range(0, 2) != 0) ? WORD_W'(m_cnt) : WORD_W'($urandom_range(0, 9));
        will_ok = (m_cnt != 0) && ((a & ~ADDR_W'(LINE_BYTES - 1)) == m_line) && (p == m_pid)
                  && (e == WORD_W'(m_cnt));
        do_flush(a, e, p);
        if (will_ok) lines_expected++;
      end else begin
        do_store(a, rnd64(), 8'($urandom_range(1, 255)), p);
      end
    end
    wait (!exp_pending);
    repeat (5) @(posedge clk);
    check(lines_seen == lines_expected, $sformatf("lines issued %0d, expected %0d",
                                                  lines_seen, lines_expected));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

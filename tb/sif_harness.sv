// sif_harness: drives and checks one sys_if instance in one bus
// configuration; tb_sys_if runs several of them side by side.
//
// It plays both neighbours of the system interface: it feeds uncached
// requests and CSB lines, and acts as the bus target. As target it returns
// load data LAT bus cycles after the address (a pattern computed from the
// address) and, when ACK_DELAY is set, answers each address in bus cycle
// ACK_DELAY-1, rejecting every third address so that retries happen.
//
// Checks, worked out from the bus rules and not from the design:
//   - the bus cycles between two address cycles when the next request was
//     already waiting: max(L + TURNAROUND, ACK_DELAY), where L is the length
//     of the earlier transaction (multiplexed: 1 + beats; split: beats; a
//     load: LAT + 1; a rejected load: ACK_DELAY);
//   - every accepted transaction in order, with its address, size, write
//     flag, data beats and byte enables (uncached requests before a line
//     that was offered at the same time);
//   - the data each load returns;
//   - a multiplexed bus never carries address and data together.
//
// The bus timing it checks follows the paper's bus models and overheads;
// the harness itself is this design's own.
module sif_harness
  import csb_pkg::*;
#(
  parameter bit          MUX_BUS    = 1'b1,
  parameter int unsigned BUS_BYTES  = 8,
  parameter int unsigned TURNAROUND = 0,
  parameter int unsigned ACK_DELAY  = 0,
  parameter int unsigned CLK_RATIO  = 6,
  parameter int unsigned LINE_BYTES = 64
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output bit   done
);

  localparam int unsigned BUS_W = 8 * BUS_BYTES;
  localparam int unsigned BEATS = LINE_BYTES / BUS_BYTES;
  localparam int unsigned LAT   = 2;

  logic bus_ce;
  int   div;
  always_ff @(posedge clk) begin
    if (!rst_n || div == CLK_RATIO - 1) div <= 0;
    else                                div <= div + 1;
  end
  assign bus_ce = (div == CLK_RATIO - 1);

  logic                    uc_valid = 0, uc_ready, line_valid = 0, line_ready;
  uc_req_t                 uc_req = '0;
  logic [ADDR_W-1:0]       line_addr = '0;
  logic [8*LINE_BYTES-1:0] line_data = '0;
  logic                    ld_rsp_valid;
  logic [WORD_W-1:0]       ld_rsp_data;
  logic                    bus_a_valid, bus_a_write, bus_d_valid, bus_r_valid, bus_ack, busy;
  logic [ADDR_W-1:0]       bus_a_addr;
  logic [3:0]              bus_a_size;
  logic [BUS_W-1:0]        bus_d_data, bus_r_data;
  logic [BUS_BYTES-1:0]    bus_d_be;

  sys_if #(
    .LINE_BYTES(LINE_BYTES), .BUS_BYTES(BUS_BYTES), .MUX_BUS(MUX_BUS),
    .TURNAROUND(TURNAROUND), .ACK_DELAY(ACK_DELAY)
  ) dut (.*);

  initial begin checks = 0; failures = 0; done = 0; end
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL [mux=%0d bus=%0d turn=%0d ack=%0d] %s (t=%0t)",
               MUX_BUS, BUS_BYTES, TURNAROUND, ACK_DELAY, what, $time);
    end
  endtask

  // ---------------- expected transactions ----------------
  typedef struct {
    bit                      write;
    bit                      is_line;
    logic [ADDR_W-1:0]       addr;
    logic [3:0]              size;
    logic [BUS_W-1:0]        beat [];
    logic [BUS_BYTES-1:0]    be   [];
  } txn_t;

  txn_t    expq [$];
  uc_req_t ucq  [$];
  logic [WORD_W-1:0] ldq [$];

  function automatic logic [WORD_W-1:0] rd_pattern(logic [ADDR_W-1:0] a);
    return {a[31:0] ^ 32'h5a5a_0f0f, ~a[31:0]};
  endfunction

  function automatic int lane_of(logic [ADDR_W-1:0] a);
    return (BUS_BYTES > WORD_BYTES) ? int'((a % BUS_BYTES) / WORD_BYTES) : 0;
  endfunction

  task automatic push_uc(bit load, logic [ADDR_W-1:0] a, logic [1:0] sz, logic [WORD_W-1:0] d);
    uc_req_t r;
    txn_t    t;
    int      nb;
    nb = 1 << sz;
    r.is_load = load; r.addr = a; r.size = sz; r.data = d;
    r.be = '0;
    for (int b = 0; b < nb; b++) r.be[int'(a[2:0]) + b] = 1'b1;
    ucq.push_back(r);
    t.write = !load; t.is_line = 0; t.addr = a; t.size = {2'b0, sz};
    if (!load) begin
      t.beat = new[1]; t.be = new[1];
      t.beat[0] = '0; t.be[0] = '0;
      t.beat[0][WORD_W*lane_of(a) +: WORD_W] = d;
      t.be[0][WORD_BYTES*lane_of(a) +: WORD_BYTES] = r.be;
    end else begin
      t.beat = new[0]; t.be = new[0];
      ldq.push_back(rd_pattern(a));
    end
    expq.push_back(t);
  endtask

  logic [8*LINE_BYTES-1:0] pend_line;
  logic [ADDR_W-1:0]       pend_line_addr;
  bit                      pend_line_v = 0;

  task automatic push_line(logic [ADDR_W-1:0] a);
    txn_t t;
    for (int i = 0; i < LINE_BYTES / 4; i++) pend_line[32*i +: 32] = $urandom();
    pend_line_addr = a;
    pend_line_v = 1;
    t.write = 1; t.is_line = 1; t.addr = a; t.size = 4'($clog2(LINE_BYTES));
    t.beat = new[BEATS]; t.be = new[BEATS];
    for (int k = 0; k < BEATS; k++) begin
      t.beat[k] = pend_line[BUS_W*k +: BUS_W];
      t.be[k]   = '1;
    end
    expq.push_back(t);
  endtask

  // requester side, updated with nonblocking assignments only
  always @(posedge clk) begin
    if (uc_valid && uc_ready) void'(ucq.pop_front());
    if (line_valid && line_ready) pend_line_v = 0;
    uc_valid   <= (ucq.size() != 0) && !(uc_valid && uc_ready && ucq.size() == 0);
    uc_req     <= (ucq.size() != 0) ? ucq[0] : '0;
    line_valid <= pend_line_v;
    line_addr  <= pend_line_addr;
    line_data  <= pend_line;
  end

  // ---------------- bus target ----------------
  int  since_q = 255, addr_cnt = 0, age, idx;
  bit  cur_load_q = 0, cur_rej_q = 0, reject_now;
  logic [ADDR_W-1:0] cur_addr_q = '0;
  logic [BUS_W-1:0]  rdat;

  always_comb begin
    age = bus_a_valid ? 0 : since_q;
    idx = bus_a_valid ? addr_cnt : addr_cnt - 1;
    reject_now = (ACK_DELAY != 0) && (idx % 3 == 1);
    bus_ack = (ACK_DELAY != 0) && (age == ACK_DELAY - 1) && !reject_now;
    rdat = '0;
    rdat[WORD_W*lane_of(cur_addr_q) +: WORD_W] = rd_pattern(cur_addr_q);
    bus_r_valid = cur_load_q && !cur_rej_q && !reject_now && (age == LAT) && !bus_a_valid;
    bus_r_data  = bus_r_valid ? rdat : '0;
  end

  // ---------------- monitor ----------------
  txn_t  seen [$];
  bit    seen_rej [$];
  int    seen_cyc [$];
  int    seen_len [$];
  int    cyc = 0;
  bit    spacing_on = 0;
  int    spacing_from = 0;
  int    ld_got = 0;
  int    retries = 0;
  txn_t  cur;

  always @(posedge clk) begin
    if (rst_n && bus_ce) begin
      if (MUX_BUS) check(!(bus_a_valid && bus_d_valid), "address and data share a multiplexed cycle");
      if (bus_a_valid) begin
        txn_t t;
        t.write = bus_a_write; t.is_line = 0; t.addr = bus_a_addr; t.size = bus_a_size;
        t.beat = new[0]; t.be = new[0];
        seen.push_back(t);
        seen_rej.push_back(0);
        seen_cyc.push_back(cyc);
        seen_len.push_back(0);
        since_q  <= 1;
        addr_cnt <= addr_cnt + 1;
        cur_load_q <= !bus_a_write;
        cur_addr_q <= bus_a_addr;
        cur_rej_q  <= 0;
      end else begin
        since_q <= (since_q < 255) ? since_q + 1 : since_q;
      end
      if (bus_d_valid && seen.size() != 0) begin
        seen[$].beat = new[seen[$].beat.size() + 1](seen[$].beat);
        seen[$].be   = new[seen[$].be.size() + 1](seen[$].be);
        seen[$].beat[seen[$].beat.size() - 1] = bus_d_data;
        seen[$].be[seen[$].be.size() - 1]     = bus_d_be;
      end
      if (ACK_DELAY != 0 && age == ACK_DELAY - 1 && seen.size() != 0 && !bus_ack) begin
        seen_rej[$] = 1;
        retries++;
        if (!bus_a_valid) cur_rej_q <= 1;
      end
      cyc++;
    end
    if (rst_n && ld_rsp_valid) begin
      check(ldq.size() != 0, "load response expected");
      if (ldq.size() != 0) begin
        check(ld_rsp_data == ldq[0], "load data");
        void'(ldq.pop_front());
      end
      ld_got++;
    end
  end

  // length in bus cycles of a transaction as the bus rules give it
  function automatic int expected_len(txn_t t, bit rej);
    int beats;
    beats = t.write ? ((t.size == 4'($clog2(LINE_BYTES))) ? BEATS : 1) : 0;
    if (!t.write) return rej ? ACK_DELAY : LAT + 1;
    return MUX_BUS ? 1 + beats : beats;
  endfunction

  task automatic wait_idle();
    do repeat (CLK_RATIO * 4) @(posedge clk);
    while (ucq.size() != 0 || uc_valid || pend_line_v || line_valid || busy);
    repeat (CLK_RATIO * (ACK_DELAY + 4)) @(posedge clk);
  endtask

  // address spacing and contents of the accepted transactions
  task automatic check_phase(int first);
    int k;
    for (int i = first + 1; i < seen.size(); i++) begin
      int len, sp;
      len = expected_len(seen[i-1], seen_rej[i-1]);
      sp  = (len + TURNAROUND > ACK_DELAY) ? len + TURNAROUND : ACK_DELAY;
      check(seen_cyc[i] - seen_cyc[i-1] == sp,
            $sformatf("address spacing %0d bus cycles, expected %0d",
                      seen_cyc[i] - seen_cyc[i-1], sp));
    end
    k = first;
    while (expq.size() != 0) begin
      txn_t e;
      e = expq.pop_front();
      while (k < seen.size() && seen_rej[k]) k++;
      check(k < seen.size(), "transaction appeared on the bus");
      if (k < seen.size()) begin
        check(seen[k].write == e.write && seen[k].addr == e.addr && seen[k].size == e.size,
              $sformatf("transaction header %0h/%0d, expected %0h/%0d",
                        seen[k].addr, seen[k].size, e.addr, e.size));
        check(seen[k].beat.size() == e.beat.size(), "number of data beats");
        if (seen[k].beat.size() == e.beat.size())
          foreach (e.beat[j]) check(seen[k].beat[j] == e.beat[j] && seen[k].be[j] == e.be[j],
                                    $sformatf("data beat %0d", j));
        k++;
      end
    end
    while (k < seen.size() && seen_rej[k]) k++;
    check(k == seen.size(), "no extra transactions");
  endtask

  logic [ADDR_W-1:0] io_base;
  int first;

  initial begin
    io_base = 64'h0000_00f0_0000_0000 + 64'(($urandom() & 32'hffff) * 64);
    wait (rst_n);
    repeat (CLK_RATIO * 3) @(posedge clk);

    // A: eight doubleword stores queued back to back
    first = seen.size();
    for (int i = 0; i < 8; i++) push_uc(0, io_base + 8 * i, 2'd3, {$urandom(), $urandom()});
    wait_idle();
    check_phase(first);

    // B: a line offered together with two small stores: stores go first
    first = seen.size();
    push_uc(0, io_base + 64 + 4, 2'd2, {$urandom(), $urandom()});
    push_uc(0, io_base + 64 + 18, 2'd1, {$urandom(), $urandom()});
    push_line(io_base + 128);
    wait_idle();
    check_phase(first);

    // C: two lines in a row
    first = seen.size();
    push_line(io_base + 192);
    @(posedge clk);
    wait (!pend_line_v);
    push_line(io_base + 256);
    wait_idle();
    check_phase(first);

    // D: loads mixed with byte and doubleword stores
    first = seen.size();
    push_uc(1, io_base + 8, 2'd3, '0);
    push_uc(0, io_base + 3, 2'd0, {$urandom(), $urandom()});
    push_uc(1, io_base + 24, 2'd3, '0);
    push_uc(0, io_base + 40, 2'd3, {$urandom(), $urandom()});
    push_uc(1, io_base + 48, 2'd3, '0);
    wait_idle();
    check_phase(first);

    check(ldq.size() == 0 && ld_got == 3, "every load answered once");
    if (ACK_DELAY != 0) check(retries > 0, "rejected transactions were retried");
    done = 1;
  end

endmodule

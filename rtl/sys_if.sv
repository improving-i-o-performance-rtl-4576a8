// sys_if: the system interface, master of the system bus for uncached
// accesses.
//
// It takes single-beat requests from the uncached buffer and committed lines
// from the conditional store buffer, one transaction at a time, and drives
// them on the bus. The bus runs on the enable bus_ce (one pulse per bus
// cycle); all bus outputs are registers that change only on such a pulse and
// describe the current bus cycle. Reset is synchronous and active low.
//
// Bus models (parameter MUX_BUS):
//   multiplexed (1): address and data share the wires. Cycle 0 carries the
//     address, cycles 1..N the N data beats, so a doubleword store takes 2
//     bus cycles and a 64-byte line on an 8-byte bus takes 9.
//   split (0): the address travels on its own path in the same cycle as the
//     first data beat, so a transaction takes N cycles (a doubleword store
//     on a 16-byte bus: 1 cycle; a 64-byte line on a 32-byte bus: 2).
// N is 1 for an uncached request and LINE_BYTES/BUS_BYTES for a line, which
// is always sent whole. An uncached store uses the bus byte lanes of its
// address; an uncached load holds the bus until the target returns a beat on
// bus_r_valid (at the earliest in cycle 1).
//
// Overheads (evaluated by the paper as bus options):
//   TURNAROUND: idle bus cycles inserted after every transaction.
//   ACK_DELAY: selective flow control. If non-zero, the target answers every
//     address in the bus cycle ACK_DELAY-1 after it (bus_ack = 1 accepted,
//     0 rejected); the next address may go out no earlier than ACK_DELAY
//     cycles after the previous one, and only after the answer, because
//     uncached accesses stay strongly ordered. A rejected transaction is
//     sent again; a rejected load returns no data.
// Back-to-back transactions need no idle cycle; arbitration is taken to be
// overlapped and is not modelled (the interface is the only master here).
//
// Order: uncached requests are taken first; a line is taken only when the
// uncached buffer is empty (see uc_dispatch for the other half of the rule).
//
// From the paper: the two bus models and their cycle counts, full-line
// bursts, the turnaround cycle, the minimum address spacing caused by the
// acknowledgment and strong ordering. Own choices: the exact signal set, the
// retry of a rejected transaction, the load timing and the selection order.
module sys_if
  import csb_pkg::*;
#(
  parameter int unsigned LINE_BYTES = 64,
  parameter int unsigned BUS_BYTES  = 8,
  parameter bit          MUX_BUS    = 1'b1,
  parameter int unsigned TURNAROUND = 0,
  parameter int unsigned ACK_DELAY  = 0
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     bus_ce,
  // from the uncached buffer
  input  logic                     uc_valid,
  output logic                     uc_ready,
  input  uc_req_t                  uc_req,
  // from the conditional store buffer
  input  logic                     line_valid,
  output logic                     line_ready,
  input  logic [ADDR_W-1:0]        line_addr,
  input  logic [8*LINE_BYTES-1:0]  line_data,
  // load data back to the processor (one clock pulse)
  output logic                     ld_rsp_valid,
  output logic [WORD_W-1:0]        ld_rsp_data,
  // system bus
  output logic                     bus_a_valid,
  output logic [ADDR_W-1:0]        bus_a_addr,
  output logic                     bus_a_write,
  output logic [3:0]               bus_a_size,   // log2 of the transfer size in bytes
  output logic                     bus_d_valid,
  output logic [8*BUS_BYTES-1:0]   bus_d_data,
  output logic [BUS_BYTES-1:0]     bus_d_be,
  input  logic                     bus_r_valid,
  input  logic [8*BUS_BYTES-1:0]   bus_r_data,
  input  logic                     bus_ack,
  // status
  output logic                     busy
);

  localparam int unsigned BUS_W      = 8 * BUS_BYTES;
  localparam int unsigned LINE_W     = 8 * LINE_BYTES;
  localparam int unsigned LINE_BEATS = LINE_BYTES / BUS_BYTES;
  localparam int unsigned LANES      = BUS_BYTES / WORD_BYTES;
  localparam int unsigned LANE_W     = (LANES > 1) ? $clog2(LANES) : 1;
  localparam logic [3:0]  LINE_SIZE  = 4'($clog2(LINE_BYTES));
  localparam logic [7:0]  ACK_AGE    = 8'(ACK_DELAY);

  typedef enum logic [1:0] {S_IDLE, S_OCC, S_GAP} state_e;

  state_e                state_q, state_d;
  logic [7:0]            t_q, t_d;          // bus cycle index within the transaction
  logic [7:0]            gap_q, gap_d;      // turnaround cycles still to wait
  logic [7:0]            age_q, age_d;      // bus cycles since the last address cycle
  logic                  retry_q, retry_d;  // last transaction was rejected
  logic                  ackw_q, ackw_d;    // an acknowledgment is still due

  // transaction being sent
  logic                  cur_load_q, cur_line_q;
  logic [ADDR_W-1:0]     cur_addr_q;
  logic [3:0]            cur_size_q;
  logic [LINE_W-1:0]     cur_data_q;
  logic [LINE_BYTES-1:0] cur_be_q;

  logic                  take_uc, take_line, issue, nack_now, got_rd, occ_last;
  logic [7:0]            last_t, beats;
  logic [LANE_W-1:0]     cur_lane, uc_lane;

  // bus drive of the next cycle
  logic [ADDR_W-1:0]     nx_addr;
  logic [3:0]            nx_size;
  logic                  nx_load;
  logic [LINE_W-1:0]     nx_data;
  logic [LINE_BYTES-1:0] nx_be;
  logic [7:0]            nx_beats;
  logic [7:0]            nx_k;
  logic                  nx_dv;

  assign beats  = cur_line_q ? 8'(LINE_BEATS) : 8'd1;
  assign last_t = MUX_BUS ? beats : beats - 8'd1;

  if (LANES > 1) begin : g_lanes
    assign cur_lane = cur_addr_q[$clog2(BUS_BYTES)-1:3];
    assign uc_lane  = uc_req.addr[$clog2(BUS_BYTES)-1:3];
  end else begin : g_lane1
    assign cur_lane = '0;
    assign uc_lane  = '0;
  end

  // Events in the current bus cycle, acted on at the next bus_ce.
  assign nack_now = (ACK_DELAY != 0) && ackw_q && (age_q == ACK_AGE - 8'd1) && !bus_ack;
  assign got_rd   = (state_q == S_OCC) && cur_load_q && (t_q != 8'd0) && bus_r_valid;

  always_comb begin
    state_d   = state_q;
    t_d       = t_q;
    gap_d     = gap_q;
    age_d     = (age_q == 8'hff) ? age_q : age_q + 8'd1;
    retry_d   = retry_q || nack_now;
    ackw_d    = ackw_q && !((ACK_DELAY != 0) && (age_q == ACK_AGE - 8'd1));
    take_uc   = 1'b0;
    take_line = 1'b0;
    issue     = 1'b0;

    occ_last = 1'b0;
    if (state_q == S_OCC) begin
      if (cur_load_q) occ_last = got_rd || nack_now || retry_q;
      else            occ_last = (t_q >= last_t);
    end

    if (state_q == S_OCC && !occ_last) begin
      t_d = (t_q == 8'hff) ? t_q : t_q + 8'd1;
    end else if (state_q == S_OCC && TURNAROUND != 0) begin
      state_d = S_GAP;
      gap_d   = 8'(TURNAROUND);
    end else if (state_q == S_GAP && gap_q > 8'd1) begin
      gap_d = gap_q - 8'd1;
    end else begin
      // bus free in the next cycle
      state_d = S_IDLE;
      if ((ACK_DELAY == 0) || (age_d >= ACK_AGE && !ackw_d)) begin
        if (retry_d)         issue = 1'b1;
        else if (uc_valid)   begin issue = 1'b1; take_uc   = 1'b1; end
        else if (line_valid) begin issue = 1'b1; take_line = 1'b1; end
      end
      if (issue) begin
        state_d = S_OCC;
        t_d     = 8'd0;
        age_d   = 8'd0;
        retry_d = 1'b0;
        ackw_d  = (ACK_DELAY != 0);
      end
    end
  end

  assign uc_ready   = bus_ce && take_uc;
  assign line_ready = bus_ce && take_line;
  assign busy       = (state_q != S_IDLE) || retry_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q    <= S_IDLE;
      t_q        <= '0;
      gap_q      <= '0;
      age_q      <= 8'hff;
      retry_q    <= 1'b0;
      ackw_q     <= 1'b0;
      cur_load_q <= 1'b0;
      cur_line_q <= 1'b0;
      cur_addr_q <= '0;
      cur_size_q <= '0;
      cur_data_q <= '0;
      cur_be_q   <= '0;
      ld_rsp_valid <= 1'b0;
      ld_rsp_data  <= '0;
    end else begin
      ld_rsp_valid <= 1'b0;
      if (bus_ce) begin
        state_q <= state_d;
        t_q     <= t_d;
        gap_q   <= gap_d;
        age_q   <= age_d;
        retry_q <= retry_d;
        ackw_q  <= ackw_d;
        if (got_rd && !nack_now) begin
          ld_rsp_valid <= 1'b1;
          ld_rsp_data  <= bus_r_data[WORD_W*cur_lane +: WORD_W];
        end
        if (take_uc || take_line) begin
          cur_load_q <= nx_load;
          cur_line_q <= take_line;
          cur_addr_q <= nx_addr;
          cur_size_q <= nx_size;
          cur_data_q <= nx_data;
          cur_be_q   <= nx_be;
        end
      end
    end
  end

  // Bus drive of the current cycle, registered on bus_ce. The values for the
  // next cycle follow from the next state and the transaction taken.

  always_comb begin
    nx_addr  = cur_addr_q;
    nx_size  = cur_size_q;
    nx_load  = cur_load_q;
    nx_data  = cur_data_q;
    nx_be    = cur_be_q;
    nx_beats = beats;
    if (take_uc) begin
      nx_addr  = uc_req.addr;
      nx_size  = {2'b00, uc_req.size};
      nx_load  = uc_req.is_load;
      nx_data  = '0;
      nx_be    = '0;
      nx_data[WORD_W*uc_lane +: WORD_W]         = uc_req.data;
      nx_be[WORD_BYTES*uc_lane +: WORD_BYTES] = uc_req.be;
      nx_beats = 8'd1;
    end else if (take_line) begin
      nx_addr  = line_addr;
      nx_size  = LINE_SIZE;
      nx_load  = 1'b0;
      nx_data  = line_data;
      nx_be    = '1;
      nx_beats = 8'(LINE_BEATS);
    end
    // data beat index carried in the next cycle
    nx_k  = MUX_BUS ? t_d - 8'd1 : t_d;
    nx_dv = (state_d == S_OCC) && !nx_load && !(MUX_BUS && t_d == 8'd0) && (nx_k < nx_beats);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bus_a_valid <= 1'b0;
      bus_a_addr  <= '0;
      bus_a_write <= 1'b0;
      bus_a_size  <= '0;
      bus_d_valid <= 1'b0;
      bus_d_data  <= '0;
      bus_d_be    <= '0;
    end else if (bus_ce) begin
      bus_a_valid <= issue;
      bus_a_addr  <= nx_addr;
      bus_a_write <= !nx_load;
      bus_a_size  <= nx_size;
      bus_d_valid <= nx_dv;
      bus_d_data  <= nx_dv ? nx_data[BUS_W*nx_k +: BUS_W] : '0;
      bus_d_be    <= nx_dv ? nx_be[BUS_BYTES*nx_k +: BUS_BYTES] : '0;
    end
  end

  // A multiplexed bus never carries an address and data in the same cycle.
  a_mux_excl: assert property (@(posedge clk) disable iff (!rst_n)
                               MUX_BUS |-> !(bus_a_valid && bus_d_valid));
  // Bus outputs only change on a bus cycle boundary.
  a_bus_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                 !$past(bus_ce) |-> $stable(bus_a_valid) && $stable(bus_d_valid));

  initial begin
    assert (LINE_BYTES >= BUS_BYTES && BUS_BYTES >= WORD_BYTES && LINE_BEATS < 256)
      else $error("need WORD_BYTES <= BUS_BYTES <= LINE_BYTES");
  end

endmodule

// io_target: behavioural model of an I/O device (or memory) on the system
// bus, for testbenches.
//
// It watches the bus on the bus cycle enable, keeps every written byte in an
// associative memory (mem), answers loads LAT bus cycles after their address
// cycle with the bytes stored there (zero where nothing was written), and,
// when ACK_DELAY is set, answers each address in bus cycle ACK_DELAY-1. With
// REJECT_EVERY = n > 0 every n-th address is rejected: its data is dropped
// and a load gets no answer. It counts what it sees: address cycles,
// rejections, line bursts, single-beat writes, loads, and the bus cycles of
// the first address and of the last busy cycle since the last clr pulse. It
// also logs the start address of every accepted write in order.
//
// The paper only names the I/O devices on the bus; this model, its answer
// latency and its rejection pattern are this design's own.
module io_target
  import csb_pkg::*;
#(
  parameter int unsigned BUS_BYTES    = 8,
  parameter int unsigned LINE_BYTES   = 64,
  parameter int unsigned ACK_DELAY    = 0,
  parameter int unsigned REJECT_EVERY = 0,
  parameter int unsigned LAT          = 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clr,
  input  logic                    bus_ce,
  input  logic                    bus_a_valid,
  input  logic [ADDR_W-1:0]       bus_a_addr,
  input  logic                    bus_a_write,
  input  logic [3:0]              bus_a_size,
  input  logic                    bus_d_valid,
  input  logic [8*BUS_BYTES-1:0]  bus_d_data,
  input  logic [BUS_BYTES-1:0]    bus_d_be,
  output logic                    bus_r_valid,
  output logic [8*BUS_BYTES-1:0]  bus_r_data,
  output logic                    bus_ack,
  output int                      n_addr,
  output int                      n_rej,
  output int                      n_lines,
  output int                      n_singles,
  output int                      n_loads,
  output int                      first_cyc,
  output int                      last_cyc
);

  byte unsigned mem [logic [ADDR_W-1:0]];
  logic [ADDR_W-1:0] wlog [$];

  int  cyc = 0, since_q = 255, idx_q = 0, beat_q = 0, age, idx;
  bit  load_q = 0, rej_q = 0, rej_now;
  logic [ADDR_W-1:0] addr_q = '0;

  function automatic bit rejected(int i);
    return (REJECT_EVERY != 0) && (i % REJECT_EVERY == REJECT_EVERY - 1);
  endfunction

  always_comb begin
    age     = bus_a_valid ? 0 : since_q;
    idx     = bus_a_valid ? idx_q : idx_q - 1;
    rej_now = rejected(idx);
    bus_ack = (ACK_DELAY != 0) && (age == ACK_DELAY - 1) && !rej_now;
    bus_r_valid = load_q && !rej_q && !bus_a_valid && (age == LAT);
    bus_r_data  = '0;
    if (bus_r_valid)
      for (int j = 0; j < BUS_BYTES; j++) begin
        logic [ADDR_W-1:0] a;
        a = (addr_q & ~ADDR_W'(BUS_BYTES - 1)) + ADDR_W'(j);
        bus_r_data[8*j +: 8] = mem.exists(a) ? mem[a] : 8'h00;
      end
  end

  initial begin
    n_addr = 0; n_rej = 0; n_lines = 0; n_singles = 0; n_loads = 0;
    first_cyc = -1; last_cyc = -1;
  end

  always @(posedge clk) begin
    if (clr) begin
      n_addr = 0; n_rej = 0; n_lines = 0; n_singles = 0; n_loads = 0;
      first_cyc = -1; last_cyc = -1;
    end
    if (rst_n && bus_ce) begin
      if (bus_a_valid) begin
        n_addr++;
        if (first_cyc < 0) first_cyc = cyc;
        if (rejected(idx_q)) n_rej++;
        else if (!bus_a_write) n_loads++;
        else if (bus_a_size == 4'($clog2(LINE_BYTES))) begin n_lines++; wlog.push_back(bus_a_addr); end
        else begin n_singles++; wlog.push_back(bus_a_addr); end
        idx_q   <= idx_q + 1;
        since_q <= 1;
        load_q  <= !bus_a_write;
        addr_q  <= bus_a_addr;
        rej_q   <= rejected(idx_q);
        beat_q  <= 0;
      end else begin
        since_q <= (since_q < 255) ? since_q + 1 : since_q;
      end
      if (bus_d_valid) begin
        logic [ADDR_W-1:0] base;
        bit drop;
        base = ((bus_a_valid ? bus_a_addr : addr_q) & ~ADDR_W'(BUS_BYTES - 1))
               + ADDR_W'((bus_a_valid ? 0 : beat_q) * BUS_BYTES);
        drop = bus_a_valid ? rejected(idx_q) : rej_q;
        if (!drop)
          for (int j = 0; j < BUS_BYTES; j++)
            if (bus_d_be[j]) mem[base + ADDR_W'(j)] = bus_d_data[8*j +: 8];
        beat_q <= (bus_a_valid ? 0 : beat_q) + 1;
      end
      if (bus_a_valid || bus_d_valid || bus_r_valid) last_cyc = cyc;
      cyc++;
    end
  end

endmodule

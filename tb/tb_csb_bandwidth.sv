// tb_csb_bandwidth: the uncached store-bandwidth benchmark (16 bytes to
// 1 KB, conditional store buffer against plain uncached stores) on every bus
// configuration of the study, one bw_bench each, run side by side:
//   multiplexed 8-byte bus, 64-byte line, bus clock 1/3, 1/6, 1/9;
//   multiplexed 8-byte bus, bus clock 1/6, 32- and 128-byte line;
//   multiplexed 8-byte bus, 64-byte line, bus clock 1/6, with a turnaround
//     cycle, or with an acknowledgment delay of 4 or 8 bus cycles;
//   split bus, 64-byte line, bus clock 1/6, 16 and 32 bytes wide;
//   split 16-byte bus, 64-byte line, bus clock 1/6, with a turnaround cycle,
//     or with an acknowledgment delay of 4 or 8 bus cycles.
// Each bench checks its bus cycle counts against the bus formulas and the
// device memory; the bandwidth of every run is printed in bytes per bus
// cycle. This module adds up their results.
//
// The configurations are those of the paper's bandwidth study (multiplexed
// and split bus, line sizes, turnaround, acknowledgment delay); the exact
// cycle counts checked come from this design's bus rules.
module tb_csb_bandwidth;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int N = 13;
  int checks [N], failures [N];
  bit done [N];

  bw_bench #(.NAME("mux8 line64 ratio3"), .CLK_RATIO(3))
    b0 (.clk, .rst_n, .checks(checks[0]), .failures(failures[0]), .done(done[0]));
  bw_bench #(.NAME("mux8 line64 ratio6"), .CLK_RATIO(6))
    b1 (.clk, .rst_n, .checks(checks[1]), .failures(failures[1]), .done(done[1]));
  bw_bench #(.NAME("mux8 line64 ratio9"), .CLK_RATIO(9))
    b2 (.clk, .rst_n, .checks(checks[2]), .failures(failures[2]), .done(done[2]));
  bw_bench #(.NAME("mux8 line32 ratio6"), .LINE_BYTES(32))
    b3 (.clk, .rst_n, .checks(checks[3]), .failures(failures[3]), .done(done[3]));
  bw_bench #(.NAME("mux8 line128 ratio6"), .LINE_BYTES(128))
    b4 (.clk, .rst_n, .checks(checks[4]), .failures(failures[4]), .done(done[4]));
  bw_bench #(.NAME("mux8 line64 ratio6 turnaround1"), .TURNAROUND(1))
    b5 (.clk, .rst_n, .checks(checks[5]), .failures(failures[5]), .done(done[5]));
  bw_bench #(.NAME("mux8 line64 ratio6 ackdelay4"), .ACK_DELAY(4))
    b6 (.clk, .rst_n, .checks(checks[6]), .failures(failures[6]), .done(done[6]));
  bw_bench #(.NAME("mux8 line64 ratio6 ackdelay8"), .ACK_DELAY(8))
    b7 (.clk, .rst_n, .checks(checks[7]), .failures(failures[7]), .done(done[7]));
  bw_bench #(.NAME("split16 line64 ratio6"), .MUX_BUS(0), .BUS_BYTES(16))
    b8 (.clk, .rst_n, .checks(checks[8]), .failures(failures[8]), .done(done[8]));
  bw_bench #(.NAME("split32 line64 ratio6"), .MUX_BUS(0), .BUS_BYTES(32))
    b9 (.clk, .rst_n, .checks(checks[9]), .failures(failures[9]), .done(done[9]));
  bw_bench #(.NAME("split16 line64 ratio6 turnaround1"), .MUX_BUS(0), .BUS_BYTES(16), .TURNAROUND(1))
    b10 (.clk, .rst_n, .checks(checks[10]), .failures(failures[10]), .done(done[10]));
  bw_bench #(.NAME("split16 line64 ratio6 ackdelay4"), .MUX_BUS(0), .BUS_BYTES(16), .ACK_DELAY(4))
    b11 (.clk, .rst_n, .checks(checks[11]), .failures(failures[11]), .done(done[11]));
  bw_bench #(.NAME("split16 line64 ratio6 ackdelay8"), .MUX_BUS(0), .BUS_BYTES(16), .ACK_DELAY(8))
    b12 (.clk, .rst_n, .checks(checks[12]), .failures(failures[12]), .done(done[12]));

  int total_checks, total_failures;
  task automatic report();
    total_checks = 0;
    total_failures = 0;
    for (int i = 0; i < N; i++) begin
      total_checks += checks[i];
      total_failures += failures[i];
    end
  endtask

  function automatic bit all_done();
    for (int i = 0; i < N; i++) if (!done[i]) return 0;
    return 1;
  endfunction

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    report();
    $display("TB_RESULT checks=%0d failures=%0d", total_checks, total_failures + 1);
    $finish;
  end

  initial begin
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    forever begin
      @(posedge clk);
      if (all_done()) break;
    end
    report();
    $display("TB_RESULT checks=%0d failures=%0d", total_checks, total_failures);
    $finish;
  end

endmodule

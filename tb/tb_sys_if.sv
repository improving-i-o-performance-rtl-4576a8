// tb_sys_if: self-checking test of the system interface in several bus
// configurations at once, one sif_harness each:
//   multiplexed 8-byte bus, bus clock 1/6 (the main configuration);
//   multiplexed 8-byte bus with a turnaround cycle, bus clock 1/3;
//   multiplexed 8-byte bus, acknowledgment delay 4 with rejections;
//   multiplexed 8-byte bus, acknowledgment in the address cycle;
//   split 16-byte bus, no overhead;
//   split 32-byte bus, turnaround cycle and acknowledgment delay 8.
// Each harness checks transaction timing, order and contents on its own;
// this module adds up their results.
//
// The bus timing follows the paper's bus models; retry and load timing are
// this design's own choices.
module tb_sys_if;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int N = 6;
  int checks [N], failures [N];
  bit done [N];

  sif_harness #(.MUX_BUS(1), .BUS_BYTES(8),  .TURNAROUND(0), .ACK_DELAY(0), .CLK_RATIO(6))
    h0 (.clk, .rst_n, .checks(checks[0]), .failures(failures[0]), .done(done[0]));
  sif_harness #(.MUX_BUS(1), .BUS_BYTES(8),  .TURNAROUND(1), .ACK_DELAY(0), .CLK_RATIO(3))
    h1 (.clk, .rst_n, .checks(checks[1]), .failures(failures[1]), .done(done[1]));
  sif_harness #(.MUX_BUS(1), .BUS_BYTES(8),  .TURNAROUND(0), .ACK_DELAY(4), .CLK_RATIO(2))
    h2 (.clk, .rst_n, .checks(checks[2]), .failures(failures[2]), .done(done[2]));
  sif_harness #(.MUX_BUS(1), .BUS_BYTES(8),  .TURNAROUND(0), .ACK_DELAY(1), .CLK_RATIO(1))
    h3 (.clk, .rst_n, .checks(checks[3]), .failures(failures[3]), .done(done[3]));
  sif_harness #(.MUX_BUS(0), .BUS_BYTES(16), .TURNAROUND(0), .ACK_DELAY(0), .CLK_RATIO(6))
    h4 (.clk, .rst_n, .checks(checks[4]), .failures(failures[4]), .done(done[4]));
  sif_harness #(.MUX_BUS(0), .BUS_BYTES(32), .TURNAROUND(1), .ACK_DELAY(8), .CLK_RATIO(1))
    h5 (.clk, .rst_n, .checks(checks[5]), .failures(failures[5]), .done(done[5]));

  int total_checks, total_failures;
  task automatic report();
    total_checks = 0;
    total_failures = 0;
    for (int i = 0; i < N; i++) begin
      total_checks += checks[i];
      total_failures += failures[i];
    end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    report();
    $display("TB_RESULT checks=%0d failures=%0d", total_checks, total_failures + 1);
    $finish;
  end

  initial begin
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    wait (done[0] && done[1] && done[2] && done[3] && done[4] && done[5]);
    report();
    $display("TB_RESULT checks=%0d failures=%0d", total_checks, total_failures);
    $finish;
  end

endmodule

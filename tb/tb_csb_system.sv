// tb_csb_system: end-to-end test of the whole uncached store path in four
// configurations at once, one csb_env each:
//   64-byte line, 8-byte multiplexed bus, bus clock 1/6 (main configuration);
//   64-byte line, 8-byte multiplexed bus with a turnaround cycle and an
//     acknowledgment delay of 4 with every third address rejected, bus 1/3;
//   128-byte line, 32-byte split bus, bus clock 1/9;
//   32-byte line, 16-byte split bus with a turnaround cycle, bus clock 1/6.
// Each environment checks device memory, flush results and the mechanisms
// on its own; this module adds up their results.
//
// The mechanisms follow the paper; the configurations mix its bus options
// and line sizes, chosen here to cover them in few runs.
module tb_csb_system;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int N = 4;
  int checks [N], failures [N];
  bit done [N];

  csb_env #(.LINE_BYTES(64),  .BUS_BYTES(8),  .MUX_BUS(1), .TURNAROUND(0), .ACK_DELAY(0),
            .CLK_RATIO(6), .REJECT_EVERY(0))
    e0 (.clk, .rst_n, .checks(checks[0]), .failures(failures[0]), .done(done[0]));
  csb_env #(.LINE_BYTES(64),  .BUS_BYTES(8),  .MUX_BUS(1), .TURNAROUND(1), .ACK_DELAY(4),
            .CLK_RATIO(3), .REJECT_EVERY(3))
    e1 (.clk, .rst_n, .checks(checks[1]), .failures(failures[1]), .done(done[1]));
  csb_env #(.LINE_BYTES(128), .BUS_BYTES(32), .MUX_BUS(0), .TURNAROUND(0), .ACK_DELAY(0),
            .CLK_RATIO(9), .REJECT_EVERY(0))
    e2 (.clk, .rst_n, .checks(checks[2]), .failures(failures[2]), .done(done[2]));
  csb_env #(.LINE_BYTES(32),  .BUS_BYTES(16), .MUX_BUS(0), .TURNAROUND(1), .ACK_DELAY(0),
            .CLK_RATIO(6), .REJECT_EVERY(0))
    e3 (.clk, .rst_n, .checks(checks[3]), .failures(failures[3]), .done(done[3]));

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
    repeat (200000) @(posedge clk);
    report();
    $display("TB_RESULT checks=%0d failures=%0d", total_checks, total_failures + 1);
    $finish;
  end

  initial begin
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    wait (done[0] && done[1] && done[2] && done[3]);
    report();
    $display("TB_RESULT checks=%0d failures=%0d", total_checks, total_failures);
    $finish;
  end

endmodule

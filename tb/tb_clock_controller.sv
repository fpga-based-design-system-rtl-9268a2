// tb_clock_controller: self-checking testbench of clock_controller.
//
// Three controllers, for segment-1 widths 2, 3 and 4 (P1 = 3, 7, 15), run
// from a common synchronous clear. The testbench counts clock edges itself
// and checks that seg2_step is high on exactly the edges P1, 2*P1, 3*P1, ...
// after the clear, that is once every P1 cycles, and never elsewhere. A
// second clear is applied at a random point to check that the spacing
// restarts from it.
module tb_clock_controller;

  logic clk = 1'b0;
  logic clear;
  logic step2, step3, step4;
  int   checks = 0;
  int   failures = 0;
  int   edges;          // edges since the last clear was released
  int   pulses [3];

  always #5 clk = ~clk;

  clock_controller #(.N1(2)) u_cc2 (.clk(clk), .clear(clear), .seg2_step(step2));
  clock_controller #(.N1(3)) u_cc3 (.clk(clk), .clear(clear), .seg2_step(step3));
  clock_controller #(.N1(4)) u_cc4 (.clk(clk), .clear(clear), .seg2_step(step4));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // seg2_step is sampled just before each rising edge: the edge it enables
  // is edge number (edges + 1) since the clear.
  task automatic sample_edge();
    @(negedge clk);
    check(step2 == ((edges + 1) % 3 == 0),  $sformatf("P1=3: step=%0b before edge %0d", step2, edges + 1));
    check(step3 == ((edges + 1) % 7 == 0),  $sformatf("P1=7: step=%0b before edge %0d", step3, edges + 1));
    check(step4 == ((edges + 1) % 15 == 0), $sformatf("P1=15: step=%0b before edge %0d", step4, edges + 1));
    if (step2) pulses[0]++;
    if (step3) pulses[1]++;
    if (step4) pulses[2]++;
    @(posedge clk);
    edges++;
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned first_run;
    pulses = '{0, 0, 0};
    clear  = 1'b1;
    repeat (2) @(posedge clk);
    #1 clear = 1'b0;
    edges = 0;
    first_run = $urandom_range(20, 60);
    repeat (first_run) sample_edge();

    // Clear again at an arbitrary point and check the restart.
    clear = 1'b1;
    @(posedge clk);
    #1 clear = 1'b0;
    edges = 0;
    repeat (105) sample_edge();
    check(pulses[0] >= 35 && pulses[1] >= 15 && pulses[2] >= 7, "every controller produced its steps");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

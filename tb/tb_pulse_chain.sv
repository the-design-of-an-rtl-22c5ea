// Self-checking testbench for pulse_chain: single cycles, back-to-back cycles, holds.
// Checks that each cycle is exactly nine one-hot pulses in order, one per clock.
module tb_pulse_chain;
  localparam int unsigned P = 9;
  logic clk = 0, rst_n = 0;
  logic start, hold;
  logic [P-1:0] tp;
  logic idle, last;
  int checks = 0, failures = 0;

  pulse_chain #(.PULSES(P)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_pulse(input int k);
    logic [P-1:0] want;
    want = '0;
    if (k > 0) want[k-1] = 1'b1;
    checks++;
    if (tp !== want || idle !== (k == 0) || last !== (k == int'(P))) begin
      failures++;
      $display("%0t: tp %b idle %0d last %0d, want pulse %0d", $time, tp, idle, last, k);
    end
  endtask

  initial begin
    start = 0; hold = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    expect_pulse(0);
    for (int round = 0; round < 200; round++) begin
      int holdat, holdn;
      bit b2b;
      holdat = $urandom_range(P, 1);
      holdn  = (round % 2 == 0) ? 0 : $urandom_range(4, 1);
      b2b    = 1'($urandom);
      start = 1; @(posedge clk); #1; start = 0;
      for (int k = 1; k <= int'(P); k++) begin
        expect_pulse(k);
        if (k == holdat) begin
          hold = 1;
          for (int h = 0; h < holdn; h++) begin @(posedge clk); #1; expect_pulse(k); end
          hold = 0;
        end
        if (k == int'(P) && b2b) start = 1;
        @(posedge clk); #1;
        start = 0;
      end
      if (b2b) begin
        // the next cycle already started: we are on pulse 1
        expect_pulse(1);
        for (int k = 2; k <= int'(P); k++) begin @(posedge clk); #1; expect_pulse(k); end
        @(posedge clk); #1;
      end
      expect_pulse(0);
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

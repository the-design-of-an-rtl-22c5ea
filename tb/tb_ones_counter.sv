// Self-checking testbench for ones_counter: random streams of shifted-out bits, counted
// against a software count, with clears in between and a full 32-one row.
module tb_ones_counter;
  localparam int unsigned N = 32;
  localparam int unsigned W = 6;
  logic clk = 0, rst_n = 0;
  logic clr, inc, bit_in;
  logic [W-1:0] count;
  int model;
  int checks = 0, failures = 0;

  ones_counter #(.N(N), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    checks++;
    if (int'(count) != model) begin
      failures++;
      $display("count %0d want %0d", count, model);
    end
  endtask

  initial begin
    clr = 0; inc = 0; bit_in = 0; model = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    check();
    for (int row = 0; row < 40; row++) begin
      clr = 1; @(posedge clk); #1 clr = 0; model = 0; check();
      for (int s = 0; s < int'(N); s++) begin
        inc = 1'($urandom_range(3) != 0);
        bit_in = (row == 0) ? 1'b1 : 1'($urandom);
        if (row == 0) inc = 1'b1;
        @(posedge clk); #1;
        if (inc && bit_in) model++;
        check();
      end
      inc = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

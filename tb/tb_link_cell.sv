// Self-checking testbench for link_cell: random LNK writes and accumulator values, with
// the link bit tracked by a reference model.
module tb_link_cell;
  logic clk = 0, rst_n = 0;
  logic we, ac_a, ac_b, to_a, to_b;
  logic model;
  int checks = 0, failures = 0;

  link_cell dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; ac_a = 0; ac_b = 0; model = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      we = 1'($urandom_range(3) == 0);
      ac_a = 1'($urandom); ac_b = 1'($urandom);
      #1;
      checks++;
      if (to_a !== (model & ac_b) || to_b !== (model & ac_a)) begin
        failures++;
        $display("link %0d a %0d b %0d: to_a %0d to_b %0d", model, ac_a, ac_b, to_a, to_b);
      end
      @(posedge clk); #1;
      if (we) model = ac_a & ac_b;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

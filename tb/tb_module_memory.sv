// Self-checking testbench for module_memory: random reads and two-pulse writes against a
// reference copy of the sixteen bits.
module tb_module_memory;
  localparam int unsigned MB = 16;
  logic clk = 0, rst_n = 0;
  logic [MB-1:0] sel;
  logic rd, clr, set, din, dout;
  logic [MB-1:0] model;
  int checks = 0, failures = 0;

  module_memory #(.MEM_BITS(MB)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_bit(input int a, input logic d);
    sel = MB'(1) << a; din = d;
    clr = 1; set = 0; @(posedge clk); #1;
    clr = 0; set = 1; @(posedge clk); #1;
    set = 0; sel = '0;
    model[a] = d;
  endtask

  initial begin
    sel = '0; rd = 0; clr = 0; set = 0; din = 0; model = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      int a;
      a = $urandom_range(MB - 1);
      if ($urandom_range(1)) begin
        write_bit(a, 1'($urandom));
      end else begin
        sel = MB'(1) << a; rd = 1'($urandom); #1;
        checks++;
        if (dout !== (rd & model[a])) begin
          failures++;
          $display("read mismatch addr %0d rd %0d: got %0d want %0d", a, rd, dout, model[a]);
        end
        // Set without a preceding clear must never lower a bit; a set with din=0 changes nothing.
        set = 1; din = 0; @(posedge clk); #1; set = 0;
        rd = 1; #1; checks++;
        if (dout !== model[a]) begin failures++; $display("set with din=0 disturbed bit %0d", a); end
        rd = 0; sel = '0;
      end
    end
    // No bit selected: clr and set must leave everything alone.
    sel = '0; din = 1; clr = 1; @(posedge clk); #1; clr = 0; set = 1; @(posedge clk); #1; set = 0;
    for (int a = 0; a < MB; a++) begin
      sel = MB'(1) << a; rd = 1; #1; checks++;
      if (dout !== model[a]) begin failures++; $display("unselected write changed bit %0d", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

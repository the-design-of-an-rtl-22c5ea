// Self-checking testbench for mem_addr_matrix: every address with and without the
// selection current.
module tb_mem_addr_matrix;
  localparam int unsigned MB = 16;
  logic en;
  logic [3:0] addr;
  logic [MB-1:0] sel;
  int checks = 0, failures = 0;

  mem_addr_matrix #(.MEM_BITS(MB)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++) begin
      for (int a = 0; a < MB; a++) begin
        logic [MB-1:0] want;
        en = 1'(e); addr = 4'(a); #1;
        want = '0;
        if (e == 1) want[a] = 1'b1;
        checks++;
        if (sel !== want) begin
          failures++;
          $display("en %0d addr %0d: sel %h want %h", e, a, sel, want);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking testbench for edge_shift_logic: random edge values for SHR and SRA.
module tb_edge_shift_logic;
  localparam int unsigned N = 32;
  logic sra;
  logic [N-1:0] far_ac, fill, edge_in;
  int checks = 0, failures = 0;

  edge_shift_logic #(.N(N)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      sra = 1'($urandom);
      far_ac = $urandom;
      fill = (i % 3 == 0) ? '0 : N'($urandom);
      #1;
      for (int k = 0; k < int'(N); k++) begin
        checks++;
        if (edge_in[k] !== (sra ? far_ac[k] : fill[k])) begin
          failures++;
          $display("line %0d sra %0d far %0d fill %0d: got %0d", k, sra, far_ac[k], fill[k], edge_in[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

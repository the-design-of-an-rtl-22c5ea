// Self-checking testbench for ap_module: random orders with random neighbour, shift and
// link inputs, with and without the isolation gate, checked against a reference model of
// the accumulator and the sixteen memory bits. Orders are applied the way the master
// control does: memory read enabled around a one-clock strobe, and STO as a reset pulse
// followed by a set pulse.
module tb_ap_module;
  import ap_pkg::*;
  localparam int unsigned MB = 16;

  logic clk = 0, rst_n = 0;
  logic en;
  array_cmd_t cmd;
  logic [MB-1:0] sel;
  logic nb_up, nb_down, nb_left, nb_right, shift_in, exp_in;
  logic ac, changed;
  bit m_ac;
  bit m_mem[MB];
  int checks = 0, failures = 0;

  ap_module #(.MEM_BITS(MB)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cmd = '0; sel = '0; en = 1;
    {nb_up, nb_down, nb_left, nb_right, shift_in, exp_in} = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    checks++; if (ac !== 1'b0) begin failures++; $display("AC not cleared by reset"); end
    for (int i = 0; i < 5000; i++) begin
      op_e op;
      int a;
      bit opnd, want_chg, nx;
      op = op_e'($urandom_range(7));  // the module-level orders
      a = $urandom_range(MB - 1);
      cmd.op = op; cmd.src = src_e'($urandom_range(4));
      cmd.dir = dir_e'($urandom_range(3)); cmd.kind = link_e'($urandom_range(3));
      en = ($urandom_range(4) != 0);
      {nb_up, nb_down, nb_left, nb_right, shift_in, exp_in} = 6'($urandom);
      sel = MB'(1) << a;
      cmd.mem_rd = 1;
      #1;
      case (cmd.src)
        SRC_UP: opnd = nb_up; SRC_DOWN: opnd = nb_down; SRC_LEFT: opnd = nb_left;
        SRC_RIGHT: opnd = nb_right; default: opnd = m_mem[a];
      endcase
      nx = m_ac;
      case (op)
        OP_ADD: nx = m_ac | opnd;
        OP_MPY: nx = m_ac & opnd;
        OP_COM: nx = !m_ac;
        OP_SHR, OP_SRA: nx = shift_in;
        OP_EXP: nx = m_ac | exp_in;
        default: ;
      endcase
      want_chg = en && op == OP_EXP && nx != m_ac;
      checks++;
      if (changed !== want_chg) begin failures++; $display("changed %0d want %0d", changed, want_chg); end
      cmd.strobe = 1; @(posedge clk); #1 cmd.strobe = 0; cmd.mem_rd = 0;
      if (en) m_ac = nx;
      if (op == OP_STO) begin
        cmd.mem_clr = 1; @(posedge clk); #1 cmd.mem_clr = 0;
        cmd.mem_set = 1; @(posedge clk); #1 cmd.mem_set = 0;
        if (en) m_mem[a] = m_ac;
      end
      sel = '0;
      checks++;
      if (ac !== m_ac) begin
        failures++;
        $display("op %s src %0d en %0d: AC %0d want %0d", op.name(), cmd.src, en, ac, m_ac);
      end
    end
    // Read every memory bit back through ADD from a cleared accumulator.
    for (int a = 0; a < int'(MB); a++) begin
      en = 1; cmd = '0; cmd.op = OP_COM;
      if (m_ac) begin cmd.strobe = 1; @(posedge clk); #1 cmd.strobe = 0; m_ac = 0; end
      cmd.op = OP_ADD; cmd.src = SRC_MEM; sel = MB'(1) << a; cmd.mem_rd = 1;
      cmd.strobe = 1; @(posedge clk); #1 cmd = '0;
      m_ac = m_mem[a];
      checks++;
      if (ac !== m_mem[a]) begin failures++; $display("memory bit %0d reads %0d want %0d", a, ac, m_mem[a]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

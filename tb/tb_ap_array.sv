// Self-checking testbench for ap_array (8 x 8 to keep it quick): the array is driven
// directly with command pulses the way the master control issues them, and after every
// order the accumulator plane, all row and column counters and the number of EXP steps
// are compared with the reference model in ap_ref_pkg. Isolation masks and the fill
// column are varied at random.
module tb_ap_array;
  import ap_pkg::*;
  import ap_ref_pkg::*;
  localparam int unsigned N = 8, MB = 16, CW = $clog2(N + 1);

  logic clk = 0, rst_n = 0;
  array_cmd_t cmd;
  logic [MB-1:0] sel;
  logic [N-1:0] row_en, col_en, fill;
  logic cnt_clr, exp_changed;
  logic [N-1:0][N-1:0] ac_plane;
  logic [N-1:0][CW-1:0] row_cnt, col_cnt;
  int checks = 0, failures = 0;
  int n_exp_steps = 0;
  ApModel m;

  ap_array #(.N(N), .MEM_BITS(MB)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(order_t o, logic [N-1:0] d);
    int steps;
    cmd = '0; cmd.op = o.op; cmd.src = o.src; cmd.dir = o.dir; cmd.kind = o.kind;
    fill = (o.op == OP_SHR && o.dir == DIR_RIGHT) ? d : '0;
    sel = MB'(1) << o.addr; cmd.mem_rd = 1;
    cnt_clr = (o.op == OP_CLC);
    if (o.op == OP_ISR) row_en = d;
    if (o.op == OP_ISC) col_en = d;
    #1;
    steps = 0;
    cmd.strobe = 1;
    while (o.op == OP_EXP && exp_changed) begin @(posedge clk); #1 steps++; end
    @(posedge clk); #1;
    cmd.strobe = 0; cmd.mem_rd = 0; cnt_clr = 0;
    if (o.op == OP_STO) begin
      cmd.mem_clr = 1; @(posedge clk); #1 cmd.mem_clr = 0;
      cmd.mem_set = 1; @(posedge clk); #1 cmd.mem_set = 0;
    end
    sel = '0;
    m.exec(o, 32'(d));
    n_exp_steps += steps;
    checks++;
    if (steps != m.last_exp_steps) begin
      failures++; $display("EXP took %0d steps, want %0d", steps, m.last_exp_steps);
    end
    for (int r = 0; r < int'(N); r++) begin
      for (int c = 0; c < int'(N); c++) begin
        checks++;
        if (ac_plane[r][c] !== m.ac[r][c]) begin
          failures++;
          $display("%s: AC[%0d][%0d] = %0d want %0d", o.op.name(), r, c, ac_plane[r][c], m.ac[r][c]);
        end
      end
      checks++;
      if (int'(row_cnt[r]) != m.rcnt[r] || int'(col_cnt[r]) != m.ccnt[r]) begin
        failures++;
        $display("%s: counters %0d: row %0d/%0d col %0d/%0d", o.op.name(), r, row_cnt[r], m.rcnt[r],
                 col_cnt[r], m.ccnt[r]);
      end
    end
  endtask

  initial begin
    m = new(N, MB);
    cmd = '0; sel = '0; row_en = '1; col_en = '1; fill = '0; cnt_clr = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      order_t o;
      logic [N-1:0] d;
      o.op = op_e'($urandom_range(11)); o.src = src_e'($urandom_range(4));
      o.addr = 4'($urandom_range(MB - 1)); o.dir = dir_e'($urandom_range(3));
      o.kind = link_e'($urandom_range(3));
      if (o.op == OP_RDC) o.op = OP_SHR;  // in-out register lives in the master control
      d = N'($urandom);
      if (o.op inside {OP_ISR, OP_ISC} && $urandom_range(2) != 0) d = '1;
      apply(o, d);
    end
    checks++;
    if (n_exp_steps == 0) begin failures++; $display("EXP never needed more than one step"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

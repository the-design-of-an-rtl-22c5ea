// Self-checking testbench for master_control: random orders through the handshake, with
// the command outputs checked clock by clock against the nine-pulse schedule (memory read
// on pulses 2-4, strobe on pulse 3, memory select while reading or writing, write halves
// on pulses 7 and 8, done on pulse 9), EXP held on pulse 3 while the array reports a
// change, and the isolation masks, fill column, counter clear and in-out register.
module tb_master_control;
  import ap_pkg::*;
  localparam int unsigned N = 8, MB = 16, CW = $clog2(N + 1), LOGN = $clog2(N);

  logic clk = 0, rst_n = 0;
  logic order_valid, order_ready, done, cnt_clr, exp_changed;
  order_t order;
  logic [N-1:0] order_data, row_en, col_en, fill;
  logic [CW-1:0] io_reg;
  array_cmd_t cmd;
  logic [MB-1:0] sel;
  logic [N-1:0][CW-1:0] row_cnt, col_cnt;
  int checks = 0, failures = 0;
  int exp_left;
  logic [N-1:0] m_row_en, m_col_en;
  int m_io;

  master_control #(.N(N), .MEM_BITS(MB)) dut (.*);

  always #5 clk = ~clk;

  // The array's EXP settles after exp_left more strobes.
  assign exp_changed = exp_left > 0;
  always @(posedge clk) if (cmd.strobe && exp_left > 0) exp_left <= exp_left - 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect1(string what, logic got, logic want, int k);
    checks++;
    if (got !== want) begin
      failures++;
      $display("%0t pulse %0d: %s = %0d, want %0d", $time, k, what, got, want);
    end
  endtask

  initial begin
    order_valid = 0; order = '0; order_data = '0; exp_left = 0;
    m_row_en = '1; m_col_en = '1; m_io = 0;
    for (int i = 0; i < int'(N); i++) begin row_cnt[i] = CW'(i + 1); col_cnt[i] = CW'(N - i); end
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int i = 0; i < 600; i++) begin
      order_t o;
      logic [N-1:0] d;
      int holds, k, extra;
      o.op = op_e'($urandom_range(11)); o.src = src_e'($urandom_range(4));
      o.addr = 4'($urandom_range(MB - 1)); o.dir = dir_e'($urandom_range(3));
      o.kind = link_e'($urandom_range(3));
      d = N'($urandom);
      holds = (o.op == OP_EXP) ? $urandom_range(3) : 0;
      order = o; order_data = d; order_valid = 1;
      do @(posedge clk); while (!order_ready);
      #1 order_valid = 0; order = '0; order_data = '0;
      exp_left = holds;
      // pulse 1 now
      k = 1; extra = 0;
      while (1) begin
        bit rd, wr;
        rd = (k >= 2 && k <= 4);
        wr = (k >= 7 && k <= 8);
        expect1("mem_rd", cmd.mem_rd, rd, k);
        expect1("strobe", cmd.strobe, k == 3, k);
        expect1("mem_clr", cmd.mem_clr, k == 7, k);
        expect1("mem_set", cmd.mem_set, k == 8, k);
        expect1("done", done, k == 9, k);
        expect1("order_ready", order_ready, k == 9, k);
        expect1("cnt_clr", cnt_clr, k == 3 && o.op == OP_CLC, k);
        checks++;
        if (sel !== ((rd || wr) ? MB'(1) << o.addr : '0)) begin
          failures++; $display("pulse %0d: sel %h addr %0d", k, sel, o.addr);
        end
        checks++;
        if (fill !== ((o.op == OP_SHR && o.dir == DIR_RIGHT) ? d : '0)) begin
          failures++; $display("fill %h want %h", fill, d);
        end
        checks++;
        if (cmd.op !== o.op || cmd.src !== o.src || cmd.dir !== o.dir || cmd.kind !== o.kind) begin
          failures++; $display("broadcast order fields differ");
        end
        if (k == 9) break;
        @(posedge clk); #1;
        if (k == 3 && extra < holds) extra++;
        else k++;
      end
      case (o.op)
        OP_ISR: m_row_en = d;
        OP_ISC: m_col_en = d;
        OP_RDC: m_io = d[LOGN] ? int'(col_cnt[d[LOGN-1:0]]) : int'(row_cnt[d[LOGN-1:0]]);
        default: ;
      endcase
      @(posedge clk); #1;
      checks++;
      if (row_en !== m_row_en || col_en !== m_col_en || int'(io_reg) != m_io) begin
        failures++;
        $display("after %s: row_en %h/%h col_en %h/%h io %0d/%0d", o.op.name(), row_en, m_row_en,
                 col_en, m_col_en, io_reg, m_io);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

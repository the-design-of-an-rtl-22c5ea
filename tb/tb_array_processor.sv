// End-to-end testbench of the array processor at its default size (32 x 32, 16-bit
// module memories).
//
// A random program of orders is sent through the order handshake, back to back where
// possible. After every order the whole accumulator plane (and, for RDC, the in-out
// register) is compared with the reference model in ap_ref_pkg, and the order's length is
// checked: 9 clocks, plus one per extra spreading step of EXP. The program also contains a
// fixed row/column census: CLC, 32 x SRA to the right and 32 x SRA upwards, then RDC of
// every counter, compared with ones counted directly in the plane.
//
// Each mechanism of the design is counted and must occur at least once: SHR with zeros
// entering, SHR with a random fill column, SRA wrapping a one around, multi-step EXP,
// LNK, STO followed by a memory read, neighbour operands, COM, MPY, isolation masking a
// module, counter read-out of a non-zero count, counter clear, back-to-back orders.
module tb_array_processor;
  import ap_pkg::*;
  import ap_ref_pkg::*;

  localparam int unsigned N  = AP_N;
  localparam int unsigned MB = AP_MEM_BITS;
  localparam int unsigned CW = $clog2(N + 1);
  localparam int unsigned LOGN = $clog2(N);

  logic clk = 0, rst_n = 0;
  logic order_valid, order_ready, done;
  order_t order;
  logic [N-1:0] order_data;
  logic [CW-1:0] io_reg;
  logic [N-1:0][N-1:0] ac_plane;

  int checks = 0, failures = 0;
  ApModel m;

  // mechanism counters
  int n_shr_zero, n_fill, n_sra_wrap, n_exp_multi, n_lnk, n_sto_read, n_nb_operand, n_com,
      n_mpy, n_isolated, n_rdc_nonzero, n_clc, n_back_to_back, n_edge_count;
  bit stored[MB];

  array_processor dut (
    .clk(clk), .rst_n(rst_n), .order_valid(order_valid), .order_ready(order_ready),
    .order(order), .order_data(order_data), .io_reg(io_reg), .done(done),
    .ac_plane(ac_plane)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit plane_matches();
    for (int r = 0; r < int'(N); r++)
      for (int c = 0; c < int'(N); c++)
        if (ac_plane[r][c] !== m.ac[r][c]) return 0;
    return 1;
  endfunction

  function automatic bit all_enabled();
    foreach (m.row_en[i]) if (!m.row_en[i] || !m.col_en[i]) return 0;
    return 1;
  endfunction

  // Issue one order; returns after its last pulse with everything checked.
  task automatic run(input order_t o, input logic [N-1:0] data, input bit b2b = 1);
    int cycles, want;
    bit was_ready_at_last;
    bit wrapped;
    // mechanism bookkeeping before the model executes
    if (!all_enabled() && o.op inside {OP_ADD, OP_MPY, OP_COM, OP_STO, OP_SHR, OP_SRA, OP_EXP, OP_LNK})
      n_isolated++;
    if (o.op == OP_SHR && !(o.dir == DIR_RIGHT && data != '0)) n_shr_zero++;
    if (o.op == OP_SHR && o.dir == DIR_RIGHT && data != '0) n_fill++;
    wrapped = 0;
    if (o.op == OP_SRA)
      for (int i = 0; i < int'(N); i++)
        case (o.dir)
          DIR_RIGHT: wrapped |= m.ac[i][N-1];
          DIR_LEFT:  wrapped |= m.ac[i][0];
          DIR_UP:    wrapped |= m.ac[0][i];
          default:   wrapped |= m.ac[N-1][i];
        endcase
    if (wrapped) n_sra_wrap++;
    if (o.op == OP_SRA && o.dir inside {DIR_RIGHT, DIR_UP}) n_edge_count++;
    if (o.op == OP_LNK) n_lnk++;
    if (o.op inside {OP_ADD, OP_MPY} && o.src == SRC_MEM && stored[o.addr]) n_sto_read++;
    if (o.op inside {OP_ADD, OP_MPY} && o.src != SRC_MEM) n_nb_operand++;
    if (o.op == OP_COM) n_com++;
    if (o.op == OP_MPY) n_mpy++;
    if (o.op == OP_CLC) n_clc++;
    if (o.op == OP_STO) stored[o.addr] = 1;

    order = o; order_data = data; order_valid = 1;
    was_ready_at_last = done;  // previous order on its last pulse: back-to-back take
    do @(posedge clk); while (!order_ready);
    if (was_ready_at_last && b2b) n_back_to_back++;
    #1 order_valid = 0;
    cycles = 1;
    while (!done) begin @(posedge clk); #1 cycles++; end

    m.exec(o, 32'(data));
    want = int'(AP_PULSES) + m.last_exp_steps;
    if (o.op == OP_EXP && m.last_exp_steps >= 2) n_exp_multi++;
    checks++;
    if (cycles != want) begin
      failures++;
      $display("order %s: %0d clocks, want %0d", o.op.name(), cycles, want);
    end
    checks++;
    if (!plane_matches()) begin
      failures++;
      $display("order %s src %0d addr %0d dir %0d kind %0d: accumulator plane differs",
               o.op.name(), o.src, o.addr, o.dir, o.kind);
    end
    if (o.op == OP_RDC) begin
      checks++;
      if (int'(io_reg) != m.io) begin
        failures++;
        $display("RDC %h: io_reg %0d want %0d", data, io_reg, m.io);
      end
      if (m.io != 0) n_rdc_nonzero++;
    end
  endtask

  function automatic order_t mk(op_e op, src_e src = SRC_MEM, int addr = 0,
                                dir_e dir = DIR_RIGHT, link_e kind = LK_H);
    order_t o;
    o.op = op; o.src = src; o.addr = 4'(addr); o.dir = dir; o.kind = kind;
    return o;
  endfunction

  function automatic order_t rand_order();
    order_t o;
    int pick;
    o = mk(OP_ADD, src_e'($urandom_range(4)), $urandom_range(MB - 1),
           dir_e'($urandom_range(3)), link_e'($urandom_range(3)));
    pick = $urandom_range(99);
    if      (pick < 14) o.op = OP_ADD;
    else if (pick < 26) o.op = OP_MPY;
    else if (pick < 34) o.op = OP_COM;
    else if (pick < 46) o.op = OP_STO;
    else if (pick < 58) o.op = OP_SHR;
    else if (pick < 68) o.op = OP_SRA;
    else if (pick < 76) o.op = OP_LNK;
    else if (pick < 86) o.op = OP_EXP;
    else if (pick < 89) o.op = OP_CLC;
    else if (pick < 95) o.op = OP_RDC;
    else if (pick < 97) o.op = OP_ISR;
    else                o.op = OP_ISC;
    return o;
  endfunction

  initial begin
    m = new(N, MB);
    order_valid = 0; order = '0; order_data = '0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    @(posedge clk); #1;

    // 1. Random array: fill the plane column by column with random numbers.
    for (int i = 0; i < int'(N); i++) run(mk(OP_SHR, SRC_MEM, 0, DIR_RIGHT), N'({$urandom, $urandom}));

    // 2. Row and column census with the edge counters.
    begin
      int rows[], cols[];
      rows = new[N]; cols = new[N];
      for (int r = 0; r < int'(N); r++) for (int c = 0; c < int'(N); c++) begin
        rows[r] += m.ac[r][c]; cols[c] += m.ac[r][c];
      end
      run(mk(OP_CLC), '0);
      for (int i = 0; i < int'(N); i++) run(mk(OP_SRA, SRC_MEM, 0, DIR_RIGHT), '0);
      for (int i = 0; i < int'(N); i++) run(mk(OP_SRA, SRC_MEM, 0, DIR_UP), '0);
      for (int i = 0; i < int'(N); i++) begin
        run(mk(OP_RDC), N'(i));
        checks++; if (int'(io_reg) != rows[i]) begin failures++; $display("row %0d count %0d want %0d", i, io_reg, rows[i]); end
        run(mk(OP_RDC), N'(i) | (N'(1) << LOGN));
        checks++; if (int'(io_reg) != cols[i]) begin failures++; $display("col %0d count %0d want %0d", i, io_reg, cols[i]); end
      end
    end

    // 3. Connected-region expansion: seed one module of a linked pattern and spread.
    run(mk(OP_STO, SRC_MEM, 3), '0);
    run(mk(OP_LNK), '0);
    for (int k = 0; k < 4; k++) begin
      // keep only column 0 of the pattern as seeds: isolate columns 1.. and clear them
      run(mk(OP_ISC), ~N'(1));
      for (int s = 0; s < 2; s++) run(mk(OP_MPY, SRC_LEFT), '0);
      run(mk(OP_COM), '0); run(mk(OP_MPY, SRC_MEM, 15), '0);  // memory bit 15 is 0: clears
      run(mk(OP_ISC), '1);
      run(mk(OP_EXP, SRC_MEM, 0, DIR_RIGHT, link_e'(k)), '0);
      run(mk(OP_ADD, SRC_MEM, 3), '0);  // restore the pattern for the next link kind
    end

    // 4. Random program.
    for (int i = 0; i < 1500; i++) begin
      order_t o;
      logic [N-1:0] d;
      o = rand_order();
      d = N'({$urandom, $urandom});
      if (o.op == OP_RDC) d = N'($urandom_range(2 * N - 1));
      if (o.op inside {OP_ISR, OP_ISC} && $urandom_range(1)) d = '1;
      if (o.op == OP_SHR && $urandom_range(1)) d = '0;
      run(o, d);
      if (i % 100 == 99) begin run(mk(OP_ISR), '1); run(mk(OP_ISC), '1); end
    end

    begin
      string names[14];
      int counts[14];
      names = '{"shr_zero", "fill", "sra_wrap", "exp_multi", "lnk", "sto_read", "nb_operand",
                "com", "mpy", "isolated", "rdc_nonzero", "clc", "back_to_back", "edge_count"};
      counts = '{n_shr_zero, n_fill, n_sra_wrap, n_exp_multi, n_lnk, n_sto_read, n_nb_operand,
                 n_com, n_mpy, n_isolated, n_rdc_nonzero, n_clc, n_back_to_back, n_edge_count};
      for (int i = 0; i < 14; i++) begin
        $display("mechanism %-12s happened %0d times", names[i], counts[i]);
        checks++;
        if (counts[i] == 0) begin failures++; $display("mechanism %s never happened", names[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

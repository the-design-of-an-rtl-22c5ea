// The N x N array of logical modules, with its link elements, edge logic and counters.
//
// Row 0 is the top row and column 0 the left column. Every module sees the accumulators
// of its four neighbours (zero beyond the edge) as ADD / MPY operands. For SHR and SRA
// each module takes the accumulator of the neighbour the data comes from; the four edges
// get their input from edge_shift_logic (zero or the fill column on SHR, the opposite
// edge on SRA).
//
// A link_cell sits between every pair of adjacent modules: horizontal (r,c)-(r,c+1),
// vertical (r,c)-(r+1,c), positive diagonal (r,c)-(r-1,c+1) and negative diagonal
// (r,c)-(r+1,c+1). LNK writes all of them at once; a link between two modules is written
// only when both are enabled. During EXP each module ORs in the ones its links of the
// ordered kind pass to it. exp_changed is high while any enabled module would still gain
// a one, so the master control repeats the step until the spreading has finished.
//
// A ones_counter sits at the right end of every row and on top of every column. A row
// counter adds the accumulator of its row's rightmost module whenever the array shifts
// right (SHR or SRA); a column counter adds its column's top accumulator whenever the
// array shifts up. Isolation: module (r,c) acts only when row_en[r] and col_en[c] are high.
//
// Timing: everything updates on the strobe / write pulses of cmd at the rising clock edge;
// ac_plane, exp_changed and the counts are register outputs or simple logic of them.
module ap_array
  import ap_pkg::*;
#(
  parameter int unsigned N        = 32,
  parameter int unsigned MEM_BITS = 16,
  parameter int unsigned CW       = $clog2(N + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  array_cmd_t           cmd,
  input  logic [MEM_BITS-1:0]  sel,
  input  logic [N-1:0]         row_en,
  input  logic [N-1:0]         col_en,
  input  logic [N-1:0]         fill,      // enters the left column on a rightward SHR
  input  logic                 cnt_clr,
  output logic [N-1:0][N-1:0]  ac_plane,  // ac_plane[r][c]
  output logic                 exp_changed,
  output logic [N-1:0][CW-1:0] row_cnt,
  output logic [N-1:0][CW-1:0] col_cnt
);

  logic [N-1:0][N-1:0] ac, chg;
  logic [N-1:0][N-1:0] nb_up, nb_down, nb_left, nb_right, shift_in, exp_in;
  // Link outputs: *_a goes to module (r,c), *_b to its partner. Missing links give zero.
  logic [N-1:0][N-1:0] h_a, h_b, v_a, v_b, pd_a, pd_b, nd_a, nd_b;
  logic [N-1:0]        left_in, right_in, top_in, bottom_in;
  logic [N-1:0]        col_first, col_last, row_first, row_last;
  logic                sra;
  logic                lnk_we;

  assign ac_plane = ac;
  assign sra      = cmd.op == OP_SRA;
  assign lnk_we   = cmd.strobe && cmd.op == OP_LNK;

  // Edge columns and rows gathered for the wrap-around paths.
  always_comb begin
    for (int r = 0; r < N; r++) begin
      col_first[r] = ac[r][0];
      col_last[r]  = ac[r][N-1];
    end
    for (int c = 0; c < N; c++) begin
      row_first[c] = ac[0][c];
      row_last[c]  = ac[N-1][c];
    end
  end

  // Left edge: data moving right. Right edge: data moving left.
  edge_shift_logic #(.N(N)) u_edge_left   (.sra(sra), .far_ac(col_last),  .fill(fill), .edge_in(left_in));
  edge_shift_logic #(.N(N)) u_edge_right  (.sra(sra), .far_ac(col_first), .fill('0),   .edge_in(right_in));
  // Bottom edge: data moving up. Top edge: data moving down.
  edge_shift_logic #(.N(N)) u_edge_bottom (.sra(sra), .far_ac(row_first), .fill('0),   .edge_in(bottom_in));
  edge_shift_logic #(.N(N)) u_edge_top    (.sra(sra), .far_ac(row_last),  .fill('0),   .edge_in(top_in));

  // Neighbour operands, shift inputs and EXP inputs.
  always_comb begin
    for (int r = 0; r < N; r++) begin
      for (int c = 0; c < N; c++) begin
        nb_up[r][c]    = (r > 0)     ? ac[r-1][c] : 1'b0;
        nb_down[r][c]  = (r < N - 1) ? ac[r+1][c] : 1'b0;
        nb_left[r][c]  = (c > 0)     ? ac[r][c-1] : 1'b0;
        nb_right[r][c] = (c < N - 1) ? ac[r][c+1] : 1'b0;

        unique case (cmd.dir)
          DIR_RIGHT: shift_in[r][c] = (c > 0)     ? ac[r][c-1] : left_in[r];
          DIR_LEFT:  shift_in[r][c] = (c < N - 1) ? ac[r][c+1] : right_in[r];
          DIR_UP:    shift_in[r][c] = (r < N - 1) ? ac[r+1][c] : bottom_in[c];
          default:   shift_in[r][c] = (r > 0)     ? ac[r-1][c] : top_in[c];
        endcase

        unique case (cmd.kind)
          LK_H:    exp_in[r][c] = h_a[r][c]  | ((c > 0)              ? h_b[r][c-1]    : 1'b0);
          LK_V:    exp_in[r][c] = v_a[r][c]  | ((r > 0)              ? v_b[r-1][c]    : 1'b0);
          LK_PD:   exp_in[r][c] = pd_a[r][c] | ((r < N - 1 && c > 0) ? pd_b[r+1][c-1] : 1'b0);
          default: exp_in[r][c] = nd_a[r][c] | ((r > 0 && c > 0)     ? nd_b[r-1][c-1] : 1'b0);
        endcase
      end
    end
  end

  for (genvar r = 0; r < N; r++) begin : g_row
    for (genvar c = 0; c < N; c++) begin : g_col
      ap_module #(.MEM_BITS(MEM_BITS)) u_mod (
        .clk     (clk),
        .rst_n   (rst_n),
        .en      (row_en[r] & col_en[c]),
        .cmd     (cmd),
        .sel     (sel),
        .nb_up   (nb_up[r][c]),
        .nb_down (nb_down[r][c]),
        .nb_left (nb_left[r][c]),
        .nb_right(nb_right[r][c]),
        .shift_in(shift_in[r][c]),
        .exp_in  (exp_in[r][c]),
        .ac      (ac[r][c]),
        .changed (chg[r][c])
      );

      // Horizontal link to (r, c+1).
      if (c < N - 1) begin : g_h
        link_cell u_link (
          .clk(clk), .rst_n(rst_n),
          .we  (lnk_we & row_en[r] & col_en[c] & col_en[c+1]),
          .ac_a(ac[r][c]), .ac_b(ac[r][c+1]),
          .to_a(h_a[r][c]), .to_b(h_b[r][c])
        );
      end else begin : g_no_h
        assign h_a[r][c] = 1'b0;
        assign h_b[r][c] = 1'b0;
      end

      // Vertical link to (r+1, c).
      if (r < N - 1) begin : g_v
        link_cell u_link (
          .clk(clk), .rst_n(rst_n),
          .we  (lnk_we & row_en[r] & row_en[r+1] & col_en[c]),
          .ac_a(ac[r][c]), .ac_b(ac[r+1][c]),
          .to_a(v_a[r][c]), .to_b(v_b[r][c])
        );
      end else begin : g_no_v
        assign v_a[r][c] = 1'b0;
        assign v_b[r][c] = 1'b0;
      end

      // Positive diagonal link to (r-1, c+1).
      if (r > 0 && c < N - 1) begin : g_pd
        link_cell u_link (
          .clk(clk), .rst_n(rst_n),
          .we  (lnk_we & row_en[r] & row_en[r-1] & col_en[c] & col_en[c+1]),
          .ac_a(ac[r][c]), .ac_b(ac[r-1][c+1]),
          .to_a(pd_a[r][c]), .to_b(pd_b[r][c])
        );
      end else begin : g_no_pd
        assign pd_a[r][c] = 1'b0;
        assign pd_b[r][c] = 1'b0;
      end

      // Negative diagonal link to (r+1, c+1).
      if (r < N - 1 && c < N - 1) begin : g_nd
        link_cell u_link (
          .clk(clk), .rst_n(rst_n),
          .we  (lnk_we & row_en[r] & row_en[r+1] & col_en[c] & col_en[c+1]),
          .ac_a(ac[r][c]), .ac_b(ac[r+1][c+1]),
          .to_a(nd_a[r][c]), .to_b(nd_b[r][c])
        );
      end else begin : g_no_nd
        assign nd_a[r][c] = 1'b0;
        assign nd_b[r][c] = 1'b0;
      end
    end

    // Counter at the right end of row r.
    ones_counter #(.N(N), .W(CW)) u_row_cnt (
      .clk(clk), .rst_n(rst_n), .clr(cnt_clr),
      .inc(cmd.strobe && (cmd.op == OP_SHR || cmd.op == OP_SRA) && cmd.dir == DIR_RIGHT),
      .bit_in(ac[r][N-1]),
      .count(row_cnt[r])
    );
  end

  for (genvar c = 0; c < N; c++) begin : g_col_cnt
    // Counter on top of column c.
    ones_counter #(.N(N), .W(CW)) u_col_cnt (
      .clk(clk), .rst_n(rst_n), .clr(cnt_clr),
      .inc(cmd.strobe && (cmd.op == OP_SHR || cmd.op == OP_SRA) && cmd.dir == DIR_UP),
      .bit_in(ac[0][c]),
      .count(col_cnt[c])
    );
  end

  assign exp_changed = |chg;

endmodule

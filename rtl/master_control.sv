// Master control of the array processor (the part that drives the array).
//
// Accepts one order at a time from the host computer and runs it through a nine-pulse
// memory cycle (pulse_chain), broadcasting an array_cmd_t to every module:
//   pulse 1  set the memory read flip-flop MRFF (memory bit selected and read)
//   pulse 3  strobe: modules update AC (ADD MPY COM SHR SRA EXP) or links (LNK);
//            master-control orders CLC RDC ISR ISC take effect
//   pulse 4  clear MRFF
//   pulse 6  set the memory write flip-flop MWFF
//   pulse 7  write, first half: reset the selected bit (STO only)
//   pulse 8  write, second half: set the selected bit where AC is one (STO only); clear MWFF
//   pulse 9  end of cycle (reset of the logic); done is high
// Pulses 1, 4, 6 and 8 follow the reference design's pulse chain. Its pulses 2, 3, 5 and
// 7 load and restore a memory buffer register and drive an inhibit flip-flop, which the
// chosen memory does not have; placing the strobe on pulse 3 and the two write halves on
// pulses 7 and 8 is this design's choice. During EXP the chain holds on pulse 3 for as
// long as the array reports that some accumulator still changes, so EXP takes 9 clocks
// plus one per extra step of spreading.
//
// The memory address matrix (mem_addr_matrix) decodes the order's address while MRFF or
// MWFF is set. The master control also holds the row and column isolation masks (a module
// acts only if both its row and its column are enabled; all are enabled after reset),
// the fill column fed into the left edge on a rightward SHR, and the in-out register that
// receives an edge counter on RDC. For RDC, data[LOGN-1:0] picks the row or column and
// data[LOGN] picks column counters (1) or row counters (0).
//
// Handshake: order_ready is high when idle or on pulse 9; an order is taken when
// order_valid and order_ready are both high, and order and order_data must be valid then.
module master_control
  import ap_pkg::*;
#(
  parameter int unsigned N        = 32,
  parameter int unsigned MEM_BITS = 16,
  parameter int unsigned CW       = $clog2(N + 1),
  parameter int unsigned PULSES   = 9
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // host side
  input  logic                   order_valid,
  output logic                   order_ready,
  input  order_t                 order,
  input  logic [N-1:0]           order_data,
  output logic [CW-1:0]          io_reg,    // in-out register
  output logic                   done,      // last time pulse of an order
  // array side
  output array_cmd_t             cmd,
  output logic [MEM_BITS-1:0]    sel,
  output logic [N-1:0]           row_en,
  output logic [N-1:0]           col_en,
  output logic [N-1:0]           fill,
  output logic                   cnt_clr,
  input  logic                   exp_changed,
  input  logic [N-1:0][CW-1:0]   row_cnt,
  input  logic [N-1:0][CW-1:0]   col_cnt
);

  localparam int unsigned LOGN = $clog2(N);
  localparam int unsigned AW   = $clog2(MEM_BITS);

  order_t        cur;
  logic [N-1:0]  cur_data;
  logic          busy;
  logic          mrff, mwff;
  logic [PULSES-1:0] tp;
  logic          pc_idle, pc_last;
  logic          take;
  logic          hold;
  logic          strobe;

  assign order_ready = pc_idle || pc_last;
  assign take        = order_valid && order_ready;
  assign strobe      = busy && tp[2];
  assign hold        = strobe && cur.op == OP_EXP && exp_changed;
  assign done        = busy && pc_last;

  pulse_chain #(.PULSES(PULSES)) u_pulses (
    .clk  (clk),
    .rst_n(rst_n),
    .start(take),
    .hold (hold),
    .tp   (tp),
    .idle (pc_idle),
    .last (pc_last)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur      <= '0;
      cur_data <= '0;
      busy     <= 1'b0;
    end else if (take) begin
      cur      <= order;
      cur_data <= order_data;
      busy     <= 1'b1;
    end else if (pc_last) begin
      busy     <= 1'b0;
    end
  end

  // Memory read and write flip-flops.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mrff <= 1'b0;
      mwff <= 1'b0;
    end else begin
      if (busy && tp[0]) mrff <= 1'b1;
      if (busy && tp[3]) mrff <= 1'b0;
      if (busy && tp[5]) mwff <= 1'b1;
      if (busy && tp[7]) mwff <= 1'b0;
    end
  end

  mem_addr_matrix #(.MEM_BITS(MEM_BITS), .AW(AW)) u_addr (
    .en  (mrff || mwff),
    .addr(cur.addr[AW-1:0]),
    .sel (sel)
  );

  always_comb begin
    cmd.op      = cur.op;
    cmd.src     = cur.src;
    cmd.dir     = cur.dir;
    cmd.kind    = cur.kind;
    cmd.strobe  = strobe;
    cmd.mem_rd  = mrff;
    cmd.mem_clr = busy && mwff && tp[6];
    cmd.mem_set = busy && mwff && tp[7];
  end

  assign fill    = (cur.op == OP_SHR && cur.dir == DIR_RIGHT) ? cur_data : '0;
  assign cnt_clr = strobe && cur.op == OP_CLC;

  // Isolation masks and in-out register.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row_en <= '1;
      col_en <= '1;
      io_reg <= '0;
    end else if (strobe) begin
      unique case (cur.op)
        OP_ISR: row_en <= cur_data;
        OP_ISC: col_en <= cur_data;
        OP_RDC: io_reg <= cur_data[LOGN] ? col_cnt[cur_data[LOGN-1:0]]
                                         : row_cnt[cur_data[LOGN-1:0]];
        default: ;
      endcase
    end
  end

  // The address matrix never selects more than one bit.
  a_sel_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(sel));
  // An order is only taken while the previous one is finishing or none is running.
  a_take_ready: assert property (@(posedge clk) disable iff (!rst_n) take |-> (pc_idle || pc_last));

endmodule

// Logical module of the array processor.
//
// Each module holds a one-bit accumulator (AC) and its own MEM_BITS-bit memory and
// carries out the order broadcast by the master control on every strobe:
//   ADD  AC := AC or operand      MPY  AC := AC and operand      COM  AC := not AC
//   STO  memory[addr] := AC (two-pulse write: reset the bit, then set it if AC is one)
//   SHR / SRA  AC := shift_in, the accumulator of the neighbour the data comes from
//   EXP  AC := AC or exp_in, the ones offered through set links of the chosen kind
// The operand is either the selected bit of the module's own memory or the accumulator of
// the module above, below, left or right (zero beyond the edge of the array). The order
// set and the operand choice follow the reference design; its gate-level module schematic
// is not reproduced, so the logic here is the plainest that performs the orders.
//
// en is the isolation gate between the master control and this module: with en low the
// module ignores every order, so operations happen only in the isolated part of the array.
//
// changed reports, during EXP, that this module's AC would still rise; the master control
// repeats the EXP step until no module reports a change, which stands in for the
// asynchronous spreading of a one along a chain of links in the original circuits.
//
// Timing: AC and memory update on the rising clock edge of a strobe / write pulse.
module ap_module
  import ap_pkg::*;
#(
  parameter int unsigned MEM_BITS = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,        // isolation gate
  input  array_cmd_t          cmd,       // broadcast order and time-pulse controls
  input  logic [MEM_BITS-1:0] sel,       // memory bit select from the address matrix
  input  logic                nb_up,     // neighbour accumulators (0 outside the array)
  input  logic                nb_down,
  input  logic                nb_left,
  input  logic                nb_right,
  input  logic                shift_in,  // accumulator arriving on SHR / SRA
  input  logic                exp_in,    // ones offered through links during EXP
  output logic                ac,
  output logic                changed    // EXP would still change AC
);

  logic mem_out;
  logic operand;
  logic ac_next;
  logic ac_upd;

  module_memory #(.MEM_BITS(MEM_BITS)) u_mem (
    .clk  (clk),
    .rst_n(rst_n),
    .sel  (sel),
    .rd   (cmd.mem_rd),
    .clr  (en && cmd.op == OP_STO && cmd.mem_clr),
    .set  (en && cmd.op == OP_STO && cmd.mem_set),
    .din  (ac),
    .dout (mem_out)
  );

  always_comb begin
    unique case (cmd.src)
      SRC_UP:    operand = nb_up;
      SRC_DOWN:  operand = nb_down;
      SRC_LEFT:  operand = nb_left;
      SRC_RIGHT: operand = nb_right;
      default:   operand = mem_out;
    endcase
  end

  always_comb begin
    ac_upd  = 1'b1;
    ac_next = ac;
    unique case (cmd.op)
      OP_ADD:         ac_next = ac | operand;
      OP_MPY:         ac_next = ac & operand;
      OP_COM:         ac_next = ~ac;
      OP_SHR, OP_SRA: ac_next = shift_in;
      OP_EXP:         ac_next = ac | exp_in;
      default:        ac_upd  = 1'b0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                        ac <= 1'b0;
    else if (en && cmd.strobe && ac_upd) ac <= ac_next;
  end

  assign changed = en && cmd.op == OP_EXP && ac_next != ac;

endmodule

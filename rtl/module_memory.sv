// Per-module bit memory of the array processor.
//
// Every logical module owns MEM_BITS one-bit storage elements. They are not addressed
// inside the module: the master control decodes the address once for the whole array
// (mem_addr_matrix) and drives a one-hot select line per bit, shared by the same bit of
// every module. Read-out is non-destructive and needs no memory buffer register: while
// rd is high the selected bit appears on dout. A write takes two pulses, as in the
// reference design: clr resets the selected bit to zero, then set raises it again if din
// (the accumulator) is one. With no bit selected, clr and set do nothing.
//
// Timing: dout is combinational from sel and rd; clr and set act on the rising clock
// edge. Reset (rst_n low) clears all bits; the power-up contents are this design's choice.
module module_memory #(
  parameter int unsigned MEM_BITS = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [MEM_BITS-1:0] sel,   // one-hot bit select from the address matrix
  input  logic                rd,    // read enable (memory read flip-flop)
  input  logic                clr,   // reset selected bit
  input  logic                set,   // set selected bit when din is one
  input  logic                din,
  output logic                dout
);

  logic [MEM_BITS-1:0] bits;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bits <= '0;
    end else if (clr) begin
      bits <= bits & ~sel;
    end else if (set && din) begin
      bits <= bits | sel;
    end
  end

  assign dout = rd & |(bits & sel);

endmodule

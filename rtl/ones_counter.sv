// Edge binary counter of the array processor.
//
// One counter sits at the end of every row and on top of every column. Each time the
// array shifts towards the counter, the bit leaving the edge module arrives at the
// counter, which adds it to its count. After N shifts the counter holds the number of
// ones that were in its row or column; the master control can then read it into its
// in-out register. Only the function of this counter is given by the reference design;
// the plain synchronous up-counter with a clear input is this design's choice.
//
// Timing: count updates on the rising edge when inc is high and bit_in is one; clr has
// priority and zeroes the count. W bits hold counts 0..N.
module ones_counter #(
  parameter int unsigned N = 32,
  parameter int unsigned W = $clog2(N + 1)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         inc,     // a shift towards this counter is happening
  input  logic         bit_in,  // accumulator of the edge module
  output logic [W-1:0] count
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              count <= '0;
    else if (clr)            count <= '0;
    else if (inc && bit_in)  count <= count + W'(1);
  end

endmodule

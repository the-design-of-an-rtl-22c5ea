// Inter-module link element of the array processor.
//
// A one-bit memory element sits between every pair of adjacent modules, diagonal
// neighbours included. The LNK order records in it whether both modules hold a one in
// their accumulators. During EXP a set link lets a one pass between its two modules:
// to_a offers module b's accumulator to module a and to_b offers a's to b. The array
// chooses which kind of link (horizontal, vertical, positive or negative diagonal) an EXP
// order listens to.
//
// Timing: the link bit is written on the rising edge when we is high; to_a and to_b are
// combinational. Reset clears the link, which is this design's choice.
module link_cell (
  input  logic clk,
  input  logic rst_n,
  input  logic we,     // LNK strobe, both modules enabled
  input  logic ac_a,
  input  logic ac_b,
  output logic to_a,   // b's one passed to a through the link
  output logic to_b    // a's one passed to b through the link
);

  logic link;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  link <= 1'b0;
    else if (we) link <= ac_a & ac_b;
  end

  assign to_a = link & ac_b;
  assign to_b = link & ac_a;

endmodule

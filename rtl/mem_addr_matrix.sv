// Memory address selection matrix of the master control.
//
// Decodes the binary memory address of an order into one selection line per memory bit.
// In the reference hardware a selection current entering at I finds exactly one
// superconducting path, picked by the address input pairs (0 and 1 of each address bit),
// and leaves on the line of the designated address; the same lines drive the same bit in
// every module of the array. Here the matrix is a one-hot decoder gated by the current
// enable en. Purely combinational.
module mem_addr_matrix #(
  parameter int unsigned MEM_BITS = 16,
  parameter int unsigned AW       = $clog2(MEM_BITS)
) (
  input  logic                en,    // selection current present
  input  logic [AW-1:0]       addr,  // memory address input
  output logic [MEM_BITS-1:0] sel    // selection line per address
);

  always_comb begin
    sel = '0;
    for (int unsigned i = 0; i < MEM_BITS; i++) begin
      sel[i] = en && (addr == AW'(i));
    end
  end

endmodule

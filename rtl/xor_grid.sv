// xor_grid: XOR network of the test-per-clock generator.
//
// The CUT's M*N primary inputs form an N x M grid. The grid point in row i
// and column j is a two-input XOR of seed bit j and twisted ring counter
// output i:  x[i*M + j] = seed[j] ^ j_in[i].
// Because one counter bit changes per Clock2 pulse, one whole row changes at
// a time and every column sees a single-input-change sequence, each column
// its own copy shaped by its seed bit. The flattening order of the grid is
// this design's choice.
//
// Purely combinational.
module xor_grid #(
  parameter int unsigned M = 6,   // seed width, columns
  parameter int unsigned N = 6    // counter length, rows
) (
  input  logic [M-1:0]   seed,
  input  logic [N-1:0]   j_in,
  output logic [M*N-1:0] x
);

  always_comb begin
    for (int i = 0; i < N; i++)
      for (int c = 0; c < M; c++)
        x[i*M + c] = seed[c] ^ j_in[i];
  end

endmodule

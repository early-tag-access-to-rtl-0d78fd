// parity_gen: the one-bit parity segment of a word. `parity` is 1 when the
// word holds an odd number of 1s and 0 when it holds an even number (even
// parity: the word plus this bit always has an even number of 1s).
// Purely combinational.
module parity_gen #(
  parameter int WIDTH = 8
) (
  input  logic [WIDTH-1:0] data,
  output logic             parity
);
  assign parity = ^data;
endmodule

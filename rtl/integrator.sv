// integrator: collapses the WORDS x WIDTH matrix of stored words into one
// WIDTH-bit output word. The row selected by the encoded match address is
// gated onto the output when `hit` is set; on a miss the output is all
// zeros. Each output bit is the OR over the rows of (row selected AND stored
// bit), i.e. a one-hot AND-OR multiplexer. That the integrator turns the
// matrix into a single 8-bit result follows the text; selecting the row with
// the encoder's address and zero-on-miss are this design's choices.
// Combinational.
module integrator #(
  parameter int WORDS = 8,
  parameter int WIDTH = 8,
  parameter int AW    = $clog2(WORDS)
) (
  input  logic [WORDS-1:0][WIDTH-1:0] stored,
  input  logic                        hit,
  input  logic [AW-1:0]               match_addr,
  output logic [WIDTH-1:0]            data_out
);
  always_comb begin
    data_out = '0;
    for (int w = 0; w < WORDS; w++) begin
      if (hit && (match_addr == AW'(w))) data_out = data_out | stored[w];
    end
  end
endmodule

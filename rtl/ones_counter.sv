// ones_counter: counts the 1 bits of a word (the "counting bits" of the
// pre-computation scheme). Used once for the search word and once for each
// word as it is written, so that stored counts can be compared with the
// search count before the full comparison. Purely combinational; the output
// is wide enough to hold WIDTH itself.
module ones_counter #(
  parameter int WIDTH = 8,
  parameter int CW    = $clog2(WIDTH + 1)
) (
  input  logic [WIDTH-1:0] data,
  output logic [CW-1:0]    count
);
  always_comb begin
    count = '0;
    for (int i = 0; i < WIDTH; i++) count = count + CW'(data[i]);
  end
endmodule

// cam_matrix: WORDS x WIDTH array of cam_cell (8 x 8 by default).
// Each row is one stored word; a write port loads a whole row. The search
// word is driven on the search lines of every row at once, and the matrix
// returns the per-bit compare result of every cell (`bit_match`) together
// with the stored words. Turning that matrix into match lines is left to
// ml_encoder. The 8 x 8 organisation follows the description of the cell
// matrix; the row write port is this design's choice.
// Timing: writes at the clock edge, compare outputs are combinational.
module cam_matrix #(
  parameter int WORDS = 8,
  parameter int WIDTH = 8,
  parameter int AW    = $clog2(WORDS)
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         wr_en,
  input  logic [AW-1:0]                wr_addr,
  input  logic [WIDTH-1:0]             wr_data,
  input  logic [WIDTH-1:0]             search,
  output logic [WORDS-1:0][WIDTH-1:0]  stored,
  output logic [WORDS-1:0][WIDTH-1:0]  bit_match
);
  for (genvar w = 0; w < WORDS; w++) begin : g_row
    logic row_we;
    assign row_we = wr_en && (wr_addr == AW'(w));
    for (genvar b = 0; b < WIDTH; b++) begin : g_bit
      cam_cell u_cell (
        .clk   (clk),
        .rst_n (rst_n),
        .we    (row_we),
        .d     (wr_data[b]),
        .sl    (search[b]),
        .q     (stored[w][b]),
        .match (bit_match[w][b])
      );
    end
  end
endmodule

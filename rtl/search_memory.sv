// search_memory: content-search memory of WORDS words of WIDTH bits (8 x 8)
// with a ones-count and parity pre-filter in front of the match lines.
//
// Each stored word carries two extra segments computed when it is written:
// its count of 1s (ones_counter) and its parity bit (parity_gen). A search
// presents a word on the search lines of the cam_matrix; its own count and
// parity are computed the same way. ml_encoder enables only the words whose
// count and then parity agree with the search word, evaluates the match
// lines of those words from the matrix compare results, and encodes the
// match. The integrator turns the matched row into one WIDTH-bit output.
//
// Operations (one per cycle, `init` has priority over write and search):
//   init            - clears every valid bit (the memory-initialise step);
//   wr_en           - stores wr_data in word wr_addr and marks it valid;
//   srch_en         - searches srch_data. Results appear on the rsp_* outputs
//                     one clock later with rsp_valid high for one cycle.
// A write and a search in the same cycle are allowed; the search sees the
// memory as it was before the write.
// The four-stage structure (cell, matrix, encoder, integrator) and the
// count/parity filtering follow the text; the registered one-cycle search
// latency, the valid bits and the port set are this design's choices.
module search_memory #(
  parameter int WORDS = 8,
  parameter int WIDTH = 8,
  parameter int AW    = $clog2(WORDS),
  parameter int CW    = $clog2(WIDTH + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               init,
  input  logic               wr_en,
  input  logic [AW-1:0]      wr_addr,
  input  logic [WIDTH-1:0]   wr_data,
  input  logic               srch_en,
  input  logic [WIDTH-1:0]   srch_data,
  output logic               rsp_valid,
  output logic               rsp_hit,
  output logic [AW-1:0]      rsp_addr,
  output logic [WIDTH-1:0]   rsp_data,
  output logic [WORDS-1:0]   rsp_ml,
  output logic [CW-1:0]      rsp_sensed
);
  logic [WORDS-1:0][WIDTH-1:0] stored, bit_match;
  logic [WORDS-1:0]            valid_q;
  logic [WORDS-1:0][CW-1:0]    count_q;
  logic [WORDS-1:0]            parity_q;
  logic [CW-1:0]               wr_count, srch_count;
  logic                        wr_parity, srch_parity;
  logic [WORDS-1:0]            cnt_ok, par_ok, ml;
  logic                        hit;
  logic [AW-1:0]               match_addr;
  logic [CW-1:0]               sensed;
  logic [WIDTH-1:0]            data_out;
  logic                        do_write;

  assign do_write = wr_en && !init;

  cam_matrix #(.WORDS(WORDS), .WIDTH(WIDTH)) u_matrix (
    .clk, .rst_n, .wr_en(do_write), .wr_addr, .wr_data,
    .search(srch_data), .stored, .bit_match
  );

  ones_counter #(.WIDTH(WIDTH)) u_wr_cnt   (.data(wr_data),   .count(wr_count));
  ones_counter #(.WIDTH(WIDTH)) u_srch_cnt (.data(srch_data), .count(srch_count));
  parity_gen   #(.WIDTH(WIDTH)) u_wr_par   (.data(wr_data),   .parity(wr_parity));
  parity_gen   #(.WIDTH(WIDTH)) u_srch_par (.data(srch_data), .parity(srch_parity));

  // Counting-bit and parity-bit segments, one entry per word.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q  <= '0;
      count_q  <= '0;
      parity_q <= '0;
    end else if (init) begin
      valid_q  <= '0;
    end else if (wr_en) begin
      valid_q[wr_addr]  <= 1'b1;
      count_q[wr_addr]  <= wr_count;
      parity_q[wr_addr] <= wr_parity;
    end
  end

  ml_encoder #(.WORDS(WORDS), .WIDTH(WIDTH)) u_enc (
    .bit_match, .valid(valid_q), .stored_count(count_q), .stored_parity(parity_q),
    .search_count(srch_count), .search_parity(srch_parity),
    .cnt_ok, .par_ok, .ml, .hit, .match_addr, .sensed
  );

  integrator #(.WORDS(WORDS), .WIDTH(WIDTH)) u_int (
    .stored, .hit, .match_addr, .data_out
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rsp_valid  <= 1'b0;
      rsp_hit    <= 1'b0;
      rsp_addr   <= '0;
      rsp_data   <= '0;
      rsp_ml     <= '0;
      rsp_sensed <= '0;
    end else begin
      rsp_valid <= srch_en && !init;
      if (srch_en && !init) begin
        rsp_hit    <= hit;
        rsp_addr   <= match_addr;
        rsp_data   <= data_out;
        rsp_ml     <= ml;
        rsp_sensed <= sensed;
      end
    end
  end
endmodule

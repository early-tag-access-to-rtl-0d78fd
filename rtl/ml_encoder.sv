// ml_encoder: the match-line (ML) sensing and encoding stage of the search
// memory. For every stored word it decides whether the word matches the
// search word, in the order the search steps prescribe:
//   1. counting stage  - only words whose stored count of 1s equals the
//                        count of the search word stay enabled (`cnt_ok`);
//   2. parity stage    - of those, only words whose stored parity bit equals
//                        the search parity stay enabled (`par_ok`);
//   3. ML sensing      - only the enabled words have their match line
//                        evaluated from the per-bit compare matrix; a word
//                        with no enable is a miss without being sensed.
// The matched lines are then encoded into `hit` and the address of the
// lowest-numbered matching word. `sensed` counts how many match lines were
// evaluated in the last stage, the quantity the pre-filter is meant to keep
// small. The order of the stages follows the text; the lowest-index
// priority on multiple matches is this design's choice. (Equal counts imply
// equal parities, so stage 2 never removes a word that stage 1 kept; it is
// kept because the scheme describes both checks.) Combinational.
module ml_encoder #(
  parameter int WORDS = 8,
  parameter int WIDTH = 8,
  parameter int AW    = $clog2(WORDS),
  parameter int CW    = $clog2(WIDTH + 1)
) (
  input  logic [WORDS-1:0][WIDTH-1:0] bit_match,   // per-cell compare results
  input  logic [WORDS-1:0]            valid,       // word holds data
  input  logic [WORDS-1:0][CW-1:0]    stored_count,
  input  logic [WORDS-1:0]            stored_parity,
  input  logic [CW-1:0]               search_count,
  input  logic                        search_parity,
  output logic [WORDS-1:0]            cnt_ok,      // passed the counting stage
  output logic [WORDS-1:0]            par_ok,      // passed the parity stage
  output logic [WORDS-1:0]            ml,          // match lines
  output logic                        hit,
  output logic [AW-1:0]               match_addr,
  output logic [CW-1:0]               sensed       // match lines evaluated
);
  always_comb begin
    hit        = 1'b0;
    match_addr = '0;
    sensed     = '0;
    for (int w = 0; w < WORDS; w++) begin
      cnt_ok[w] = valid[w] && (stored_count[w] == search_count);
      par_ok[w] = cnt_ok[w] && (stored_parity[w] == search_parity);
      ml[w]     = par_ok[w] && (&bit_match[w]);
      sensed    = sensed + CW'(par_ok[w]);
    end
    for (int w = WORDS - 1; w >= 0; w--) begin
      if (ml[w]) begin
        hit        = 1'b1;
        match_addr = AW'(w);
      end
    end
  end
endmodule

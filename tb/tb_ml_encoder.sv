// tb_ml_encoder: random stored words and search words (half of them copies
// of a stored word, sometimes duplicated). Compare matrix, counts and
// parities are derived from the words; in some trials the stored count or
// parity segment of a word is deliberately made inconsistent, which must
// keep that word from matching even when all its bits compare equal.
// Checks the stage enables, match lines, hit, lowest matching address and
// the number of sensed lines.
module tb_ml_encoder;
  localparam int WORDS = 8, WIDTH = 8, CW = 4;
  logic [WORDS-1:0][WIDTH-1:0] bit_match;
  logic [WORDS-1:0]            valid;
  logic [WORDS-1:0][CW-1:0]    stored_count;
  logic [WORDS-1:0]            stored_parity;
  logic [CW-1:0]               search_count;
  logic                        search_parity;
  logic [WORDS-1:0]            cnt_ok, par_ok, ml;
  logic                        hit;
  logic [2:0]                  match_addr;
  logic [CW-1:0]               sensed;
  int checks = 0, failures = 0;

  ml_encoder #(.WORDS(WORDS), .WIDTH(WIDTH)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [WIDTH-1:0] words [WORDS];
    logic [WIDTH-1:0] s;
    logic [WORDS-1:0] e_cnt, e_par, e_ml;
    int e_addr, e_sensed;
    int n_hits = 0, n_filtered = 0;
    for (int t = 0; t < 400; t++) begin
      for (int w = 0; w < WORDS; w++) begin
        words[w] = 8'($urandom);
        if ($urandom % 4 == 0) words[w] = words[$urandom % WORDS];
      end
      s = (t % 2 == 0) ? words[$urandom % WORDS] : 8'($urandom);
      valid = WORDS'($urandom) | WORDS'($urandom);
      search_count  = CW'($countones(s));
      search_parity = ^s;
      for (int w = 0; w < WORDS; w++) begin
        bit_match[w]     = ~(words[w] ^ s);
        stored_count[w]  = CW'($countones(words[w]));
        stored_parity[w] = ^words[w];
      end
      if (t % 5 == 1) stored_count[$urandom % WORDS] = CW'($urandom);
      if (t % 7 == 3) stored_parity[$urandom % WORDS] ^= 1'b1;
      #1;
      e_addr = -1;
      e_sensed = 0;
      for (int w = 0; w < WORDS; w++) begin
        e_cnt[w] = valid[w] && stored_count[w] == search_count;
        e_par[w] = e_cnt[w] && stored_parity[w] == search_parity;
        e_ml[w]  = e_par[w] && words[w] == s;
        if (e_par[w]) e_sensed++;
        if (e_ml[w] && e_addr < 0) e_addr = w;
        if (valid[w] && words[w] == s && !e_ml[w]) n_filtered++;
      end
      checks++;
      if (cnt_ok !== e_cnt || par_ok !== e_par || ml !== e_ml || hit !== (e_addr >= 0) ||
          (e_addr >= 0 && match_addr !== 3'(e_addr)) || sensed !== CW'(e_sensed)) begin
        failures++;
        $display("FAIL t=%0d ml=%b exp=%b addr=%0d exp=%0d sensed=%0d exp=%0d",
                 t, ml, e_ml, match_addr, e_addr, sensed, e_sensed);
      end
      if (e_addr >= 0) n_hits++;
    end
    checks++;
    if (n_hits == 0 || n_filtered == 0) begin
      failures++;
      $display("FAIL coverage hits=%0d filtered=%0d", n_hits, n_filtered);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

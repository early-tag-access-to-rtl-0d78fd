// tb_search_memory: first runs the five-word example (00000000, 00100001,
// 10000001, 00000101, 00011111 in lines 0-4, search 00000101: three lines
// sensed, line 3 matches). Then fills all 8 words (00000101 in lines 3
// and 6), and issues back-to-back searches,
// half for stored words and half random, checking hit, lowest matching
// address, output word, match-line vector and number of sensed lines against
// a reference model, and that each result arrives exactly one clock after
// its search. Also checks that init empties the memory.
module tb_search_memory;
  localparam int WORDS = 8, WIDTH = 8;
  logic clk = 0, rst_n = 0, init = 0, wr_en = 0, srch_en = 0;
  logic [2:0] wr_addr = '0;
  logic [WIDTH-1:0] wr_data = '0, srch_data = '0;
  logic rsp_valid, rsp_hit;
  logic [2:0] rsp_addr;
  logic [WIDTH-1:0] rsp_data;
  logic [WORDS-1:0] rsp_ml;
  logic [3:0] rsp_sensed;
  logic [WIDTH-1:0] model [WORDS];
  logic [WORDS-1:0] mvalid;
  int checks = 0, failures = 0;

  search_memory #(.WORDS(WORDS), .WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected result of searching s
  task automatic expect_result(input logic [WIDTH-1:0] s);
    logic [WORDS-1:0] e_ml;
    int e_addr, e_sensed;
    e_addr = -1;
    e_sensed = 0;
    for (int w = 0; w < WORDS; w++) begin
      e_ml[w] = mvalid[w] && model[w] == s;
      if (mvalid[w] && $countones(model[w]) == $countones(s)) e_sensed++;
      if (e_ml[w] && e_addr < 0) e_addr = w;
    end
    checks++;
    if (!rsp_valid || rsp_hit !== (e_addr >= 0) || rsp_ml !== e_ml ||
        rsp_sensed !== 4'(e_sensed) ||
        (e_addr >= 0 && (rsp_addr !== 3'(e_addr) || rsp_data !== s)) ||
        (e_addr < 0 && rsp_data !== '0)) begin
      failures++;
      $display("FAIL s=%b valid=%0b hit=%0b addr=%0d exp=%0d ml=%b exp=%b sensed=%0d exp=%0d",
               s, rsp_valid, rsp_hit, rsp_addr, e_addr, rsp_ml, e_ml, rsp_sensed, e_sensed);
    end
  endtask

  initial begin
    logic [WIDTH-1:0] prev;
    mvalid = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // five-word example: lines 0-4, search 00000101; the counting stage keeps
    // lines 1, 2 and 3 (two 1s each) and only line 3 matches
    for (int w = 0; w < 5; w++) begin
      @(negedge clk);
      wr_en = 1;
      wr_addr = 3'(w);
      wr_data = (w == 0) ? 8'b0000_0000 : (w == 1) ? 8'b0010_0001 : (w == 2) ? 8'b1000_0001 :
                (w == 3) ? 8'b0000_0101 : 8'b0001_1111;
      model[w] = wr_data;
      mvalid[w] = 1;
    end
    @(negedge clk);
    wr_en = 0;
    srch_en = 1; srch_data = 8'b0000_0101;
    @(negedge clk);
    srch_en = 0;
    expect_result(8'b0000_0101);
    checks++;
    if (rsp_addr !== 3'd3 || rsp_sensed !== 4'd3 || rsp_ml !== 8'b0000_1000) begin
      failures++;
      $display("FAIL five-word example addr=%0d sensed=%0d ml=%b", rsp_addr, rsp_sensed, rsp_ml);
    end
    // fill: line 3 holds the worked example word
    for (int w = 0; w < WORDS; w++) begin
      @(negedge clk);
      wr_en = 1;
      wr_addr = 3'(w);
      wr_data = (w == 3) ? 8'b0000_0101 : ((w == 6) ? 8'b0000_0101 : 8'($urandom));
      model[w] = wr_data;
      mvalid[w] = 1;
    end
    @(negedge clk);
    wr_en = 0;
    // worked example: 00000101 matches line 3 (and line 6), lowest wins
    srch_en = 1; srch_data = 8'b0000_0101;
    @(negedge clk);
    srch_en = 0;
    expect_result(8'b0000_0101);
    checks++;
    if (rsp_addr !== 3'd3) begin failures++; $display("FAIL example addr=%0d", rsp_addr); end
    @(negedge clk);
    checks++;
    if (rsp_valid) begin failures++; $display("FAIL rsp_valid without search"); end
    // back-to-back searches with occasional rewrites
    prev = 'x;
    for (int t = 0; t < 300; t++) begin
      logic [WIDTH-1:0] s;
      s = (t % 2 == 0) ? model[$urandom % WORDS] : 8'($urandom);
      srch_en = 1; srch_data = s;
      @(negedge clk);
      expect_result(s);
      if ($urandom % 5 == 0) begin
        srch_en = 0;
        wr_en = 1; wr_addr = 3'($urandom); wr_data = 8'($urandom);
        model[wr_addr] = wr_data; mvalid[wr_addr] = 1;
        @(negedge clk);
        wr_en = 0;
      end
    end
    srch_en = 0;
    // init clears the memory
    @(negedge clk); init = 1;
    @(negedge clk); init = 0; mvalid = '0;
    srch_en = 1; srch_data = model[0];
    @(negedge clk); srch_en = 0;
    expect_result(model[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

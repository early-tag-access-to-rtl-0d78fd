// tb_tag_array: random tag writes into a 64-set, 2-way tag array tracked by
// a reference model; random lookups with every combination of way enables
// check that only enabled ways can hit and that the hit way is reported.
// A second phase emulates transient errors: a tag bit is flipped and the
// line is looked up with an identical tag present in the left neighbour
// set, the right neighbour set (also across the wrap-around at sets 0 and
// 63) or in neither. The first must be repaired (hit, err_corrected, and
// no error on the next lookup), the last invalidated (miss,
// err_uncorrectable, then a clean miss); a disabled way must report nothing.
module tb_tag_array;
  localparam int SETS = 64, WAYS = 2, TAG_W = 24;
  logic clk = 0, rst_n = 0, wr_en = 0;
  logic [5:0] rd_set = '0, wr_set = '0;
  logic [TAG_W-1:0] rd_tag = '0, wr_tag = '0;
  logic [WAYS-1:0] way_en = '0, way_hit;
  logic hit;
  logic [0:0] hit_way, wr_way = '0;
  logic inj_en = 0;
  logic [5:0] inj_set = '0;
  logic [0:0] inj_way = '0;
  logic [4:0] inj_bit = '0;
  logic err_corrected, err_uncorrectable;
  int n_fix = 0, n_unc = 0;
  logic             mvalid [SETS][WAYS];
  logic [TAG_W-1:0] mtag [SETS][WAYS];
  int checks = 0, failures = 0, n_hit = 0, n_masked = 0;

  tag_array #(.SETS(SETS), .WAYS(WAYS), .TAG_W(TAG_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < SETS; s++) for (int w = 0; w < WAYS; w++) mvalid[s][w] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      logic [WAYS-1:0] e_hit;
      @(negedge clk);
      wr_en = ($urandom % 2) == 0;
      wr_set = 6'($urandom % 8);
      wr_way = 1'($urandom);
      wr_tag = TAG_W'($urandom % 4);
      if (wr_en) begin mvalid[wr_set][wr_way] = 1; mtag[wr_set][wr_way] = wr_tag; end
      @(negedge clk);
      wr_en = 0;
      rd_set = 6'($urandom % 8);
      rd_tag = TAG_W'($urandom % 4);
      way_en = WAYS'($urandom);
      #1;
      for (int w = 0; w < WAYS; w++)
        e_hit[w] = way_en[w] && mvalid[rd_set][w] && mtag[rd_set][w] == rd_tag;
      checks++;
      if (way_hit !== e_hit || hit !== (|e_hit) ||
          (|e_hit && hit_way !== (e_hit[0] ? 1'b0 : 1'b1))) begin
        failures++;
        $display("FAIL set=%0d tag=%0d en=%b hit=%b exp=%b", rd_set, rd_tag, way_en, way_hit, e_hit);
      end
      if (|e_hit) n_hit++;
      for (int w = 0; w < WAYS; w++)
        if (!way_en[w] && mvalid[rd_set][w] && mtag[rd_set][w] == rd_tag) n_masked++;
    end
    checks++;
    if (n_hit == 0 || n_masked == 0) begin failures++; $display("FAIL coverage"); end
    // transient errors
    for (int t = 0; t < 300; t++) begin
      int s, w, nb;
      logic [TAG_W-1:0] tg;
      logic en_w;
      @(negedge clk); rst_n = 0;
      @(negedge clk); rst_n = 1;
      s  = (t % 10 == 0) ? 0 : ((t % 10 == 1) ? 63 : 1 + $urandom % 62);
      w  = $urandom % 2;
      tg = TAG_W'($urandom);
      nb = $urandom % 3;                                  // 0 none, 1 left, 2 right
      wr_en = 1; wr_set = 6'(s); wr_way = 1'(w); wr_tag = tg;
      @(negedge clk);
      // neighbours: identical tag in the chosen one, a distant tag elsewhere
      wr_set = 6'(s - 1); wr_way = 1'($urandom); wr_tag = (nb == 1) ? tg : tg ^ 24'h0f0f00;
      @(negedge clk);
      wr_set = 6'(s + 1); wr_way = 1'($urandom); wr_tag = (nb == 2) ? tg : tg ^ 24'h00f0f0;
      @(negedge clk);
      wr_en = 0;
      inj_en = 1; inj_set = 6'(s); inj_way = 1'(w); inj_bit = 5'($urandom % TAG_W);
      @(negedge clk);
      inj_en = 0;
      en_w = ($urandom % 4) != 0;
      rd_set = 6'(s); rd_tag = tg; way_en = en_w ? (2'b01 << w) : (2'b10 >> w);
      #1;
      checks++;
      if (!en_w) begin
        if (hit || err_corrected || err_uncorrectable) begin
          failures++; $display("FAIL disabled way reported t=%0d", t);
        end
        continue;
      end
      if (nb != 0) begin
        if (!hit || hit_way !== 1'(w) || !err_corrected || err_uncorrectable) begin
          failures++; $display("FAIL repair t=%0d s=%0d nb=%0d hit=%0b fix=%0b unc=%0b", t, s, nb, hit, err_corrected, err_uncorrectable);
        end
        n_fix++;
      end else begin
        if (hit || err_corrected || !err_uncorrectable) begin
          failures++; $display("FAIL uncorrectable t=%0d hit=%0b fix=%0b unc=%0b", t, hit, err_corrected, err_uncorrectable);
        end
        n_unc++;
      end
      @(negedge clk);
      way_en = 2'b11;
      #1;
      checks++;
      if (hit !== (nb != 0) || err_corrected || err_uncorrectable) begin
        failures++; $display("FAIL after repair t=%0d hit=%0b", t, hit);
      end
    end
    checks++;
    if (n_fix == 0 || n_unc == 0) begin failures++; $display("FAIL error coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

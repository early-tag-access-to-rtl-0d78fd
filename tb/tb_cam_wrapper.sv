// tb_cam_wrapper: preloads the search memory, checks the latency of one
// search through the empty FIFOs (result flagged by data_rdy_out_p one
// clock after the word is written, readable one clock later), then streams
// 400 random search words with random enable and random reads so that both
// the input FIFO fills up and the output FIFO back-pressures the search.
// Every result read is compared, in order, with a reference model.
module tb_cam_wrapper;
  localparam int WORDS = 8, WIDTH = 8, DEPTH = 8;
  logic clk = 0, rst_n = 0, en = 0, ld_en = 0, wr_en = 0, rd_en = 0;
  logic [2:0] ld_addr = '0;
  logic [WIDTH-1:0] ld_data = '0, wr_data = '0;
  logic in_full, rd_hit, out_empty, data_rdy;
  logic [2:0] rd_addr;
  logic [WIDTH-1:0] rd_data;
  logic [WIDTH-1:0] model [WORDS];
  logic [WIDTH-1:0] sent [$];
  int checks = 0, failures = 0, n_full = 0, n_backpressure = 0, n_hits = 0;

  cam_wrapper #(.WORDS(WORDS), .WIDTH(WIDTH), .DEPTH(DEPTH)) dut (
    .clk_in_p(clk), .reset_in_pn(rst_n), .en_in_p(en),
    .ld_en_in_p(ld_en), .ld_addr_in_p(ld_addr), .ld_data_in_p(ld_data),
    .wr_en_in_p(wr_en), .wr_data_in_p(wr_data), .inputfifo_full_out_p(in_full),
    .rd_en_in_p(rd_en), .rd_hit_out_p(rd_hit), .rd_addr_out_p(rd_addr),
    .rd_data_out_p(rd_data), .outputfifo_empty_out_p(out_empty), .data_rdy_out_p(data_rdy)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_head();
    logic [WIDTH-1:0] s;
    int e_addr;
    s = sent.pop_front();
    e_addr = -1;
    for (int w = WORDS - 1; w >= 0; w--) if (model[w] == s) e_addr = w;
    checks++;
    if (rd_hit !== (e_addr >= 0) || (e_addr >= 0 && (rd_addr !== 3'(e_addr) || rd_data !== s))) begin
      failures++;
      $display("FAIL s=%b hit=%0b addr=%0d exp=%0d data=%b", s, rd_hit, rd_addr, e_addr, rd_data);
    end
    if (e_addr >= 0) n_hits++;
  endtask

  initial begin
    int pushed;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < WORDS; w++) begin
      @(negedge clk);
      ld_en = 1; ld_addr = 3'(w); ld_data = 8'($urandom); model[w] = ld_data;
    end
    @(negedge clk);
    ld_en = 0;
    // latency of a single search
    en = 1; wr_en = 1; wr_data = model[5]; sent.push_back(model[5]);
    @(negedge clk);
    wr_en = 0;
    checks++;
    if (data_rdy || !out_empty) begin failures++; $display("FAIL result too early"); end
    @(negedge clk);
    checks++;
    if (!data_rdy || !out_empty) begin failures++; $display("FAIL data_rdy not one clock after issue"); end
    @(negedge clk);
    checks++;
    if (out_empty) begin failures++; $display("FAIL result not readable"); end
    check_head();
    rd_en = 1;
    @(negedge clk);
    rd_en = 0;
    // streaming with random enable and reads
    pushed = 0;
    for (int cyc = 0; cyc < 4000 && (pushed < 400 || sent.size() != 0); cyc++) begin
      wr_en = (pushed < 400) && !in_full && ($urandom % 3 != 0);
      if (wr_en) begin
        wr_data = ($urandom % 2) ? model[$urandom % WORDS] : 8'($urandom);
        sent.push_back(wr_data);
        pushed++;
      end
      en = ($urandom % 4) != 0;
      rd_en = !out_empty && (cyc < 600 ? ($urandom % 4 == 0) : ($urandom % 2 == 0));
      if (in_full) n_full++;
      if (!out_empty && dut.out_count == 5'(DEPTH) && !dut.in_empty) n_backpressure++;
      if (rd_en) check_head();
      @(negedge clk);
      wr_en = 0;
      rd_en = 0;
    end
    checks++;
    if (sent.size() != 0 || n_full == 0 || n_backpressure == 0 || n_hits == 0) begin
      failures++;
      $display("FAIL left=%0d full=%0d backpressure=%0d hits=%0d", sent.size(), n_full, n_backpressure, n_hits);
    end
    $display("input-full cycles=%0d back-pressure cycles=%0d hits=%0d", n_full, n_backpressure, n_hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_cam_matrix: random row writes into the 8 x 8 matrix, tracked in a
// reference array; after every write a random search word is applied and
// every stored bit and every per-cell compare result is checked.
module tb_cam_matrix;
  localparam int WORDS = 8, WIDTH = 8;
  logic clk = 0, rst_n = 0, wr_en = 0;
  logic [2:0] wr_addr = '0;
  logic [WIDTH-1:0] wr_data = '0, search = '0;
  logic [WORDS-1:0][WIDTH-1:0] stored, bit_match;
  logic [WIDTH-1:0] model [WORDS];
  int checks = 0, failures = 0;

  cam_matrix #(.WORDS(WORDS), .WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int w = 0; w < WORDS; w++) begin
      for (int b = 0; b < WIDTH; b++) begin
        checks++;
        if (stored[w][b] !== model[w][b] ||
            bit_match[w][b] !== (model[w][b] == search[b])) begin
          failures++;
          $display("FAIL w=%0d b=%0d stored=%b model=%b search=%b", w, b, stored[w], model[w], search);
        end
      end
    end
  endtask

  initial begin
    for (int w = 0; w < WORDS; w++) model[w] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 60; i++) begin
      @(negedge clk);
      wr_en   = ($urandom % 4) != 0;
      wr_addr = 3'($urandom);
      wr_data = 8'($urandom);
      if (wr_en) model[wr_addr] = wr_data;
      @(negedge clk);
      wr_en  = 0;
      search = (i % 2 == 0) ? model[$urandom % WORDS] : 8'($urandom);
      #1;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_cam_cell: writes 0 and 1 into the cell and compares each stored value
// with both search values; checks the stored bit, the match output, that a
// write with we low is ignored, and that reset clears the bit.
module tb_cam_cell;
  logic clk = 0, rst_n = 0, we = 0, d = 0, sl = 0;
  logic q, match;
  int checks = 0, failures = 0;

  cam_cell dut (.clk, .rst_n, .we, .d, .sl, .q, .match);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic exp_q);
    for (int s = 0; s < 2; s++) begin
      sl = s[0];
      #1;
      checks++;
      if (q !== exp_q || match !== (exp_q == s[0])) begin
        failures++;
        $display("FAIL q=%0b exp=%0b sl=%0b match=%0b", q, exp_q, sl, match);
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    check(1'b0);
    rst_n = 1;
    for (int i = 0; i < 8; i++) begin
      logic v;
      v = i[0] ^ i[1];
      @(negedge clk); we = 1; d = v;
      @(negedge clk); we = 0; d = ~v;
      check(v);
      @(negedge clk);
      check(v);            // write disabled: value held
    end
    @(negedge clk); we = 1; d = 1;
    @(negedge clk); we = 0;
    check(1'b1);
    rst_n = 0; #1;
    check(1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ones_counter: every 8-bit word, counts compared with a bit-by-bit
// shift-and-add reference.
module tb_ones_counter;
  logic [7:0] data;
  logic [3:0] count;
  int checks = 0, failures = 0;

  ones_counter #(.WIDTH(8)) dut (.data, .count);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      int exp_c;
      int t;
      data = v[7:0];
      exp_c = 0;
      t = v;
      while (t != 0) begin
        exp_c += t % 2;
        t = t / 2;
      end
      #1;
      checks++;
      if (count != 4'(exp_c)) begin
        failures++;
        $display("FAIL data=%b count=%0d exp=%0d", data, count, exp_c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

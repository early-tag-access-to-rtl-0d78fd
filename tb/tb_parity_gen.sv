// tb_parity_gen: every 8-bit word; the parity must make the total number of
// 1s (word plus parity bit) even.
module tb_parity_gen;
  logic [7:0] data;
  logic       parity;
  int checks = 0, failures = 0;

  parity_gen #(.WIDTH(8)) dut (.data, .parity);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      data = v[7:0];
      #1;
      checks++;
      if ((($countones(data) + int'(parity)) % 2) != 0) begin
        failures++;
        $display("FAIL data=%b parity=%0b", data, parity);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

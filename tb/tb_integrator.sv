// tb_integrator: random 8 x 8 matrices with random hit and address; the
// output must be the addressed row on a hit and zero on a miss.
module tb_integrator;
  localparam int WORDS = 8, WIDTH = 8;
  logic [WORDS-1:0][WIDTH-1:0] stored;
  logic                        hit;
  logic [2:0]                  match_addr;
  logic [WIDTH-1:0]            data_out;
  int checks = 0, failures = 0;

  integrator #(.WORDS(WORDS), .WIDTH(WIDTH)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      logic [WIDTH-1:0] e;
      for (int w = 0; w < WORDS; w++) stored[w] = 8'($urandom);
      hit = ($urandom % 4) != 0;
      match_addr = 3'($urandom);
      e = hit ? stored[match_addr] : 8'h00;
      #1;
      checks++;
      if (data_out !== e) begin
        failures++;
        $display("FAIL hit=%0b addr=%0d out=%h exp=%h", hit, match_addr, data_out, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

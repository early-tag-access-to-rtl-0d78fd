// tb_tlb: random fills into an 8-entry TLB tracked by a reference model that
// replays the same replacement rule (refill of a present page in place,
// otherwise round-robin victim); after each fill, random lookups of present
// and absent pages check hit and the translated address.
module tb_tlb;
  localparam int ENTRIES = 8;
  logic clk = 0, rst_n = 0, fill_en = 0;
  logic [31:0] va = '0, pa;
  logic hit;
  logic [19:0] fill_vpn = '0, fill_ppn = '0;
  logic        mvalid [ENTRIES];
  logic [19:0] mvpn [ENTRIES], mppn [ENTRIES];
  int rr = 0;
  int checks = 0, failures = 0, n_hit = 0, n_miss = 0;

  tlb #(.ENTRIES(ENTRIES)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic lookup(input logic [31:0] a);
    int e;
    e = -1;
    for (int i = 0; i < ENTRIES; i++) if (mvalid[i] && mvpn[i] == a[31:12]) e = i;
    va = a;
    #1;
    checks++;
    if (hit !== (e >= 0) || (e >= 0 && pa !== {mppn[e], a[11:0]})) begin
      failures++;
      $display("FAIL va=%h hit=%0b exp=%0b pa=%h", a, hit, e >= 0, pa);
    end
    if (e >= 0) n_hit++; else n_miss++;
  endtask

  initial begin
    for (int i = 0; i < ENTRIES; i++) mvalid[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    lookup(32'h1234_5678);
    for (int t = 0; t < 200; t++) begin
      int e;
      @(negedge clk);
      fill_en = 1;
      fill_vpn = 20'($urandom % 24);
      fill_ppn = 20'($urandom);
      e = -1;
      for (int i = 0; i < ENTRIES; i++) if (mvalid[i] && mvpn[i] == fill_vpn) e = i;
      if (e < 0) begin
        e = rr;
        rr = (rr + 1) % ENTRIES;
      end
      mvalid[e] = 1; mvpn[e] = fill_vpn; mppn[e] = fill_ppn;
      @(negedge clk);
      fill_en = 0;
      for (int k = 0; k < 4; k++) lookup({20'($urandom % 24), 12'($urandom)});
    end
    checks++;
    if (n_hit == 0 || n_miss == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

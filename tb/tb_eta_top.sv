// tb_eta_top: end-to-end test of the whole design at its default sizes.
// Cache side: a processor-like stream of 3000 loads and stores with
// locality enters the LSQ; the testbench plays the TLB miss handler and the
// next-level memory. Every instruction must complete once, in program order,
// loads must return the last value stored, and each instruction must
// activate 1, 2 or 3 tag ways according to its access kind. One-way access,
// conventional access, wrong prediction, cache miss, TLB miss, LSQ full and
// a store waiting for data must each happen at least once. Random tag-bit
// errors are injected; repairs and uncorrectable tags must both occur and
// data must stay correct.
// Search side: 8 words are preloaded (word 3 is 00000101), then 500 search
// words are streamed through the FIFOs, half of them stored words; every
// result is checked against a reference and the input FIFO must fill up.
module tb_eta_top;
  import eta_pkg::*;
  localparam int N = 3000;
  localparam int CAM_N = 500;
  logic clk = 0, rst_n = 0;
  logic dc_enq_valid = 0, dc_enq_data_rdy = 0, dc_sd_valid = 0, dc_tlb_fill_en = 0, dc_mem_ack = 0;
  mem_op_e dc_enq_op = OP_LOAD;
  logic [31:0] dc_enq_va = '0, dc_enq_data = '0, dc_sd_data = '0, dc_mem_rdata = '0;
  logic [2:0] dc_sd_idx = '0, dc_enq_idx;
  logic [19:0] dc_tlb_fill_vpn = '0, dc_tlb_fill_ppn = '0, dc_tlb_miss_vpn;
  logic dc_enq_ready, dc_enq_pred, dc_tlb_miss, dc_resp_valid, dc_store_waiting;
  logic dc_mem_req_valid, dc_mem_req_we;
  logic [31:0] dc_resp_va, dc_resp_rdata, dc_mem_req_addr, dc_mem_req_wdata;
  mem_op_e dc_resp_op;
  acc_kind_e dc_resp_kind;
  logic [1:0] dc_tag_way_en, dc_data_way_en;

  eta_top dut (.*);

  // search memory side
  logic cam_en = 0, cam_ld_en = 0, cam_wr_en = 0, cam_rd_en = 0;
  logic [2:0] cam_ld_addr = '0, cam_rd_addr;
  logic [7:0] cam_ld_data = '0, cam_wr_data = '0, cam_rd_data;
  logic cam_inputfifo_full, cam_rd_hit, cam_outputfifo_empty, cam_data_rdy;
  logic [7:0] cam_words [8];
  logic [7:0] cam_sent [$];
  int cam_pushed = 0, cam_results = 0, cam_hits = 0, cam_full = 0;

  always #5 clk = ~clk;

  typedef struct { mem_op_e op; logic [31:0] va; logic [31:0] data; bit rdy; bit pred; int idx; } instr_t;
  instr_t inflight [$];
  logic [31:0] dmem [logic [31:0]];   // memory below the cache
  logic [31:0] ref_mem [logic [31:0]]; // architectural reference
  logic [31:0] recent [16];
  logic [31:0] last_va = '0;
  int checks = 0, failures = 0;
  int n_kind [4];
  int n_tlb_miss = 0, n_full = 0, n_wait = 0, n_sent = 0, n_done = 0, acts = 0, total_acts = 0;
  int mcnt = 0, lat = 1, tlb_wait = 0;
  logic dc_inj_en = 0;
  logic [5:0] dc_inj_set = '0;
  logic [0:0] dc_inj_way = '0;
  logic [4:0] dc_inj_bit = '0;
  logic dc_tag_err_corrected, dc_tag_err_uncorrectable;
  int n_fix = 0, n_unc = 0;

  function automatic logic [19:0] ppn_of(logic [19:0] vpn);
    return 20'(vpn * 7 + 3);
  endfunction
  function automatic logic [31:0] pa_of(logic [31:0] va);
    return {ppn_of(va[31:12]), va[11:0]};
  endfunction
  function automatic logic [31:0] init_val(logic [31:0] pa);
    return pa ^ 32'hc0de_0000;
  endfunction

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) recent[i] = {20'($urandom % 10), 10'($urandom), 2'b00};
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < 8; w++) begin
      @(negedge clk);
      cam_ld_en = 1; cam_ld_addr = 3'(w); cam_ld_data = (w == 3) ? 8'b0000_0101 : 8'($urandom);
      cam_words[w] = cam_ld_data;
    end
    @(negedge clk);
    cam_ld_en = 0;
    while (n_done < N || cam_results < CAM_N) begin
      @(negedge clk);
      // next-level memory
      dc_mem_ack = 0;
      if (dc_mem_req_valid) begin
        mcnt++;
        if (mcnt >= lat) begin
          dc_mem_ack = 1;
          if (dc_mem_req_we) dmem[dc_mem_req_addr] = dc_mem_req_wdata;
          else dc_mem_rdata = dmem.exists(dc_mem_req_addr) ? dmem[dc_mem_req_addr] : init_val(dc_mem_req_addr);
          mcnt = 0;
          lat = 1 + $urandom % 3;
        end
      end
      // TLB miss handler
      dc_tlb_fill_en = 0;
      if (dc_tlb_miss) begin
        tlb_wait++;
        if (tlb_wait == 1) n_tlb_miss++;
        if (tlb_wait == 3) begin
          dc_tlb_fill_en = 1; dc_tlb_fill_vpn = dc_tlb_miss_vpn; dc_tlb_fill_ppn = ppn_of(dc_tlb_miss_vpn);
          tlb_wait = 0;
        end
      end
      // transient errors in the data cache tag array. Only tag bits 23..11
      // are hit: every physical page of this test is below 128, so those
      // bits are zero in all real tags and no other tag can lie one bit away
      // from a corrupted one, which keeps each repair unambiguous.
      dc_inj_en = ($urandom % 40) == 0;
      dc_inj_set = 6'($urandom); dc_inj_way = 1'($urandom); dc_inj_bit = 5'(11 + $urandom % 13);
      // late store data
      dc_sd_valid = 0;
      foreach (inflight[i]) begin
        if (!dc_sd_valid && inflight[i].op == OP_STORE && !inflight[i].rdy && $urandom % 4 == 0) begin
          dc_sd_valid = 1; dc_sd_idx = 3'(inflight[i].idx); dc_sd_data = inflight[i].data;
          inflight[i].rdy = 1;
        end
      end
      // address generation
      if (!dc_enq_ready) n_full++;
      if (dc_store_waiting) n_wait++;
      dc_enq_valid = (n_sent < N) && ($urandom % 4 != 0);
      dc_enq_op = mem_op_e'($urandom % 3 == 0);
      if ($urandom % 10 < 6) dc_enq_va = recent[$urandom % 16];
      else if ($urandom % 2 == 0) dc_enq_va = last_va + 32'd4;                    // sequential
      else if ($urandom % 2 == 0) dc_enq_va = {20'($urandom % 10), 10'($urandom), 2'b00};
      else dc_enq_va = {20'($urandom % 10), 2'($urandom), 6'($urandom % 2), 4'b0000};  // two hot sets
      recent[$urandom % 16] = dc_enq_va;
      last_va = dc_enq_va;
      dc_enq_data = $urandom;
      dc_enq_data_rdy = (dc_enq_op == OP_LOAD) || ($urandom % 3 != 0);
      // search memory traffic
      cam_wr_en = (cam_pushed < CAM_N) && !cam_inputfifo_full && ($urandom % 2 == 0);
      cam_wr_data = ($urandom % 2) ? cam_words[$urandom % 8] : 8'($urandom);
      if (cam_wr_en) begin cam_sent.push_back(cam_wr_data); cam_pushed++; end
      if (cam_inputfifo_full) cam_full++;
      cam_en = ($urandom % 3) != 0;
      cam_rd_en = !cam_outputfifo_empty && ($urandom % 4 == 0);
      #1;
      if (cam_rd_en) begin
        logic [7:0] s;
        int e_addr;
        s = cam_sent.pop_front();
        e_addr = -1;
        for (int w = 7; w >= 0; w--) if (cam_words[w] == s) e_addr = w;
        checks++;
        if (cam_rd_hit !== (e_addr >= 0) || (e_addr >= 0 && (cam_rd_addr !== 3'(e_addr) || cam_rd_data !== s))) begin
          failures++;
          $display("FAIL search %b hit=%0b addr=%0d exp=%0d", s, cam_rd_hit, cam_rd_addr, e_addr);
        end
        if (e_addr >= 0) cam_hits++;
        cam_results++;
      end
      if (dc_tag_err_corrected) n_fix++;
      if (dc_tag_err_uncorrectable) n_unc++;
      acts += $countones(dc_tag_way_en);
      if (dc_enq_valid && dc_enq_ready) begin
        instr_t e;
        e.op = dc_enq_op; e.va = dc_enq_va; e.data = dc_enq_data; e.rdy = dc_enq_data_rdy;
        e.pred = dc_enq_pred; e.idx = int'(dc_enq_idx);
        inflight.push_back(e);
        n_sent++;
      end
      if (dc_resp_valid) begin
        instr_t e;
        logic [31:0] pa;
        int e_acts;
        e = inflight.pop_front();
        pa = pa_of(e.va);
        checks++;
        if (dc_resp_op !== e.op || dc_resp_va !== e.va) begin
          failures++;
          $display("FAIL order: got %s %h exp %s %h", dc_resp_op.name(), dc_resp_va, e.op.name(), e.va);
        end
        if (e.op == OP_STORE) ref_mem[pa] = e.data;
        else begin
          logic [31:0] ev;
          ev = ref_mem.exists(pa) ? ref_mem[pa] : init_val(pa);
          checks++;
          if (dc_resp_rdata !== ev) begin
            failures++;
            $display("FAIL load va=%h data=%h exp=%h", e.va, dc_resp_rdata, ev);
          end
        end
        case (dc_resp_kind)
          ACC_ONE_WAY:    e_acts = 1;
          ACC_CONV:       e_acts = 2;
          ACC_MISPREDICT: e_acts = 3;
          default:        e_acts = e.pred ? 3 : 2;
        endcase
        checks++;
        if (acts != e_acts || (dc_resp_kind == ACC_ONE_WAY && !e.pred) || (dc_resp_kind == ACC_CONV && e.pred) ||
            (dc_resp_kind == ACC_MISPREDICT && !e.pred)) begin
          failures++;
          $display("FAIL kind=%s pred=%0b activations=%0d exp=%0d", dc_resp_kind.name(), e.pred, acts, e_acts);
        end
        n_kind[dc_resp_kind]++;
        total_acts += acts;
        acts = 0;
        n_done++;
      end
    end
    @(negedge clk);
    dc_enq_valid = 0;
    checks++;
    if (inflight.size() != 0 || n_tlb_miss == 0 || n_full == 0 || n_wait == 0 || total_acts >= 2 * N) begin
      failures++;
      $display("FAIL left=%0d dc_tlb_miss=%0d full=%0d wait=%0d acts=%0d", inflight.size(), n_tlb_miss, n_full, n_wait, total_acts);
    end
    checks++;
    if (cam_results != CAM_N || cam_hits == 0 || cam_hits == CAM_N || cam_full == 0) begin
      failures++;
      $display("FAIL search side results=%0d hits=%0d input-full=%0d", cam_results, cam_hits, cam_full);
    end
    $display("searches=%0d hits=%0d input-FIFO-full cycles=%0d", cam_results, cam_hits, cam_full);
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (n_kind[k] == 0) begin failures++; $display("FAIL access kind %0d never happened", k); end
    end
    $display("instructions=%0d one-way=%0d conventional=%0d mispredicted=%0d miss=%0d tlb-miss=%0d lsq-full-cycles=%0d store-wait-cycles=%0d",
             N, n_kind[ACC_ONE_WAY], n_kind[ACC_CONV], n_kind[ACC_MISPREDICT], n_kind[ACC_MISS], n_tlb_miss, n_full, n_wait);
    checks++;
    if (n_fix == 0 || n_unc == 0) begin failures++; $display("FAIL tag repair never exercised"); end
    $display("tag errors repaired=%0d uncorrectable=%0d", n_fix, n_unc);
    $display("tag-way activations=%0d (conventional cache: %0d)", total_acts, 2 * N);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

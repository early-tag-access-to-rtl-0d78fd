// tb_eta_partial: the traffic of tb_eta_cache (processor-like loads and
// stores, TLB miss handler, next-level memory, injected tag errors) run on
// an ETA cache whose LSQ stage compares only the low 4 tag bits (partial
// tag comparison). Partial matches may name a wrong way; all results must
// still be correct, the activation count of every instruction must fit its
// access kind, and wrong predictions must now be frequent (at least 1% of
// instructions).
module tb_eta_partial;
  import eta_pkg::*;
  localparam int N = 3000;
  logic clk = 0, rst_n = 0;
  logic enq_valid = 0, enq_data_rdy = 0, sd_valid = 0, tlb_fill_en = 0, mem_ack = 0;
  mem_op_e enq_op = OP_LOAD;
  logic [31:0] enq_va = '0, enq_data = '0, sd_data = '0, mem_rdata = '0;
  logic [2:0] sd_idx = '0, enq_idx;
  logic [19:0] tlb_fill_vpn = '0, tlb_fill_ppn = '0, tlb_miss_vpn;
  logic enq_ready, enq_pred, tlb_miss, resp_valid, store_waiting;
  logic mem_req_valid, mem_req_we;
  logic [31:0] resp_va, resp_rdata, mem_req_addr, mem_req_wdata;
  mem_op_e resp_op;
  acc_kind_e resp_kind;
  logic [1:0] tag_way_en, data_way_en;

  eta_cache #(.LSQ_TAG_BITS(4)) dut (.*);

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
  logic inj_en = 0;
  logic [5:0] inj_set = '0;
  logic [0:0] inj_way = '0;
  logic [4:0] inj_bit = '0;
  logic tag_err_corrected, tag_err_uncorrectable;
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
    while (n_done < N) begin
      @(negedge clk);
      // next-level memory
      mem_ack = 0;
      if (mem_req_valid) begin
        mcnt++;
        if (mcnt >= lat) begin
          mem_ack = 1;
          if (mem_req_we) dmem[mem_req_addr] = mem_req_wdata;
          else mem_rdata = dmem.exists(mem_req_addr) ? dmem[mem_req_addr] : init_val(mem_req_addr);
          mcnt = 0;
          lat = 1 + $urandom % 3;
        end
      end
      // TLB miss handler
      tlb_fill_en = 0;
      if (tlb_miss) begin
        tlb_wait++;
        if (tlb_wait == 1) n_tlb_miss++;
        if (tlb_wait == 3) begin
          tlb_fill_en = 1; tlb_fill_vpn = tlb_miss_vpn; tlb_fill_ppn = ppn_of(tlb_miss_vpn);
          tlb_wait = 0;
        end
      end
      // transient errors in the data cache tag array. Only tag bits 23..11
      // are hit: every physical page of this test is below 128, so those
      // bits are zero in all real tags and no other tag can lie one bit away
      // from a corrupted one, which keeps each repair unambiguous.
      inj_en = ($urandom % 40) == 0;
      inj_set = 6'($urandom); inj_way = 1'($urandom); inj_bit = 5'(11 + $urandom % 13);
      // late store data
      sd_valid = 0;
      foreach (inflight[i]) begin
        if (!sd_valid && inflight[i].op == OP_STORE && !inflight[i].rdy && $urandom % 4 == 0) begin
          sd_valid = 1; sd_idx = 3'(inflight[i].idx); sd_data = inflight[i].data;
          inflight[i].rdy = 1;
        end
      end
      // address generation
      if (!enq_ready) n_full++;
      if (store_waiting) n_wait++;
      enq_valid = (n_sent < N) && ($urandom % 4 != 0);
      enq_op = mem_op_e'($urandom % 3 == 0);
      if ($urandom % 10 < 6) enq_va = recent[$urandom % 16];
      else if ($urandom % 2 == 0) enq_va = last_va + 32'd4;                    // sequential
      else if ($urandom % 2 == 0) enq_va = {20'($urandom % 10), 10'($urandom), 2'b00};
      else enq_va = {20'($urandom % 10), 2'($urandom), 6'($urandom % 2), 4'b0000};  // two hot sets
      recent[$urandom % 16] = enq_va;
      last_va = enq_va;
      enq_data = $urandom;
      enq_data_rdy = (enq_op == OP_LOAD) || ($urandom % 3 != 0);
      #1;
      if (tag_err_corrected) n_fix++;
      if (tag_err_uncorrectable) n_unc++;
      acts += $countones(tag_way_en);
      if (enq_valid && enq_ready) begin
        instr_t e;
        e.op = enq_op; e.va = enq_va; e.data = enq_data; e.rdy = enq_data_rdy;
        e.pred = enq_pred; e.idx = int'(enq_idx);
        inflight.push_back(e);
        n_sent++;
      end
      if (resp_valid) begin
        instr_t e;
        logic [31:0] pa;
        int e_acts;
        e = inflight.pop_front();
        pa = pa_of(e.va);
        checks++;
        if (resp_op !== e.op || resp_va !== e.va) begin
          failures++;
          $display("FAIL order: got %s %h exp %s %h", resp_op.name(), resp_va, e.op.name(), e.va);
        end
        if (e.op == OP_STORE) ref_mem[pa] = e.data;
        else begin
          logic [31:0] ev;
          ev = ref_mem.exists(pa) ? ref_mem[pa] : init_val(pa);
          checks++;
          if (resp_rdata !== ev) begin
            failures++;
            $display("FAIL load va=%h data=%h exp=%h", e.va, resp_rdata, ev);
          end
        end
        case (resp_kind)
          ACC_ONE_WAY:    e_acts = 1;
          ACC_CONV:       e_acts = 2;
          ACC_MISPREDICT: e_acts = 3;
          default:        e_acts = e.pred ? 3 : 2;
        endcase
        checks++;
        if (acts != e_acts || (resp_kind == ACC_ONE_WAY && !e.pred) || (resp_kind == ACC_CONV && e.pred) ||
            (resp_kind == ACC_MISPREDICT && !e.pred)) begin
          failures++;
          $display("FAIL kind=%s pred=%0b activations=%0d exp=%0d", resp_kind.name(), e.pred, acts, e_acts);
        end
        n_kind[resp_kind]++;
        total_acts += acts;
        acts = 0;
        n_done++;
      end
    end
    @(negedge clk);
    enq_valid = 0;
    checks++;
    if (inflight.size() != 0 || n_tlb_miss == 0 || n_full == 0 || n_wait == 0 || total_acts >= 2 * N) begin
      failures++;
      $display("FAIL left=%0d tlb_miss=%0d full=%0d wait=%0d acts=%0d", inflight.size(), n_tlb_miss, n_full, n_wait, total_acts);
    end
    checks++;
    if (n_kind[ACC_MISPREDICT] < N / 100) begin
      failures++;
      $display("FAIL only %0d wrong predictions with partial tags", n_kind[ACC_MISPREDICT]);
    end
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

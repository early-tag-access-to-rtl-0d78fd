// tb_dcache: random loads and stores to a small address range (8 sets,
// 4 tags, so lines collide and get replaced) with predictions that are
// correct, wrong or absent. A reference model of the tags, the most-recently
// used way of each set and the next-level memory (with 1 to 3 cycles of
// latency) predicts for every request how it must be served. Checked per
// request: load data, access kind, the number of tag-way activations
// (1 for a correct prediction, all ways for a conventional access, both for
// a wrong one), the data-array ways activated (the same ways for a load plus
// the refill write; one way for a store hit, none for a store miss), the cycle count, the refill written to the LSQ tag copy and
// every write-through.
module tb_dcache;
  import eta_pkg::*;
  localparam int SETS = 64, WAYS = 2;
  logic clk = 0, rst_n = 0;
  logic req_valid = 0, req_pred_valid = 0, mem_ack = 0;
  mem_op_e req_op = OP_LOAD;
  logic [31:0] req_pa = '0, req_wdata = '0, mem_rdata = '0;
  logic [0:0] req_pred_way = '0;
  logic done, mem_req_valid, mem_req_we, fill_valid;
  logic [31:0] done_rdata, mem_req_addr, mem_req_wdata;
  acc_kind_e done_kind;
  logic [WAYS-1:0] tag_way_en, data_way_en;
  logic [5:0] fill_set;
  logic [0:0] fill_way;
  logic [23:0] fill_tag;
  logic inj_en = 0;
  logic [5:0] inj_set = '0;
  logic [0:0] inj_way = '0;
  logic [4:0] inj_bit = '0;
  logic tag_err_corrected, tag_err_uncorrectable;

  logic [31:0] mem [logic [31:0]];
  logic        mvalid [8][2];
  logic [23:0] mtag [8][2];
  logic        mru [8];
  int checks = 0, failures = 0;
  int n_kind [4];

  dcache #(.SETS(SETS), .WAYS(WAYS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] rd_mem(logic [31:0] a);
    return mem.exists(a) ? mem[a] : (a ^ 32'h5a5a_0000);
  endfunction

  initial begin
    for (int s = 0; s < 8; s++) begin mvalid[s][0] = 0; mvalid[s][1] = 0; mru[s] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 1500; t++) begin
      int set, way, pmode, lat, acts, dacts, cycles, e_acts, e_dacts, e_cycles, mcnt;
      logic [23:0] tg;
      acc_kind_e e_kind;
      bit wrote, filled;
      @(negedge clk);
      set = $urandom % 8;
      tg = 24'($urandom % 4);
      req_op = mem_op_e'($urandom % 2);
      req_pa = {tg, 6'(set), 2'b00};
      req_wdata = $urandom;
      way = -1;
      for (int w = 0; w < 2; w++) if (mvalid[set][w] && mtag[set][w] == tg) way = w;
      pmode = $urandom % 3;                       // 0 none, 1 correct-if-possible, 2 other way
      req_pred_valid = (pmode != 0);
      req_pred_way = (pmode == 1 && way >= 0) ? 1'(way) : ((way >= 0) ? 1'(1 - way) : 1'($urandom));
      lat = 1 + $urandom % 3;
      // expected service
      if (req_pred_valid && way >= 0 && int'(req_pred_way) == way) begin e_kind = ACC_ONE_WAY; e_acts = 1; end
      else if (req_pred_valid && way >= 0) begin e_kind = ACC_MISPREDICT; e_acts = 3; end
      else if (way >= 0) begin e_kind = ACC_CONV; e_acts = 2; end
      else begin e_kind = ACC_MISS; e_acts = req_pred_valid ? 3 : 2; end
      if (req_op == OP_LOAD) e_dacts = e_acts + ((e_kind == ACC_MISS) ? 1 : 0);
      else e_dacts = (e_kind == ACC_MISS) ? 0 : 1;
      e_cycles = (e_kind == ACC_MISPREDICT || (e_kind == ACC_MISS && req_pred_valid)) ? 2 : 1;
      if (req_op == OP_STORE || e_kind == ACC_MISS) e_cycles += lat;
      req_valid = 1;
      acts = 0; dacts = 0; cycles = 0; mcnt = 0; wrote = 0; filled = 0;
      forever begin
        #1;
        cycles++;
        acts += $countones(tag_way_en);
        if (mem_req_valid) begin
          mcnt++;
          if (mcnt == lat) begin
            mem_ack = 1;
            mem_rdata = rd_mem(mem_req_addr);
            checks++;
            if (mem_req_addr !== req_pa || (mem_req_we && mem_req_wdata !== req_wdata) ||
                mem_req_we !== (req_op == OP_STORE)) begin
              failures++;
              $display("FAIL mem request addr=%h we=%0b", mem_req_addr, mem_req_we);
            end
            if (mem_req_we) begin mem[req_pa] = req_wdata; wrote = 1; end
          end
        end
        #1;
        dacts += $countones(data_way_en);
        if (fill_valid) begin
          filled = 1;
          checks++;
          if (fill_set !== 6'(set) || fill_tag !== tg || fill_way !== 1'(!mru[set])) begin
            failures++;
            $display("FAIL fill set=%0d way=%0d tag=%0d", fill_set, fill_way, fill_tag);
          end
        end
        if (done) break;
        @(negedge clk);
        mem_ack = 0;
        if (cycles > 20) break;
      end
      checks++;
      if (!done || done_kind !== e_kind || acts != e_acts || dacts != e_dacts || cycles != e_cycles ||
          (req_op == OP_LOAD && done_rdata !== rd_mem(req_pa)) ||
          (req_op == OP_STORE && !wrote) || (filled != (e_kind == ACC_MISS && req_op == OP_LOAD))) begin
        failures++;
        $display("FAIL t=%0d op=%s kind=%s exp=%s acts=%0d exp=%0d data-ways=%0d exp=%0d cycles=%0d exp=%0d data=%h exp=%h",
                 t, req_op.name(), done_kind.name(), e_kind.name(), acts, e_acts, dacts, e_dacts, cycles, e_cycles,
                 done_rdata, rd_mem(req_pa));
      end
      n_kind[e_kind]++;
      // update the model
      if (way >= 0) mru[set] = way[0];
      else if (req_op == OP_LOAD) begin
        mvalid[set][!mru[set]] = 1; mtag[set][!mru[set]] = tg; mru[set] = !mru[set];
      end
      @(negedge clk);
      mem_ack = 0;
      req_valid = 0;
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (n_kind[k] == 0) begin failures++; $display("FAIL kind %0d never seen", k); end
    end
    $display("one-way=%0d conventional=%0d mispredict=%0d miss=%0d",
             n_kind[ACC_ONE_WAY], n_kind[ACC_CONV], n_kind[ACC_MISPREDICT], n_kind[ACC_MISS]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

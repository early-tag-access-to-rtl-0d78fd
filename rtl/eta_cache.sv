// eta_cache: early-tag-access (ETA) data cache. The destination way of a
// memory instruction is looked up when it enters the load/store queue, so
// that the later cache access can activate just that one way of the tag and
// data arrays instead of all of them.
//
// LSQ stage: each instruction from address generation is translated by the
// LSQ TLB and looked up in the LSQ tag array, copies of the data cache's TLB
// and tag array. If both hit, the matching way is stored with the entry as
// its predicted destination way; otherwise the entry carries no prediction.
// Cache access stage: the oldest ready entry is translated by the data
// cache TLB and handed to dcache with its prediction. A correct prediction
// needs one way, a missing one all ways, a wrong one (the line moved after
// the LSQ lookup) one way and then all ways.
//
// The data cache tag array is parity protected and repairs a faulty tag
// from an identical one in an adjacent set (tag_err_* events, inj_* to
// emulate transient errors).
// LSQ_TAG_BITS below the full tag width turns the LSQ lookup into a partial
// tag comparison: the copy is smaller, and a partial match can name a wrong
// way, which the cache access stage detects like any stale prediction.
// Copies are kept equal by construction: both TLBs take every TLB fill and
// both tag arrays take every refill.
// If the data cache TLB misses for the head instruction, `tlb_miss` rises
// with the page number and the head waits until the page is filled through
// tlb_fill_*. Fills are expected only while the cache is idle (in answer to
// tlb_miss, or before traffic starts).
// Responses: `resp_valid` pulses once per instruction, in program order,
// with the load data (zero for stores) and how the access was served.
// The LSQ-stage copies and the one-way/conventional access follow the text;
// sizes, handshakes and miss handling are this design's choices.
module eta_cache
  import eta_pkg::*;
#(
  parameter int VA_W        = 32,
  parameter int PA_W        = 32,
  parameter int DATA_W      = 32,
  parameter int PAGE_BITS   = 12,
  parameter int TLB_ENTRIES = 8,
  parameter int SETS        = 64,
  parameter int WAYS        = 2,
  parameter int OFF_BITS    = 2,
  parameter int LSQ_DEPTH   = 8,
  parameter int SW          = $clog2(SETS),
  parameter int WW          = (WAYS > 1) ? $clog2(WAYS) : 1,
  parameter int IW          = $clog2(LSQ_DEPTH),
  parameter int TAG_W       = PA_W - SW - OFF_BITS,
  // low tag bits kept and compared by the LSQ copy of the tag array;
  // TAG_W = full copy, fewer = partial tag comparison at the LSQ stage
  parameter int LSQ_TAG_BITS = TAG_W
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // from address generation
  input  logic                      enq_valid,
  output logic                      enq_ready,
  input  mem_op_e                   enq_op,
  input  logic [VA_W-1:0]           enq_va,
  input  logic [DATA_W-1:0]         enq_data,
  input  logic                      enq_data_rdy,
  output logic [IW-1:0]             enq_idx,
  output logic                      enq_pred,     // early tag access hit
  input  logic                      sd_valid,
  input  logic [IW-1:0]             sd_idx,
  input  logic [DATA_W-1:0]         sd_data,
  // TLB miss handling
  output logic                      tlb_miss,
  output logic [VA_W-PAGE_BITS-1:0] tlb_miss_vpn,
  input  logic                      tlb_fill_en,
  input  logic [VA_W-PAGE_BITS-1:0] tlb_fill_vpn,
  input  logic [PA_W-PAGE_BITS-1:0] tlb_fill_ppn,
  // completion
  output logic                      resp_valid,
  output mem_op_e                   resp_op,
  output logic [VA_W-1:0]           resp_va,
  output logic [DATA_W-1:0]         resp_rdata,
  output acc_kind_e                 resp_kind,
  // way activity
  output logic [WAYS-1:0]           tag_way_en,
  output logic [WAYS-1:0]           data_way_en,
  output logic                      store_waiting,
  // next-level memory
  output logic                      mem_req_valid,
  output logic                      mem_req_we,
  output logic [PA_W-1:0]           mem_req_addr,
  output logic [DATA_W-1:0]         mem_req_wdata,
  input  logic                      mem_ack,
  input  logic [DATA_W-1:0]         mem_rdata,
  // transient-error injection into the data cache tag array, repair events
  input  logic                      inj_en,
  input  logic [SW-1:0]             inj_set,
  input  logic [WW-1:0]             inj_way,
  input  logic [$clog2(TAG_W)-1:0]  inj_bit,
  output logic                      tag_err_corrected,
  output logic                      tag_err_uncorrectable
);
  // LSQ stage: early tag access
  logic              ltlb_hit, ltag_hit;
  logic [PA_W-1:0]   ltlb_pa;
  logic [WAYS-1:0]   ltag_way_hit;
  logic [WW-1:0]     ltag_way;
  logic              fill_valid;
  logic [SW-1:0]     fill_set;
  logic [WW-1:0]     fill_way;
  logic [TAG_W-1:0]  fill_tag;

  tlb #(.VA_W(VA_W), .PA_W(PA_W), .PAGE_BITS(PAGE_BITS), .ENTRIES(TLB_ENTRIES)) u_lsq_tlb (
    .clk, .rst_n, .va(enq_va), .hit(ltlb_hit), .pa(ltlb_pa),
    .fill_en(tlb_fill_en), .fill_vpn(tlb_fill_vpn), .fill_ppn(tlb_fill_ppn)
  );

  tag_array #(.SETS(SETS), .WAYS(WAYS), .TAG_W(LSQ_TAG_BITS)) u_lsq_tags (
    .clk, .rst_n,
    .rd_set(ltlb_pa[OFF_BITS +: SW]), .rd_tag(ltlb_pa[OFF_BITS + SW +: LSQ_TAG_BITS]), .way_en('1),
    .way_hit(ltag_way_hit), .hit(ltag_hit), .hit_way(ltag_way),
    .wr_en(fill_valid), .wr_set(fill_set), .wr_way(fill_way), .wr_tag(fill_tag[LSQ_TAG_BITS-1:0]),
    .inj_en(1'b0), .inj_set('0), .inj_way('0), .inj_bit('0),
    .err_corrected(), .err_uncorrectable()
  );

  assign enq_pred = ltlb_hit && ltag_hit;

  logic              head_valid, head_pred_valid, lsq_empty, lsq_full;
  mem_op_e           head_op;
  logic [VA_W-1:0]   head_va;
  logic [DATA_W-1:0] head_data;
  logic [WW-1:0]     head_pred_way;
  logic              done;

  lsq #(.DEPTH(LSQ_DEPTH), .VA_W(VA_W), .DATA_W(DATA_W), .WAYS(WAYS)) u_lsq (
    .clk, .rst_n,
    .enq_valid, .enq_ready, .enq_op, .enq_va, .enq_data, .enq_data_rdy,
    .enq_pred_valid(enq_pred), .enq_pred_way(ltag_way), .enq_idx,
    .sd_valid, .sd_idx, .sd_data,
    .head_valid, .head_op, .head_va, .head_data, .head_pred_valid, .head_pred_way,
    .deq(done), .empty(lsq_empty), .full(lsq_full), .head_waiting(store_waiting)
  );

  // Cache access stage
  logic            mtlb_hit;
  logic [PA_W-1:0] mtlb_pa;

  tlb #(.VA_W(VA_W), .PA_W(PA_W), .PAGE_BITS(PAGE_BITS), .ENTRIES(TLB_ENTRIES)) u_dc_tlb (
    .clk, .rst_n, .va(head_va), .hit(mtlb_hit), .pa(mtlb_pa),
    .fill_en(tlb_fill_en), .fill_vpn(tlb_fill_vpn), .fill_ppn(tlb_fill_ppn)
  );

  assign tlb_miss     = head_valid && !mtlb_hit;
  assign tlb_miss_vpn = head_va[VA_W-1:PAGE_BITS];

  dcache #(.PA_W(PA_W), .DATA_W(DATA_W), .SETS(SETS), .WAYS(WAYS), .OFF_BITS(OFF_BITS)) u_dcache (
    .clk, .rst_n,
    .req_valid(head_valid && mtlb_hit), .req_op(head_op), .req_pa(mtlb_pa),
    .req_wdata(head_data), .req_pred_valid(head_pred_valid), .req_pred_way(head_pred_way),
    .done, .done_rdata(resp_rdata), .done_kind(resp_kind),
    .tag_way_en, .data_way_en,
    .mem_req_valid, .mem_req_we, .mem_req_addr, .mem_req_wdata, .mem_ack, .mem_rdata,
    .fill_valid, .fill_set, .fill_way, .fill_tag,
    .inj_en, .inj_set, .inj_way, .inj_bit, .tag_err_corrected, .tag_err_uncorrectable
  );

  assign resp_valid = done;
  assign resp_op    = head_op;
  assign resp_va    = head_va;
endmodule

// eta_top: the complete design. Two parts stand side by side, each with its
// own ports:
//  * eta_cache   - the early-tag-access data cache (LSQ stage with LSQ TLB
//                  and LSQ tag array, cache access stage with one-way or
//                  conventional access). Address generation, TLB miss
//                  handling and the next-level memory are outside and
//                  connect through the dc_* ports. Its tag array is parity
//                  protected with repair from adjacent sets (dc_inj_* emulate
//                  transient errors, dc_tag_err_* report repairs).
//  * cam_wrapper - the 8 x 8 search memory with ones-count and parity
//                  pre-filter, fed through an input FIFO and drained through
//                  an output FIFO (cam_* ports).
// The two share the clock and an active-low reset. How the search memory
// would be attached to the cache is not specified, so the two are kept
// separate. Timing of each part is described in its own module.
module eta_top
  import eta_pkg::*;
#(
  parameter int VA_W        = 32,
  parameter int PA_W        = 32,
  parameter int DATA_W      = 32,
  parameter int PAGE_BITS   = 12,
  parameter int TLB_ENTRIES = 8,
  parameter int SETS        = 64,
  parameter int WAYS        = 2,
  parameter int LSQ_DEPTH   = 8,
  parameter int LSQ_TAG_BITS = PA_W - $clog2(SETS) - 2,
  parameter int CAM_WORDS   = 8,
  parameter int CAM_WIDTH   = 8,
  parameter int FIFO_DEPTH  = 8,
  parameter int IW          = $clog2(LSQ_DEPTH),
  parameter int CAW         = $clog2(CAM_WORDS),
  parameter int WW          = (WAYS > 1) ? $clog2(WAYS) : 1,
  parameter int TBW         = $clog2(PA_W - $clog2(SETS) - 2)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // ETA data cache
  input  logic                      dc_enq_valid,
  output logic                      dc_enq_ready,
  input  mem_op_e                   dc_enq_op,
  input  logic [VA_W-1:0]           dc_enq_va,
  input  logic [DATA_W-1:0]         dc_enq_data,
  input  logic                      dc_enq_data_rdy,
  output logic [IW-1:0]             dc_enq_idx,
  output logic                      dc_enq_pred,
  input  logic                      dc_sd_valid,
  input  logic [IW-1:0]             dc_sd_idx,
  input  logic [DATA_W-1:0]         dc_sd_data,
  output logic                      dc_tlb_miss,
  output logic [VA_W-PAGE_BITS-1:0] dc_tlb_miss_vpn,
  input  logic                      dc_tlb_fill_en,
  input  logic [VA_W-PAGE_BITS-1:0] dc_tlb_fill_vpn,
  input  logic [PA_W-PAGE_BITS-1:0] dc_tlb_fill_ppn,
  output logic                      dc_resp_valid,
  output mem_op_e                   dc_resp_op,
  output logic [VA_W-1:0]           dc_resp_va,
  output logic [DATA_W-1:0]         dc_resp_rdata,
  output acc_kind_e                 dc_resp_kind,
  output logic [WAYS-1:0]           dc_tag_way_en,
  output logic [WAYS-1:0]           dc_data_way_en,
  output logic                      dc_store_waiting,
  output logic                      dc_mem_req_valid,
  output logic                      dc_mem_req_we,
  output logic [PA_W-1:0]           dc_mem_req_addr,
  output logic [DATA_W-1:0]         dc_mem_req_wdata,
  input  logic                      dc_mem_ack,
  input  logic [DATA_W-1:0]         dc_mem_rdata,
  input  logic                      dc_inj_en,
  input  logic [$clog2(SETS)-1:0]   dc_inj_set,
  input  logic [WW-1:0]             dc_inj_way,
  input  logic [TBW-1:0]            dc_inj_bit,
  output logic                      dc_tag_err_corrected,
  output logic                      dc_tag_err_uncorrectable,
  // search memory with FIFO wrapper
  input  logic                      cam_en,
  input  logic                      cam_ld_en,
  input  logic [CAW-1:0]            cam_ld_addr,
  input  logic [CAM_WIDTH-1:0]      cam_ld_data,
  input  logic                      cam_wr_en,
  input  logic [CAM_WIDTH-1:0]      cam_wr_data,
  output logic                      cam_inputfifo_full,
  input  logic                      cam_rd_en,
  output logic                      cam_rd_hit,
  output logic [CAW-1:0]            cam_rd_addr,
  output logic [CAM_WIDTH-1:0]      cam_rd_data,
  output logic                      cam_outputfifo_empty,
  output logic                      cam_data_rdy
);
  eta_cache #(
    .VA_W(VA_W), .PA_W(PA_W), .DATA_W(DATA_W), .PAGE_BITS(PAGE_BITS),
    .TLB_ENTRIES(TLB_ENTRIES), .SETS(SETS), .WAYS(WAYS), .LSQ_DEPTH(LSQ_DEPTH),
    .LSQ_TAG_BITS(LSQ_TAG_BITS)
  ) u_eta_cache (
    .clk, .rst_n,
    .enq_valid(dc_enq_valid), .enq_ready(dc_enq_ready), .enq_op(dc_enq_op),
    .enq_va(dc_enq_va), .enq_data(dc_enq_data), .enq_data_rdy(dc_enq_data_rdy),
    .enq_idx(dc_enq_idx), .enq_pred(dc_enq_pred),
    .sd_valid(dc_sd_valid), .sd_idx(dc_sd_idx), .sd_data(dc_sd_data),
    .tlb_miss(dc_tlb_miss), .tlb_miss_vpn(dc_tlb_miss_vpn),
    .tlb_fill_en(dc_tlb_fill_en), .tlb_fill_vpn(dc_tlb_fill_vpn), .tlb_fill_ppn(dc_tlb_fill_ppn),
    .resp_valid(dc_resp_valid), .resp_op(dc_resp_op), .resp_va(dc_resp_va),
    .resp_rdata(dc_resp_rdata), .resp_kind(dc_resp_kind),
    .tag_way_en(dc_tag_way_en), .data_way_en(dc_data_way_en), .store_waiting(dc_store_waiting),
    .mem_req_valid(dc_mem_req_valid), .mem_req_we(dc_mem_req_we),
    .mem_req_addr(dc_mem_req_addr), .mem_req_wdata(dc_mem_req_wdata),
    .mem_ack(dc_mem_ack), .mem_rdata(dc_mem_rdata),
    .inj_en(dc_inj_en), .inj_set(dc_inj_set), .inj_way(dc_inj_way), .inj_bit(dc_inj_bit),
    .tag_err_corrected(dc_tag_err_corrected), .tag_err_uncorrectable(dc_tag_err_uncorrectable)
  );

  cam_wrapper #(.WORDS(CAM_WORDS), .WIDTH(CAM_WIDTH), .DEPTH(FIFO_DEPTH)) u_cam (
    .clk_in_p(clk), .reset_in_pn(rst_n), .en_in_p(cam_en),
    .ld_en_in_p(cam_ld_en), .ld_addr_in_p(cam_ld_addr), .ld_data_in_p(cam_ld_data),
    .wr_en_in_p(cam_wr_en), .wr_data_in_p(cam_wr_data),
    .inputfifo_full_out_p(cam_inputfifo_full),
    .rd_en_in_p(cam_rd_en), .rd_hit_out_p(cam_rd_hit), .rd_addr_out_p(cam_rd_addr),
    .rd_data_out_p(cam_rd_data), .outputfifo_empty_out_p(cam_outputfifo_empty),
    .data_rdy_out_p(cam_data_rdy)
  );
endmodule

// cam_wrapper: search_memory behind an input FIFO of search words and an
// output FIFO of results, so that a host can stream search words in and
// read results out at its own pace.
//
// Port names follow the signal names of the reference simulation
// (clk_in_p, en_in_p, reset_in_pn, wr_en_in_p, rd_en_in_p, rd_data_out_p,
// inputfifo_full_out_p, outputfifo_empty_out_p, data_rdy_out_p); what each
// one does, the FIFO depths, the preload port and the result format are
// this design's choices.
//
//   wr_en_in_p/wr_data_in_p  push a search word into the input FIFO
//                            (ignored while inputfifo_full_out_p is high).
//   ld_en_in_p/ld_addr_in_p/ld_data_in_p
//                            store a word in the search memory directly.
//   en_in_p                  while high, one search word per cycle moves from
//                            the input FIFO into the search memory, provided
//                            the output FIFO has room for its result.
//   rd_en_in_p               pops the head result; rd_hit_out_p,
//                            rd_addr_out_p and rd_data_out_p show the head
//                            while outputfifo_empty_out_p is low.
//   data_rdy_out_p           high in the cycle a result enters the output FIFO.
// A search word needs two cycles from the input FIFO head to the output
// FIFO: one in the search memory, one to be written into the output FIFO.
module cam_wrapper #(
  parameter int WORDS = 8,
  parameter int WIDTH = 8,
  parameter int DEPTH = 8,
  parameter int AW    = $clog2(WORDS)
) (
  input  logic             clk_in_p,
  input  logic             reset_in_pn,
  input  logic             en_in_p,
  input  logic             ld_en_in_p,
  input  logic [AW-1:0]    ld_addr_in_p,
  input  logic [WIDTH-1:0] ld_data_in_p,
  input  logic             wr_en_in_p,
  input  logic [WIDTH-1:0] wr_data_in_p,
  output logic             inputfifo_full_out_p,
  input  logic             rd_en_in_p,
  output logic             rd_hit_out_p,
  output logic [AW-1:0]    rd_addr_out_p,
  output logic [WIDTH-1:0] rd_data_out_p,
  output logic             outputfifo_empty_out_p,
  output logic             data_rdy_out_p
);
  localparam int PW = $clog2(DEPTH);
  localparam int RW = 1 + AW + WIDTH;

  logic [WIDTH-1:0] in_head;
  logic             in_empty, in_full, out_full;
  logic [PW:0]      in_count, out_count;
  logic             issue, in_flight;
  logic             rsp_valid, rsp_hit;
  logic [AW-1:0]    rsp_addr;
  logic [WIDTH-1:0] rsp_data;
  logic [WORDS-1:0] rsp_ml;
  logic [$clog2(WIDTH+1)-1:0] rsp_sensed;
  logic [RW-1:0]    out_head;

  sync_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) u_infifo (
    .clk(clk_in_p), .rst_n(reset_in_pn),
    .push(wr_en_in_p), .din(wr_data_in_p),
    .pop(issue), .dout(in_head),
    .full(in_full), .empty(in_empty), .count(in_count)
  );

  // Issue only when the result is sure to find room in the output FIFO,
  // counting the one that may still be inside the search memory.
  assign issue = en_in_p && !in_empty &&
                 ((out_count + (PW+1)'(in_flight)) < (PW+1)'(DEPTH));

  always_ff @(posedge clk_in_p or negedge reset_in_pn) begin
    if (!reset_in_pn) in_flight <= 1'b0;
    else              in_flight <= issue;
  end

  search_memory #(.WORDS(WORDS), .WIDTH(WIDTH)) u_mem (
    .clk(clk_in_p), .rst_n(reset_in_pn), .init(1'b0),
    .wr_en(ld_en_in_p), .wr_addr(ld_addr_in_p), .wr_data(ld_data_in_p),
    .srch_en(issue), .srch_data(in_head),
    .rsp_valid, .rsp_hit, .rsp_addr, .rsp_data, .rsp_ml, .rsp_sensed
  );

  sync_fifo #(.WIDTH(RW), .DEPTH(DEPTH)) u_outfifo (
    .clk(clk_in_p), .rst_n(reset_in_pn),
    .push(rsp_valid), .din({rsp_hit, rsp_addr, rsp_data}),
    .pop(rd_en_in_p), .dout(out_head),
    .full(out_full), .empty(outputfifo_empty_out_p), .count(out_count)
  );

  assign inputfifo_full_out_p = in_full;
  assign data_rdy_out_p       = rsp_valid;
  assign {rd_hit_out_p, rd_addr_out_p, rd_data_out_p} = out_head;

  // The issue rule guarantees the output FIFO never overflows.
  a_no_overflow: assert property (@(posedge clk_in_p) disable iff (!reset_in_pn)
                                  rsp_valid |-> !out_full);
endmodule

// lsq: load/store queue of the ETA cache, DEPTH entries kept in program
// order as a circular buffer.
//
// An instruction enters with its operation, virtual address, store data (if
// already available) and the result of the early tag access made at entry:
// whether the LSQ TLB and LSQ tag arrays hit (`enq_pred_valid`) and in which
// way (`enq_pred_way`). The prediction is kept in a per-entry way buffer
// beside the queue. Store data that arrives later is written by entry index
// through the sd_* port (`enq_idx` tells the producer where its instruction
// went).
//
// The oldest entry has the highest priority. It is offered to the cache
// access stage (`head_valid`) once it is ready: a load is always ready, a
// store once its data is present. Otherwise it waits in the queue. `deq`
// removes the head when the cache access stage has finished it.
// Keeping program order (only the head may issue) is this design's choice;
// it keeps loads and stores to the same address in order without an
// address comparison.
// Timing: enqueue, store-data writes and dequeue take effect at the clock
// edge; an entry can be offered the cycle after it was enqueued.
module lsq
  import eta_pkg::*;
#(
  parameter int DEPTH  = 8,
  parameter int VA_W   = 32,
  parameter int DATA_W = 32,
  parameter int WAYS   = 2,
  parameter int WW     = (WAYS > 1) ? $clog2(WAYS) : 1,
  parameter int IW     = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  // enqueue from address generation plus early tag access
  input  logic              enq_valid,
  output logic              enq_ready,
  input  mem_op_e           enq_op,
  input  logic [VA_W-1:0]   enq_va,
  input  logic [DATA_W-1:0] enq_data,
  input  logic              enq_data_rdy,
  input  logic              enq_pred_valid,
  input  logic [WW-1:0]     enq_pred_way,
  output logic [IW-1:0]     enq_idx,
  // late store data
  input  logic              sd_valid,
  input  logic [IW-1:0]     sd_idx,
  input  logic [DATA_W-1:0] sd_data,
  // head towards the cache access stage
  output logic              head_valid,
  output mem_op_e           head_op,
  output logic [VA_W-1:0]   head_va,
  output logic [DATA_W-1:0] head_data,
  output logic              head_pred_valid,
  output logic [WW-1:0]     head_pred_way,
  input  logic              deq,
  output logic              empty,
  output logic              full,
  output logic              head_waiting   // head present but store data missing
);
  logic [DEPTH-1:0]  valid_q, data_rdy_q, pred_valid_q;
  mem_op_e           op_q      [DEPTH];
  logic [VA_W-1:0]   va_q      [DEPTH];
  logic [DATA_W-1:0] data_q    [DEPTH];
  logic [WW-1:0]     way_buf_q [DEPTH];    // predicted destination way
  logic [IW-1:0]     head_q, tail_q;
  logic              do_enq, do_deq, head_ready;

  assign full      = &valid_q;
  assign empty     = ~|valid_q;
  assign enq_ready = !full;
  assign enq_idx   = tail_q;
  assign do_enq    = enq_valid && !full;

  assign head_ready      = valid_q[head_q] && (op_q[head_q] == OP_LOAD || data_rdy_q[head_q]);
  assign head_valid      = head_ready;
  assign head_waiting    = valid_q[head_q] && !head_ready;
  assign head_op         = op_q[head_q];
  assign head_va         = va_q[head_q];
  assign head_data       = data_q[head_q];
  assign head_pred_valid = pred_valid_q[head_q];
  assign head_pred_way   = way_buf_q[head_q];
  assign do_deq          = deq && head_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q      <= '0;
      data_rdy_q   <= '0;
      pred_valid_q <= '0;
      head_q       <= '0;
      tail_q       <= '0;
    end else begin
      if (do_deq) begin
        valid_q[head_q] <= 1'b0;
        head_q <= (head_q == IW'(DEPTH - 1)) ? '0 : head_q + 1'b1;
      end
      if (sd_valid) data_rdy_q[sd_idx] <= 1'b1;
      if (do_enq) begin
        valid_q[tail_q]      <= 1'b1;
        data_rdy_q[tail_q]   <= enq_data_rdy;
        pred_valid_q[tail_q] <= enq_pred_valid;
        tail_q <= (tail_q == IW'(DEPTH - 1)) ? '0 : tail_q + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (sd_valid) data_q[sd_idx] <= sd_data;
    if (do_enq) begin
      op_q[tail_q]      <= enq_op;
      va_q[tail_q]      <= enq_va;
      way_buf_q[tail_q] <= enq_pred_way;
      if (enq_data_rdy || enq_op == OP_LOAD) data_q[tail_q] <= enq_data;
    end
  end

  a_sd_to_live_store: assert property (@(posedge clk) disable iff (!rst_n)
      sd_valid |-> (valid_q[sd_idx] && op_q[sd_idx] == OP_STORE));
  a_no_deq_idle: assert property (@(posedge clk) disable iff (!rst_n)
      deq |-> head_ready);
endmodule

// dcache: cache access stage of the early-tag-access (ETA) data cache:
// a SETS-set, WAYS-way cache of DATA_W-bit lines with its tag array, data
// array and access controller.
//
// A request comes with the destination way predicted at the LSQ stage.
//  * Predicted request: only the predicted way of the tag array and of the
//    data array is activated. If its tag matches, the access is done with
//    one way (ACC_ONE_WAY). If not, the prediction was stale and the next
//    cycle repeats the lookup in the conventional manner (ACC_MISPREDICT).
//  * Unpredicted request: all ways of the tag and data arrays are activated
//    in parallel, as in a conventional cache (ACC_CONV).
//  * Miss: a load reads the line from the next-level memory, installs it in
//    the victim way and writes the same tag into the LSQ copy of the tag
//    array (fill_*); a store is written through to memory without
//    allocation (ACC_MISS). A store hit updates the line and is also
//    written through.
// Tags are parity protected: a faulty tag met during a lookup is repaired
// from an adjacent set or, failing that, its line is invalidated and the
// access proceeds as a miss (see tag_array; tag_err_* report both cases).
// `tag_way_en`/`data_way_en` show which ways are activated in each cycle,
// the quantity the ETA technique reduces.
// One-way access on a correct prediction and conventional access otherwise
// follow the text. The line size of one word, write-through with no write
// allocation, most-recently-used-based victim choice (true LRU for two
// ways) and the one-cycle retry after a wrong prediction are this design's
// choices.
//
// Handshake: the requester holds req_* stable until `done` pulses; `done`
// comes in the same cycle as the deciding lookup for a load hit and after
// mem_ack otherwise. Memory: mem_req_* is held until mem_ack; for a read,
// mem_rdata is taken in the mem_ack cycle.
module dcache
  import eta_pkg::*;
#(
  parameter int PA_W     = 32,
  parameter int DATA_W   = 32,
  parameter int SETS     = 64,
  parameter int WAYS     = 2,
  parameter int OFF_BITS = 2,
  parameter int SW       = $clog2(SETS),
  parameter int WW       = (WAYS > 1) ? $clog2(WAYS) : 1,
  parameter int TAG_W    = PA_W - SW - OFF_BITS
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req_valid,
  input  mem_op_e           req_op,
  input  logic [PA_W-1:0]   req_pa,
  input  logic [DATA_W-1:0] req_wdata,
  input  logic              req_pred_valid,
  input  logic [WW-1:0]     req_pred_way,
  output logic              done,
  output logic [DATA_W-1:0] done_rdata,
  output acc_kind_e         done_kind,
  output logic [WAYS-1:0]   tag_way_en,
  output logic [WAYS-1:0]   data_way_en,
  output logic              mem_req_valid,
  output logic              mem_req_we,
  output logic [PA_W-1:0]   mem_req_addr,
  output logic [DATA_W-1:0] mem_req_wdata,
  input  logic              mem_ack,
  input  logic [DATA_W-1:0] mem_rdata,
  output logic              fill_valid,
  output logic [SW-1:0]     fill_set,
  output logic [WW-1:0]     fill_way,
  output logic [TAG_W-1:0]  fill_tag,
  // transient-error injection into the tag array, and tag repair events
  input  logic              inj_en,
  input  logic [SW-1:0]     inj_set,
  input  logic [WW-1:0]     inj_way,
  input  logic [$clog2(TAG_W)-1:0] inj_bit,
  output logic              tag_err_corrected,
  output logic              tag_err_uncorrectable
);
  typedef enum logic [1:0] {S_ACCESS, S_CONV, S_REFILL, S_WRITE} state_e;

  state_e            state_q;
  acc_kind_e         kind_q;
  logic              mispred_q;
  logic [DATA_W-1:0] data_arr [SETS][WAYS];
  logic [WW-1:0]     mru_q [SETS];
  logic [SW-1:0]     set_idx;
  logic [TAG_W-1:0]  tag;
  logic [WAYS-1:0]   way_hit;
  logic              hit, lookup, one_way;
  logic [WW-1:0]     hit_way, victim;
  logic              data_we;
  logic [WW-1:0]     data_wway;
  logic [DATA_W-1:0] data_wdata;

  assign set_idx = req_pa[OFF_BITS +: SW];
  assign tag     = req_pa[PA_W-1 -: TAG_W];
  assign lookup  = req_valid && (state_q == S_ACCESS || state_q == S_CONV);
  assign one_way = (state_q == S_ACCESS) && req_pred_valid;
  assign victim  = (mru_q[set_idx] == WW'(WAYS - 1)) ? '0 : mru_q[set_idx] + 1'b1;

  always_comb begin
    tag_way_en = '0;
    if (lookup) tag_way_en = one_way ? (WAYS'(1) << req_pred_way) : '1;
  end

  tag_array #(.SETS(SETS), .WAYS(WAYS), .TAG_W(TAG_W)) u_tags (
    .clk, .rst_n,
    .rd_set(set_idx), .rd_tag(tag), .way_en(tag_way_en),
    .way_hit, .hit, .hit_way,
    .wr_en(fill_valid), .wr_set(fill_set), .wr_way(fill_way), .wr_tag(fill_tag),
    .inj_en, .inj_set, .inj_way, .inj_bit,
    .err_corrected(tag_err_corrected), .err_uncorrectable(tag_err_uncorrectable)
  );

  // Refill writes the tag of the victim way; the same write goes to the LSQ copy.
  assign fill_valid = (state_q == S_REFILL) && mem_ack;
  assign fill_set   = set_idx;
  assign fill_way   = victim;
  assign fill_tag   = tag;

  assign mem_req_valid = req_valid && (state_q == S_REFILL || state_q == S_WRITE);
  assign mem_req_we    = (state_q == S_WRITE);
  assign mem_req_addr  = req_pa;
  assign mem_req_wdata = req_wdata;

  always_comb begin
    done        = 1'b0;
    done_rdata  = '0;
    done_kind   = kind_q;
    data_way_en = '0;
    data_we     = 1'b0;
    data_wway   = hit_way;
    data_wdata  = req_wdata;
    unique case (state_q)
      S_ACCESS, S_CONV: begin
        if (lookup) begin
          if (req_op == OP_LOAD) data_way_en = tag_way_en;
          if (hit && req_op == OP_LOAD) begin
            done       = 1'b1;
            done_rdata = data_arr[set_idx][hit_way];
            done_kind  = mispred_q ? ACC_MISPREDICT : (one_way ? ACC_ONE_WAY : ACC_CONV);
          end else if (hit) begin
            data_way_en = WAYS'(1) << hit_way;
            data_we     = 1'b1;
          end
        end
      end
      S_REFILL: begin
        if (mem_ack) begin
          done        = 1'b1;
          done_rdata  = mem_rdata;
          data_way_en = WAYS'(1) << victim;
          data_we     = 1'b1;
          data_wway   = victim;
          data_wdata  = mem_rdata;
        end
      end
      S_WRITE: done = mem_ack;
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (data_we) data_arr[set_idx][data_wway] <= data_wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_ACCESS;
      kind_q    <= ACC_CONV;
      mispred_q <= 1'b0;
      for (int s = 0; s < SETS; s++) mru_q[s] <= '0;
    end else begin
      unique case (state_q)
        S_ACCESS, S_CONV: begin
          if (lookup) begin
            if (hit) begin
              mru_q[set_idx] <= hit_way;
              mispred_q      <= 1'b0;
              if (req_op == OP_STORE) begin
                state_q <= S_WRITE;
                kind_q  <= mispred_q ? ACC_MISPREDICT : (one_way ? ACC_ONE_WAY : ACC_CONV);
              end else begin
                state_q <= S_ACCESS;
              end
            end else if (one_way) begin
              state_q   <= S_CONV;
              mispred_q <= 1'b1;
            end else begin
              mispred_q <= 1'b0;
              kind_q    <= ACC_MISS;
              state_q   <= (req_op == OP_LOAD) ? S_REFILL : S_WRITE;
            end
          end
        end
        S_REFILL: if (mem_ack) begin
          mru_q[set_idx] <= victim;
          state_q        <= S_ACCESS;
        end
        S_WRITE: if (mem_ack) state_q <= S_ACCESS;
        default: state_q <= S_ACCESS;
      endcase
    end
  end

  a_req_stable: assert property (@(posedge clk) disable iff (!rst_n)
      (req_valid && !done) |=> req_valid);
endmodule

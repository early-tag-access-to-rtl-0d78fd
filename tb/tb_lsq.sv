// tb_lsq: random enqueues of loads and stores (some stores without their
// data), late store data through the store-data port, and random dequeues.
// A reference queue checks that the head is always the oldest instruction
// with its address, data and predicted way, that a store is held back until
// its data arrives, and that the queue reports full after DEPTH entries.
module tb_lsq;
  import eta_pkg::*;
  localparam int DEPTH = 8;
  typedef struct {
    mem_op_e     op;
    logic [31:0] va;
    logic [31:0] data;
    logic        rdy;
    logic        pv;
    logic        pw;
    int          idx;
  } ent_t;

  logic clk = 0, rst_n = 0;
  logic enq_valid = 0, enq_data_rdy = 0, enq_pred_valid = 0, sd_valid = 0, deq = 0;
  mem_op_e enq_op = OP_LOAD;
  logic [31:0] enq_va = '0, enq_data = '0, sd_data = '0;
  logic [0:0] enq_pred_way = '0;
  logic [2:0] enq_idx, sd_idx = '0;
  logic enq_ready, head_valid, head_pred_valid, empty, full, head_waiting;
  mem_op_e head_op;
  logic [31:0] head_va, head_data;
  logic [0:0] head_pred_way;
  ent_t q [$];
  int checks = 0, failures = 0, n_full = 0, n_wait = 0, n_deq = 0;

  lsq #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      bit e_hv;
      @(negedge clk);
      // check the head against the model
      e_hv = q.size() > 0 && (q[0].op == OP_LOAD || q[0].rdy);
      checks++;
      if (head_valid !== e_hv || full !== (q.size() == DEPTH) || enq_ready !== (q.size() < DEPTH) ||
          (e_hv && (head_op !== q[0].op || head_va !== q[0].va || head_pred_valid !== q[0].pv ||
                    (q[0].pv && head_pred_way !== q[0].pw) ||
                    (q[0].op == OP_STORE && head_data !== q[0].data)))) begin
        failures++;
        $display("FAIL cyc=%0d hv=%0b exp=%0b va=%h exp=%h", cyc, head_valid, e_hv, head_va,
                 q.size() ? q[0].va : 0);
      end
      if (full) n_full++;
      if (head_waiting) n_wait++;
      // drive this cycle
      deq = e_hv && ($urandom % (cyc < 1500 ? 4 : 2) == 0);
      enq_valid = ($urandom % 2) == 0;
      enq_op = mem_op_e'($urandom % 2);
      enq_va = $urandom;
      enq_data = $urandom;
      enq_data_rdy = ($urandom % 3) != 0;
      enq_pred_valid = 1'($urandom);
      enq_pred_way = 1'($urandom);
      sd_valid = 0;
      foreach (q[i]) begin
        if (!sd_valid && q[i].op == OP_STORE && !q[i].rdy && ($urandom % 3 == 0) && !(deq && i == 0)) begin
          sd_valid = 1; sd_idx = 3'(q[i].idx); sd_data = $urandom;
          q[i].rdy = 1; q[i].data = sd_data;
        end
      end
      if (enq_valid && q.size() < DEPTH) begin
        ent_t e;
        e.op = enq_op; e.va = enq_va; e.data = enq_data;
        e.rdy = enq_data_rdy; e.pv = enq_pred_valid; e.pw = enq_pred_way; e.idx = int'(enq_idx);
        q.push_back(e);
      end
      if (deq) begin
        void'(q.pop_front());
        n_deq++;
      end
    end
    checks++;
    if (n_full == 0 || n_wait == 0 || n_deq == 0) begin
      failures++;
      $display("FAIL coverage full=%0d wait=%0d deq=%0d", n_full, n_wait, n_deq);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

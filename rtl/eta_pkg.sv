// eta_pkg: types shared by the early-tag-access data cache.
package eta_pkg;
  // Kind of memory instruction held in the load/store queue.
  typedef enum logic {
    OP_LOAD  = 1'b0,
    OP_STORE = 1'b1
  } mem_op_e;

  // How the cache access stage served an instruction.
  typedef enum logic [1:0] {
    ACC_ONE_WAY    = 2'd0,  // predicted way correct: one way activated
    ACC_CONV       = 2'd1,  // no prediction: all ways activated
    ACC_MISPREDICT = 2'd2,  // predicted way wrong: one way, then all ways
    ACC_MISS       = 2'd3   // line not in the cache (refill or write-through)
  } acc_kind_e;
endpackage

// cam_cell: one storage bit of the search memory with its own comparator.
// The cell holds one bit in a flip-flop that is loaded when `we` is high
// and compares it continuously with the search line `sl`: `match` is high
// when the stored bit equals the search bit (an XNOR). Storing and comparing
// inside the cell follows the description of the sensing cell; the flip-flop
// storage, the synchronous write and the clear-on-reset are this design's
// choices. Timing: write takes effect at the clock edge, compare is
// combinational.
module cam_cell (
  input  logic clk,
  input  logic rst_n,   // active-low asynchronous reset, clears the bit
  input  logic we,      // write enable
  input  logic d,       // bit to store
  input  logic sl,      // search line (search bit)
  output logic q,       // stored bit
  output logic match    // 1 when stored bit == search bit
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= 1'b0;
    else if (we) q <= d;
  end

  assign match = ~(q ^ sl);
endmodule

// ips_pe - inner-product-step cell with duplicate-and-compare checking.
//
// One processor of the bidirectional linear array. Every cycle (one systolic
// time step) it takes an x item from its left neighbour and a y item from its
// right neighbour, computes the inner product step
//     y_out = y_in + a_in * x_in
// and passes x on unchanged to the right and the new y to the left. The function
// tag on the y item selects the checking operation:
//   tag 1, compute-and-store:   the result is also written into the latch L;
//   tag 0, compare-and-compute: the incoming y value, which the right
//     neighbour computed in the previous step, is compared with L, which this
//     cell computed for the same inner product step in the previous step. On a
//     mismatch the y tag is inverted to 1 (so cells further down stop checking
//     this item) and the error tag of the x item in the cell is set to 1.
// Tags are therefore only ever turned from 0 to 1.
//
// Interface: x_in/y_in/a_in are sampled at the rising clock edge; x_out, y_out
// and det are registered, so an item moves one cell per cycle. det is a
// one-cycle flag of a mismatch found in the previous cycle (for test access
// only; the scheme itself reads the tags at the array boundary). fault_mask is
// XORed onto the arithmetic result to model a stuck-at or transient fault of
// the cell; it is 0 in normal operation.
//
// The tag encoding, the latch and the tag inversion follow the scheme. The
// valid bits, the fault_mask hook, wrap-around DATA_W arithmetic and the
// synchronous active-low reset are choices of this implementation.
module ips_pe
  import fdla_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  item_t x_in,
  input  item_t y_in,
  input  data_t a_in,
  input  data_t fault_mask,
  output item_t x_out,
  output item_t y_out,
  output logic  det
);

  data_t latch_l;     // L: result of the last compute-and-store step
  data_t xv;          // x operand (0 in an empty slot)
  data_t result;      // inner product step result
  logic  compare;     // compare-and-compute this cycle
  logic  mismatch;

  always_comb begin
    xv       = x_in.valid ? x_in.data : '0;
    result   = (y_in.data + data_t'(a_in * xv)) ^ fault_mask;
    compare  = y_in.valid && (y_in.tag == TAG_COMPARE);
    mismatch = compare && (y_in.data != latch_l);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x_out   <= ITEM_NONE;
      y_out   <= ITEM_NONE;
      latch_l <= '0;
      det     <= 1'b0;
    end else begin
      x_out       <= x_in;
      x_out.tag   <= x_in.tag | (mismatch & x_in.valid);
      y_out.valid <= y_in.valid;
      y_out.tag   <= y_in.tag | mismatch;
      y_out.data  <= y_in.valid ? result : '0;
      det         <= mismatch;
      if (y_in.valid && y_in.tag == TAG_STORE)
        latch_l <= result;
    end
  end

endmodule

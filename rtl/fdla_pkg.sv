// fdla_pkg - shared types of the fault-diagnosing bidirectional linear array.
//
// Every word that travels through the array is a tagged data item: the data
// value, one tag bit that rides along with it, and a valid bit that tells an
// occupied time slot from an empty one. On the y stream the tag is the
// function tag (1 = compute-and-store, 0 = compare-and-compute; a cell that
// finds a mismatch turns a 0 into a 1). On the x stream the tag is an error
// tag, 0 when the item enters and set to 1 by a cell that finds a mismatch.
// The one-bit tag per stream follows the scheme; the 16-bit data width and the
// valid bit are choices of this implementation.
package fdla_pkg;

  localparam int DATA_W = 16;   // data word width (wrap-around arithmetic)

  typedef logic [DATA_W-1:0] data_t;

  typedef struct packed {
    logic  valid;  // slot holds a data item
    logic  tag;    // function tag (y) or error tag (x)
    data_t data;   // value
  } item_t;

  localparam item_t ITEM_NONE = '{valid: 1'b0, tag: 1'b0, data: '0};

  // Function tag values on the y stream.
  localparam logic TAG_COMPARE = 1'b0;  // compare-and-compute
  localparam logic TAG_STORE   = 1'b1;  // compute-and-store

endpackage

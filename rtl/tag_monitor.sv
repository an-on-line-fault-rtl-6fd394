// tag_monitor - builds the error vector of one tagged stream.
//
// Watches a stream where it leaves the array (or at an inner observation
// point). The stream carries ITEMS data items, each entered COPIES times in
// consecutive slots. Valid stream items are numbered in arrival order; copy c
// of data item i is compared with its preassigned tag t0[i][c], and e[i] is set
// when any copy of item i arrives with a tag different from the preassigned
// one. err rises in the cycle after the first such tag arrives, so an error is
// signalled as soon as the first 1 of the error vector appears, not at the end
// of the computation. done rises once all ITEMS*COPIES items have been seen;
// clear restarts the count for the next computation. Items beyond the last are
// ignored.
//
// The error vector definition follows the scheme; numbering the items by
// arrival order is this design's choice.
module tag_monitor
  import fdla_pkg::*;
#(
  parameter int ITEMS  = 3,
  parameter int COPIES = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  item_t item,
  input  logic [ITEMS-1:0][COPIES-1:0] t0,
  output logic [ITEMS-1:0] e,
  output logic err,
  output logic done
);

  localparam int TOTAL = ITEMS * COPIES;
  localparam int CW    = $clog2(TOTAL + 1);

  logic [CW-1:0] cnt;
  int unsigned   idx;
  int unsigned   cp;

  always_comb begin
    idx = int'(cnt) / COPIES;
    cp  = int'(cnt) % COPIES;
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      cnt <= '0;
      e   <= '0;
    end else if (item.valid && int'(cnt) < TOTAL) begin
      cnt <= cnt + 1'b1;
      if (item.tag != t0[idx][cp])
        e[idx] <= 1'b1;
    end
  end

  assign err  = |e;
  assign done = (int'(cnt) == TOTAL);

endmodule

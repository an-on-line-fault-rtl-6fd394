// bla_array - bidirectional linear array of inner-product-step cells.
//
// N_PE identical ips_pe cells P0..P(N_PE-1) in a row. The x stream enters P0
// and flows to the right, the y stream enters P(N_PE-1) and flows to the left,
// one cell per clock cycle. With N_PE = 4 this is the three-cell array for a
// band matrix of three diagonals plus the redundant cell P0 at the left end
// that checks P1. Each cell has its own coefficient input a_in[p], which the
// host drives with the matrix element needed by that cell in that time step.
//
// Every link is exported: x_link[p] and y_link[p] are the registered outputs
// of cell p. x_link[N_PE-1] is the x stream leaving the right boundary and
// y_link[0] the y stream leaving the left boundary; the inner links are where
// observation points for the tags can be attached. det[p] is the per-cell
// mismatch flag, kept for test access. The structure follows the scheme; the
// per-cell coefficient ports and the exported links are this design's choice.
module bla_array
  import fdla_pkg::*;
#(
  parameter int N_PE = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  item_t x_in,
  input  item_t y_in,
  input  data_t a_in       [N_PE],
  input  data_t fault_mask [N_PE],
  output item_t x_link     [N_PE],
  output item_t y_link     [N_PE],
  output logic  [N_PE-1:0] det
);

  for (genvar p = 0; p < N_PE; p++) begin : g_pe
    item_t x_from_left;
    item_t y_from_right;
    if (p == 0) begin : g_left
      assign x_from_left = x_in;
    end else begin : g_mid
      assign x_from_left = x_link[p-1];
    end
    if (p == N_PE-1) begin : g_right
      assign y_from_right = y_in;
    end else begin : g_inner
      assign y_from_right = y_link[p+1];
    end

    ips_pe u_pe (
      .clk        (clk),
      .rst_n      (rst_n),
      .x_in       (x_from_left),
      .y_in       (y_from_right),
      .a_in       (a_in[p]),
      .fault_mask (fault_mask[p]),
      .x_out      (x_link[p]),
      .y_out      (y_link[p]),
      .det        (det[p])
    );
  end

endmodule

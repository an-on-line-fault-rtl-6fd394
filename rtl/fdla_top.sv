// fdla_top - bidirectional linear array with on-line fault diagnosis.
//
// Band matrix-vector multiplication y = A*x on a linear array in which every
// inner product step is done twice, by two neighbouring cells in the same time
// step, and compared one step later. The host enters every x item and every y
// item twice in consecutive slots. On the y stream the first copy carries the
// function tag 1 (compute-and-store) and the second the tag 0
// (compare-and-compute); x items carry error tags that enter as 0. A cell that
// finds a mismatch turns the y tag and the x tag it holds to 1, and those tags
// travel on to the two ends of the array:
//   * y_mon watches the y stream leaving P0 and builds the y error vector e_y;
//   * x_mon watches the x stream leaving P(N_PE-1) and builds e_x;
//   * obs_mon is an observation point on the y link leaving P_OBS_POS, which
//     sees the tag changes of the cells at and right of P_OBS_POS earlier than
//     the boundary does;
//   * fault_locator turns the leading 1s of e_x and e_y into the time step and
//     the processor pair of the first detection, and into a single faulty
//     processor when the error persisted.
// Entering y pairs with both tags 1 switches the checking off for those items:
// the two copies then serve two independent multiplications, doubling the
// throughput. y_t0 and x_t0 give the preassigned tags, so checked and unchecked
// items may be mixed.
//
// Timing: x_in enters P0 and y_in enters P(N_PE-1) in the cycle they are
// driven; every cell adds one cycle. a_in[p] is the coefficient cell p needs in
// the current cycle. e_y/e_x/err update one cycle after a tag leaves the array;
// the locator outputs are valid once done is high. clear restarts the monitors
// for the next computation. fault_mask[p] is a fault-injection input per cell,
// 0 in normal use; pe_det shows which cell found a mismatch (test access).
//
// The array, tags, error vectors, locator equations and observation points
// follow the scheme; the monitor item numbering, the observation point position
// and the number of x items watched (M + P0, enough to carry every error tag of
// the M outputs) are choices of this design.
module fdla_top
  import fdla_pkg::*;
#(
  parameter int N_PE    = 4,
  parameter int M       = 3,
  parameter int P0      = 2,
  parameter int OBS_POS = 2,
  parameter int NX      = M + P0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clear,
  input  item_t x_in,
  input  item_t y_in,
  input  data_t a_in       [N_PE],
  input  data_t fault_mask [N_PE],
  input  logic  [M-1:0][1:0]  y_t0,
  input  logic  [NX-1:0][1:0] x_t0,
  output item_t y_out,
  output item_t x_out,
  output logic  [M-1:0]  e_y,
  output logic  [NX-1:0] e_x,
  output logic  err,
  output logic  [M-1:0]  obs_e,
  output logic  obs_err,
  output logic  done,
  output logic  found,
  output logic  [7:0] x_pos,
  output logic  [7:0] y_pos,
  output logic  [7:0] t_det,
  output logic  [7:0] p_det,
  output logic  resolved,
  output logic  [7:0] faulty,
  output logic  [N_PE-1:0] pe_det
);

  item_t x_link [N_PE];
  item_t y_link [N_PE];
  logic  y_err, x_err, y_done, x_done;

  bla_array #(.N_PE(N_PE)) u_array (
    .clk, .rst_n, .x_in, .y_in, .a_in, .fault_mask,
    .x_link, .y_link, .det(pe_det)
  );

  assign y_out = y_link[0];
  assign x_out = x_link[N_PE-1];

  tag_monitor #(.ITEMS(M), .COPIES(2)) y_mon (
    .clk, .rst_n, .clear, .item(y_link[0]), .t0(y_t0),
    .e(e_y), .err(y_err), .done(y_done)
  );

  tag_monitor #(.ITEMS(NX), .COPIES(2)) x_mon (
    .clk, .rst_n, .clear, .item(x_link[N_PE-1]), .t0(x_t0),
    .e(e_x), .err(x_err), .done(x_done)
  );

  tag_monitor #(.ITEMS(M), .COPIES(2)) obs_mon (
    .clk, .rst_n, .clear, .item(y_link[OBS_POS]), .t0(y_t0),
    .e(obs_e), .err(obs_err), .done()
  );

  fault_locator #(.NY(M), .NX(NX), .P0(P0), .N_PE(N_PE)) u_loc (
    .e_y, .e_x, .found, .x_pos, .y_pos, .t_det, .p_det, .resolved, .faulty
  );

  assign err  = y_err | x_err;
  assign done = y_done & x_done;

  initial begin
    assert (OBS_POS > 0 && OBS_POS < N_PE)
      else $error("OBS_POS must name an inner link");
  end

endmodule

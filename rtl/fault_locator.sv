// fault_locator - turns the two error vectors into a processor and a time step.
//
// In the space-time plane of the array the x items and the y items are two
// families of parallel lines; a cell in a time step is where one x line crosses
// one y line. The cell that first reported an error is found from the position
// x of the leading 1 of the x error vector and the position y of the leading 1
// of the y error vector (both counted from 1):
//     t = x + y + (P0 - 2)        detection time step (t = x + y for P0 = 2)
//     p = y - x + P0              reporting processor
// The faulty processor is then P_p or P_p+1. When the error persists into the
// next time step (t' = x' + y' = t + 1) a following 1 resolves this: a 1 at
// y+1 in the y vector (x' = x) means the next report came from P_p+1 and the
// faulty processor is P_p+1; a 1 at x+1 in the x vector (y' = y) means it came
// from P_p-1 and the faulty processor is P_p. When both vectors show a
// following 1 the vectors cannot tell which pairs belong together (a report at
// t+2 from the same cell, x+1 and y+1, looks alike), so the pair stays
// unresolved. found is set when both vectors hold a 1; resolved when exactly
// one following 1 resolved the pair.
//
// Purely combinational. The two equations and the following-1 rule follow the
// scheme; the (P0 - 2) offset generalises its time origin (x1 and the first y
// copy enter the array at step 0), and leaving the two-sided case unresolved
// is this design's choice.
module fault_locator #(
  parameter int NY   = 3,
  parameter int NX   = 5,
  parameter int P0   = 2,
  parameter int N_PE = 4
) (
  input  logic [NY-1:0] e_y,
  input  logic [NX-1:0] e_x,
  output logic          found,
  output logic [7:0]    x_pos,
  output logic [7:0]    y_pos,
  output logic [7:0]    t_det,
  output logic [7:0]    p_det,
  output logic          resolved,
  output logic [7:0]    faulty
);

  int xl, yl, p, t;
  logic next_y, next_x;

  always_comb begin
    xl = 0;
    yl = 0;
    for (int i = NX; i >= 1; i--)
      if (e_x[i-1]) xl = i;
    for (int i = NY; i >= 1; i--)
      if (e_y[i-1]) yl = i;

    found  = (xl != 0) && (yl != 0);
    t      = xl + yl + P0 - 2;
    p      = yl - xl + P0;
    next_y = (yl != 0) && (yl < NY) && e_y[yl];   // 1 at position y+1
    next_x = (xl != 0) && (xl < NX) && e_x[xl];   // 1 at position x+1

    x_pos  = 8'(xl);
    y_pos  = 8'(yl);
    t_det  = found ? 8'(t) : '0;
    p_det  = found ? 8'(p) : '0;
    resolved = found && (next_y != next_x) && p >= 0 && p < N_PE;
    faulty = !resolved ? '0 : next_y ? 8'(p + 1) : 8'(p);
  end

endmodule

// tb_fault_locator - self-checking test of the fault locator.
//
// First the worked example of the scheme (error vectors y = 010 and x = 001
// in a four-cell array with p0 = 2: the report came from P1 in step 5), then
// every single-report and two-report pattern of a 4-cell array with 3 y items
// and 5 x items, checked against the equations t = x + y and p = y - x + p0
// and the following-1 rule evaluated here from the pair of report positions.
module tb_fault_locator;

  localparam int NY = 3, NX = 5, P0 = 2, N_PE = 4;

  logic [NY-1:0] e_y;
  logic [NX-1:0] e_x;
  logic found, resolved;
  logic [7:0] x_pos, y_pos, t_det, p_det, faulty;

  int checks = 0, failures = 0;

  fault_locator #(.NY(NY), .NX(NX), .P0(P0), .N_PE(N_PE)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: e_y=%b e_x=%b found=%b x=%0d y=%0d t=%0d p=%0d res=%b f=%0d",
               what, e_y, e_x, found, x_pos, y_pos, t_det, p_det, resolved, faulty);
    end
  endtask

  initial begin
    int n_res = 0;
    // worked example: y2 and x3 flagged
    e_y = 3'b010; e_x = 5'b00100; #1;
    check(found && y_pos == 2 && x_pos == 3, "example positions");
    check(t_det == 5 && p_det == 1 && !resolved, "example p and t");

    e_y = '0; e_x = 5'b00001; #1;
    check(!found && !resolved, "no y report");

    // one report at (x, y), optionally followed one step later by a report
    // of the neighbouring cell: (x, y+1) from P_p+1 or (x+1, y) from P_p-1.
    for (int x = 1; x <= NX; x++)
      for (int y = 1; y <= NY; y++)
        for (int k = 0; k < 3; k++) begin
          int p;
          p = y - x + P0;
          if (p < 0 || p >= N_PE) continue;
          e_y = '0; e_x = '0;
          e_y[y-1] = 1'b1; e_x[x-1] = 1'b1;
          if (k == 1) begin
            if (y == NY || p + 1 >= N_PE) continue;
            e_y[y] = 1'b1;
          end
          if (k == 2) begin
            if (x == NX || p - 1 < 0) continue;
            e_x[x] = 1'b1;
          end
          #1;
          check(found && x_pos == x && y_pos == y, "positions");
          check(t_det == x + y && p_det == p, "equations");
          if (k == 0) check(!resolved, "single report unresolved");
          if (k == 1) check(resolved && faulty == p + 1, "resolved to P_p+1");
          if (k == 2) check(resolved && faulty == p, "resolved to P_p");
          if (resolved) n_res++;
        end

    // a following 1 in both vectors cannot be paired: left unresolved
    e_y = 3'b110; e_x = 5'b01100; #1;
    check(found && p_det == 1 && !resolved, "ambiguous stays unresolved");

    check(n_res > 4, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

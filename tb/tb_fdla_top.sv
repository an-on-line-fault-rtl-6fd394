// tb_fdla_top - end-to-end test of the fault-diagnosing array at its default
// size (four cells P0..P3, three y items, p0 = 2).
//
// The testbench is the host: it enters every x and y item twice, drives each
// cell's coefficient with the tridiagonal-matrix element of the items meeting
// there (see tb_bla_array), sets the preassigned tags, injects faults through
// fault_mask and reads the diagnosis. Expected values are worked out here from
// the schedule, independently of the design:
//   * fault-free runs: both copies of y equal y + A*x, no error anywhere;
//   * the worked example of the scheme: a fault in P2 at step 4 gives y error
//     vector 010, x error vector with x3 set, and the locator reports P1 at
//     step 5;
//   * every one-cycle fault in every cell and step: the reporting cell is the
//     faulty cell (store step) or its left neighbour (compare step), and the
//     locator returns that cell and fault step + 1, or no location when no x
//     item is there to carry the error tag, or no error for P0's compare step;
//   * persistent faults: a resolved diagnosis always names the faulty cell,
//     and the P2-from-step-4 and P1-from-step-5 cases are resolved;
//   * the observation point on the link leaving P2 flags errors reported by
//     P2 or P3 earlier than the y monitor at the left boundary;
//   * unchecked mode (all y tags 1): two independent multiplications, no error;
//   * mixed checked and unchecked items: a fault on an unchecked item goes
//     unreported, one on a checked item is reported.
// Each mechanism is counted and one that never happens counts as a failure.
module tb_fdla_top;
  import fdla_pkg::*;

  localparam int N   = 4;
  localparam int M   = 3;
  localparam int P0  = 2;
  localparam int NX  = M + P0;
  localparam int CYC = 2 * NX + N + 6;

  logic  clk = 1'b0, rst_n, clear;
  item_t x_in, y_in, y_out, x_out;
  data_t a_in [N];
  data_t fault_mask [N];
  logic  [M-1:0][1:0]  y_t0;
  logic  [NX-1:0][1:0] x_t0;
  logic  [M-1:0]  e_y, obs_e;
  logic  [NX-1:0] e_x;
  logic  err, obs_err, done, found, resolved;
  logic  [7:0] x_pos, y_pos, t_det, p_det, faulty;
  logic  [N-1:0] pe_det;

  fdla_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // mechanism counters
  int n_clean = 0, n_detect = 0, n_xtag = 0, n_locate = 0, n_noloc = 0,
      n_unseen = 0, n_resolved = 0, n_obs_early = 0, n_unchecked = 0,
      n_skip_unchecked = 0, n_stop = 0, n_store_rep = 0, n_cmp_rep = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // host data, index 0 unused
  data_t ma [M+1][NX+1], mb [M+1][NX+1];
  data_t xa [NX+1], xb [NX+1];
  data_t ya0 [M+1], yb0 [M+1];
  logic  [M:1] checked;             // y item i is entered as a checked pair

  item_t yres [2*M];
  int    ny, det_cnt, err_cyc, ey_cyc, obs_cyc;

  function automatic void new_problem(input bit same);
    for (int i = 1; i <= M; i++) begin
      for (int j = 1; j <= NX; j++) begin
        bit band = (j >= i - 1) && (j <= i + 1) && (j <= M);
        ma[i][j] = band ? data_t'($urandom) : '0;
        mb[i][j] = band ? (same ? ma[i][j] : data_t'($urandom)) : '0;
      end
      ya0[i] = data_t'($urandom);
      yb0[i] = same ? ya0[i] : data_t'($urandom);
    end
    for (int j = 1; j <= NX; j++) begin
      xa[j] = j <= M ? data_t'($urandom) : '0;
      xb[j] = same ? xa[j] : (j <= M ? data_t'($urandom) : '0);
    end
  endfunction

  function automatic data_t coef(input int c, input int p);
    int u = c - p;
    int v = c - (N - 1 - p);
    if (u < 0 || u >= 2 * NX || v < 0 || v >= 2 * M) return '0;
    return (v % 2 == 0) ? ma[v/2+1][u/2+1] : mb[v/2+1][u/2+1];
  endfunction

  function automatic data_t ref_y(input int i, input bit copy_b);
    data_t s = copy_b ? yb0[i] : ya0[i];
    for (int j = 1; j <= M; j++)
      s += copy_b ? data_t'(mb[i][j] * xb[j]) : data_t'(ma[i][j] * xa[j]);
    return s;
  endfunction

  // fault: cell fp, from step fc, for one step or from then on
  task automatic drive(input int c, input int fp, input int fc, input bit persist,
                       input data_t fm);
    if (c >= 0 && c < 2 * NX) begin
      x_in.valid = 1'b1;
      x_in.tag   = 1'b0;
      x_in.data  = (c % 2 == 0) ? xb[c/2+1] : xa[c/2+1];
    end else x_in = ITEM_NONE;
    if (c >= 0 && c < 2 * M) begin
      y_in.valid = 1'b1;
      y_in.tag   = (c % 2 == 0) ? TAG_STORE : (checked[c/2+1] ? TAG_COMPARE : TAG_STORE);
      y_in.data  = (c % 2 == 0) ? ya0[c/2+1] : yb0[c/2+1];
    end else y_in = ITEM_NONE;
    for (int p = 0; p < N; p++) begin
      a_in[p] = coef(c, p);
      fault_mask[p] = (p == fp && (c == fc || (persist && c > fc))) ? fm : '0;
    end
  endtask

  task automatic run(input int fp, input int fc, input bit persist, input data_t fm);
    for (int i = 1; i <= M; i++) begin
      y_t0[i-1][0] = TAG_STORE;
      y_t0[i-1][1] = checked[i] ? TAG_COMPARE : TAG_STORE;
    end
    x_t0 = '0;
    clear = 1'b1;
    drive(-1, -1, -1, 1'b0, '0);
    @(posedge clk); #1;
    clear = 1'b0;
    check(!err && !obs_err && !done && !found, "cleared");
    ny = 0; det_cnt = 0; err_cyc = -1; ey_cyc = -1; obs_cyc = -1;
    drive(0, fp, fc, persist, fm);
    for (int c = 0; c < CYC; c++) begin
      @(posedge clk); #1;
      if (y_out.valid && ny < 2 * M) yres[ny++] = y_out;
      det_cnt += $countones(pe_det);
      if (err && err_cyc < 0) err_cyc = c;
      if (obs_err && obs_cyc < 0) obs_cyc = c;
      if (e_y != '0 && ey_cyc < 0) ey_cyc = c;
      drive(c + 1, fp, fc, persist, fm);
    end
    check(done && ny == 2 * M, "all items out");
  endtask

  initial begin
    rst_n = 1'b0; clear = 1'b0;
    foreach (a_in[p]) begin a_in[p] = '0; fault_mask[p] = '0; end
    x_in = ITEM_NONE; y_in = ITEM_NONE; y_t0 = '0; x_t0 = '0;
    checked = '1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // fault-free checked runs
    for (int r = 0; r < 4; r++) begin
      new_problem(1'b1);
      checked = '1;
      run(-1, -1, 1'b0, '0);
      check(!err && !obs_err && !found && det_cnt == 0, "no error without fault");
      for (int i = 1; i <= M; i++)
        check(yres[2*i-2].data == ref_y(i, 1'b0) && yres[2*i-1].data == ref_y(i, 1'b1),
              "product");
      n_clean++;
    end

    // worked example: P2 fails at step 4
    new_problem(1'b1);
    checked = '1;
    run(2, 4, 1'b0, 16'h0040);
    check(e_y == 3'b010 && e_x == 5'b00100, "example error vectors");
    check(found && y_pos == 2 && x_pos == 3 && p_det == 1 && t_det == 5, "example location");
    // y2's checked copy leaves P0 after step 6, the monitor registers it after step 7
    check(err_cyc == 7, "example detection latency");
    check(!obs_err, "P1's report is left of the observation point");

    // every one-cycle fault
    for (int fp = 0; fp < N; fp++)
      for (int fc = 0; fc < 2 * M + N; fc++) begin
        int v, i, rep, u, j;
        bit store_step;
        v = fc - (N - 1 - fp);
        if (v < 0 || v >= 2 * M) continue;
        i = v / 2 + 1;
        store_step = (v % 2 == 0);
        new_problem(1'b1);
        checked = '1;
        run(fp, fc, 1'b0, data_t'(1 + $urandom % 16'hfffe));
        rep = store_step ? fp : fp - 1;
        if (rep < 0) begin
          n_unseen++;
          check(!err && !found && det_cnt == 0, "P0 compare step unreported");
          check(yres[2*i-1].data != yres[2*i-2].data, "copies disagree at the output");
          continue;
        end
        if (store_step) n_store_rep++; else n_cmp_rep++;
        n_detect++;
        check(err && det_cnt == 1 && e_y == (M)'(1 << (i - 1)), "y error vector");
        if (rep > 0) n_stop++;   // the flagged item passed further cells unchecked
        u = fc + 1 - rep;
        j = u / 2 + 1;
        if (u >= 0 && j <= NX) begin
          n_xtag++; n_locate++;
          check(e_x == (NX)'(1 << (j - 1)), "x error vector");
          check(found && p_det == rep && t_det == fc + 1, "located cell and step");
          check(fp == p_det || fp == p_det + 1, "faulty cell in the reported pair");
          check(!resolved, "single report not resolved");
        end else begin
          n_noloc++;
          check(!found && e_x == '0, "no x item to carry the tag");
        end
        if (rep >= 2) begin
          check(obs_err && obs_cyc >= 0 && obs_cyc < ey_cyc, "observation point earlier");
          n_obs_early++;
        end else begin
          check(!obs_err, "observation point blind to cells on its left");
        end
      end

    // persistent faults
    for (int fp = 0; fp < N; fp++)
      for (int fc = 0; fc < 2 * M + N; fc++) begin
        new_problem(1'b1);
        checked = '1;
        run(fp, fc, 1'b1, data_t'(1 + $urandom % 16'hfffe));
        if (resolved) begin
          n_resolved++;
          check(faulty == fp, "resolved to the faulty cell");
        end
        if ((fp == 2 && fc == 4) || (fp == 1 && fc == 5))
          check(resolved && faulty == fp, "persistent example resolved");
      end

    // unchecked mode: two multiplications in one pass
    for (int r = 0; r < 3; r++) begin
      new_problem(1'b0);
      checked = '0;
      run(-1, -1, 1'b0, '0);
      check(!err && !found && det_cnt == 0, "unchecked mode raises nothing");
      for (int i = 1; i <= M; i++) begin
        check(yres[2*i-2].data == ref_y(i, 1'b0), "first multiplication");
        check(yres[2*i-1].data == ref_y(i, 1'b1), "second multiplication");
      end
      n_unchecked++;
    end

    // mixed: y2 unchecked, y1 and y3 checked. P2 holds the first copy of y_i
    // (compute-and-store) at step 2i-1, so step 3 is y2's and step 5 is y3's.
    new_problem(1'b1);
    checked = 3'b101;
    run(2, 3, 1'b0, 16'h0100);
    check(!err && det_cnt == 0, "fault on unchecked item unreported");
    check(yres[0].data == ref_y(1, 1'b0) && yres[4].data == ref_y(3, 1'b0), "checked items");
    n_skip_unchecked++;
    run(2, 5, 1'b0, 16'h0100);
    check(err && e_y == 3'b100 && e_x == 5'b00100 && found && p_det == 2 && t_det == 6,
          "fault on checked item");

    check(n_clean > 0, "mechanism: fault-free run");
    check(n_detect > 0 && n_store_rep > 0 && n_cmp_rep > 0, "mechanism: store and compare reports");
    check(n_xtag > 0 && n_locate > 0, "mechanism: x error tag and location");
    check(n_noloc > 0 && n_unseen > 0, "mechanism: uncovered slots");
    check(n_stop > 0, "mechanism: flagged item not rechecked");
    check(n_resolved > 0, "mechanism: persistent fault resolved");
    check(n_obs_early > 0, "mechanism: observation point");
    check(n_unchecked > 0 && n_skip_unchecked > 0, "mechanism: unchecked items");
    $display("clean=%0d detect=%0d (store %0d, compare %0d) located=%0d unlocated=%0d unseen=%0d",
             n_clean, n_detect, n_store_rep, n_cmp_rep, n_locate, n_noloc, n_unseen);
    $display("resolved=%0d obs_early=%0d unchecked=%0d stop=%0d",
             n_resolved, n_obs_early, n_unchecked, n_stop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_bla_array - self-checking test of the bidirectional linear array.
//
// Acts as the host: enters every x item and every y item twice in consecutive
// slots (x from the left into P0, y from the right into the last cell) and
// drives each cell's coefficient input with the matrix element of the x and
// y items that meet in that cell in that cycle. A random tridiagonal M x M
// matrix is used. Checked against sums computed here:
//   * checked mode (y tags 1,0): both copies of every y_i equal y_i + sum a_ij x_j,
//     no cell reports a mismatch and all tags leave unchanged;
//   * unchecked mode (all y tags 1): the two copies carry two independent
//     multiplications (different x vectors and matrices), both correct;
//   * a one-cycle fault in every cell at many time steps: exactly the
//     expected cell reports one step later (the cell itself when the fault hit
//     a compute-and-store step, its left neighbour when it hit a
//     compare-and-compute step, nobody for P0's compare step), the y tag and
//     x error tag of the items in the reporting cell leave as 1, and the
//     copy the fault did not touch is still correct.
module tb_bla_array;
  import fdla_pkg::*;

  localparam int N   = 4;
  localparam int M   = 8;
  localparam int NXT = M + 2;          // x items, the last ones carry tags only
  localparam int CYC = 2 * NXT + N + 4;

  logic  clk = 1'b0, rst_n;
  item_t x_in, y_in;
  data_t a_in [N];
  data_t fault_mask [N];
  item_t x_link [N];
  item_t y_link [N];
  logic  [N-1:0] det;

  bla_array #(.N_PE(N)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_store_det = 0, n_cmp_det = 0, n_unseen = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // host data; index 0 unused
  data_t ma [M+1][NXT+1];   // matrix seen by the first (A) copies
  data_t mb [M+1][NXT+1];   // matrix seen by the second (B) copies
  data_t xa [NXT+1], xb [NXT+1];
  data_t ya0 [M+1], yb0 [M+1];
  logic  tag_a, tag_b;

  // results
  item_t yout [2*M];
  item_t xout [2*NXT];
  int    ny, nx;
  int    det_cnt, det_p, det_c;

  function automatic void new_problem(input bit same);
    for (int i = 1; i <= M; i++) begin
      for (int j = 1; j <= NXT; j++) begin
        bit band = (j >= i - 1) && (j <= i + 1) && (j <= M);
        ma[i][j] = band ? data_t'($urandom) : '0;
        mb[i][j] = band ? (same ? ma[i][j] : data_t'($urandom)) : '0;
      end
      ya0[i] = data_t'($urandom);
      yb0[i] = same ? ya0[i] : data_t'($urandom);
    end
    for (int j = 1; j <= NXT; j++) begin
      xa[j] = j <= M ? data_t'($urandom) : '0;
      xb[j] = same ? xa[j] : (j <= M ? data_t'($urandom) : '0);
    end
  endfunction

  function automatic data_t coef(input int c, input int p);
    int u = c - p;
    int v = c - (N - 1 - p);
    if (u < 0 || u >= 2 * NXT || v < 0 || v >= 2 * M) return '0;
    return (v % 2 == 0) ? ma[v/2+1][u/2+1] : mb[v/2+1][u/2+1];
  endfunction

  function automatic data_t ref_y(input int i, input bit copy_b);
    data_t s = copy_b ? yb0[i] : ya0[i];
    for (int j = 1; j <= M; j++)
      s += copy_b ? data_t'(mb[i][j] * xb[j]) : data_t'(ma[i][j] * xa[j]);
    return s;
  endfunction

  task automatic drive(input int c, input int fp, input int fc, input data_t fm);
    if (c < 2 * NXT) begin
      x_in.valid = 1'b1;
      x_in.tag   = 1'b0;
      x_in.data  = (c % 2 == 0) ? xb[c/2+1] : xa[c/2+1];
    end else x_in = ITEM_NONE;
    if (c < 2 * M) begin
      y_in.valid = 1'b1;
      y_in.tag   = (c % 2 == 0) ? tag_a : tag_b;
      y_in.data  = (c % 2 == 0) ? ya0[c/2+1] : yb0[c/2+1];
    end else y_in = ITEM_NONE;
    for (int p = 0; p < N; p++) begin
      a_in[p] = coef(c, p);
      fault_mask[p] = (p == fp && c == fc) ? fm : '0;
    end
  endtask

  task automatic run(input int fp, input int fc, input data_t fm);
    rst_n = 1'b0;
    drive(-100, -1, -1, '0);
    @(posedge clk); #1;
    rst_n = 1'b1;
    ny = 0; nx = 0; det_cnt = 0; det_p = -1; det_c = -1;
    drive(0, fp, fc, fm);
    for (int c = 0; c < CYC; c++) begin
      @(posedge clk); #1;
      if (y_link[0].valid) yout[ny++] = y_link[0];
      if (x_link[N-1].valid) xout[nx++] = x_link[N-1];
      for (int p = 0; p < N; p++)
        if (det[p]) begin
          det_cnt++; det_p = p; det_c = c;   // mismatch found in cycle c
        end
      drive(c + 1, fp, fc, fm);
    end
  endtask

  initial begin
    rst_n = 1'b0;
    foreach (a_in[p]) begin a_in[p] = '0; fault_mask[p] = '0; end
    x_in = ITEM_NONE; y_in = ITEM_NONE;

    // checked mode, no fault
    for (int r = 0; r < 5; r++) begin
      new_problem(1'b1);
      tag_a = TAG_STORE; tag_b = TAG_COMPARE;
      run(-1, -1, '0);
      check(ny == 2 * M && nx == 2 * NXT, "item counts");
      check(det_cnt == 0, "no report without fault");
      for (int i = 1; i <= M; i++) begin
        check(yout[2*i-2].data == ref_y(i, 1'b0) && yout[2*i-2].tag == 1'b1, "y copy A");
        check(yout[2*i-1].data == ref_y(i, 1'b1) && yout[2*i-1].tag == 1'b0, "y copy B");
      end
      for (int k = 0; k < 2 * NXT; k++) check(xout[k].tag == 1'b0, "x tag clean");
    end

    // unchecked mode: two multiplications at once
    for (int r = 0; r < 5; r++) begin
      new_problem(1'b0);
      tag_a = TAG_STORE; tag_b = TAG_STORE;
      run(-1, -1, '0);
      check(det_cnt == 0, "no report in unchecked mode");
      for (int i = 1; i <= M; i++) begin
        check(yout[2*i-2].data == ref_y(i, 1'b0), "first multiplication");
        check(yout[2*i-1].data == ref_y(i, 1'b1), "second multiplication");
      end
    end

    // single transient faults
    for (int fp = 0; fp < N; fp++)
      for (int fc = 0; fc < CYC; fc++) begin
        int v, i, rep, u;
        bit store_step;
        v = fc - (N - 1 - fp);
        if (v < 0 || v >= 2 * M) continue;        // no y item in the cell
        i = v / 2 + 1;
        store_step = (v % 2 == 0);
        new_problem(1'b1);
        tag_a = TAG_STORE; tag_b = TAG_COMPARE;
        run(fp, fc, data_t'(1 + $urandom % 16'hfffe));
        rep = store_step ? fp : fp - 1;
        if (rep < 0) begin
          n_unseen++;
          check(det_cnt == 0, "P0 compare step goes unreported");
          check(yout[2*i-1].data != ref_y(i, 1'b1) && yout[2*i-2].data == ref_y(i, 1'b0),
                "P0 fault visible only in its copy");
          continue;
        end
        if (store_step) n_store_det++; else n_cmp_det++;
        check(det_cnt == 1 && det_p == rep && det_c == fc + 1, "reporting cell and step");
        check(yout[2*i-1].tag == 1'b1, "y tag inverted");
        if (store_step) check(yout[2*i-1].data == ref_y(i, 1'b1), "untouched copy B");
        else            check(yout[2*i-2].data == ref_y(i, 1'b0), "untouched copy A");
        u = fc + 1 - rep;                           // x item in the reporting cell
        if (u >= 0 && u < 2 * NXT)
          check(xout[u].tag == 1'b1 && u % 2 == 0, "x error tag set on first copy");
        for (int k = 0; k < 2 * NXT; k++)
          if (k != u) check(xout[k].tag == 1'b0, "other x tags clean");
      end

    check(n_store_det > 5 && n_cmp_det > 5 && n_unseen > 0, "coverage");
    $display("store-step reports=%0d compare-step reports=%0d unseen=%0d",
             n_store_det, n_cmp_det, n_unseen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

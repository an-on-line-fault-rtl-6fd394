// tb_ips_pe - self-checking test of one inner-product-step cell.
//
// Drives the cell with random tagged x and y items, coefficients and
// occasional fault masks, and checks every registered output against a
// reference written here from the cell's rules: y_out = y_in + a*x (XOR the
// fault mask), a tag-1 y item loads L, a tag-0 y item is compared with L and a
// mismatch turns the y tag and the x tag (if an x item is present) to 1. Half
// of the comparisons are set up to match, so both outcomes occur. A watchdog
// ends the run if it hangs.
module tb_ips_pe;
  import fdla_pkg::*;

  logic  clk = 1'b0;
  logic  rst_n;
  item_t x_in, y_in, x_out, y_out;
  data_t a_in, fault_mask;
  logic  det;

  int checks = 0, failures = 0;
  int n_match = 0, n_mismatch = 0, n_store = 0;

  ips_pe dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  data_t ref_l;
  item_t exp_x, exp_y;
  logic  exp_det;

  initial begin
    rst_n = 1'b0;
    x_in = ITEM_NONE; y_in = ITEM_NONE; a_in = '0; fault_mask = '0;
    ref_l = '0;
    @(posedge clk); @(posedge clk);
    #1;
    check(y_out == ITEM_NONE && x_out == ITEM_NONE && !det, "reset");
    rst_n = 1'b1;

    for (int k = 0; k < 2000; k++) begin
      // drive new inputs
      x_in.valid = ($urandom % 4) != 0;
      x_in.tag   = ($urandom % 4) == 0;
      x_in.data  = data_t'($urandom);
      y_in.valid = ($urandom % 5) != 0;
      y_in.tag   = $urandom % 2;
      y_in.data  = data_t'($urandom);
      if (!y_in.tag && ($urandom % 2)) y_in.data = ref_l;  // make it match
      a_in       = data_t'($urandom);
      fault_mask = (($urandom % 8) == 0) ? data_t'($urandom) : '0;

      // reference
      begin
        data_t xv, res;
        logic  cmp, mm;
        xv  = x_in.valid ? x_in.data : '0;
        res = data_t'(y_in.data + a_in * xv) ^ fault_mask;
        cmp = y_in.valid && !y_in.tag;
        mm  = cmp && (y_in.data != ref_l);
        if (cmp && mm)  n_mismatch++;
        if (cmp && !mm) n_match++;
        exp_x = x_in;
        exp_x.tag = x_in.tag | (mm & x_in.valid);
        exp_y.valid = y_in.valid;
        exp_y.tag   = y_in.tag | mm;
        exp_y.data  = y_in.valid ? res : '0;
        exp_det     = mm;
        if (y_in.valid && y_in.tag) begin
          ref_l = res;
          n_store++;
        end
      end

      @(posedge clk);
      #1;
      check(x_out == exp_x, "x_out");
      check(y_out == exp_y, "y_out");
      check(det == exp_det, "det");
    end

    check(n_match > 100 && n_mismatch > 100 && n_store > 100, "coverage");
    $display("stores=%0d matches=%0d mismatches=%0d", n_store, n_match, n_mismatch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

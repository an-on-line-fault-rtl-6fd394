// tb_tag_monitor - self-checking test of the error-vector builder.
//
// Feeds random streams of ITEMS*COPIES tagged items, with empty slots in
// between and extra items after the last, against random preassigned tags,
// and checks the error vector, the err flag (which must rise in the cycle after
// the first differing tag) and done against values computed here. clear is
// exercised between the runs. A watchdog ends the run if it hangs.
module tb_tag_monitor;
  import fdla_pkg::*;

  localparam int ITEMS = 5, COPIES = 2;

  logic clk = 1'b0, rst_n, clear;
  item_t item;
  logic [ITEMS-1:0][COPIES-1:0] t0;
  logic [ITEMS-1:0] e;
  logic err, done;

  int checks = 0, failures = 0;

  tag_monitor #(.ITEMS(ITEMS), .COPIES(COPIES)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #500000;
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

  initial begin
    logic [ITEMS-1:0] exp_e;
    int n, n_err_runs;
    rst_n = 1'b0; clear = 1'b0; item = ITEM_NONE; t0 = '0;
    n_err_runs = 0;
    @(posedge clk); #1;
    rst_n = 1'b1;
    for (int run = 0; run < 200; run++) begin
      clear = 1'b1; item = ITEM_NONE;
      t0 = ITEMS*COPIES'($urandom);
      @(posedge clk); #1;
      clear = 1'b0;
      check(e == '0 && !err && !done, "cleared");
      exp_e = '0;
      n = 0;
      while (n < ITEMS*COPIES + 3) begin
        if ($urandom % 3 == 0) begin
          item = ITEM_NONE;
        end else begin
          item.valid = 1'b1;
          item.data  = data_t'($urandom);
          if (n < ITEMS*COPIES) begin
            // mostly the preassigned tag, sometimes the other value
            item.tag = t0[n/COPIES][n%COPIES] ^ (($urandom % 6) == 0);
            if (item.tag != t0[n/COPIES][n%COPIES]) exp_e[n/COPIES] = 1'b1;
          end else begin
            item.tag = $urandom % 2;   // beyond the last item: ignored
          end
          n++;
        end
        @(posedge clk); #1;
        check(e == exp_e, "error vector");
        check(err == (exp_e != '0), "err flag");
        check(done == (n >= ITEMS*COPIES), "done");
      end
      if (exp_e != '0) n_err_runs++;
    end
    check(n_err_runs > 20 && n_err_runs < 200, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

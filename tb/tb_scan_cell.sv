// tb_scan_cell: self-checking test of one mux-D scan flip-flop.
//
// Drives random sel, d and si for many clocks and checks after every rising
// edge that q holds si when sel was 1 (test mode) and d when sel was 0
// (normal mode). The expected value is taken from the inputs applied before
// the edge, not from the cell. Also checks that q holds between edges and
// that both modes and switches between them all occur.
module tb_scan_cell;

  logic clk = 1'b0;
  logic sel, d, si;
  logic q;

  int checks = 0;
  int failures = 0;
  int n_test = 0, n_normal = 0, n_switch = 0;

  scan_cell dut (.clk(clk), .sel(sel), .d(d), .si(si), .q(q));

  always #5 clk = ~clk;

  // Watchdog.
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic expected, prev_sel;
    sel = 1'b1; d = 1'b0; si = 1'b0;
    prev_sel = 1'b1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      sel = 1'($urandom);
      d   = 1'($urandom);
      si  = 1'($urandom);
      // Make sure d and si differ often, so a wrong mux choice shows.
      if (i % 3 == 0) si = ~d;
      expected = sel ? si : d;
      if (sel) n_test++; else n_normal++;
      if (i > 0 && sel != prev_sel) n_switch++;
      prev_sel = sel;
      @(posedge clk);
      #1;
      checks++;
      if (q !== expected) begin
        failures++;
        $display("cycle %0d: sel=%b d=%b si=%b q=%b expected %b", i, sel, d, si, q, expected);
      end
      // Inputs changing between edges must not reach q.
      d = ~d; si = ~si; sel = ~sel;
      #2;
      checks++;
      if (q !== expected) begin
        failures++;
        $display("cycle %0d: q changed between clock edges", i);
      end
    end
    checks++;
    if (n_test == 0 || n_normal == 0 || n_switch == 0) begin
      failures++;
      $display("mode coverage missing: test=%0d normal=%0d switches=%0d", n_test, n_normal, n_switch);
    end
    $display("test-mode clocks=%0d normal-mode clocks=%0d mode switches=%0d", n_test, n_normal, n_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

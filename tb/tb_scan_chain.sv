// tb_scan_chain: end-to-end test of the full-scan register, at its default
// size of six flip-flops.
//
// Runs the scan test procedure once per test pattern:
//   load    SELECT = 1 for N_FF clocks, pattern enters through SI (FF6's bit
//           first). After exactly N_FF clocks every flip-flop must hold its
//           pattern bit and SO must show FF6. Random values on the functional
//           inputs d must have no effect while shifting.
//   capture SELECT = 0 for one clock (clock N_FF + 1): every flip-flop must
//           take its functional input. The functional inputs stand in for
//           the circuit's combinational logic and are random here.
//   unload  SELECT = 1 again: SO must present the captured state FF6 first,
//           FF1 last, while the next pattern shifts in behind it.
// The first patterns are the flip-flop parts of the three stuck-at test
// patterns of the source circuit (FF1..FF6 = 000001 for the H stuck-at-1 and
// J stuck-at-1 tests, 000111 for the K stuck-at-0 test); random patterns
// follow. Expected values come from the patterns and the inputs applied, not
// from the design. Each mechanism (shift, capture, mode switch, scan-out
// observation, load of a document pattern) is counted and must occur.
module tb_scan_chain;
  import scan_pkg::*;

  localparam int unsigned N = N_SCAN_FF;
  localparam int unsigned N_PATTERNS = 40;

  logic         clk = 1'b0;
  logic         sel;
  logic         si;
  logic [N-1:0] d;
  logic [N-1:0] q;
  logic         so;

  int checks = 0;
  int failures = 0;
  int n_shift = 0, n_capture = 0, n_switch = 0, n_so_obs = 0, n_doc_pat = 0;
  logic last_sel = 1'b1;

  scan_chain dut (.clk(clk), .sel(sel), .si(si), .d(d), .q(q), .so(so));

  always #5 clk = ~clk;

  // Count clocks per mode and mode switches as they happen.
  always @(posedge clk) begin
    if (sel) n_shift++; else n_capture++;
    if (sel != last_sel) n_switch++;
    last_sel <= sel;
  end

  // Watchdog.
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  // One clock with the given controls; inputs change at the falling edge.
  task automatic clock(input logic s, input logic scan_bit, input logic [N-1:0] func);
    @(negedge clk);
    sel = s;
    si  = scan_bit;
    d   = func;
    @(posedge clk);
    #1;
  endtask

  // Shift `pattern` in (FF6's bit first) while checking that SO presents
  // `unload` (the state held before the shift), FF6 first.
  task automatic scan_load(input logic [N-1:0] pattern, input logic [N-1:0] unload,
                           input bit check_unload);
    int start_cycle;
    for (int k = 0; k < N; k++) begin
      if (check_unload) begin
        check(so == unload[N-1-k], $sformatf("SO bit %0d of unload: got %b want %b",
                                              k, so, unload[N-1-k]));
        n_so_obs++;
      end
      clock(TEST_MODE, pattern[N-1-k], N'($urandom));
    end
  endtask

  initial begin
    logic [N-1:0] patterns [N_PATTERNS];
    logic [N-1:0] captured, func;
    int t0, t1;
    bit have_state;

    // Flip-flop parts of the source circuit's test patterns, q[0] = FF1.
    patterns[0] = 6'b100000;   // H stuck-at-1: FF6 = 1, FF1..FF5 = 0
    patterns[1] = 6'b100000;   // J stuck-at-1: same pattern
    patterns[2] = 6'b111000;   // K stuck-at-0: FF4 = FF5 = FF6 = 1
    for (int p = 3; p < N_PATTERNS; p++) patterns[p] = N'($urandom);

    sel = 1'b1; si = 1'b0; d = '0;
    have_state = 1'b0;
    captured = '0;
    // Align with the clock so the clock counters start between edges.
    @(posedge clk);
    #1;

    for (int p = 0; p < N_PATTERNS; p++) begin
      // Load: exactly N clocks in test mode.
      t0 = n_shift + n_capture;
      scan_load(patterns[p], captured, have_state);
      t1 = n_shift + n_capture;
      check(t1 - t0 == N, $sformatf("load took %0d clocks, want %0d", t1 - t0, N));
      check(q == patterns[p], $sformatf("pattern %0d: state %b after load, want %b",
                                         p, q, patterns[p]));
      check(so == patterns[p][N-1], "SO does not show FF6 after load");
      n_so_obs++;
      if (p < 3) n_doc_pat++;

      // Capture: one clock in normal mode, N + 1 clocks since the load began.
      func = N'($urandom);
      if (p % 4 == 1) func = ~patterns[p];   // every bit must change
      clock(NORMAL_MODE, ~patterns[p][0], func);
      t1 = n_shift + n_capture;
      check(t1 - t0 == N + 1, $sformatf("capture at clock %0d, want %0d", t1 - t0, N + 1));
      check(q == func, $sformatf("pattern %0d: captured %b, want %b", p, q, func));
      captured = func;
      have_state = 1'b1;
    end

    // Final unload of the last response.
    scan_load('0, captured, 1'b1);
    check(q == '0, "chain not cleared by final shift of zeros");

    check(n_shift > 0,   "no shift clocks");
    check(n_capture > 0, "no capture clocks");
    check(n_switch > 0,  "no mode switches");
    check(n_so_obs > 0,  "SO never observed");
    check(n_doc_pat == 3, "source test patterns not all loaded");
    $display("shift clocks=%0d capture clocks=%0d mode switches=%0d SO observations=%0d source patterns=%0d",
             n_shift, n_capture, n_switch, n_so_obs, n_doc_pat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

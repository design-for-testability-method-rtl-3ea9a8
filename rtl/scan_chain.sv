// scan_chain: the full-scan register of a sequential circuit under test.
//
// Every flip-flop of the circuit (FF1..FF6) is replaced by a scan_cell, and
// the cells are linked into one shift register: the SI pin feeds FF1, each
// cell's output feeds the next cell's scan input, and FF6 drives the SO pin.
// All cells share CLK and SELECT.
//
// Test procedure this structure supports:
//   1. SELECT = 1 for N_FF clocks: a test pattern enters through SI, the bit
//      meant for FF6 first and the bit for FF1 last. After N_FF clocks every
//      flip-flop holds its pattern bit and SO shows FF6.
//   2. Primary inputs are applied; SELECT = 0 for one clock: every flip-flop
//      captures the value its logic computes (one more clock, N_FF + 1 in
//      all). A fault seen only through the combinational logic at the primary
//      output needs no capture clock and shows after N_FF clocks.
//   3. SELECT = 1 again: the captured state leaves through SO, FF6 first,
//      while the next pattern enters through SI.
//
// Interface: d[i] is the functional next-state input of flip-flop FF(i+1),
// computed by the circuit's own logic outside this module; q[i] is its
// output, which goes back to that logic; so equals q[N_FF-1].
// Timing: one bit shifted or captured per rising clock edge, no reset (the
// state is loaded through the chain).
// The cell count, the chain order FF1 -> FF6 between SI and SO and the
// SELECT polarity follow the source circuit. The combinational logic itself
// is not part of this module: its connections are the d and q ports.
module scan_chain #(
  parameter int unsigned N_FF = scan_pkg::N_SCAN_FF
) (
  input  logic            clk,
  input  logic            sel,   // SELECT: 1 test (shift), 0 normal (capture)
  input  logic            si,    // SI: scan input into FF1
  input  logic [N_FF-1:0] d,     // functional next-state inputs, d[0] = FF1
  output logic [N_FF-1:0] q,     // flip-flop outputs, q[0] = FF1
  output logic            so     // SO: scan output, FF(N_FF)
);

  if (N_FF < 2) begin : g_size_check
    $error("scan_chain: N_FF must be at least 2");
  end

  // Scan input of every cell: SI for the first, the previous cell otherwise.
  logic [N_FF-1:0] scan_in;

  assign scan_in = {q[N_FF-2:0], si};

  for (genvar i = 0; i < N_FF; i++) begin : g_cell
    scan_cell u_cell (
      .clk (clk),
      .sel (sel),
      .d   (d[i]),
      .si  (scan_in[i]),
      .q   (q[i])
    );
  end

  assign so = q[N_FF-1];

endmodule

// scan_cell: mux-D scan flip-flop, the building block of a full-scan design.
//
// A 2-to-1 multiplexer sits in front of a D flip-flop. With sel = TEST_MODE
// (1) the multiplexer passes si, the output of the previous cell in the scan
// chain, so a chain of these cells shifts one bit per clock. With
// sel = NORMAL_MODE (0) it passes d, the next-state value computed by the
// circuit's combinational logic, and the cell behaves as the plain flip-flop
// of the original sequential circuit.
//
// Interface: clk, sel, d (functional input), si (scan input), q.
// Timing: q takes the selected input at the rising edge of clk; sel, d and si
// must be stable around that edge. There is no reset: as in the source
// circuit, the cell is initialised by shifting a value in through the chain.
// The multiplexer-plus-flip-flop structure and the SELECT polarity follow
// the source circuit; the rising clock edge is this design's choice.
module scan_cell (
  input  logic clk,
  input  logic sel,
  input  logic d,
  input  logic si,
  output logic q
);

  logic d_mux;

  // The 2-to-1 scan multiplexer.
  always_comb begin
    if (scan_pkg::scan_mode_e'(sel) == scan_pkg::TEST_MODE) d_mux = si;
    else                                                    d_mux = d;
  end

  // The D flip-flop.
  always_ff @(posedge clk) begin
    q <= d_mux;
  end

endmodule

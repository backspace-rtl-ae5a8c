// bs_scan_reg: the state flip-flops of the circuit under debug, with full scan.
//
// The debugged core has no scan of its own, so every one of its N_STATE state
// bits is held here in a mux-D scan flip-flop. In functional mode (func_en)
// the register loads the next state computed by the core's logic; when
// func_en is low the core is stopped and holds its state, which is how the
// debug hardware stops the core at a cycle target or a breakpoint. In scan
// mode (scan_en, which takes priority) the register shifts one place per
// clock towards the MSB: scan_in enters bit 0 and scan_out is bit N_STATE-1,
// so a full dump takes N_STATE clocks and presents the MSB first. Feeding
// scan_out back to scan_in leaves the state unchanged after N_STATE clocks.
//
// There is no reset here: like ordinary scan flops, reset values come through
// the functional path (the core's own reset logic drives d).
// Full scan of all state bits follows the described system; the chain order
// (bit index order) and the single chain are this design's choices.
module bs_scan_reg #(
  parameter int unsigned N_STATE = 3007
) (
  input  logic               clk,
  input  logic               func_en,   // load d (core clock enable)
  input  logic [N_STATE-1:0] d,         // next state from the core's logic
  input  logic               scan_en,   // shift the chain, overrides func_en
  input  logic               scan_in,
  output logic [N_STATE-1:0] q,         // current core state
  output logic               scan_out
);

  always_ff @(posedge clk) begin
    if (scan_en)
      q <= {q[N_STATE-2:0], scan_in};
    else if (func_en)
      q <= d;
  end

  assign scan_out = q[N_STATE-1];

endmodule

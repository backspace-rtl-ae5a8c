// bs_breakpoint: programmable, maskable state breakpoint.
//
// The breakpoint compares all N_STATE state bits of the circuit under debug
// with a target state and raises hit in the same cycle when every bit that is
// not masked off is equal. A mask bit of 1 removes that state bit from the
// comparison (partial match); an all-zero mask asks for an exact match of the
// whole state. hit is only raised while arm is high.
//
// Target and mask are control/status (CSR) bits loaded serially: with
// csr_shift high, csr_in enters the chain {mask, target} at target bit 0 and
// everything moves one place towards mask bit N_STATE-1, which leaves on
// csr_out. Loading therefore takes 2*N_STATE clocks: the mask MSB first, the
// target LSB last. Reset clears target and mask.
//
// Matching the full state with a mask follows the described system; the serial
// chain order, the mask polarity and the reset values are this design's own.
module bs_breakpoint #(
  parameter int unsigned N_STATE = 3007
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               csr_shift,  // shift one CSR bit in
  input  logic               csr_in,
  output logic               csr_out,    // bit shifted out (for chaining / read-back)
  input  logic               arm,        // enable the breakpoint signal
  input  logic [N_STATE-1:0] state,      // current CUD state
  output logic               hit         // breakpoint signal, combinational
);

  logic [N_STATE-1:0] target;
  logic [N_STATE-1:0] mask;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      target <= '0;
      mask   <= '0;
    end else if (csr_shift) begin
      {mask, target} <= {mask[N_STATE-2:0], target, csr_in};
    end
  end

  assign csr_out = mask[N_STATE-1];

  // Every bit either masked off or equal to the target.
  assign hit = arm && (&(mask | ~(state ^ target)));

endmodule

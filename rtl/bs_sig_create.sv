// bs_sig_create: signature creation circuit.
//
// Each cycle the signature is formed from N_MON monitored bits of the
// N_STATE-bit state of the circuit under debug. In the configuration built
// here the signature is simply a fixed subset of the state bits with no
// compression, so the signature width equals N_MON. Which bits are monitored
// is fixed at design time by MON_MASK: bit i set means state bit i is
// monitored, and the monitored bits appear in the signature in ascending
// index order (the lowest monitored state bit becomes signature bit 0).
// MON_MASK must have exactly N_MON bits set.
//
// The circuit is pure wiring selected at elaboration time; it has no clock and
// no latency. The signature register itself lives in the trace buffer
// (bs_sig_collect), which captures this output on each core clock.
//
// Uncompressed subset selection and the widths follow the described system.
// Which bits were hand-picked is not known, so the default mask monitors the
// lowest N_MON state bits; a real design sets MON_MASK to its chosen bits.
module bs_sig_create #(
  parameter int unsigned       N_STATE  = 3007,
  parameter int unsigned       N_MON    = 1276,
  parameter logic [N_STATE-1:0] MON_MASK = {{(N_STATE - N_MON){1'b0}}, {N_MON{1'b1}}}
) (
  input  logic [N_STATE-1:0] state,
  output logic [N_MON-1:0]   sig
);

  localparam int unsigned IDX_W = (N_STATE > 1) ? $clog2(N_STATE) : 1;
  typedef logic [N_MON-1:0][IDX_W-1:0] idx_table_t;

  // Position in the state vector of each signature bit.
  function automatic idx_table_t mon_index(input logic [N_STATE-1:0] m);
    idx_table_t  t;
    int unsigned k;
    for (int unsigned j = 0; j < N_MON; j++) t[j] = '0;
    k = 0;
    for (int unsigned i = 0; i < N_STATE; i++) begin
      if (m[i] && k < N_MON) begin
        t[k] = IDX_W'(i);
        k++;
      end
    end
    return t;
  endfunction

  localparam idx_table_t MON_IDX = mon_index(MON_MASK);

  for (genvar k = 0; k < N_MON; k++) begin : g_sel
    assign sig[k] = state[MON_IDX[k]];
  end

  initial begin
    assert ($countones(MON_MASK) == N_MON)
      else $error("bs_sig_create: MON_MASK must select exactly N_MON bits");
  end

endmodule

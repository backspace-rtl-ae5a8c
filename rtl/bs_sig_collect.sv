// bs_sig_collect: signature collection circuit (trace buffer).
//
// A circular buffer of TB_DEPTH signatures. On every clock in which the core
// advances (wr_en) the current signature is written, so after the edge the
// newest entry holds the signature of the state the core just left, i.e. of
// the predecessor of the present state. With TB_DEPTH = 1, the configuration
// described for the evaluated system, it is a single signature register.
//
// Collection stops for good when stop (the breakpoint signal) is seen and
// stays stopped until clear, which also empties the buffer; a write in the
// same cycle as stop is dropped. Stored signatures are read at any time:
// rd_addr 0 is the newest entry, 1 the one before it, and so on; count says
// how many entries are valid (saturating at TB_DEPTH). Reading is
// combinational from rd_addr.
//
// The storage is an array without reset (an SRAM in silicon). Buffer depth,
// stopping on the breakpoint and the read-out follow the described system;
// newest-first addressing and the clear input are this design's choices.
module bs_sig_collect #(
  parameter int unsigned S_WIDTH  = 1276,
  parameter int unsigned TB_DEPTH = 1,
  localparam int unsigned AW = (TB_DEPTH > 1) ? $clog2(TB_DEPTH) : 1,
  localparam int unsigned CW = $clog2(TB_DEPTH + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clear,     // empty the buffer and restart collection
  input  logic                  wr_en,     // the core advanced this cycle
  input  logic                  stop,      // breakpoint signal: stop collecting
  input  logic [S_WIDTH-1:0]    sig_in,
  input  logic [AW-1:0]         rd_addr,   // 0 = newest
  output logic [S_WIDTH-1:0]    rd_data,
  output logic [CW-1:0]         count,     // valid entries
  output logic                  stopped    // collection has been stopped
);

  logic [S_WIDTH-1:0] mem [TB_DEPTH];
  logic [AW-1:0]      wp;          // next entry to write

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp      <= '0;
      count   <= '0;
      stopped <= 1'b0;
    end else if (clear) begin
      wp      <= '0;
      count   <= '0;
      stopped <= 1'b0;
    end else if (stop) begin
      stopped <= 1'b1;
    end else if (wr_en && !stopped) begin
      wp <= (wp == AW'(TB_DEPTH - 1)) ? '0 : wp + 1'b1;
      if (count != CW'(TB_DEPTH))
        count <= count + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!clear && !stop && wr_en && !stopped)
      mem[wp] <= sig_in;
  end

  // Entry rd_addr places before the newest one, wrapping round the buffer.
  logic [AW-1:0] rd_idx;
  always_comb begin
    if (wp > rd_addr)
      rd_idx = wp - rd_addr - 1'b1;
    else
      rd_idx = AW'(int'(wp) + TB_DEPTH - int'(rd_addr) - 1);
  end

  assign rd_data = mem[rd_idx];

endmodule

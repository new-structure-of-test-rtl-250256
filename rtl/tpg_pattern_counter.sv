// tpg_pattern_counter -- TPC, the test pattern counter of the generator.
//
// Two counters in series. TPC0 counts up modulo n (MAFM) or modulo 2n
// (XMAFM) and is l0 = ceil(log2(n)) or ceil(log2(n))+1 bits wide. TPC1 is a
// plain binary counter, 4 bits for MAFM and 3 bits for XMAFM, and moves on
// when the most significant bit of TPC0 falls, which for an up-counter of
// that width happens exactly when TPC0 wraps to 0. Together they number the
// vectors: vector t = TPC1 * mod + TPC0. Moduli and widths follow the
// published size table.
//
// In the original structure the MSB of TPC0 is the clock of TPC1 (a ripple
// counter). Here both counters are clocked by clk and the falling MSB is
// detected from TPC0's next value, which gives the same count sequence
// without a derived clock (this design's choice). adv gates counting and
// load clears both counters synchronously (also this design's additions).
//
// Timing: tpc0/tpc1 change on the clock edge when adv=1.
module tpg_pattern_counter
  import tpg_pkg::*;
#(
  parameter int unsigned N   = 8,
  parameter seq_e        SEQ = SEQ_MAFM,
  localparam int unsigned MOD = tpc0_mod(SEQ, N),
  localparam int unsigned W0  = tpc0_width(SEQ, N),
  localparam int unsigned W1  = tpc1_width(SEQ)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,   // synchronous clear
  input  logic          adv,    // count this cycle
  output logic [W0-1:0] tpc0,
  output logic [W1-1:0] tpc1
);

  logic [W0-1:0] tpc0_next;
  logic          tpc1_tick;   // falling edge of TPC0's MSB

  always_comb begin
    if (tpc0 == W0'(MOD - 1)) tpc0_next = '0;
    else                      tpc0_next = tpc0 + W0'(1);
    tpc1_tick = tpc0[W0-1] & ~tpc0_next[W0-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tpc0 <= '0;
      tpc1 <= '0;
    end else if (load) begin
      tpc0 <= '0;
      tpc1 <= '0;
    end else if (adv) begin
      tpc0 <= tpc0_next;
      if (tpc1_tick) tpc1 <= tpc1 + W1'(1);
    end
  end

  initial assert (N >= 2) else $error("tpg_pattern_counter: N must be at least 2");

endmodule

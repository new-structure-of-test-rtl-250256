// tpg_toggle -- CNT, the one-bit binary counter that feeds the serial input
// of the generator's shift register.
//
// A single D flip-flop with an enable: on a rising clock edge with adv=1 and
// en=1 the output flips; with en=0 it holds. The pattern decoder drives en,
// so the bit stream leaving this counter alternates 0101... except at the
// decoded points where it repeats a bit; each repeated bit shifts the phase
// of every later bit and is what singles out a victim line further down the
// shift register. That behaviour is the published design.
//
// Added by this design: adv (advance) gates the whole generator, load
// presets the counter synchronously to INIT (the value a sequence must start
// from: 0 for MAFM, 1 for XMAFM), and rst_n presets it asynchronously.
//
// Timing: q changes one cycle after the en it responds to.
module tpg_toggle #(
  parameter logic INIT = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic load,   // synchronous preset to INIT (has priority)
  input  logic adv,    // the generator advances this cycle
  input  logic en,     // EN from the decoder: 1 = toggle, 0 = hold
  output logic q       // SI of the shift register
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         q <= INIT;
    else if (load)      q <= INIT;
    else if (adv && en) q <= ~q;
  end

endmodule

// sr_tpg -- the (2n-1)-SR test pattern generator for crosstalk faults on an
// N-line bus.
//
// Structure (as published): a one-bit toggle CNT feeds the serial input of a
// (2N-1)-stage shift register whose even stages drive the bus lines Y_i; a
// two-stage test pattern counter TPC numbers the vectors and a decoder DEC
// turns the count into EN (toggle or hold CNT) and EOT. While EN=1 the
// stream is 0101... and, because the lines are two stages apart, all lines
// switch together; every EN=0 repeats one bit, and that phase step travels
// down the register, making the lines before and after it move in opposite
// directions. The EN=0 positions are chosen so that each line in turn is a
// victim whose neighbours all switch the same way. With SEQ=SEQ_MAFM the
// output is an 8N+1-vector MAFM sequence (faults Pg0, Ng1, Dr, Df on every
// victim); with SEQ=SEQ_XMAFM a 12N+3-vector XMAFM sequence (adds Pg1, Ng0,
// and the all-lines Sr, Sf).
//
// Control (this design's own): reset leaves the generator idle with vector 0
// (all zeros) on y. A start pulse presets all state and sets busy; from the
// next cycle one vector per clock appears on y (vector 0 first). When the
// last vector is on y, eot=1; the generator then stops and holds that
// vector, with eot high, until the next start. So busy is high for exactly
// m clocks. scan_en shifts the register as a scan path and freezes the rest.
module sr_tpg
  import tpg_pkg::*;
#(
  parameter int unsigned N   = 8,
  parameter seq_e        SEQ = SEQ_MAFM
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,     // begin a new sequence
  input  logic         scan_en,
  input  logic         scan_in,
  output logic         scan_out,
  output logic [N-1:0] y,         // Y_0 .. Y_{N-1}
  output logic         busy,      // a vector of the sequence is on y
  output logic         eot,       // last vector of the sequence is on y
  output logic         en_dbg     // decoder EN (for observation)
);

  localparam int unsigned W0 = tpc0_width(SEQ, N);
  localparam int unsigned W1 = tpc1_width(SEQ);

  logic [W0-1:0] tpc0;
  logic [W1-1:0] tpc1;
  logic          en, cnt_q, adv, running;

  // Advance while running, not on the last vector, not while scanning.
  assign adv  = running & ~eot & ~scan_en & ~start;
  assign busy = running;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           running <= 1'b0;
    else if (start)       running <= 1'b1;
    else if (eot & ~scan_en) running <= 1'b0;
  end

  tpg_pattern_counter #(.N(N), .SEQ(SEQ)) u_tpc (
    .clk, .rst_n, .load(start), .adv, .tpc0, .tpc1
  );

  tpg_decoder #(.N(N), .SEQ(SEQ)) u_dec (
    .tpc0, .tpc1, .en, .eot
  );

  tpg_toggle #(.INIT(cnt_init(SEQ))) u_cnt (
    .clk, .rst_n, .load(start), .adv, .en, .q(cnt_q)
  );

  tpg_shift_reg #(.N(N)) u_sr (
    .clk, .rst_n, .load(start), .adv, .si(cnt_q),
    .scan_en, .scan_in, .scan_out, .y
  );

  assign en_dbg = en;

endmodule

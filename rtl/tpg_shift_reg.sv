// tpg_shift_reg -- the (2n-1)-SR register of the test pattern generator.
//
// 2N-1 D flip-flops in a chain. Stage 0 takes the serial input SI (the CNT
// toggle); every clock with adv=1 the contents move one stage further. Bus
// line Y_i is driven by stage 2*i, so neighbouring lines see the same bit
// stream two clocks apart: while the stream alternates all lines switch
// together (all are aggressors), and a repeated bit in the stream makes one
// line move against the others (the victim). The chain length, the feed from
// CNT and the tap at every second stage follow the published structure;
// which end carries Y_0 is this design's choice (Y_0 next to SI).
//
// Scan: with scan_en=1 the register shifts scan_in instead of SI and shows
// its last stage on scan_out, so it can sit inside a scan path or a wrapper
// boundary register as the text suggests. The multiplexer on the serial
// input is that integration mux.
//
// Initial state (this design's own choice, verified to give full fault
// coverage): even stages 0, odd stages 1 - as if the alternating stream had
// already filled the register - so the first vector is all zeros. It is
// loaded by rst_n (asynchronous) or load (synchronous).
//
// Timing: y changes on the clock edge after si/scan_in is sampled.
module tpg_shift_reg #(
  parameter int unsigned N = 8    // bus width n
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,      // synchronous preset to the initial pattern
  input  logic         adv,       // shift one stage (test generation)
  input  logic         si,        // serial input from CNT
  input  logic         scan_en,   // shift scan_in instead (scan path mode)
  input  logic         scan_in,
  output logic         scan_out,
  output logic [N-1:0] y          // Y_i = stage 2*i
);

  localparam int unsigned L = 2 * N - 1;

  // Even stages 0, odd stages 1.
  function automatic logic [L-1:0] init_pattern();
    logic [L-1:0] p;
    for (int unsigned j = 0; j < L; j++) p[j] = logic'(j % 2);
    return p;
  endfunction

  localparam logic [L-1:0] INIT = init_pattern();

  logic [L-1:0] sr;
  logic         din;

  assign din = scan_en ? scan_in : si;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)             sr <= INIT;
    else if (load)          sr <= INIT;
    else if (adv | scan_en) sr <= {sr[L-2:0], din};
  end

  always_comb begin
    for (int unsigned i = 0; i < N; i++) y[i] = sr[2*i];
  end

  assign scan_out = sr[L-1];

  initial assert (N >= 2) else $error("tpg_shift_reg: N must be at least 2");

endmodule

// tpg_decoder -- DEC, the decoder of the test pattern generator.
//
// Purely combinational. From the pair <TPC1,TPC0> it produces
//   en  - 0 at the listed pairs, where the CNT toggle must hold its value
//         (repeat a bit of the stream), 1 everywhere else;
//   eot - End Of Test, 1 only on the last vector of the sequence.
// MAFM (TPC0 mod n):  en = 0 at <0,0>,<1,n-2>,<2,0>,<4,0>,<4,1>,<5,n-1>,<6,1>
//                     eot = 1 at <8,0>  (vector 8n, the 8n+1-th)
// XMAFM (TPC0 mod 2n): en = 0 at <0,1>,<0,2>,<1,0>,<1,2>,<2,0>,<2,1>,<3,2>,
//                     <3,3>,<4,1>,<4,3>,<5,1>,<5,2>
//                     eot = 1 at <6,2>  (vector 12n+2, the 12n+3-th)
// These sets are the published ones. The published design leaves en and eot
// free ("don't care") after the last vector to save gates; this decoder
// resolves them as en = 1 and eot = exact match, which is one legal choice.
module tpg_decoder
  import tpg_pkg::*;
#(
  parameter int unsigned N   = 8,
  parameter seq_e        SEQ = SEQ_MAFM,
  localparam int unsigned W0  = tpc0_width(SEQ, N),
  localparam int unsigned W1  = tpc1_width(SEQ)
) (
  input  logic [W0-1:0] tpc0,
  input  logic [W1-1:0] tpc1,
  output logic          en,
  output logic          eot
);

  // Compare <tpc1,tpc0> with <a,b>.
  function automatic logic at(logic [W1-1:0] c1, logic [W0-1:0] c0,
                              int unsigned a, int unsigned b);
    return (32'(c1) == a) && (32'(c0) == b);
  endfunction

  logic hold;

  always_comb begin
    if (SEQ == SEQ_MAFM) begin
      hold = at(tpc1, tpc0, 0, 0)     || at(tpc1, tpc0, 1, N - 2) ||
             at(tpc1, tpc0, 2, 0)     || at(tpc1, tpc0, 4, 0)     ||
             at(tpc1, tpc0, 4, 1)     || at(tpc1, tpc0, 5, N - 1) ||
             at(tpc1, tpc0, 6, 1);
      eot  = at(tpc1, tpc0, 8, 0);
    end else begin
      hold = at(tpc1, tpc0, 0, 1) || at(tpc1, tpc0, 0, 2) ||
             at(tpc1, tpc0, 1, 0) || at(tpc1, tpc0, 1, 2) ||
             at(tpc1, tpc0, 2, 0) || at(tpc1, tpc0, 2, 1) ||
             at(tpc1, tpc0, 3, 2) || at(tpc1, tpc0, 3, 3) ||
             at(tpc1, tpc0, 4, 1) || at(tpc1, tpc0, 4, 3) ||
             at(tpc1, tpc0, 5, 1) || at(tpc1, tpc0, 5, 2);
      eot  = at(tpc1, tpc0, 6, 2);
    end
    en = ~hold;
  end

endmodule

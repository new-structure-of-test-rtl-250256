// xtalk_tpg_top -- crosstalk test pattern generator attached to an N-line
// bus.
//
// The (2n-1)-SR test pattern generator (sr_tpg) produces the MAFM or XMAFM
// crosstalk test sequence, and a row of 2:1 multiplexers (bus_test_mux)
// puts either that sequence or the sending core's functional data on the
// bus lines I_0..I_{N-1}. The generator's shift register can also be
// shifted as part of a scan path (scan_en/scan_in/scan_out). The response
// analyzer at the far end of the bus is not part of this block: bus_out is
// the bus as sent.
//
// Interface: start begins a sequence of m = 8N+1 (MAFM) or 12N+3 (XMAFM)
// vectors, one per clock from the cycle after start; busy is high for those
// m cycles and eot marks the last one. Parameters: N = bus width (default 8,
// the smallest size in the published tables), SEQ = sequence type.
module xtalk_tpg_top
  import tpg_pkg::*;
#(
  parameter int unsigned N   = 8,
  parameter seq_e        SEQ = SEQ_MAFM
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         test_mode,  // 1: bus carries the test sequence
  input  logic         start,
  input  logic         scan_en,
  input  logic         scan_in,
  output logic         scan_out,
  input  logic [N-1:0] func_data,
  output logic [N-1:0] bus_out,
  output logic         busy,
  output logic         eot,
  output logic         en_dbg
);

  logic [N-1:0] y;

  sr_tpg #(.N(N), .SEQ(SEQ)) u_tpg (
    .clk, .rst_n, .start, .scan_en, .scan_in, .scan_out,
    .y, .busy, .eot, .en_dbg
  );

  bus_test_mux #(.N(N)) u_mux (
    .test_mode, .func_data, .tpg_data(y), .bus_out
  );

endmodule

// tpg_table2_lane -- testbench helper: one sr_tpg of size N and sequence
// type SEQ with its own checker, for the size sweep in tb_tpg_table2.
//
// After start it counts the vectors while busy, checks the count against
// M_EXPECT (the published sequence length for this size) and that eot is
// high on the last vector only, and measures fault coverage with
// xtalk_cov_pkg. done rises when the generator is idle again; checks and
// failures are then final.
module tpg_table2_lane
  import tpg_pkg::*;
  import xtalk_cov_pkg::*;
#(
  parameter int unsigned N        = 8,
  parameter seq_e        SEQ      = SEQ_MAFM,
  parameter int unsigned M_EXPECT = 65
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic done,
  output int   checks,
  output int   failures
);

  logic [N-1:0] y;
  logic busy, eot, scan_out, en_dbg;
  int   t;
  bit   started;

  sr_tpg #(.N(N), .SEQ(SEQ)) dut (.clk, .rst_n, .start, .scan_en(1'b0), .scan_in(1'b0),
    .scan_out, .y, .busy, .eot, .en_dbg);

  xtalk_cov #(N) cov = new();

  initial begin
    checks = 0; failures = 0; t = 0; started = 0; done = 0;
  end

  always @(negedge clk) begin
    if (busy) begin
      started = 1;
      cov.add(y);
      checks++;
      if (eot != (t == int'(M_EXPECT) - 1)) begin
        failures++;
        $display("FAIL %s n=%0d: eot=%b at vector %0d", SEQ.name(), N, eot, t);
      end
      t++;
    end else if (started && !done) begin
      checks += 2;
      if (t != int'(M_EXPECT)) begin
        failures++;
        $display("FAIL %s n=%0d: length %0d, expected %0d", SEQ.name(), N, t, M_EXPECT);
      end
      if (cov.missed((SEQ == SEQ_MAFM) ? MAFM_FAULTS : XMAFM_FAULTS) != 0) begin
        failures++;
        $display("FAIL %s n=%0d: %0d lines not fully covered", SEQ.name(), N,
                 cov.missed((SEQ == SEQ_MAFM) ? MAFM_FAULTS : XMAFM_FAULTS));
      end
      $display("%s n=%0d: m=%0d vectors, all lines covered: %0d", SEQ.name(), N, t,
               cov.missed((SEQ == SEQ_MAFM) ? MAFM_FAULTS : XMAFM_FAULTS) == 0);
      done = 1;
    end
  end

endmodule

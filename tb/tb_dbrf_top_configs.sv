// tb_dbrf_top_configs: end-to-end runs of the non-default configurations.
//
// Three model cores (dbrf_top_harness) run side by side, each around its own
// dbrf_top instance:
//   C4 on the 8-wide core: 128 + 128 registers, two-cycle banks;
//   C3 on the 4-wide core: 64 + 64 registers, single-cycle banks;
//   C4 on the 4-wide core: 128 + 128 registers, two-cycle banks.
// The default configuration (C3, 8-wide) is covered by tb_dbrf_top. The result
// line sums the checks and failures of the three; a watchdog ends the run if any
// of them hangs.
module tb_dbrf_top_configs;
  import dbrf_pkg::*;

  bit d0, d1, d2;
  int c0, c1, c2, f0, f1, f2;

  dbrf_top_harness #(.IW_P(8), .NPREG_P(128), .RD_LAT_P(2), .RUN_P(20000), .REQ_STALL(1'b0))
    h_c4_iw8 (.done(d0), .checks(c0), .failures(f0));
  dbrf_top_harness #(.IW_P(4), .NPREG_P(64),  .RD_LAT_P(1), .RUN_P(20000), .REQ_STALL(1'b1))
    h_c3_iw4 (.done(d1), .checks(c1), .failures(f1));
  dbrf_top_harness #(.IW_P(4), .NPREG_P(128), .RD_LAT_P(2), .RUN_P(20000), .REQ_STALL(1'b0))
    h_c4_iw4 (.done(d2), .checks(c2), .failures(f2));

  initial begin
    fork
      wait (d0 && d1 && d2);
      #(10 * 400000);
    join_any
    if (!(d0 && d1 && d2)) begin
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2 + 1);
    end else
      $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2);
    $finish;
  end
endmodule

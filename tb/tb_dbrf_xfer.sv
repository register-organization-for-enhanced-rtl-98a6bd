// tb_dbrf_xfer: self-checking test of the RF1 -> RF2 transfer selection.
//
// Random written/busy/blocked vectors (sparse and dense). The expected result is
// built from the rule itself: an index moves when RF1 holds its value, RF2 is
// free and it is not being released; at most NBUS move, lowest indices first, in
// increasing order on the buses.
module tb_dbrf_xfer;
  import dbrf_pkg::*;

  localparam int unsigned NPREG = DEF_NPREG, NBUS = DEF_IW;
  localparam int unsigned PW = $clog2(NPREG);

  logic [NPREG-1:0] rf1_written, rf2_busy, block_mask, xfer_mask;
  logic [NBUS-1:0]  xfer_valid;
  logic [PW-1:0]    xfer_idx [NBUS];

  dbrf_xfer dut (.*);

  int checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int b, dens;
    logic [NPREG-1:0] exp_mask;
    for (int t = 0; t < 3000; t++) begin
      dens = $urandom_range(1, 8);
      for (int p = 0; p < NPREG; p++) begin
        rf1_written[p] = ($urandom_range(0, 8) < dens);
        rf2_busy[p]    = ($urandom_range(0, 8) < 9 - dens);
        block_mask[p]  = ($urandom_range(0, 15) == 0);
      end
      #1;
      b = 0;
      exp_mask = '0;
      for (int p = 0; p < NPREG; p++) begin
        if (rf1_written[p] && !rf2_busy[p] && !block_mask[p] && b < NBUS) begin
          checks++;
          if (!xfer_valid[b] || xfer_idx[b] != PW'(p)) begin
            failures++;
            $display("bus %0d: expected register %0d", b, p);
          end
          exp_mask[p] = 1'b1;
          b++;
        end
      end
      for (int k = b; k < NBUS; k++) begin
        checks++;
        if (xfer_valid[k]) begin failures++; $display("bus %0d should be idle", k); end
      end
      checks++;
      if (xfer_mask !== exp_mask) begin failures++; $display("mask mismatch"); end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
